// fs_primary_unit: primary unit of the fast fail-safe comparator (4 bits).
//
// Compares two 4-bit words A and B and turns the result into rectangular
// signals. Two 4-bit magnitude comparators of the 7485 type are used: U1
// compares A with B, U2 compares the inverted words (~A with ~B), so that a
// stuck input or chip fault is unlikely to affect both the same way. The
// cascade inputs of both chips are driven from the square wave `sq`: A=B gets
// `sq`, A<B gets the inverted wave, A>B is tied low. When the words are equal
// each chip's A=B output follows its A=B cascade input, so Q1 and Q2 carry
// identical rectangular signals; when they differ Q1 and Q2 are low.
// The arrangement (chips, negated words, cascade inputs, pin names) is taken
// from the document's circuit; the chip is modelled by its function table.
// Purely combinational.
module fs_primary_unit (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       sq,
  output logic       q1,
  output logic       q2
);
  // 4-bit magnitude comparator with cascade inputs (function table of a 7485)
  function automatic logic [2:0] cmp85(logic [3:0] x, logic [3:0] y,
                                       logic i_gt, logic i_eq, logic i_lt);
    // returns {A>B, A=B, A<B}
    if (x > y)      return 3'b100;
    else if (x < y) return 3'b001;
    else if (i_eq)  return 3'b010;
    else            return {!i_lt, 1'b0, !i_gt};
  endfunction

  logic [2:0] u1, u2;
  logic       sq_n;

  assign sq_n = !sq;                                  // inverter U4C
  assign u1 = cmp85(a, b, 1'b0, sq, sq_n);            // U1: direct words
  assign u2 = cmp85(~a, ~b, 1'b0, sq, sq_n);          // U2: inverted words (U3, U4)
  assign q1 = u1[1];
  assign q2 = u2[1];
endmodule

// mvl_literal_gen: literal generator for one 3-valued PLA input.
//
// Turns a 3-valued input X into three binary literals, each true on a
// two-element subset of {0, 1, 2}:
//   Ax = X^{1,2}   Bx = X^{0,2}   Cx = X^{0,1}
// Any two of them together cover every value (Ax+Bx = Ax+Cx = Bx+Cx = 1) and
// the complement of each is the product of the other two (not Ax = Bx.Cx, and
// so on), so an AND array fed only with these positive literals can still form
// every single-value literal X^{k}. That set of literals and relations is the
// one of the PLA structure the design follows; decoding from a 2-bit binary
// trit is this design's own.
//
// Interface: x is a trit (0..2); lit = {Cx, Bx, Ax}. The unused code 3 gives
// Ax = 1, Bx = Cx = 0. Purely combinational.
module mvl_literal_gen
  import mvl_pkg::*;
(
  input  trit_t      x,
  output logic [2:0] lit
);

  always_comb begin
    lit[0] = (x == 2'd1) || (x == 2'd2);  // Ax = X^{1,2}
    lit[1] = (x == 2'd0) || (x == 2'd2);  // Bx = X^{0,2}
    lit[2] = (x == 2'd0) || (x == 2'd1);  // Cx = X^{0,1}
  end

endmodule

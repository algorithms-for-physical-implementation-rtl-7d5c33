// mvl_out_encoder: output stage of a multiple-valued PLA.
//
// Each P-valued PLA output is computed as R binary OR-array lines h, one per
// digit of the output's binary code. This stage turns that code back into the
// P-valued value with a lookup table DEC indexed by h (h[0] is the least
// significant index bit). The default table inverts the code of the example
// function: h0 = 1 exactly when f = 2, h1 = 1 when f = 1 and free when f = 2,
// so h = 00 -> 0, 01 -> 2, 10 -> 1, 11 -> 2. Using a table here is this
// design's choice; the PLA structure only shows a box per output.
//
// Interface: h (R bits) in, f (WF bits, P-valued) out. Combinational.
module mvl_out_encoder #(
  parameter int unsigned R  = 2,
  parameter int unsigned WF = 2,
  parameter logic [(1<<R)-1:0][WF-1:0] DEC = {2'd2, 2'd1, 2'd2, 2'd0}
) (
  input  logic [R-1:0]  h,
  output logic [WF-1:0] f
);

  assign f = DEC[h];

endmodule

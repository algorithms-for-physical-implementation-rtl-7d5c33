// mvl_pla: multiple-valued programmable logic array.
//
// Structure: every 3-valued input x[i] drives a literal generator giving the
// binary literals {Cx, Bx, Ax}; the AND array forms N_TERMS product terms of
// these literals; the OR array forms N_OUT*R lines h, each a sum of terms; and
// each multiple-valued output f[j] is decoded from its R lines
// h[j*R +: R] by an mvl_out_encoder.
//
// The two arrays are programmed by parameters. Literal l of input i is bit
// 3*i+l of the literal vector (l = 0: A, 1: B, 2: C). AND_PLANE[t] has a 1 for
// each literal ANDed into term t (a term with no literal is constant 1).
// OR_PLANE[k] has a 1 for each term ORed into line h[k].
//
// The defaults implement the example function of two 3-valued inputs
//          y=0 y=1 y=2
//    x=0    0   0   0
//    x=1    1   1   2
//    x=2    0   1   2
// with h0 = Ax.Ay.By and h1 = Ax.Ay + Ax.Cx.By.Cy (terms T0 = Ax.Ay.By,
// T1 = Ax.Ay, T2 = Ax.Cx.By.Cy). The array structure and these equations are
// the design's; carrying the arrays as parameter masks and sharing one
// output decode table among all outputs are this implementation's choices.
//
// Interface: x[i] trits in, h and f out. Purely combinational.
module mvl_pla
  import mvl_pkg::*;
#(
  parameter int unsigned N_IN    = 2,
  parameter int unsigned N_TERMS = 3,
  parameter int unsigned N_OUT   = 1,
  parameter int unsigned R       = 2,
  parameter int unsigned WF      = 2,
  parameter logic [N_TERMS-1:0][3*N_IN-1:0] AND_PLANE =
    {6'b110101, 6'b001001, 6'b011001},
  parameter logic [N_OUT*R-1:0][N_TERMS-1:0] OR_PLANE =
    {3'b110, 3'b001},
  parameter logic [(1<<R)-1:0][WF-1:0] DEC = {2'd2, 2'd1, 2'd2, 2'd0}
) (
  input  trit_t [N_IN-1:0]            x,
  output logic  [N_OUT*R-1:0]         h,
  output logic  [N_OUT-1:0][WF-1:0]   f
);

  logic [3*N_IN-1:0]  lit;
  logic [N_TERMS-1:0] term;

  // Literal generators.
  for (genvar i = 0; i < N_IN; i++) begin : g_lit
    mvl_literal_gen u_lit (
      .x   (x[i]),
      .lit (lit[3*i +: 3])
    );
  end

  // AND array: a term is 1 when every literal it uses is 1.
  always_comb begin
    for (int t = 0; t < N_TERMS; t++) begin
      term[t] = &(lit | ~AND_PLANE[t]);
    end
  end

  // OR array: a line is 1 when any term it uses is 1.
  always_comb begin
    for (int k = 0; k < N_OUT*R; k++) begin
      h[k] = |(term & OR_PLANE[k]);
    end
  end

  // Output encoders.
  for (genvar j = 0; j < N_OUT; j++) begin : g_out
    mvl_out_encoder #(.R(R), .WF(WF), .DEC(DEC)) u_enc (
      .h (h[j*R +: R]),
      .f (f[j])
    );
  end

endmodule

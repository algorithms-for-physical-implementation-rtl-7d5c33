// mvl_top: the three multiple-valued example circuits side by side.
//
//   * mvl_seq_fsm  - synchronous sequential circuit with a 3-valued input v
//                    and a 4-valued state q, its next-state logic made of
//                    3-valued multiplexer cells (clocked; q changes one cycle
//                    after v);
//   * mvl_pla      - multiple-valued PLA computing the 3-valued function
//                    F(x, y) through binary literals, AND and OR arrays and
//                    an output decoder (combinational);
//   * mvl_max3     - 3-valued Max(x, y) as a tree of three 3-valued
//                    multiplexers (combinational).
// The circuits are independent; each has its own ports. All multiple-valued
// signals are binary-coded trits (see mvl_pkg).
module mvl_top
  import mvl_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // sequential circuit
  input  trit_t       v,
  output quad_t       q,
  output state_code_t q_code,
  // MVL-PLA
  input  trit_t       pla_x,
  input  trit_t       pla_y,
  output logic [1:0]  pla_h,
  output trit_t       pla_f,
  // Max tree
  input  trit_t       max_x,
  input  trit_t       max_y,
  output trit_t       max_z
);

  mvl_seq_fsm u_fsm (
    .clk    (clk),
    .rst_n  (rst_n),
    .v      (v),
    .q_code (q_code),
    .q      (q)
  );

  trit_t [1:0] pla_in;
  assign pla_in = {pla_y, pla_x};

  mvl_pla u_pla (
    .x (pla_in),
    .h (pla_h),
    .f (pla_f)
  );

  mvl_max3 u_max (
    .x (max_x),
    .y (max_y),
    .z (max_z)
  );

endmodule

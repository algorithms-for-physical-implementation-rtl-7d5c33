// mvl_seq_fsm: the sample synchronous sequential circuit with a 3-valued
// input v and a 4-valued state q.
//
// The state is held as its two-trit code (q0, q1) in a register of four
// flip-flops and fed back through the multiplexer network mvl_nextstate_q.
// On every rising clock edge the register loads the next state of the
// transition table (v = 0 or 1: 0->0, 1->1, 2->3, 3->3; v = 2: 0->1, 1->2,
// 2->0, 3->1). The state is also given as its 4-valued value q.
//
// Interface and timing: v is sampled at the rising edge of clk; q and q_code
// change one cycle after v is applied. rst_n is an active-low synchronous
// reset to state 0. The reset and its value are this design's choice; the
// table itself gives none. The circuit has no output apart from its state.
// An assertion checks that the register never holds one of the unused codes.
module mvl_seq_fsm
  import mvl_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  trit_t       v,
  output state_code_t q_code,
  output quad_t       q
);

  state_code_t nq_code;

  mvl_nextstate_q u_next (
    .v       (v),
    .q_code  (q_code),
    .nq_code (nq_code)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) q_code <= encode_state(2'd0);
    else        q_code <= nq_code;
  end

  assign q = decode_state(q_code);

  // Only the four used codes may ever be held: (0,0), (0,1), (0,2), (1,0).
  a_state_code_used : assert property (
    @(posedge clk) disable iff (!rst_n)
      (q_code.q0 == 2'd0 && q_code.q1 != 2'd3) || (q_code.q0 == 2'd1 && q_code.q1 == 2'd0)
  );

endmodule

// mvl_nextstate_q: next-state logic of the sample sequential circuit, built
// only from 3-valued multiplexer cells.
//
// The circuit has a 3-valued input v and a 4-valued state q with the
// transition table
//   v = 0 or 1 : q = 0, 1, 2, 3  ->  Q = 0, 1, 3, 3
//   v = 2      : q = 0, 1, 2, 3  ->  Q = 1, 2, 0, 1
// Because q and Q are 4-valued and the cells are 3-valued, q and Q are each
// coded as two trits (see mvl_pkg: 0,1,2 -> (0,q), 3 -> (1,0)). The next-state
// MDD is re-expressed over v, q0, q1 and split into one MDD per output trit;
// each nonterminal node of these two MDDs is one mvl_mux:
//   Q0 = <v, a, a, 0>          a = <q0, b, 1, 1>      b = <q1, 0, 0, 1>
//   Q1 = <v, c, c, d>          c = <q0, e, 0, 0>      e = <q1, 0, 1, 0>
//                              d = <q0, g, 1, 1>      g = <q1, 1, 2, 0>
// (eight cells). The node order, v at the root, then q0, then q1, follows the
// mapped diagrams of the example; the node contents were derived with one
// state code used on both the present-state and next-state side, so that the
// register of mvl_seq_fsm can feed Q straight back as q. The unused code
// q0 = 2 behaves like q0 = 1 (q = 3).
//
// Interface: v is a trit, q_code and nq_code are two-trit state codes.
// Purely combinational.
module mvl_nextstate_q
  import mvl_pkg::*;
(
  input  trit_t       v,
  input  state_code_t q_code,
  output state_code_t nq_code
);

  localparam int unsigned P = 3;
  localparam int unsigned W = 2;

  trit_t a, b, c, d, e, g;

  // ---- MDD of the next-state digit Q0 ----
  mvl_mux #(.P(P), .W(W)) u_b (
    .sel (q_code.q1), .d ({2'd1, 2'd0, 2'd0}), .y (b)
  );
  mvl_mux #(.P(P), .W(W)) u_a (
    .sel (q_code.q0), .d ({2'd1, 2'd1, b}), .y (a)
  );
  mvl_mux #(.P(P), .W(W)) u_q0 (
    .sel (v), .d ({2'd0, a, a}), .y (nq_code.q0)
  );

  // ---- MDD of the next-state digit Q1 ----
  mvl_mux #(.P(P), .W(W)) u_e (
    .sel (q_code.q1), .d ({2'd0, 2'd1, 2'd0}), .y (e)
  );
  mvl_mux #(.P(P), .W(W)) u_c (
    .sel (q_code.q0), .d ({2'd0, 2'd0, e}), .y (c)
  );
  mvl_mux #(.P(P), .W(W)) u_g (
    .sel (q_code.q1), .d ({2'd0, 2'd2, 2'd1}), .y (g)
  );
  mvl_mux #(.P(P), .W(W)) u_d (
    .sel (q_code.q0), .d ({2'd1, 2'd1, g}), .y (d)
  );
  mvl_mux #(.P(P), .W(W)) u_q1 (
    .sel (v), .d ({d, c, c}), .y (nq_code.q1)
  );

endmodule

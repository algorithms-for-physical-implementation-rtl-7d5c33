// mvl_max3: 3-valued Max(x, y) as a tree of 3-valued multiplexers.
//
// The reduced ordered MDD of Max with the order x < y has a root on x and two
// nodes on y; the third arc of the root (x = 2) goes straight to the value 2
// because the y node there would be redundant. Each nonterminal node is
// mapped to one mvl_mux cell:
//   root  = <x, n0, n1, 2>
//   n0    = <y, 0, 1, 2>
//   n1    = <y, 1, 1, 2>
// so the circuit uses three cells. Purely combinational.
//
// Interface: x, y and z are 3-valued digits on two wires each (0..2).
module mvl_max3
  import mvl_pkg::*;
(
  input  trit_t x,
  input  trit_t y,
  output trit_t z
);

  trit_t n0, n1;

  mvl_mux #(.P(3), .W(2)) u_n0 (
    .sel (y),
    .d   ({2'd2, 2'd1, 2'd0}),
    .y   (n0)
  );

  mvl_mux #(.P(3), .W(2)) u_n1 (
    .sel (y),
    .d   ({2'd2, 2'd1, 2'd1}),
    .y   (n1)
  );

  mvl_mux #(.P(3), .W(2)) u_root (
    .sel (x),
    .d   ({2'd2, n1, n0}),
    .y   (z)
  );

endmodule

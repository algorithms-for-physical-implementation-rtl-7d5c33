// mvl_mux: P-valued multiplexer cell.
//
// The basic cell of a multiplexer-based circuit built from a multiple-valued
// decision diagram (MDD): every nonterminal MDD node becomes one of these
// cells, its select driven by the node's variable and its data input k driven
// by the cell (or constant) of the node's k-th child. The output follows
// d[sel] combinationally; there is no clock.
//
// Interface: sel is a P-valued digit carried as a W-bit unsigned number,
// d[k] are the W-bit data values. A select outside 0..P-1 (such as the unused
// code 3 of a ternary digit) gives 0; that, and the binary carrying of the
// values, are this design's choices. The default P = 3 is the 3-valued cell of
// the mapping example.
module mvl_mux #(
  parameter int unsigned P = 3,
  parameter int unsigned W = 2
) (
  input  logic [W-1:0]         sel,
  input  logic [P-1:0][W-1:0]  d,
  output logic [W-1:0]         y
);

  always_comb begin
    y = '0;
    for (int unsigned k = 0; k < P; k++) begin
      if (sel == W'(k)) y = d[k];
    end
  end

endmodule

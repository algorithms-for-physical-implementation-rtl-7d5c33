// tb_mvl_mux: self-checking test of the P-valued multiplexer cell.
// Drives a 3-valued cell (the default) and a 4-valued cell with random data
// for every select value, including the unused select code of the 3-valued
// cell, and compares the output with the expected data input.
module tb_mvl_mux;
  int checks = 0, failures = 0;

  logic [1:0]       sel3, y3;
  logic [2:0][1:0]  d3;
  logic [1:0]       sel4;
  logic [3:0][2:0]  d4;
  logic [2:0]       y4;

  mvl_mux dut3 (.sel(sel3), .d(d3), .y(y3));
  mvl_mux #(.P(4), .W(3)) dut4 (.sel({1'b0, sel4}), .d(d4), .y(y4));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 50; rep++) begin
      for (int s = 0; s < 4; s++) begin
        logic [1:0] exp3;
        sel3 = 2'(s);
        sel4 = 2'(s);
        for (int k = 0; k < 3; k++) d3[k] = 2'($urandom_range(0, 2));
        for (int k = 0; k < 4; k++) d4[k] = 3'($urandom_range(0, 3));
        #1;
        exp3 = (s == 0) ? d3[0] : (s == 1) ? d3[1] : (s == 2) ? d3[2] : 2'd0;
        checks++;
        if (y3 !== exp3) begin
          failures++;
          $display("FAIL P=3 sel=%0d y=%0d exp=%0d", s, y3, exp3);
        end
        checks++;
        if (y4 !== d4[s]) begin
          failures++;
          $display("FAIL P=4 sel=%0d y=%0d exp=%0d", s, y4, d4[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

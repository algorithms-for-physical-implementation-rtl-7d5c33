// tb_mvl_out_encoder: checks the default decode of the PLA output lines
// (h1 h0 = 00 -> 0, 10 -> 1, x1 -> 2) and a second, user table.
module tb_mvl_out_encoder;
  int checks = 0, failures = 0;

  logic [1:0] h;
  logic [1:0] f;
  logic [2:0] f3;
  mvl_out_encoder dut (.h(h), .f(f));
  // second instance: straight binary-to-value table on 3-bit outputs
  mvl_out_encoder #(.R(2), .WF(3), .DEC({3'd7, 3'd5, 3'd3, 3'd1})) dut3 (.h(h), .f(f3));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 4; c++) begin
      int e;
      h = 2'(c);
      #1;
      e = h[0] ? 2 : (h[1] ? 1 : 0);
      checks++;
      if (int'(f) != e) begin
        failures++;
        $display("FAIL h=%b f=%0d exp=%0d", h, f, e);
      end
      checks++;
      if (int'(f3) != 2 * c + 1) begin
        failures++;
        $display("FAIL table h=%b f=%0d exp=%0d", h, f3, 2 * c + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

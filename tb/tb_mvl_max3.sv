// tb_mvl_max3: exhaustive test of the 3-valued Max multiplexer tree against
// the Max truth table (rows y, columns x).
module tb_mvl_max3;
  import mvl_pkg::*;
  int checks = 0, failures = 0;

  trit_t x, y, z;
  mvl_max3 dut (.x(x), .y(y), .z(z));

  // TABLE[y][x]
  localparam int TABLE [3][3] = '{'{0, 1, 2}, '{1, 1, 2}, '{2, 2, 2}};

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int yi = 0; yi < 3; yi++) begin
      for (int xi = 0; xi < 3; xi++) begin
        x = 2'(xi);
        y = 2'(yi);
        #1;
        checks++;
        if (int'(z) != TABLE[yi][xi]) begin
          failures++;
          $display("FAIL x=%0d y=%0d z=%0d exp=%0d", xi, yi, z, TABLE[yi][xi]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

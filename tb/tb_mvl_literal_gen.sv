// tb_mvl_literal_gen: checks the three binary literals of a 3-valued input
// against their value sets {1,2}, {0,2}, {0,1}, and the relations between
// them (any two cover all values; each complement is the product of the
// other two).
module tb_mvl_literal_gen;
  import mvl_pkg::*;
  int checks = 0, failures = 0;

  trit_t      x;
  logic [2:0] lit;
  mvl_literal_gen dut (.x(x), .lit(lit));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xi = 0; xi < 3; xi++) begin
      logic a, b, c;
      x = 2'(xi);
      #1;
      a = (xi inside {1, 2});
      b = (xi inside {0, 2});
      c = (xi inside {0, 1});
      checks++;
      if (lit !== {c, b, a}) begin
        failures++;
        $display("FAIL x=%0d lit=%b exp=%b", xi, lit, {c, b, a});
      end
      checks++;
      if (!((lit[0] | lit[1]) & (lit[0] | lit[2]) & (lit[1] | lit[2]))) begin
        failures++;
        $display("FAIL x=%0d: pairs do not cover", xi);
      end
      checks++;
      if ((~lit[0] != (lit[1] & lit[2])) || (~lit[1] != (lit[0] & lit[2])) ||
          (~lit[2] != (lit[0] & lit[1]))) begin
        failures++;
        $display("FAIL x=%0d: complement relations", xi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

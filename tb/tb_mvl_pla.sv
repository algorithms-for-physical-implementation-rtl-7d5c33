// tb_mvl_pla: exhaustive test of the multiple-valued PLA.
// The default-programmed PLA must realise the example function F(x, y) and its
// lines must follow the output code (h0 = 1 exactly where F = 2, h1 = 1 where
// F = 1, h1 = 0 where F = 0). A second PLA with one input is programmed with
// the single-value products X^{1} = Ax.Cx and X^{2} = Ax.Bx and must return
// its input unchanged.
module tb_mvl_pla;
  import mvl_pkg::*;
  int checks = 0, failures = 0;

  trit_t [1:0] xy;
  logic  [1:0] h;
  trit_t [0:0] f;

  mvl_pla dut (.x(xy), .h(h), .f(f));

  trit_t [0:0] xi;
  logic  [1:0] hi;
  trit_t [0:0] fi;
  mvl_pla #(
    .N_IN(1), .N_TERMS(2), .N_OUT(1), .R(2), .WF(2),
    .AND_PLANE({3'b011, 3'b101}),   // T1 = Ax.Bx (x=2), T0 = Ax.Cx (x=1)
    .OR_PLANE({2'b01, 2'b10})       // h1 = T0, h0 = T1
  ) dut_id (.x(xi), .h(hi), .f(fi));

  // F[x][y]
  localparam int F [3][3] = '{'{0, 0, 0}, '{1, 1, 2}, '{0, 1, 2}};

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 3; x++) begin
      for (int y = 0; y < 3; y++) begin
        int e;
        xy[0] = 2'(x);
        xy[1] = 2'(y);
        #1;
        e = F[x][y];
        checks++;
        if (int'(f[0]) != e) begin
          failures++;
          $display("FAIL x=%0d y=%0d f=%0d exp=%0d", x, y, f[0], e);
        end
        checks++;
        if (h[0] != (e == 2) || (e == 1 && !h[1]) || (e == 0 && h[1])) begin
          failures++;
          $display("FAIL x=%0d y=%0d h=%b for F=%0d", x, y, h, e);
        end
      end
    end
    for (int x = 0; x < 3; x++) begin
      xi[0] = 2'(x);
      #1;
      checks++;
      if (int'(fi[0]) != x) begin
        failures++;
        $display("FAIL identity PLA x=%0d f=%0d", x, fi[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

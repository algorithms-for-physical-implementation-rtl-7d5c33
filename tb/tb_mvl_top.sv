// tb_mvl_top: end-to-end test of the three example circuits at their default
// parameters.
//   * Sequential circuit: after reset, a directed walk that takes all eight
//     rows of the transition table, then random inputs; the state is checked
//     every cycle against a reference model, one clock after v is applied.
//   * PLA: every (x, y) pair against the table of F, with the line code h.
//   * Max tree: every (x, y) pair against max().
// Each mechanism is counted (table rows taken, resets, each PLA output value
// produced, each Max output value produced, PLA line h1 set as a don't-care
// where F = 2) and a mechanism that never occurred counts as a failure.
module tb_mvl_top;
  import mvl_pkg::*;
  int checks = 0, failures = 0;

  logic        clk = 1'b0;
  logic        rst_n;
  trit_t       v;
  quad_t       q;
  state_code_t q_code;
  trit_t       pla_x, pla_y, pla_f;
  logic [1:0]  pla_h;
  trit_t       max_x, max_y, max_z;

  mvl_top dut (
    .clk(clk), .rst_n(rst_n), .v(v), .q(q), .q_code(q_code),
    .pla_x(pla_x), .pla_y(pla_y), .pla_h(pla_h), .pla_f(pla_f),
    .max_x(max_x), .max_y(max_y), .max_z(max_z)
  );

  always #5 clk = ~clk;

  localparam int NEXT [3][4] = '{'{0, 1, 3, 3}, '{0, 1, 3, 3}, '{1, 2, 0, 1}};
  localparam int F    [3][3] = '{'{0, 0, 0}, '{1, 1, 2}, '{0, 1, 2}};

  int model;
  int row_hits [4][2];
  int resets = 0;
  int pla_vals [3];
  int max_vals [3];
  int h1_dont_care = 0;
  int cycles = 0;

  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fsm_step(input int vin);
    v = 2'(vin);
    row_hits[model][(vin == 2) ? 1 : 0]++;
    model = NEXT[vin][model];
    @(posedge clk);
    #1;
    checks++;
    if (int'(q) != model || decode_state(q_code) != quad_t'(model)) begin
      failures++;
      $display("FAIL fsm v=%0d q=%0d exp=%0d", vin, q, model);
    end
  endtask

  task automatic fsm_reset();
    rst_n = 1'b0;
    @(posedge clk);
    #1;
    rst_n = 1'b1;
    model = 0;
    resets++;
    checks++;
    if (q !== 2'd0) begin
      failures++;
      $display("FAIL reset q=%0d", q);
    end
  endtask

  initial begin
    foreach (row_hits[i, j]) row_hits[i][j] = 0;
    foreach (pla_vals[i]) pla_vals[i] = 0;
    foreach (max_vals[i]) max_vals[i] = 0;
    v = 2'd0;
    pla_x = 2'd0; pla_y = 2'd0; max_x = 2'd0; max_y = 2'd0;
    model = 0;
    fsm_reset();

    // directed walk over all eight table rows:
    // 0 -0-> 0 -2-> 1 -1-> 1 -2-> 2 -2-> 0 -2-> 1 -2-> 2 -0-> 3 -1-> 3 -2-> 1
    // then 1 -2-> 2 -1-> 3 -0-> 3 -2-> 1 -0-> 1 -2-> 2 -2-> 0 -1-> 0
    begin
      int walk [18] = '{0, 2, 1, 2, 2, 2, 2, 0, 1, 2, 2, 1, 0, 2, 0, 2, 2, 1};
      foreach (walk[k]) fsm_step(walk[k]);
    end
    fsm_reset();
    for (int n = 0; n < 300; n++) fsm_step($urandom_range(0, 2));

    // combinational circuits, all inputs
    for (int x = 0; x < 3; x++) begin
      for (int y = 0; y < 3; y++) begin
        int e, m;
        pla_x = 2'(x); pla_y = 2'(y);
        max_x = 2'(x); max_y = 2'(y);
        #1;
        e = F[x][y];
        m = (x > y) ? x : y;
        checks++;
        if (int'(pla_f) != e || pla_h[0] != (e == 2)) begin
          failures++;
          $display("FAIL pla x=%0d y=%0d f=%0d h=%b exp=%0d", x, y, pla_f, pla_h, e);
        end
        checks++;
        if (int'(max_z) != m) begin
          failures++;
          $display("FAIL max x=%0d y=%0d z=%0d", x, y, max_z);
        end
        pla_vals[pla_f]++;
        max_vals[max_z]++;
        if (e == 2 && pla_h[1]) h1_dont_care++;
      end
    end

    // mechanism coverage
    foreach (row_hits[i, j]) begin
      checks++;
      if (row_hits[i][j] == 0) begin
        failures++;
        $display("FAIL table row q=%0d v%s never taken", i, (j != 0) ? "=2" : " in {0,1}");
      end
    end
    foreach (pla_vals[i]) begin
      checks++;
      if (pla_vals[i] == 0) begin failures++; $display("FAIL PLA never gave %0d", i); end
      checks++;
      if (max_vals[i] == 0) begin failures++; $display("FAIL Max never gave %0d", i); end
    end
    checks++;
    if (resets < 2) begin failures++; $display("FAIL fewer than two resets"); end
    checks++;
    if (h1_dont_care == 0) begin failures++; $display("FAIL h1 don't-care never used"); end
    $display("table rows taken: %0d %0d / %0d %0d / %0d %0d / %0d %0d; resets %0d; PLA values %0d %0d %0d; Max values %0d %0d %0d; h1 set where F=2: %0d",
             row_hits[0][0], row_hits[0][1], row_hits[1][0], row_hits[1][1],
             row_hits[2][0], row_hits[2][1], row_hits[3][0], row_hits[3][1], resets,
             pla_vals[0], pla_vals[1], pla_vals[2], max_vals[0], max_vals[1], max_vals[2],
             h1_dont_care);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

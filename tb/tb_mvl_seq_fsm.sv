// tb_mvl_seq_fsm: clocked test of the sequential circuit. After reset the
// state must be 0; then a random 3-valued input sequence is applied and the
// state is compared each cycle with a reference model of the transition table.
// Checks that the state changes exactly one clock after v is applied and
// that every one of the eight rows of the table (state, v in {0,1} or 2) is
// exercised.
module tb_mvl_seq_fsm;
  import mvl_pkg::*;
  int checks = 0, failures = 0;

  logic        clk = 1'b0;
  logic        rst_n;
  trit_t       v;
  state_code_t qc;
  quad_t       q;

  mvl_seq_fsm dut (.clk(clk), .rst_n(rst_n), .v(v), .q_code(qc), .q(q));

  always #5 clk = ~clk;

  localparam int NEXT [3][4] = '{'{0, 1, 3, 3}, '{0, 1, 3, 3}, '{1, 2, 0, 1}};

  int model;
  int row_hits [4][2];
  int cycles = 0;

  always @(posedge clk) cycles++;

  initial begin : watchdog
    wait (cycles == 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (row_hits[i, j]) row_hits[i][j] = 0;
    rst_n = 1'b0;
    v = 2'd2;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== 2'd0 || qc.q0 !== 2'd0 || qc.q1 !== 2'd0) begin
      failures++;
      $display("FAIL reset state q=%0d", q);
    end
    rst_n = 1'b1;
    model = 0;
    for (int n = 0; n < 400; n++) begin
      int prev_q;
      v = 2'($urandom_range(0, 2));
      row_hits[model][(v == 2'd2) ? 1 : 0]++;
      #1;
      // combinational change of v must not move the state
      checks++;
      if (int'(q) != model) begin
        failures++;
        $display("FAIL state moved before the clock: q=%0d exp=%0d", q, model);
      end
      prev_q = model;
      model = NEXT[v][model];
      @(posedge clk);
      #1;
      checks++;
      if (int'(q) != model || qc != encode_state(2'(model))) begin
        failures++;
        $display("FAIL cycle %0d: q=%0d v=%0d -> q=%0d exp=%0d", n, prev_q, v, q, model);
      end
      // a reset in the middle of the run
      if (n == 200) begin
        rst_n = 1'b0;
        @(posedge clk);
        #1;
        rst_n = 1'b1;
        model = 0;
        checks++;
        if (q !== 2'd0) begin
          failures++;
          $display("FAIL mid-run reset");
        end
      end
    end
    foreach (row_hits[i, j]) begin
      checks++;
      if (row_hits[i][j] == 0) begin
        failures++;
        $display("FAIL table row q=%0d v%s never exercised", i, (j != 0) ? "=2" : " in {0,1}");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mvl_nextstate_q: exhaustive test of the multiplexer-built next-state
// logic. For every input v and state q the next-state code must be the code
// of the transition-table entry; the unused code q0 = 2 must act as q = 3.
module tb_mvl_nextstate_q;
  import mvl_pkg::*;
  int checks = 0, failures = 0;

  trit_t       v;
  state_code_t qc, nqc;
  mvl_nextstate_q dut (.v(v), .q_code(qc), .nq_code(nqc));

  // NEXT[v][q]
  localparam int NEXT [3][4] = '{'{0, 1, 3, 3}, '{0, 1, 3, 3}, '{1, 2, 0, 1}};
  // Two-trit codes {q0, q1} of the values 0..3, written out independently.
  localparam int CODE_Q0 [4] = '{0, 0, 0, 1};
  localparam int CODE_Q1 [4] = '{0, 1, 2, 0};

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int vi = 0; vi < 3; vi++) begin
      for (int qi = 0; qi < 4; qi++) begin
        int e;
        v = 2'(vi);
        qc.q0 = 2'(CODE_Q0[qi]);
        qc.q1 = 2'(CODE_Q1[qi]);
        #1;
        e = NEXT[vi][qi];
        checks++;
        if (int'(nqc.q0) != CODE_Q0[e] || int'(nqc.q1) != CODE_Q1[e]) begin
          failures++;
          $display("FAIL v=%0d q=%0d next=(%0d,%0d) exp=(%0d,%0d)",
                   vi, qi, nqc.q0, nqc.q1, CODE_Q0[e], CODE_Q1[e]);
        end
      end
      // unused code q0 = 2 is read as q = 3, whatever q1 is
      for (int q1 = 0; q1 < 3; q1++) begin
        int e;
        qc.q0 = 2'd2;
        qc.q1 = 2'(q1);
        #1;
        e = NEXT[vi][3];
        checks++;
        if (int'(nqc.q0) != CODE_Q0[e] || int'(nqc.q1) != CODE_Q1[e]) begin
          failures++;
          $display("FAIL v=%0d code=(2,%0d) next=(%0d,%0d)", vi, q1, nqc.q0, nqc.q1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

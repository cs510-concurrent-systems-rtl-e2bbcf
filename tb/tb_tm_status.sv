// tb_tm_status: random test of the TACTIVE/TSTATUS bits against a reference
// model written from the truth table and the VALIDATE/COMMIT/ABORT flowcharts.
// Each cycle one of: nothing, transactional access, conflict, access plus
// conflict, VALIDATE, COMMIT, ABORT is applied; the combinational results and
// the next-cycle bits are compared with the model.
module tb_tm_status;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic tx_begin, conflict, do_validate, do_commit, do_abort;
  logic tactive, tstatus, orphan, result, cache_commit, cache_abort;

  tm_status dut (.*);

  int checks = 0, failures = 0;
  logic m_act, m_st;
  int n_orphan = 0, n_cfail = 0, n_cok = 0;

  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {tx_begin, conflict, do_validate, do_commit, do_abort} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    m_act = 1'b0; m_st = 1'b1;
    @(negedge clk);
    check("reset: no transaction", !tactive && tstatus);
    for (int i = 0; i < 4000; i++) begin
      int unsigned r;
      logic e_commit, e_abort, e_res;
      r = $urandom % 8;
      {tx_begin, conflict, do_validate, do_commit, do_abort} = '0;
      case (r)
        0, 1: tx_begin = 1'b1;
        2:    conflict = (m_act && ($urandom % 2 == 0));
        3:    begin tx_begin = 1'b1; conflict = ($urandom % 3 == 0); end
        4:    do_validate = 1'b1;
        5, 6: do_commit = 1'b1;
        default: do_abort = 1'b1;
      endcase
      #1;
      e_res    = m_st;
      e_commit = do_commit && m_st;
      e_abort  = do_abort || (do_commit && !m_st);
      check("orphan output", orphan == (m_act && !m_st));
      if (do_validate || do_commit) check("result", result == e_res);
      check("cache_commit", cache_commit == e_commit);
      check("cache_abort", cache_abort == e_abort);
      if (orphan) n_orphan++;
      if (do_commit && !m_st) n_cfail++;
      if (do_commit && m_st && m_act) n_cok++;
      // model update
      if (do_abort || do_commit || (do_validate && !m_st)) begin
        m_act = 1'b0; m_st = 1'b1;
      end else begin
        if (tx_begin) m_act = 1'b1;
        if (conflict) m_st = 1'b0;
      end
      @(negedge clk);
      check("TACTIVE", tactive == m_act);
      check("TSTATUS", tstatus == m_st);
    end
    check("orphan state reached", n_orphan > 0);
    check("failed commit reached", n_cfail > 0);
    check("successful commit reached", n_cok > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

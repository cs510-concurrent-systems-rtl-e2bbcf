// tb_tm_system_full: the multiprocessor at its full default size (32
// processors, 2048-line regular caches, 64-entry transactional caches, 64 Ki
// words of memory, 4-cycle memory). Checks miss and hit latency, then all 32
// processors run the counting benchmark on one shared counter (LTX + ST +
// COMMIT with software exponential backoff) and the final count is read back
// through a regular LOAD. Also checks that transactions were refused (BUSY)
// and retried on the way.
module tb_tm_system_full;
  import tm_pkg::*;

  localparam int N    = 32;
  localparam int AW   = 16;
  localparam int WORK = 4;
  localparam logic [AW-1:0] CNT = 16'h1234;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] req_valid, req_ready, resp_valid, resp_ok, tactive, tstatus;
  tm_op_e        req_op    [N];
  logic [AW-1:0] req_addr  [N];
  word_t         req_wdata [N];
  word_t         resp_data [N];
  tm_events_t    ev        [N];
  logic          mem_init_we = 1'b0;
  logic [AW-1:0] mem_init_addr = '0;
  word_t         mem_init_data = '0;

  logic          v_a  [N];
  tm_op_e        op_a [N];
  logic [AW-1:0] ad_a [N];
  word_t         wd_a [N];
  always_comb
    for (int p = 0; p < N; p++) begin
      req_valid[p] = v_a[p];
      req_op[p]    = op_a[p];
      req_addr[p]  = ad_a[p];
      req_wdata[p] = wd_a[p];
    end

  tm_system dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_op, .req_addr, .req_wdata,
    .resp_valid, .resp_data, .resp_ok, .tactive, .tstatus, .ev,
    .mem_init_we, .mem_init_addr, .mem_init_data
  );

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int n_busy = 0, n_cok = 0, n_cfail = 0;
  always @(posedge clk) if (rst_n)
    for (int p = 0; p < N; p++) begin
      n_busy  += int'(ev[p].busy_refused);
      n_cok   += int'(ev[p].commit_ok);
      n_cfail += int'(ev[p].commit_fail);
    end

  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  task automatic issue(input int p, input tm_op_e op, input logic [AW-1:0] a,
                       input word_t wd, output word_t d, output logic ok, output int lat);
    int t0;
    @(negedge clk);
    v_a[p] = 1'b1; op_a[p] = op; ad_a[p] = a; wd_a[p] = wd;
    forever begin #4; if (req_ready[p]) break; @(negedge clk); end
    @(posedge clk); t0 = cyc;
    @(negedge clk); v_a[p] = 1'b0;
    while (!resp_valid[p]) @(negedge clk);
    lat = cyc - t0; d = resp_data[p]; ok = resp_ok[p];
  endtask

  task automatic count_proc(input int p);
    int success = 0, backoff = 0, waitc, lat;
    word_t d;
    logic ok;
    while (success < WORK) begin
      issue(p, OP_LTX, CNT, '0, d, ok, lat);
      issue(p, OP_ST,  CNT, d + 1, d, ok, lat);
      issue(p, OP_COMMIT, '0, '0, d, ok, lat);
      if (ok) begin success++; backoff = 0; end
      else begin
        waitc = int'($urandom % (32'd1 << backoff));
        repeat (waitc) @(negedge clk);
        if (backoff < 8) backoff++;
      end
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t d; logic ok; int lat;
    for (int p = 0; p < N; p++) begin
      v_a[p] = 1'b0; op_a[p] = OP_LOAD; ad_a[p] = '0; wd_a[p] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    mem_init_we = 1'b1; mem_init_addr = CNT; mem_init_data = '0;
    @(negedge clk);
    mem_init_addr = 16'h0777; mem_init_data = 64'd4242;
    @(negedge clk);
    mem_init_we = 1'b0;

    issue(31, OP_LOAD, 16'h0777, '0, d, ok, lat);
    check("miss: data and 1+4 cycles", d == 64'd4242 && lat == 5);
    issue(31, OP_LOAD, 16'h0777, '0, d, ok, lat);
    check("hit: 1 cycle", d == 64'd4242 && lat == 1);

    for (int p = 0; p < N; p++) begin
      automatic int q = p;
      fork count_proc(q); join_none
    end
    wait fork;
    issue(0, OP_LOAD, CNT, '0, d, ok, lat);
    $display("counter=%0d expected=%0d busy=%0d commits=%0d failed=%0d cycles=%0d",
             d, N * WORK, n_busy, n_cok, n_cfail, cyc);
    check("counter = 32*WORK", d == 64'(N * WORK));
    check("commits = 32*WORK", n_cok == N * WORK);
    check("contention produced BUSY refusals", n_busy > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tm_system: end-to-end test of the transactional-memory multiprocessor at
// reduced size (4 processors, 16-line regular caches, 8-entry transactional
// caches, 256 words of memory, 4-cycle memory).
//
// Behavioural processors drive the instruction ports. A directed part checks,
// against values worked out by hand: hit and miss latency (1 and 1+MEM_LAT
// cycles), coherence between regular caches (dirty data supplied on a snooped
// read), a committed transaction becoming visible, a BUSY refusal aborting the
// requester, a snooped write turning a reader into an orphan, ABORT restoring
// the old value, write-backs of replaced dirty lines from both caches and a
// transactional-cache overflow. Then all processors run the counting
// benchmark (shared counter, LTX + ST + COMMIT, software exponential backoff)
// and the final count is checked. Every protocol mechanism must have happened
// at least once.
module tb_tm_system;
  import tm_pkg::*;

  localparam int N       = 4;
  localparam int AW      = 8;
  localparam int MEM_LAT = 4;
  localparam int WORK    = 40;       // increments per processor
  localparam int WATCHDOG = 400000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] req_valid, req_ready, resp_valid, resp_ok, tactive, tstatus;
  tm_op_e       req_op    [N];
  logic [AW-1:0] req_addr [N];
  word_t        req_wdata [N];
  word_t        resp_data [N];
  tm_events_t   ev        [N];
  logic         mem_init_we = 1'b0;
  logic [AW-1:0] mem_init_addr = '0;
  word_t        mem_init_data = '0;

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

  tm_system #(.N_PROC(N), .ADDR_W(AW), .RC_LINES(16), .TX_ENTRIES(8), .MEM_LAT(MEM_LAT)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_op, .req_addr, .req_wdata,
    .resp_valid, .resp_data, .resp_ok, .tactive, .tstatus, .ev,
    .mem_init_we, .mem_init_addr, .mem_init_data
  );

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_hit, n_miss, n_wb, n_busy, n_confl, n_ovf, n_cok, n_cfail, n_vfail, n_orph, n_abort;
  always @(posedge clk) if (rst_n)
    for (int p = 0; p < N; p++) begin
      n_hit   += int'(ev[p].hit);
      n_miss  += int'(ev[p].miss);
      n_wb    += int'(ev[p].writeback);
      n_busy  += int'(ev[p].busy_refused);
      n_confl += int'(ev[p].conflict);
      n_ovf   += int'(ev[p].overflow);
      n_cok   += int'(ev[p].commit_ok);
      n_cfail += int'(ev[p].commit_fail);
      n_vfail += int'(ev[p].validate_fail);
      n_orph  += int'(ev[p].orphan_op);
      n_abort += int'(ev[p].abort_instr);
    end

  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // Issue one instruction on processor p; returns data, ok and the number of
  // clock edges from acceptance to the response.
  task automatic issue(input int p, input tm_op_e op, input logic [AW-1:0] a,
                       input word_t wd, output word_t d, output logic ok,
                       output int lat);
    int t0;
    @(negedge clk);
    v_a[p] = 1'b1; op_a[p] = op; ad_a[p] = a; wd_a[p] = wd;
    forever begin
      #4;
      if (req_ready[p]) break;
      @(negedge clk);
    end
    @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    v_a[p] = 1'b0;
    while (!resp_valid[p]) @(negedge clk);
    lat = cyc - t0;
    d   = resp_data[p];
    ok  = resp_ok[p];
  endtask

  task automatic op1(input int p, input tm_op_e op, input logic [AW-1:0] a,
                     input word_t wd, output word_t d, output logic ok);
    int lat;
    issue(p, op, a, wd, d, ok, lat);
  endtask

  task automatic meminit(input logic [AW-1:0] a, input word_t d);
    @(negedge clk);
    mem_init_we = 1'b1; mem_init_addr = a; mem_init_data = d;
    @(negedge clk);
    mem_init_we = 1'b0;
  endtask

  // counting benchmark on processor p
  localparam logic [AW-1:0] CNT = 8'h80;
  task automatic count_proc(input int p);
    int success = 0, backoff = 0, waitc;
    word_t d;
    logic ok;
    while (success < WORK) begin
      op1(p, OP_LTX, CNT, '0, d, ok);
      op1(p, OP_ST,  CNT, d + 1, d, ok);
      op1(p, OP_COMMIT, '0, '0, d, ok);
      if (ok) begin
        success++;
        backoff = 0;
      end else begin
        waitc = int'($urandom % (32'd1 << backoff));
        repeat (waitc) @(negedge clk);
        if (backoff < 6) backoff++;
      end
    end
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t d;
    logic ok;
    int lat;
    for (int p = 0; p < N; p++) begin
      v_a[p] = 1'b0; op_a[p] = OP_LOAD; ad_a[p] = '0; wd_a[p] = '0;
    end
    {n_hit, n_miss, n_wb, n_busy, n_confl, n_ovf, n_cok, n_cfail, n_vfail, n_orph, n_abort} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 2**AW; a++) meminit(AW'(a), 64'(1000 + a));
    meminit(CNT, 64'd0);

    // --- latency and regular coherence ---
    issue(0, OP_LOAD, 8'h10, '0, d, ok, lat);
    check("LOAD miss data", d == 64'd1016);
    check("LOAD miss latency = 1+MEM_LAT", lat == 1 + MEM_LAT);
    issue(0, OP_LOAD, 8'h10, '0, d, ok, lat);
    check("LOAD hit data", d == 64'd1016);
    check("LOAD hit latency = 1", lat == 1);
    op1(0, OP_STORE, 8'h10, 64'd7, d, ok);
    op1(1, OP_LOAD, 8'h10, '0, d, ok);
    check("dirty line supplied to other cache", d == 64'd7);

    // --- committed transaction is visible ---
    op1(0, OP_LT, 8'h10, '0, d, ok);
    check("LT sees latest value", d == 64'd7 && ok);
    op1(0, OP_ST, 8'h30, 64'd55, d, ok);
    op1(1, OP_LT, 8'h30, '0, d, ok);
    check("tentative ST refused to another transaction", d == 64'd0 && !tstatus[1]);
    op1(1, OP_COMMIT, '0, '0, d, ok);
    check("refused transaction fails", !ok);
    op1(0, OP_VALIDATE, '0, '0, d, ok);
    check("VALIDATE true", ok);
    op1(0, OP_COMMIT, '0, '0, d, ok);
    check("COMMIT true", ok);
    check("transaction ended", !tactive[0] && tstatus[0]);
    op1(1, OP_LOAD, 8'h30, '0, d, ok);
    check("committed ST visible", d == 64'd55);

    // --- BUSY refusal ---
    op1(0, OP_LTX, 8'h40, '0, d, ok);
    check("LTX data", d == 64'd1064);
    op1(1, OP_LTX, 8'h40, '0, d, ok);
    check("refused LTX aborts requester", !tstatus[1] && tactive[1]);
    op1(1, OP_COMMIT, '0, '0, d, ok);
    check("COMMIT after BUSY fails", !ok);
    op1(0, OP_ST, 8'h40, 64'd1, d, ok);
    op1(0, OP_COMMIT, '0, '0, d, ok);
    check("holder commits", ok);
    op1(1, OP_LT, 8'h40, '0, d, ok);
    check("retry after commit sees value", d == 64'd1 && ok);
    op1(1, OP_COMMIT, '0, '0, d, ok);
    check("read-only commit", ok);

    // --- snooped write makes an orphan ---
    op1(0, OP_LT, 8'h50, '0, d, ok);
    op1(1, OP_LTX, 8'h50, '0, d, ok);
    op1(1, OP_ST, 8'h50, d + 5, d, ok);
    op1(1, OP_COMMIT, '0, '0, d, ok);
    check("writer commits", ok);
    check("reader became orphan", tactive[0] && !tstatus[0]);
    op1(0, OP_LT, 8'h51, '0, d, ok);
    check("orphan LT returns 0", d == 64'd0 && !ok);
    op1(0, OP_VALIDATE, '0, '0, d, ok);
    check("VALIDATE false for orphan", !ok);
    check("VALIDATE false ends transaction", !tactive[0] && tstatus[0]);
    op1(2, OP_LOAD, 8'h50, '0, d, ok);
    check("writer's value visible", d == 64'd1085);

    // --- ABORT restores ---
    op1(0, OP_LTX, 8'h10, '0, d, ok);
    op1(0, OP_ST, 8'h10, 64'd99, d, ok);
    op1(0, OP_LT, 8'h10, '0, d, ok);
    check("transaction reads own tentative value", d == 64'd99);
    op1(0, OP_ABORT, '0, '0, d, ok);
    op1(1, OP_LOAD, 8'h10, '0, d, ok);
    check("ABORT discards tentative value", d == 64'd7);

    // --- write-backs from the transactional cache and overflow ---
    for (int i = 0; i < 3; i++) op1(2, OP_ST, AW'(8'h60 + i), 64'(200 + i), d, ok);
    op1(2, OP_COMMIT, '0, '0, d, ok);
    check("3-line commit", ok);
    for (int i = 0; i < 8; i++) op1(2, OP_LT, AW'(8'h70 + i), '0, d, ok);
    check("overflow aborted transaction", tactive[2] && !tstatus[2]);
    op1(2, OP_COMMIT, '0, '0, d, ok);
    check("COMMIT after overflow fails", !ok);
    for (int i = 0; i < 3; i++) begin
      op1(3, OP_LOAD, AW'(8'h60 + i), '0, d, ok);
      check("replaced committed line kept", d == 64'(200 + i));
    end

    // --- regular cache write-back (16 lines: 0x20 and 0x30 share an index) ---
    op1(3, OP_STORE, 8'h20, 64'd11, d, ok);
    op1(3, OP_STORE, 8'h30, 64'd12, d, ok);
    op1(0, OP_LOAD, 8'h20, '0, d, ok);
    check("written-back line", d == 64'd11);
    op1(1, OP_LOAD, 8'h30, '0, d, ok);
    check("line after write-back", d == 64'd12);

    // --- counting benchmark on all processors ---
    fork
      count_proc(0);
      count_proc(1);
      count_proc(2);
      count_proc(3);
    join
    op1(1, OP_LOAD, CNT, '0, d, ok);
    check("counter = N*WORK", d == 64'(N * WORK));
    $display("counter=%0d expected=%0d", d, N * WORK);

    $display("events: hit=%0d miss=%0d wb=%0d busy=%0d conflict=%0d overflow=%0d commit_ok=%0d commit_fail=%0d validate_fail=%0d orphan=%0d abort=%0d",
             n_hit, n_miss, n_wb, n_busy, n_confl, n_ovf, n_cok, n_cfail, n_vfail, n_orph, n_abort);
    check("mechanism: cache hit",       n_hit   > 0);
    check("mechanism: fill",            n_miss  > 0);
    check("mechanism: write-back",      n_wb    > 0);
    check("mechanism: BUSY refusal",    n_busy  > 0);
    check("mechanism: snoop conflict",  n_confl > 0);
    check("mechanism: overflow",        n_ovf   > 0);
    check("mechanism: commit ok",       n_cok   > 0);
    check("mechanism: commit fail",     n_cfail > 0);
    check("mechanism: validate fail",   n_vfail > 0);
    check("mechanism: orphan access",   n_orph  > 0);
    check("mechanism: ABORT",           n_abort > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

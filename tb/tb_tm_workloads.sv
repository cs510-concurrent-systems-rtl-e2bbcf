// tb_tm_workloads: the producer/consumer and doubly-linked-list benchmarks
// run on the transactional-memory multiprocessor, at reduced size
// (4 processors, 16-line regular caches, 16-entry transactional caches, 256
// words of memory, 4-cycle memory).
//
// Behavioural processors execute the benchmarks' transactions instruction by
// instruction, retrying a failed COMMIT after a random exponential backoff
// (software, as in the original benchmarks).
//
// Producer/consumer: two producers and two consumers share a bounded queue
// {deqs, enqs, items[QSIZE]}. enq reads both counters with LTX, stores the item
// and advances enqs when the queue is not full; deq reads both counters with
// LTX, the item with LT and advances deqs when it is not empty. Checked: every
// produced value is consumed exactly once, and each consumer sees each
// producer's values in the order they were produced.
//
// Doubly-linked list: elements {next, prev, value} in memory, anchored by Head
// and Tail. Each process repeatedly dequeues the element at Head and enqueues it
// again at Tail. Enqueue follows the benchmark's listing (LTX Tail, VALIDATE, ST
// new->prev, ST old_tail->next or Head, ST Tail). Dequeue is the mirror image,
// written here because only enqueue is given. Removing the last element sets
// both anchors to NULL; inserting into an empty list sets both. Afterwards the
// list is walked with ordinary loads: it must hold every element once, with
// consistent next/prev links and Tail at its end, and the number of successful
// dequeues must equal the number of enqueues.
//
// Both benchmarks count commits, failed commits and BUSY refusals. A benchmark
// that never failed a commit would not have tested contention, so that counts
// as a failure.
module tb_tm_workloads;
  import tm_pkg::*;

  localparam int N        = 4;
  localparam int AW       = 8;
  localparam int MEM_LAT  = 4;
  localparam int PC_ITEMS = 12;      // items per producer
  localparam int QSIZE    = 4;
  localparam int DL_ELEMS = 3;
  localparam int DL_ITERS = 12;      // dequeue/enqueue rounds per process
  localparam int WATCHDOG = 2000000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]  req_valid, req_ready, resp_valid, resp_ok, tactive, tstatus;
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

  tm_system #(.N_PROC(N), .ADDR_W(AW), .RC_LINES(16), .TX_ENTRIES(16), .MEM_LAT(MEM_LAT)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_op, .req_addr, .req_wdata,
    .resp_valid, .resp_data, .resp_ok, .tactive, .tstatus, .ev,
    .mem_init_we, .mem_init_addr, .mem_init_data
  );

  int checks = 0, failures = 0;

  int n_cok, n_cfail, n_busy;
  always @(posedge clk) if (rst_n)
    for (int p = 0; p < N; p++) begin
      n_cok   += int'(ev[p].commit_ok);
      n_cfail += int'(ev[p].commit_fail);
      n_busy  += int'(ev[p].busy_refused);
    end

  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic op1(input int p, input tm_op_e op, input logic [AW-1:0] a,
                     input word_t wd, output word_t d, output logic ok);
    @(negedge clk);
    v_a[p] = 1'b1; op_a[p] = op; ad_a[p] = a; wd_a[p] = wd;
    forever begin
      #4;
      if (req_ready[p]) break;
      @(negedge clk);
    end
    @(posedge clk);
    @(negedge clk);
    v_a[p] = 1'b0;
    while (!resp_valid[p]) @(negedge clk);
    d  = resp_data[p];
    ok = resp_ok[p];
  endtask

  task automatic meminit(input logic [AW-1:0] a, input word_t d);
    @(negedge clk);
    mem_init_we = 1'b1; mem_init_addr = a; mem_init_data = d;
    @(negedge clk);
    mem_init_we = 1'b0;
  endtask

  task automatic backoff_wait(inout int bo);
    int w;
    w = int'($urandom % (32'd1 << bo));
    repeat (w) @(negedge clk);
    if (bo < 6) bo++;
  endtask

  // ---------------- producer/consumer ----------------
  localparam logic [AW-1:0] Q_DEQS  = 8'h80;
  localparam logic [AW-1:0] Q_ENQS  = 8'h81;
  localparam logic [AW-1:0] Q_ITEMS = 8'h90;

  int consumed [2][$];

  task automatic q_enq(input int p, input word_t v);
    word_t d, head, tail;
    logic ok;
    int bo = 0;
    forever begin
      op1(p, OP_LTX, Q_ENQS, '0, tail, ok);
      op1(p, OP_LTX, Q_DEQS, '0, head, ok);
      if (tail - head < 64'(QSIZE)) begin
        op1(p, OP_ST, Q_ITEMS + AW'(tail % QSIZE), v, d, ok);
        op1(p, OP_ST, Q_ENQS, tail + 1, d, ok);
        op1(p, OP_COMMIT, '0, '0, d, ok);
        if (ok) return;
      end else begin
        op1(p, OP_COMMIT, '0, '0, d, ok);
      end
      backoff_wait(bo);
    end
  endtask

  task automatic q_deq(input int p, output word_t v);
    word_t d, head, tail, res;
    logic ok;
    int bo = 0;
    forever begin
      res = '0;
      op1(p, OP_LTX, Q_ENQS, '0, tail, ok);
      op1(p, OP_LTX, Q_DEQS, '0, head, ok);
      if (head != tail) begin
        op1(p, OP_LT, Q_ITEMS + AW'(head % QSIZE), '0, res, ok);
        op1(p, OP_ST, Q_DEQS, head + 1, d, ok);
      end
      op1(p, OP_COMMIT, '0, '0, d, ok);
      if (ok && res != '0) begin
        v = res;
        return;
      end
      backoff_wait(bo);
    end
  endtask

  task automatic producer(input int p);
    for (int i = 1; i <= PC_ITEMS; i++) q_enq(p, 64'(p * 1000 + i));
  endtask

  task automatic consumer(input int p, input int c);
    word_t v;
    for (int i = 0; i < PC_ITEMS; i++) begin
      q_deq(p, v);
      consumed[c].push_back(int'(v));
    end
  endtask

  // ---------------- doubly-linked list ----------------
  localparam logic [AW-1:0] L_HEAD = 8'h82;
  localparam logic [AW-1:0] L_TAIL = 8'h83;
  localparam int            L_BASE = 32;       // element e at L_BASE + 4e
  function automatic logic [AW-1:0] e_next(input word_t e); return AW'(e);     endfunction
  function automatic logic [AW-1:0] e_prev(input word_t e); return AW'(e + 1); endfunction

  int dl_deqs = 0, dl_enqs = 0;

  task automatic l_enq(input int p, input word_t nw);
    word_t d, old_tail;
    logic ok;
    int bo = 0;
    op1(p, OP_STORE, e_next(nw), '0, d, ok);
    op1(p, OP_STORE, e_prev(nw), '0, d, ok);
    forever begin
      op1(p, OP_LTX, L_TAIL, '0, old_tail, ok);
      op1(p, OP_VALIDATE, '0, '0, d, ok);
      if (ok) begin
        op1(p, OP_ST, e_prev(nw), old_tail, d, ok);
        if (old_tail == '0) op1(p, OP_ST, L_HEAD, nw, d, ok);
        else                op1(p, OP_ST, e_next(old_tail), nw, d, ok);
        op1(p, OP_ST, L_TAIL, nw, d, ok);
        op1(p, OP_COMMIT, '0, '0, d, ok);
        if (ok) begin
          dl_enqs++;
          return;
        end
      end
      backoff_wait(bo);
    end
  endtask

  task automatic l_deq(input int p, output word_t e);
    word_t d, old_head, new_head;
    logic ok;
    int bo = 0;
    forever begin
      op1(p, OP_LTX, L_HEAD, '0, old_head, ok);
      op1(p, OP_VALIDATE, '0, '0, d, ok);
      if (ok) begin
        if (old_head == '0) begin
          op1(p, OP_COMMIT, '0, '0, d, ok);
          if (ok) begin
            e = '0;
            return;
          end
        end else begin
          op1(p, OP_LT, e_next(old_head), '0, new_head, ok);
          if (new_head == '0) op1(p, OP_ST, L_TAIL, '0, d, ok);
          else                op1(p, OP_ST, e_prev(new_head), '0, d, ok);
          op1(p, OP_ST, L_HEAD, new_head, d, ok);
          op1(p, OP_COMMIT, '0, '0, d, ok);
          if (ok) begin
            e = old_head;
            dl_deqs++;
            return;
          end
        end
      end
      backoff_wait(bo);
    end
  endtask

  task automatic list_proc(input int p);
    word_t e;
    for (int i = 0; i < DL_ITERS; i++) begin
      l_deq(p, e);
      if (e != '0) l_enq(p, e);
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
    word_t d, e, prev;
    logic ok;
    int seen [int];
    int cok0, cfail0, busy0;
    int last [2];
    int v, pr;
    word_t el;
    for (int p = 0; p < N; p++) begin
      v_a[p] = 1'b0; op_a[p] = OP_LOAD; ad_a[p] = '0; wd_a[p] = '0;
    end
    {n_cok, n_cfail, n_busy} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 2**AW; a++) meminit(AW'(a), '0);

    // ---- producer/consumer: processors 0,1 produce, 2,3 consume ----
    fork
      producer(0);
      producer(1);
      consumer(2, 0);
      consumer(3, 1);
    join
    for (int c = 0; c < 2; c++) begin
      last = '{0, 0};
      foreach (consumed[c][i]) begin
        v  = consumed[c][i];
        pr = v / 1000;
        check("consumed value comes from a producer", pr < 2 && v % 1000 >= 1 && v % 1000 <= PC_ITEMS);
        if (pr < 2) begin
          check("per-producer FIFO order", v % 1000 > last[pr]);
          last[pr] = v % 1000;
        end
        check("value consumed once", !seen.exists(v));
        seen[v] = 1;
      end
    end
    check("every item consumed", seen.size() == 2 * PC_ITEMS);
    op1(0, OP_LOAD, Q_DEQS, '0, d, ok);
    check("deqs counter", d == 64'(2 * PC_ITEMS));
    op1(0, OP_LOAD, Q_ENQS, '0, d, ok);
    check("enqs counter", d == 64'(2 * PC_ITEMS));
    $display("producer/consumer: commits=%0d failed=%0d busy=%0d", n_cok, n_cfail, n_busy);
    check("producer/consumer saw contention", n_cfail > 0);
    cok0 = n_cok; cfail0 = n_cfail; busy0 = n_busy;

    // ---- doubly-linked list: DL_ELEMS elements, Head -> ... -> Tail ----
    for (int i = 0; i < DL_ELEMS; i++) begin
      el = 64'(L_BASE + 4 * i);
      meminit(e_next(el), (i == DL_ELEMS - 1) ? '0 : el + 4);
      meminit(e_prev(el), (i == 0) ? '0 : el - 4);
      meminit(AW'(el + 2), 64'(i + 500));
    end
    meminit(L_HEAD, 64'(L_BASE));
    meminit(L_TAIL, 64'(L_BASE + 4 * (DL_ELEMS - 1)));
    fork
      list_proc(0);
      list_proc(1);
      list_proc(2);
      list_proc(3);
    join
    check("dequeues = enqueues", dl_deqs == dl_enqs);
    seen.delete();
    op1(1, OP_LOAD, L_HEAD, '0, e, ok);
    prev = '0;
    for (int i = 0; i < DL_ELEMS + 1 && e != '0; i++) begin
      check("element address valid", e >= 64'(L_BASE) && e < 64'(L_BASE + 4 * DL_ELEMS) && (e - 64'(L_BASE)) % 4 == 0);
      check("element listed once", !seen.exists(int'(e)));
      seen[int'(e)] = 1;
      op1(1, OP_LOAD, e_prev(e), '0, d, ok);
      check("prev link", d == prev);
      op1(1, OP_LOAD, AW'(e + 2), '0, d, ok);
      check("value untouched", d == (e - 64'(L_BASE)) / 4 + 500);
      prev = e;
      op1(1, OP_LOAD, e_next(e), '0, e, ok);
    end
    check("list holds every element", seen.size() == DL_ELEMS);
    op1(1, OP_LOAD, L_TAIL, '0, d, ok);
    check("Tail is last element", d == prev);
    $display("linked list: deqs=%0d enqs=%0d commits=%0d failed=%0d busy=%0d",
             dl_deqs, dl_enqs, n_cok - cok0, n_cfail - cfail0, n_busy - busy0);
    check("linked list saw contention", n_cfail > cfail0);
    check("linked list made progress", dl_deqs > 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

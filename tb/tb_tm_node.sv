// tb_tm_node: one processor node (4-line regular cache, 4-entry transactional
// cache) on a model of the bus and memory written in the testbench. The model
// grants at once, answers after MEM_LAT cycles and can refuse a transactional
// cycle with BUSY; the testbench also injects snooped cycles of a second
// node. Checked against hand-worked values: the bus cycle each instruction
// issues, hit and miss latency, the data returned, snoop answers (BUSY, dirty
// supply), commit, abort, BUSY refusal, conflict to orphan, overflow and
// write-back of a replaced dirty line.
module tb_tm_node;
  import tm_pkg::*;
  localparam int AW = 8, LAT = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, resp_valid, resp_ok, tactive, tstatus;
  tm_op_e req_op;
  logic [AW-1:0] req_addr, bus_addr, snp_addr;
  word_t req_wdata, resp_data, bus_wdata, bus_rdata, s_data;
  tm_events_t ev;
  logic bus_req, bus_gnt, bus_busy, bus_done, snp_valid, s_busy, s_dirty;
  bus_cmd_e bus_cmd, snp_cmd;
  bus_src_e bus_src, snp_src;
  logic [0:0] snp_node, node_id;

  tm_node #(.ADDR_W(AW), .RC_LINES(4), .TX_ENTRIES(4), .NW(1)) dut (.*);

  // ---------------- bus and memory model ----------------
  word_t mem [2**AW];
  logic inject = 0, force_busy = 0;
  bus_cmd_e icmd = BUS_NONE;
  logic [AW-1:0] iaddr = '0;
  typedef enum {M_IDLE, M_WAIT, M_TURN} mst_e;
  mst_e mst = M_IDLE;
  int mcnt = 0;
  bus_cmd_e last_cmd = BUS_NONE;
  logic [AW-1:0] last_addr = '0;
  word_t last_wdata = '0;
  int n_cycles = 0;

  assign node_id   = 1'b0;
  assign bus_gnt   = bus_req && mst == M_IDLE && !inject;
  assign snp_valid = bus_gnt || inject;
  assign snp_cmd   = inject ? icmd : bus_cmd;
  assign snp_addr  = inject ? iaddr : bus_addr;
  assign snp_node  = inject ? 1'b1 : 1'b0;
  assign snp_src   = inject ? (is_tx_cmd(icmd) ? SRC_TX : SRC_REG) : bus_src;
  assign bus_busy  = bus_gnt && force_busy && is_tx_cmd(bus_cmd);
  assign bus_done  = mst == M_WAIT && mcnt == 0;

  always @(posedge clk) begin
    if (inject && s_dirty) mem[iaddr] <= s_data;   // a supplied copy updates memory
    case (mst)
      M_IDLE: if (bus_gnt) begin
        n_cycles++;
        last_cmd <= bus_cmd; last_addr <= bus_addr; last_wdata <= bus_wdata;
        if (bus_busy) mst <= M_TURN;
        else begin
          if (bus_cmd == BUS_WRITE) mem[bus_addr] <= bus_wdata;
          else if (s_dirty) begin mem[bus_addr] <= s_data; bus_rdata <= s_data; end
          else bus_rdata <= mem[bus_addr];
          mcnt <= LAT - 2; mst <= M_WAIT;
        end
      end
      M_WAIT: if (mcnt == 0) mst <= M_TURN; else mcnt <= mcnt - 1;
      default: mst <= M_IDLE;
    endcase
  end

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  task automatic issue(input tm_op_e op, input logic [AW-1:0] a, input word_t wd,
                       output word_t d, output logic ok, output int lat);
    int t0;
    @(negedge clk);
    req_valid = 1; req_op = op; req_addr = a; req_wdata = wd;
    forever begin #1; if (req_ready) break; @(negedge clk); end
    @(posedge clk); t0 = cyc;
    @(negedge clk); req_valid = 0;
    while (!resp_valid) @(negedge clk);
    lat = cyc - t0; d = resp_data; ok = resp_ok;
  endtask

  // another node's bus cycle, snooped for one cycle while the bus is idle
  task automatic snoop(input bus_cmd_e c, input logic [AW-1:0] a,
                       output logic b, output logic dty, output word_t d);
    @(negedge clk);
    while (mst != M_IDLE) @(negedge clk);
    inject = 1; icmd = c; iaddr = a; #1;
    b = s_busy; dty = s_dirty; d = s_data;
    @(negedge clk); inject = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t d; logic ok, b, dty; int lat, nc;
    req_valid = 0; req_op = OP_LOAD; req_addr = '0; req_wdata = '0;
    for (int a = 0; a < 2**AW; a++) mem[a] = 64'(a * 3);
    repeat (2) @(posedge clk);
    rst_n = 1;

    // regular cache
    issue(OP_LOAD, 8'd5, '0, d, ok, lat);
    check("LOAD miss: READ cycle", last_cmd == BUS_READ && last_addr == 8'd5);
    check("LOAD miss data and latency", d == 64'd15 && lat == 1 + LAT);
    issue(OP_LOAD, 8'd5, '0, d, ok, lat);
    check("LOAD hit latency 1", d == 64'd15 && lat == 1);
    nc = n_cycles;
    issue(OP_STORE, 8'd5, 64'd77, d, ok, lat);
    check("STORE to VALID line: RFO", last_cmd == BUS_RFO && n_cycles == nc + 1);
    issue(OP_STORE, 8'd5, 64'd78, d, ok, lat);
    check("STORE to owned line: no bus cycle", n_cycles == nc + 1 && lat == 1);
    snoop(BUS_READ, 8'd5, b, dty, d);
    check("snooped READ gets dirty data", !b && dty && d == 64'd78);
    issue(OP_STORE, 8'd9, 64'd90, d, ok, lat);   // same index as 5 in 4 lines
    issue(OP_STORE, 8'd13, 64'd91, d, ok, lat);  // evicts dirty 9
    check("dirty victim written back", mem[9] == 64'd90);

    // a committed transaction
    issue(OP_LT, 8'd20, '0, d, ok, lat);
    check("LT miss: T_READ", last_cmd == BUS_TREAD && d == 64'd60 && ok && tactive);
    issue(OP_ST, 8'd21, 64'd500, d, ok, lat);
    check("ST miss: T_RFO", last_cmd == BUS_TRFO);
    snoop(BUS_TREAD, 8'd21, b, dty, d);
    check("tentative line refused: BUSY", b && !dty);
    snoop(BUS_TREAD, 8'd20, b, dty, d);
    check("read-set line shared", !b && tstatus);
    issue(OP_LT, 8'd21, '0, d, ok, lat);
    check("own tentative value, hit", d == 64'd500 && lat == 1);
    issue(OP_COMMIT, '0, '0, d, ok, lat);
    check("COMMIT true", ok && !tactive && tstatus && lat == 1);
    snoop(BUS_READ, 8'd21, b, dty, d);
    check("committed value supplied", !b && dty && d == 64'd500);

    // BUSY refusal
    force_busy = 1;
    issue(OP_LTX, 8'd30, '0, d, ok, lat);
    force_busy = 0;
    check("refused LTX: orphan", tactive && !tstatus && !ok);
    issue(OP_COMMIT, '0, '0, d, ok, lat);
    check("COMMIT after BUSY false", !ok && !tactive && tstatus);

    // conflict through a snooped T_RFO
    issue(OP_LT, 8'd40, '0, d, ok, lat);
    snoop(BUS_TRFO, 8'd40, b, dty, d);
    check("read set taken: conflict, no BUSY", !b && !tstatus && tactive);
    nc = n_cycles;
    issue(OP_LT, 8'd41, '0, d, ok, lat);
    check("orphan LT: 0, no bus cycle", d == 0 && !ok && n_cycles == nc);
    issue(OP_VALIDATE, '0, '0, d, ok, lat);
    check("VALIDATE false ends tx", !ok && !tactive && tstatus);

    // ABORT
    issue(OP_LTX, 8'd21, '0, d, ok, lat);
    check("LTX on committed line", d == 64'd500);
    issue(OP_ST, 8'd21, 64'd501, d, ok, lat);
    issue(OP_ABORT, '0, '0, d, ok, lat);
    issue(OP_LT, 8'd21, '0, d, ok, lat);
    check("ABORT restored old value", d == 64'd500);
    issue(OP_ABORT, '0, '0, d, ok, lat);

    // overflow of the 4-entry transactional cache
    for (int i = 0; i < 4; i++) issue(OP_LT, 8'(60 + i), '0, d, ok, lat);
    check("fourth line overflows", tactive && !tstatus);
    issue(OP_COMMIT, '0, '0, d, ok, lat);
    check("COMMIT after overflow false", !ok);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_snoop_bus: three requesters on the bus with a memory model of 4-cycle
// latency. Checks broadcast of the granted cycle, the memory request, `done`
// to the owner only, the refused (BUSY) cycle that skips memory, supply of a
// dirty copy to memory, the idle turnaround cycle and round-robin order.
module tb_snoop_bus;
  import tm_pkg::*;
  localparam int N = 3, AW = 8, LAT = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] req, gnt, done, s_busy, s_dirty;
  bus_cmd_e cmd [N];
  logic [AW-1:0] addr [N];
  word_t wdata [N], s_data [N];
  bus_src_e src [N];
  logic busy_resp, snp_valid, mem_req, mem_flush, mem_done;
  word_t rdata, mem_wdata, mem_flush_data, mem_rdata;
  bus_cmd_e snp_cmd, mem_cmd;
  logic [AW-1:0] snp_addr, mem_addr;
  logic [1:0] snp_node;
  bus_src_e snp_src;

  snoop_bus #(.N(N), .ADDR_W(AW)) dut (.*);

  // memory model
  int mcnt = -1;
  always @(posedge clk) begin
    if (mem_req) begin
      mcnt <= LAT - 2;
      mem_rdata <= mem_flush ? mem_flush_data : 64'(1000 + mem_addr);
    end else if (mcnt >= 0) mcnt <= mcnt - 1;
  end
  assign mem_done = (mcnt == 0);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_gnt();
    #1;
    while (gnt == '0) begin @(negedge clk); #1; end
  endtask

  initial begin
    int t0, order [6];
    req = '0; s_busy = '0; s_dirty = '0;
    for (int i = 0; i < N; i++) begin
      cmd[i] = BUS_READ; addr[i] = 8'(16 * (i + 1)); wdata[i] = 64'(i); src[i] = SRC_REG;
      s_data[i] = 64'(500 + i);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;

    // single read by node 1
    @(negedge clk);
    req[1] = 1; #1;
    check("grant in the same cycle", gnt == 3'b010 && snp_valid && snp_cmd == BUS_READ &&
          snp_addr == 8'd32 && snp_node == 2'd1 && mem_req && !busy_resp);
    t0 = cyc;
    @(negedge clk); req[1] = 0;
    while (done == '0) @(negedge clk);
    check("done to owner only", done == 3'b010 && rdata == 64'd1032);
    check("read occupies MEM_LAT cycles", cyc - t0 == LAT - 1);
    req[0] = 1; #1;
    @(negedge clk);
    check("turnaround cycle: no grant", gnt == '0 && !snp_valid);
    @(negedge clk); #1;
    check("grant after turnaround", gnt == 3'b001);
    @(negedge clk); req[0] = 0;
    while (done == '0) @(negedge clk);
    @(negedge clk);

    // refused transactional cycle
    cmd[2] = BUS_TRFO; src[2] = SRC_TX; req[2] = 1;
    s_busy[0] = 1; wait_gnt();
    check("BUSY answer", gnt == 3'b100 && busy_resp && !mem_req);
    @(negedge clk); req[2] = 0; s_busy = '0;
    check("refused cycle ends at once", !snp_valid);
    @(negedge clk);

    // dirty copy supplied by node 0 for node 2's read
    cmd[2] = BUS_READ; src[2] = SRC_REG; req[2] = 1;
    wait_gnt();
    s_dirty[0] = 1; #1;
    check("flush to memory", mem_req && mem_flush && mem_flush_data == 64'd500);
    @(negedge clk); req[2] = 0; s_dirty = '0;
    while (done == '0) @(negedge clk);
    check("supplied data returned", done == 3'b100 && rdata == 64'd500);
    @(negedge clk);

    // write
    cmd[1] = BUS_WRITE; req[1] = 1; wait_gnt();
    check("write goes to memory", mem_req && mem_cmd == BUS_WRITE && mem_wdata == 64'd1);
    @(negedge clk); req[1] = 0;
    while (done == '0) @(negedge clk);
    @(negedge clk);

    // everybody requests: round-robin order after last winner (node 1)
    cmd[0] = BUS_READ; cmd[1] = BUS_READ; cmd[2] = BUS_READ;
    req = 3'b111;
    for (int k = 0; k < 6; k++) begin
      while (gnt == '0) begin @(negedge clk); #1; end
      order[k] = (gnt == 3'b001) ? 0 : (gnt == 3'b010) ? 1 : 2;
      @(negedge clk); #1;
    end
    req = '0;
    check("round robin", order[0] == 2 && order[1] == 0 && order[2] == 1 &&
          order[3] == 2 && order[4] == 0 && order[5] == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

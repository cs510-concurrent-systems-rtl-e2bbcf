// tb_main_memory: writes, reads, a read answered with a flushed dirty copy,
// and the latency (done MEM_LAT-1 cycles after the request, MEM_LAT cycles of
// bus time), checked against a reference array.
module tb_main_memory;
  import tm_pkg::*;
  localparam int AW = 6, LAT = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic req, flush, done, init_we;
  bus_cmd_e cmd;
  logic [AW-1:0] addr, init_addr;
  word_t wdata, flush_data, rdata, init_data;

  main_memory #(.ADDR_W(AW), .MEM_LAT(LAT)) dut (.*);

  int checks = 0, failures = 0;
  word_t ref_mem [2**AW];

  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic access(input bus_cmd_e c, input logic [AW-1:0] a, input word_t wd,
                        input logic fl, input word_t fd);
    int n;
    @(negedge clk);
    req = 1'b1; cmd = c; addr = a; wdata = wd; flush = fl; flush_data = fd;
    @(negedge clk);
    req = 1'b0; flush = 1'b0;
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    check("latency MEM_LAT-1 cycles to done", n == LAT - 1);
    if (c == BUS_WRITE) ref_mem[a] = wd;
    else begin
      if (fl) ref_mem[a] = fd;
      check("read data", rdata == ref_mem[a]);
    end
    @(negedge clk);
    check("done is a pulse", !done);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = 1'b0; flush = 1'b0; init_we = 1'b0; cmd = BUS_NONE; addr = '0;
    wdata = '0; flush_data = '0; init_addr = '0; init_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      init_we = 1'b1; init_addr = AW'(a); init_data = {$urandom, $urandom};
      ref_mem[a] = init_data;
    end
    @(negedge clk);
    init_we = 1'b0;
    for (int i = 0; i < 300; i++) begin
      int unsigned r;
      r = $urandom % 6;
      case (r)
        0: access(BUS_WRITE, AW'($urandom), {$urandom, $urandom}, 1'b0, '0);
        1: access(BUS_READ,  AW'($urandom), '0, 1'b1, {$urandom, $urandom});
        2: access(BUS_RFO,   AW'($urandom), '0, 1'b0, '0);
        3: access(BUS_TREAD, AW'($urandom), '0, 1'b0, '0);
        4: access(BUS_TRFO,  AW'($urandom), '0, 1'b1, {$urandom, $urandom});
        default: access(BUS_READ, AW'($urandom), '0, 1'b0, '0);
      endcase
    end
    for (int a = 0; a < 2**AW; a++) access(BUS_READ, AW'(a), '0, 1'b0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_reg_cache: random writes, lookups and snooped bus cycles on a 16-line
// regular cache, compared with a reference model of the direct-mapped array
// and of the snoop table (READ/T_READ -> VALID, RFO/T_RFO -> INVALID, dirty
// data supplied, WRITE ignored).
module tb_reg_cache;
  import tm_pkg::*;
  localparam int L = 16, AW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [AW-1:0] lk_addr, w_addr, snp_addr, lk_vaddr;
  logic lk_hit, we, snp_valid, snp_dirty;
  line_state_e lk_state, w_state;
  word_t lk_data, w_data, snp_data;
  bus_cmd_e snp_cmd;

  reg_cache #(.LINES(L), .ADDR_W(AW)) dut (.*);

  int checks = 0, failures = 0;
  line_state_e m_st [L];
  logic [AW-1:0] m_ad [L];
  word_t m_d [L];
  int n_supply = 0, n_inv = 0, n_down = 0;

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
    we = 1'b0; snp_valid = 1'b0; snp_cmd = BUS_NONE; lk_addr = '0; w_addr = '0;
    snp_addr = '0; w_state = LS_INVALID; w_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < L; i++) m_st[i] = LS_INVALID;
    for (int it = 0; it < 5000; it++) begin
      int x;
      logic hit;
      @(negedge clk);
      we = 1'b0; snp_valid = 1'b0;
      lk_addr = AW'($urandom % 48);
      if ($urandom_range(1, 0) == 1) begin
        we = 1'b1; w_addr = AW'($urandom % 48);
        w_state = line_state_e'($urandom % 4); w_data = {$urandom, $urandom};
      end else begin
        snp_valid = 1'b1; snp_addr = AW'($urandom % 48);
        snp_cmd = bus_cmd_e'(1 + $urandom % 5);
      end
      #1;
      x = int'(lk_addr) % L;
      hit = m_st[x] != LS_INVALID && m_ad[x] == lk_addr;
      check("lookup hit", lk_hit == hit);
      check("lookup state", lk_state == m_st[x]);
      if (m_st[x] != LS_INVALID) begin
        check("lookup data", lk_data == m_d[x]);
        check("victim address", lk_vaddr == m_ad[x]);
      end
      if (snp_valid) begin
        logic sh, rd, own;
        x  = int'(snp_addr) % L;
        sh = m_st[x] != LS_INVALID && m_ad[x] == snp_addr;
        rd = snp_cmd == BUS_READ || snp_cmd == BUS_TREAD;
        own = snp_cmd == BUS_RFO || snp_cmd == BUS_TRFO;
        check("snoop supplies dirty data", snp_dirty == (sh && (rd || own) && m_st[x] == LS_DIRTY));
        if (snp_dirty) begin check("snoop data", snp_data == m_d[x]); n_supply++; end
        if (sh && rd)  begin m_st[x] = LS_VALID; n_down++; end
        if (sh && own) begin m_st[x] = LS_INVALID; n_inv++; end
      end
      if (we) begin
        x = int'(w_addr) % L;
        m_st[x] = w_state; m_ad[x] = w_addr; m_d[x] = w_data;
      end
    end
    check("snoop supplied data", n_supply > 0);
    check("snoop invalidated", n_inv > 0);
    check("snoop downgraded", n_down > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bus_arbiter: random requests against a round-robin reference model.
// Checks that the grant is one-hot, goes only to a requester, only when
// enabled, and follows round-robin order from the last winner.
module tb_bus_arbiter;
  localparam int N = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         enable;
  logic [N-1:0] req, gnt;
  logic [2:0]   gnt_idx;
  logic         gnt_any;

  bus_arbiter #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  int last;
  int wins [N];

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
    enable = 1'b0; req = '0;
    foreach (wins[i]) wins[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    last = N - 1;
    for (int i = 0; i < 3000; i++) begin
      int exp;
      @(negedge clk);
      enable = ($urandom % 4) != 0;
      req    = N'($urandom);
      if (i % 50 < 5) req = '1;    // everybody asks: pure rotation
      #1;
      exp = -1;
      if (enable)
        for (int k = 1; k <= N; k++)
          if (exp < 0 && req[(last + k) % N]) exp = (last + k) % N;
      if (exp < 0) begin
        check("no grant", gnt == '0 && !gnt_any);
      end else begin
        check("grant index", gnt_any && gnt_idx == 3'(exp));
        check("grant one-hot", gnt == (N'(1) << exp));
        wins[exp]++;
        last = exp;
      end
    end
    for (int i = 0; i < N; i++) check("every requester served", wins[i] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

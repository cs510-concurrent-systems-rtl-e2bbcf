// bus_arbiter: round-robin arbiter for the shared snoopy bus.
//
// When `enable` is high (the bus is free) it grants the first requester at or
// after the one following the last grant, so every waiting node is served
// within N grants. The grant is combinational (one-hot `gnt`, plus its index)
// so the winner's bus cycle goes out in the same clock cycle; the round-robin
// pointer moves at the clock edge. The design only says that nodes take turns
// on one bus; round-robin order is this design's choice.
module bus_arbiter #(
  parameter int unsigned N = 32,
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  logic [N-1:0]  req,
  output logic [N-1:0]  gnt,
  output logic [NW-1:0] gnt_idx,
  output logic          gnt_any
);

  logic [NW-1:0] last_q;

  always_comb begin
    logic [NW-1:0] j;
    j       = '0;
    gnt     = '0;
    gnt_idx = '0;
    gnt_any = 1'b0;
    if (enable) begin
      for (int k = 1; k <= N; k++) begin
        j = NW'((int'(last_q) + k) % N);
        if (!gnt_any && req[j]) begin
          gnt_any = 1'b1;
          gnt_idx = j;
        end
      end
      if (gnt_any) gnt[gnt_idx] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       last_q <= NW'(N - 1);
    else if (gnt_any) last_q <= gnt_idx;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_granted_requested: assert property (@(posedge clk) disable iff (!rst_n)
    (gnt & ~req) == '0);

endmodule

// snoop_bus: the shared, atomic snoopy bus that joins the processor nodes and
// main memory.
//
// A bus transaction goes through three phases:
//   1. address/snoop cycle: the arbiter grants one requesting node; its cycle
//      (command, address, write data, issuing cache) is broadcast to every
//      cache, which answers in the same cycle: BUSY (transactional cycles
//      only), or a DIRTY copy of the line that it supplies;
//   2. memory phase: a refused (BUSY) cycle ends at once; otherwise memory
//      performs the access, taking the supplied copy if there is one, and the
//      owner's `done` pulses with the data MEM_LAT-1 cycles later; the bus is
//      held until then, so no other cycle can slip in between;
//   3. one idle turnaround cycle, in which no cycle is snooped, so that every
//      node always gets clock cycles for its local cache work.
// The read data returned to the nodes is memory's `mem_rdata`, passed straight
// through, because memory also forwards any dirty copy a cache supplied.
// `busy_resp` is valid for the granted node in its address cycle. The bus
// cycle kinds and the BUSY answer are the design's; the atomic, non-split bus,
// the round-robin arbiter and the turnaround cycle are this design's choices.
module snoop_bus
  import tm_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter int unsigned ADDR_W = 16,
  localparam int unsigned NW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // requests from the nodes
  input  logic [N-1:0]      req,
  input  bus_cmd_e          cmd   [N],
  input  logic [ADDR_W-1:0] addr  [N],
  input  word_t             wdata [N],
  input  bus_src_e          src   [N],
  output logic [N-1:0]      gnt,
  output logic              busy_resp,
  output logic [N-1:0]      done,
  output word_t             rdata,
  // broadcast snoop cycle and the answers
  output logic              snp_valid,
  output bus_cmd_e          snp_cmd,
  output logic [ADDR_W-1:0] snp_addr,
  output logic [NW-1:0]     snp_node,
  output bus_src_e          snp_src,
  input  logic [N-1:0]      s_busy,
  input  logic [N-1:0]      s_dirty,
  input  word_t             s_data [N],
  // main memory
  output logic              mem_req,
  output bus_cmd_e          mem_cmd,
  output logic [ADDR_W-1:0] mem_addr,
  output word_t             mem_wdata,
  output logic              mem_flush,
  output word_t             mem_flush_data,
  input  logic              mem_done,
  input  word_t             mem_rdata
);

  typedef enum logic [1:0] {B_IDLE, B_WAIT, B_TURN} bstate_e;

  bstate_e       st_q;
  logic [NW-1:0] owner_q;
  logic [NW-1:0] gidx;
  logic          gany;

  bus_arbiter #(.N(N)) u_arb (
    .clk, .rst_n,
    .enable (st_q == B_IDLE),
    .req,
    .gnt,
    .gnt_idx(gidx),
    .gnt_any(gany)
  );

  assign snp_valid = gany;
  assign snp_cmd   = gany ? cmd[gidx] : BUS_NONE;
  assign snp_addr  = addr[gidx];
  assign snp_node  = gidx;
  assign snp_src   = src[gidx];

  assign busy_resp = gany && (|s_busy);

  always_comb begin
    mem_flush      = 1'b0;
    mem_flush_data = '0;
    for (int i = 0; i < N; i++)
      if (s_dirty[i]) begin
        mem_flush      = 1'b1;
        mem_flush_data = s_data[i];
      end
  end

  assign mem_req   = gany && !busy_resp && snp_cmd != BUS_NONE;
  assign mem_cmd   = snp_cmd;
  assign mem_addr  = snp_addr;
  assign mem_wdata = wdata[gidx];

  always_comb begin
    done = '0;
    if (st_q == B_WAIT && mem_done) done[owner_q] = 1'b1;
  end
  assign rdata = mem_rdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q    <= B_IDLE;
      owner_q <= '0;
    end else begin
      case (st_q)
        B_IDLE: if (gany) begin
          owner_q <= gidx;
          st_q    <= mem_req ? B_WAIT : B_TURN;
        end
        B_WAIT: if (mem_done) st_q <= B_TURN;
        default: st_q <= B_IDLE;
      endcase
    end
  end

  a_one_supplier: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(s_dirty));
  a_busy_only_tx: assert property (@(posedge clk) disable iff (!rst_n)
    busy_resp |-> is_tx_cmd(snp_cmd));

endmodule

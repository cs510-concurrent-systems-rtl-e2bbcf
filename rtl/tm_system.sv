// tm_system: a bus-based shared-memory multiprocessor with hardware
// transactional memory.
//
// N_PROC processor nodes (tm_node: regular cache, transactional cache, status
// bits and controller) share one snoopy bus (snoop_bus with its round-robin
// bus_arbiter) and one main memory (main_memory). The processors themselves
// are outside this module: each node's instruction port is brought out, so a
// processor model or a testbench issues LOAD, STORE, LT, LTX, ST, VALIDATE,
// COMMIT and ABORT and receives the results. The defaults are the simulated
// machine of the design: 32 processors, a 2048-line direct-mapped regular
// cache and a 64-line fully associative transactional cache per processor,
// 8-byte lines, a 1-cycle first-level cache and a 4-cycle memory. The address
// width (16-bit word addresses, 512 KiB of memory) is this design's choice.
//
// `mem_init_*` writes memory directly, for loading data before the processors
// start; it must not be used while the bus is active. `ev` gives per-node
// one-cycle event pulses (hits, fills, write-backs, BUSY refusals, conflicts,
// overflows, commits) for performance counting.
module tm_system
  import tm_pkg::*;
#(
  parameter int unsigned N_PROC     = 32,
  parameter int unsigned ADDR_W     = 16,
  parameter int unsigned RC_LINES   = 2048,
  parameter int unsigned TX_ENTRIES = 64,
  parameter int unsigned MEM_LAT    = 4,
  localparam int unsigned NW        = (N_PROC > 1) ? $clog2(N_PROC) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_PROC-1:0] req_valid,
  output logic [N_PROC-1:0] req_ready,
  input  tm_op_e            req_op    [N_PROC],
  input  logic [ADDR_W-1:0] req_addr  [N_PROC],
  input  word_t             req_wdata [N_PROC],
  output logic [N_PROC-1:0] resp_valid,
  output word_t             resp_data [N_PROC],
  output logic [N_PROC-1:0] resp_ok,
  output logic [N_PROC-1:0] tactive,
  output logic [N_PROC-1:0] tstatus,
  output tm_events_t        ev        [N_PROC],
  input  logic              mem_init_we,
  input  logic [ADDR_W-1:0] mem_init_addr,
  input  word_t             mem_init_data
);

  logic [N_PROC-1:0] b_req, b_gnt, b_done, s_busy, s_dirty;
  bus_cmd_e          b_cmd   [N_PROC];
  logic [ADDR_W-1:0] b_addr  [N_PROC];
  word_t             b_wdata [N_PROC];
  bus_src_e          b_src   [N_PROC];
  word_t             s_data  [N_PROC];
  logic              b_busy;
  word_t             b_rdata;

  logic              snp_valid;
  bus_cmd_e          snp_cmd;
  logic [ADDR_W-1:0] snp_addr;
  logic [NW-1:0]     snp_node;
  bus_src_e          snp_src;

  logic              m_req, m_flush, m_done;
  bus_cmd_e          m_cmd;
  logic [ADDR_W-1:0] m_addr;
  word_t             m_wdata, m_flush_data, m_rdata;

  for (genvar p = 0; p < N_PROC; p++) begin : g_node
    tm_node #(
      .ADDR_W(ADDR_W), .RC_LINES(RC_LINES), .TX_ENTRIES(TX_ENTRIES), .NW(NW)
    ) u_node (
      .clk, .rst_n,
      .node_id   (NW'(p)),
      .req_valid (req_valid[p]),
      .req_ready (req_ready[p]),
      .req_op    (req_op[p]),
      .req_addr  (req_addr[p]),
      .req_wdata (req_wdata[p]),
      .resp_valid(resp_valid[p]),
      .resp_data (resp_data[p]),
      .resp_ok   (resp_ok[p]),
      .tactive   (tactive[p]),
      .tstatus   (tstatus[p]),
      .ev        (ev[p]),
      .bus_req   (b_req[p]),
      .bus_cmd   (b_cmd[p]),
      .bus_addr  (b_addr[p]),
      .bus_wdata (b_wdata[p]),
      .bus_src   (b_src[p]),
      .bus_gnt   (b_gnt[p]),
      .bus_busy  (b_busy),
      .bus_done  (b_done[p]),
      .bus_rdata (b_rdata),
      .snp_valid,
      .snp_cmd,
      .snp_addr,
      .snp_node,
      .snp_src,
      .s_busy    (s_busy[p]),
      .s_dirty   (s_dirty[p]),
      .s_data    (s_data[p])
    );
  end

  snoop_bus #(.N(N_PROC), .ADDR_W(ADDR_W)) u_bus (
    .clk, .rst_n,
    .req      (b_req),
    .cmd      (b_cmd),
    .addr     (b_addr),
    .wdata    (b_wdata),
    .src      (b_src),
    .gnt      (b_gnt),
    .busy_resp(b_busy),
    .done     (b_done),
    .rdata    (b_rdata),
    .snp_valid,
    .snp_cmd,
    .snp_addr,
    .snp_node,
    .snp_src,
    .s_busy,
    .s_dirty,
    .s_data,
    .mem_req       (m_req),
    .mem_cmd       (m_cmd),
    .mem_addr      (m_addr),
    .mem_wdata     (m_wdata),
    .mem_flush     (m_flush),
    .mem_flush_data(m_flush_data),
    .mem_done      (m_done),
    .mem_rdata     (m_rdata)
  );

  main_memory #(.ADDR_W(ADDR_W), .MEM_LAT(MEM_LAT)) u_mem (
    .clk, .rst_n,
    .req       (m_req),
    .cmd       (m_cmd),
    .addr      (m_addr),
    .wdata     (m_wdata),
    .flush     (m_flush),
    .flush_data(m_flush_data),
    .done      (m_done),
    .rdata     (m_rdata),
    .init_we   (mem_init_we),
    .init_addr (mem_init_addr),
    .init_data (mem_init_data)
  );

endmodule

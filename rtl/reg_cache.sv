// reg_cache: the regular (non-transactional) first-level data cache of one
// processor.
//
// Direct mapped, LINES lines of one 64-bit word each, with the four line
// states of Goodman's protocol (INVALID, VALID, DIRTY, RESERVED). The line
// index is the low log2(LINES) bits of the word address and the tag is the
// rest. LOAD and STORE use it; transactional accesses never do.
//
// Ports:
//   * lookup of `lk_addr` (combinational): `lk_hit`, the state and data of the
//     hit, and the address, state and data of whatever line occupies the index
//     (the victim on a miss);
//   * one write port, applied at the clock edge (fills, stores, clearing a
//     line after its write-back);
//   * the snoop port, answered in the same cycle:
//       READ, T_READ : VALID/DIRTY/RESERVED -> VALID,   return data
//       RFO,  T_RFO  : VALID/DIRTY/RESERVED -> INVALID, return data
//     "Return data" means `snp_dirty`/`snp_data` supply the line when it is
//     DIRTY; a clean line is supplied by memory. A regular cache never answers
//     BUSY. The snoop table is the design's; supplying only dirty data and
//     letting memory answer clean misses is this design's reading of "main
//     memory responds to all read misses".
// The low bits of `lk_vaddr` are the index bits of `lk_addr` itself, passed
// straight through, since the victim shares the lookup's index.
// Reset (synchronous, active low) clears the per-line valid bits; states, tags
// and data are held in arrays without reset and only read for valid lines.
module reg_cache
  import tm_pkg::*;
#(
  parameter int unsigned LINES  = 2048,
  parameter int unsigned ADDR_W = 16,
  localparam int unsigned XW    = $clog2(LINES),
  localparam int unsigned TW    = ADDR_W - XW
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup
  input  logic [ADDR_W-1:0] lk_addr,
  output logic              lk_hit,
  output line_state_e       lk_state,   // state of the line at the index
  output word_t             lk_data,    // data  of the line at the index
  output logic [ADDR_W-1:0] lk_vaddr,   // address of the line at the index
  // write
  input  logic              we,
  input  logic [ADDR_W-1:0] w_addr,
  input  line_state_e       w_state,
  input  word_t             w_data,
  // snoop
  input  logic              snp_valid,
  input  bus_cmd_e          snp_cmd,
  input  logic [ADDR_W-1:0] snp_addr,
  output logic              snp_dirty,
  output word_t             snp_data
);

  // A line is present when its bit in valid_q is set; state_q then holds
  // VALID, DIRTY or RESERVED. Only the valid bits are reset.
  logic [LINES-1:0] valid_q;
  line_state_e      state_q [LINES];
  logic [TW-1:0]    tag_q   [LINES];
  word_t            data_q  [LINES];

  logic [XW-1:0] lk_x, s_x, w_x;
  assign lk_x = lk_addr[XW-1:0];
  assign s_x  = snp_addr[XW-1:0];
  assign w_x  = w_addr[XW-1:0];

  assign lk_state = valid_q[lk_x] ? state_q[lk_x] : LS_INVALID;
  assign lk_data  = data_q[lk_x];
  assign lk_vaddr = {tag_q[lk_x], lk_x};
  assign lk_hit   = (lk_state != LS_INVALID) && (tag_q[lk_x] == lk_addr[ADDR_W-1:XW]);

  logic s_hit, s_rd, s_own;
  assign s_hit = snp_valid && valid_q[s_x] &&
                 tag_q[s_x] == snp_addr[ADDR_W-1:XW];
  assign s_rd  = (snp_cmd == BUS_READ) || (snp_cmd == BUS_TREAD);
  assign s_own = (snp_cmd == BUS_RFO)  || (snp_cmd == BUS_TRFO);

  assign snp_dirty = s_hit && (s_rd || s_own) && state_q[s_x] == LS_DIRTY;
  assign snp_data  = data_q[s_x];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else begin
      if (s_hit && s_own) valid_q[s_x] <= 1'b0;
      if (we)             valid_q[w_x] <= (w_state != LS_INVALID);
    end
  end

  // snooped READ/T_READ downgrade to VALID; a local write never shares a
  // cycle with a snoop
  always_ff @(posedge clk) begin
    if (we)                  state_q[w_x] <= w_state;
    else if (s_hit && s_rd)  state_q[s_x] <= LS_VALID;
  end

  always_ff @(posedge clk) begin
    if (we) begin
      tag_q[w_x]  <= w_addr[ADDR_W-1:XW];
      data_q[w_x] <= w_data;
    end
  end

  a_no_write_during_snoop: assert property (@(posedge clk) disable iff (!rst_n)
    snp_valid |-> !we);

endmodule

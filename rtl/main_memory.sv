// main_memory: shared memory of the multiprocessor, one 64-bit word per
// address, answering every bus cycle that is not refused.
//
// A bus cycle is presented for one clock (`req`). Reads (READ, RFO, T_READ,
// T_RFO) return the word; when a snooping cache supplies a DIRTY copy in the
// same cycle (`flush`), that copy is written into memory and returned instead,
// so memory is up to date after every read. WRITE stores `wdata` (a replaced
// line). Either way `done` pulses MEM_LAT-1 cycles after `req`, so one access
// occupies the bus for MEM_LAT cycles including its address cycle; the design's
// memory latency is 4 clock cycles. A second request must not arrive before
// `done`. The word array is not reset; `init_*` writes a word directly (used to
// load a program's data before it runs).
module main_memory
  import tm_pkg::*;
#(
  parameter int unsigned ADDR_W  = 16,
  parameter int unsigned MEM_LAT = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req,
  input  bus_cmd_e          cmd,
  input  logic [ADDR_W-1:0] addr,
  input  word_t             wdata,
  input  logic              flush,
  input  word_t             flush_data,
  output logic              done,
  output word_t             rdata,
  input  logic              init_we,
  input  logic [ADDR_W-1:0] init_addr,
  input  word_t             init_data
);

  localparam int unsigned CW = $clog2(MEM_LAT + 1);

  word_t mem [2**ADDR_W];

  logic          pend_q;
  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk) begin
    if (req) begin
      if (cmd == BUS_WRITE) begin
        mem[addr] <= wdata;
      end else if (flush) begin
        mem[addr] <= flush_data;
        rdata     <= flush_data;
      end else begin
        rdata     <= mem[addr];
      end
    end else if (init_we) begin
      mem[init_addr] <= init_data;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend_q <= 1'b0;
      cnt_q  <= '0;
    end else if (req) begin
      pend_q <= 1'b1;
      cnt_q  <= CW'(MEM_LAT - 2);
    end else if (pend_q) begin
      if (cnt_q == 0) pend_q <= 1'b0;
      else            cnt_q  <= cnt_q - 1'b1;
    end
  end

  assign done = pend_q && cnt_q == 0;

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    req |-> (!pend_q || done));

  initial assert (MEM_LAT >= 2) else $error("main_memory: MEM_LAT must be at least 2");

endmodule

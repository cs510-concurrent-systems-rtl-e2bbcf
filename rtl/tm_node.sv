// tm_node: the memory side of one processor of the transactional-memory
// multiprocessor: its regular cache, its transactional cache, its TACTIVE /
// TSTATUS bits, and the controller that executes the processor's memory
// instructions on them and on the snoopy bus.
//
// Instructions (one at a time, req_valid/req_ready handshake, one resp_valid
// pulse per instruction with `resp_data` and `resp_ok`):
//   LOAD / STORE  regular cache; a miss issues READ (LOAD) or RFO (STORE, also
//                 for a STORE to a VALID line); a DIRTY line at the index is
//                 written back first (WRITE).
//   LT / LTX / ST transactional cache, following the flowcharts of the design:
//                 - XABORT entry of the line present (exclusive for LTX/ST):
//                   use it (ST overwrites its data, making it DIRTY);
//                 - NORMAL entry present (exclusive for LTX/ST): it becomes the
//                   XCOMMIT entry and a copy is allocated as XABORT (with the
//                   new data for ST);
//                 - otherwise a T_READ (LT) or T_RFO (LTX, ST) fetches the line
//                   into a new XCOMMIT/XABORT pair. A BUSY answer aborts the
//                   transaction (TSTATUS=0) and the access returns 0.
//                 Victims are replaced in the order EMPTY, NORMAL, XCOMMIT; a
//                 DIRTY victim is written back first; no victim means the
//                 transactional cache overflows, which aborts the transaction.
//                 An orphan (TACTIVE && !TSTATUS) gets 0 from LT/LTX and its
//                 ST is dropped, without touching cache or bus.
//   VALIDATE      resp_ok = TSTATUS; a false result ends the transaction.
//   COMMIT        resp_ok = TSTATUS; commits the cache in one cycle if true,
//                 aborts it otherwise; ends the transaction.
//   ABORT         aborts the cache in one cycle and ends the transaction.
//
// Timing: an instruction served inside the node answers one cycle after it is
// accepted. A fill answers MEM_LAT cycles after its bus grant; with a free bus
// a miss answers 1 + MEM_LAT cycles after acceptance (5 with the design's
// 4-cycle memory). Local cache work is done only in cycles in which the bus
// is not broadcasting a cycle, so a snooped cycle never collides with it.
//
// What follows the design: the instruction set, the status bits, the two-entry
// scheme, the replacement order and the bus cycles. This design's own: the
// handshake, the orphan behaviour, the upgrade of a VALID line by T_RFO, the
// write-back of DIRTY NORMAL victims and the event outputs.
module tm_node
  import tm_pkg::*;
#(
  parameter int unsigned ADDR_W     = 16,
  parameter int unsigned RC_LINES   = 2048,
  parameter int unsigned TX_ENTRIES = 64,
  parameter int unsigned NW         = 5,
  localparam int unsigned IW        = (TX_ENTRIES > 1) ? $clog2(TX_ENTRIES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NW-1:0]     node_id,
  // processor side
  input  logic              req_valid,
  output logic              req_ready,
  input  tm_op_e            req_op,
  input  logic [ADDR_W-1:0] req_addr,
  input  word_t             req_wdata,
  output logic              resp_valid,
  output word_t             resp_data,
  output logic              resp_ok,
  output logic              tactive,
  output logic              tstatus,
  output tm_events_t        ev,
  // bus master side
  output logic              bus_req,
  output bus_cmd_e          bus_cmd,
  output logic [ADDR_W-1:0] bus_addr,
  output word_t             bus_wdata,
  output bus_src_e          bus_src,
  input  logic              bus_gnt,
  input  logic              bus_busy,
  input  logic              bus_done,
  input  word_t             bus_rdata,
  // snoop side
  input  logic              snp_valid,
  input  bus_cmd_e          snp_cmd,
  input  logic [ADDR_W-1:0] snp_addr,
  input  logic [NW-1:0]     snp_node,
  input  bus_src_e          snp_src,
  output logic              s_busy,
  output logic              s_dirty,
  output word_t             s_data
);

  typedef enum logic [2:0] {
    S_IDLE, S_RETRY, S_BUS, S_WAIT, S_WB, S_WBWAIT
  } nstate_e;

  nstate_e           st_q, st_d;
  tm_op_e            op_q;
  logic [ADDR_W-1:0] addr_q;
  word_t             wdata_q;
  bus_cmd_e          cmd_q, cmd_d;
  logic [IW-1:0]     v1_q, v2_q;
  logic              wb_tx_q, wb_tx_d;
  logic [IW-1:0]     wb_idx_q, wb_idx_d;
  logic [ADDR_W-1:0] wb_addr_q, wb_addr_d;

  // ---------------- current instruction ----------------
  logic              exec;
  tm_op_e            e_op;
  logic [ADDR_W-1:0] e_addr;
  word_t             e_wdata;

  assign e_op    = (st_q == S_IDLE) ? req_op    : op_q;
  assign e_addr  = (st_q == S_IDLE) ? req_addr  : addr_q;
  assign e_wdata = (st_q == S_IDLE) ? req_wdata : wdata_q;
  assign exec    = !snp_valid && ((st_q == S_IDLE && req_valid) || st_q == S_RETRY);
  assign req_ready = (st_q == S_IDLE) && !snp_valid;

  // ---------------- snoop routing ----------------
  logic own, rc_snp, tc_snp;
  assign own    = (snp_node == node_id);
  assign rc_snp = snp_valid && (!own || snp_src == SRC_TX);
  assign tc_snp = snp_valid && (!own || snp_src == SRC_REG);

  // ---------------- regular cache ----------------
  logic              rc_hit;
  line_state_e       rc_state;
  word_t             rc_data;
  logic [ADDR_W-1:0] rc_vaddr, rc_lk_addr;
  logic              rc_we;
  logic [ADDR_W-1:0] rc_waddr;
  line_state_e       rc_wstate;
  word_t             rc_wdata;
  logic              rc_sdirty;
  word_t             rc_sdata;

  assign rc_lk_addr = (st_q == S_WB && !wb_tx_q) ? wb_addr_q : e_addr;

  reg_cache #(.LINES(RC_LINES), .ADDR_W(ADDR_W)) u_rc (
    .clk, .rst_n,
    .lk_addr  (rc_lk_addr),
    .lk_hit   (rc_hit),
    .lk_state (rc_state),
    .lk_data  (rc_data),
    .lk_vaddr (rc_vaddr),
    .we       (rc_we),
    .w_addr   (rc_waddr),
    .w_state  (rc_wstate),
    .w_data   (rc_wdata),
    .snp_valid(rc_snp),
    .snp_cmd,
    .snp_addr,
    .snp_dirty(rc_sdirty),
    .snp_data (rc_sdata)
  );

  // ---------------- transactional cache ----------------
  logic              xa_hit, nm_hit;
  logic [IW-1:0]     xa_idx, nm_idx;
  line_state_e       xa_state, nm_state;
  word_t             xa_data, nm_data;
  logic              vict_excl;
  logic              v1_ok, v2_ok, v1_dirty, v2_dirty;
  logic [IW-1:0]     v1_idx, v2_idx;
  logic [ADDR_W-1:0] v1_addr, v2_addr;
  tx_tag_e           rd_tag;
  line_state_e       rd_state;
  logic [ADDR_W-1:0] rd_addr;
  word_t             rd_data;
  logic              wa_en, wb_en;
  logic [IW-1:0]     wa_idx, wb_idx;
  tx_tag_e           wa_tag, wb_tag;
  line_state_e       wa_state, wb_state;
  logic [ADDR_W-1:0] wa_addr, wb_addr;
  word_t             wa_data, wb_data;
  logic              tc_commit, tc_abort;
  logic              tc_busy, tc_sdirty, tc_conflict;
  word_t             tc_sdata;

  // ---------------- status bits ----------------
  logic tx_begin, st_conflict, i_validate, i_commit, i_abort;
  logic orphan, st_result, st_cache_commit, st_cache_abort;
  logic busy_abort, overflow;

  tm_status u_status (
    .clk, .rst_n,
    .tx_begin,
    .conflict    (st_conflict),
    .do_validate (i_validate),
    .do_commit   (i_commit),
    .do_abort    (i_abort),
    .tactive,
    .tstatus,
    .orphan,
    .result      (st_result),
    .cache_commit(st_cache_commit),
    .cache_abort (st_cache_abort)
  );

  assign st_conflict = tc_conflict || busy_abort || overflow;
  assign tc_commit   = st_cache_commit;
  assign tc_abort    = st_cache_abort || busy_abort || overflow;

  tx_cache #(.ENTRIES(TX_ENTRIES), .ADDR_W(ADDR_W)) u_tc (
    .clk, .rst_n,
    .lk_addr (e_addr),
    .xa_hit, .xa_idx, .xa_state, .xa_data,
    .nm_hit, .nm_idx, .nm_state, .nm_data,
    .vict_excl,
    .vict_excl_idx(nm_idx),
    .v1_ok, .v1_idx, .v1_dirty, .v1_addr,
    .v2_ok, .v2_idx, .v2_dirty, .v2_addr,
    .rd_idx  (wb_idx_q),
    .rd_tag, .rd_state, .rd_addr, .rd_data,
    .wa_en, .wa_idx, .wa_tag, .wa_state, .wa_addr, .wa_data,
    .wb_en, .wb_idx, .wb_tag, .wb_state, .wb_addr, .wb_data,
    .commit_all(tc_commit),
    .abort_all (tc_abort),
    .tx_live   (tactive && tstatus),
    .snp_valid (tc_snp),
    .snp_cmd,
    .snp_addr,
    .snp_busy  (tc_busy),
    .snp_dirty (tc_sdirty),
    .snp_data  (tc_sdata),
    .snp_conflict(tc_conflict)
  );

  assign s_busy  = tc_busy;
  assign s_dirty = rc_sdirty || tc_sdirty;
  assign s_data  = tc_sdirty ? tc_sdata : rc_sdata;

  // the NORMAL entry itself is kept out of the victim search when it is reused
  assign vict_excl = nm_hit && (e_op == OP_LT || is_exclusive(nm_state));

  // ---------------- bus requests ----------------
  // Kept apart from the controller so that a request never depends on this
  // cycle's grant or snoop answers.
  logic still_dirty;  // the write-back victim still holds its DIRTY line
  assign still_dirty = wb_tx_q ? (rd_tag != TT_EMPTY && rd_state == LS_DIRTY && rd_addr == wb_addr_q)
                               : (rc_hit && rc_state == LS_DIRTY);

  always_comb begin
    bus_req   = 1'b0;
    bus_cmd   = BUS_NONE;
    bus_addr  = addr_q;
    bus_wdata = '0;
    bus_src   = SRC_REG;
    if (st_q == S_BUS) begin
      bus_req  = 1'b1;
      bus_cmd  = cmd_q;
      bus_src  = is_tx_cmd(cmd_q) ? SRC_TX : SRC_REG;
    end else if (st_q == S_WB && still_dirty) begin
      bus_req   = 1'b1;
      bus_cmd   = BUS_WRITE;
      bus_addr  = wb_addr_q;
      bus_wdata = wb_tx_q ? rd_data : rc_data;
      bus_src   = wb_tx_q ? SRC_TX : SRC_REG;
    end
  end

  // ---------------- controller ----------------
  logic  resp_set, resp_ok_d, latch, latch_v;
  word_t resp_data_d;

  always_comb begin
    logic need_x, is_st;
    line_state_e fill_s;

    st_d        = st_q;
    cmd_d       = cmd_q;
    wb_tx_d     = wb_tx_q;
    wb_idx_d    = wb_idx_q;
    wb_addr_d   = wb_addr_q;
    latch       = 1'b0;
    latch_v     = 1'b0;
    resp_set    = 1'b0;
    resp_ok_d   = 1'b0;
    resp_data_d = '0;
    rc_we = 1'b0; rc_waddr = e_addr; rc_wstate = LS_INVALID; rc_wdata = '0;
    wa_en = 1'b0; wa_idx = '0; wa_tag = TT_EMPTY; wa_state = LS_INVALID; wa_addr = e_addr; wa_data = '0;
    wb_en = 1'b0; wb_idx = '0; wb_tag = TT_EMPTY; wb_state = LS_INVALID; wb_addr = e_addr; wb_data = '0;
    tx_begin   = 1'b0;
    i_validate = 1'b0;
    i_commit   = 1'b0;
    i_abort    = 1'b0;
    busy_abort = 1'b0;
    overflow   = 1'b0;
    ev         = '0;
    ev.conflict = tc_conflict;
    need_x = (e_op != OP_LT);
    is_st  = (e_op == OP_ST);
    fill_s = (cmd_q == BUS_TREAD) ? LS_VALID : LS_RESERVED;

    case (st_q)
      S_IDLE, S_RETRY: if (exec) begin
        latch = (st_q == S_IDLE);
        case (e_op)
          OP_LOAD: begin
            if (rc_hit) begin
              resp_set = 1'b1; resp_ok_d = 1'b1; resp_data_d = rc_data; ev.hit = 1'b1;
            end else if (rc_state == LS_DIRTY) begin
              st_d = S_WB; wb_tx_d = 1'b0; wb_addr_d = rc_vaddr;
            end else begin
              st_d = S_BUS; cmd_d = BUS_READ; ev.miss = 1'b1;
            end
          end
          OP_STORE: begin
            if (rc_hit && is_exclusive(rc_state)) begin
              rc_we = 1'b1; rc_wstate = LS_DIRTY; rc_wdata = e_wdata;
              resp_set = 1'b1; resp_ok_d = 1'b1; ev.hit = 1'b1;
            end else if (!rc_hit && rc_state == LS_DIRTY) begin
              st_d = S_WB; wb_tx_d = 1'b0; wb_addr_d = rc_vaddr;
            end else begin
              st_d = S_BUS; cmd_d = BUS_RFO; ev.miss = 1'b1;
            end
          end
          OP_LT, OP_LTX, OP_ST: begin
            if (orphan) begin
              resp_set = 1'b1; ev.orphan_op = 1'b1;
            end else begin
              tx_begin = !tactive;
              if (xa_hit && (!need_x || is_exclusive(xa_state))) begin
                if (is_st) begin
                  wa_en = 1'b1; wa_idx = xa_idx; wa_tag = TT_XABORT;
                  wa_state = LS_DIRTY; wa_data = e_wdata;
                end
                resp_set = 1'b1; resp_ok_d = 1'b1; ev.hit = 1'b1;
                resp_data_d = is_st ? '0 : xa_data;
              end else if (nm_hit && (!need_x || is_exclusive(nm_state))) begin
                if (!v1_ok) begin
                  overflow = 1'b1; resp_set = 1'b1; ev.overflow = 1'b1;
                end else if (v1_dirty) begin
                  st_d = S_WB; wb_tx_d = 1'b1; wb_idx_d = v1_idx; wb_addr_d = v1_addr;
                end else begin
                  wa_en = 1'b1; wa_idx = nm_idx; wa_tag = TT_XCOMMIT;
                  wa_state = nm_state; wa_data = nm_data;
                  wb_en = 1'b1; wb_idx = v1_idx; wb_tag = TT_XABORT;
                  wb_state = is_st ? LS_DIRTY : nm_state;
                  wb_data  = is_st ? e_wdata  : nm_data;
                  resp_set = 1'b1; resp_ok_d = 1'b1; ev.hit = 1'b1;
                  resp_data_d = is_st ? '0 : nm_data;
                end
              end else begin
                if (!(v1_ok && v2_ok)) begin
                  overflow = 1'b1; resp_set = 1'b1; ev.overflow = 1'b1;
                end else if (v1_dirty) begin
                  st_d = S_WB; wb_tx_d = 1'b1; wb_idx_d = v1_idx; wb_addr_d = v1_addr;
                end else if (v2_dirty) begin
                  st_d = S_WB; wb_tx_d = 1'b1; wb_idx_d = v2_idx; wb_addr_d = v2_addr;
                end else begin
                  latch_v = 1'b1;
                  st_d = S_BUS; cmd_d = (e_op == OP_LT) ? BUS_TREAD : BUS_TRFO;
                  ev.miss = 1'b1;
                end
              end
            end
          end
          OP_VALIDATE: begin
            i_validate = 1'b1;
            resp_set = 1'b1; resp_ok_d = st_result; ev.validate_fail = !st_result;
          end
          OP_COMMIT: begin
            i_commit = 1'b1;
            resp_set = 1'b1; resp_ok_d = st_result;
            ev.commit_ok = st_result; ev.commit_fail = !st_result;
          end
          default: begin  // OP_ABORT
            i_abort = 1'b1;
            resp_set = 1'b1; resp_ok_d = 1'b1; ev.abort_instr = 1'b1;
          end
        endcase
      end

      S_BUS: begin
        if (bus_gnt) begin
          if (bus_busy) begin
            busy_abort = 1'b1; resp_set = 1'b1; st_d = S_IDLE; ev.busy_refused = 1'b1;
          end else begin
            st_d = S_WAIT;
          end
        end
      end

      S_WAIT: if (bus_done) begin
        st_d = S_IDLE;
        resp_set = 1'b1;
        case (op_q)
          OP_LOAD: begin
            rc_we = 1'b1; rc_waddr = addr_q; rc_wstate = LS_VALID; rc_wdata = bus_rdata;
            resp_ok_d = 1'b1; resp_data_d = bus_rdata;
          end
          OP_STORE: begin
            rc_we = 1'b1; rc_waddr = addr_q; rc_wstate = LS_DIRTY; rc_wdata = wdata_q;
            resp_ok_d = 1'b1;
          end
          default: if (tactive && tstatus) begin
            wa_en = 1'b1; wa_idx = v1_q; wa_tag = TT_XCOMMIT; wa_state = fill_s;
            wa_addr = addr_q; wa_data = bus_rdata;
            wb_en = 1'b1; wb_idx = v2_q; wb_tag = TT_XABORT;
            wb_state = (op_q == OP_ST) ? LS_DIRTY : fill_s;
            wb_addr = addr_q; wb_data = (op_q == OP_ST) ? wdata_q : bus_rdata;
            resp_ok_d = 1'b1; resp_data_d = (op_q == OP_ST) ? '0 : bus_rdata;
          end
        endcase
      end

      S_WB: begin
        if (!still_dirty) begin
          st_d = S_RETRY;
        end else begin
          if (bus_gnt) begin
            st_d = S_WBWAIT; ev.writeback = 1'b1;
            if (wb_tx_q) begin
              wa_en = 1'b1; wa_idx = wb_idx_q; wa_tag = TT_EMPTY; wa_state = LS_INVALID;
              wa_addr = wb_addr_q;
            end else begin
              rc_we = 1'b1; rc_waddr = wb_addr_q; rc_wstate = LS_INVALID;
            end
          end
        end
      end

      default: if (bus_done) st_d = S_RETRY;  // S_WBWAIT
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q       <= S_IDLE;
      op_q       <= OP_LOAD;
      addr_q     <= '0;
      wdata_q    <= '0;
      cmd_q      <= BUS_NONE;
      v1_q       <= '0;
      v2_q       <= '0;
      wb_tx_q    <= 1'b0;
      wb_idx_q   <= '0;
      wb_addr_q  <= '0;
      resp_valid <= 1'b0;
      resp_data  <= '0;
      resp_ok    <= 1'b0;
    end else begin
      st_q      <= st_d;
      cmd_q     <= cmd_d;
      wb_tx_q   <= wb_tx_d;
      wb_idx_q  <= wb_idx_d;
      wb_addr_q <= wb_addr_d;
      if (latch) begin
        op_q    <= req_op;
        addr_q  <= req_addr;
        wdata_q <= req_wdata;
      end
      if (latch_v) begin
        v1_q <= v1_idx;
        v2_q <= v2_idx;
      end
      resp_valid <= resp_set;
      resp_data  <= resp_data_d;
      resp_ok    <= resp_ok_d;
    end
  end

  a_req_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
    (req_valid && req_ready) |-> st_q == S_IDLE);

endmodule

// tx_cache: the transactional cache of one processor.
//
// A small fully associative cache, one 64-bit word per line, that holds every
// line a transaction has read or written. Each entry has an address, a
// coherence state (INVALID/VALID/DIRTY/RESERVED), a transactional tag
// (EMPTY/NORMAL/XCOMMIT/XABORT) and the data. A transactional access keeps two
// entries for its line: the XCOMMIT entry holds the old value and is dropped
// on commit, the XABORT entry holds the tentative value and is dropped on
// abort. Commit and abort each take one clock cycle for the whole cache:
//   commit: XCOMMIT -> EMPTY, XABORT -> NORMAL
//   abort : XABORT  -> EMPTY, XCOMMIT -> NORMAL
//
// The module offers
//   * a lookup of `lk_addr` that reports the XABORT and the NORMAL entry of
//     that line (combinational);
//   * a replacement search for one or two victims in the order
//     same line, EMPTY, NORMAL, XCOMMIT (lowest index first inside a class);
//     XABORT entries are never replaced. `vN_dirty` says the victim must be
//     written back first; no victim at all means the transaction overflows.
//   * an entry read port `rd_idx` (combinational), used for write-backs;
//   * two entry write ports, applied at the clock edge;
//   * the snoop port, answering another cache's bus cycle in the same cycle:
//       READ/RFO, NORMAL entry    : behave as a regular cache (VALID resp.
//                                   INVALID, supply the data when DIRTY)
//       T_READ, VALID entry       : stays VALID
//       T_READ/T_RFO, DIRTY or RESERVED entry of the transaction, or NORMAL
//                                   entry while the transaction is live: BUSY
//       T_RFO, VALID NORMAL entry : INVALID
//   * conflict detection: a snooped cycle that would take away a line of the
//     running transaction without being refused (T_RFO on a VALID
//     transactional line; a regular RFO, or a regular READ of an exclusive
//     transactional line) aborts the transaction in the same cycle, raises
//     `snp_conflict`, and is then answered from the restored NORMAL entry.
// The two-entry scheme, the commit/abort rules, the replacement order and the
// snoop table are the design's; the choice of which cycles count as conflicts
// for regular cycles and the live-transaction condition on NORMAL BUSY answers
// are this design's own (see the documentation).
//
// Local writes, commit_all and abort_all are only issued in cycles without a
// snooped bus cycle; the controller guarantees it.
module tx_cache
  import tm_pkg::*;
#(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned ADDR_W  = 16,
  localparam int unsigned IW     = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup
  input  logic [ADDR_W-1:0] lk_addr,
  output logic              xa_hit,
  output logic [IW-1:0]     xa_idx,
  output line_state_e       xa_state,
  output word_t             xa_data,
  output logic              nm_hit,
  output logic [IW-1:0]     nm_idx,
  output line_state_e       nm_state,
  output word_t             nm_data,
  // replacement
  input  logic              vict_excl,
  input  logic [IW-1:0]     vict_excl_idx,
  output logic              v1_ok,
  output logic [IW-1:0]     v1_idx,
  output logic              v1_dirty,
  output logic [ADDR_W-1:0] v1_addr,
  output logic              v2_ok,
  output logic [IW-1:0]     v2_idx,
  output logic              v2_dirty,
  output logic [ADDR_W-1:0] v2_addr,
  // entry read
  input  logic [IW-1:0]     rd_idx,
  output tx_tag_e           rd_tag,
  output line_state_e       rd_state,
  output logic [ADDR_W-1:0] rd_addr,
  output word_t             rd_data,
  // entry writes
  input  logic              wa_en,
  input  logic [IW-1:0]     wa_idx,
  input  tx_tag_e           wa_tag,
  input  line_state_e       wa_state,
  input  logic [ADDR_W-1:0] wa_addr,
  input  word_t             wa_data,
  input  logic              wb_en,
  input  logic [IW-1:0]     wb_idx,
  input  tx_tag_e           wb_tag,
  input  line_state_e       wb_state,
  input  logic [ADDR_W-1:0] wb_addr,
  input  word_t             wb_data,
  // whole-cache operations
  input  logic              commit_all,
  input  logic              abort_all,
  input  logic              tx_live,      // TACTIVE && TSTATUS
  // snoop
  input  logic              snp_valid,
  input  bus_cmd_e          snp_cmd,
  input  logic [ADDR_W-1:0] snp_addr,
  output logic              snp_busy,
  output logic              snp_dirty,    // supplies the data of a DIRTY line
  output word_t             snp_data,
  output logic              snp_conflict
);

  tx_tag_e           tag_q   [ENTRIES];
  line_state_e       state_q [ENTRIES];
  logic [ADDR_W-1:0] addr_q  [ENTRIES];
  word_t             data_q  [ENTRIES];

  logic [ENTRIES-1:0] live;
  always_comb
    for (int i = 0; i < ENTRIES; i++)
      live[i] = (tag_q[i] != TT_EMPTY) && (state_q[i] != LS_INVALID);

  // ---------------- lookup ----------------
  always_comb begin
    xa_hit = 1'b0; xa_idx = '0; xa_state = LS_INVALID; xa_data = '0;
    nm_hit = 1'b0; nm_idx = '0; nm_state = LS_INVALID; nm_data = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (live[i] && addr_q[i] == lk_addr) begin
        if (tag_q[i] == TT_XABORT && !xa_hit) begin
          xa_hit = 1'b1; xa_idx = IW'(i); xa_state = state_q[i]; xa_data = data_q[i];
        end
        if (tag_q[i] == TT_NORMAL && !nm_hit) begin
          nm_hit = 1'b1; nm_idx = IW'(i); nm_state = state_q[i]; nm_data = data_q[i];
        end
      end
    end
  end

  // ---------------- replacement ----------------
  // class 0: same line, 1: EMPTY, 2: NORMAL, 3: XCOMMIT, 4: not replaceable
  logic [2:0] vclass [ENTRIES];
  always_comb
    for (int i = 0; i < ENTRIES; i++) begin
      if (vict_excl && vict_excl_idx == IW'(i))      vclass[i] = 3'd4;
      else if (!live[i])                             vclass[i] = 3'd1;
      else if (addr_q[i] == lk_addr)                 vclass[i] = 3'd0;
      else if (tag_q[i] == TT_NORMAL)                vclass[i] = 3'd2;
      else if (tag_q[i] == TT_XCOMMIT)               vclass[i] = 3'd3;
      else                                           vclass[i] = 3'd4;
    end

  always_comb begin
    logic [2:0] best1, best2;
    v1_ok = 1'b0; v1_idx = '0; best1 = 3'd4;
    for (int i = 0; i < ENTRIES; i++)
      if (vclass[i] < best1) begin
        best1 = vclass[i]; v1_ok = 1'b1; v1_idx = IW'(i);
      end
    v2_ok = 1'b0; v2_idx = '0; best2 = 3'd4;
    for (int i = 0; i < ENTRIES; i++)
      if (vclass[i] < best2 && !(v1_ok && v1_idx == IW'(i))) begin
        best2 = vclass[i]; v2_ok = 1'b1; v2_idx = IW'(i);
      end
    v1_dirty = v1_ok && live[v1_idx] && state_q[v1_idx] == LS_DIRTY;
    v2_dirty = v2_ok && live[v2_idx] && state_q[v2_idx] == LS_DIRTY;
    v1_addr  = addr_q[v1_idx];
    v2_addr  = addr_q[v2_idx];
  end

  // ---------------- entry read ----------------
  assign rd_tag   = tag_q[rd_idx];
  assign rd_state = state_q[rd_idx];
  assign rd_addr  = addr_q[rd_idx];
  assign rd_data  = data_q[rd_idx];

  // ---------------- snoop ----------------
  logic [ENTRIES-1:0] smatch, sbusy, scand;
  always_comb
    for (int i = 0; i < ENTRIES; i++) begin
      logic txtag;
      txtag     = (tag_q[i] == TT_XABORT) || (tag_q[i] == TT_XCOMMIT);
      smatch[i] = snp_valid && live[i] && addr_q[i] == snp_addr;
      sbusy[i]  = smatch[i] && is_tx_cmd(snp_cmd) && is_exclusive(state_q[i]) &&
                  (txtag || tx_live);
      case (snp_cmd)
        BUS_READ: scand[i] = smatch[i] && txtag && is_exclusive(state_q[i]);
        BUS_RFO:  scand[i] = smatch[i] && txtag;
        BUS_TRFO: scand[i] = smatch[i] && txtag && state_q[i] == LS_VALID;
        default:  scand[i] = 1'b0;
      endcase
    end

  assign snp_busy     = |sbusy;
  assign snp_conflict = !snp_busy && (|scand);

  // tag each entry would have after this cycle's whole-cache operation
  logic    do_abort;
  tx_tag_e post_tag [ENTRIES];
  assign do_abort = abort_all || snp_conflict;
  always_comb
    for (int i = 0; i < ENTRIES; i++) begin
      post_tag[i] = tag_q[i];
      if (do_abort) begin
        if (tag_q[i] == TT_XABORT)  post_tag[i] = TT_EMPTY;
        if (tag_q[i] == TT_XCOMMIT) post_tag[i] = TT_NORMAL;
      end else if (commit_all) begin
        if (tag_q[i] == TT_XCOMMIT) post_tag[i] = TT_EMPTY;
        if (tag_q[i] == TT_XABORT)  post_tag[i] = TT_NORMAL;
      end
    end

  // NORMAL entries (after the abort) hit by an accepted cycle act as a regular cache
  logic [ENTRIES-1:0] sreg;
  always_comb begin
    snp_dirty = 1'b0;
    snp_data  = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      sreg[i] = smatch[i] && !snp_busy && post_tag[i] == TT_NORMAL &&
                snp_cmd != BUS_WRITE;
      if (sreg[i] && state_q[i] == LS_DIRTY) begin
        snp_dirty = 1'b1;
        snp_data  = data_q[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        tag_q[i]   <= TT_EMPTY;
        state_q[i] <= LS_INVALID;
        addr_q[i]  <= '0;
        data_q[i]  <= '0;
      end
    end else begin
      for (int i = 0; i < ENTRIES; i++) begin
        if (post_tag[i] == TT_EMPTY) begin
          tag_q[i]   <= TT_EMPTY;
          state_q[i] <= LS_INVALID;
        end else if (sreg[i]) begin
          if (snp_cmd == BUS_READ || snp_cmd == BUS_TREAD) begin
            tag_q[i]   <= TT_NORMAL;
            state_q[i] <= LS_VALID;
          end else begin
            tag_q[i]   <= TT_EMPTY;
            state_q[i] <= LS_INVALID;
          end
        end else begin
          tag_q[i] <= post_tag[i];
        end
      end
      if (wa_en) begin
        tag_q[wa_idx]   <= wa_tag;
        state_q[wa_idx] <= wa_state;
        addr_q[wa_idx]  <= wa_addr;
        data_q[wa_idx]  <= wa_data;
      end
      if (wb_en) begin
        tag_q[wb_idx]   <= wb_tag;
        state_q[wb_idx] <= wb_state;
        addr_q[wb_idx]  <= wb_addr;
        data_q[wb_idx]  <= wb_data;
      end
    end
  end

  a_no_local_during_snoop: assert property (@(posedge clk) disable iff (!rst_n)
    snp_valid |-> !(wa_en || wb_en || commit_all || abort_all));
  a_ports_differ: assert property (@(posedge clk) disable iff (!rst_n)
    (wa_en && wb_en) |-> (wa_idx != wb_idx));

endmodule

// tb_tx_cache: directed test of a 4-entry transactional cache. Expected values
// are worked out by hand from the entry rules: lookup of XABORT and NORMAL
// entries, the replacement order (same line, EMPTY, NORMAL, XCOMMIT, never
// XABORT) and write-back flag, single-cycle commit and abort, BUSY answers,
// supply of dirty data, and a conflict that aborts the transaction and is then
// answered from the restored entry.
module tb_tx_cache;
  import tm_pkg::*;
  localparam int E = 4, AW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [AW-1:0] lk_addr, v1_addr, v2_addr, rd_addr, wa_addr, wb_addr, snp_addr;
  logic xa_hit, nm_hit, vict_excl, v1_ok, v1_dirty, v2_ok, v2_dirty;
  logic [1:0] xa_idx, nm_idx, vict_excl_idx, v1_idx, v2_idx, rd_idx, wa_idx, wb_idx;
  line_state_e xa_state, nm_state, rd_state, wa_state, wb_state;
  word_t xa_data, nm_data, rd_data, wa_data, wb_data, snp_data;
  tx_tag_e rd_tag, wa_tag, wb_tag;
  logic wa_en, wb_en, commit_all, abort_all, tx_live;
  logic snp_valid, snp_busy, snp_dirty, snp_conflict;
  bus_cmd_e snp_cmd;

  tx_cache #(.ENTRIES(E), .ADDR_W(AW)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic idle();
    wa_en = 0; wb_en = 0; commit_all = 0; abort_all = 0; snp_valid = 0; snp_cmd = BUS_NONE;
    vict_excl = 0;
  endtask

  task automatic put(input int i, input tx_tag_e t, input line_state_e s,
                     input logic [AW-1:0] a, input word_t d);
    @(negedge clk); idle();
    wa_en = 1; wa_idx = 2'(i); wa_tag = t; wa_state = s; wa_addr = a; wa_data = d;
    @(negedge clk); idle();
  endtask

  task automatic entry_is(input string what, input int i, input tx_tag_e t,
                          input line_state_e s);
    rd_idx = 2'(i); #1;
    check({what, " tag"}, rd_tag == t);
    if (t != TT_EMPTY) check({what, " state"}, rd_state == s);
  endtask

  // present a snoop for one cycle; results sampled before the edge
  task automatic snoop(input bus_cmd_e c, input logic [AW-1:0] a,
                       output logic b, output logic dty, output word_t d, output logic cf);
    @(negedge clk); idle();
    snp_valid = 1; snp_cmd = c; snp_addr = a; #1;
    b = snp_busy; dty = snp_dirty; d = snp_data; cf = snp_conflict;
    @(negedge clk); idle();
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic b, dty, cf;
    word_t d;
    idle(); tx_live = 1; lk_addr = '0; vict_excl_idx = '0; rd_idx = '0;
    wa_idx = '0; wa_tag = TT_EMPTY; wa_state = LS_INVALID; wa_addr = '0; wa_data = '0;
    wb_idx = '0; wb_tag = TT_EMPTY; wb_state = LS_INVALID; wb_addr = '0; wb_data = '0;
    snp_addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    lk_addr = 8'd9; #1;
    check("empty: no hits", !xa_hit && !nm_hit);
    check("empty: victims 0,1", v1_ok && v1_idx == 0 && v2_ok && v2_idx == 1 && !v1_dirty && !v2_dirty);

    put(0, TT_NORMAL, LS_RESERVED, 8'd5, 64'hA);
    put(1, TT_NORMAL, LS_DIRTY,    8'd6, 64'hB);
    lk_addr = 8'd5; #1;
    check("NORMAL hit", nm_hit && nm_idx == 0 && nm_data == 64'hA && nm_state == LS_RESERVED && !xa_hit);
    lk_addr = 8'd9; #1;
    check("EMPTY before NORMAL", v1_idx == 2 && v2_idx == 3);

    // two-port write: a transactional pair
    @(negedge clk); idle();
    wa_en = 1; wa_idx = 2; wa_tag = TT_XCOMMIT; wa_state = LS_VALID; wa_addr = 8'd7; wa_data = 64'hC;
    wb_en = 1; wb_idx = 3; wb_tag = TT_XABORT;  wb_state = LS_VALID; wb_addr = 8'd7; wb_data = 64'hC;
    @(negedge clk); idle();
    lk_addr = 8'd7; #1;
    check("XABORT hit", xa_hit && xa_idx == 3 && xa_data == 64'hC && !nm_hit);
    check("same line first", v1_idx == 2 && v2_idx == 3);
    lk_addr = 8'd9; #1;
    check("NORMAL before XCOMMIT, dirty flagged", v1_idx == 0 && !v1_dirty && v2_idx == 1 && v2_dirty);
    vict_excl = 1; vict_excl_idx = 0; #1;
    check("excluded entry skipped", v1_idx == 1 && v1_dirty && v2_idx == 2 && !v2_dirty);
    check("victim addresses", v1_addr == 8'd6 && v2_addr == 8'd7);
    vict_excl = 0;

    // snoops
    snoop(BUS_TREAD, 8'd5, b, dty, d, cf);
    check("T_READ on NORMAL RESERVED during live tx: BUSY", b && !cf && !dty);
    entry_is("after BUSY", 0, TT_NORMAL, LS_RESERVED);
    tx_live = 0;
    snoop(BUS_TREAD, 8'd5, b, dty, d, cf);
    check("T_READ on NORMAL, no tx: answered", !b && !cf && !dty);
    entry_is("T_READ downgrades", 0, TT_NORMAL, LS_VALID);
    snoop(BUS_READ, 8'd6, b, dty, d, cf);
    check("READ on NORMAL DIRTY supplies", !b && dty && d == 64'hB && !cf);
    entry_is("READ downgrades", 1, TT_NORMAL, LS_VALID);
    snoop(BUS_TREAD, 8'd7, b, dty, d, cf);
    check("T_READ on VALID tx line: shared", !b && !cf && !dty);
    entry_is("XABORT unchanged", 3, TT_XABORT, LS_VALID);
    snoop(BUS_TRFO, 8'd7, b, dty, d, cf);
    check("T_RFO on VALID tx line: conflict", !b && cf);
    entry_is("XABORT dropped", 3, TT_EMPTY, LS_INVALID);
    entry_is("restored line invalidated", 2, TT_EMPTY, LS_INVALID);
    entry_is("other entries kept", 0, TT_NORMAL, LS_VALID);

    // commit
    put(2, TT_XCOMMIT, LS_DIRTY, 8'd8, 64'hD);
    put(3, TT_XABORT,  LS_DIRTY, 8'd8, 64'hE);
    snoop(BUS_TRFO, 8'd8, b, dty, d, cf);
    check("T_RFO on DIRTY tx line: BUSY", b && !cf && !dty);
    @(negedge clk); idle(); commit_all = 1;
    @(negedge clk); idle();
    entry_is("commit drops XCOMMIT", 2, TT_EMPTY, LS_INVALID);
    entry_is("commit keeps XABORT as NORMAL", 3, TT_NORMAL, LS_DIRTY);
    lk_addr = 8'd8; #1;
    check("committed value", nm_hit && nm_idx == 3 && nm_data == 64'hE);

    // abort
    put(2, TT_XCOMMIT, LS_RESERVED, 8'd9, 64'hF);
    put(1, TT_XABORT,  LS_DIRTY,    8'd9, 64'h10);
    @(negedge clk); idle(); abort_all = 1;
    @(negedge clk); idle();
    lk_addr = 8'd9; #1;
    check("abort restores old value", nm_hit && nm_idx == 2 && nm_data == 64'hF && !xa_hit);
    entry_is("abort drops XABORT", 1, TT_EMPTY, LS_INVALID);

    // regular READ of an exclusive transactional line: conflict, then answer
    put(0, TT_XCOMMIT, LS_DIRTY, 8'd10, 64'h11);
    put(1, TT_XABORT,  LS_DIRTY, 8'd10, 64'h12);
    snoop(BUS_READ, 8'd10, b, dty, d, cf);
    check("regular READ conflicts, old value supplied", !b && cf && dty && d == 64'h11);
    entry_is("restored entry shared", 0, TT_NORMAL, LS_VALID);
    entry_is("tentative entry gone", 1, TT_EMPTY, LS_INVALID);

    // overflow: only XABORT entries
    for (int i = 0; i < E; i++) put(i, TT_XABORT, LS_DIRTY, 8'(20 + i), 64'(i));
    lk_addr = 8'd30; #1;
    check("all XABORT: no victim", !v1_ok && !v2_ok);
    put(3, TT_XCOMMIT, LS_VALID, 8'd40, 64'h0);
    lk_addr = 8'd30; #1;
    check("one replaceable entry", v1_ok && v1_idx == 3 && !v2_ok);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

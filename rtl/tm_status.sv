// tm_status: the two transactional status bits a processor gains, TACTIVE and
// TSTATUS, and the outcome of the VALIDATE, COMMIT and ABORT instructions.
//
//   TACTIVE  TSTATUS  meaning
//   0        -        no transaction active
//   1        1        transaction executing, no conflict detected yet
//   1        0        orphan: a conflict was detected, the transaction will fail
//
// TACTIVE is set by the first transactional access (LT, LTX, ST) of a
// transaction. A conflict (a snooped access that hits the transaction's data
// set, a BUSY answer to one of its own bus cycles, or an overflow of the
// transactional cache) clears TSTATUS. VALIDATE returns TSTATUS; when it returns
// false it also ends the transaction. COMMIT returns TSTATUS and ends the
// transaction, asking the transactional cache for a commit when TSTATUS was set
// and for an abort otherwise. ABORT always asks for an abort. Every ending
// leaves TSTATUS=1 and TACTIVE=0. The truth table and the three flowcharts are
// the design's; the implicit start on the first transactional access and the
// reset values are this design's choice.
//
// Timing: `result`, `cache_commit` and `cache_abort` are combinational from the
// current bits and the instruction strobes; the bits change at the next clock
// edge. At most one of the three instruction strobes is asserted per cycle.
// Reset is synchronous and active low.
module tm_status (
  input  logic clk,
  input  logic rst_n,
  input  logic tx_begin,   // a transactional access is executed
  input  logic conflict,   // a conflict was detected this cycle
  input  logic do_validate,   // VALIDATE instruction
  input  logic do_commit,     // COMMIT instruction
  input  logic do_abort,      // ABORT instruction
  output logic tactive,
  output logic tstatus,
  output logic orphan,     // TACTIVE && !TSTATUS
  output logic result,     // return value of VALIDATE / COMMIT
  output logic cache_commit,  // transactional cache: drop XCOMMIT, XABORT->NORMAL
  output logic cache_abort    // transactional cache: drop XABORT, XCOMMIT->NORMAL
);

  logic ends;

  assign orphan       = tactive && !tstatus;
  assign result       = tstatus;
  assign cache_commit = do_commit && tstatus;
  assign cache_abort  = do_abort || (do_commit && !tstatus);
  assign ends         = do_abort || do_commit || (do_validate && !tstatus);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tactive <= 1'b0;
      tstatus <= 1'b1;
    end else if (ends) begin
      tactive <= 1'b0;
      tstatus <= 1'b1;
    end else begin
      if (tx_begin) tactive <= 1'b1;
      if (conflict) tstatus <= 1'b0;
    end
  end

  a_one_instr: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({do_validate, do_commit, do_abort}));

endmodule

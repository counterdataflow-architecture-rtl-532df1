// cdf_stage: one stage of the CounterDataFlow pipe ring.
//
// A stage holds IW instruction slots and RW result slots in registers.
// Instruction tokens enter from the stage below (i_in) and leave upwards
// (i_out); result tokens enter from the stage above (d_in) and leave downwards
// (d_q). The stage does no arithmetic: it only resolves dependencies and
// schedules. Every clock:
//  * each instruction consumer that is still waiting compares its tag with the
//    result tokens in this stage and with those entering it (the tokens coming
//    down from the stage above plus those recovered here), so a token and an
//    instruction that cross between two stages still meet; a match copies the
//    value into the consumer;
//  * for every sidepanel whose launch point is this stage (lp_mask non-zero)
//    the lowest instruction slot whose class the sidepanel accepts and whose
//    operands are all present is launched and removed from the pipe, so the
//    slot is free for new instructions; a load also waits until every older
//    store has committed (st_seq == st_committed);
//  * results of sidepanels whose recovery point is this stage take free result
//    slots; a result that finds none stays in its sidepanel (rec_ready low),
//    the pipe itself never stalls.
// Results recovered in the lower half of the ring (STAGE*2 < NSTAGES) are
// marked pass_rob: they must pass the ROB once and go round again before they
// finish, so that every result travels at least half the ring.
// Interface: valid bits inside the tokens; launch is valid/ready, recovery is
// valid/ready. Timing: one cycle per stage for both pipes. flush empties both
// pipes. The matching rules, launch/recovery points and the half-circuit
// rule follow the CDF description; comparing against incoming tokens, the
// lowest-slot-first choice and the fixed slot positions are this design's own.
module cdf_stage
  import cdf_pkg::*;
#(
  parameter int unsigned IW      = 2,   // instruction pipes
  parameter int unsigned RW      = 4,   // result pipes
  parameter int unsigned NSP     = 9,   // sidepanel ports (unused ones have lp_mask = 0 / rec_valid = 0)
  parameter int unsigned STAGE   = 0,
  parameter int unsigned NSTAGES = 9
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    flush,
  input  itok_t   i_in  [IW],    // from the stage below (or the decode unit)
  output itok_t   i_out [IW],    // to the stage above, after matching and launch
  input  dtok_t   d_in  [RW],    // from the stage above (or the ROB wrap path)
  output dtok_t   d_q   [RW],    // to the stage below
  input  stseq_t  st_committed,
  // launch ports
  input  ocmask_t lp_mask  [NSP],
  input  logic    lp_ready [NSP],
  output logic    lp_valid [NSP],
  output itok_t   lp_tok   [NSP],
  // recovery ports
  input  logic    rec_valid [NSP],
  input  dtok_t   rec_tok   [NSP],
  output logic    rec_ready [NSP]
);

  localparam logic FIRST_HALF = (STAGE * 2 < NSTAGES);

  itok_t i_q [IW];
  dtok_t d_nxt [RW];
  itok_t i_m [IW];
  logic  taken [IW];

  dtok_t d_nxt_q [RW];
  assign d_q = d_nxt_q;

  // Incoming result tokens plus recovered results.
  always_comb begin
    logic [RW-1:0] used;
    for (int r = 0; r < RW; r++) begin
      d_nxt[r] = d_in[r];
      used[r]  = d_in[r].valid;
    end
    for (int p = 0; p < NSP; p++) begin
      rec_ready[p] = 1'b0;
      for (int r = 0; r < RW; r++) begin
        if (!rec_ready[p] && !used[r]) begin
          rec_ready[p] = 1'b1;
          if (rec_valid[p]) begin
            used[r]           = 1'b1;
            d_nxt[r]          = rec_tok[p];
            d_nxt[r].valid    = 1'b1;
            d_nxt[r].pass_rob = FIRST_HALF;
          end
        end
      end
    end
  end

  function automatic cons_t match(cons_t c, dtok_t a [RW], dtok_t b [RW]);
    cons_t m = c;
    for (int r = 0; r < RW; r++) begin
      if (!m.rdy && a[r].valid && a[r].tag == m.tag) begin
        m.rdy = 1'b1;
        m.val = a[r].val;
      end
      if (!m.rdy && b[r].valid && b[r].tag == m.tag) begin
        m.rdy = 1'b1;
        m.val = b[r].val;
      end
    end
    return m;
  endfunction

  // Operand capture.
  always_comb begin
    for (int s = 0; s < IW; s++) begin
      i_m[s] = i_q[s];
      if (i_q[s].valid) begin
        i_m[s].c1 = match(i_q[s].c1, d_nxt_q, d_nxt);
        i_m[s].c2 = match(i_q[s].c2, d_nxt_q, d_nxt);
      end
    end
  end

  // Launch.
  always_comb begin
    for (int s = 0; s < IW; s++) taken[s] = 1'b0;
    for (int p = 0; p < NSP; p++) begin
      lp_valid[p] = 1'b0;
      lp_tok[p]   = ITOK_EMPTY;
      for (int s = 0; s < IW; s++) begin
        if (!lp_valid[p] && !taken[s] && lp_ready[p] && i_m[s].valid &&
            oc_in(lp_mask[p], i_m[s].oc) && i_m[s].c1.rdy && i_m[s].c2.rdy &&
            (i_m[s].oc != OC_LOAD || i_m[s].st_seq == st_committed)) begin
          lp_valid[p] = 1'b1;
          lp_tok[p]   = i_m[s];
          taken[s]    = 1'b1;
        end
      end
    end
    for (int s = 0; s < IW; s++) begin
      i_out[s] = i_m[s];
      if (taken[s]) i_out[s] = ITOK_EMPTY;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < IW; s++) i_q[s] <= ITOK_EMPTY;
      for (int r = 0; r < RW; r++) d_nxt_q[r] <= DTOK_EMPTY;
    end else if (flush) begin
      for (int s = 0; s < IW; s++) i_q[s] <= ITOK_EMPTY;
      for (int r = 0; r < RW; r++) d_nxt_q[r] <= DTOK_EMPTY;
    end else begin
      i_q     <= i_in;
      d_nxt_q <= d_nxt;
    end
  end

endmodule

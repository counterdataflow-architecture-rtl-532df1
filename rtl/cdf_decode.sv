// cdf_decode: issue point of the CounterDataFlow core, at the bottom of the ring.
//
// The instruction pipe is wrapped back onto itself through this unit: every
// instruction that reaches the top stage without having been launched comes
// back here (w_tok) and re-enters the bottom stage in the same slot. New
// instructions from the fetch unit (f_uop, already decoded micro-ops) fill the
// slots the wrapped ones leave free, in program order, as long as the ROB has
// room; wrapped instructions therefore have priority, and heavy wrapping
// throttles fetch. Nothing in the instruction pipe ever stalls.
// For a new instruction the unit allocates a ROB entry (its tag), looks up
// each source in the "last modified by" table and fills the consumer from the
// register file (no pending writer), from the producer's finished ROB entry
// (read by index) or from a result token finishing at the ROB in this very
// cycle; otherwise the consumer keeps the producer's tag and waits for the
// result token in the pipe. Wrapped instructions pass through unchanged: the
// half-circuit rule for result tokens guarantees that a waiting instruction
// meets its result in the pipe, so the ROB never fills operands of
// instructions going by. Each new instruction gets the number of older stores
// (st_seq), which loads use to wait for them.
// Once the ROB knows that a branch was mispredicted (its result has arrived,
// kill_valid), every wrapped instruction younger than it is dropped as it
// passes and no new instruction is accepted until the branch commits and
// flushes the core, so wrong-path work stops early.
// Interface: fetch valid/accept per slot (accepted ones are a prefix), ROB
// allocation and read ports, register file and table read ports, table set
// ports; the bottom-stage input s0_tok is combinational.
// Wrapping through decode, the priority of wrapped tokens, the operand
// rules and removing known wrong-path instructions as they wrap follow the
// CDF description; stopping issue until the flush is this design's own; reading finished values from the ROB at
// issue and the same-cycle bypass of finishing tokens are this design's own.
module cdf_decode
  import cdf_pkg::*;
#(
  parameter int unsigned IW    = 2,
  parameter int unsigned RW    = 4,
  parameter int unsigned DEPTH = 64
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   flush,
  input  stseq_t st_committed_nxt,
  // fetch
  input  logic   f_valid  [IW],
  input  uop_t   f_uop    [IW],
  output logic   f_accept [IW],
  // wrapped instructions from the top stage, finishing result tokens
  input  itok_t  w_tok    [IW],
  input  dtok_t  fin_tok  [RW],
  // ROB
  input  tag_t   rob_tail,
  input  tag_t   rob_head,
  input  logic   kill_valid,    // a finished branch was mispredicted:
  input  tag_t   kill_tag,      // instructions younger than it are invalid
  input  logic [TAG_W:0] rob_free,
  output logic   al_valid   [IW],
  output logic   al_has_dst [IW],
  output reg_t   al_dst     [IW],
  output logic   al_store   [IW],
  output logic   al_branch  [IW],
  output word_t  al_pc      [IW],
  output tag_t   rob_rd_tag  [2*IW],
  input  logic   rob_rd_done [2*IW],
  input  word_t  rob_rd_val  [2*IW],
  // register file and tag table
  output reg_t   rf_raddr [2*IW],
  input  word_t  rf_rdata [2*IW],
  output reg_t   tt_reg   [2*IW],
  input  logic   tt_busy  [2*IW],
  input  tag_t   tt_tag   [2*IW],
  output logic   tt_set_en  [IW],
  output reg_t   tt_set_reg [IW],
  output tag_t   tt_set_tag [IW],
  // bottom stage
  output itok_t  s0_tok [IW],
  // statistics
  output logic [$clog2(IW+1)-1:0] n_issued,
  output logic [$clog2(IW+1)-1:0] n_wrapped
);

  localparam int unsigned PW = $clog2(DEPTH);
  typedef logic [PW-1:0] ptr_t;

  stseq_t st_alloc;

  // wrapped tokens that survive: one younger than a known mispredicted branch
  // is removed as it wraps past the ROB
  itok_t w_keep [IW];
  always_comb begin
    for (int s = 0; s < IW; s++) begin
      w_keep[s] = w_tok[s];
      if (kill_valid && ptr_t'(ptr_t'(w_tok[s].tag) - ptr_t'(rob_head)) >
                        ptr_t'(ptr_t'(kill_tag) - ptr_t'(rob_head)))
        w_keep[s].valid = 1'b0;
    end
  end

  function automatic logic need_src2(uop_t u);
    return (u.oc == OC_STORE) || (u.oc == OC_BRANCH) || (!u.use_imm && u.oc != OC_LOAD);
  endfunction

  // fill a consumer whose producer is in the ROB: a result token finishing in
  // this cycle, or the producer's finished entry (read by index)
  function automatic cons_t fill(cons_t c, dtok_t fin [RW], logic done, word_t rval);
    cons_t m = c;
    for (int r = 0; r < RW; r++)
      if (!m.rdy && fin[r].valid && !fin[r].pass_rob && fin[r].tag == m.tag) begin
        m.rdy = 1'b1;
        m.val = fin[r].val;
      end
    if (!m.rdy && done) begin
      m.rdy = 1'b1;
      m.val = rval;
    end
    return m;
  endfunction

  // --- new instructions: read ports 0 .. 2*IW-1 ---
  int unsigned nfree, nfetch, nacc;
  itok_t n_tok [IW];

  always_comb begin
    nfree = 0;
    for (int s = 0; s < IW; s++) if (!w_keep[s].valid) nfree++;
    nfetch = 0;
    for (int k = 0; k < IW; k++) if (f_valid[k] && nfetch == k) nfetch++;
    nacc = nfree;
    if (nfetch < nacc) nacc = nfetch;
    if (int'(rob_free) < int'(nacc)) nacc = int'(rob_free);
    if (flush || kill_valid) nacc = 0;
  end

  always_comb begin
    stseq_t      sq;
    logic        grp;
    int unsigned p;
    sq  = st_alloc;
    grp = 1'b0;
    p   = 0;
    for (int k = 0; k < IW; k++) n_tok[k] = ITOK_EMPTY;
    for (int k = 0; k < IW; k++) begin
      uop_t  u;
      tag_t  own;
      cons_t c [2];
      reg_t  src [2];
      u   = f_uop[k];
      own = tag_t'(ptr_t'(ptr_t'(rob_tail) + ptr_t'(k)));
      src[0] = u.src1;
      src[1] = u.src2;
      f_accept[k]   = (k < nacc);
      al_valid[k]   = (k < nacc);
      al_has_dst[k] = u.has_dst && u.dst != '0;
      al_dst[k]     = u.dst;
      al_store[k]   = (u.oc == OC_STORE);
      al_branch[k]  = (u.oc == OC_BRANCH);
      al_pc[k]      = u.pc;
      tt_set_en[k]  = (k < nacc) && u.has_dst && u.dst != '0;
      tt_set_reg[k] = u.dst;
      tt_set_tag[k] = own;
      for (int o = 0; o < 2; o++) begin
        p = 2*k + o;
        rob_rd_tag[p]  = tt_tag[2*k+o];
        c[o].r   = src[o];
        c[o].tag = tt_tag[2*k+o];
        c[o].rdy = 1'b0;
        c[o].val = '0;
        if (src[o] == '0 || (o == 1 && !need_src2(u))) begin
          c[o].rdy = 1'b1;
        end else begin
          grp = 1'b0;
          // a producer issued earlier in this same group
          for (int j = 0; j < IW; j++)
            if (j < k && f_uop[j].has_dst && f_uop[j].dst == src[o]) begin
              grp      = 1'b1;
              c[o].tag = tag_t'(ptr_t'(ptr_t'(rob_tail) + ptr_t'(j)));
            end
          if (!grp) begin
            if (tt_busy[2*k+o])
              c[o] = fill(c[o], fin_tok, rob_rd_done[p], rob_rd_val[p]);
            else begin
              c[o].rdy = 1'b1;
              c[o].val = rf_rdata[p];
            end
          end
        end
      end
      n_tok[k]            = ITOK_EMPTY;
      n_tok[k].valid      = 1'b1;
      n_tok[k].tag        = own;
      n_tok[k].oc         = u.oc;
      n_tok[k].fn         = u.fn;
      n_tok[k].use_imm    = u.use_imm;
      n_tok[k].imm        = u.imm;
      n_tok[k].pc         = u.pc;
      n_tok[k].pred_taken = u.pred_taken;
      n_tok[k].st_seq     = sq;
      n_tok[k].c1         = c[0];
      n_tok[k].c2         = c[1];
      if (k < nacc && u.oc == OC_STORE) sq = sq + 1;
    end
  end

  // register file and table lookups of the new micro-ops' sources
  for (genvar k = 0; k < IW; k++) begin : g_src
    assign tt_reg[2*k]     = f_uop[k].src1;
    assign tt_reg[2*k+1]   = f_uop[k].src2;
    assign rf_raddr[2*k]   = f_uop[k].src1;
    assign rf_raddr[2*k+1] = f_uop[k].src2;
  end

  // slot assignment: wrapped tokens keep their slot, new ones fill the gaps in order
  always_comb begin
    int unsigned k;
    k = 0;
    n_wrapped = '0;
    for (int s = 0; s < IW; s++) begin
      s0_tok[s] = ITOK_EMPTY;
      if (w_keep[s].valid) begin
        s0_tok[s] = w_keep[s];
        n_wrapped = n_wrapped + 1;
      end else if (k < nacc) begin
        s0_tok[s] = n_tok[k];
        k++;
      end
    end
    n_issued = ($clog2(IW+1))'(nacc);
  end

  stseq_t st_alloc_nxt;
  always_comb begin
    st_alloc_nxt = st_alloc;
    for (int k = 0; k < IW; k++) if (k < nacc && f_uop[k].oc == OC_STORE) st_alloc_nxt = st_alloc_nxt + 1;
    if (flush) st_alloc_nxt = st_committed_nxt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st_alloc <= '0;
    else        st_alloc <= st_alloc_nxt;
  end

endmodule

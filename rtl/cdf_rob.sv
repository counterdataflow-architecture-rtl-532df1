// cdf_rob: reorder buffer of the CounterDataFlow core.
//
// A circular buffer of DEPTH entries. The decode unit allocates up to IW
// entries per cycle at the tail; the entry number is the tag every token of
// that instruction carries. Result tokens finish their journey at the ROB:
// each of the RW result pipes leaving the bottom stage writes its value into
// the entry named by its tag and marks it done. Nothing is searched: all
// accesses are by index, and the register-to-entry mapping is kept in a
// separate "last modified by" table (cdf_tagtable), so the buffer needs no
// content-addressable memory.
// From the head, up to CW done entries commit per cycle, in order: their
// values go to the register file. A store commits only when the memory unit
// takes its write (at most one store per cycle). A branch whose token says it
// was mispredicted commits and then raises flush for one cycle with the
// corrected pc; everything younger is discarded and the buffer is empty on
// the next cycle.
// Read ports rd_* return, by index, whether an entry is done and its value;
// the decode unit uses them to fill operands of instructions entering the
// bottom stage. kill_valid/kill_tag name the oldest mispredicted branch whose
// result has already reached the ROB; the decode unit uses them to drop
// younger instructions as they wrap past and to stop issuing, before the
// branch commits.
// The ROB at the bottom of the pipe, its entry numbers as tags and its
// non-associative organisation follow the CDF description; commit width,
// store and misprediction handling are this design's own choices.
module cdf_rob
  import cdf_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned IW    = 2,
  parameter int unsigned RW    = 4,
  parameter int unsigned CW    = 2,
  parameter int unsigned NRD   = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  // allocation
  input  logic   al_valid   [IW],   // contiguous from slot 0
  input  logic   al_has_dst [IW],
  input  reg_t   al_dst     [IW],
  input  logic   al_store   [IW],
  input  logic   al_branch  [IW],
  input  word_t  al_pc      [IW],
  output tag_t   tail,
  output logic [TAG_W:0] free_cnt,
  // completion
  input  dtok_t  cmp_tok [RW],
  // indexed reads
  input  tag_t   rd_tag  [NRD],
  output logic   rd_done [NRD],
  output word_t  rd_val  [NRD],
  // commit
  output logic   cm_valid   [CW],
  output tag_t   cm_tag     [CW],
  output logic   cm_has_dst [CW],
  output reg_t   cm_dst     [CW],
  output word_t  cm_val     [CW],
  output word_t  cm_pc      [CW],
  // committed store
  output logic   cst_valid,
  input  logic   cst_ready,
  output word_t  cst_addr,
  output word_t  cst_data,
  output stseq_t st_committed,
  output stseq_t st_committed_nxt,
  // misprediction
  output logic   flush,
  output word_t  redirect_pc,
  // oldest finished mispredicted branch not yet committed: everything younger
  // is on a wrong path
  output tag_t   head,
  output logic   kill_valid,
  output tag_t   kill_tag
);

  localparam int unsigned PW = $clog2(DEPTH);
  typedef logic [PW-1:0] ptr_t;

  logic  e_done   [DEPTH];
  logic  e_misp   [DEPTH];
  logic  e_hasdst [DEPTH];
  logic  e_store  [DEPTH];
  logic  e_branch [DEPTH];
  reg_t  e_dst    [DEPTH];
  word_t e_val    [DEPTH];
  word_t e_addr   [DEPTH];
  word_t e_pc     [DEPTH];

  ptr_t           hp, tp;
  logic [PW:0]    count;
  logic [PW:0]    ncommit, nalloc;

  assign tail     = tag_t'(tp);
  assign head     = tag_t'(hp);

  // oldest mispredicted branch whose result has finished
  logic kv_nxt;
  ptr_t kt_nxt;
  always_comb begin
    kv_nxt = kill_valid;
    kt_nxt = ptr_t'(kill_tag);
    for (int r = 0; r < RW; r++)
      if (cmp_tok[r].valid && !cmp_tok[r].pass_rob && cmp_tok[r].misp &&
          (!kv_nxt || ptr_t'(ptr_t'(cmp_tok[r].tag) - hp) < ptr_t'(kt_nxt - hp))) begin
        kv_nxt = 1'b1;
        kt_nxt = ptr_t'(cmp_tok[r].tag);
      end
    if (flush) kv_nxt = 1'b0;
  end
  assign free_cnt = (TAG_W+1)'(DEPTH - count);

  for (genvar i = 0; i < NRD; i++) begin : g_rd
    assign rd_done[i] = e_done[ptr_t'(rd_tag[i])];
    assign rd_val[i]  = e_val[ptr_t'(rd_tag[i])];
  end

  // commit selection
  always_comb begin
    logic stop;
    stop        = 1'b0;
    ncommit     = '0;
    cst_valid   = 1'b0;
    cst_addr    = '0;
    cst_data    = '0;
    flush       = 1'b0;
    redirect_pc = '0;
    for (int k = 0; k < CW; k++) begin
      ptr_t e;
      e = hp + ptr_t'(k);
      cm_valid[k]   = 1'b0;
      cm_tag[k]     = tag_t'(e);
      cm_has_dst[k] = e_hasdst[e];
      cm_dst[k]     = e_dst[e];
      cm_val[k]     = e_val[e];
      cm_pc[k]      = e_pc[e];
      if (!stop && (PW+1)'(k) < count && e_done[e]) begin
        if (e_store[e]) begin
          cst_valid = 1'b1;
          cst_addr  = e_addr[e];
          cst_data  = e_val[e];
          stop      = 1'b1;
          if (cst_ready) begin
            cm_valid[k] = 1'b1;
            ncommit     = ncommit + 1;
          end
        end else begin
          cm_valid[k] = 1'b1;
          ncommit     = ncommit + 1;
          if (e_branch[e] && e_misp[e]) begin
            flush       = 1'b1;
            redirect_pc = e_addr[e];
            stop        = 1'b1;
          end
        end
      end else begin
        stop = 1'b1;
      end
    end
  end

  assign st_committed_nxt = st_committed + stseq_t'(cst_valid && cst_ready);

  always_comb begin
    nalloc = '0;
    if (!flush)
      for (int k = 0; k < IW; k++) if (al_valid[k]) nalloc = nalloc + 1;
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < IW; k++) begin
      if (!flush && al_valid[k]) begin
        e_hasdst[tp + ptr_t'(k)] <= al_has_dst[k];
        e_dst[tp + ptr_t'(k)]    <= al_dst[k];
        e_store[tp + ptr_t'(k)]  <= al_store[k];
        e_branch[tp + ptr_t'(k)] <= al_branch[k];
        e_pc[tp + ptr_t'(k)]     <= al_pc[k];
      end
    end
    for (int r = 0; r < RW; r++) begin
      if (cmp_tok[r].valid && !cmp_tok[r].pass_rob) begin
        e_val[ptr_t'(cmp_tok[r].tag)]  <= cmp_tok[r].val;
        e_addr[ptr_t'(cmp_tok[r].tag)] <= cmp_tok[r].addr;
        e_misp[ptr_t'(cmp_tok[r].tag)] <= cmp_tok[r].misp;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hp           <= '0;
      tp           <= '0;
      count        <= '0;
      st_committed <= '0;
      kill_valid   <= 1'b0;
      kill_tag     <= '0;
      for (int i = 0; i < DEPTH; i++) e_done[i] <= 1'b0;
    end else begin
      st_committed <= st_committed_nxt;
      kill_valid   <= kv_nxt;
      kill_tag     <= tag_t'(kt_nxt);
      hp <= hp + ptr_t'(ncommit);
      for (int r = 0; r < RW; r++)
        if (cmp_tok[r].valid && !cmp_tok[r].pass_rob) e_done[ptr_t'(cmp_tok[r].tag)] <= 1'b1;
      if (flush) begin
        tp    <= hp + ptr_t'(ncommit);
        count <= '0;
      end else begin
        for (int k = 0; k < IW; k++)
          if (al_valid[k]) e_done[tp + ptr_t'(k)] <= 1'b0;
        tp    <= tp + ptr_t'(nalloc);
        count <= count + nalloc - ncommit;
      end
    end
  end

  // a result may only arrive for an entry that is in the buffer
  for (genvar r = 0; r < RW; r++) begin : g_chk
    a_cmp_in_window: assert property (@(posedge clk) disable iff (!rst_n)
      cmp_tok[r].valid && !cmp_tok[r].pass_rob |-> ({1'b0, ptr_t'(ptr_t'(cmp_tok[r].tag) - hp)} < count));
  end

endmodule

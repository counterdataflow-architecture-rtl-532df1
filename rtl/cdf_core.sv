// cdf_core: a CounterDataFlow (CDF) processor core.
//
// NSTAGES identical pipe stages form a ring. Instruction tokens, IW per stage,
// flow up from the decode unit; result tokens, RW per stage, flow down
// towards the ROB. Tokens compare tags as they pass and instructions copy the
// operands they need, so dependencies are resolved inside the pipe without any
// global wakeup or search. Execution units ("sidepanels") hang off the side
// of the ring: an instruction that holds all its operands when it passes a
// sidepanel's launch stage leaves the pipe into it, and the result re-enters
// the result pipe at the sidepanel's recovery stage. An instruction that
// reaches the top without launching is wrapped round through the decode unit
// into the bottom stage again, so the instruction pipe never stalls. Result
// tokens end their journey at the ROB, which commits in order into the
// register file; results recovered in the lower half of the ring pass the ROB
// once and go round again first, so every result travels at least half the
// ring and meets the instructions waiting for it.
//
// Sidepanels (index: kind, launch stage -> recovery stage, for NSTAGES = 9):
//   0..3 single-cycle integer  0->1, 1->2, 2->3, 5->6
//   4    branch                4->5
//   5    memory (L1 + L2)      2->5
//   6    multi-cycle integer   6->8
//   7    fast floating point   6->8  (outside this core: fpf_* ports)
//   8    slow floating point   0->5  (outside this core: fps_* ports)
// The kinds, their number and their order along the pipe follow the CDF
// sidepanel layout; the exact stage numbers are this design's reading of it.
// The floating-point units are not part of this RTL: their launch and
// recovery handshakes are brought out as ports.
//
// Interface: fetch delivers up to IW decoded micro-ops per cycle (f_valid,
// f_uop) and sees which were taken (f_accept, always a prefix). As soon as a
// mispredicted branch's result reaches the ROB, younger instructions are
// dropped as they wrap and no new ones are accepted; when the branch commits
// the core raises flush with redirect_pc for one cycle and fetch must restart
// there. The commit ports report
// every retiring instruction in program order. The st_* outputs are
// per-cycle event counts for performance counters outside the core.
// Default sizes are the CDF3 configuration (2 instruction pipes, 4 result
// pipes, 64 ROB entries) with a 9-stage ring, a 16 KB 4-way L1 data cache and
// a 10-cycle pipelined L2.
// Lint note: rst_n also appears in the 'disable iff' of the sub-blocks'
// assertions, which some tools report as a reset used both synchronously and
// asynchronously; no flip-flop uses it synchronously.
module cdf_core
  import cdf_pkg::*;
#(
  parameter int unsigned IW        = 2,
  parameter int unsigned RW        = 4,
  parameter int unsigned ROB_DEPTH = 64,
  parameter int unsigned NSTAGES   = 9,
  parameter int unsigned L1_BYTES  = 16384,
  parameter int unsigned L2_LAT    = 10,
  parameter int unsigned L2_WORDS  = 16384,
  parameter int unsigned MUL_LAT   = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  // fetch
  input  logic   f_valid  [IW],
  input  uop_t   f_uop    [IW],
  output logic   f_accept [IW],
  output logic   flush,
  output word_t  redirect_pc,
  // commit
  output logic   cm_valid [IW],
  output word_t  cm_pc    [IW],
  output logic   cm_has_dst [IW],
  output reg_t   cm_dst   [IW],
  output word_t  cm_val   [IW],
  // statistics: micro-ops taken from fetch, tokens wrapped round, L1 misses
  output logic [$clog2(IW+1)-1:0] st_issued,
  output logic [$clog2(IW+1)-1:0] st_wrapped,
  output logic   st_l1_miss,
  // fast floating-point sidepanel
  output logic   fpf_valid,
  input  logic   fpf_ready,
  output itok_t  fpf_tok,
  input  logic   fpf_res_valid,
  output logic   fpf_res_ready,
  input  dtok_t  fpf_res,
  // slow floating-point sidepanel
  output logic   fps_valid,
  input  logic   fps_ready,
  output itok_t  fps_tok,
  input  logic   fps_res_valid,
  output logic   fps_res_ready,
  input  dtok_t  fps_res
);

  localparam int unsigned NSP = 9;
  localparam int unsigned L2_AW = $clog2(L2_WORDS);

  typedef int unsigned pos_t [NSP];
  localparam pos_t LAUNCH_AT = '{0, 1, 2, 5, 4, 2, 6, 6, 0};
  localparam pos_t REC_AT    = '{1, 2, 3, 6, 5, 5, 8, 8, 5};

  function automatic int unsigned at(int unsigned s);
    return (s < NSTAGES) ? s : NSTAGES - 1;
  endfunction

  function automatic ocmask_t sp_mask(int unsigned p);
    ocmask_t m = '0;
    case (p)
      0, 1, 2, 3: m[OC_ALU] = 1'b1;
      4:          m[OC_BRANCH] = 1'b1;
      5:          begin m[OC_LOAD] = 1'b1; m[OC_STORE] = 1'b1; end
      6:          m[OC_MULDIV] = 1'b1;
      7:          m[OC_FPFAST] = 1'b1;
      default:    m[OC_FPSLOW] = 1'b1;
    endcase
    return m;
  endfunction

  // ---------------- ring ----------------
  itok_t s_iin  [NSTAGES][IW];
  itok_t s_iout [NSTAGES][IW];
  dtok_t s_din  [NSTAGES][RW];
  dtok_t s_dq   [NSTAGES][RW];
  logic  s_lpv  [NSTAGES][NSP];
  itok_t s_lpt  [NSTAGES][NSP];
  logic  s_rrdy [NSTAGES][NSP];

  // sidepanel handshakes
  logic  sp_in_valid  [NSP];
  logic  sp_in_ready  [NSP];
  itok_t sp_in_tok    [NSP];
  logic  sp_out_valid [NSP];
  logic  sp_out_ready [NSP];
  dtok_t sp_out_tok   [NSP];

  stseq_t st_committed, st_committed_nxt;
  itok_t  s0_tok [IW];
  dtok_t  fin_tok [RW];

  for (genvar s = 0; s < NSTAGES; s++) begin : g_stage
    ocmask_t lmask [NSP];
    logic    lrdy  [NSP];
    logic    rval  [NSP];
    for (genvar p = 0; p < NSP; p++) begin : g_p
      assign lmask[p] = (at(LAUNCH_AT[p]) == s) ? sp_mask(p) : '0;
      assign lrdy[p]  = (at(LAUNCH_AT[p]) == s) && sp_in_ready[p];
      assign rval[p]  = (at(REC_AT[p]) == s) && sp_out_valid[p];
    end

    if (s == 0) begin : g_bot
      assign s_iin[0] = s0_tok;
    end else begin : g_mid
      assign s_iin[s] = s_iout[s-1];
    end
    if (s == NSTAGES - 1) begin : g_top
      // result tokens that must pass the ROB once more wrap to the top stage
      for (genvar r = 0; r < RW; r++) begin : g_w
        always_comb begin
          s_din[s][r] = DTOK_EMPTY;
          if (s_dq[0][r].valid && s_dq[0][r].pass_rob) begin
            s_din[s][r]          = s_dq[0][r];
            s_din[s][r].pass_rob = 1'b0;
          end
        end
      end
    end else begin : g_down
      assign s_din[s] = s_dq[s+1];
    end

    cdf_stage #(.IW(IW), .RW(RW), .NSP(NSP), .STAGE(s), .NSTAGES(NSTAGES)) u_stage (
      .clk, .rst_n, .flush,
      .i_in(s_iin[s]), .i_out(s_iout[s]),
      .d_in(s_din[s]), .d_q(s_dq[s]),
      .st_committed,
      .lp_mask(lmask), .lp_ready(lrdy), .lp_valid(s_lpv[s]), .lp_tok(s_lpt[s]),
      .rec_valid(rval), .rec_tok(sp_out_tok), .rec_ready(s_rrdy[s])
    );
  end

  for (genvar p = 0; p < NSP; p++) begin : g_sp_hs
    assign sp_in_valid[p]  = s_lpv[at(LAUNCH_AT[p])][p];
    assign sp_in_tok[p]    = s_lpt[at(LAUNCH_AT[p])][p];
    assign sp_out_ready[p] = s_rrdy[at(REC_AT[p])][p];
  end

  // tokens finishing at the ROB
  for (genvar r = 0; r < RW; r++) begin : g_fin
    always_comb begin
      fin_tok[r] = s_dq[0][r];
      if (s_dq[0][r].pass_rob) fin_tok[r].valid = 1'b0;
    end
  end

  // ---------------- sidepanels ----------------
  for (genvar p = 0; p < 4; p++) begin : g_alu
    cdf_alu_unit u_alu (
      .clk, .rst_n, .flush,
      .in_valid(sp_in_valid[p]), .in_ready(sp_in_ready[p]), .in_tok(sp_in_tok[p]),
      .out_valid(sp_out_valid[p]), .out_ready(sp_out_ready[p]), .out_tok(sp_out_tok[p])
    );
  end

  cdf_branch_unit u_br (
    .clk, .rst_n, .flush,
    .in_valid(sp_in_valid[4]), .in_ready(sp_in_ready[4]), .in_tok(sp_in_tok[4]),
    .out_valid(sp_out_valid[4]), .out_ready(sp_out_ready[4]), .out_tok(sp_out_tok[4])
  );

  logic  cst_valid, cst_ready;
  word_t cst_addr, cst_data;
  logic  dc_valid, dc_ready, dc_we, dc_resp_valid, dc_resp_hit;
  word_t dc_addr, dc_wdata, dc_resp_rdata;
  logic  l2_valid, l2_we, l2_resp_valid;
  logic [L2_AW-1:0] l2_addr;
  word_t l2_wdata, l2_resp_rdata;

  cdf_mem_unit u_mem (
    .clk, .rst_n, .flush,
    .in_valid(sp_in_valid[5]), .in_ready(sp_in_ready[5]), .in_tok(sp_in_tok[5]),
    .out_valid(sp_out_valid[5]), .out_ready(sp_out_ready[5]), .out_tok(sp_out_tok[5]),
    .cst_valid, .cst_ready, .cst_addr, .cst_data,
    .dc_valid, .dc_ready, .dc_we, .dc_addr, .dc_wdata,
    .dc_resp_valid, .dc_resp_rdata
  );

  cdf_dcache #(.SIZE_BYTES(L1_BYTES), .L2_AW(L2_AW)) u_dcache (
    .clk, .rst_n,
    .req_valid(dc_valid), .req_ready(dc_ready), .req_we(dc_we),
    .req_addr(dc_addr), .req_wdata(dc_wdata),
    .resp_valid(dc_resp_valid), .resp_rdata(dc_resp_rdata), .resp_hit(dc_resp_hit),
    .l2_valid, .l2_we, .l2_addr, .l2_wdata,
    .l2_resp_valid, .l2_resp_rdata
  );

  cdf_l2_mem #(.LAT(L2_LAT), .WORDS(L2_WORDS)) u_l2 (
    .clk, .rst_n,
    .req_valid(l2_valid), .req_we(l2_we), .req_addr(l2_addr), .req_wdata(l2_wdata),
    .resp_valid(l2_resp_valid), .resp_rdata(l2_resp_rdata)
  );

  cdf_muldiv_unit #(.MUL_LAT(MUL_LAT)) u_muldiv (
    .clk, .rst_n, .flush,
    .in_valid(sp_in_valid[6]), .in_ready(sp_in_ready[6]), .in_tok(sp_in_tok[6]),
    .out_valid(sp_out_valid[6]), .out_ready(sp_out_ready[6]), .out_tok(sp_out_tok[6])
  );

  // floating-point sidepanels outside the core
  assign fpf_valid       = sp_in_valid[7];
  assign fpf_tok         = sp_in_tok[7];
  assign sp_in_ready[7]  = fpf_ready;
  assign sp_out_valid[7] = fpf_res_valid;
  assign sp_out_tok[7]   = fpf_res;
  assign fpf_res_ready   = sp_out_ready[7];

  assign fps_valid       = sp_in_valid[8];
  assign fps_tok         = sp_in_tok[8];
  assign sp_in_ready[8]  = fps_ready;
  assign sp_out_valid[8] = fps_res_valid;
  assign sp_out_tok[8]   = fps_res;
  assign fps_res_ready   = sp_out_ready[8];

  // ---------------- ROB, register file, tag table, decode ----------------
  tag_t  rob_tail;
  logic [TAG_W:0] rob_free;
  logic  al_valid [IW], al_has_dst [IW], al_store [IW], al_branch [IW];
  reg_t  al_dst [IW];
  word_t al_pc [IW];
  tag_t  rob_rd_tag [2*IW];
  logic  rob_rd_done [2*IW];
  word_t rob_rd_val [2*IW];
  tag_t  cm_tag [IW];

  tag_t  rob_head, kill_tag;
  logic  kill_valid;
  cdf_rob #(.DEPTH(ROB_DEPTH), .IW(IW), .RW(RW), .CW(IW), .NRD(2*IW)) u_rob (
    .clk, .rst_n,
    .al_valid, .al_has_dst, .al_dst, .al_store, .al_branch, .al_pc,
    .tail(rob_tail), .free_cnt(rob_free),
    .cmp_tok(fin_tok),
    .rd_tag(rob_rd_tag), .rd_done(rob_rd_done), .rd_val(rob_rd_val),
    .cm_valid, .cm_tag, .cm_has_dst, .cm_dst, .cm_val, .cm_pc,
    .cst_valid, .cst_ready, .cst_addr, .cst_data,
    .st_committed, .st_committed_nxt,
    .flush, .redirect_pc,
    .head(rob_head), .kill_valid, .kill_tag
  );

  logic  rf_we [IW];
  reg_t  rf_raddr [2*IW];
  word_t rf_rdata [2*IW];
  for (genvar k = 0; k < IW; k++) begin : g_rfw
    assign rf_we[k] = cm_valid[k] && cm_has_dst[k];
  end

  cdf_regfile #(.NR(2*IW), .NW(IW)) u_rf (
    .clk, .rst_n,
    .we(rf_we), .waddr(cm_dst), .wdata(cm_val),
    .raddr(rf_raddr), .rdata(rf_rdata)
  );

  reg_t tt_reg [2*IW];
  logic tt_busy [2*IW];
  tag_t tt_tag [2*IW];
  logic tt_set_en [IW];
  reg_t tt_set_reg [IW];
  tag_t tt_set_tag [IW];

  cdf_tagtable #(.NR(2*IW), .NS(IW), .NC(IW)) u_tt (
    .clk, .rst_n, .flush,
    .set_en(tt_set_en), .set_reg(tt_set_reg), .set_tag(tt_set_tag),
    .clr_en(rf_we), .clr_reg(cm_dst), .clr_tag(cm_tag),
    .rd_reg(tt_reg), .rd_busy(tt_busy), .rd_tag(tt_tag)
  );

  logic [$clog2(IW+1)-1:0] n_issued, n_wrapped;
  assign st_issued  = n_issued;
  assign st_wrapped = n_wrapped;
  assign st_l1_miss = dc_resp_valid && !dc_resp_hit;

  cdf_decode #(.IW(IW), .RW(RW), .DEPTH(ROB_DEPTH)) u_dec (
    .clk, .rst_n, .flush, .st_committed_nxt,
    .f_valid, .f_uop, .f_accept,
    .w_tok(s_iout[NSTAGES-1]), .fin_tok,
    .rob_tail, .rob_head, .kill_valid, .kill_tag, .rob_free,
    .al_valid, .al_has_dst, .al_dst, .al_store, .al_branch, .al_pc,
    .rob_rd_tag, .rob_rd_done, .rob_rd_val,
    .rf_raddr, .rf_rdata,
    .tt_reg, .tt_busy, .tt_tag,
    .tt_set_en, .tt_set_reg, .tt_set_tag,
    .s0_tok, .n_issued, .n_wrapped
  );

endmodule

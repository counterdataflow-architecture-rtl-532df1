// tb_cdf_decode: checks the issue point against a reference model.
// The register file, the "last modified by" table and the ROB around the
// unit are reference arrays in the testbench. Every cycle random wrapped
// instructions, new micro-ops, finishing result tokens, ROB free space and
// flushes are applied, and the model works out how many micro-ops must be
// accepted (free slots after wrapped ones, ROB room, a prefix of the valid
// ones, none on a flush), which slot each must take, its ROB tag, each
// consumer (register file, finished ROB entry, token finishing now, a
// producer issued in the same group, or waiting with the producer's tag),
// the table updates, the ROB allocation and each instruction's count of older
// stores.
module tb_cdf_decode;
  import cdf_pkg::*;
  localparam int unsigned IW = 2, RW = 4, DEPTH = 64;
  logic clk = 0, rst_n = 0, flush = 0;
  always #5 clk = ~clk;
  stseq_t st_committed_nxt = 0;
  logic f_valid [IW], f_accept [IW];
  uop_t f_uop [IW];
  itok_t w_tok [IW];
  dtok_t fin_tok [RW];
  tag_t rob_tail;
  logic [TAG_W:0] rob_free;
  logic al_valid [IW], al_has_dst [IW], al_store [IW], al_branch [IW];
  reg_t al_dst [IW];
  word_t al_pc [IW];
  tag_t rob_rd_tag [2*IW];
  logic rob_rd_done [2*IW];
  word_t rob_rd_val [2*IW];
  reg_t rf_raddr [2*IW];
  word_t rf_rdata [2*IW];
  reg_t tt_reg [2*IW];
  logic tt_busy [2*IW];
  tag_t tt_tag [2*IW];
  logic tt_set_en [IW];
  reg_t tt_set_reg [IW];
  tag_t tt_set_tag [IW];
  itok_t s0_tok [IW];
  logic [$clog2(IW+1)-1:0] n_issued, n_wrapped;

  tag_t rob_head = '0, kill_tag = '0;
  logic kill_valid = 1'b0;
  cdf_decode #(.IW(IW), .RW(RW), .DEPTH(DEPTH)) dut (.*);

  // surroundings
  word_t m_rf [NREGS];
  logic  m_busy [NREGS];
  tag_t  m_tag [NREGS];
  logic  m_done [DEPTH];
  word_t m_val [DEPTH];
  for (genvar i = 0; i < 2*IW; i++) begin : g_env
    assign rf_rdata[i]    = (rf_raddr[i] == 0) ? '0 : m_rf[rf_raddr[i]];
    assign tt_busy[i]     = m_busy[tt_reg[i]];
    assign tt_tag[i]      = m_tag[tt_reg[i]];
    assign rob_rd_done[i] = m_done[rob_rd_tag[i] % DEPTH];
    assign rob_rd_val[i]  = m_val[rob_rd_tag[i] % DEPTH];
  end

  int unsigned checks = 0, failures = 0, nacc_tot = 0, nfin = 0, nrob = 0, ngrp = 0, nwait = 0;
  stseq_t m_st = 0;

  function automatic logic need2(uop_t u);
    return (u.oc == OC_STORE) || (u.oc == OC_BRANCH) || (!u.use_imm && u.oc != OC_LOAD);
  endfunction

  initial begin
    for (int i = 0; i < NREGS; i++) begin m_rf[i] = $urandom; m_busy[i] = 0; m_tag[i] = 0; end
    for (int i = 0; i < DEPTH; i++) begin m_done[i] = 0; m_val[i] = 0; end
    for (int k = 0; k < IW; k++) begin f_valid[k] = 0; f_uop[k] = '0; w_tok[k] = '0; end
    for (int r = 0; r < RW; r++) fin_tok[r] = '0;
    rob_tail = 0; rob_free = DEPTH;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int unsigned nfree, nf, nacc, k;
      itok_t e_tok [IW];
      @(negedge clk);
      for (int i = 0; i < NREGS; i++) begin
        m_busy[i] = $urandom % 2; m_tag[i] = tag_t'($urandom % DEPTH);
      end
      for (int i = 0; i < DEPTH; i++) begin m_done[i] = $urandom % 2; m_val[i] = $urandom; end
      for (int s = 0; s < IW; s++) begin
        w_tok[s] = '0;
        if ($urandom % 3 == 0) begin w_tok[s].valid = 1; w_tok[s].tag = tag_t'($urandom); w_tok[s].imm = $urandom; end
      end
      for (int k2 = 0; k2 < IW; k2++) begin
        f_valid[k2] = $urandom % 4 != 0;
        f_uop[k2] = '0;
        f_uop[k2].oc = opclass_e'($urandom % 7); f_uop[k2].fn = 4'($urandom);
        f_uop[k2].has_dst = $urandom % 2; f_uop[k2].dst = reg_t'($urandom % 8);
        f_uop[k2].src1 = reg_t'($urandom % 8); f_uop[k2].src2 = reg_t'($urandom % 8);
        f_uop[k2].use_imm = $urandom % 2; f_uop[k2].imm = $urandom; f_uop[k2].pc = $urandom;
        f_uop[k2].pred_taken = $urandom % 2;
      end
      for (int r = 0; r < RW; r++) begin
        fin_tok[r] = '0;
        if ($urandom % 3 == 0) begin
          fin_tok[r].valid = 1; fin_tok[r].tag = tag_t'($urandom % DEPTH); fin_tok[r].val = $urandom;
          fin_tok[r].pass_rob = ($urandom % 4 == 0);
        end
      end
      rob_tail = tag_t'($urandom % DEPTH);
      rob_free = (TAG_W+1)'($urandom % 4);
      flush = ($urandom % 20 == 0);
      st_committed_nxt = stseq_t'($urandom);
      #1;
      // expected acceptance
      nfree = 0;
      for (int s = 0; s < IW; s++) if (!w_tok[s].valid) nfree++;
      nf = 0;
      for (int k2 = 0; k2 < IW; k2++) if (f_valid[k2] && nf == k2) nf++;
      nacc = nfree;
      if (nf < nacc) nacc = nf;
      if (rob_free < nacc) nacc = rob_free;
      if (flush) nacc = 0;
      nacc_tot += nacc;
      // expected new tokens
      for (int k2 = 0; k2 < IW; k2++) begin
        uop_t u;
        cons_t c [2];
        reg_t sr [2];
        stseq_t sq;
        u = f_uop[k2];
        sr[0] = u.src1; sr[1] = u.src2;
        sq = m_st;
        for (int j = 0; j < k2; j++) if (j < nacc && f_uop[j].oc == OC_STORE) sq++;
        for (int o = 0; o < 2; o++) begin
          int grp;
          c[o] = '0; c[o].r = sr[o]; c[o].tag = m_tag[sr[o]];
          grp = -1;
          for (int j = 0; j < k2; j++) if (f_uop[j].has_dst && f_uop[j].dst == sr[o]) grp = j;
          if (sr[o] == 0 || (o == 1 && !need2(u))) c[o].rdy = 1;
          else if (grp >= 0) begin c[o].tag = tag_t'((rob_tail + grp) % DEPTH); ngrp++; end
          else if (!m_busy[sr[o]]) begin c[o].rdy = 1; c[o].val = m_rf[sr[o]]; end
          else begin
            for (int r = 0; r < RW; r++)
              if (!c[o].rdy && fin_tok[r].valid && !fin_tok[r].pass_rob && fin_tok[r].tag == c[o].tag) begin
                c[o].rdy = 1; c[o].val = fin_tok[r].val; nfin++;
              end
            if (!c[o].rdy && m_done[c[o].tag % DEPTH]) begin c[o].rdy = 1; c[o].val = m_val[c[o].tag % DEPTH]; nrob++; end
            if (!c[o].rdy) nwait++;
          end
        end
        e_tok[k2] = '0;
        e_tok[k2].valid = 1; e_tok[k2].tag = tag_t'((rob_tail + k2) % DEPTH); e_tok[k2].oc = u.oc;
        e_tok[k2].fn = u.fn; e_tok[k2].use_imm = u.use_imm; e_tok[k2].imm = u.imm; e_tok[k2].pc = u.pc;
        e_tok[k2].pred_taken = u.pred_taken; e_tok[k2].st_seq = sq; e_tok[k2].c1 = c[0]; e_tok[k2].c2 = c[1];
        checks++;
        if (f_accept[k2] != (k2 < nacc) || al_valid[k2] != (k2 < nacc) ||
            tt_set_en[k2] != ((k2 < nacc) && u.has_dst && u.dst != 0) ||
            (tt_set_en[k2] && (tt_set_reg[k2] != u.dst || tt_set_tag[k2] != e_tok[k2].tag)) ||
            (al_valid[k2] && (al_store[k2] != (u.oc == OC_STORE) || al_branch[k2] != (u.oc == OC_BRANCH) ||
             al_pc[k2] != u.pc || al_has_dst[k2] != (u.has_dst && u.dst != 0)))) begin
          failures++; $display("FAIL: accept/alloc slot %0d at %0d", k2, t);
        end
      end
      // expected slot contents
      k = 0;
      for (int s = 0; s < IW; s++) begin
        itok_t e;
        e = '0;
        if (w_tok[s].valid) e = w_tok[s];
        else if (k < nacc) begin e = e_tok[k]; k++; end
        checks++;
        if (s0_tok[s] != e) begin
          failures++; $display("FAIL: slot %0d at %0d tag %0d/%0d seq %0d/%0d c1 %0d %0d/%0d %0d c2 %0d %0d/%0d %0d v %0d/%0d", s, t, s0_tok[s].tag, e.tag, s0_tok[s].st_seq, e.st_seq, s0_tok[s].c1.rdy, s0_tok[s].c1.tag, e.c1.rdy, e.c1.tag, s0_tok[s].c2.rdy, s0_tok[s].c2.tag, e.c2.rdy, e.c2.tag, s0_tok[s].valid, e.valid);
        end
      end
      @(posedge clk);
      if (flush) m_st = st_committed_nxt;
      else for (int k2 = 0; k2 < IW; k2++) if (k2 < nacc && f_uop[k2].oc == OC_STORE) m_st++;
    end
    checks++;
    if (nacc_tot < 500 || nfin == 0 || nrob == 0 || ngrp == 0 || nwait == 0) begin
      failures++; $display("FAIL: activity %0d %0d %0d %0d %0d", nacc_tot, nfin, nrob, ngrp, nwait);
    end
    $display("accepted %0d, from finishing tokens %0d, from ROB %0d, same group %0d, waiting %0d",
             nacc_tot, nfin, nrob, ngrp, nwait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

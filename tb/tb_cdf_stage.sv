// tb_cdf_stage: checks one counterflow pipe stage against a reference model.
// Random instruction tokens (with waiting or present consumers) enter from
// below and random result tokens from above, three sidepanel ports launch and
// recover at this stage. Every cycle the model works out, from the stage's
// registered contents and its inputs, which consumers must capture which
// value (from the tokens held in the stage or entering it), which instruction
// each launch port must take (lowest slot, all operands present, class
// accepted, loads only when all older stores have committed), which results
// are taken into free result slots (marked pass_rob in the lower half of the
// ring) and what leaves the stage. A directed case checks that a token and an
// instruction that cross between two stages meet; flush is also checked.
module tb_cdf_stage;
  import cdf_pkg::*;
  localparam int unsigned IW = 2, RW = 4, NSP = 3, STAGE = 1, NSTAGES = 9;
  logic clk = 0, rst_n = 0, flush = 0;
  always #5 clk = ~clk;
  itok_t i_in [IW], i_out [IW];
  dtok_t d_in [RW], d_q [RW];
  stseq_t st_committed;
  ocmask_t lp_mask [NSP];
  logic lp_ready [NSP], lp_valid [NSP];
  itok_t lp_tok [NSP];
  logic rec_valid [NSP], rec_ready [NSP];
  dtok_t rec_tok [NSP];

  cdf_stage #(.IW(IW), .RW(RW), .NSP(NSP), .STAGE(STAGE), .NSTAGES(NSTAGES)) dut (.*);

  itok_t m_i [IW];   // model of the registered contents
  dtok_t m_d [RW];
  int unsigned checks = 0, failures = 0, nlaunch = 0, nmatch = 0, nrec = 0, nblock = 0, nldwait = 0;

  function automatic itok_t rand_itok();
    itok_t t;
    t = '0;
    t.valid = ($urandom % 4 != 0);
    t.tag = tag_t'($urandom % 16);
    t.oc = opclass_e'($urandom % 4);
    t.st_seq = stseq_t'($urandom % 2);
    t.c1.rdy = $urandom % 2; t.c1.tag = tag_t'($urandom % 8); t.c1.val = $urandom;
    t.c2.rdy = $urandom % 2; t.c2.tag = tag_t'($urandom % 8); t.c2.val = $urandom;
    return t;
  endfunction

  function automatic dtok_t rand_dtok(int unsigned pv);
    dtok_t d;
    d = '0;
    d.valid = ($urandom % 100 < pv);
    d.tag = tag_t'($urandom % 8);
    d.val = $urandom;
    d.pass_rob = $urandom % 2;
    return d;
  endfunction

  function automatic cons_t mmatch(cons_t c, dtok_t a [RW], dtok_t b [RW]);
    cons_t m = c;
    for (int r = 0; r < RW; r++) begin
      if (!m.rdy && a[r].valid && a[r].tag == m.tag) begin m.rdy = 1; m.val = a[r].val; end
      if (!m.rdy && b[r].valid && b[r].tag == m.tag) begin m.rdy = 1; m.val = b[r].val; end
    end
    return m;
  endfunction

  initial begin
    lp_mask[0] = '0; lp_mask[0][OC_ALU] = 1;
    lp_mask[1] = '0; lp_mask[1][OC_ALU] = 1;
    lp_mask[2] = '0; lp_mask[2][OC_LOAD] = 1; lp_mask[2][OC_STORE] = 1;
    for (int s = 0; s < IW; s++) begin i_in[s] = '0; m_i[s] = '0; end
    for (int r = 0; r < RW; r++) begin d_in[r] = '0; m_d[r] = '0; end
    for (int p = 0; p < NSP; p++) begin lp_ready[p] = 0; rec_valid[p] = 0; rec_tok[p] = '0; end
    st_committed = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      dtok_t e_d [RW];
      itok_t e_i [IW];
      logic used [RW];
      logic taken [IW];
      @(negedge clk);
      for (int s = 0; s < IW; s++) i_in[s] = rand_itok();
      for (int r = 0; r < RW; r++) d_in[r] = rand_dtok(40 + (t / 1000) * 25);
      for (int p = 0; p < NSP; p++) begin
        lp_ready[p] = $urandom % 4 != 0;
        rec_valid[p] = $urandom % 2;
        rec_tok[p] = rand_dtok(100);
      end
      st_committed = stseq_t'($urandom % 2);
      #1;
      // model: incoming tokens and recovered results
      for (int r = 0; r < RW; r++) begin e_d[r] = d_in[r]; used[r] = d_in[r].valid; end
      for (int p = 0; p < NSP; p++) begin
        logic rdy;
        rdy = 0;
        for (int r = 0; r < RW; r++) if (!rdy && !used[r]) begin
          rdy = 1;
          if (rec_valid[p]) begin
            used[r] = 1; e_d[r] = rec_tok[p]; e_d[r].valid = 1; e_d[r].pass_rob = (STAGE * 2 < NSTAGES);
            nrec++;
          end
        end
        checks++;
        if (rec_ready[p] != rdy) begin failures++; $display("FAIL: rec_ready %0d", p); end
        if (rec_valid[p] && !rdy) nblock++;
      end
      // model: capture and launch
      for (int s = 0; s < IW; s++) begin
        e_i[s] = m_i[s];
        taken[s] = 0;
        if (m_i[s].valid) begin
          e_i[s].c1 = mmatch(m_i[s].c1, m_d, e_d);
          e_i[s].c2 = mmatch(m_i[s].c2, m_d, e_d);
          if (e_i[s].c1.rdy != m_i[s].c1.rdy || e_i[s].c2.rdy != m_i[s].c2.rdy) nmatch++;
        end
      end
      for (int p = 0; p < NSP; p++) begin
        logic v; itok_t tk;
        v = 0; tk = '0;
        for (int s = 0; s < IW; s++)
          if (!v && !taken[s] && lp_ready[p] && e_i[s].valid && lp_mask[p][e_i[s].oc] &&
              e_i[s].c1.rdy && e_i[s].c2.rdy) begin
            if (e_i[s].oc == OC_LOAD && e_i[s].st_seq != st_committed) nldwait++;
            else begin v = 1; tk = e_i[s]; taken[s] = 1; end
          end
        checks++;
        if (lp_valid[p] != v || (v && lp_tok[p] != tk)) begin
          failures++; $display("FAIL: launch port %0d valid %0d exp %0d", p, lp_valid[p], v);
        end
        if (v) nlaunch++;
      end
      for (int s = 0; s < IW; s++) begin
        checks++;
        if (i_out[s] != (taken[s] ? ITOK_EMPTY : e_i[s])) begin
          failures++; $display("FAIL: i_out slot %0d at %0d", s, t);
        end
      end
      for (int r = 0; r < RW; r++) begin
        checks++;
        if (d_q[r] != m_d[r]) begin failures++; $display("FAIL: d_q slot %0d", r); end
      end
      @(posedge clk);
      for (int s = 0; s < IW; s++) m_i[s] = i_in[s];
      for (int r = 0; r < RW; r++) m_d[r] = e_d[r];
    end
    // crossing: a result entering from above meets an instruction leaving upwards
    @(negedge clk);
    for (int p = 0; p < NSP; p++) begin lp_ready[p] = 0; rec_valid[p] = 0; end
    for (int r = 0; r < RW; r++) d_in[r] = '0;
    i_in[0] = '0; i_in[0].valid = 1; i_in[0].oc = OC_ALU; i_in[0].c1.tag = 7; i_in[0].c2.rdy = 1;
    i_in[1] = '0;
    @(negedge clk);
    i_in[0] = '0;
    d_in[2] = '0; d_in[2].valid = 1; d_in[2].tag = 7; d_in[2].val = 32'hCAFE;
    #1;
    checks++;
    if (!i_out[0].c1.rdy || i_out[0].c1.val != 32'hCAFE) begin failures++; $display("FAIL: crossing"); end
    // flush empties the stage
    flush = 1;
    @(negedge clk);
    flush = 0;
    #1;
    for (int r = 0; r < RW; r++) begin
      checks++;
      if (d_q[r].valid) begin failures++; $display("FAIL: flush"); end
    end
    checks++;
    if (nlaunch < 100 || nmatch < 100 || nrec < 100 || nblock == 0 || nldwait == 0) begin
      failures++; $display("FAIL: activity %0d %0d %0d %0d %0d", nlaunch, nmatch, nrec, nblock, nldwait);
    end
    $display("launches %0d captures %0d recoveries %0d blocked %0d load waits %0d", nlaunch, nmatch, nrec, nblock, nldwait);
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

// tb_cdf_rob: checks the reorder buffer against a reference queue.
// Random instructions are allocated, completed out of order by result tokens
// (tokens still marked pass_rob must be ignored), and must commit in order with
// their values, at most CW per cycle, only when done. A store commits only
// when the memory side accepts it; a mispredicted branch commits, raises flush
// with its corrected pc and empties the buffer. Also checks the indexed read
// ports, the free count, the committed-store counter, the head pointer and
// the report of the oldest finished mispredicted branch (kill_valid/kill_tag).
module tb_cdf_rob;
  import cdf_pkg::*;
  localparam int unsigned DEPTH = 16, IW = 2, RW = 4, CW = 2, NRD = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic  al_valid [IW], al_has_dst [IW], al_store [IW], al_branch [IW];
  reg_t  al_dst [IW];
  word_t al_pc [IW];
  tag_t  tail;
  logic [TAG_W:0] free_cnt;
  dtok_t cmp_tok [RW];
  tag_t  rd_tag [NRD];
  logic  rd_done [NRD];
  word_t rd_val [NRD];
  logic  cm_valid [CW], cm_has_dst [CW];
  tag_t  cm_tag [CW];
  reg_t  cm_dst [CW];
  word_t cm_val [CW], cm_pc [CW];
  logic  cst_valid, cst_ready, flush;
  word_t cst_addr, cst_data, redirect_pc;
  stseq_t st_committed, st_committed_nxt;

  tag_t head, kill_tag;
  logic kill_valid;
  cdf_rob #(.DEPTH(DEPTH), .IW(IW), .RW(RW), .CW(CW), .NRD(NRD)) dut (.*);

  typedef struct {
    tag_t tag; logic hd; reg_t dst; logic st; logic br; word_t pc;
    logic done; word_t val; word_t addr; logic misp;
  } ent_t;
  ent_t q [$];
  int unsigned checks = 0, failures = 0, ncommit = 0, nflush = 0, nstore = 0, nkill = 0;
  stseq_t exp_st = 0;
  int unsigned pcn = 0;

  initial begin
    for (int k = 0; k < IW; k++) begin al_valid[k] = 0; al_has_dst[k] = 0; al_store[k] = 0;
      al_branch[k] = 0; al_dst[k] = 0; al_pc[k] = 0; end
    for (int r = 0; r < RW; r++) cmp_tok[r] = '0;
    for (int i = 0; i < NRD; i++) rd_tag[i] = 0;
    cst_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int unsigned nal, ncm;
      logic stop;
      @(negedge clk);
      // allocation
      nal = $urandom % (IW + 1);
      for (int k = 0; k < IW; k++) begin
        al_valid[k] = (k < nal) && (q.size() + k < DEPTH);
        al_has_dst[k] = $urandom % 2; al_dst[k] = reg_t'(1 + $urandom % 20);
        al_store[k] = ($urandom % 6 == 0); al_branch[k] = !al_store[k] && ($urandom % 6 == 0);
        al_pc[k] = pcn + k;
      end
      // completion of random entries, and some tokens that must be ignored
      for (int r = 0; r < RW; r++) begin
        cmp_tok[r] = '0;
        if (q.size() > 0 && $urandom % 2) begin
          int unsigned i;
          i = $urandom % q.size();
          if (!q[i].done && !(r > 0 && cmp_tok[0].valid && cmp_tok[0].tag == q[i].tag)) begin
            cmp_tok[r].valid = 1; cmp_tok[r].tag = q[i].tag; cmp_tok[r].val = $urandom;
            cmp_tok[r].addr = $urandom; cmp_tok[r].misp = q[i].br && ($urandom % 4 == 0);
            cmp_tok[r].pass_rob = ($urandom % 5 == 0);
          end
        end
      end
      for (int i = 0; i < NRD; i++) rd_tag[i] = (q.size() > 0) ? q[$urandom % q.size()].tag : '0;
      cst_ready = $urandom % 2;
      #1;
      // free count and tail
      checks++;
      if (free_cnt != DEPTH - q.size()) begin failures++; $display("FAIL: free %0d exp %0d", free_cnt, DEPTH - q.size()); end
      // head, and the oldest finished mispredicted branch
      begin
        logic exp_kv;
        tag_t exp_kt;
        exp_kv = 0; exp_kt = 0;
        foreach (q[j]) if (!exp_kv && q[j].done && q[j].misp) begin exp_kv = 1; exp_kt = q[j].tag; end
        checks++;
        if (kill_valid != exp_kv || (exp_kv && kill_tag != exp_kt) || (q.size() > 0 && head != q[0].tag)) begin
          failures++; $display("FAIL: kill %0d/%0d exp %0d/%0d head %0d", kill_valid, kill_tag, exp_kv, exp_kt, head);
        end
        if (exp_kv) nkill++;
      end
      // read ports
      for (int i = 0; i < NRD; i++) if (q.size() > 0) begin
        foreach (q[j]) if (q[j].tag == rd_tag[i]) begin
          checks++;
          if (rd_done[i] != q[j].done || (q[j].done && rd_val[i] != q[j].val)) begin
            failures++; $display("FAIL: read port %0d tag %0d", i, rd_tag[i]);
          end
        end
      end
      // expected commits
      ncm = 0; stop = 0;
      for (int k = 0; k < CW; k++) begin
        logic exp_v;
        exp_v = 0;
        if (!stop && k < q.size() && q[k].done) begin
          if (q[k].st) begin
            stop = 1;
            checks++;
            if (!cst_valid || cst_addr != q[k].addr || cst_data != q[k].val) begin
              failures++; $display("FAIL: store request");
            end
            exp_v = cst_ready;
          end else begin
            exp_v = 1;
            if (q[k].br && q[k].misp) stop = 1;
          end
        end else stop = 1;
        checks++;
        if (cm_valid[k] != exp_v || (exp_v && (cm_tag[k] != q[k].tag || cm_pc[k] != q[k].pc ||
            cm_has_dst[k] != q[k].hd || (q[k].hd && (cm_dst[k] != q[k].dst || cm_val[k] != q[k].val))))) begin
          failures++; $display("FAIL: commit slot %0d valid %0d exp %0d", k, cm_valid[k], exp_v);
        end
        if (exp_v) ncm++;
      end
      begin
        logic exp_flush;
        word_t exp_pc;
        exp_flush = 0; exp_pc = 0;
        for (int k = 0; k < int'(ncm); k++) if (q[k].br && q[k].misp) begin exp_flush = 1; exp_pc = q[k].addr; end
        checks++;
        if (flush != exp_flush || (exp_flush && redirect_pc != exp_pc)) begin
          failures++; $display("FAIL: flush %0d exp %0d", flush, exp_flush);
        end
        for (int k = 0; k < int'(ncm); k++) begin
          if (q[0].st) begin exp_st++; nstore++; end
          void'(q.pop_front());
          ncommit++;
        end
        if (exp_flush) begin q.delete(); nflush++; end
        else begin
          for (int k = 0; k < IW; k++) if (al_valid[k]) begin
            ent_t e;
            e.tag = tag_t'((tail + k) % DEPTH); e.hd = al_has_dst[k] && 1'b1; e.dst = al_dst[k];
            e.st = al_store[k]; e.br = al_branch[k]; e.pc = al_pc[k];
            e.done = 0; e.val = 0; e.addr = 0; e.misp = 0;
            q.push_back(e);
            pcn++;
          end
        end
        for (int r = 0; r < RW; r++) if (cmp_tok[r].valid && !cmp_tok[r].pass_rob)
          foreach (q[j]) if (q[j].tag == cmp_tok[r].tag) begin
            q[j].done = 1; q[j].val = cmp_tok[r].val; q[j].addr = cmp_tok[r].addr; q[j].misp = cmp_tok[r].misp;
          end
      end
      @(posedge clk); #1;
      checks++;
      if (st_committed != exp_st) begin failures++; $display("FAIL: store counter"); end
    end
    checks++;
    if (ncommit < 1000 || nflush == 0 || nstore == 0 || nkill == 0) begin
      failures++; $display("FAIL: too little activity %0d %0d %0d", ncommit, nflush, nstore);
    end
    $display("commits %0d flushes %0d stores %0d", ncommit, nflush, nstore);
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

// cdf_core_run: one self-checking run of the CounterDataFlow core at a given
// width and ROB size, used to compare configurations side by side.
//
// It is the end-to-end test without the mechanism counters and without the
// divide-and-burst opening of its loop body: a generated looping program
// (integer, multiply/divide, loads, stores, branches with static prediction
// and both floating-point classes), a
// reference model that executes it first, a fetch unit that reads it by pc,
// two floating-point stand-ins, and an in-order comparison of every commit
// followed by a check of the registers and of the memory words written.
// Interface: clk and rst_n come from the parent; o_done rises once every
// instruction has committed and the final state has been compared, with
// checks, failures, the commit count and the cycle count on the outputs.
// The configurations it is run at are the pipe widths and ROB sizes the CDF
// evaluation compares; the program and the stand-ins are this testbench's own.
module cdf_core_run
  import cdf_pkg::*;
#(
  parameter int unsigned IW        = 2,
  parameter int unsigned RW        = 4,
  parameter int unsigned ROB_DEPTH = 64,
  parameter int unsigned SEED      = 32'h1234567
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        o_done,
  output int unsigned o_checks,
  output int unsigned o_failures,
  output int unsigned o_ncommit,
  output int unsigned o_cycles
);

  logic        done = 1'b0;
  int unsigned checks = 0, failures = 0;
  int unsigned ncommit = 0;
  int unsigned cycles = 0;
  int unsigned nflush = 0, nmiss = 0, nwrap = 0;
  assign o_done     = done;
  assign o_checks   = checks;
  assign o_failures = failures;
  assign o_ncommit  = ncommit;
  assign o_cycles   = cycles;

  localparam int unsigned BODY     = 120;
  localparam int unsigned NPROG    = BODY + 3;
  localparam int unsigned LOOPS    = 4;
  localparam int unsigned MAXTRACE = 4096;
  localparam int unsigned MEMW     = 16384;


  logic  f_valid [IW];
  uop_t  f_uop   [IW];
  logic  f_accept [IW];
  logic  flush;
  word_t redirect_pc;
  logic  cm_valid [IW];
  word_t cm_pc [IW];
  logic  cm_has_dst [IW];
  reg_t  cm_dst [IW];
  word_t cm_val [IW];
  logic  fpf_valid, fpf_ready, fpf_res_valid, fpf_res_ready;
  itok_t fpf_tok;
  dtok_t fpf_res;
  logic  fps_valid, fps_ready, fps_res_valid, fps_res_ready;
  itok_t fps_tok;
  dtok_t fps_res;
  logic [$clog2(IW+1)-1:0] st_issued, st_wrapped;
  logic  st_l1_miss;

  cdf_core #(.IW(IW), .RW(RW), .ROB_DEPTH(ROB_DEPTH)) dut (.*);


  // ---------------- program and reference model ----------------
  uop_t  prog [NPROG];
  word_t mem_init [MEMW];
  word_t ref_mem [MEMW];
  word_t ref_reg [NREGS];
  word_t tr_pc [MAXTRACE];
  logic  tr_hd [MAXTRACE];
  reg_t  tr_dst [MAXTRACE];
  word_t tr_val [MAXTRACE];
  int unsigned ntrace;
  logic  touched [MEMW];

  int unsigned seed = SEED;
  function automatic int unsigned rnd(int unsigned n);
    seed = seed * 32'd1103515245 + 32'd12345;
    return (seed >> 8) % n;
  endfunction

  function automatic word_t fp_fast(word_t a, word_t b);
    return a + b + 1;
  endfunction
  function automatic word_t fp_slow(word_t a, word_t b);
    return a ^ (b << 1);
  endfunction

  function automatic word_t ref_alu(logic [3:0] fn, word_t a, word_t b);
    case (fn)
      FN_ADD:  return a + b;
      FN_SUB:  return a - b;
      FN_AND:  return a & b;
      FN_OR:   return a | b;
      FN_XOR:  return a ^ b;
      FN_SLT:  return ($signed(a) < $signed(b)) ? 1 : 0;
      FN_SLTU: return (a < b) ? 1 : 0;
      FN_SLL:  return a << b[4:0];
      FN_SRL:  return a >> b[4:0];
      FN_SRA:  return $unsigned($signed(a) >>> b[4:0]);
      FN_NOR:  return ~(a | b);
      default: return a + b;
    endcase
  endfunction

  function automatic word_t ref_md(logic [3:0] fn, word_t a, word_t b);
    logic sgn;
    word_t ma, mb, q, r;
    if (fn == FN_MUL) return a * b;
    sgn = (fn == FN_DIV || fn == FN_REM);
    ma = (sgn && a[31]) ? -a : a;
    mb = (sgn && b[31]) ? -b : b;
    if (mb == 0) begin q = '1; r = ma; end
    else begin q = ma / mb; r = ma % mb; end
    if (fn == FN_DIV || fn == FN_DIVU) return (sgn && (a[31] ^ b[31]) && b != 0) ? -q : q;
    return (sgn && a[31]) ? -r : r;
  endfunction

  function automatic uop_t gen_body(int unsigned pc);
    uop_t u;
    int unsigned c;
    u = '0;
    u.pc = pc;
    c = rnd(100);
    u.src1 = reg_t'(rnd(31));
    u.src2 = reg_t'(rnd(31));
    u.dst  = reg_t'(1 + rnd(30));
    u.has_dst = 1'b1;
    if (c < 42) begin
      u.oc = OC_ALU;
      u.fn = 4'(rnd(11));
      u.use_imm = (rnd(3) == 0);
      u.imm = (rnd(2) == 0) ? word_t'(rnd(64)) : word_t'(seed);
    end else if (c < 50) begin
      u.oc = OC_MULDIV;
      u.fn = 4'(rnd(5));
    end else if (c < 64) begin
      u.oc = OC_LOAD;
      u.src1 = '0;
    end else if (c < 74) begin
      u.oc = OC_STORE;
      u.src1 = '0;
      u.has_dst = 1'b0;
      u.dst = '0;
    end else if (c < 86) begin
      u.oc = OC_BRANCH;
      u.fn = 4'(rnd(4));
      u.has_dst = 1'b0;
      u.dst = '0;
      u.imm = word_t'(2 + rnd(3));
      if (pc + u.imm > BODY) u.imm = word_t'(BODY + 1 - pc);
      u.pred_taken = 1'b0;
    end else if (c < 93) begin
      u.oc = OC_FPFAST;
      u.src1 = reg_t'(32 + rnd(32));
      u.src2 = reg_t'(rnd(64));
      u.dst  = reg_t'(32 + rnd(32));
    end else begin
      u.oc = OC_FPSLOW;
      u.src1 = reg_t'(32 + rnd(32));
      u.src2 = reg_t'(rnd(31));
      u.dst  = reg_t'(32 + rnd(32));
    end
    if (u.oc == OC_LOAD || u.oc == OC_STORE) begin
      // mostly a small hot region, sometimes lines that compete for set 0
      if (rnd(10) < 7) u.imm = word_t'(4 * rnd(64));
      else             u.imm = word_t'(4096 * (1 + rnd(7)) + 4 * rnd(8));
    end
    return u;
  endfunction

  task automatic build_program();
    prog[0] = '0;
    prog[0].oc = OC_ALU; prog[0].fn = FN_ADD; prog[0].has_dst = 1'b1; prog[0].dst = 6'd31;
    prog[0].use_imm = 1'b1; prog[0].imm = LOOPS; prog[0].pc = 0;
    for (int unsigned p = 1; p <= BODY; p++) prog[p] = gen_body(p);
    prog[BODY+1] = '0;
    prog[BODY+1].oc = OC_ALU; prog[BODY+1].fn = FN_SUB; prog[BODY+1].has_dst = 1'b1;
    prog[BODY+1].dst = 6'd31; prog[BODY+1].src1 = 6'd31; prog[BODY+1].use_imm = 1'b1;
    prog[BODY+1].imm = 1; prog[BODY+1].pc = BODY + 1;
    prog[BODY+2] = '0;
    prog[BODY+2].oc = OC_BRANCH; prog[BODY+2].fn = FN_BNE; prog[BODY+2].src1 = 6'd31;
    prog[BODY+2].imm = word_t'(-(BODY + 1)); prog[BODY+2].pred_taken = 1'b1;
    prog[BODY+2].pc = BODY + 2;
  endtask

  task automatic run_reference();
    int unsigned pc;
    pc = 0;
    ntrace = 0;
    for (int i = 0; i < NREGS; i++) ref_reg[i] = '0;
    while (pc < NPROG && ntrace < MAXTRACE) begin
      uop_t  u;
      word_t a, b, v;
      int unsigned npc;
      u = prog[pc];
      a = (u.src1 == 0) ? '0 : ref_reg[u.src1];
      b = (u.src2 == 0) ? '0 : ref_reg[u.src2];
      npc = pc + 1;
      v = '0;
      case (u.oc)
        OC_ALU:    v = ref_alu(u.fn, a, u.use_imm ? u.imm : b);
        OC_MULDIV: v = ref_md(u.fn, a, u.use_imm ? u.imm : b);
        OC_FPFAST: v = fp_fast(a, u.use_imm ? u.imm : b);
        OC_FPSLOW: v = fp_slow(a, u.use_imm ? u.imm : b);
        OC_LOAD:   v = ref_mem[14'((a + u.imm) >> 2)];
        OC_STORE:  begin
          ref_mem[14'((a + u.imm) >> 2)] = b;
          touched[14'((a + u.imm) >> 2)] = 1'b1;
          v = b;
        end
        OC_BRANCH: begin
          logic t;
          case (u.fn)
            FN_BEQ: t = (a == b);
            FN_BNE: t = (a != b);
            FN_BLT: t = ($signed(a) < $signed(b));
            default: t = ($signed(a) >= $signed(b));
          endcase
          if (t) npc = pc + u.imm;
        end
        default: ;
      endcase
      tr_pc[ntrace]  = pc;
      tr_hd[ntrace]  = u.has_dst && u.dst != 0;
      tr_dst[ntrace] = u.dst;
      tr_val[ntrace] = v;
      if (u.oc == OC_STORE) tr_val[ntrace] = b;
      ntrace++;
      if (u.has_dst && u.dst != 0) ref_reg[u.dst] = v;
      pc = npc;
    end
  endtask

  // ---------------- fetch unit ----------------
  int unsigned fpc;
  always_comb begin
    logic stop;
    stop = 1'b0;
    for (int k = 0; k < IW; k++) begin
      f_valid[k] = 1'b0;
      f_uop[k]   = '0;
      if (!stop && rst_n && fpc + k < NPROG) begin
        f_valid[k] = 1'b1;
        f_uop[k]   = prog[fpc + k];
        if (prog[fpc + k].oc == OC_BRANCH && prog[fpc + k].pred_taken) stop = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) fpc <= 0;
    else if (flush) fpc <= redirect_pc;
    else begin
      int unsigned n;
      n = fpc;
      for (int k = 0; k < IW; k++)
        if (f_accept[k]) begin
          if (f_uop[k].oc == OC_BRANCH && f_uop[k].pred_taken) n = f_uop[k].pc + f_uop[k].imm;
          else n = f_uop[k].pc + 1;
        end
      fpc <= n;
    end
  end

  // ---------------- floating-point sidepanel stand-ins ----------------
  int unsigned fpf_cnt, fps_cnt;
  logic fpf_busy, fps_busy;
  itok_t fpf_q, fps_q;
  assign fpf_ready = !fpf_busy;
  assign fps_ready = !fps_busy;
  assign fpf_res_valid = fpf_busy && fpf_cnt == 0;
  assign fps_res_valid = fps_busy && fps_cnt == 0;
  always_comb begin
    fpf_res = '0;
    fpf_res.valid = fpf_res_valid;
    fpf_res.tag = fpf_q.tag;
    fpf_res.val = fp_fast(fpf_q.c1.val, fpf_q.use_imm ? fpf_q.imm : fpf_q.c2.val);
    fps_res = '0;
    fps_res.valid = fps_res_valid;
    fps_res.tag = fps_q.tag;
    fps_res.val = fp_slow(fps_q.c1.val, fps_q.use_imm ? fps_q.imm : fps_q.c2.val);
  end
  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      fpf_busy <= 1'b0; fps_busy <= 1'b0; fpf_cnt <= 0; fps_cnt <= 0;
    end else begin
      if (fpf_valid && fpf_ready) begin fpf_busy <= 1'b1; fpf_q <= fpf_tok; fpf_cnt <= 1; end
      else if (fpf_busy && fpf_cnt != 0) fpf_cnt <= fpf_cnt - 1;
      else if (fpf_res_valid && fpf_res_ready) fpf_busy <= 1'b0;
      if (fps_valid && fps_ready) begin fps_busy <= 1'b1; fps_q <= fps_tok; fps_cnt <= 4; end
      else if (fps_busy && fps_cnt != 0) fps_cnt <= fps_cnt - 1;
      else if (fps_res_valid && fps_res_ready) fps_busy <= 1'b0;
    end
  end

  // ---------------- commit checking ----------------
  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (ncommit < ntrace) cycles <= cycles + 1;
      if (flush) nflush <= nflush + 1;
      if (st_l1_miss) nmiss <= nmiss + 1;
      nwrap <= nwrap + st_wrapped;
      for (int k = 0; k < IW; k++) begin
        if (cm_valid[k]) begin
          int unsigned i;
          i = ncommit + k;
          checks++;
          if (i >= ntrace) begin
            failures++;
            $display("FAIL: commit beyond the end of the program, pc=%0d", cm_pc[k]);
          end else if (cm_pc[k] != tr_pc[i] || cm_has_dst[k] != tr_hd[i] ||
                       (tr_hd[i] && (cm_dst[k] != tr_dst[i] || cm_val[k] != tr_val[i]))) begin
            failures++;
            if (failures < 10)
              $display("FAIL: commit %0d pc=%0d dst=%0d val=%h, expected pc=%0d dst=%0d val=%h",
                       i, cm_pc[k], cm_dst[k], cm_val[k], tr_pc[i], tr_dst[i], tr_val[i]);
          end
        end
      end
      begin
        int unsigned n;
        n = ncommit;
        for (int k = 0; k < IW; k++) if (cm_valid[k]) n++;
        ncommit <= n;
      end
    end
  end

  initial begin
    for (int i = 0; i < MEMW; i++) begin
      mem_init[i] = word_t'(i) * 32'h9E3779B1;
      ref_mem[i]  = mem_init[i];
      touched[i]  = 1'b0;
      dut.u_l2.mem[i] = mem_init[i];
    end
    build_program();
    run_reference();
    $display("program: %0d static, %0d dynamic instructions", NPROG, ntrace);
    wait (rst_n);
    wait (ncommit >= ntrace);
    repeat (20) @(posedge clk);
    // architectural state
    for (int i = 1; i < NREGS; i++) begin
      checks++;
      if (dut.u_rf.regs[i] != ref_reg[i]) begin
        failures++;
        $display("FAIL: r%0d = %h, expected %h", i, dut.u_rf.regs[i], ref_reg[i]);
      end
    end
    for (int i = 0; i < MEMW; i++) if (touched[i]) begin
      checks++;
      if (dut.u_l2.mem[i] != ref_mem[i]) begin
        failures++;
        $display("FAIL: mem[%0d] = %h, expected %h", i, dut.u_l2.mem[i], ref_mem[i]);
      end
    end
    $display("IW=%0d RW=%0d ROB=%0d: committed %0d instructions in %0d cycles, %0d flushes, %0d L1 misses, %0d wrapped tokens",
             IW, RW, ROB_DEPTH, ncommit, cycles, nflush, nmiss, nwrap);
    done = 1'b1;
  end

endmodule

// tb_cdf_core: end-to-end test of the CounterDataFlow core.
//
// The testbench plays the parts outside the core: a fetch unit that reads a
// generated program by pc (contiguous fetch of up to IW micro-ops per cycle,
// stopping after a branch predicted taken, static prediction: backward taken,
// forward not taken) and two floating-point sidepanels with fixed stand-in
// functions. The loop body opens with a divide followed by a burst of
// independent adds, which fills the ROB and crowds the result pipe. Before
// simulation a reference model executes the same program and records every
// instruction it retires. Each instruction the core commits is
// compared, in order, with that record (pc, destination, value); at the end the
// architectural registers and the memory words the program used are compared.
// It also counts how often each mechanism of the core happened (launch into
// every sidepanel, wrapping of instructions, half-circuit wrapping of
// results, recovery blocked by a full result pipe, fetch throttled by wrapped
// instructions, full ROB, cache misses, misprediction flushes, operands
// read from a finished ROB entry at issue, committed stores, wrong-path
// instructions removed as they wrap after a misprediction is known) and
// counts a failure for each that never happened.
// Parameters: the core runs at its default sizes unless overridden below.
module tb_cdf_core;
  import cdf_pkg::*;

  localparam int unsigned IW       = 2;
  localparam int unsigned BODY     = 190;
  localparam int unsigned BURST    = 70;
  localparam int unsigned NPROG    = BODY + 3;
  localparam int unsigned LOOPS    = 4;
  localparam int unsigned MAXTRACE = 4096;
  localparam int unsigned MEMW     = 16384;
  localparam int unsigned WATCHDOG = 200000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

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

  cdf_core dut (.*);

  int unsigned checks = 0, failures = 0;

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

  int unsigned seed = 32'h1234567;
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
    // a burst: a long divide, then independent immediate adds that fill the
    // ROB behind it and crowd the result pipe
    prog[1].oc = OC_MULDIV; prog[1].fn = FN_DIVU; prog[1].use_imm = 1'b1; prog[1].imm = 7;
    prog[1].has_dst = 1'b1; prog[1].dst = 6'd30; prog[1].src1 = 6'd5;
    for (int unsigned p = 2; p < 2 + BURST; p++) begin
      prog[p] = '0;
      prog[p].oc = OC_ALU; prog[p].fn = FN_ADD; prog[p].use_imm = 1'b1;
      prog[p].imm = word_t'(p * 3); prog[p].has_dst = 1'b1;
      prog[p].dst = reg_t'(1 + p % 29); prog[p].pc = p;
    end
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
  int unsigned ncommit = 0;
  int unsigned cycles = 0;
  always_ff @(posedge clk) begin
    if (rst_n) begin
      cycles <= cycles + 1;
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

  // ---------------- mechanism counters ----------------
  localparam int NMECH = 19;
  int unsigned mech [NMECH];
  string mech_name [NMECH] = '{"launch fast int 0", "launch fast int 1", "launch fast int 2",
    "launch fast int 3", "launch branch", "launch memory", "launch slow int", "launch fast fp",
    "launch slow fp", "instruction wrap", "result half-circuit wrap", "recovery blocked",
    "fetch throttled by wrapping", "ROB full", "L1 miss", "misprediction flush",
    "operand from ROB at issue", "store commit", "wrong-path token removed"};
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < 9; p++)
        if (dut.sp_in_valid[p] && dut.sp_in_ready[p]) mech[p]++;
      if (st_wrapped != 0) mech[9]++;
      for (int r = 0; r < 4; r++) if (dut.s_dq[0][r].valid && dut.s_dq[0][r].pass_rob) mech[10]++;
      for (int p = 0; p < 9; p++) if (dut.sp_out_valid[p] && !dut.sp_out_ready[p]) mech[11]++;
      if (st_wrapped != 0 && f_valid[0] && !f_accept[IW-1] && dut.rob_free > 1) mech[12]++;
      if (dut.rob_free == 0 && f_valid[0]) mech[13]++;
      if (st_l1_miss) mech[14]++;
      if (flush) mech[15]++;
      for (int k = 0; k < IW; k++)
        if (f_accept[k] &&
            ((dut.u_dec.tt_busy[2*k] && dut.u_dec.n_tok[k].c1.rdy) ||
             (dut.u_dec.tt_busy[2*k+1] && dut.u_dec.n_tok[k].c2.rdy))) mech[16]++;
      if (dut.cst_valid && dut.cst_ready) mech[17]++;
      for (int s = 0; s < IW; s++)
        if (dut.u_dec.w_tok[s].valid && !dut.u_dec.w_keep[s].valid) mech[18]++;
    end
  end

  initial begin
    for (int i = 0; i < NMECH; i++) mech[i] = 0;
    for (int i = 0; i < MEMW; i++) begin
      mem_init[i] = word_t'(i) * 32'h9E3779B1;
      ref_mem[i]  = mem_init[i];
      touched[i]  = 1'b0;
      dut.u_l2.mem[i] = mem_init[i];
    end
    build_program();
    run_reference();
    $display("program: %0d static, %0d dynamic instructions", NPROG, ntrace);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
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
    for (int i = 0; i < NMECH; i++) begin
      checks++;
      $display("mechanism %-28s %0d", mech_name[i], mech[i]);
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL: mechanism '%s' never happened", mech_name[i]);
      end
    end
    $display("committed %0d instructions in %0d cycles", ncommit, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d of %0d instructions committed", ncommit, ntrace);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_cdf_configs: the CounterDataFlow core at every pipe width and ROB size
// of the evaluated configuration family, run side by side.
//
// This testbench instantiates five complete cores through cdf_core_run,
// each on its own copy of the same checked program:
//   CDF0: 1 instruction pipe, 1 result pipe, 32 ROB entries
//   CDF1: 1 instruction pipe, 2 result pipes, 32 ROB entries
//   CDF2: 2 instruction pipes, 3 result pipes, 64 ROB entries
//   CDF3: 2 instruction pipes, 4 result pipes, 64 ROB entries (the default)
//   CDF4: 4 instruction pipes, 8 result pipes, 128 ROB entries
// Every commit of every core is compared with the reference model, then the
// final registers and memory. It also prints each core's IPC on this
// program, with its flush, miss and wrap counts; the program is small and
// synthetic, with many mispredicted branches, so these figures show relative
// behaviour only; the widest core must not take more cycles than the
// narrowest. A watchdog ends the run with a failure if a core stops
// committing.
module tb_cdf_configs;

  localparam int unsigned NCFG     = 5;
  localparam int unsigned WATCHDOG = 300000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        done [NCFG];
  int unsigned c_checks [NCFG], c_failures [NCFG], c_commit [NCFG], c_cycles [NCFG];
  int unsigned checks = 0, failures = 0;

  cdf_core_run #(.IW(1), .RW(1), .ROB_DEPTH(32))  u_cdf0 (.clk, .rst_n, .o_done(done[0]),
    .o_checks(c_checks[0]), .o_failures(c_failures[0]), .o_ncommit(c_commit[0]), .o_cycles(c_cycles[0]));
  cdf_core_run #(.IW(1), .RW(2), .ROB_DEPTH(32))  u_cdf1 (.clk, .rst_n, .o_done(done[1]),
    .o_checks(c_checks[1]), .o_failures(c_failures[1]), .o_ncommit(c_commit[1]), .o_cycles(c_cycles[1]));
  cdf_core_run #(.IW(2), .RW(3), .ROB_DEPTH(64))  u_cdf2 (.clk, .rst_n, .o_done(done[2]),
    .o_checks(c_checks[2]), .o_failures(c_failures[2]), .o_ncommit(c_commit[2]), .o_cycles(c_cycles[2]));
  cdf_core_run #(.IW(2), .RW(4), .ROB_DEPTH(64))  u_cdf3 (.clk, .rst_n, .o_done(done[3]),
    .o_checks(c_checks[3]), .o_failures(c_failures[3]), .o_ncommit(c_commit[3]), .o_cycles(c_cycles[3]));
  cdf_core_run #(.IW(4), .RW(8), .ROB_DEPTH(128)) u_cdf4 (.clk, .rst_n, .o_done(done[4]),
    .o_checks(c_checks[4]), .o_failures(c_failures[4]), .o_ncommit(c_commit[4]), .o_cycles(c_cycles[4]));

  string cfg_name [NCFG] = '{"CDF0", "CDF1", "CDF2", "CDF3", "CDF4"};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    for (int i = 0; i < NCFG; i++) begin
      checks   += c_checks[i];
      failures += c_failures[i];
      $display("%s: %0d instructions, %0d cycles, IPC %0d.%03d, %0d checks, %0d failures",
               cfg_name[i], c_commit[i], c_cycles[i], c_commit[i] / c_cycles[i],
               (1000 * c_commit[i] / c_cycles[i]) % 1000, c_checks[i], c_failures[i]);
    end
    for (int i = 0; i < NCFG; i++) begin
      // every instruction of the program must have retired
      checks++;
      if (c_commit[i] == 0 || c_commit[i] != c_commit[0]) begin
        failures++;
        $display("FAIL: %s committed %0d instructions", cfg_name[i], c_commit[i]);
      end
    end
    // the widest core must not be slower than the narrowest on this program
    checks++;
    if (c_cycles[NCFG-1] > c_cycles[0]) begin
      failures++;
      $display("FAIL: CDF4 needs more cycles than CDF0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

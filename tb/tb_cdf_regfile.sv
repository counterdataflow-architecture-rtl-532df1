// tb_cdf_regfile: checks the register file: reset to zero, register 0 reads
// zero, writes through several ports (the later port wins on a conflict) and
// reads through every read port, against a reference array.
module tb_cdf_regfile;
  import cdf_pkg::*;
  localparam int unsigned NR = 4, NW = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic  we [NW];
  reg_t  waddr [NW];
  word_t wdata [NW];
  reg_t  raddr [NR];
  word_t rdata [NR];
  word_t model [NREGS];
  int unsigned checks = 0, failures = 0;

  cdf_regfile #(.NR(NR), .NW(NW)) dut (.*);

  task automatic check_reads();
    for (int i = 0; i < NR; i++) begin
      raddr[i] = reg_t'($urandom);
      #1;
      checks++;
      if (rdata[i] != ((raddr[i] == 0) ? '0 : model[raddr[i]])) begin
        failures++;
        $display("FAIL: r%0d = %h, expected %h", raddr[i], rdata[i], model[raddr[i]]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < NREGS; i++) model[i] = '0;
    for (int k = 0; k < NW; k++) begin we[k] = 0; waddr[k] = '0; wdata[k] = '0; end
    for (int i = 0; i < NR; i++) raddr[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_reads();
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int k = 0; k < NW; k++) begin
        we[k] = $urandom % 2; waddr[k] = reg_t'($urandom % 8); wdata[k] = $urandom;
      end
      if (t % 10 == 0) waddr[1] = waddr[0];
      @(posedge clk);
      for (int k = 0; k < NW; k++) if (we[k] && waddr[k] != 0) model[waddr[k]] = wdata[k];
      @(negedge clk);
      for (int k = 0; k < NW; k++) we[k] = 0;
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

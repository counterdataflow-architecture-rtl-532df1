// tb_cdf_l2_mem: checks the pipelined fixed-latency L2 memory.
// Writes a pattern, then issues one read per cycle and checks that every
// answer arrives exactly LAT cycles after its request with the written data,
// and that writes produce no answer.
module tb_cdf_l2_mem;
  import cdf_pkg::*;
  localparam int unsigned LAT = 10, WORDS = 256, AW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid = 0, req_we = 0, resp_valid;
  logic [AW-1:0] req_addr = '0;
  word_t req_wdata = '0, resp_rdata;
  int unsigned checks = 0, failures = 0, cyc = 0;
  int unsigned issue_cyc [$];
  word_t exp_q [$];
  word_t model [WORDS];

  cdf_l2_mem #(.LAT(LAT), .WORDS(WORDS)) dut (.*);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && resp_valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected answer at %0d", cyc); end
      else begin
        int unsigned ic; word_t e;
        ic = issue_cyc.pop_front(); e = exp_q.pop_front();
        if (resp_rdata != e || cyc - ic != LAT) begin
          failures++;
          $display("FAIL: data %h exp %h, latency %0d", resp_rdata, e, cyc - ic);
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      req_valid = 1; req_we = 1; req_addr = AW'(i); req_wdata = $urandom;
      model[i] = req_wdata;
    end
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      req_valid = ($urandom % 4 != 0); req_we = ($urandom % 5 == 0);
      req_addr = AW'($urandom); req_wdata = $urandom;
      if (req_valid && !req_we) begin
        issue_cyc.push_back(cyc); exp_q.push_back(model[req_addr]);
      end
      if (req_valid && req_we) model[req_addr] = req_wdata;
    end
    @(negedge clk); req_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d answers missing", exp_q.size()); end
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

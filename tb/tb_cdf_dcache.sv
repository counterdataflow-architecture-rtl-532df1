// tb_cdf_dcache: checks the L1 data cache together with the L2 memory.
// A directed sequence fills the four ways of one set, touches one line and
// brings in a fifth: the tree pseudo-LRU must evict the third line filled,
// which is checked through the hit/miss latency of later loads (hit: 1 cycle,
// miss: LW + L2 latency + 3 cycles). Then a random mix of loads and
// write-through stores over lines competing for a few sets is checked against
// a reference memory, together with the latency that matches each answer.
module tb_cdf_dcache;
  import cdf_pkg::*;
  localparam int unsigned L2_LAT = 10, WORDS = 16384, AW = 14;
  localparam int unsigned MISS_LAT = 8 + L2_LAT + 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid = 0, req_ready, req_we = 0, resp_valid, resp_hit;
  word_t req_addr = '0, req_wdata = '0, resp_rdata;
  logic l2_valid, l2_we, l2_resp_valid;
  logic [AW-1:0] l2_addr;
  word_t l2_wdata, l2_resp_rdata;
  word_t model [WORDS];
  int unsigned checks = 0, failures = 0, nmiss = 0, nhit = 0;

  cdf_dcache #(.L2_AW(AW)) dut (.*);
  cdf_l2_mem #(.LAT(L2_LAT), .WORDS(WORDS)) u_l2 (
    .clk, .rst_n, .req_valid(l2_valid), .req_we(l2_we), .req_addr(l2_addr),
    .req_wdata(l2_wdata), .resp_valid(l2_resp_valid), .resp_rdata(l2_resp_rdata));

  // one access; returns its latency in cycles
  task automatic access(input logic we, input word_t addr, input word_t wd, output int unsigned lat,
                        output word_t rd);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_we = we; req_addr = addr; req_wdata = wd;
    @(negedge clk);
    req_valid = 0;
    lat = 1;
    while (!resp_valid && lat < 200) begin @(negedge clk); lat++; end
    rd = resp_rdata;
  endtask

  task automatic load_check(input word_t addr, input int exp_lat);
    int unsigned lat; word_t rd;
    access(0, addr, 0, lat, rd);
    checks++;
    if (rd != model[addr[15:2]] || (exp_lat >= 0 && lat != exp_lat) ||
        (lat != 1 && lat != MISS_LAT) || resp_hit != (lat == 1)) begin
      failures++;
      $display("FAIL: load %h = %h exp %h, latency %0d exp %0d", addr, rd, model[addr[15:2]], lat, exp_lat);
    end
    if (lat == 1) nhit++; else nmiss++;
  endtask

  initial begin
    for (int i = 0; i < WORDS; i++) begin
      model[i] = $urandom;
      u_l2.mem[i] = model[i];
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed pseudo-LRU test in set 3: lines A..E are 4 KB apart
    load_check(32'h0060, MISS_LAT);   // A -> way 0
    load_check(32'h1060, MISS_LAT);   // B -> way 1
    load_check(32'h2060, MISS_LAT);   // C -> way 2
    load_check(32'h3060, MISS_LAT);   // D -> way 3
    load_check(32'h0064, 1);          // touch A
    load_check(32'h4060, MISS_LAT);   // E evicts C
    load_check(32'h0068, 1);          // A
    load_check(32'h1068, 1);          // B
    load_check(32'h3068, 1);          // D
    load_check(32'h4068, 1);          // E
    load_check(32'h2068, MISS_LAT);   // C was evicted
    // random mix
    for (int t = 0; t < 1500; t++) begin
      word_t a;
      int unsigned lat; word_t rd;
      a = {16'h0, 4'($urandom % 6), 5'($urandom % 3), 5'($urandom % 8), 2'b00};
      if ($urandom % 3 == 0) begin
        word_t d;
        d = $urandom;
        access(1, a, d, lat, rd);
        model[a[15:2]] = d;
        checks++;
        if (lat != 1) begin failures++; $display("FAIL: store latency %0d", lat); end
      end else load_check(a, -1);
    end
    checks++;
    if (nhit < 100 || nmiss < 20) begin failures++; $display("FAIL: hits %0d misses %0d", nhit, nmiss); end
    // stores are written through: the L2 holds the same data
    repeat (2) @(posedge clk);
    for (int i = 0; i < 4096; i++) begin
      checks++;
      if (u_l2.mem[i] != model[i]) begin failures++; $display("FAIL: L2 word %0d", i); end
    end
    $display("hits %0d misses %0d", nhit, nmiss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

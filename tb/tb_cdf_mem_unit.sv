// tb_cdf_mem_unit: checks the memory sidepanel with the L1 cache and L2.
// Launched stores must return their address and data without touching memory;
// committed stores must reach memory and take priority over a launch in the
// same cycle; loads must return the committed memory contents; a load that
// is flushed while it waits for a miss must produce no result and must not
// disturb the next load. Compared against a reference memory.
module tb_cdf_mem_unit;
  import cdf_pkg::*;
  localparam int unsigned WORDS = 16384, AW = 14;
  logic clk = 0, rst_n = 0, flush = 0;
  always #5 clk = ~clk;
  logic  in_valid = 0, in_ready, out_valid, out_ready = 1;
  itok_t in_tok = '0;
  dtok_t out_tok;
  logic  cst_valid = 0, cst_ready;
  word_t cst_addr = '0, cst_data = '0;
  logic  dc_valid, dc_ready, dc_we, dc_resp_valid, dc_resp_hit;
  word_t dc_addr, dc_wdata, dc_resp_rdata;
  logic  l2_valid, l2_we, l2_resp_valid;
  logic [AW-1:0] l2_addr;
  word_t l2_wdata, l2_resp_rdata;
  word_t model [WORDS];
  int unsigned checks = 0, failures = 0;

  cdf_mem_unit dut (.*);
  cdf_dcache #(.L2_AW(AW)) u_dc (
    .clk, .rst_n, .req_valid(dc_valid), .req_ready(dc_ready), .req_we(dc_we), .req_addr(dc_addr),
    .req_wdata(dc_wdata), .resp_valid(dc_resp_valid), .resp_rdata(dc_resp_rdata),
    .resp_hit(dc_resp_hit), .l2_valid, .l2_we, .l2_addr, .l2_wdata, .l2_resp_valid, .l2_resp_rdata);
  cdf_l2_mem #(.WORDS(WORDS)) u_l2 (
    .clk, .rst_n, .req_valid(l2_valid), .req_we(l2_we), .req_addr(l2_addr), .req_wdata(l2_wdata),
    .resp_valid(l2_resp_valid), .resp_rdata(l2_resp_rdata));

  task automatic launch(input opclass_e oc, input word_t base, input word_t off, input word_t data,
                        input tag_t tag, output dtok_t res, output int unsigned lat);
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    in_tok = '0;
    in_tok.valid = 1; in_tok.oc = oc; in_tok.tag = tag;
    in_tok.c1.val = base; in_tok.imm = off; in_tok.c2.val = data;
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    lat = 1;
    while (!out_valid && lat < 100) begin @(negedge clk); lat++; end
    res = out_tok;
  endtask

  task automatic commit_store(input word_t addr, input word_t data);
    @(negedge clk);
    cst_valid = 1; cst_addr = addr; cst_data = data;
    while (!cst_ready) @(negedge clk);
    @(posedge clk);
    model[addr[15:2]] = data;
    @(negedge clk);
    cst_valid = 0;
  endtask

  initial begin
    for (int i = 0; i < WORDS; i++) begin model[i] = $urandom; u_l2.mem[i] = model[i]; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      dtok_t r; int unsigned lat;
      word_t base, off, a, d;
      base = 4 * ($urandom % 64); off = 4096 * ($urandom % 5) + 4 * ($urandom % 16);
      a = base + off; d = $urandom;
      case ($urandom % 3)
        0: begin
          launch(OC_STORE, base, off, d, tag_t'(t), r, lat);
          checks++;
          if (r.addr != a || r.val != d || r.tag != tag_t'(t) || lat != 1) begin
            failures++; $display("FAIL: store token addr %h data %h lat %0d", r.addr, r.val, lat);
          end
          commit_store(a, d);
        end
        1: begin
          launch(OC_LOAD, base, off, 0, tag_t'(t), r, lat);
          checks++;
          if (r.val != model[a[15:2]] || r.tag != tag_t'(t)) begin
            failures++; $display("FAIL: load %h = %h exp %h", a, r.val, model[a[15:2]]);
          end
        end
        default: begin
          // a committed store and a launch in the same cycle: the store goes first
          @(negedge clk);
          cst_valid = 1; cst_addr = a; cst_data = d;
          in_tok = '0; in_tok.valid = 1; in_tok.oc = OC_LOAD; in_tok.c1.val = base; in_tok.imm = off;
          in_valid = 1;
          #1;
          checks++;
          if (in_ready) begin failures++; $display("FAIL: launch accepted beside a committed store"); end
          while (!cst_ready) begin @(negedge clk); #1; end
          @(posedge clk);
          model[a[15:2]] = d;
          @(negedge clk);
          cst_valid = 0;
          in_valid = 0;
          launch(OC_LOAD, base, off, 0, tag_t'(t), r, lat);
          checks++;
          if (r.val != d) begin failures++; $display("FAIL: load after committed store"); end
        end
      endcase
    end
    // flush while a load waits for a miss
    begin
      dtok_t r; int unsigned lat; int unsigned seen;
      @(negedge clk);
      in_tok = '0; in_tok.valid = 1; in_tok.oc = OC_LOAD; in_tok.c1.val = 32'h7000; in_tok.tag = 5;
      in_valid = 1;
      @(negedge clk); in_valid = 0;
      repeat (3) @(negedge clk);
      flush = 1; @(negedge clk); flush = 0;
      seen = 0;
      repeat (40) begin @(negedge clk); if (out_valid) seen++; end
      checks++;
      if (seen != 0) begin failures++; $display("FAIL: flushed load answered"); end
      launch(OC_LOAD, 32'h10, 0, 0, 9, r, lat);
      checks++;
      if (r.val != model[4] || r.tag != 9) begin failures++; $display("FAIL: load after flush"); end
    end
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

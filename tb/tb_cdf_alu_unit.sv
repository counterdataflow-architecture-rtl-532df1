// tb_cdf_alu_unit: checks the single-cycle integer sidepanel against a
// reference of every operation, with register and immediate operands. Checks
// the one-cycle latency, one result per cycle when the recovery stage is
// always ready, and that a result is held unchanged while the recovery
// stage is not ready.
module tb_cdf_alu_unit;
  import cdf_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  itok_t in_tok = '0;
  dtok_t out_tok;
  int unsigned checks = 0, failures = 0;

  cdf_alu_unit dut (.*);

  function automatic word_t ref_op(logic [3:0] fn, word_t a, word_t b);
    case (fn)
      FN_ADD: return a + b;        FN_SUB: return a - b;
      FN_AND: return a & b;        FN_OR:  return a | b;
      FN_XOR: return a ^ b;
      FN_SLT: return ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
      FN_SLTU: return (a < b) ? 32'd1 : 32'd0;
      FN_SLL: return a << (b % 32); FN_SRL: return a >> (b % 32);
      FN_SRA: return $unsigned($signed(a) >>> (b % 32));
      FN_NOR: return ~(a | b);
      default: return a + b;
    endcase
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      word_t e, a, b;
      logic stall;
      @(negedge clk);
      in_tok = '0;
      in_tok.valid = 1; in_tok.oc = OC_ALU; in_tok.tag = tag_t'(t);
      in_tok.fn = 4'($urandom % 11); in_tok.use_imm = $urandom % 2;
      a = $urandom; b = (t % 3 == 0) ? word_t'($urandom % 40) : $urandom;
      if (t % 7 == 0) a = 32'h8000_0000 | a;
      in_tok.c1.val = a; in_tok.c2.val = b; in_tok.imm = ~b;
      e = ref_op(in_tok.fn, a, in_tok.use_imm ? ~b : b);
      stall = (t % 5 == 0);
      out_ready = !stall;
      in_valid = 1;
      checks++;
      if (!in_ready) begin failures++; $display("FAIL: not ready"); end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || out_tok.val != e || out_tok.tag != tag_t'(t)) begin
        failures++;
        $display("FAIL: fn=%0d a=%h b=%h got %h exp %h", in_tok.fn, a, b, out_tok.val, e);
      end
      if (stall) begin
        @(negedge clk);
        checks++;
        if (!out_valid || out_tok.val != e || in_ready) begin
          failures++; $display("FAIL: result not held");
        end
        out_ready = 1;
      end
    end
    // throughput: 8 back-to-back operations give 8 results in 8 consecutive cycles
    begin
      int unsigned got;
      got = 0;
      out_ready = 1;
      for (int t = 0; t < 8; t++) begin
        @(negedge clk);
        if (out_valid) got++;
        in_valid = 1; in_tok.fn = FN_ADD; in_tok.use_imm = 0; in_tok.c1.val = t; in_tok.c2.val = 1;
      end
      @(negedge clk); if (out_valid) got++;
      in_valid = 0;
      checks++;
      if (got != 8) begin failures++; $display("FAIL: throughput %0d of 8", got); end
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

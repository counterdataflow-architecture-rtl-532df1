// tb_cdf_branch_unit: checks the branch sidepanel: for every condition, with
// both predictions, the result token must carry the correct next pc and flag a
// misprediction exactly when the outcome differs from the prediction. Checks
// the one-cycle latency.
module tb_cdf_branch_unit;
  import cdf_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  itok_t in_tok = '0;
  dtok_t out_tok;
  int unsigned checks = 0, failures = 0, nmisp = 0;

  cdf_branch_unit dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      word_t a, b, npc;
      logic tk;
      @(negedge clk);
      in_tok = '0;
      in_tok.valid = 1; in_tok.oc = OC_BRANCH; in_tok.tag = tag_t'(t);
      in_tok.fn = 4'($urandom % 4);
      a = $urandom % 4; b = $urandom % 4;
      if (t % 3 == 0) a = a | 32'h8000_0000;
      in_tok.c1.val = a; in_tok.c2.val = b;
      in_tok.pc = $urandom % 1000; in_tok.imm = word_t'($signed($urandom % 64) - 32);
      in_tok.pred_taken = $urandom % 2;
      case (in_tok.fn)
        FN_BEQ: tk = a == b;
        FN_BNE: tk = a != b;
        FN_BLT: tk = $signed(a) < $signed(b);
        default: tk = $signed(a) >= $signed(b);
      endcase
      npc = tk ? in_tok.pc + in_tok.imm : in_tok.pc + 1;
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || out_tok.tag != tag_t'(t) || out_tok.misp != (tk != in_tok.pred_taken) ||
          out_tok.addr != npc) begin
        failures++;
        $display("FAIL: fn=%0d a=%h b=%h misp=%0d addr=%0d exp %0d %0d", in_tok.fn, a, b,
                 out_tok.misp, out_tok.addr, tk != in_tok.pred_taken, npc);
      end
      if (out_tok.misp) nmisp++;
    end
    checks++;
    if (nmisp == 0) failures++;
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

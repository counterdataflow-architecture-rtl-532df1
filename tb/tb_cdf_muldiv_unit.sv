// tb_cdf_muldiv_unit: checks the multi-cycle integer sidepanel: multiply,
// signed and unsigned divide and remainder, including division by zero and
// the most negative dividend, against a reference; checks that a multiply
// takes MUL_LAT cycles and a divide XLEN + 2 cycles, and that the unit refuses
// launches while busy.
module tb_cdf_muldiv_unit;
  import cdf_pkg::*;
  localparam int unsigned MUL_LAT = 3;
  logic clk = 0, rst_n = 0, flush = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  itok_t in_tok = '0;
  dtok_t out_tok;
  int unsigned checks = 0, failures = 0;

  cdf_muldiv_unit #(.MUL_LAT(MUL_LAT)) dut (.*);

  function automatic word_t ref_md(logic [3:0] fn, word_t a, word_t b);
    longint sa, sb;
    sa = $signed(a); sb = $signed(b);
    case (fn)
      FN_MUL:  return word_t'(longint'(a) * longint'(b));
      FN_DIVU: return (b == 0) ? '1 : a / b;
      FN_REMU: return (b == 0) ? a : a % b;
      FN_DIV:  return (b == 0) ? '1 : word_t'(sa / sb);
      default: return (b == 0) ? a : word_t'(sa % sb);
    endcase
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      word_t a, b, e;
      int unsigned lat;
      @(negedge clk);
      in_tok = '0;
      in_tok.valid = 1; in_tok.oc = OC_MULDIV; in_tok.tag = tag_t'(t);
      in_tok.fn = 4'($urandom % 5);
      a = $urandom; b = (t % 4 == 0) ? $urandom % 100 : $urandom;
      if (t % 17 == 0) b = 0;
      if (t % 19 == 0) begin a = 32'h8000_0000; b = '1; end
      if (t % 3 == 0) a = $urandom % 1000;
      in_tok.c1.val = a; in_tok.c2.val = b;
      e = ref_md(in_tok.fn, a, b);
      in_valid = 1;
      checks++;
      if (!in_ready) begin failures++; $display("FAIL: not ready"); end
      @(negedge clk);
      in_valid = 0;
      lat = 1;
      while (!out_valid && lat < 100) begin
        checks++;
        if (in_ready) begin failures++; $display("FAIL: ready while busy"); end
        @(negedge clk); lat++;
      end
      checks++;
      if (out_tok.val != e || out_tok.tag != tag_t'(t) ||
          lat != ((in_tok.fn == FN_MUL) ? MUL_LAT : XLEN + 2)) begin
        failures++;
        $display("FAIL: fn=%0d a=%h b=%h got %h exp %h latency %0d", in_tok.fn, a, b, out_tok.val, e, lat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

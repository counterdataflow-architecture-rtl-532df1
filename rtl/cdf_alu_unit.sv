// cdf_alu_unit: single-cycle integer sidepanel ("Fast Int").
//
// Takes an instruction token launched from the pipe, computes the integer
// operation in one cycle and holds the result token in an output register
// until its recovery stage has a free result slot. The operand pair is
// (c1, c2) or (c1, imm) when use_imm is set. A new instruction is accepted
// whenever the output register is empty or is being emptied in the same
// cycle, so back-to-back operations run at one per cycle.
// Interface: launch valid/ready (in_*), recovery valid/ready (out_*).
// Timing: result visible one cycle after launch. The sidepanel's role and its
// single-cycle latency follow the CDF description; the operation set is this
// design's own (the original used the SimpleScalar instruction set).
// Lint note: the unit reads only the fields of the instruction token it
// needs; the other token fields (pc, store sequence, register numbers) are
// unused here by design.
module cdf_alu_unit
  import cdf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  flush,
  input  logic  in_valid,
  output logic  in_ready,
  input  itok_t in_tok,
  output logic  out_valid,
  input  logic  out_ready,
  output dtok_t out_tok
);

  function automatic word_t alu(logic [3:0] fn, word_t a, word_t b);
    case (fn)
      FN_ADD:  return a + b;
      FN_SUB:  return a - b;
      FN_AND:  return a & b;
      FN_OR:   return a | b;
      FN_XOR:  return a ^ b;
      FN_SLT:  return word_t'($signed(a) < $signed(b));
      FN_SLTU: return word_t'(a < b);
      FN_SLL:  return a << b[4:0];
      FN_SRL:  return a >> b[4:0];
      FN_SRA:  return word_t'($signed(a) >>> b[4:0]);
      FN_NOR:  return ~(a | b);
      default: return a + b;
    endcase
  endfunction

  dtok_t q;
  assign in_ready  = !q.valid || out_ready;
  assign out_valid = q.valid;
  assign out_tok   = q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= DTOK_EMPTY;
    else if (flush) q <= DTOK_EMPTY;
    else if (in_ready) begin
      q <= DTOK_EMPTY;
      if (in_valid) begin
        q.valid <= 1'b1;
        q.tag   <= in_tok.tag;
        q.val   <= alu(in_tok.fn, in_tok.c1.val, in_tok.use_imm ? in_tok.imm : in_tok.c2.val);
      end
    end
  end

  // A held result must not change until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n || flush) out_valid && !out_ready |=> out_valid && $stable(out_tok);
  endproperty
  a_hold: assert property (p_hold);

endmodule

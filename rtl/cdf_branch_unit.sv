// cdf_branch_unit: branch sidepanel.
//
// Evaluates a conditional branch (compare c1 with c2), works out the correct
// next pc (pc + imm when taken, pc + 1 otherwise; pc is a word address) and
// compares the outcome with the prediction the fetch unit attached to the
// instruction. The result token carries misp = 1 and the corrected pc in addr
// when the prediction was wrong; the ROB acts on it when the branch commits.
// Interface and timing as cdf_alu_unit: one cycle, output held until the
// recovery stage takes it. A branch unit as a sidepanel is the CDF design's;
// the condition set and the misprediction encoding are this design's own.
// Lint note: fields of the instruction token that a branch does not need
// (store sequence, register numbers) are left unused by design.
module cdf_branch_unit
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

  dtok_t q;
  logic  taken;
  word_t a, b;

  assign a = in_tok.c1.val;
  assign b = in_tok.c2.val;

  always_comb begin
    case (in_tok.fn)
      FN_BEQ:  taken = (a == b);
      FN_BNE:  taken = (a != b);
      FN_BLT:  taken = ($signed(a) < $signed(b));
      FN_BGE:  taken = ($signed(a) >= $signed(b));
      default: taken = 1'b0;
    endcase
  end

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
        q.val   <= word_t'(taken);
        q.misp  <= (taken != in_tok.pred_taken);
        q.addr  <= taken ? in_tok.pc + in_tok.imm : in_tok.pc + 1;
      end
    end
  end

  property p_hold;
    @(posedge clk) disable iff (!rst_n || flush) out_valid && !out_ready |=> out_valid && $stable(out_tok);
  endproperty
  a_hold: assert property (p_hold);

endmodule

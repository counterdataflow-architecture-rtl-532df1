// cdf_muldiv_unit: multi-cycle integer sidepanel ("Slow Integer").
//
// Executes one operation at a time. A multiply returns the low word of the
// product MUL_LAT cycles after launch. Divide and remainder (signed and
// unsigned) use a restoring divider that produces one quotient bit per cycle,
// so they take XLEN + 2 cycles (including the cycles to load the operands and
// to fix the signs). Division by zero gives an all-ones quotient
// and the dividend as remainder. While busy or while its result waits for a
// free result slot the unit refuses launches (in_ready low); the instruction
// then simply stays in the pipe and tries again on a later pass.
// Interface: launch valid/ready, recovery valid/ready, as the other sidepanels.
// A multi-cycle integer sidepanel is the CDF design's; the operation set,
// the latencies and the divider algorithm are this design's own.
// Lint note: the instruction token fields the unit does not need (pc, store
// sequence, register numbers) are left unused by design.
module cdf_muldiv_unit
  import cdf_pkg::*;
#(
  parameter int unsigned MUL_LAT = 3
) (
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

  typedef enum logic [1:0] {S_IDLE, S_MUL, S_DIV, S_DONE} state_e;

  state_e             st;
  tag_t               tag_q;
  logic [3:0]         fn_q;
  logic [7:0]         cnt;
  word_t              res;
  word_t              quo, rem, dvs;
  logic               neg_q, neg_r;
  logic [XLEN:0]      diff;

  word_t a, b;
  logic  sgn;
  assign sgn = (in_tok.fn == FN_DIV || in_tok.fn == FN_REM);
  assign a = in_tok.c1.val;
  assign b = in_tok.use_imm ? in_tok.imm : in_tok.c2.val;

  assign in_ready  = (st == S_IDLE);
  assign out_valid = (st == S_DONE);
  always_comb begin
    out_tok       = DTOK_EMPTY;
    out_tok.valid = (st == S_DONE);
    out_tok.tag   = tag_q;
    out_tok.val   = res;
  end

  // one restoring step: shift the next dividend bit into the remainder
  assign diff = {rem, quo[XLEN-1]} - {1'b0, dvs};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; tag_q <= '0; fn_q <= '0; cnt <= '0; res <= '0;
      quo <= '0; rem <= '0; dvs <= '0; neg_q <= 1'b0; neg_r <= 1'b0;
    end else if (flush) begin
      st <= S_IDLE;
    end else begin
      case (st)
        S_IDLE: if (in_valid) begin
          tag_q <= in_tok.tag;
          fn_q  <= in_tok.fn;
          if (in_tok.fn == FN_MUL) begin
            res <= a * b;
            cnt <= 8'(MUL_LAT - 1);
            st  <= (MUL_LAT <= 1) ? S_DONE : S_MUL;
          end else begin
            quo   <= (sgn && a[XLEN-1]) ? -a : a;
            dvs   <= (sgn && b[XLEN-1]) ? -b : b;
            rem   <= '0;
            neg_q <= sgn && (a[XLEN-1] ^ b[XLEN-1]) && (b != 0);
            neg_r <= sgn && a[XLEN-1];
            cnt   <= 8'(XLEN);
            st    <= S_DIV;
          end
        end
        S_MUL: begin
          cnt <= cnt - 1;
          if (cnt == 8'd1) st <= S_DONE;
        end
        S_DIV: begin
          if (cnt == 0) begin
            if (fn_q == FN_DIV || fn_q == FN_DIVU) res <= neg_q ? -quo : quo;
            else                                   res <= neg_r ? -rem : rem;
            st <= S_DONE;
          end else begin
            cnt <= cnt - 1;
            if (!diff[XLEN]) begin
              rem <= diff[XLEN-1:0];
              quo <= {quo[XLEN-2:0], 1'b1};
            end else begin
              rem <= {rem[XLEN-2:0], quo[XLEN-1]};
              quo <= {quo[XLEN-2:0], 1'b0};
            end
          end
        end
        S_DONE: if (out_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule

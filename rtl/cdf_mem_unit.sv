// cdf_mem_unit: memory sidepanel.
//
// Loads and stores are launched here from the pipe. A load adds its offset to
// its base register, reads the data cache and returns the loaded word in its
// result token; its latency is that of the cache (one cycle on a hit, a line
// fill from the L2 on a miss, 21 cycles with the default sizes). A launched store only computes its address: its
// result token carries the address and the store data to the ROB, and the
// cache is written when the store commits, through the commit port (cst_*),
// so a mispredicted path never changes memory. Committed stores have priority
// over launches. Loads are launched only after every older store has
// committed (the pipe stage enforces this), so a load never needs data from
// an uncommitted store.
// Interface: launch valid/ready, recovery valid/ready, commit-store
// valid/ready, and a request/response port to cdf_dcache. One access at a
// time. A memory sidepanel is the CDF design's; the split of stores into an
// address step and a commit-time write, and the load ordering rule, are this
// design's own (the evaluation lets loads pass a limited number of stores to
// other addresses, which is not done here).
// Lint note: fields of the instruction token that a memory access does not
// need (pc, branch prediction, register numbers) are left unused by design.
module cdf_mem_unit
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
  output dtok_t out_tok,
  // committed stores from the ROB
  input  logic  cst_valid,
  output logic  cst_ready,
  input  word_t cst_addr,
  input  word_t cst_data,
  // data cache
  output logic  dc_valid,
  input  logic  dc_ready,
  output logic  dc_we,
  output word_t dc_addr,
  output word_t dc_wdata,
  input  logic  dc_resp_valid,
  input  word_t dc_resp_rdata
);

  typedef enum logic [1:0] {M_IDLE, M_LOAD, M_DONE} mst_e;

  mst_e  st;
  dtok_t q;
  logic  killed;      // a flushed load is still waiting for its cache answer
  logic  wr_pending;  // a store's cache answer is outstanding
  word_t ea;

  assign ea        = in_tok.c1.val + in_tok.imm;
  assign cst_ready = (st == M_IDLE) && dc_ready && !killed;
  assign in_ready  = (st == M_IDLE) && dc_ready && !cst_valid && !killed;
  assign out_valid = (st == M_DONE);
  assign out_tok   = q;

  always_comb begin
    dc_valid = 1'b0;
    dc_we    = 1'b0;
    dc_addr  = ea;
    dc_wdata = cst_data;
    if (cst_valid && cst_ready) begin
      dc_valid = 1'b1;
      dc_we    = 1'b1;
      dc_addr  = cst_addr;
    end else if (in_valid && in_ready && in_tok.oc == OC_LOAD) begin
      dc_valid = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE; q <= DTOK_EMPTY; killed <= 1'b0; wr_pending <= 1'b0;
    end else begin
      if (dc_valid && dc_we) wr_pending <= 1'b1;
      else if (dc_resp_valid) wr_pending <= 1'b0;
      if (killed && dc_resp_valid && !wr_pending) killed <= 1'b0;
      if (flush) begin
        if (st == M_LOAD && !dc_resp_valid) killed <= 1'b1;
        else if (in_valid && in_ready && in_tok.oc == OC_LOAD) killed <= 1'b1;
        st <= M_IDLE;
        q  <= DTOK_EMPTY;
      end else begin
        case (st)
          M_IDLE: if (!(cst_valid && cst_ready) && in_valid && in_ready) begin
            q       <= DTOK_EMPTY;
            q.valid <= 1'b1;
            q.tag   <= in_tok.tag;
            if (in_tok.oc == OC_STORE) begin
              q.addr <= ea;
              q.val  <= in_tok.c2.val;
              st     <= M_DONE;
            end else begin
              st <= M_LOAD;
            end
          end
          M_LOAD: if (dc_resp_valid) begin
            q.val <= dc_resp_rdata;
            st    <= M_DONE;
          end
          M_DONE: if (out_ready) st <= M_IDLE;
          default: st <= M_IDLE;
        endcase
      end
    end
  end

endmodule

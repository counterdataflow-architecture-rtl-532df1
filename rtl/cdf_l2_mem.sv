// cdf_l2_mem: level-2 memory, used as the main memory of the core.
//
// Every access takes a constant LAT cycles and accesses are pipelined: one
// request may be issued every cycle and its read data returns exactly LAT
// cycles later, in order. Reads sample the array when they are issued;
// writes update it when they are issued and return nothing. The array holds
// WORDS 32-bit words and is word addressed. The constant, pipelined 10-cycle
// access is the CDF evaluation's; the size and the read/write ordering are
// this design's own (the evaluation treats the L2 as always hitting).
module cdf_l2_mem
  import cdf_pkg::*;
#(
  parameter int unsigned LAT   = 10,
  parameter int unsigned WORDS = 16384,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  input  logic          req_we,
  input  logic [AW-1:0] req_addr,
  input  word_t         req_wdata,
  output logic          resp_valid,
  output word_t         resp_rdata
);

  word_t mem [WORDS];
  logic  v_pipe [LAT];
  word_t d_pipe [LAT];

  always_ff @(posedge clk) begin
    if (req_valid && req_we) mem[req_addr] <= req_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin
        v_pipe[i] <= 1'b0;
        d_pipe[i] <= '0;
      end
    end else begin
      v_pipe[0] <= req_valid && !req_we;
      d_pipe[0] <= mem[req_addr];
      for (int i = 1; i < LAT; i++) begin
        v_pipe[i] <= v_pipe[i-1];
        d_pipe[i] <= d_pipe[i-1];
      end
    end
  end

  assign resp_valid = v_pipe[LAT-1];
  assign resp_rdata = d_pipe[LAT-1];

endmodule

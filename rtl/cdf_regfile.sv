// cdf_regfile: architectural register file of the CounterDataFlow core.
//
// NREGS registers of XLEN bits (32 integer and 32 floating-point registers in
// one space); register 0 always reads as zero. It sits next to the ROB at the
// bottom of the pipe and is written only by committing instructions, up to NW
// per cycle (a later port wins if two write the same register). NR
// combinational read ports serve the decode unit. All registers reset to zero.
// Its place at the bottom of the pipe is the CDF design's; size and port
// counts are this design's own.
module cdf_regfile
  import cdf_pkg::*;
#(
  parameter int unsigned NR = 4,
  parameter int unsigned NW = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  we    [NW],
  input  reg_t  waddr [NW],
  input  word_t wdata [NW],
  input  reg_t  raddr [NR],
  output word_t rdata [NR]
);

  word_t regs [NREGS];

  for (genvar i = 0; i < NR; i++) begin : g_rd
    assign rdata[i] = (raddr[i] == '0) ? '0 : regs[raddr[i]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      for (int k = 0; k < NW; k++)
        if (we[k] && waddr[k] != '0) regs[waddr[k]] <= wdata[k];
    end
  end

endmodule

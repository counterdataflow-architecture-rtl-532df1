// cdf_tagtable: "last modified by" table of the CounterDataFlow core.
//
// For each architectural register it records whether an instruction in the
// ROB will write it and, if so, that instruction's ROB entry (its tag). The
// decode unit reads it to give each consumer the tag of its producer, and
// writes it (up to NS ports per cycle, a later port wins) for every newly
// issued instruction with a destination. When an instruction commits, its
// register is marked free again unless a younger writer has since taken it
// over (the stored tag no longer matches). On a misprediction flush every
// older instruction has already committed, so the whole table is cleared.
// This table, kept beside the register file so that the ROB can be indexed
// instead of searched, follows the segmented-ROB description; its exact update
// rules are this design's own.
module cdf_tagtable
  import cdf_pkg::*;
#(
  parameter int unsigned NR = 4,
  parameter int unsigned NS = 2,
  parameter int unsigned NC = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic flush,
  input  logic set_en   [NS],
  input  reg_t set_reg  [NS],
  input  tag_t set_tag  [NS],
  input  logic clr_en   [NC],
  input  reg_t clr_reg  [NC],
  input  tag_t clr_tag  [NC],
  input  reg_t rd_reg   [NR],
  output logic rd_busy  [NR],
  output tag_t rd_tag   [NR]
);

  logic busy [NREGS];
  tag_t tags [NREGS];

  for (genvar i = 0; i < NR; i++) begin : g_rd
    assign rd_busy[i] = busy[rd_reg[i]];
    assign rd_tag[i]  = tags[rd_reg[i]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) begin
        busy[i] <= 1'b0;
        tags[i] <= '0;
      end
    end else if (flush) begin
      for (int i = 0; i < NREGS; i++) busy[i] <= 1'b0;
    end else begin
      for (int k = 0; k < NC; k++)
        if (clr_en[k] && busy[clr_reg[k]] && tags[clr_reg[k]] == clr_tag[k])
          busy[clr_reg[k]] <= 1'b0;
      for (int k = 0; k < NS; k++)
        if (set_en[k]) begin
          busy[set_reg[k]] <= 1'b1;
          tags[set_reg[k]] <= set_tag[k];
        end
    end
  end

endmodule

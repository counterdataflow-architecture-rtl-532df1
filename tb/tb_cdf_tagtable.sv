// tb_cdf_tagtable: checks the "last modified by" table: a register set by an
// issuing instruction reads busy with its tag; a commit frees it only while
// the tag still matches (a younger writer keeps it busy); a later set port
// wins; flush frees everything. Compared against a reference model.
module tb_cdf_tagtable;
  import cdf_pkg::*;
  localparam int unsigned NR = 4, NS = 2, NC = 2;
  logic clk = 0, rst_n = 0, flush = 0;
  always #5 clk = ~clk;
  logic set_en [NS]; reg_t set_reg [NS]; tag_t set_tag [NS];
  logic clr_en [NC]; reg_t clr_reg [NC]; tag_t clr_tag [NC];
  reg_t rd_reg [NR]; logic rd_busy [NR]; tag_t rd_tag [NR];
  logic m_busy [NREGS]; tag_t m_tag [NREGS];
  int unsigned checks = 0, failures = 0;

  cdf_tagtable #(.NR(NR), .NS(NS), .NC(NC)) dut (.*);

  initial begin
    for (int i = 0; i < NREGS; i++) begin m_busy[i] = 0; m_tag[i] = 0; end
    for (int k = 0; k < NS; k++) begin set_en[k] = 0; set_reg[k] = 0; set_tag[k] = 0; end
    for (int k = 0; k < NC; k++) begin clr_en[k] = 0; clr_reg[k] = 0; clr_tag[k] = 0; end
    for (int k = 0; k < NR; k++) rd_reg[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      flush = ($urandom % 50 == 0);
      for (int k = 0; k < NS; k++) begin
        set_en[k] = $urandom % 2; set_reg[k] = reg_t'($urandom % 6); set_tag[k] = tag_t'($urandom % 8);
      end
      for (int k = 0; k < NC; k++) begin
        clr_en[k] = $urandom % 2; clr_reg[k] = reg_t'($urandom % 6);
        clr_tag[k] = ($urandom % 2) ? m_tag[clr_reg[k]] : tag_t'($urandom % 8);
      end
      @(posedge clk);
      if (flush) for (int i = 0; i < NREGS; i++) m_busy[i] = 0;
      else begin
        for (int k = 0; k < NC; k++)
          if (clr_en[k] && m_busy[clr_reg[k]] && m_tag[clr_reg[k]] == clr_tag[k]) m_busy[clr_reg[k]] = 0;
        for (int k = 0; k < NS; k++)
          if (set_en[k]) begin m_busy[set_reg[k]] = 1; m_tag[set_reg[k]] = set_tag[k]; end
      end
      @(negedge clk);
      flush = 0;
      for (int k = 0; k < NS; k++) set_en[k] = 0;
      for (int k = 0; k < NC; k++) clr_en[k] = 0;
      for (int k = 0; k < NR; k++) rd_reg[k] = reg_t'($urandom % 6);
      #1;
      for (int k = 0; k < NR; k++) begin
        checks++;
        if (rd_busy[k] != m_busy[rd_reg[k]] || (m_busy[rd_reg[k]] && rd_tag[k] != m_tag[rd_reg[k]])) begin
          failures++;
          $display("FAIL: r%0d busy=%0d tag=%0d, expected %0d %0d", rd_reg[k], rd_busy[k], rd_tag[k],
                   m_busy[rd_reg[k]], m_tag[rd_reg[k]]);
        end
      end
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

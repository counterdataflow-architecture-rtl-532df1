// cdf_dcache: level-1 data cache, 16 KB, 4-way set associative, 32-byte lines.
//
// One request at a time (req_ready low while busy). Addresses are byte
// addresses; accesses are whole 32-bit words (the two low address bits are
// ignored). A load that hits answers on the next cycle (single-cycle access).
// A load that misses fetches the 8 words of its line from the L2 with 8
// pipelined reads, one per cycle, fills the victim way and then answers,
// LW + L2 latency + 3 cycles after the request (21 cycles by default).
// Stores are write-through without allocation: the word is updated if the line
// is present and the store is always sent to the L2; a store answers on the
// next cycle. Replacement uses a 3-bit tree pseudo-LRU per set, the scheme of
// the i486 cache, after taking any invalid way first.
// Interface: req_valid/req_ready, then one resp_valid pulse per request; the
// L2 side is a pipelined port with a fixed latency (cdf_l2_mem).
// Size, associativity, line size, hit time and an i486-like replacement follow
// the CDF evaluation; the write policy and the miss sequencing are this
// design's own.
// Lint note: the two lowest address bits select a byte within the word;
// accesses are whole words, so those bits are unused by design.
module cdf_dcache
  import cdf_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 16384,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned L2_AW      = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_valid,
  output logic             req_ready,
  input  logic             req_we,
  input  word_t            req_addr,
  input  word_t            req_wdata,
  output logic             resp_valid,
  output word_t            resp_rdata,
  output logic             resp_hit,     // for statistics
  // L2 port
  output logic             l2_valid,
  output logic             l2_we,
  output logic [L2_AW-1:0] l2_addr,
  output word_t            l2_wdata,
  input  logic             l2_resp_valid,
  input  word_t            l2_resp_rdata
);

  localparam int unsigned LW     = LINE_BYTES / 4;               // words per line
  localparam int unsigned SETS   = SIZE_BYTES / (WAYS * LINE_BYTES);
  localparam int unsigned OFF_W  = $clog2(LINE_BYTES);
  localparam int unsigned IDX_W  = $clog2(SETS);
  localparam int unsigned WO_W   = $clog2(LW);
  localparam int unsigned TAG_BITS = XLEN - OFF_W - IDX_W;

  typedef enum logic [1:0] {C_IDLE, C_MISS, C_RESP} cst_e;

  word_t                  data  [WAYS][SETS*LW];
  logic [TAG_BITS-1:0]    tags  [WAYS][SETS];
  logic [WAYS-1:0]        vbits [SETS];
  logic [2:0]             plru  [SETS];

  cst_e                   st;
  word_t                  m_addr;
  logic [1:0]             m_way;
  logic [WO_W:0]          issued, got;

  logic [IDX_W-1:0]       idx;
  logic [TAG_BITS-1:0]    tg;
  logic [WO_W-1:0]        wo;
  logic                   hit;
  logic [1:0]             hway;

  assign idx = req_addr[OFF_W +: IDX_W];
  assign tg  = req_addr[XLEN-1 -: TAG_BITS];
  assign wo  = req_addr[2 +: WO_W];

  always_comb begin
    hit  = 1'b0;
    hway = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!hit && vbits[idx][w] && tags[w][idx] == tg) begin
        hit  = 1'b1;
        hway = 2'(w);
      end
    end
  end

  function automatic logic [2:0] plru_touch(logic [2:0] b, logic [1:0] w);
    logic [2:0] n = b;
    n[0] = ~w[1];                 // point the root at the other half
    if (!w[1]) n[1] = ~w[0];
    else       n[2] = ~w[0];
    return n;
  endfunction

  function automatic logic [1:0] victim(logic [WAYS-1:0] v, logic [2:0] b);
    for (int w = 0; w < WAYS; w++) if (!v[w]) return 2'(w);
    if (!b[0]) return {1'b0, b[1]};
    else       return {1'b1, b[2]};
  endfunction

  logic [IDX_W-1:0]    m_idx;
  logic [WO_W-1:0]     m_wo;
  assign m_idx = m_addr[OFF_W +: IDX_W];
  assign m_wo  = m_addr[2 +: WO_W];

  assign req_ready = (st == C_IDLE);

  // L2 requests: a write-through store, or the reads of a line fill
  always_comb begin
    l2_valid = 1'b0;
    l2_we    = 1'b0;
    l2_addr  = '0;
    l2_wdata = req_wdata;
    if (st == C_IDLE && req_valid && req_we) begin
      l2_valid = 1'b1;
      l2_we    = 1'b1;
      l2_addr  = req_addr[2 +: L2_AW];
    end else if (st == C_MISS && issued < (WO_W+1)'(LW)) begin
      l2_valid = 1'b1;
      l2_addr  = L2_AW'({m_addr[XLEN-1:OFF_W], issued[WO_W-1:0]});
    end
  end

  always_ff @(posedge clk) begin
    if (st == C_IDLE && req_valid && req_we && hit)
      data[hway][{idx, wo}] <= req_wdata;
    if (st == C_MISS && l2_resp_valid)
      data[m_way][{m_idx, got[WO_W-1:0]}] <= l2_resp_rdata;
    if (st == C_MISS && got == (WO_W+1)'(LW))
      tags[m_way][m_idx] <= m_addr[XLEN-1 -: TAG_BITS];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= C_IDLE;
      m_addr     <= '0;
      m_way      <= '0;
      issued     <= '0;
      got        <= '0;
      resp_valid <= 1'b0;
      resp_rdata <= '0;
      resp_hit   <= 1'b0;
      for (int s = 0; s < SETS; s++) begin
        vbits[s] <= '0;
        plru[s]  <= '0;
      end
    end else begin
      resp_valid <= 1'b0;
      case (st)
        C_IDLE: if (req_valid) begin
          if (req_we) begin
            resp_valid <= 1'b1;
            resp_hit   <= hit;
            if (hit) plru[idx] <= plru_touch(plru[idx], hway);
          end else if (hit) begin
            resp_valid <= 1'b1;
            resp_hit   <= 1'b1;
            resp_rdata <= data[hway][{idx, wo}];
            plru[idx]  <= plru_touch(plru[idx], hway);
          end else begin
            st     <= C_MISS;
            m_addr <= req_addr;
            m_way  <= victim(vbits[idx], plru[idx]);
            issued <= '0;
            got    <= '0;
            vbits[idx][victim(vbits[idx], plru[idx])] <= 1'b0;
          end
        end
        C_MISS: begin
          if (issued < (WO_W+1)'(LW)) issued <= issued + 1;
          if (l2_resp_valid) got <= got + 1;
          if (got == (WO_W+1)'(LW)) begin
            vbits[m_idx][m_way] <= 1'b1;
            plru[m_idx]         <= plru_touch(plru[m_idx], m_way);
            st                  <= C_RESP;
          end
        end
        C_RESP: begin
          resp_valid <= 1'b1;
          resp_hit   <= 1'b0;
          resp_rdata <= data[m_way][{m_idx, m_wo}];
          st         <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

endmodule

// viterbi_decoder: hard-decision Viterbi decoder for the rate-1/2 codes of
// conv_encoder (Wi-Fi K=7, 2G K=5, 3G K=9). It is organised as the document's
// units: a branch metric unit (Hamming distance of the received pair to each
// branch label, the two-bit AND/XOR distance calculator), an add-compare-
// select path metric unit updating all 2^(K-1) states in one cycle, a metric
// memory (register array) and a survivor memory written every step, and a
// trace-back unit. A block is L = N + K - 1 trellis steps ending in state 0.
// After the last pair, trace-back runs backwards from state 0 for L cycles,
// then the N data bits are sent one per cycle (tail bits are dropped).
// busy is high from the end of the block until the last bit left; inputs
// are ignored meanwhile. in_erase marks re-inserted punctured bits, which add
// no distance. Ties choose predecessor 0. Trace-back over the whole block
// (rather than a sliding window) is this design's choice.
module viterbi_decoder #(
  parameter int           K  = 7,
  parameter logic [K-1:0] G0 = 7'b1101101,
  parameter logic [K-1:0] G1 = 7'b1001111,
  parameter int           N  = 48
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [1:0] in_pair,    // {a, b}
  input  logic [1:0] in_erase,
  output logic       out_valid,
  output logic       out_bit,
  output logic       busy
);
  localparam int NS  = 1 << (K - 1);
  localparam int L   = N + K - 1;
  localparam int PMW = $clog2(2 * L + 2) + 2;
  localparam int CW  = $clog2(L + 1);
  localparam logic [PMW-1:0] INF = PMW'(2 * L + 1);

  typedef enum logic [1:0] {S_ACS, S_TRACE, S_OUT} state_e;
  state_e st;

  logic [PMW-1:0] pm [NS];
  logic [NS-1:0]  surv [L];
  logic [N-1:0]   dec;
  logic [CW-1:0]  t;
  logic [K-2:0]   tb_state;

  logic [PMW-1:0] pm_next [NS];
  logic [NS-1:0]  sel_next;

  // Branch metric: distance of the received pair to label {a,b}; bit 1 is
  // AND, bit 0 is XOR of the per-bit mismatches.
  function automatic logic [1:0] bm(input logic [1:0] rx, input logic [1:0] er,
                                    input logic [1:0] lbl);
    logic [1:0] e;
    e = (rx ^ lbl) & ~er;
    return {e[1] & e[0], e[1] ^ e[0]};
  endfunction

  function automatic logic [1:0] label(input logic [K-2:0] s, input logic u);
    logic [K-1:0] w;
    w = {s, u};
    return {^(G0 & w), ^(G1 & w)};
  endfunction

  always_comb begin
    for (int ns = 0; ns < NS; ns++) begin
      logic [K-2:0] p0, p1, nsv;
      logic [PMW-1:0] m0, m1;
      nsv = (K-1)'(ns);
      p0 = {1'b0, nsv[K-2:1]};
      p1 = {1'b1, nsv[K-2:1]};
      m0 = pm[p0] + PMW'(bm(in_pair, in_erase, label(p0, nsv[0])));
      m1 = pm[p1] + PMW'(bm(in_pair, in_erase, label(p1, nsv[0])));
      sel_next[ns] = (m1 < m0);
      pm_next[ns]  = (m1 < m0) ? m1 : m0;
    end
  end

  assign busy = (st != S_ACS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_ACS; t <= '0; tb_state <= '0; out_valid <= 1'b0; out_bit <= 1'b0;
      dec <= '0;
      for (int s = 0; s < NS; s++) pm[s] <= (s == 0) ? '0 : INF;
    end else begin
      out_valid <= 1'b0;
      unique case (st)
        S_ACS: if (in_valid) begin
          for (int s = 0; s < NS; s++) pm[s] <= pm_next[s];
          surv[t] <= sel_next;
          if (t == CW'(L - 1)) begin
            st <= S_TRACE; tb_state <= '0;
          end else begin
            t <= t + 1'b1;
          end
        end
        S_TRACE: begin
          if (t < CW'(N)) dec[t] <= tb_state[0];
          tb_state <= {surv[t][tb_state], tb_state[K-2:1]};
          if (t == 0) st <= S_OUT;
          else        t  <= t - 1'b1;
        end
        default: begin  // S_OUT
          out_valid <= 1'b1;
          out_bit   <= dec[t];
          if (t == CW'(N - 1)) begin
            st <= S_ACS; t <= '0;
            for (int s = 0; s < NS; s++) pm[s] <= (s == 0) ? '0 : INF;
          end else begin
            t <= t + 1'b1;
          end
        end
      endcase
    end
  end
endmodule

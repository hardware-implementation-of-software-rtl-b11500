// psk_demapper: BPSK / QPSK demapper. The hard decision of a bit is the sign
// of its component (negative -> 1); the soft output is the component itself
// (positive favours 0), the soft value the LTE receiver passes on to its
// soft descrambler. BPSK uses I+Q, QPSK sends the I bit then the Q bit on two
// consecutive cycles. Decision regions follow the document's mapping tables;
// the soft value is this design's simple stand-in for a log-likelihood.
module psk_demapper
  import sdr_pkg::*;
#(
  parameter bit QPSK = 1'b1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_i,
  input  sample_t in_q,
  output logic    out_valid,
  output logic    out_bit,
  output sample_t out_soft
);
  logic    pend;
  sample_t held;
  sample_t sum;
  assign sum = sample_t'((in_i >>> 1) + (in_q >>> 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= 1'b0; held <= '0; out_valid <= 1'b0; out_bit <= 1'b0; out_soft <= '0;
    end else begin
      out_valid <= 1'b0;
      if (pend) begin
        out_valid <= 1'b1; out_bit <= held[SAMPLE_W-1]; out_soft <= held; pend <= 1'b0;
      end
      if (in_valid) begin
        out_valid <= 1'b1;
        if (!QPSK) begin
          out_bit <= sum[SAMPLE_W-1]; out_soft <= sum;
        end else begin
          out_bit <= in_i[SAMPLE_W-1]; out_soft <= in_i;
          held <= in_q; pend <= 1'b1;
        end
      end
    end
  end
endmodule

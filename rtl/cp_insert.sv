// cp_insert: cyclic prefix insertion for an OFDM / SC-FDMA symbol of NFFT
// complex samples. A symbol is written into one bank of a two-bank memory;
// once complete, the last CP samples are sent first, then all NFFT samples,
// one every PACE cycles. The next symbol may be written
// meanwhile. NFFT=128 with an extended prefix of 32 is the document's LTE
// choice; the buffering is this design's.
module cp_insert
  import sdr_pkg::*;
#(
  parameter int NFFT = 128,
  parameter int CP   = 32,
  parameter int PACE = 1      // cycles between output samples
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_i,
  input  sample_t in_q,
  output logic    out_valid,
  output sample_t out_i,
  output sample_t out_q
);
  localparam int AW = $clog2(NFFT);
  localparam int OW = $clog2(NFFT + CP);
  sample_t mi [2][NFFT];
  sample_t mq [2][NFFT];
  logic [1:0] full;
  logic wbank, rbank;
  logic [AW-1:0] wcnt;
  logic [OW-1:0] ocnt;
  logic [AW-1:0] raddr;
  logic [$clog2(PACE+1)-1:0] gap;
  assign raddr = (ocnt < OW'(CP)) ? AW'(NFFT - CP + int'(ocnt)) : AW'(int'(ocnt) - CP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; wbank <= 1'b0; rbank <= 1'b0; wcnt <= '0; ocnt <= '0; gap <= '0;
      out_valid <= 1'b0; out_i <= '0; out_q <= '0;
    end else begin
      out_valid <= 1'b0;
      if (gap != 0) gap <= gap - 1'b1;
      if (in_valid) begin
        mi[wbank][wcnt] <= in_i;
        mq[wbank][wcnt] <= in_q;
        if (wcnt == AW'(NFFT - 1)) begin wcnt <= '0; full[wbank] <= 1'b1; wbank <= ~wbank; end
        else wcnt <= wcnt + 1'b1;
      end
      if (full[rbank] && gap == 0) begin
        gap       <= ($clog2(PACE+1))'(PACE - 1);
        out_valid <= 1'b1;
        out_i <= mi[rbank][raddr];
        out_q <= mq[rbank][raddr];
        if (ocnt == OW'(NFFT + CP - 1)) begin ocnt <= '0; full[rbank] <= 1'b0; rbank <= ~rbank; end
        else ocnt <= ocnt + 1'b1;
      end
    end
  end
endmodule

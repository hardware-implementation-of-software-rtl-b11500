// wifi_interleaver: Wi-Fi block interleaver (DEINT=0) or deinterleaver
// (DEINT=1) over one OFDM symbol of NCBPS coded bits.
// Interleaver: bit k goes to position j, where
//   i = (NCBPS/16)(k mod 16) + floor(k/16)
//   j = s*floor(i/s) + (i + NCBPS - floor(16 i / NCBPS)) mod s,  s = max(NBPSC/2,1)
// Deinterleaver: received bit j goes to position e, where
//   d = s*floor(j/s) + (j + floor(16 j / NCBPS)) mod s
//   e = 16 d - (NCBPS - 1) floor(16 d / NCBPS).
// Bits are written at the computed address of one of two banks (ping-pong)
// and read out in order once the bank is full, one bit per cycle while
// out_ready is high. overflow flags a write into a bank not yet read out.
// The equations are the document's; the two-bank buffer and the ready
// handshake are this design's choice (the document computes the addresses
// with DSP blocks and stores in BRAM).
module wifi_interleaver #(
  parameter int NCBPS = 48,
  parameter int NBPSC = 1,
  parameter bit DEINT = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  input  logic out_ready,
  output logic out_valid,
  output logic out_bit,
  output logic overflow
);
  localparam int S  = (NBPSC / 2 > 1) ? NBPSC / 2 : 1;
  localparam int AW = $clog2(NCBPS);

  function automatic int perm(input int k);
    int i, j, d;
    if (!DEINT) begin
      i = (NCBPS / 16) * (k % 16) + k / 16;
      j = S * (i / S) + (i + NCBPS - (16 * i) / NCBPS) % S;
      return j;
    end else begin
      d = S * (k / S) + (k + (16 * k) / NCBPS) % S;
      return 16 * d - (NCBPS - 1) * ((16 * d) / NCBPS);
    end
  endfunction

  logic mem [2][NCBPS];
  logic [1:0] full;
  logic wbank, rbank;
  logic [AW-1:0] wcnt, rcnt;
  logic [AW-1:0] waddr;
  assign waddr = AW'(perm(int'(wcnt)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; wbank <= 1'b0; rbank <= 1'b0; wcnt <= '0; rcnt <= '0;
      out_valid <= 1'b0; out_bit <= 1'b0; overflow <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      overflow  <= 1'b0;
      if (in_valid) begin
        mem[wbank][waddr] <= in_bit;
        if (full[wbank]) overflow <= 1'b1;
        if (wcnt == AW'(NCBPS - 1)) begin
          wcnt <= '0; full[wbank] <= 1'b1; wbank <= ~wbank;
        end else begin
          wcnt <= wcnt + 1'b1;
        end
      end
      if (full[rbank] && out_ready) begin
        out_valid <= 1'b1;
        out_bit   <= mem[rbank][rcnt];
        if (rcnt == AW'(NCBPS - 1)) begin
          rcnt <= '0; full[rbank] <= 1'b0; rbank <= ~rbank;
        end else begin
          rcnt <= rcnt + 1'b1;
        end
      end
    end
  end
endmodule

// psk_mapper: BPSK / QPSK mapper to I/Q samples with amplitude 1/sqrt(2).
// QPSK=0 (BPSK): one bit per symbol, 0 -> (+,+), 1 -> (-,-).
// QPSK=1: two serial bits per symbol, the first sets the sign of I and the
// second the sign of Q (00 -> (+,+), 01 -> (+,-), 10 -> (-,+), 11 -> (-,-)).
// A symbol appears the cycle after its last bit. Tables are the document's
// Wi-Fi tables; the same mapper serves the 3G BPSK and LTE QPSK mappers.
module psk_mapper
  import sdr_pkg::*;
#(
  parameter bit QPSK = 1'b1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  logic    in_bit,
  output logic    out_valid,
  output sample_t out_i,
  output sample_t out_q
);
  logic half, first;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half <= 1'b0; first <= 1'b0; out_valid <= 1'b0; out_i <= '0; out_q <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (!QPSK) begin
          out_valid <= 1'b1;
          out_i <= in_bit ? -INV_SQRT2 : INV_SQRT2;
          out_q <= in_bit ? -INV_SQRT2 : INV_SQRT2;
        end else if (!half) begin
          first <= in_bit; half <= 1'b1;
        end else begin
          half <= 1'b0;
          out_valid <= 1'b1;
          out_i <= first  ? -INV_SQRT2 : INV_SQRT2;
          out_q <= in_bit ? -INV_SQRT2 : INV_SQRT2;
        end
      end
    end
  end
endmodule

// gsm_diff_decoder: 2G differential decoding, the inverse of
// gsm_diff_encoder: the received bit is turned back into dhat (NOT alpha)
// and XORed with the previous received dhat to give d, so one wrong
// received bit corrupts at most two decoded bits. One output per input,
// registered; previous value 0 after reset or `clear`.
module gsm_diff_decoder (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_valid,
  output logic out_bit
);
  logic prev;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev <= 1'b0; out_valid <= 1'b0; out_bit <= 1'b0;
    end else begin
      out_valid <= in_valid & ~clear;
      if (clear) prev <= 1'b0;
      else if (in_valid) begin
        prev    <= ~in_bit;
        out_bit <= ~in_bit ^ prev;
      end
    end
  end
endmodule

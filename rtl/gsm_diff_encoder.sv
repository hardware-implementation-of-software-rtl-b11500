// gsm_diff_encoder: 2G differential encoding ahead of GMSK,
// dhat_i = d_i XOR dhat_(i-1) and alpha_i = 1 - dhat_i (as a bit, alpha =
// NOT dhat). One output per input, registered. The running value is 0 after
// reset or `clear`. The XOR with the previous *encoded* bit is the reading
// that matches the receiver, which only XORs two consecutive received bits,
// so a channel error affects two decoded bits instead of propagating.
module gsm_diff_encoder (
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
        prev    <= in_bit ^ prev;
        out_bit <= ~(in_bit ^ prev);
      end
    end
  end
endmodule

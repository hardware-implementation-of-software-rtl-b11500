// repetition_decoder: Bluetooth header rate-1/3 decoder. Three received bits
// are gathered serial-to-parallel and the decoded bit is their majority,
// output the cycle after the third bit arrives. The majority rule is the
// document's; the counter framing is this design's.
module repetition_decoder (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_valid,
  output logic out_bit
);
  logic [1:0] cnt;
  logic [1:0] held;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; held <= '0; out_valid <= 1'b0; out_bit <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (cnt == 2'd2) begin
          cnt       <= '0;
          out_valid <= 1'b1;
          out_bit   <= (held[0] & held[1]) | (held[0] & in_bit) | (held[1] & in_bit);
        end else begin
          held[cnt[0]] <= in_bit;
          cnt <= cnt + 2'd1;
        end
      end
    end
  end
endmodule

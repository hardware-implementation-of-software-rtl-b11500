// puncture: parallel-to-serial conversion of the encoder's {a,b} pairs with
// optional puncturing. PUNCT=0 sends a then b for every pair (rate 1/2).
// PUNCT=1 applies the Wi-Fi rate-3/4 pattern over three pairs
// (a0 b0 a1 b1 a2 b2 -> a0 b0 a1 b2): the stolen bits b1 and a2 are not sent.
// A pair may arrive at most every second cycle; its first bit leaves the
// cycle after it arrives and the second bit the cycle after that. The
// document implements the pattern with an address-controlled BRAM; here a
// phase counter does the same selection.
module puncture #(
  parameter bit PUNCT = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [1:0] in_pair,   // {a, b}
  output logic       out_valid,
  output logic       out_bit
);
  logic [1:0] phase;
  logic       pend, pend_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0; pend <= 1'b0; pend_bit <= 1'b0; out_valid <= 1'b0; out_bit <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (pend) begin
        out_valid <= 1'b1;
        out_bit   <= pend_bit;
        pend      <= 1'b0;
      end
      if (in_valid) begin
        if (!PUNCT || phase == 2'd0) begin
          out_valid <= 1'b1; out_bit <= in_pair[1];
          pend <= 1'b1;      pend_bit <= in_pair[0];
        end else if (phase == 2'd1) begin
          out_valid <= 1'b1; out_bit <= in_pair[1];
        end else begin
          out_valid <= 1'b1; out_bit <= in_pair[0];
        end
        if (PUNCT) phase <= (phase == 2'd2) ? 2'd0 : phase + 2'd1;
      end
    end
  end
endmodule

// lfsr_scrambler: additive scrambler with generator x^7 + x^4 + 1. It is the
// Bluetooth whitening/dewhitening circuit and the Wi-Fi scrambler and
// descrambler: each data bit is XORed with x^7 XOR x^4 of a 7-bit shift
// register, and that same feedback bit is shifted into the register. The
// same circuit undoes itself when started from the same seed. `load` (one
// cycle, no data that cycle) writes SEED/seed into the register; out_bit is
// registered, one cycle after in_valid. The seed value and load port are this
// design's choice; the polynomial is the document's.
module lfsr_scrambler (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [6:0] seed,
  input  logic       in_valid,
  input  logic       in_bit,
  output logic       out_valid,
  output logic       out_bit
);
  logic [7:1] x;          // x[1] newest, x[7] oldest
  logic       fb;
  assign fb = x[7] ^ x[4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= 7'h7F; out_valid <= 1'b0; out_bit <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (load) begin
        x <= seed;
      end else if (in_valid) begin
        x         <= {x[6:1], fb};
        out_valid <= 1'b1;
        out_bit   <= in_bit ^ fb;
      end
    end
  end
endmodule

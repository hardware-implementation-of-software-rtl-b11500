// depuncture: serial-to-parallel regrouping of received coded bits into
// {a,b} pairs for the Viterbi decoder, re-inserting the bits the transmitter
// stole. A re-inserted bit is a dummy zero and is flagged in out_erase so the
// decoder's branch metric ignores it. PUNCT=0: every two bits form a pair.
// PUNCT=1 (rate 3/4): received a0 b0 a1 b2 become pairs (a0,b0) (a1,-) (-,b2).
// A pair leaves one cycle after its last received bit. The erasure flag is
// this design's choice (the document inserts plain dummy zeros).
module depuncture #(
  parameter bit PUNCT = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_bit,
  output logic       out_valid,
  output logic [1:0] out_pair,   // {a, b}
  output logic [1:0] out_erase   // {a erased, b erased}
);
  logic [1:0] phase;
  logic       held;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0; held <= 1'b0; out_valid <= 1'b0; out_pair <= '0; out_erase <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        unique case (phase)
          2'd0: begin held <= in_bit; phase <= 2'd1; end
          2'd1: begin
            out_valid <= 1'b1; out_pair <= {held, in_bit}; out_erase <= 2'b00;
            phase <= PUNCT ? 2'd2 : 2'd0;
          end
          2'd2: begin
            out_valid <= 1'b1; out_pair <= {in_bit, 1'b0}; out_erase <= 2'b01;
            phase <= 2'd3;
          end
          default: begin
            out_valid <= 1'b1; out_pair <= {1'b0, in_bit}; out_erase <= 2'b10;
            phase <= 2'd0;
          end
        endcase
      end
    end
  end
endmodule

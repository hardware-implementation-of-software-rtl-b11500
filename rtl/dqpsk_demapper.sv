// dqpsk_demapper: Bluetooth DQPSK demapper. Each received I/Q symbol is
// sliced to the nearest multiple of pi/4 (on an axis when the smaller
// magnitude is below 0.4 of the larger, otherwise on a diagonal, quadrant
// from the signs); the difference to the previous symbol's phase is turned
// back into two bits with the inverse of the mapper's table and sent on two
// consecutive cycles. The reference phase is 0 after reset or `clear`.
// Table inverse is the document's; the slicer is this design's.
module dqpsk_demapper
  import sdr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  input  logic    in_valid,
  input  sample_t in_i,
  input  sample_t in_q,
  output logic    out_valid,
  output logic    out_bit
);
  logic [2:0] prev, ph;
  logic       pend, pend_bit;
  logic [SAMPLE_W:0] ai, aq;

  assign ai = in_i[SAMPLE_W-1] ? -(SAMPLE_W+1)'(in_i) : (SAMPLE_W+1)'(in_i);
  assign aq = in_q[SAMPLE_W-1] ? -(SAMPLE_W+1)'(in_q) : (SAMPLE_W+1)'(in_q);

  always_comb begin
    if (5 * aq < 2 * ai)      ph = in_i[SAMPLE_W-1] ? 3'd4 : 3'd0;
    else if (5 * ai < 2 * aq) ph = in_q[SAMPLE_W-1] ? 3'd6 : 3'd2;
    else unique case ({in_i[SAMPLE_W-1], in_q[SAMPLE_W-1]})
      2'b00: ph = 3'd1;
      2'b10: ph = 3'd3;
      2'b11: ph = 3'd5;
      default: ph = 3'd7;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev <= '0; pend <= 1'b0; pend_bit <= 1'b0; out_valid <= 1'b0; out_bit <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (pend) begin
        out_valid <= 1'b1; out_bit <= pend_bit; pend <= 1'b0;
      end
      if (clear) begin
        prev <= '0;
      end else if (in_valid) begin
        logic [2:0] d;
        d = ph - prev;
        prev <= ph;
        out_valid <= 1'b1;
        unique case (d)
          3'd1:    begin out_bit <= 1'b0; pend_bit <= 1'b0; end
          3'd3:    begin out_bit <= 1'b0; pend_bit <= 1'b1; end
          3'd5:    begin out_bit <= 1'b1; pend_bit <= 1'b1; end
          default: begin out_bit <= 1'b1; pend_bit <= 1'b0; end
        endcase
        pend <= 1'b1;
      end
    end
  end
endmodule

// dqpsk_mapper: Bluetooth differential QPSK mapper, S_k = S_(k-1) e^(j phi_k).
// Two serial bits (b_(2k-1) first) choose the phase step phi_k:
// 00 -> +pi/4, 01 -> +3pi/4, 11 -> -3pi/4, 10 -> -pi/4. The running phase is
// kept as a 3-bit multiple of pi/4 (starting at 0 after reset or `clear`)
// and turned into I/Q samples by an eight-entry table (cos/sin of k*pi/4 in
// sdr_pkg fixed point). A symbol appears the cycle after its second bit.
// The mapping is the document's; the phase accumulator form is this design's.
module dqpsk_mapper
  import sdr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  input  logic    in_valid,
  input  logic    in_bit,
  output logic    out_valid,
  output sample_t out_i,
  output sample_t out_q
);
  logic [2:0] ph;
  logic       half, first;

  function automatic sample_t cosk(input logic [2:0] k);
    unique case (k)
      3'd0: return ONE;
      3'd1, 3'd7: return INV_SQRT2;
      3'd2, 3'd6: return '0;
      3'd3, 3'd5: return -INV_SQRT2;
      default: return -ONE;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= '0; half <= 1'b0; first <= 1'b0; out_valid <= 1'b0; out_i <= '0; out_q <= '0;
    end else begin
      out_valid <= 1'b0;
      if (clear) begin
        ph <= '0; half <= 1'b0;
      end else if (in_valid) begin
        if (!half) begin
          first <= in_bit; half <= 1'b1;
        end else begin
          logic [2:0] step, np;
          unique case ({first, in_bit})
            2'b00: step = 3'd1;
            2'b01: step = 3'd3;
            2'b11: step = 3'd5;
            default: step = 3'd7;
          endcase
          np = ph + step;
          ph <= np; half <= 1'b0;
          out_valid <= 1'b1;
          out_i <= cosk(np);
          out_q <= cosk(np - 3'd2);
        end
      end
    end
  end
endmodule

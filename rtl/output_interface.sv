// output_interface: packs the chain's output bits, LSB first, into 32-bit
// words for the output DMA; m_valid pulses for one cycle with each full
// word. `flush` sends a partly filled word (zero padded) at the end of a
// packet. The document gives the function; the packing is this design's.
module output_interface (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_bit,
  input  logic        flush,
  output logic        m_valid,
  output logic [31:0] m_data
);
  logic [31:0] sh;
  logic [5:0]  cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; cnt <= '0; m_valid <= 1'b0; m_data <= '0;
    end else begin
      m_valid <= 1'b0;
      if (in_valid) begin
        logic [31:0] n;
        n = sh | (32'(in_bit) << cnt);
        if (cnt == 6'd31) begin
          m_valid <= 1'b1; m_data <= n; sh <= '0; cnt <= '0;
        end else begin
          sh <= n; cnt <= cnt + 6'd1;
        end
      end else if (flush && cnt != 0) begin
        m_valid <= 1'b1; m_data <= sh; sh <= '0; cnt <= '0;
      end
    end
  end
endmodule

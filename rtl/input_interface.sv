// input_interface: rate adapter between the input DMA stream and a chain.
// 32-bit words are accepted with a valid/ready handshake and sent LSB first
// as single bits (s_nbits of them, so a packet's last word may be partial), one bit every DIV cycles, so each chain sees the bit rate
// it was designed for. It also makes the chain reset: rst_n is synchronised
// (two flip-flops) into chain_rst_n. The document gives the function (rate
// and reset adjustment); word width, bit order and the divider are this
// design's choices. The two synchroniser flip-flops are reset
// asynchronously and released synchronously, the usual reset synchroniser;
// a lint tool notes that their output is later used as an asynchronous
// reset, which is the intent.
module input_interface #(
  parameter int DIV = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        s_valid,
  input  logic [31:0] s_data,
  input  logic [5:0]  s_nbits,    // bits used in this word, LSB first; 0 = 32
  output logic        s_ready,
  output logic        out_valid,
  output logic        out_bit,
  output logic        chain_rst_n
);
  localparam int DW = $clog2(DIV + 1);
  logic [31:0] sh;
  logic [5:0]  left;
  logic [DW-1:0] tick;
  logic [1:0]  rs;

  assign s_ready     = (left == 0);
  assign chain_rst_n = rs[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rs <= '0;
    else        rs <= {rs[0], 1'b1};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; left <= '0; tick <= '0; out_valid <= 1'b0; out_bit <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (s_valid && s_ready) begin
        sh <= s_data; left <= (s_nbits == 0 || s_nbits > 6'd32) ? 6'd32 : s_nbits; tick <= '0;
      end else if (left != 0) begin
        if (tick == 0) begin
          out_valid <= 1'b1;
          out_bit   <= sh[0];
          sh        <= sh >> 1;
          left      <= left - 6'd1;
          tick      <= DW'(DIV - 1);
        end else begin
          tick <= tick - 1'b1;
        end
      end
    end
  end
endmodule

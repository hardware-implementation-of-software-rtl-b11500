// qam16_mapper: Wi-Fi 16-QAM mapper (MCS5 and MCS6). Four serial bits
// b0 b1 b2 b3 form one symbol: b0 b1 select the I level and b2 b3 the Q
// level with the Gray code 00 -> -3, 01 -> -1, 11 -> +1, 10 -> +3, scaled by
// 1/sqrt(10) (162 and 486 in the 9-fraction-bit sample format). The symbol
// appears on out_i/out_q one cycle after its fourth bit, with out_valid.
// The document lists 16-QAM for MCS5/6 without its table; the Gray levels
// and the 1/sqrt(10) scale are those of the Wi-Fi standard.
module qam16_mapper
  import sdr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  logic    in_bit,
  output logic    out_valid,
  output sample_t out_i,
  output sample_t out_q
);
  localparam sample_t L1 = sample_t'(162);   // 1/sqrt(10)
  localparam sample_t L3 = sample_t'(486);   // 3/sqrt(10)

  logic [2:0] held;      // b0 b1 b2 of the current symbol, b0 in held[2]
  logic [1:0] cnt;

  function automatic sample_t level(input logic [1:0] b);
    case (b)
      2'b00:   level = -L3;
      2'b01:   level = -L1;
      2'b11:   level = L1;
      default: level = L3;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held <= '0; cnt <= '0; out_valid <= 1'b0; out_i <= '0; out_q <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (cnt == 2'd3) begin
          out_valid <= 1'b1;
          out_i     <= level(held[2:1]);
          out_q     <= level({held[0], in_bit});
        end else begin
          held <= {held[1:0], in_bit};
        end
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule

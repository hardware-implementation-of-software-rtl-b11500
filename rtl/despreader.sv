// despreader: 3G descrambling and despreading. Each received soft chip
// (positive = bit 0) is multiplied by the same scrambling and spreading chips
// as in the spreader (sign change when their XOR is 1) and SF chips are
// accumulated; the sign of the sum is the decided bit, sent the cycle after
// the SF-th chip together with the sum as soft value. The generators restart
// on `clear` and must be aligned with the transmitter's.
module despreader
  import sdr_pkg::*;
#(
  parameter int            SF   = 4,
  parameter logic [SF-1:0] CODE = 4'b0100
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  input  logic    in_valid,
  input  sample_t in_chip,
  output logic    out_valid,
  output logic    out_bit,
  output logic signed [SAMPLE_W+3:0] out_soft
);
  localparam int IW = (SF > 1) ? $clog2(SF) : 1;
  logic [17:0] x, y;
  logic [IW-1:0] idx;
  logic signed [SAMPLE_W+3:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= 18'd1; y <= '1; idx <= '0; acc <= '0;
      out_valid <= 1'b0; out_bit <= 1'b0; out_soft <= '0;
    end else begin
      out_valid <= 1'b0;
      if (clear) begin
        x <= 18'd1; y <= '1; idx <= '0; acc <= '0;
      end else if (in_valid) begin
        logic signed [SAMPLE_W+3:0] v, a;
        v = (CODE[idx] ^ x[0] ^ y[0]) ? -(SAMPLE_W+4)'(in_chip) : (SAMPLE_W+4)'(in_chip);
        a = acc + v;
        x <= {x[0] ^ x[7], x[17:1]};
        y <= {y[0] ^ y[5] ^ y[7] ^ y[10], y[17:1]};
        if (idx == IW'(SF - 1)) begin
          idx <= '0; acc <= '0;
          out_valid <= 1'b1; out_bit <= a[SAMPLE_W+3]; out_soft <= a;
        end else begin
          idx <= idx + 1'b1; acc <= a;
        end
      end
    end
  end
endmodule

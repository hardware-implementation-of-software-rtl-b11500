// crc_check: De-CRC / De-HEC. Receives a block of N data bits followed by W
// parity bits (as produced by crc_append with the same POLY and init). The N
// data bits are forwarded one per in_valid; the W parity bits are removed.
// The same division register as the generator runs over all N+W bits; when
// the last bit has arrived, done pulses for one cycle and crc_ok reports
// whether the remainder is zero (no error detected). Polynomials follow the
// document; the serial structure and the done/crc_ok outputs are this
// design's choice.
module crc_check #(
  parameter int           W    = 16,
  parameter logic [W-1:0] POLY = 16'h1021,
  parameter int           N    = 160
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] init,
  input  logic         in_valid,
  input  logic         in_bit,
  output logic         out_valid,
  output logic         out_bit,
  output logic         done,
  output logic         crc_ok
);
  localparam int CW = $clog2(N + W + 1);
  logic [W-1:0]  rem;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem <= '0; cnt <= '0; out_valid <= 1'b0; out_bit <= 1'b0;
      done <= 1'b0; crc_ok <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      if (in_valid) begin
        logic [W-1:0] r0, r1;
        r0 = (cnt == 0) ? init : rem;
        r1 = {r0[W-2:0], 1'b0} ^ ((in_bit ^ r0[W-1]) ? POLY : '0);
        rem <= r1;
        if (cnt < CW'(N)) begin
          out_valid <= 1'b1;
          out_bit   <= in_bit;
        end
        if (cnt == CW'(N + W - 1)) begin
          cnt    <= '0;
          done   <= 1'b1;
          crc_ok <= (r1 == '0);
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule

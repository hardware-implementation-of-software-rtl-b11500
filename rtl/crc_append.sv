// crc_append: serial CRC / HEC generator that appends parity to a block.
// The block of N data bits is passed through unchanged (one bit per in_valid)
// while a W-bit division register accumulates the remainder of the generator
// polynomial POLY (bit i = coefficient of D^i, D^W implicit). After the N-th
// bit the W parity bits are shifted out, highest register bit first, one per
// PACE cycles, while busy is high; the source must hold in_valid low until busy
// drops. The register is loaded with `init` at the start of every block: zero
// for the CRCs, the 8-bit UAP for the Bluetooth HEC. The polynomials are the
// document's (BT HEC, BT CRC16, 2G, 3G CRC8/12/16/24, LTE CRC24); the serial
// form, parity order and the handshake are choices of this design.
module crc_append #(
  parameter int          W    = 16,
  parameter logic [W-1:0] POLY = 16'h1021,  // D^16+D^12+D^5+1
  parameter int          N    = 160,
  parameter int          PACE = 1       // cycles between parity bits
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] init,
  input  logic         in_valid,
  input  logic         in_bit,
  output logic         out_valid,
  output logic         out_bit,
  output logic         busy
);
  localparam int CW = $clog2(N + 1);
  logic [W-1:0] rem;
  logic [CW-1:0] cnt;
  logic [$clog2(W+1)-1:0] pcnt;
  logic [$clog2(PACE+1)-1:0] gap;

  assign busy = (pcnt != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem <= '0; cnt <= '0; pcnt <= '0; gap <= '0; out_valid <= 1'b0; out_bit <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (gap != 0) gap <= gap - 1'b1;
      if (pcnt != 0) begin
        if (gap == 0) begin
          gap       <= ($clog2(PACE+1))'(PACE - 1);
          out_valid <= 1'b1;
          out_bit   <= rem[W-1];
          rem       <= {rem[W-2:0], 1'b0};
          pcnt      <= pcnt - 1'b1;
        end
      end else if (in_valid) begin
        logic [W-1:0] r0;
        r0 = (cnt == 0) ? init : rem;
        out_valid <= 1'b1;
        out_bit   <= in_bit;
        rem <= {r0[W-2:0], 1'b0} ^ ((in_bit ^ r0[W-1]) ? POLY : '0);
        if (cnt == CW'(N - 1)) begin
          cnt  <= '0;
          pcnt <= W[$clog2(W+1)-1:0];
          gap  <= ($clog2(PACE+1))'(PACE - 1);
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule

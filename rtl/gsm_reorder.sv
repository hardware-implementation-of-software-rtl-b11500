// gsm_reorder: 2G class split, CRC and bit reordering ahead of the
// convolutional encoder.
// A speech frame of N bits d(0..N-1) is collected. The first N1A bits
// (class 1a) are protected by a W-bit CRC with generator POLY, computed
// serially as they arrive (p(0) is the highest register bit). When the
// frame is complete it is sent again, one bit every PACE cycles, as
//   u(k) = d(2k)                k = 0 .. N1/2-1
//   u(k) = p(k - N1/2)          the W parity bits
//   u(N1+W-1-k) = d(2k+1)       k = 0 .. N1/2-1
//   u(k) = 0                    the TB tail bits (k = N1+W .. N1+W+TB-1)
// with out_coded high (these go to the encoder), followed by the N-N1
// class-2 bits d(N1..N-1) with out_coded low (these bypass the encoder).
// busy is high while the frame is sent; input bits are ignored meanwhile.
// Frame sizes (260 bits, 50 class-1a, 182 class-1, 3 parity, 4 tail) and
// the even/odd reordering are those of the 2G speech channel described by
// the document; the serial CRC form and the parity bit order are this
// design's choice.
module gsm_reorder #(
  parameter int           N    = 260,
  parameter int           N1A  = 50,
  parameter int           N1   = 182,
  parameter int           W    = 3,
  parameter logic [W-1:0] POLY = 3'b011,
  parameter int           TB   = 4,
  parameter int           PACE = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_valid,
  output logic out_bit,
  output logic out_coded,
  output logic busy
);
  localparam int NU = N1 + W + TB;       // bits to the encoder
  localparam int NO = NU + N - N1;       // all output bits
  localparam int CW = $clog2(NO + 1);
  localparam int GW = $clog2(PACE + 1);

  logic [N-1:0]  d;
  logic [W-1:0]  crc;
  logic [CW-1:0] cnt;
  logic [GW-1:0] gap;

  function automatic logic [W-1:0] crc_step(input logic [W-1:0] r, input logic b);
    logic fb;
    fb = b ^ r[W-1];
    if (W > 1) crc_step = {r[W-2:0], 1'b0} ^ (fb ? POLY : '0);
    else       crc_step = fb ? POLY : '0;
  endfunction

  function automatic logic u_bit(input int k, input logic [N-1:0] dd, input logic [W-1:0] p);
    if (k < N1 / 2)      u_bit = dd[2 * k];
    else if (k < N1 / 2 + W) u_bit = p[W - 1 - (k - N1 / 2)];
    else if (k < N1 + W) u_bit = dd[2 * (N1 + W - 1 - k) + 1];
    else if (k < NU)     u_bit = 1'b0;
    else                 u_bit = dd[N1 + k - NU];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d <= '0; crc <= '0; cnt <= '0; gap <= '0; busy <= 1'b0;
      out_valid <= 1'b0; out_bit <= 1'b0; out_coded <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          d[cnt] <= in_bit;
          if (cnt < CW'(N1A)) crc <= crc_step(crc, in_bit);
          if (cnt == CW'(N - 1)) begin
            cnt <= '0; busy <= 1'b1; gap <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
      end else if (gap != 0) begin
        gap <= gap - 1'b1;
      end else begin
        out_valid <= 1'b1;
        out_bit   <= u_bit(int'(cnt), d, crc);
        out_coded <= (cnt < CW'(NU));
        gap       <= GW'(PACE - 1);
        if (cnt == CW'(NO - 1)) begin
          cnt <= '0; busy <= 1'b0; crc <= '0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule

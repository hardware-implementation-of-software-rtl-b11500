// gsm_dereorder: 2G bit de-reordering and CRC check after the Viterbi
// decoder (the inverse of gsm_reorder).
// dec_* carries the N1+W decoded bits u(0..N1+W-1) of a frame (the decoder
// has already dropped the tail bits), raw_* the N-N1 class-2 bits that
// bypassed the code; the two streams may arrive in any order. Each bit is
// written to its original position. When both are complete the frame
// d(0..N-1) is sent, one bit per cycle; the CRC over the first N1A bits is
// computed on the way and compared with the received parity: done pulses
// with the last bit and crc_ok is valid with it.
// Steps (reorder back, remove parity, check remainder) follow the
// document's receiver description; the buffering is this design's.
module gsm_dereorder #(
  parameter int           N    = 260,
  parameter int           N1A  = 50,
  parameter int           N1   = 182,
  parameter int           W    = 3,
  parameter logic [W-1:0] POLY = 3'b011
) (
  input  logic clk,
  input  logic rst_n,
  input  logic dec_valid,
  input  logic dec_bit,
  input  logic raw_valid,
  input  logic raw_bit,
  output logic out_valid,
  output logic out_bit,
  output logic done,
  output logic crc_ok
);
  localparam int ND = N1 + W;
  localparam int NR = N - N1;
  localparam int CW = $clog2(N + 1);

  logic [N-1:0]  d;
  logic [W-1:0]  p, crc;
  logic [CW-1:0] kd, kr, ko;
  logic          sending;

  function automatic logic [W-1:0] crc_step(input logic [W-1:0] r, input logic b);
    logic fb;
    fb = b ^ r[W-1];
    if (W > 1) crc_step = {r[W-2:0], 1'b0} ^ (fb ? POLY : '0);
    else       crc_step = fb ? POLY : '0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d <= '0; p <= '0; crc <= '0; kd <= '0; kr <= '0; ko <= '0; sending <= 1'b0;
      out_valid <= 1'b0; out_bit <= 1'b0; done <= 1'b0; crc_ok <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      if (!sending) begin
        if (dec_valid && kd != CW'(ND)) begin
          if (kd < CW'(N1 / 2))          d[2 * kd] <= dec_bit;
          else if (kd < CW'(N1 / 2 + W)) p[W - 1 - (kd - CW'(N1 / 2))] <= dec_bit;
          else                           d[2 * (CW'(ND - 1) - kd) + 1] <= dec_bit;
          kd <= kd + 1'b1;
        end
        if (raw_valid && kr != CW'(NR)) begin
          d[CW'(N1) + kr] <= raw_bit;
          kr <= kr + 1'b1;
        end
        if (kd == CW'(ND) && kr == CW'(NR)) begin
          sending <= 1'b1; ko <= '0; crc <= '0;
        end
      end else begin
        out_valid <= 1'b1;
        out_bit   <= d[ko];
        if (ko < CW'(N1A)) crc <= crc_step(crc, d[ko]);
        if (ko == CW'(N - 1)) begin
          sending <= 1'b0; kd <= '0; kr <= '0;
          done    <= 1'b1;
          crc_ok  <= (crc == p);
        end else begin
          ko <= ko + 1'b1;
        end
      end
    end
  end
endmodule

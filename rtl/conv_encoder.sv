// conv_encoder: rate-1/2 feed-forward convolutional encoder with constraint
// length K. Generator masks G0/G1 have bit i set when the input delayed by i
// takes part (bit 0 = current input). For every in_valid one pair
// {a, b} = {parity(G0 & window), parity(G1 & window)} appears on out_pair the
// next cycle. With TAIL=1 the encoder flushes itself after N data bits by
// feeding K-1 zero bits on its own (busy is high meanwhile, the source must
// wait), so every block ends in state 0; with TAIL=0 the source supplies the
// zero tail itself (the 2G chain, whose bit reordering already appends four
// zeros). Defaults: Wi-Fi K=7 (133/171 octal). The 2G polynomials
// 1+D^3+D^4 / 1+D+D^3+D^4 are the document's; the Wi-Fi and 3G polynomials
// are taken from the standards. The next stage is a parallel-to-serial
// converter running at twice the bit rate (module puncture).
module conv_encoder #(
  parameter int           K    = 7,
  parameter logic [K-1:0] G0   = 7'b1101101,
  parameter logic [K-1:0] G1   = 7'b1001111,
  parameter int           N    = 48,
  parameter bit           TAIL = 1'b1,
  parameter int           PACE = 1      // cycles between tail steps
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_bit,
  output logic       out_valid,
  output logic [1:0] out_pair,
  output logic       busy
);
  localparam int CW = $clog2(N + 1);
  logic [K-2:0] sr;           // sr[0] = previous input
  logic [CW-1:0] cnt;
  logic [$clog2(K)-1:0] tcnt;
  logic [K-1:0] win;
  logic u, step;
  logic [$clog2(PACE+1)-1:0] gap;

  assign busy = (tcnt != 0);
  assign u    = busy ? 1'b0 : in_bit;
  assign step = busy ? (gap == 0) : in_valid;
  assign win  = {sr, u};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr <= '0; cnt <= '0; tcnt <= '0; gap <= '0; out_valid <= 1'b0; out_pair <= '0;
    end else begin
      out_valid <= 1'b0;
      if (gap != 0) gap <= gap - 1'b1;
      if (step) begin
        out_valid <= 1'b1;
        gap       <= ($clog2(PACE+1))'(PACE - 1);
        out_pair  <= {^(G0 & win), ^(G1 & win)};
        if (K > 2) sr <= {sr[K-3:0], u};
        else       sr <= (K-1)'(u);
        if (busy) begin
          tcnt <= tcnt - 1'b1;
        end else if (cnt == CW'(N - 1)) begin
          cnt <= '0;
          if (TAIL) tcnt <= ($clog2(K))'(K - 1);
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule

// turbo_encoder: LTE turbo encoder, two 8-state recursive systematic
// convolutional encoders (feedback 1+D^2+D^3, parity 1+D+D^3) and an internal
// interleaver. K input bits are stored; then, for k = 0..K-1, the systematic
// bit x_k, the first encoder's parity z_k (input c_k) and the second
// encoder's parity z'_k (input c_pi(k)) are sent serially, one bit per cycle.
// The interleaver reads the stored block at pi(k) = (F1 k + F2 k^2) mod K.
// Then both encoders are terminated with three tail steps each, giving the
// 12 tail bits: x_K z_K x_K+1 z_K+1 x_K+2 z_K+2 of the first encoder, then
// the same six of the second, so a block gives 3(K+4) bits. (The standard
// spreads these over its three output streams; the serial order here is
// this design's.) No input is accepted while a block is being sent (busy
// high). The document names the
// structure; the constituent codes, the QPP interleaver and the K=40,
// F1=3, F2=10 default are taken from the LTE standard.
module turbo_encoder #(
  parameter int K  = 40,
  parameter int F1 = 3,
  parameter int F2 = 10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_valid,
  output logic out_bit,
  output logic busy
);
  localparam int KW = $clog2(K + 4);
  typedef enum logic [1:0] {S_LOAD, S_DATA, S_TAIL} state_e;
  state_e st;
  logic [K-1:0] buf_c;
  logic [KW-1:0] k;
  logic [1:0] ph;
  logic [2:0] s1, s2;
  logic [2:0] trip;
  logic [11:0] tail;

  function automatic int qpp(input int i);
    return (F1 * i + ((F2 * i) % K) * i) % K;
  endfunction

  // one RSC step: returns {next_state, parity}; tail=1 feeds back to zero
  function automatic logic [3:0] rsc(input logic [2:0] s, input logic c);
    logic a;
    a = c ^ s[1] ^ s[2];
    return {s[1:0], a, a ^ s[0] ^ s[2]};
  endfunction

  function automatic logic [11:0] tails(input logic [2:0] a, input logic [2:0] b);
    // returns x_K z_K x_K+1 z_K+1 x_K+2 z_K+2 x'_K z'_K x'_K+1 z'_K+1 x'_K+2 z'_K+2 (bit 11 first)
    logic [2:0] s;
    logic [3:0] r;
    logic [11:0] t;
    logic x;
    s = a;
    for (int i = 0; i < 3; i++) begin
      x = s[1] ^ s[2];
      r = rsc(s, x);
      t[11 - 2*i] = x; t[10 - 2*i] = r[0]; s = r[3:1];
    end
    s = b;
    for (int i = 0; i < 3; i++) begin
      x = s[1] ^ s[2];
      r = rsc(s, x);
      t[5 - 2*i] = x; t[4 - 2*i] = r[0]; s = r[3:1];
    end
    return t;
  endfunction

  logic ck, cpk;
  logic [3:0] r1, r2;
  assign ck  = buf_c[k];
  assign cpk = buf_c[qpp(int'(k))];
  assign r1  = rsc(s1, ck);
  assign r2  = rsc(s2, cpk);
  assign busy = (st != S_LOAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_LOAD; buf_c <= '0; k <= '0; ph <= '0; s1 <= '0; s2 <= '0; trip <= '0; tail <= '0;
      out_valid <= 1'b0; out_bit <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      unique case (st)
        S_LOAD: if (in_valid) begin
          buf_c[k] <= in_bit;
          if (k == KW'(K - 1)) begin k <= '0; ph <= '0; s1 <= '0; s2 <= '0; st <= S_DATA; end
          else k <= k + 1'b1;
        end
        S_DATA: begin
          out_valid <= 1'b1;
          unique case (ph)
            2'd0: begin out_bit <= ck; ph <= 2'd1; end
            2'd1: begin out_bit <= r1[0]; ph <= 2'd2; end
            default: begin
              out_bit <= r2[0]; ph <= 2'd0;
              s1 <= r1[3:1]; s2 <= r2[3:1];
              if (k == KW'(K - 1)) begin
                k <= '0; st <= S_TAIL; trip <= '0;
                tail <= tails(r1[3:1], r2[3:1]);
              end else k <= k + 1'b1;
            end
          endcase
        end
        default: begin  // S_TAIL, 12 bits
          out_valid <= 1'b1;
          out_bit   <= tail[11 - int'(trip) - 3 * int'(ph)];
          if (trip == 3'd2) begin
            trip <= '0;
            if (ph == 2'd3) begin ph <= '0; st <= S_LOAD; end
            else ph <= ph + 2'd1;
          end else trip <= trip + 3'd1;
        end
      endcase
    end
  end
endmodule

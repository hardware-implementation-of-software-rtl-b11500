// lte_scrambler: LTE bit scrambler. c_init = 2^14 n_RNTI + 2^13 q +
// 2^9 floor(n_s/2) + N_ID is formed from the inputs when `init` pulses; the
// Gold generator then warms up (ready low) and every accepted bit is XORed
// with the next c(n), output one cycle later. The c_init formula is the
// document's.
module lte_scrambler (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic [15:0] n_rnti,
  input  logic        q,
  input  logic [4:0]  n_s,
  input  logic [8:0]  n_id,
  input  logic        in_valid,
  input  logic        in_bit,
  output logic        out_valid,
  output logic        out_bit,
  output logic        ready
);
  logic [30:0] c_init;
  logic        c;
  assign c_init = (31'(n_rnti) << 14) + (31'(q) << 13) + (31'(n_s >> 1) << 9) + 31'(n_id);

  lte_gold_gen u_gold (.clk, .rst_n, .init, .c_init, .step(in_valid & ready), .c, .ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_bit <= 1'b0;
    end else begin
      out_valid <= in_valid & ready;
      if (in_valid && ready) out_bit <= in_bit ^ c;
    end
  end
endmodule

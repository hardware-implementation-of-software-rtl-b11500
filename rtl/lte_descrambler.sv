// lte_descrambler: LTE soft descrambler. With the same Gold sequence as the
// transmitter (same c_init inputs), each soft value is negated (two's
// complement) where c(n) = 1 and passed unchanged where c(n) = 0, output one
// cycle later. Behaviour is the document's.
module lte_descrambler
  import sdr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic [15:0] n_rnti,
  input  logic        q,
  input  logic [4:0]  n_s,
  input  logic [8:0]  n_id,
  input  logic        in_valid,
  input  sample_t     in_soft,
  output logic        out_valid,
  output sample_t     out_soft,
  output logic        ready
);
  logic [30:0] c_init;
  logic        c;
  assign c_init = (31'(n_rnti) << 14) + (31'(q) << 13) + (31'(n_s >> 1) << 9) + 31'(n_id);

  lte_gold_gen u_gold (.clk, .rst_n, .init, .c_init, .step(in_valid & ready), .c, .ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_soft <= '0;
    end else begin
      out_valid <= in_valid & ready;
      if (in_valid && ready) out_soft <= c ? -in_soft : in_soft;
    end
  end
endmodule

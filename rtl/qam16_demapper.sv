// qam16_demapper: hard-decision 16-QAM demapper, the inverse of
// qam16_mapper. For each received symbol b0 = (I > 0), b1 = (|I| < 2/sqrt(10)),
// b2 = (Q > 0), b3 = (|Q| < 2/sqrt(10)); the threshold 2/sqrt(10) is 324 in
// the sample format. The four bits leave serially, b0 in the cycle after the
// symbol and one bit per cycle after it, so symbols may arrive at most every
// fourth cycle. out_soft carries the component a bit was decided from.
// The decision regions follow from the standard's Gray mapping (the document
// gives no 16-QAM table).
module qam16_demapper
  import sdr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_i,
  input  sample_t in_q,
  output logic    out_valid,
  output logic    out_bit,
  output sample_t out_soft
);
  localparam sample_t TH = sample_t'(324);   // 2/sqrt(10)

  logic [2:0] rest;      // b1 b2 b3 still to send, b1 in rest[2]
  logic [1:0] left;
  sample_t    q_held;

  function automatic logic inner(input sample_t v);
    inner = (v < TH) && (v > -TH);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rest <= '0; left <= '0; q_held <= '0; out_valid <= 1'b0; out_bit <= 1'b0; out_soft <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        out_valid <= 1'b1;
        out_bit   <= ~in_i[SAMPLE_W-1] && (in_i != '0);
        out_soft  <= in_i;
        rest      <= {inner(in_i), ~in_q[SAMPLE_W-1] && (in_q != '0), inner(in_q)};
        q_held    <= in_q;
        left      <= 2'd3;
      end else if (left != 0) begin
        out_valid <= 1'b1;
        out_bit   <= rest[2];
        out_soft  <= (left == 2'd2) ? q_held : out_soft;
        rest      <= {rest[1:0], 1'b0};
        left      <= left - 1'b1;
      end
    end
  end
endmodule

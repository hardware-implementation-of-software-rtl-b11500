// burst_deformation: 2G burst receiver side. From each 148-bit burst it
// forwards the 114 data bits (positions 3..59 and 88..144) as they arrive,
// and at the end of the burst reports the steal flags (11 -> FACCH, 00 ->
// traffic channel) and whether the 26 training bits matched the expected
// sequence. Channel equalisation with the training sequence, which the
// document mentions, is not done here: the received bits are taken as
// already equalised.
module burst_deformation (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_bit,
  output logic       out_valid,
  output logic       out_bit,
  output logic       done,
  output logic [1:0] steal_flags,
  output logic       facch,
  output logic       ts_ok
);
  localparam logic [25:0] TSC = 26'b00100101110000100010010111;
  logic [7:0] pos;
  logic       sf0, ts_err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos <= '0; sf0 <= 1'b0; ts_err <= 1'b0; out_valid <= 1'b0; out_bit <= 1'b0;
      done <= 1'b0; steal_flags <= '0; facch <= 1'b0; ts_ok <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      if (in_valid) begin
        if ((pos >= 3 && pos <= 59) || (pos >= 88 && pos <= 144)) begin
          out_valid <= 1'b1; out_bit <= in_bit;
        end
        if (pos == 60) sf0 <= in_bit;
        if (pos > 60 && pos < 87 && in_bit != TSC[25 - (pos - 61)]) ts_err <= 1'b1;
        if (pos == 87) begin
          steal_flags <= {sf0, in_bit};
          facch       <= sf0 & in_bit;
        end
        if (pos == 8'd147) begin
          pos <= '0; done <= 1'b1; ts_ok <= ~ts_err; ts_err <= 1'b0;
        end else begin
          pos <= pos + 8'd1;
        end
      end
    end
  end
endmodule

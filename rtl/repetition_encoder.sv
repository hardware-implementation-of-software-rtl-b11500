// repetition_encoder: Bluetooth header FEC, rate 1/3. Every input bit is
// sent three times, one copy per cycle starting the cycle after in_valid;
// busy is high while copies are pending and the source must wait (input rate
// at most one bit per three cycles). The code is the document's; the
// handshake is this design's.
module repetition_encoder (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_valid,
  output logic out_bit,
  output logic busy
);
  logic [1:0] left;
  assign busy = (left != 0);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left <= '0; out_valid <= 1'b0; out_bit <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (left != 0) begin
        out_valid <= 1'b1;
        left      <= left - 2'd1;
      end else if (in_valid) begin
        out_valid <= 1'b1;
        out_bit   <= in_bit;
        left      <= 2'd2;
      end
    end
  end
endmodule

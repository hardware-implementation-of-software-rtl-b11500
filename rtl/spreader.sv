// spreader: 3G spreading and scrambling. Each data bit becomes SF chips;
// chip c = bit XOR spreading code chip XOR scrambling code chip (the XOR form
// of multiplying +/-1 values). The spreading code is the OVSF code
// (1,1,-1,1) (a -1 is a 1 bit); the scrambling chips come from a Gold code
// generator (x: x^18+x^7+1, y: x^18+x^10+x^7+x^5+1, one chip per cycle
// while chips are sent) that restarts on `clear`. A bit is accepted when busy
// is low; its chips leave on the SF following cycles. The code (1,1,-1,1) is
// the document's; the Gold generator stands in for the ROM of scrambling
// codes and is taken from the standard.
module spreader #(
  parameter int          SF   = 4,
  parameter logic [SF-1:0] CODE = 4'b0100   // chip 0 in bit 0: (1,1,-1,1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_valid,
  output logic out_chip,
  output logic busy
);
  localparam int CW = $clog2(SF + 1);
  localparam int IW = (SF > 1) ? $clog2(SF) : 1;
  logic [17:0] x, y;
  logic [CW-1:0] left;
  logic [IW-1:0] idx;
  logic d;

  assign busy = (left != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= 18'd1; y <= '1; left <= '0; idx <= '0; d <= 1'b0;
      out_valid <= 1'b0; out_chip <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (clear) begin
        x <= 18'd1; y <= '1; left <= '0;
      end else if (left != 0) begin
        out_valid <= 1'b1;
        out_chip  <= d ^ CODE[idx] ^ x[0] ^ y[0];
        x <= {x[0] ^ x[7], x[17:1]};
        y <= {y[0] ^ y[5] ^ y[7] ^ y[10], y[17:1]};
        idx  <= idx + 1'b1;
        left <= left - 1'b1;
      end else if (in_valid) begin
        d <= in_bit; idx <= '0; left <= CW'(SF);
      end
    end
  end
endmodule

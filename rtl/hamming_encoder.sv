// hamming_encoder: Bluetooth payload FEC, shortened (15,10) Hamming code with
// generator g(D) = 1 + D^2 + D^4 + D^5 (the taps of the encoder's shift
// register). Ten data bits are gathered, then the 15-bit code word is sent
// one bit per cycle: the ten data bits first, then the five parity bits
// (remainder of the division, highest order first). The next ten bits may
// arrive while a word is being sent (a new word is accepted only if the
// previous has been sent; input rate at most 2/3). The polynomial comes
// from the encoder figure; word buffering is this design's choice.
module hamming_encoder (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_valid,
  output logic out_bit
);
  localparam logic [4:0] POLY = 5'b10101;   // D^4 + D^2 + 1 (D^5 implicit)

  function automatic logic [4:0] parity(input logic [9:0] d);  // d[9] first
    logic [4:0] r;
    r = '0;
    for (int i = 9; i >= 0; i--) begin
      logic f;
      f = d[i] ^ r[4];
      r = {r[3:0], 1'b0} ^ (f ? POLY : 5'b0);
    end
    return r;
  endfunction

  logic [9:0]  acc;
  logic [3:0]  icnt, ocnt;
  logic [14:0] word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; icnt <= '0; ocnt <= '0; word <= '0; out_valid <= 1'b0; out_bit <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (ocnt != 0) begin
        out_valid <= 1'b1;
        out_bit   <= word[14];
        word      <= {word[13:0], 1'b0};
        ocnt      <= ocnt - 4'd1;
      end
      if (in_valid) begin
        if (icnt == 4'd9) begin
          icnt <= '0;
          word <= {acc[8:0], in_bit, parity({acc[8:0], in_bit})};
          ocnt <= 4'd15;
        end else begin
          acc  <= {acc[8:0], in_bit};
          icnt <= icnt + 4'd1;
        end
      end
    end
  end
endmodule

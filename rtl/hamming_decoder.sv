// hamming_decoder: Bluetooth payload (15,10) decoder. Fifteen received bits
// form a code word; the syndrome is its remainder modulo
// g(D) = 1 + D^2 + D^4 + D^5. A zero syndrome means no error; otherwise the
// syndrome is compared with the syndromes of all fifteen single-bit errors
// (a table computed at elaboration) and the matching bit is flipped. The ten
// data bits are then sent one per cycle; corrected pulses when a bit was
// fixed. The document describes a 4-bit syndrome; a (15,10) code with a
// degree-5 generator has a 5-bit syndrome, which is what is built here.
module hamming_decoder (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_valid,
  output logic out_bit,
  output logic corrected
);
  localparam logic [4:0] POLY = 5'b10101;

  function automatic logic [4:0] syndrome(input logic [14:0] w);  // w[14] first
    logic [4:0] r;
    r = '0;
    for (int i = 14; i >= 0; i--) begin
      logic f;
      f = r[4];
      r = {r[3:0], w[i]} ^ (f ? POLY : 5'b0);
    end
    return r;
  endfunction

  logic [14:0] acc;
  logic [3:0]  icnt, ocnt;
  logic [9:0]  data;
  logic [14:0] fixed;
  logic        err;

  always_comb begin
    logic [4:0] s;
    s = syndrome(acc);
    fixed = acc;
    err   = 1'b0;
    for (int p = 0; p < 15; p++) begin
      if (s != 0 && syndrome(15'(1) << p) == s) begin
        fixed = acc ^ (15'(1) << p);
        err   = 1'b1;
      end
    end
  end

  logic word_done;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; icnt <= '0; ocnt <= '0; data <= '0; word_done <= 1'b0;
      out_valid <= 1'b0; out_bit <= 1'b0; corrected <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      corrected <= 1'b0;
      word_done <= 1'b0;
      if (ocnt != 0) begin
        out_valid <= 1'b1;
        out_bit   <= data[9];
        data      <= {data[8:0], 1'b0};
        ocnt      <= ocnt - 4'd1;
      end
      if (word_done) begin
        data      <= fixed[14:5];
        ocnt      <= 4'd10;
        corrected <= err;
      end
      if (in_valid) begin
        acc <= {acc[13:0], in_bit};
        if (icnt == 4'd14) begin icnt <= '0; word_done <= 1'b1; end
        else icnt <= icnt + 4'd1;
      end
    end
  end
endmodule

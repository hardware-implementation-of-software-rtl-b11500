// burst_formation: 2G normal burst builder. 114 interleaved data bits are
// stored in a two-bank memory; when a bank is full the controller sends the
// 148-bit burst one bit per cycle:
//   3 tail (0) | 57 data | steal flag | 26 training | steal flag | 57 data | 3 tail (0)
// A select signal from the controller steers the output multiplexer between
// 0, the training sequence (TS), the steal flag and the data path; the data
// path itself is the memory, or the FACCH bits from the MAC when the steal
// flag is 1. Structure and field sizes are the document's; the training
// sequence (code 0 of the standard), the two banks with their in_ready
// handshake (the source reads one bit per cycle while in_ready is high and
// the bit arrives the next cycle) and the FACCH input as a 114-bit vector
// are this design's choices.
module burst_formation (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         steal_flag,
  input  logic [113:0] facch,      // facch[0] is sent first
  input  logic         in_valid,
  input  logic         in_bit,
  output logic         out_valid,
  output logic         out_bit,
  output logic         in_ready,
  output logic         busy
);
  localparam logic [25:0] TSC = 26'b00100101110000100010010111;  // sent MSB first
  typedef enum logic [1:0] {SEL_ZERO, SEL_TS, SEL_SF, SEL_DATA} sel_e;

  logic mem [2][114];
  logic [1:0] full;
  logic wbank, rbank;
  logic [6:0] wcnt, didx;
  logic [7:0] pos;
  sel_e sel;
  logic dbit;

  always_comb begin
    if (pos < 3 || pos > 144)        sel = SEL_ZERO;
    else if (pos == 60 || pos == 87) sel = SEL_SF;
    else if (pos > 60 && pos < 87)   sel = SEL_TS;
    else                             sel = SEL_DATA;
    dbit = steal_flag ? facch[didx] : mem[rbank][didx];
  end

  assign busy = full[rbank];
  // A bit may be requested when the bank being written has room, counting a
  // bit that completes this bank while the other one is still occupied.
  assign in_ready = ~full[wbank] & ~(in_valid && wcnt == 7'd113 && full[~wbank]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; wbank <= 1'b0; rbank <= 1'b0; wcnt <= '0; didx <= '0; pos <= '0;
      out_valid <= 1'b0; out_bit <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        mem[wbank][wcnt] <= in_bit;
        if (wcnt == 7'd113) begin wcnt <= '0; full[wbank] <= 1'b1; wbank <= ~wbank; end
        else wcnt <= wcnt + 7'd1;
      end
      if (full[rbank]) begin
        out_valid <= 1'b1;
        unique case (sel)
          SEL_ZERO: out_bit <= 1'b0;
          SEL_TS:   out_bit <= TSC[25 - (pos - 61)];
          SEL_SF:   out_bit <= steal_flag;
          default:  begin out_bit <= dbit; didx <= didx + 7'd1; end
        endcase
        if (pos == 8'd147) begin
          pos <= '0; didx <= '0; full[rbank] <= 1'b0; rbank <= ~rbank;
        end else begin
          pos <= pos + 8'd1;
        end
      end
    end
  end
endmodule

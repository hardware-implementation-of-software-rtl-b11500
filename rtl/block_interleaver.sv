// block_interleaver: matrix (block) interleaver of ROWS x COLS bits with an
// optional inter-column permutation, and its inverse.
// DEINT=0: bits are written row by row and read column by column, the
// columns in the order colperm(0), colperm(1), ...  DEINT=1: bits are written
// at the positions the interleaver would read from and read row by row, which
// restores the original order. PERM selects the column order: 0 none (2G,
// 8 x 57 matrix), 1 the 30-column pattern of the 3G second interleaver,
// 2 bit reversal of the column index (3G first interleaver, COLS = 1, 2, 4
// or 8 for 10/20/40/80 ms). Two banks are used in ping-pong; reading runs one
// bit per cycle while out_ready is high; overflow flags a write into a bank
// that was not read yet. Matrix shapes are the document's, the 3G column
// patterns are taken from the standard, the buffering is this design's.
module block_interleaver #(
  parameter int ROWS  = 8,
  parameter int COLS  = 57,
  parameter int PERM  = 0,
  parameter bit DEINT = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  input  logic out_ready,
  output logic out_valid,
  output logic out_bit,
  output logic overflow
);
  localparam int NB = ROWS * COLS;
  localparam int AW = $clog2(NB);
  localparam int RW = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int CW = (COLS > 1) ? $clog2(COLS) : 1;

  function automatic int colperm(input int c);
    int p30 [30];
    int r;
    p30 = '{0, 20, 10, 5, 15, 25, 3, 13, 23, 8, 18, 28, 1, 11, 21,
            6, 16, 26, 4, 14, 24, 19, 9, 29, 12, 2, 7, 22, 27, 17};
    if (PERM == 1) return p30[c % 30];
    if (PERM == 2) begin
      r = 0;
      for (int b = 0; b < CW; b++) if (c[b]) r |= 1 << (CW - 1 - b);
      return (COLS > 1) ? r : 0;
    end
    return c;
  endfunction

  logic mem [2][NB];
  logic [1:0] full;
  logic wbank, rbank;
  // Sequential side counts linearly; permuted side counts (row, col).
  logic [AW-1:0] wlin, rlin;
  logic [RW-1:0] wrow, rrow;
  logic [CW-1:0] wcol, rcol;
  logic [AW-1:0] waddr, raddr;
  logic          wlast, rlast;

  assign waddr = DEINT ? AW'(int'(wrow) * COLS + colperm(int'(wcol))) : wlin;
  assign raddr = DEINT ? rlin : AW'(int'(rrow) * COLS + colperm(int'(rcol)));
  assign wlast = DEINT ? (wrow == RW'(ROWS - 1) && wcol == CW'(COLS - 1)) : (wlin == AW'(NB - 1));
  assign rlast = DEINT ? (rlin == AW'(NB - 1)) : (rrow == RW'(ROWS - 1) && rcol == CW'(COLS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; wbank <= 1'b0; rbank <= 1'b0;
      wlin <= '0; rlin <= '0; wrow <= '0; rrow <= '0; wcol <= '0; rcol <= '0;
      out_valid <= 1'b0; out_bit <= 1'b0; overflow <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      overflow  <= 1'b0;
      if (in_valid) begin
        mem[wbank][waddr] <= in_bit;
        if (full[wbank]) overflow <= 1'b1;
        if (wlast) begin
          full[wbank] <= 1'b1; wbank <= ~wbank;
          wlin <= '0; wrow <= '0; wcol <= '0;
        end else begin
          wlin <= wlin + 1'b1;
          if (wrow == RW'(ROWS - 1)) begin wrow <= '0; wcol <= wcol + 1'b1; end
          else wrow <= wrow + 1'b1;
        end
      end
      if (full[rbank] && out_ready) begin
        out_valid <= 1'b1;
        out_bit   <= mem[rbank][raddr];
        if (rlast) begin
          full[rbank] <= 1'b0; rbank <= ~rbank;
          rlin <= '0; rrow <= '0; rcol <= '0;
        end else begin
          rlin <= rlin + 1'b1;
          if (rrow == RW'(ROWS - 1)) begin rrow <= '0; rcol <= rcol + 1'b1; end
          else rrow <= rrow + 1'b1;
        end
      end
    end
  end
endmodule

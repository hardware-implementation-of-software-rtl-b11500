// tb_block_interleaver: checks the matrix interleaver and its inverse in the
// three shapes of the design: 2G 8 x 57 (no column permutation), the 3G
// second interleaver with 30 columns (column order of the 3G standard) and a
// bit-reversed 8-column matrix (3G first interleaver for 80 ms). The expected
// order is written out here: output m of the interleaver is input
// row*COLS + col, with row = m mod ROWS and col = order[m / ROWS]. Each
// interleaver feeds its deinterleaver, which must give the input back.
// Bits are written every second cycle and out_ready is dropped at random and no bit may come out while it is low.
module tb_block_interleaver;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv, ib, rdy;
  logic [2:0] sel;
  logic [2:0] vi, bi, vd, bd, oi, od;
  block_interleaver #(.ROWS(8), .COLS(57)) i0 (.clk, .rst_n, .in_valid(iv & sel[0]), .in_bit(ib), .out_ready(rdy),
    .out_valid(vi[0]), .out_bit(bi[0]), .overflow(oi[0]));
  block_interleaver #(.ROWS(8), .COLS(57), .DEINT(1'b1)) d0 (.clk, .rst_n, .in_valid(vi[0]), .in_bit(bi[0]), .out_ready(1'b1),
    .out_valid(vd[0]), .out_bit(bd[0]), .overflow(od[0]));
  block_interleaver #(.ROWS(4), .COLS(30), .PERM(1)) i1 (.clk, .rst_n, .in_valid(iv & sel[1]), .in_bit(ib), .out_ready(rdy),
    .out_valid(vi[1]), .out_bit(bi[1]), .overflow(oi[1]));
  block_interleaver #(.ROWS(4), .COLS(30), .PERM(1), .DEINT(1'b1)) d1 (.clk, .rst_n, .in_valid(vi[1]), .in_bit(bi[1]), .out_ready(1'b1),
    .out_valid(vd[1]), .out_bit(bd[1]), .overflow(od[1]));
  block_interleaver #(.ROWS(5), .COLS(8), .PERM(2)) i2 (.clk, .rst_n, .in_valid(iv & sel[2]), .in_bit(ib), .out_ready(rdy),
    .out_valid(vi[2]), .out_bit(bi[2]), .overflow(oi[2]));
  block_interleaver #(.ROWS(5), .COLS(8), .PERM(2), .DEINT(1'b1)) d2 (.clk, .rst_n, .in_valid(vi[2]), .in_bit(bi[2]), .out_ready(1'b1),
    .out_valid(vd[2]), .out_bit(bd[2]), .overflow(od[2]));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  int order30 [30] = '{0, 20, 10, 5, 15, 25, 3, 13, 23, 8, 18, 28, 1, 11, 21,
                       6, 16, 26, 4, 14, 24, 19, 9, 29, 12, 2, 7, 22, 27, 17};
  int order8 [8] = '{0, 4, 2, 6, 1, 5, 3, 7};

  bit gi [$], gd [$];
  logic rdy_q;
  always @(posedge clk) begin
    for (int c = 0; c < 3; c++) begin
      if (vi[c]) begin
        gi.push_back(bi[c]);
        if (!rdy_q) begin failures++; $display("FAIL: output while out_ready low"); end
      end
      if (vd[c]) gd.push_back(bd[c]);
      if (oi[c] || od[c]) begin failures++; $display("FAIL: overflow"); end
    end
    rdy_q <= rdy;
  end

  initial begin
    iv = 0; ib = 0; rdy = 1; sel = '0; rdy_q = 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3; c++) begin
      automatic int rows = (c == 0) ? 8 : (c == 1) ? 4 : 5;
      automatic int cols = (c == 0) ? 57 : (c == 1) ? 30 : 8;
      automatic int nb = rows * cols;
      automatic bit d [$];
      gi = {}; gd = {};
      sel = 3'(1 << c);
      for (int i = 0; i < 2 * nb; i++) d.push_back(1'($urandom_range(0, 1)));
      fork
        for (int i = 0; i < 2 * nb; i++) begin @(negedge clk); iv = 1; ib = d[i]; @(negedge clk); iv = 0; end
        repeat (4 * nb) begin @(negedge clk); rdy = ($urandom_range(0, 3) != 0); end
      join
      @(negedge clk); iv = 0; rdy = 1;
      repeat (2 * nb + 10) @(negedge clk);
      check(gi.size() == 2 * nb, $sformatf("shape %0d interleaved length %0d", c, gi.size()));
      for (int b = 0; b < 2; b++)
        for (int m = 0; m < nb; m++) begin
          automatic int col = m / rows;
          automatic int oc = (c == 0) ? col : (c == 1) ? order30[col] : order8[col];
          automatic int src = (m % rows) * cols + oc;
          if (b * nb + m < gi.size())
            check(gi[b * nb + m] == d[b * nb + src], $sformatf("shape %0d block %0d out %0d", c, b, m));
        end
      check(gd.size() == 2 * nb, "deinterleaved length");
      for (int i = 0; i < 2 * nb && i < gd.size(); i++) check(gd[i] == d[i], $sformatf("shape %0d restored %0d", c, i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

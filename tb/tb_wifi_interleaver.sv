// tb_wifi_interleaver: checks the Wi-Fi interleaver and deinterleaver for
// BPSK (NCBPS=48, NBPSC=1) and QPSK (NCBPS=96, NBPSC=2). The expected output
// of the interleaver is built here from the first permutation of the
// standard written as a write-row / read-column matrix of 16 columns
// (bit k goes to row k/16... i.e. position (NCBPS/16)(k mod 16) + k/16; the
// second permutation is the identity for these modulations). The
// deinterleaver, fed with the interleaver's output, must restore the input.
// Bits are written every second cycle; out_ready is dropped at random and
// no bit may appear while it is low. Writing a third block before any read
// must raise overflow.
module tb_wifi_interleaver;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv, ib, rdy, sel;
  logic v1, b1, v2, b2, v3, b3, v4, b4, of1, of2, of3, of4;
  wifi_interleaver #(.NCBPS(48), .NBPSC(1)) i48 (.clk, .rst_n, .in_valid(iv & ~sel), .in_bit(ib), .out_ready(rdy),
    .out_valid(v1), .out_bit(b1), .overflow(of1));
  wifi_interleaver #(.NCBPS(48), .NBPSC(1), .DEINT(1'b1)) d48 (.clk, .rst_n, .in_valid(v1), .in_bit(b1), .out_ready(1'b1),
    .out_valid(v2), .out_bit(b2), .overflow(of2));
  wifi_interleaver #(.NCBPS(96), .NBPSC(2)) i96 (.clk, .rst_n, .in_valid(iv & sel), .in_bit(ib), .out_ready(rdy),
    .out_valid(v3), .out_bit(b3), .overflow(of3));
  wifi_interleaver #(.NCBPS(96), .NBPSC(2), .DEINT(1'b1)) d96 (.clk, .rst_n, .in_valid(v3), .in_bit(b3), .out_ready(1'b1),
    .out_valid(v4), .out_bit(b4), .overflow(of4));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit gi [$], gd [$];
  int n_ovf = 0;
  logic rdy_q;
  always @(posedge clk) begin
    if (v1 || v3) begin
      gi.push_back(v1 ? b1 : b3);
      if (!rdy_q) begin failures++; $display("FAIL: output while out_ready low"); end
    end
    if (v2 || v4) gd.push_back(v2 ? b2 : b4);
    if (of1 || of3) n_ovf++;
    if (of2 || of4) begin failures++; $display("FAIL: deinterleaver overflow"); end
    rdy_q <= rdy;
  end

  initial begin
    iv = 0; ib = 0; rdy = 1; sel = 0; rdy_q = 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 2; c++) begin
      automatic int n = c ? 96 : 48;
      automatic bit d [$];
      gi = {}; gd = {};
      sel = c[0];
      for (int i = 0; i < 3 * n; i++) d.push_back(1'($urandom_range(0, 1)));
      fork
        for (int i = 0; i < 3 * n; i++) begin @(negedge clk); iv = 1; ib = d[i]; @(negedge clk); iv = 0; end
        repeat (6 * n) begin @(negedge clk); rdy = ($urandom_range(0, 3) != 0); end
      join
      @(negedge clk); iv = 0; rdy = 1;
      repeat (3 * n + 10) @(negedge clk);
      check(gi.size() == 3 * n, $sformatf("NCBPS %0d interleaved length %0d", n, gi.size()));
      for (int b = 0; b < 3; b++)
        for (int k = 0; k < n; k++) begin
          automatic int j = (n / 16) * (k % 16) + k / 16;
          if (b * n + j < gi.size())
            check(gi[b * n + j] == d[b * n + k], $sformatf("NCBPS %0d block %0d bit %0d -> %0d", n, b, k, j));
        end
      check(gd.size() == 3 * n, "deinterleaved length");
      for (int i = 0; i < 3 * n && i < gd.size(); i++) check(gd[i] == d[i], $sformatf("NCBPS %0d restored bit %0d", n, i));
    end
    // overflow: three blocks with out_ready low
    check(n_ovf == 0, "no overflow in normal use");
    sel = 0; rdy = 0;
    for (int i = 0; i < 3 * 48; i++) begin @(negedge clk); iv = 1; ib = 1'($urandom_range(0, 1)); end
    @(negedge clk); iv = 0;
    @(negedge clk);
    check(n_ovf > 0, "overflow flagged when both banks are full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

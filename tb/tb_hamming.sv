// tb_hamming: checks the Bluetooth (15,10) Hamming encoder and decoder. The
// expected code word is computed here by long division by
// g(D) = D^5 + D^4 + D^2 + 1: ten data bits in arrival order, then the five
// remainder bits, highest power first. The encoder is fed at its rate of
// two bits in three cycles. The decoder gets the encoder output with no
// error or with one random bit of a word flipped; it must return the data
// and pulse `corrected` for each word with an error. The last ten words get
// two errors, beyond the code's power: only the parity of those is checked,
// and their `corrected` pulses may or may not appear.
module tb_hamming;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv, ib, ev, eb, dv, db, corr, flip;
  hamming_encoder u_e (.clk, .rst_n, .in_valid(iv), .in_bit(ib), .out_valid(ev), .out_bit(eb));
  hamming_decoder u_d (.clk, .rst_n, .in_valid(ev), .in_bit(eb ^ flip), .out_valid(dv), .out_bit(db), .corrected(corr));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit ge [$], gd [$];
  int ncorr = 0;
  int epos [$];   // per word: flipped positions, -1 none
  always @(posedge clk) begin
    if (ev) ge.push_back(eb);
    if (dv) gd.push_back(db);
    if (corr) ncorr++;
  end

  // flip drive: flip code bit epos[w] of word w (two flips for words 90..99)
  int ecount = 0;
  always @(negedge clk) begin
    flip = 1'b0;
    #1;
    if (ev) begin
      automatic int w = ecount / 15, p = ecount % 15;
      if (w < epos.size() && (epos[w] == p || (w >= 90 && epos[w] >= 0 && p == (epos[w] + 7) % 15))) flip = 1'b1;
    end
  end
  always @(posedge clk) if (ev) ecount++;

  initial begin
    bit d [$];
    int words = 100, exp_corr = 0;
    iv = 0; ib = 0; flip = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < words; w++) begin
      epos.push_back(($urandom_range(0, 1) || w >= 90) ? $urandom_range(0, 14) : -1);
      if (epos[w] >= 0 && w < 90) exp_corr++;
    end
    for (int i = 0; i < 10 * words; i++) begin
      d.push_back(1'($urandom_range(0, 1)));
      @(negedge clk); iv = 1; ib = d[i];
      if (i % 2 == 1) begin @(negedge clk); iv = 0; end
    end
    @(negedge clk); iv = 0;
    repeat (40) @(negedge clk);
    check(ge.size() == 15 * words, $sformatf("encoded length %0d", ge.size()));
    for (int w = 0; w < words; w++) begin
      automatic bit m [$];
      for (int i = 0; i < 10; i++) m.push_back(d[10 * w + i]);
      for (int i = 0; i < 5; i++) m.push_back(1'b0);
      for (int i = 0; i < 10; i++) if (m[i]) begin
        m[i] ^= 1; m[i + 1] ^= 1; m[i + 3] ^= 1; m[i + 5] ^= 1;   // D^5+D^4+D^2+1
      end
      for (int i = 0; i < 10; i++) check(ge[15 * w + i] == d[10 * w + i], "systematic data bit");
      for (int i = 0; i < 5; i++) check(ge[15 * w + 10 + i] == m[10 + i], $sformatf("word %0d parity %0d", w, i));
      if (w < 90)
        for (int i = 0; i < 10; i++) check(gd[10 * w + i] == d[10 * w + i], $sformatf("word %0d decoded bit %0d", w, i));
    end
    check(gd.size() == 10 * words, "decoded length");
    check(ncorr >= exp_corr && ncorr <= exp_corr + 10, $sformatf("corrected pulses %0d expected %0d..%0d", ncorr, exp_corr, exp_corr + 10));
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

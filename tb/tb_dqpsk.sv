// tb_dqpsk: checks the Bluetooth pi/4-DQPSK mapper and demapper. For random
// bit pairs the mapper's phase must advance by +pi/4 (00), +3pi/4 (01),
// -3pi/4 (11) or -pi/4 (10); the expected I/Q samples are computed here with
// real cos/sin of the accumulated phase, scaled by 512 and rounded. Each
// symbol must appear the cycle after its second bit. The demapper gets the
// samples with random noise of up to +/-80 (0.16 of the amplitude) on each
// component and must return the bits, two per symbol on consecutive cycles
// starting the cycle after the symbol. `clear` must restart both at phase 0.
module tb_dqpsk;
  import sdr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear, iv, ib, mv, dv, db, nv;
  sample_t mi, mq, ni, nq;
  dqpsk_mapper   u_m (.clk, .rst_n, .clear, .in_valid(iv), .in_bit(ib), .out_valid(mv), .out_i(mi), .out_q(mq));
  dqpsk_demapper u_d (.clk, .rst_n, .clear, .in_valid(nv), .in_i(ni), .in_q(nq), .out_valid(dv), .out_bit(db));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // noisy channel: one-cycle register between mapper and demapper
  always @(posedge clk) begin
    nv <= mv;
    ni <= mi + sample_t'($signed($urandom_range(0, 160)) - 80);
    nq <= mq + sample_t'($signed($urandom_range(0, 160)) - 80);
  end

  bit gd [$];
  int cyc = 0, last_sym = 0, sym_cyc [$], bit_cyc [$];
  always @(posedge clk) begin
    cyc++;
    if (mv) sym_cyc.push_back(cyc);
    if (dv) begin gd.push_back(db); bit_cyc.push_back(cyc); end
  end

  initial begin
    real pi = 3.14159265358979;
    bit d [$];
    nv = 0; ni = '0; nq = '0;
    iv = 0; ib = 0; clear = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 3; blk++) begin
      automatic int acc = 0;
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      // the demapper is cleared together with the mapper, before this block's symbols
      gd = {}; d = {}; sym_cyc = {}; bit_cyc = {};
      for (int s = 0; s < 64; s++) begin
        automatic bit b0 = 1'($urandom_range(0, 1)), b1 = 1'($urandom_range(0, 1));
        automatic int step = ({b0, b1} == 2'b00) ? 1 : ({b0, b1} == 2'b01) ? 3 : ({b0, b1} == 2'b11) ? -3 : -1;
        automatic int ei, eq;
        d.push_back(b0); d.push_back(b1);
        acc += step;
        ei = $rtoi($floor(512.0 * $cos(acc * pi / 4.0) + 0.5));
        eq = $rtoi($floor(512.0 * $sin(acc * pi / 4.0) + 0.5));
        if (ei == 362 || ei == -362) ; else if (ei > 300) ei = 512; else if (ei < -300) ei = -512;
        @(negedge clk); iv = 1; ib = b0;
        @(negedge clk); ib = b1;
        @(posedge clk); #1;
        check(mv, "symbol one cycle after the second bit");
        check(int'(mi) - ei <= 1 && ei - int'(mi) <= 1, $sformatf("block %0d symbol %0d I %0d exp %0d", blk, s, mi, ei));
        check(int'(mq) - eq <= 1 && eq - int'(mq) <= 1, $sformatf("block %0d symbol %0d Q %0d exp %0d", blk, s, mq, eq));
        @(negedge clk); iv = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      repeat (5) @(negedge clk);
      check(gd.size() == 128, $sformatf("demapped length %0d", gd.size()));
      for (int i = 0; i < 128 && i < gd.size(); i++) check(gd[i] == d[i], $sformatf("block %0d bit %0d", blk, i));
      for (int s = 0; s < 64 && 2 * s + 1 < bit_cyc.size(); s++) begin
        check(bit_cyc[2 * s] == sym_cyc[s] + 2, "first bit two cycles after the symbol (one channel register)");
        check(bit_cyc[2 * s + 1] == bit_cyc[2 * s] + 1, "second bit on the next cycle");
      end
    end
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

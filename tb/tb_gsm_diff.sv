// tb_gsm_diff: checks the 2G differential encoder and decoder. The expected
// encoder output is worked out here: dhat[i] = d[i] XOR dhat[i-1] (dhat[-1]=0
// after clear) and the sent bit is NOT dhat[i]; it must appear one cycle
// after its input. The decoder fed with that stream must return d. With one
// channel bit flipped at a random position p, exactly the decoded bits p and
// p+1 must be wrong and no others.
module tb_gsm_diff;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear, iv, ib, ev, eb, dv, db, flip;
  gsm_diff_encoder u_e (.clk, .rst_n, .clear, .in_valid(iv), .in_bit(ib), .out_valid(ev), .out_bit(eb));
  gsm_diff_decoder u_d (.clk, .rst_n, .clear, .in_valid(ev), .in_bit(eb ^ flip), .out_valid(dv), .out_bit(db));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit gd [$];
  always @(posedge clk) if (dv) gd.push_back(db);

  initial begin
    iv = 0; ib = 0; clear = 0; flip = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 6; blk++) begin
      automatic bit d [$];
      automatic bit dh = 0;
      automatic int p = (blk % 2) ? $urandom_range(0, 100) : -1;
      automatic int nerr = 0;
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      gd = {};
      for (int i = 0; i < 114; i++) begin
        d.push_back(1'($urandom_range(0, 1)));
        dh = d[i] ^ dh;
        @(negedge clk); iv = 1; ib = d[i];
        @(posedge clk); #1;
        check(ev && eb == ~dh, $sformatf("encoded bit %0d", i));
        flip = (i == p);
      end
      @(negedge clk); iv = 0; flip = 0;
      repeat (3) @(negedge clk);
      check(gd.size() == 114, "decoded length");
      for (int i = 0; i < 114 && i < gd.size(); i++) begin
        if (gd[i] != d[i]) nerr++;
        if (p < 0 || (i != p && i != p + 1)) check(gd[i] == d[i], $sformatf("block %0d decoded bit %0d", blk, i));
      end
      if (p >= 0) check(nerr == 2, $sformatf("one channel error gives two bit errors, got %0d", nerr));
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

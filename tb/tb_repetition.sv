// tb_repetition: checks the Bluetooth header rate-1/3 repetition encoder and
// the majority decoder. Each bit must come out three times on consecutive
// cycles, starting the cycle after it was accepted, with busy high for the
// two repeats. The decoder, fed with the encoder's output with at most one
// of every three copies flipped, must give back the data; with two copies
// flipped the decoded bit must be the flipped value (majority).
module tb_repetition;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv, ib, ev, eb, busy, dv, db, flip;
  repetition_encoder u_e (.clk, .rst_n, .in_valid(iv), .in_bit(ib), .out_valid(ev), .out_bit(eb), .busy);
  repetition_decoder u_d (.clk, .rst_n, .in_valid(ev), .in_bit(eb ^ flip), .out_valid(dv), .out_bit(db));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit gd [$];
  always @(posedge clk) if (dv) gd.push_back(db);

  initial begin
    bit d [$], exp [$];
    iv = 0; ib = 0; flip = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      automatic bit b = 1'($urandom_range(0, 1));
      automatic int nflip = (i % 5 == 4) ? 2 : (i % 2);   // 0, 1 or 2 flipped copies
      automatic int fpos = $urandom_range(0, 2);
      d.push_back(b);
      exp.push_back(nflip == 2 ? ~b : b);
      @(negedge clk); iv = 1; ib = b;
      for (int c = 0; c < 3; c++) begin
        @(negedge clk); iv = 0;
        flip = (nflip == 1 && c == fpos) || (nflip == 2 && c != fpos);
        #1;
        check(ev && eb == b, $sformatf("copy %0d of bit %0d", c, i));
        check(busy == (c < 2), "busy during repeats");
      end
      @(negedge clk); flip = 0;
      if ($urandom_range(0, 1)) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    check(gd.size() == 200, "decoded length");
    for (int i = 0; i < 200 && i < gd.size(); i++) check(gd[i] == exp[i], $sformatf("decoded bit %0d", i));
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

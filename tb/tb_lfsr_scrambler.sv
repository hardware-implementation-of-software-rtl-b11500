// tb_lfsr_scrambler: checks the x^7+x^4+1 scrambler. With the all-ones start
// the key stream must begin 0000 1110 1111 0010 (the well-known Wi-Fi
// scrambler sequence); for random seeds the key stream must follow
// k[n] = k[n-7] XOR k[n-4] with the seed as the seven previous bits, repeat
// every 127 bits, and a second scrambler loaded with the same seed must
// restore the data. Output must follow the input by one cycle.
module tb_lfsr_scrambler;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load, iv, ib, ov, ob, ov2, ob2;
  logic [6:0] seed;
  lfsr_scrambler u_s (.clk, .rst_n, .load, .seed, .in_valid(iv), .in_bit(ib), .out_valid(ov), .out_bit(ob));
  lfsr_scrambler u_d (.clk, .rst_n, .load, .seed, .in_valid(ov), .in_bit(ob), .out_valid(ov2), .out_bit(ob2));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit known [16] = '{0,0,0,0,1,1,1,0,1,1,1,1,0,0,1,0};
    load = 0; iv = 0; ib = 0; seed = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5; t++) begin
      automatic bit k [$], d [$];
      seed = (t == 0) ? 7'h7F : 7'($urandom_range(1, 127));
      @(negedge clk); load = 1; @(negedge clk); load = 0;
      for (int i = 7; i >= 1; i--) k.push_back(seed[i - 1]);   // k[-7] .. k[-1]
      for (int n = 0; n < 300; n++) k.push_back(k[n] ^ k[n + 3]);
      // descrambler is loaded together with the scrambler; check its output too
      for (int n = 0; n < 300; n++) begin
        automatic bit b = 1'($urandom_range(0, 1));
        d.push_back(b);
        @(negedge clk); iv = 1; ib = b;
        @(posedge clk); #1;
        check(ov, "out_valid one cycle after in_valid");
        check(ob == (b ^ k[n + 7]), $sformatf("seed %h bit %0d", seed, n));
        if (t == 0 && n < 16) check((ob ^ b) == known[n], "known Wi-Fi key stream");
        if (n >= 127) check(k[n + 7] == k[n + 7 - 127], "period 127");
        if (n >= 1) check(ob2 == d[n - 1], "descrambled bit");
      end
      @(negedge clk); iv = 0;
      @(posedge clk); #1;
      check(ob2 == d[299], "last descrambled bit");
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

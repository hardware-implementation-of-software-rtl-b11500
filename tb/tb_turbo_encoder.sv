// tb_turbo_encoder: checks the LTE turbo encoder (K=40, QPP interleaver
// f1=3, f2=10). A reference encoder is written here from the standard's
// description: each constituent encoder has three delay cells d1 d2 d3,
// feedback a = c + d2 + d3, parity z = a + d1 + d3, then (d1,d2,d3) <=
// (a,d1,d2); the second encoder reads the input at (3k + 10k^2) mod 40;
// termination feeds back the register contents (x = d2 + d3, z = d1 + d3).
// The serial output must be x_k z_k z'_k for each k, then the six tail bits
// of the first encoder and the six of the second: 3(K+4) = 132 bits on
// consecutive cycles, with busy high until the last one.
module tb_turbo_encoder;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv, ib, ov, ob, busy;
  turbo_encoder u_t (.clk, .rst_n, .in_valid(iv), .in_bit(ib), .out_valid(ov), .out_bit(ob), .busy);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit g [$];
  int cyc = 0, oc [$];
  always @(posedge clk) begin
    cyc++;
    if (ov) begin g.push_back(ob); oc.push_back(cyc); end
  end

  initial begin
    iv = 0; ib = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 5; blk++) begin
      automatic bit c [$], e [$], z1 [$], z2 [$];
      automatic bit a1 = 0, b1 = 0, c1 = 0, a2 = 0, b2 = 0, c2 = 0;
      for (int i = 0; i < 40; i++) c.push_back(blk == 0 ? (i == 0) : 1'($urandom_range(0, 1)));
      for (int k = 0; k < 40; k++) begin
        automatic bit f1 = c[k] ^ b1 ^ c1;
        automatic bit f2 = c[(3 * k + 10 * k * k) % 40] ^ b2 ^ c2;
        e.push_back(c[k]);
        e.push_back(f1 ^ a1 ^ c1);
        e.push_back(f2 ^ a2 ^ c2);
        c1 = b1; b1 = a1; a1 = f1;
        c2 = b2; b2 = a2; a2 = f2;
      end
      for (int t = 0; t < 3; t++) begin
        e.push_back(b1 ^ c1); e.push_back(a1 ^ c1);
        c1 = b1; b1 = a1; a1 = 0;
      end
      for (int t = 0; t < 3; t++) begin
        e.push_back(b2 ^ c2); e.push_back(a2 ^ c2);
        c2 = b2; b2 = a2; a2 = 0;
      end
      g = {}; oc = {};
      for (int i = 0; i < 40; i++) begin
        @(negedge clk); iv = 1; ib = c[i];
        if ($urandom_range(0, 3) == 0) begin @(negedge clk); iv = 0; end
      end
      @(negedge clk); iv = 0;
      check(busy, "busy once the block is loaded");
      while (busy) @(negedge clk);
      repeat (2) @(negedge clk);
      check(g.size() == 132, $sformatf("block %0d: %0d bits", blk, g.size()));
      check(g.size() == 132 && oc[131] - oc[0] == 131, "bits on consecutive cycles");
      for (int i = 0; i < 132 && i < g.size(); i++) check(g[i] == e[i], $sformatf("block %0d bit %0d", blk, i));
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

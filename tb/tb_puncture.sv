// tb_puncture: checks the parallel-to-serial converter and puncturer. Pairs
// {a,b} arrive every second cycle. PUNCT=0 must send a then b for every pair;
// PUNCT=1 must send, for each group of three pairs, a0 b0 a1 b2 (rate 3/4).
// The expected stream is built here; the first bit must leave the cycle
// after its pair arrives.
module tb_puncture;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv;
  logic [1:0] ip;
  logic ov0, ob0, ov1, ob1;
  puncture #(.PUNCT(1'b0)) u0 (.clk, .rst_n, .in_valid(iv), .in_pair(ip), .out_valid(ov0), .out_bit(ob0));
  puncture #(.PUNCT(1'b1)) u1 (.clk, .rst_n, .in_valid(iv), .in_pair(ip), .out_valid(ov1), .out_bit(ob1));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit g0 [$], g1 [$];
  int first_out = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (ov0) g0.push_back(ob0);
    if (ov1) begin g1.push_back(ob1); if (first_out < 0) first_out = cyc; end
  end

  initial begin
    bit a [$], b [$], e0 [$], e1 [$];
    int first_in;
    iv = 0; ip = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 60; n++) begin
      a.push_back(1'($urandom_range(0, 1)));
      b.push_back(1'($urandom_range(0, 1)));
      e0.push_back(a[n]); e0.push_back(b[n]);
      case (n % 3)
        0: begin e1.push_back(a[n]); e1.push_back(b[n]); end
        1: e1.push_back(a[n]);
        default: e1.push_back(b[n]);
      endcase
    end
    for (int n = 0; n < 60; n++) begin
      @(negedge clk); iv = 1; ip = {a[n], b[n]};
      if (n == 0) first_in = cyc + 1;
      @(negedge clk); iv = 0;
      if ($urandom_range(0, 2) == 0) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    check(first_out == first_in + 1, "first bit one cycle after its pair");
    check(g0.size() == 120, $sformatf("rate 1/2 length %0d", g0.size()));
    check(g1.size() == 80, $sformatf("rate 3/4 length %0d", g1.size()));
    for (int i = 0; i < 120 && i < g0.size(); i++) check(g0[i] == e0[i], $sformatf("rate 1/2 bit %0d", i));
    for (int i = 0; i < 80 && i < g1.size(); i++) check(g1[i] == e1[i], $sformatf("rate 3/4 bit %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_depuncture: checks the serial-to-pair regrouping. PUNCT=0: every two
// received bits form a pair with no erasure. PUNCT=1: the received stream
// a0 b0 a1 b2 must give pairs (a0,b0), (a1,erased), (erased,b2) with the
// erasure flags set exactly on the re-inserted positions and the dummy bit 0.
// A pair must leave one cycle after its last bit.
module tb_depuncture;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv, ib, ov0, ov1;
  logic [1:0] op0, oe0, op1, oe1;
  depuncture #(.PUNCT(1'b0)) u0 (.clk, .rst_n, .in_valid(iv), .in_bit(ib), .out_valid(ov0), .out_pair(op0), .out_erase(oe0));
  depuncture #(.PUNCT(1'b1)) u1 (.clk, .rst_n, .in_valid(iv), .in_bit(ib), .out_valid(ov1), .out_pair(op1), .out_erase(oe1));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [3:0] g0 [$], g1 [$];
  always @(posedge clk) begin
    if (ov0) g0.push_back({op0, oe0});
    if (ov1) g1.push_back({op1, oe1});
  end

  initial begin
    bit s [$];
    iv = 0; ib = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 96; i++) s.push_back(1'($urandom_range(0, 1)));
    for (int i = 0; i < 96; i++) begin
      @(negedge clk); iv = 1; ib = s[i];
      // a pair completes on odd bits (rate 1/2): it must be there one cycle later
      @(posedge clk); #1;
      if (i % 2 == 1) check(ov0, "rate 1/2 pair one cycle after its last bit");
      if (i % 4 != 0) check(ov1, "rate 3/4 pair one cycle after its last bit");
      if (i % 4 == 0) check(!ov1, "no rate 3/4 pair after a first bit");
      if ($urandom_range(0, 2) == 0) begin @(negedge clk); iv = 0; end
    end
    @(negedge clk); iv = 0;
    repeat (3) @(negedge clk);
    check(g0.size() == 48, "rate 1/2 pairs");
    check(g1.size() == 72, "rate 3/4 pairs");
    for (int p = 0; p < 48 && p < g0.size(); p++)
      check(g0[p] == {s[2 * p], s[2 * p + 1], 2'b00}, $sformatf("rate 1/2 pair %0d", p));
    for (int p = 0; p < 72 && p < g1.size(); p++) begin
      automatic int grp = p / 3;
      automatic int k = 4 * grp;
      automatic logic [3:0] e;
      case (p % 3)
        0: e = {s[k], s[k + 1], 2'b00};
        1: e = {s[k + 2], 1'b0, 2'b01};
        default: e = {1'b0, s[k + 3], 2'b10};
      endcase
      check(g1[p] == e, $sformatf("rate 3/4 pair %0d got %b exp %b", p, g1[p], e));
    end
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

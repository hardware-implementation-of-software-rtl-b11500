// tb_input_interface: checks the DMA-side rate adapter with DIV=5. Random
// words with random bit counts (1..32, 0 meaning 32) are offered with the
// valid/ready handshake; the bits must come out LSB first, exactly s_nbits of
// each word, one every DIV cycles, and s_ready must be low while a word is
// being sent. chain_rst_n must rise two cycles after rst_n.
module tb_input_interface;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic sv, sr, ov, ob, crst;
  logic [31:0] sd;
  logic [5:0] nb;
  input_interface #(.DIV(5)) u_i (.clk, .rst_n, .s_valid(sv), .s_data(sd), .s_nbits(nb), .s_ready(sr),
                                  .out_valid(ov), .out_bit(ob), .chain_rst_n(crst));

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
    bit e [$];
    int wstart [$];
    sv = 0; sd = '0; nb = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    check(!crst, "chain reset held right after reset release");
    @(posedge clk); #1 check(!crst, "chain reset after one edge");
    @(posedge clk); #1 check(crst, "chain reset released after two edges");
    for (int w = 0; w < 40; w++) begin
      automatic logic [31:0] d = $urandom();
      automatic int n = $urandom_range(0, 32);
      automatic int cnt = (n == 0) ? 32 : n;
      for (int b = 0; b < cnt; b++) e.push_back(d[b]);
      wstart.push_back(e.size() - cnt);
      @(negedge clk); sv = 1; sd = d; nb = 6'(n);
      do @(posedge clk); while (!sr);
      @(negedge clk); sv = 0;
      check(!sr, "not ready while the word is sent");
    end
    while (g.size() < e.size() && cyc < 20000) @(negedge clk);
    check(g.size() == e.size(), $sformatf("%0d bits out, %0d expected", g.size(), e.size()));
    for (int i = 0; i < e.size() && i < g.size(); i++) check(g[i] == e[i], $sformatf("bit %0d", i));
    for (int i = 1; i < g.size(); i++)
      if (!(i inside {wstart})) check(oc[i] - oc[i - 1] == 5, $sformatf("bit %0d spacing %0d", i, oc[i] - oc[i - 1]));
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

// tb_lte_scrambler: checks the LTE scrambler and soft descrambler. The Gold
// sequence is generated here from its definition: x1 starts 1,0,...,0, x2
// holds c_init = 2^14 n_RNTI + 2^13 q + 2^9 floor(n_s/2) + N_ID in its first
// 31 values, x1(n+31) = x1(n+3)+x1(n), x2(n+31) = x2(n+3)+x2(n+2)+x2(n+1)+x2(n),
// and c(n) = x1(n+1600) + x2(n+1600). After init, ready must stay low for
// exactly 1600 cycles. Each scrambled bit must equal bit XOR c(n), one cycle
// after it was given. The descrambler, fed with +-300 soft values of the
// scrambled bits, must return the soft values of the original bits (the
// negation happening exactly where c(n) = 1).
module tb_lte_scrambler;
  import sdr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic init, q, iv, ib, ov, ob, rdy, dov, drdy, div_;
  logic [15:0] rnti;
  logic [4:0] ns;
  logic [8:0] nid;
  sample_t dsin, dsout;
  lte_scrambler   u_s (.clk, .rst_n, .init, .n_rnti(rnti), .q, .n_s(ns), .n_id(nid),
                       .in_valid(iv), .in_bit(ib), .out_valid(ov), .out_bit(ob), .ready(rdy));
  lte_descrambler u_d (.clk, .rst_n, .init, .n_rnti(rnti), .q, .n_s(ns), .n_id(nid),
                       .in_valid(div_), .in_soft(dsin), .out_valid(dov), .out_soft(dsout), .ready(drdy));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    div_ <= ov;
    dsin <= ob ? sample_t'(-300) : sample_t'(300);
  end
  sample_t gs [$];
  always @(posedge clk) if (dov) gs.push_back(dsout);

  initial begin
    iv = 0; ib = 0; init = 0; q = 0; rnti = '0; ns = '0; nid = '0; div_ = 0; dsin = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3; t++) begin
      automatic bit x1 [$], x2 [$], c [$], d [$];
      automatic int n = 200, wait_cyc = 0;
      automatic longint ci;
      rnti = 16'($urandom()); q = 1'($urandom()); ns = 5'($urandom_range(0, 19)); nid = 9'($urandom_range(0, 503));
      ci = (longint'(rnti) << 14) + (longint'(q) << 13) + (longint'(ns / 2) << 9) + longint'(nid);
      for (int i = 0; i < 31; i++) begin x1.push_back(i == 0); x2.push_back(ci[i]); end
      for (int i = 0; i < 1600 + n; i++) begin
        x1.push_back(x1[i + 3] ^ x1[i]);
        x2.push_back(x2[i + 3] ^ x2[i + 2] ^ x2[i + 1] ^ x2[i]);
      end
      for (int i = 0; i < n; i++) c.push_back(x1[i + 1600] ^ x2[i + 1600]);
      @(negedge clk); init = 1; @(negedge clk); init = 0;
      while (!rdy) begin @(negedge clk); wait_cyc++; end
      check(wait_cyc == 1600, $sformatf("warm-up %0d cycles", wait_cyc));
      check(drdy, "descrambler ready together");
      gs = {};
      for (int i = 0; i < n; i++) begin
        d.push_back(1'($urandom_range(0, 1)));
        @(negedge clk); iv = 1; ib = d[i];
        @(posedge clk); #1;
        check(ov && ob == (d[i] ^ c[i]), $sformatf("set %0d scrambled bit %0d", t, i));
        if ($urandom_range(0, 2) == 0) begin @(negedge clk); iv = 0; end
      end
      @(negedge clk); iv = 0;
      repeat (4) @(negedge clk);
      check(gs.size() == n, "descrambled length");
      for (int i = 0; i < n && i < gs.size(); i++)
        check(gs[i] == (d[i] ? sample_t'(-300) : sample_t'(300)), $sformatf("set %0d soft %0d", t, i));
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

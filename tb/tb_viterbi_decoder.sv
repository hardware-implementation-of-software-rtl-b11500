// tb_viterbi_decoder: checks the hard-decision Viterbi decoder for the Wi-Fi
// code (K=7, 133/171 octal, N=48) and the 2G code (K=5, N=20). Code words are
// made here by a reference encoder written from the generators' tap delays,
// with the K-1 zero tail. Per block it checks: clean words decode exactly;
// words with up to three channel errors at least 15 steps apart decode
// exactly; Wi-Fi words punctured to rate 3/4 (erased positions flagged and
// carrying random values) plus one error decode exactly. It also checks the
// timing the decoder states: the N bits come out on consecutive cycles,
// starting L = N+K-1 (+ up to 2) cycles after the last pair, with busy
// high in between.
module tb_viterbi_decoder;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv, sel;
  logic [1:0] ip, ie;
  logic ov_w, ob_w, busy_w, ov_g, ob_g, busy_g;
  viterbi_decoder u_w (.clk, .rst_n, .in_valid(iv & ~sel), .in_pair(ip), .in_erase(ie),
                       .out_valid(ov_w), .out_bit(ob_w), .busy(busy_w));
  viterbi_decoder #(.K(5), .G0(5'b11001), .G1(5'b11011), .N(20)) u_g (
    .clk, .rst_n, .in_valid(iv & sel), .in_pair(ip), .in_erase(ie),
    .out_valid(ov_g), .out_bit(ob_g), .busy(busy_g));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit tap(input bit u [$], input int n, input int d);
    return (n - d >= 0 && n - d < u.size()) ? u[n - d] : 1'b0;
  endfunction

  bit got [$];
  int cyc = 0, first_cyc, last_cyc;
  always @(posedge clk) begin
    cyc++;
    if ((ov_w && !sel) || (ov_g && sel)) begin
      if (got.size() == 0) first_cyc = cyc;
      last_cyc = cyc;
      got.push_back(sel ? ob_g : ob_w);
    end
  end

  // mode 0 clean, 1 errors, 2 punctured + one error
  task automatic run_block(input bit g, input int mode);
    int n = g ? 20 : 48, k = g ? 5 : 7, l;
    int da [$], db [$];
    bit u [$], a [$], b [$], ea [$], eb [$];
    int end_cyc, nerr;
    if (g) begin da = '{0, 3, 4}; db = '{0, 1, 3, 4}; end
    else begin da = '{0, 2, 3, 5, 6}; db = '{0, 1, 2, 3, 6}; end
    l = n + k - 1;
    for (int i = 0; i < n; i++) u.push_back(1'($urandom_range(0, 1)));
    for (int s = 0; s < l; s++) begin
      bit x = 0, y = 0;
      foreach (da[j]) x ^= tap(u, s, da[j]);
      foreach (db[j]) y ^= tap(u, s, db[j]);
      a.push_back(x); b.push_back(y); ea.push_back(0); eb.push_back(0);
    end
    if (mode == 2) begin
      for (int s = 0; s < l; s++) begin
        if (s % 3 == 1) begin eb[s] = 1; b[s] = 1'($urandom_range(0, 1)); end
        if (s % 3 == 2) begin ea[s] = 1; a[s] = 1'($urandom_range(0, 1)); end
      end
    end
    nerr = (mode == 1) ? $urandom_range(1, 3) : (mode == 2) ? 1 : 0;
    for (int e = 0; e < nerr; e++) begin
      int s = 2 + 15 * e + $urandom_range(0, 3);
      if (s < l) begin
        if (!ea[s]) a[s] ^= 1'b1; else b[s] ^= 1'b1;
      end
    end
    sel = g;
    got = {};
    for (int s = 0; s < l; s++) begin
      @(negedge clk); iv = 1; ip = {a[s], b[s]}; ie = {ea[s], eb[s]};
      if ($urandom_range(0, 3) == 0) begin @(negedge clk); iv = 0; end
    end
    @(negedge clk); iv = 0; end_cyc = cyc;
    check(g ? busy_g : busy_w, "busy after the block");
    while (got.size() < n && cyc < end_cyc + 4 * l) @(negedge clk);
    repeat (3) @(negedge clk);
    check(got.size() == n, $sformatf("K=%0d mode %0d: %0d bits out", k, mode, got.size()));
    check(last_cyc - first_cyc == n - 1, "bits on consecutive cycles");
    check(first_cyc - end_cyc >= l && first_cyc - end_cyc <= l + 2,
          $sformatf("trace-back latency %0d for L=%0d", first_cyc - end_cyc, l));
    for (int i = 0; i < n && i < got.size(); i++)
      check(got[i] == u[i], $sformatf("K=%0d mode %0d bit %0d", k, mode, i));
    check(!(g ? busy_g : busy_w), "idle after output");
  endtask

  initial begin
    iv = 0; ip = '0; ie = '0; sel = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 4; r++) begin
      run_block(0, 0); run_block(0, 1); run_block(0, 2);
      run_block(1, 0); run_block(1, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

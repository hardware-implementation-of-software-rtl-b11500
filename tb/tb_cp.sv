// tb_cp: checks cyclic prefix insertion and removal at the LTE size (128
// samples, prefix 32, one sample per cycle) and at the reduced size used in
// the transceiver top (66 samples, prefix 16, one sample every 2 cycles).
// For random symbols written back to back, the inserter must send the last
// CP samples and then the whole symbol (NFFT+CP samples, PACE cycles apart);
// the remover fed with that stream must return the symbol with `first` on
// its first sample.
module tb_cp;
  import sdr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv, sel;
  sample_t ii, iq;
  logic v0, v1, r0v, r1v, f0, f1;
  sample_t o0i, o0q, o1i, o1q, r0i, r0q, r1i, r1q;
  cp_insert u_i0 (.clk, .rst_n, .in_valid(iv & ~sel), .in_i(ii), .in_q(iq), .out_valid(v0), .out_i(o0i), .out_q(o0q));
  cp_remove u_r0 (.clk, .rst_n, .in_valid(v0), .in_i(o0i), .in_q(o0q), .out_valid(r0v), .first(f0), .out_i(r0i), .out_q(r0q));
  cp_insert #(.NFFT(66), .CP(16), .PACE(2)) u_i1 (.clk, .rst_n, .in_valid(iv & sel), .in_i(ii), .in_q(iq),
                                                  .out_valid(v1), .out_i(o1i), .out_q(o1q));
  cp_remove #(.NFFT(66), .CP(16)) u_r1 (.clk, .rst_n, .in_valid(v1), .in_i(o1i), .in_q(o1q),
                                        .out_valid(r1v), .first(f1), .out_i(r1i), .out_q(r1q));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [27:0] go [$], gr [$];
  bit gf [$];
  int oc [$], cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (v0) begin go.push_back({o0i, o0q}); oc.push_back(cyc); end
    if (v1) begin go.push_back({o1i, o1q}); oc.push_back(cyc); end
    if (r0v) begin gr.push_back({r0i, r0q}); gf.push_back(f0); end
    if (r1v) begin gr.push_back({r1i, r1q}); gf.push_back(f1); end
  end

  initial begin
    iv = 0; ii = '0; iq = '0; sel = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 2; c++) begin
      automatic int nfft = c ? 66 : 128, cp = c ? 16 : 32, pace = c ? 2 : 1, nsym = 3;
      automatic logic [27:0] s [$];
      go = {}; gr = {}; gf = {}; oc = {};
      sel = c[0];
      for (int i = 0; i < nsym * nfft; i++) s.push_back(28'($urandom()));
      for (int i = 0; i < nsym * nfft; i++) begin
        @(negedge clk); iv = 1; {ii, iq} = s[i];
        if (pace == 2) begin @(negedge clk); iv = 0; end
      end
      @(negedge clk); iv = 0;
      repeat ((nfft + cp) * pace * 2 + 10) @(negedge clk);
      check(go.size() == nsym * (nfft + cp), $sformatf("size %0d: %0d samples out", nfft, go.size()));
      for (int m = 0; m < nsym; m++)
        for (int j = 0; j < nfft + cp; j++) begin
          automatic int src = m * nfft + ((j < cp) ? nfft - cp + j : j - cp);
          automatic int o = m * (nfft + cp) + j;
          if (o < go.size()) check(go[o] == s[src], $sformatf("size %0d symbol %0d out %0d", nfft, m, j));
          if (j > 0 && o < oc.size()) check(oc[o] - oc[o - 1] == pace, "output pace within a symbol");
        end
      check(gr.size() == nsym * nfft, "removed-prefix length");
      for (int i = 0; i < nsym * nfft && i < gr.size(); i++) begin
        check(gr[i] == s[i], $sformatf("size %0d restored sample %0d", nfft, i));
        check(gf[i] == (i % nfft == 0), "first flag");
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

// tb_qam16: checks qam16_mapper and qam16_demapper. Random bits are sent in
// bursts (one bit per cycle, as the Wi-Fi interleaver delivers them) with
// random gaps. Every symbol is compared with the Gray table 00 -> -3,
// 01 -> -1, 11 -> +1, 10 -> +3 (times 1/sqrt(10), first bit pair on I),
// and it must appear the cycle after its fourth bit. The demapper gets the
// mapper's symbols plus a random error smaller than 1/sqrt(10) on both
// components and must return the sent bits.
module tb_qam16;
  import sdr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always #5 clk = ~clk;

  logic in_valid = 0, in_bit = 0, m_valid, d_valid, d_bit;
  sample_t m_i, m_q, n_i, n_q, d_soft;
  qam16_mapper   u_map (.clk, .rst_n, .in_valid, .in_bit, .out_valid(m_valid), .out_i(m_i), .out_q(m_q));
  assign n_i = m_i + sample_t'(int'($urandom_range(0, 300)) - 150);
  assign n_q = m_q + sample_t'(int'($urandom_range(0, 300)) - 150);
  qam16_demapper u_demap (.clk, .rst_n, .in_valid(m_valid), .in_i(n_i), .in_q(n_q),
                          .out_valid(d_valid), .out_bit(d_bit), .out_soft(d_soft));

  int checks = 0, failures = 0, cyc = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int lvl(input bit a, input bit b);
    case ({a, b})
      2'b00: return -486;
      2'b01: return -162;
      2'b11: return 162;
      default: return 486;
    endcase
  endfunction

  bit sent [$];
  int last_in_cyc [$];
  bit got [$];
  int nsym = 0;
  always @(posedge clk) begin
    cyc++;
    if (d_valid) got.push_back(d_bit);
    if (m_valid) begin
      automatic int k = 4 * nsym;
      check(int'(m_i) == lvl(sent[k], sent[k + 1]), $sformatf("I of symbol %0d", nsym));
      check(int'(m_q) == lvl(sent[k + 2], sent[k + 3]), $sformatf("Q of symbol %0d", nsym));
      check(cyc == last_in_cyc[nsym] + 1, "symbol one cycle after its fourth bit");
      nsym++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 300; s++) begin
      for (int b = 0; b < 4; b++) begin
        @(negedge clk);
        in_valid = 1; in_bit = 1'($urandom_range(0, 1)); sent.push_back(in_bit);
        if (b == 3) last_in_cyc.push_back(cyc + 1);
      end
      @(negedge clk); in_valid = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    check(nsym == 300, "symbol count");
    check(got.size() == sent.size(), $sformatf("demapped %0d bits", got.size()));
    for (int i = 0; i < sent.size() && i < got.size(); i++) check(got[i] == sent[i], $sformatf("bit %0d", i));
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

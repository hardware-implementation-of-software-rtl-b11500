// tb_psk: checks the BPSK and QPSK mappers and demappers. Mapper outputs are
// compared with the mapping tables written here (+-362 = 1/sqrt(2) in the
// fixed-point format; bit 0 -> positive). Each symbol must appear the cycle
// after its last bit. The demappers get the symbols with noise of up to
// +-150 per component and must return the bits (QPSK: I bit, then Q bit on
// the next cycle); the sign of the soft output must agree with the bit.
module tb_psk;
  import sdr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv, ib, bv, qv, bdv, bdb, qdv, qdb, bnv, qnv;
  sample_t bi, bq, qi, qq, bni, bnq, qni, qnq, bsoft, qsoft;
  psk_mapper   #(.QPSK(1'b0)) u_bm (.clk, .rst_n, .in_valid(iv), .in_bit(ib), .out_valid(bv), .out_i(bi), .out_q(bq));
  psk_mapper   #(.QPSK(1'b1)) u_qm (.clk, .rst_n, .in_valid(iv), .in_bit(ib), .out_valid(qv), .out_i(qi), .out_q(qq));
  psk_demapper #(.QPSK(1'b0)) u_bd (.clk, .rst_n, .in_valid(bnv), .in_i(bni), .in_q(bnq), .out_valid(bdv), .out_bit(bdb), .out_soft(bsoft));
  psk_demapper #(.QPSK(1'b1)) u_qd (.clk, .rst_n, .in_valid(qnv), .in_i(qni), .in_q(qnq), .out_valid(qdv), .out_bit(qdb), .out_soft(qsoft));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic sample_t noise();
    return sample_t'($signed($urandom_range(0, 300)) - 150);
  endfunction

  always @(posedge clk) begin
    bnv <= bv; bni <= bi + noise(); bnq <= bq + noise();
    qnv <= qv; qni <= qi + noise(); qnq <= qq + noise();
  end

  bit gb [$], gq [$];
  always @(posedge clk) begin
    if (bdv) begin
      gb.push_back(bdb);
      if (bdb != bsoft[SAMPLE_W-1]) begin failures++; $display("FAIL: BPSK soft sign"); end
    end
    if (qdv) begin
      gq.push_back(qdb);
      if (qdb != qsoft[SAMPLE_W-1]) begin failures++; $display("FAIL: QPSK soft sign"); end
    end
  end

  initial begin
    bit d [$];
    iv = 0; ib = 0; bnv = 0; qnv = 0; bni = '0; bnq = '0; qni = '0; qnq = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 200; s++) begin
      automatic bit b0 = 1'($urandom_range(0, 1)), b1 = 1'($urandom_range(0, 1));
      d.push_back(b0); d.push_back(b1);
      @(negedge clk); iv = 1; ib = b0;
      @(posedge clk); #1;
      check(bv && bi == (b0 ? -362 : 362) && bq == bi, $sformatf("BPSK symbol for bit %0d", b0));
      check(!qv, "QPSK waits for its second bit");
      @(negedge clk); ib = b1;
      @(posedge clk); #1;
      check(bv && bi == (b1 ? -362 : 362), "BPSK second symbol");
      check(qv && qi == (b0 ? -362 : 362) && qq == (b1 ? -362 : 362), $sformatf("QPSK symbol %b%b", b0, b1));
      @(negedge clk); iv = 0;
      @(negedge clk);
    end
    repeat (5) @(negedge clk);
    check(gb.size() == 400 && gq.size() == 400, $sformatf("demapped lengths %0d %0d", gb.size(), gq.size()));
    for (int i = 0; i < 400 && i < gb.size() && i < gq.size(); i++) begin
      check(gb[i] == d[i], $sformatf("BPSK bit %0d", i));
      check(gq[i] == d[i], $sformatf("QPSK bit %0d", i));
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

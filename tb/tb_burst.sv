// tb_burst: checks 2G burst formation and deformation back to back. The
// source answers in_ready with one data bit the next cycle. Each 148-bit
// burst must leave on consecutive cycles as 3 zero tail bits, 57 data bits,
// the steal flag, the 26-bit training sequence 00100101110000100010010111,
// the steal flag, 57 data bits and 3 zero tail bits (expected layout built
// here). With the steal flag set the data fields must carry the FACCH bits.
// The deformation must return the 114 data bits, report ts_ok, and report
// steal flags 11 and facch for stolen bursts, 00 otherwise. The burst former
// must never accept more than two bursts ahead (no bit lost).
module tb_burst;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic steal, iv, ib, ov, ob, rdy, busy, dv, db, done, facch_rx, ts_ok;
  logic [1:0] sflags;
  logic [113:0] facch;
  burst_formation u_f (.clk, .rst_n, .steal_flag(steal), .facch, .in_valid(iv), .in_bit(ib),
                       .out_valid(ov), .out_bit(ob), .in_ready(rdy), .busy);
  burst_deformation u_d (.clk, .rst_n, .in_valid(ov), .in_bit(ob), .out_valid(dv), .out_bit(db),
                         .done, .steal_flags(sflags), .facch(facch_rx), .ts_ok);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam bit [25:0] TS = 26'b00100101110000100010010111;
  bit src [$];          // bits still to send
  bit gb [$], gd [$];
  int nsent = 0, ndone = 0, nts = 0, nfacch = 0;
  bit last_flags_ok = 1;
  int cyc = 0, ocyc [$];

  always @(posedge clk) begin
    cyc++;
    iv <= 1'b0;
    if (rst_n && rdy && src.size() > 0 && !iv) begin
      iv <= 1'b1; ib <= src.pop_front(); nsent++;
    end else if (rst_n && rdy && src.size() > 0 && iv) begin
      iv <= 1'b1; ib <= src.pop_front(); nsent++;
    end
    if (ov) begin gb.push_back(ob); ocyc.push_back(cyc); end
    if (dv) gd.push_back(db);
    if (done) begin
      ndone++;
      if (ts_ok) nts++;
      if (facch_rx) nfacch++;
      if (sflags != (steal ? 2'b11 : 2'b00)) last_flags_ok = 0;
    end
  end

  initial begin
    bit d [$];
    iv = 0; ib = 0; steal = 0;
    facch = {$urandom(), $urandom(), $urandom(), 18'($urandom())};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int mode = 0; mode < 2; mode++) begin
      steal = mode[0];
      d = {}; gb = {}; gd = {}; ocyc = {};
      for (int i = 0; i < 4 * 114; i++) d.push_back(1'($urandom_range(0, 1)));
      src = d;
      while (src.size() > 0 || busy) @(negedge clk);
      repeat (5) @(negedge clk);
      check(gb.size() == 4 * 148, $sformatf("burst bits %0d", gb.size()));
      for (int b = 0; b < 4 && (b + 1) * 148 <= gb.size(); b++) begin
        bit e [$];
        e = {};
        for (int i = 0; i < 3; i++) e.push_back(0);
        for (int i = 0; i < 57; i++) e.push_back(steal ? facch[i] : d[114 * b + i]);
        e.push_back(steal);
        for (int i = 25; i >= 0; i--) e.push_back(TS[i]);
        e.push_back(steal);
        for (int i = 57; i < 114; i++) e.push_back(steal ? facch[i] : d[114 * b + i]);
        for (int i = 0; i < 3; i++) e.push_back(0);
        for (int i = 0; i < 148; i++) check(gb[148 * b + i] == e[i], $sformatf("mode %0d burst %0d bit %0d", mode, b, i));
        check(ocyc[148 * b + 147] - ocyc[148 * b] == 147, "burst sent on consecutive cycles");
      end
      check(gd.size() == 4 * 114, "deformed data length");
      for (int i = 0; i < 4 * 114 && i < gd.size(); i++)
        check(gd[i] == (steal ? facch[i % 114] : d[i]), $sformatf("mode %0d data bit %0d", mode, i));
      check(last_flags_ok, "steal flags reported");
    end
    check(ndone == 8, "eight bursts received");
    check(nts == 8, "training sequence matched in every burst");
    check(nfacch == 4, "four FACCH bursts");
    check(nsent == 8 * 114, "all source bits taken");
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

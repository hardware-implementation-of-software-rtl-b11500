// tb_spreader: checks 3G spreading and despreading with SF=4 and the OVSF
// code (1,1,-1,1). The expected chips are computed here: chip = bit XOR
// code chip XOR x(k) XOR y(k), where x and y are the two m-sequences of the
// 3G long scrambling code generated in this bench from their recurrences
// x(i+18) = x(i+7)+x(i), x(0)=1, x(1..17)=0, and
// y(i+18) = y(i+10)+y(i+7)+y(i+5)+y(i), y(0..17)=1, advanced once per chip.
// Chips must leave on the four cycles after the bit is taken. The despreader
// gets the chips as +-256 with noise of +-60, and with one chip of some bits
// inverted; it must return every bit, with a dsoft value of the right sign.
module tb_spreader;
  import sdr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear, iv, ib, ov, oc, busy, dv, db, cv;
  sample_t chip;
  logic signed [SAMPLE_W+3:0] dsoft;
  spreader   u_s (.clk, .rst_n, .clear, .in_valid(iv), .in_bit(ib), .out_valid(ov), .out_chip(oc), .busy);
  despreader u_d (.clk, .rst_n, .clear, .in_valid(cv), .in_chip(chip), .out_valid(dv), .out_bit(db), .out_soft(dsoft));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit inv_chip [$];     // per chip: invert on the channel
  int chip_n = 0;
  always @(posedge clk) begin
    cv <= ov;
    if (ov) begin
      chip <= sample_t'((oc ^ inv_chip[chip_n]) ? -256 : 256) + sample_t'($signed($urandom_range(0, 120)) - 60);
      chip_n++;
    end
  end

  bit gchips [$], gd [$];
  bit softsign_ok = 1;
  always @(posedge clk) begin
    if (ov) gchips.push_back(oc);
    if (dv) begin
      gd.push_back(db);
      if (db != dsoft[SAMPLE_W+3]) softsign_ok = 0;
    end
  end

  initial begin
    bit x [$], y [$], d [$];
    bit code [4] = '{0, 0, 1, 0};
    int nbits = 300;
    iv = 0; ib = 0; clear = 0; cv = 0; chip = '0;
    for (int i = 0; i < 18; i++) begin x.push_back(i == 0); y.push_back(1); end
    for (int i = 0; i < 4 * nbits; i++) begin
      x.push_back(x[i + 7] ^ x[i]);
      y.push_back(y[i + 10] ^ y[i + 7] ^ y[i + 5] ^ y[i]);
    end
    for (int i = 0; i < 4 * nbits; i++) inv_chip.push_back(($urandom_range(0, 3) == 0) && (i % 4 == 1));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int b = 0; b < nbits; b++) begin
      d.push_back(1'($urandom_range(0, 1)));
      @(negedge clk); iv = 1; ib = d[b];
      @(negedge clk); iv = 0;
      for (int c = 0; c < 4; c++) begin
        @(posedge clk); #1;
        check(ov, "chip on each of the four cycles after the bit");
        check(busy == (c < 3), "busy while chips remain");
      end
      @(negedge clk);
      if ($urandom_range(0, 1)) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    check(gchips.size() == 4 * nbits, "chip count");
    for (int k = 0; k < 4 * nbits && k < gchips.size(); k++)
      check(gchips[k] == (d[k / 4] ^ code[k % 4] ^ x[k] ^ y[k]), $sformatf("chip %0d", k));
    check(gd.size() == nbits, "despread length");
    for (int b = 0; b < nbits && b < gd.size(); b++) check(gd[b] == d[b], $sformatf("despread bit %0d", b));
    check(softsign_ok, "dsoft sign agrees with the bit");
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

// tb_crc_check: checks the serial CRC checker with the 3G CRC-24
// (D^24+D^23+D^6+D^5+D+1) over N=96 bits and the 2G 3-bit CRC (D^3+D+1)
// over N=50 bits. Code words are built here by long division; a clean word
// must give crc_ok, a word with one random bit flipped must not, and the
// first N bits must be passed on unchanged with done one cycle after the last
// bit. A watchdog ends the run.
module tb_crc_check;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic v24, b24, ov24, ob24, d24, ok24;
  logic v3, b3, ov3, ob3, d3, ok3;
  crc_check #(.W(24), .POLY(24'h800063), .N(96)) u24 (
    .clk, .rst_n, .init('0), .in_valid(v24), .in_bit(b24),
    .out_valid(ov24), .out_bit(ob24), .done(d24), .crc_ok(ok24));
  crc_check #(.W(3), .POLY(3'b011), .N(50)) u3 (
    .clk, .rst_n, .init('0), .in_valid(v3), .in_bit(b3),
    .out_valid(ov3), .out_bit(ob3), .done(d3), .crc_ok(ok3));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit [23:0] remainder(input bit msg [$], input int w, input bit [24:0] gen);
    bit m [$];
    m = msg;
    for (int i = 0; i < w; i++) m.push_back(1'b0);
    for (int i = 0; i + w < m.size(); i++)
      if (m[i]) for (int j = 0; j <= w; j++) m[i + j] ^= gen[w - j];
    remainder = '0;
    for (int j = 0; j < w; j++) remainder[w - 1 - j] = m[m.size() - w + j];
  endfunction

  bit got24 [$], got3 [$];
  int done24 = 0, done3 = 0;
  bit last24, last3;
  always @(posedge clk) begin
    if (ov24) got24.push_back(ob24);
    if (ov3) got3.push_back(ob3);
    if (d24) begin done24++; last24 = ok24; end
    if (d3) begin done3++; last3 = ok3; end
  end

  initial begin
    v24 = 0; b24 = 0; v3 = 0; b3 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 8; t++) begin
      automatic bit d [$], w [$];
      automatic bit [23:0] r;
      automatic bit flip;
      automatic int n = (t % 2 == 1) ? 50 : 96;
      automatic int wd = (t % 2 == 1) ? 3 : 24;
      flip = (t % 4) >= 2;
      for (int i = 0; i < n; i++) d.push_back(1'($urandom_range(0, 1)));
      r = (t % 2 == 1) ? remainder(d, 3, 25'hB) : remainder(d, 24, 25'h1800063);
      w = d;
      for (int j = wd - 1; j >= 0; j--) w.push_back(r[j]);
      if (flip) w[$urandom_range(0, n + wd - 1)] ^= 1'b1;
      got24 = {}; got3 = {};
      for (int i = 0; i < w.size(); i++) begin
        @(negedge clk);
        if (t % 2 == 1) begin v3 = 1; b3 = w[i]; end else begin v24 = 1; b24 = w[i]; end
      end
      @(negedge clk); v3 = 0; v24 = 0;
      @(negedge clk);
      if (t % 2 == 1) begin
        check(done3 == t / 2 + 1, "2G done on the cycle after the last bit");
        check(last3 == !flip, $sformatf("2G crc_ok=%0b flip=%0b", last3, flip));
        check(got3.size() == n, "2G data length");
        for (int i = 0; i < n && i < got3.size(); i++) check(got3[i] == w[i], "2G data passes");
      end else begin
        check(done24 == t / 2 + 1, "3G done on the cycle after the last bit");
        check(last24 == !flip, $sformatf("3G crc_ok=%0b flip=%0b", last24, flip));
        check(got24.size() == n, "3G data length");
        for (int i = 0; i < n && i < got24.size(); i++) check(got24[i] == w[i], "3G data passes");
      end
      repeat (3) @(negedge clk);
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

// tb_crc_append: checks the serial CRC/HEC generator in two configurations:
// the Bluetooth payload CRC-16 (D^16+D^12+D^5+1, N=160, zero start) and the
// Bluetooth HEC (8 bits, D^8+D^7+D^5+D^2+D+1, N=10, start value = a random
// UAP, parity paced every 3 cycles). For random blocks the data bits must pass
// unchanged and the appended bits must equal the remainder computed here by
// plain polynomial long division of the whole message (start value added to
// the first bits, W zeros appended). It also checks that the parity bits
// come PACE cycles apart and that busy covers them. A watchdog ends the run.
module tb_crc_append;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        v16, b16, ov16, ob16, busy16;
  logic        v8, b8, ov8, ob8, busy8;
  logic [7:0]  uap;
  crc_append #(.W(16), .POLY(16'h1021), .N(160)) u16 (
    .clk, .rst_n, .init(16'h0000), .in_valid(v16), .in_bit(b16),
    .out_valid(ov16), .out_bit(ob16), .busy(busy16));
  crc_append #(.W(8), .POLY(8'hA7), .N(10), .PACE(3)) u8 (
    .clk, .rst_n, .init(uap), .in_valid(v8), .in_bit(b8),
    .out_valid(ov8), .out_bit(ob8), .busy(busy8));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // long division: msg bits (first = highest power), full generator gen (W+1 bits)
  function automatic bit [23:0] remainder(input bit msg [$], input int w, input bit [24:0] gen);
    bit m [$];
    m = msg;
    for (int i = 0; i < w; i++) m.push_back(1'b0);
    for (int i = 0; i + w < m.size(); i++)
      if (m[i]) for (int j = 0; j <= w; j++) m[i + j] ^= gen[w - j];
    remainder = '0;
    for (int j = 0; j < w; j++) remainder[w - 1 - j] = m[m.size() - w + j];
  endfunction

  bit got16 [$], got8 [$];
  int t8 [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (ov16) got16.push_back(ob16);
    if (ov8) begin got8.push_back(ob8); t8.push_back(cyc); end
  end

  initial begin
    v16 = 0; b16 = 0; v8 = 0; b8 = 0; uap = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 4; blk++) begin
      automatic bit d [$], m [$];
      automatic bit [23:0] r;
      got16 = {};
      for (int i = 0; i < 160; i++) d.push_back(1'($urandom_range(0, 1)));
      for (int i = 0; i < 160; i++) begin
        @(negedge clk); v16 = 1; b16 = d[i];
        // random idle cycles between bits
        if ($urandom_range(0, 3) == 0) begin @(negedge clk); v16 = 0; end
      end
      @(negedge clk); v16 = 0;
      check(busy16, "CRC16 busy after last bit");
      while (busy16) @(negedge clk);
      repeat (2) @(negedge clk);
      r = remainder(d, 16, 25'h11021);
      check(got16.size() == 176, $sformatf("CRC16 length %0d", got16.size()));
      for (int i = 0; i < 160; i++) check(got16[i] == d[i], "CRC16 data passes");
      for (int j = 0; j < 16; j++) check(got16[160 + j] == r[15 - j], $sformatf("CRC16 parity bit %0d", j));
    end
    for (int blk = 0; blk < 6; blk++) begin
      automatic bit d [$], m [$];
      automatic bit [23:0] r;
      got8 = {}; t8 = {};
      uap = 8'($urandom());
      for (int i = 0; i < 10; i++) d.push_back(1'($urandom_range(0, 1)));
      m = d;
      for (int i = 0; i < 8; i++) m[i] ^= uap[7 - i];
      for (int i = 0; i < 10; i++) begin @(negedge clk); v8 = 1; b8 = d[i]; end
      @(negedge clk); v8 = 0;
      while (busy8) @(negedge clk);
      repeat (2) @(negedge clk);
      r = remainder(m, 8, 25'h1A7);
      check(got8.size() == 18, "HEC length");
      for (int i = 0; i < 10; i++) check(got8[i] == d[i], "HEC data passes");
      for (int j = 0; j < 8; j++) check(got8[10 + j] == r[7 - j], $sformatf("HEC bit %0d", j));
      for (int j = 1; j < 8; j++) check(t8[10 + j] - t8[9 + j] == 3, "HEC parity spacing = PACE");
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

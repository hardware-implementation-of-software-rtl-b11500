// tb_output_interface: checks the bit-to-word packer. Random bits arrive with
// random gaps; every 32 bits a word must appear, LSB = first bit, the cycle
// after its last bit. A flush after a partial word must send the remaining
// bits zero padded; a flush with nothing pending must send nothing.
module tb_output_interface;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv, ib, fl, mv;
  logic [31:0] md;
  output_interface u_o (.clk, .rst_n, .in_valid(iv), .in_bit(ib), .flush(fl), .m_valid(mv), .m_data(md));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] gw [$];
  always @(posedge clk) if (mv) gw.push_back(md);

  initial begin
    logic [31:0] ew [$];
    iv = 0; ib = 0; fl = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 12; p++) begin
      automatic int n = $urandom_range(1, 100);
      automatic logic [31:0] w = '0;
      automatic int k = 0;
      for (int i = 0; i < n; i++) begin
        automatic bit b = 1'($urandom_range(0, 1));
        w[k] = b; k++;
        @(negedge clk); iv = 1; ib = b;
        if (k == 32) begin
          ew.push_back(w); w = '0; k = 0;
          @(posedge clk); #1;
          check(mv && md == ew[$], "word the cycle after its 32nd bit");
        end
        if ($urandom_range(0, 2) == 0) begin @(negedge clk); iv = 0; end
      end
      @(negedge clk); iv = 0;
      if (k != 0) ew.push_back(w);
      @(negedge clk); fl = 1; @(negedge clk); fl = 0;
      @(negedge clk); fl = 1; @(negedge clk); fl = 0;   // second flush: nothing pending
    end
    repeat (3) @(negedge clk);
    check(gw.size() == ew.size(), $sformatf("%0d words, %0d expected", gw.size(), ew.size()));
    for (int i = 0; i < ew.size() && i < gw.size(); i++) check(gw[i] == ew[i], $sformatf("word %0d", i));
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

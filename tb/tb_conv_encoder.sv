// tb_conv_encoder: checks the convolutional encoder in the three
// configurations of the design: Wi-Fi K=7 (generators 133/171 octal), 2G K=5
// (1+D^3+D^4, 1+D+D^3+D^4, no self-tail) and 3G K=9 (561/753 octal, N=96).
// The expected pairs are computed here from the tap delays written out
// directly (not from the DUT's masks): a = XOR of u[n-d] over the first
// generator's delays, b likewise for the second. Each pair must appear one
// cycle after its bit; after N bits the self-tailing encoders must emit
// exactly K-1 tail pairs with busy high, after which the state is zero.
module tb_conv_encoder;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iv, ib;
  logic [2:0] ov, busy;
  logic [1:0] op [3];
  logic [2:0] sel;
  conv_encoder u_w (.clk, .rst_n, .in_valid(iv & sel[0]), .in_bit(ib), .out_valid(ov[0]), .out_pair(op[0]), .busy(busy[0]));
  conv_encoder #(.K(5), .G0(5'b11001), .G1(5'b11011), .N(20), .TAIL(1'b0)) u_g (
    .clk, .rst_n, .in_valid(iv & sel[1]), .in_bit(ib), .out_valid(ov[1]), .out_pair(op[1]), .busy(busy[1]));
  conv_encoder #(.K(9), .G0(9'b100011101), .G1(9'b110101111), .N(96)) u_u (
    .clk, .rst_n, .in_valid(iv & sel[2]), .in_bit(ib), .out_valid(ov[2]), .out_pair(op[2]), .busy(busy[2]));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit tap(input bit u [$], input int n, input int d);
    return (n - d >= 0 && n - d < u.size()) ? u[n - d] : 1'b0;
  endfunction

  // generator delay lists
  int da [3][$] = '{'{0, 2, 3, 5, 6}, '{0, 3, 4}, '{0, 2, 3, 4, 8}};
  int db [3][$] = '{'{0, 1, 2, 3, 6}, '{0, 1, 3, 4}, '{0, 1, 2, 3, 5, 7, 8}};
  int nn [3] = '{48, 20, 96};
  int kk [3] = '{7, 5, 9};
  bit tl [3] = '{1, 0, 1};

  initial begin
    iv = 0; ib = 0; sel = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 2; rep++)
    for (int c = 0; c < 3; c++) begin
      automatic bit u [$];
      automatic int steps;
      sel = 3'(1 << c);
      for (int i = 0; i < nn[c]; i++) u.push_back(1'($urandom_range(0, 1)));
      steps = nn[c] + (tl[c] ? kk[c] - 1 : 0);
      for (int n = 0; n < steps; n++) begin
        automatic bit a = 0, b = 0;
        foreach (da[c][j]) a ^= tap(u, n, da[c][j]);
        foreach (db[c][j]) b ^= tap(u, n, db[c][j]);
        @(negedge clk);
        if (n < nn[c]) begin
          iv = 1; ib = u[n];
          check(!busy[c], "not busy during data");
        end else begin
          iv = 0;
          check(busy[c], "busy during the tail");
        end
        @(posedge clk); #1;
        check(ov[c], $sformatf("cfg %0d step %0d valid", c, n));
        check(op[c] == {a, b}, $sformatf("cfg %0d step %0d pair %b exp %b", c, n, op[c], {a, b}));
      end
      @(negedge clk); iv = 0;
      @(posedge clk); #1;
      check(!ov[c] && !busy[c], $sformatf("cfg %0d idle after block", c));
      if (!tl[c]) begin
        // 2G: the source supplies the tail; feed 4 zeros to reach state 0
        for (int n = 0; n < 4; n++) begin @(negedge clk); iv = 1; ib = 0; end
        @(negedge clk); iv = 0;
        // drain the next block's window: one zero bit must give pair 00
      end
      repeat (3) @(posedge clk);
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

// tb_gsm_reorder: checks gsm_reorder and gsm_dereorder at the 2G speech
// frame size (260 bits, 50 class-1a, 182 class-1, 3 parity, 4 tail).
// For random frames the transmit order is compared with a model that does
// the CRC as polynomial division of the class-1a bits times D^3 and then
// applies the even/odd reordering; the out_coded flag and the output
// pacing (one bit per PACE cycles) are checked too. The coded bits without
// the tail and the class-2 bits are then fed back through gsm_dereorder,
// which must restore the frame and report crc_ok; a frame with one flipped
// class-1a bit must give crc_ok low, and a flipped class-2 bit must pass.
module tb_gsm_reorder;
  localparam int N = 260, N1A = 50, N1 = 182, W = 3, TB = 4, PACE = 3;
  localparam int NU = N1 + W + TB, NO = NU + N - N1;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always #5 clk = ~clk;

  logic in_valid = 0, in_bit = 0, out_valid, out_bit, out_coded, busy;
  logic dec_valid = 0, dec_bit = 0, raw_valid = 0, raw_bit = 0;
  logic r_valid, r_bit, r_done, r_ok;

  gsm_reorder #(.N(N), .N1A(N1A), .N1(N1), .W(W), .POLY(3'b011), .TB(TB), .PACE(PACE)) u_tx (
    .clk, .rst_n, .in_valid, .in_bit, .out_valid, .out_bit, .out_coded, .busy);
  gsm_dereorder #(.N(N), .N1A(N1A), .N1(N1), .W(W), .POLY(3'b011)) u_rx (
    .clk, .rst_n, .dec_valid, .dec_bit, .raw_valid, .raw_bit,
    .out_valid(r_valid), .out_bit(r_bit), .done(r_done), .crc_ok(r_ok));

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit txo [$];
  bit txc [$];
  int tx_t [$];
  bit rxo [$];
  int n_done = 0;
  bit last_ok;
  always @(posedge clk) begin
    if (out_valid) begin txo.push_back(out_bit); txc.push_back(out_coded); tx_t.push_back(int'($time / 10)); end
    if (r_valid) rxo.push_back(r_bit);
    if (r_done) begin n_done++; last_ok = r_ok; end
  end

  // parity of the class-1a bits: remainder of d(D) D^3 / (D^3 + D + 1),
  // p(0) the coefficient of D^2
  function automatic bit [2:0] parity(input bit d [$]);
    bit [52:0] r = '0;
    for (int i = 0; i < N1A; i++) r[52 - i] = d[i];
    for (int i = 52; i >= 3; i--) if (r[i]) r[i -: 4] ^= 4'b1011;
    return r[2:0];
  endfunction

  task automatic run_frame(input int flip_at, input bit expect_ok);
    bit d [$];
    bit u [$];
    bit [2:0] p;
    int k;
    for (int i = 0; i < N; i++) d.push_back(1'($urandom_range(0, 1)));
    p = parity(d);
    for (int i = 0; i < NU; i++) u.push_back(1'b0);
    for (int i = 0; i < N1 / 2; i++) begin u[i] = d[2 * i]; u[N1 + W - 1 - i] = d[2 * i + 1]; end
    for (int i = 0; i < W; i++) u[N1 / 2 + i] = p[W - 1 - i];
    txo = {}; txc = {}; tx_t = {}; rxo = {};
    for (int i = 0; i < N; i++) begin
      @(negedge clk); in_valid = 1; in_bit = d[i];
      @(negedge clk); in_valid = 0;
    end
    k = 0;
    while (txo.size() < NO && k < 5000) begin @(posedge clk); k++; end
    check(txo.size() == NO, "output count");
    for (int i = 0; i < NO; i++) begin
      bit e = (i < NU) ? u[i] : d[N1 + i - NU];
      if (txo[i] != e || txc[i] != (i < NU)) begin
        failures++; $display("FAIL: tx bit %0d got %0d/%0d exp %0d", i, txo[i], txc[i], e);
      end
      checks++;
      if (i > 0) check(tx_t[i] - tx_t[i - 1] == PACE, "pacing");
    end
    // receiver: raw (class-2) bits first, then the decoded class-1 bits
    for (int i = 0; i < N - N1; i++) begin
      @(negedge clk); raw_valid = 1; raw_bit = txo[NU + i] ^ (flip_at == N1 + i);
    end
    @(negedge clk); raw_valid = 0;
    for (int i = 0; i < N1 + W; i++) begin
      int src;
      bit fl;
      @(negedge clk); dec_valid = 1;
      // flip_at < N1A names a data bit: find its position in u
      src = (flip_at % 2 == 0) ? flip_at / 2 : N1 + W - 1 - (flip_at - 1) / 2;
      fl = (flip_at < N1) && (i == src);
      dec_bit = txo[i] ^ fl;
    end
    @(negedge clk); dec_valid = 0;
    k = n_done;
    repeat (N + 10) @(posedge clk);
    check(n_done == k + 1, "one done pulse");
    check(last_ok == expect_ok, $sformatf("crc_ok %0d expected %0d", last_ok, expect_ok));
    check(rxo.size() == N, "frame length");
    for (int i = 0; i < N; i++) begin
      checks++;
      if (rxo.size() > i && rxo[i] != (d[i] ^ (i == flip_at))) begin
        failures++; $display("FAIL: rx bit %0d", i);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    run_frame(-1, 1'b1);
    run_frame(-1, 1'b1);
    run_frame(int'($urandom_range(0, N1A - 1)), 1'b0);
    run_frame(int'($urandom_range(N1, N - 1)), 1'b1);
    run_frame(-1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

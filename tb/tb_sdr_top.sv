// tb_sdr_top: end-to-end test of the five-standard transceiver at its default
// parameters. For every standard it sends random packets through the input
// DMA port, collects the output DMA words and compares the received bits with
// the sent ones (LTE: the systematic positions of the descrambled turbo code
// word, since no turbo decoder is present). It switches standards between
// packets, injects channel errors through chan_err (corrected by the
// repetition, Hamming, Viterbi and despreading stages) and sends one 2G
// packet with the steal flag set (FACCH). The 2G error is aimed at a burst
// bit that carries convolutionally coded data; the uncoded class-2 bits
// that bypass the 2G code are counted too. Each of these mechanisms is
// counted and must occur at least once; CRC/HEC flags must report success on
// every clean packet. A watchdog ends the run.
module tb_sdr_top;
  import sdr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always #5 clk = ~clk;

  std_e   std_sel;
  logic   frame_start, chan_err, s_valid, s_ready, flush, m_valid;
  logic [31:0] s_data, m_data;
  logic [5:0]  s_nbits;
  logic [7:0]  bt_uap;
  logic [6:0]  scr_seed;
  logic        gsm_steal_flag;
  logic [113:0] gsm_facch;
  logic [15:0] lte_n_rnti;
  logic        lte_q;
  logic [4:0]  lte_n_s;
  logic [8:0]  lte_n_id;
  logic bt_hec_done, bt_hec_ok, bt_crc_done, bt_crc_ok, bt_corrected;
  logic gsm_crc_done, gsm_crc_ok, gsm_burst_done, gsm_facch_rx, gsm_ts_ok;
  logic umts_crc_done, umts_crc_ok, lte_ready, lte_soft_valid, overflow;
  sample_t lte_soft;

  sdr_top dut (.*);

  int checks = 0, failures = 0;
  int n_switch = 0, n_bt_corr = 0, n_hdr_fix = 0, n_vit_fix = 0, n_facch = 0;
  int n_bypass = 0, n_despread_fix = 0, n_punct = 0, n_lte_neg = 0, n_ts_ok = 0, n_crc_ok = 0;

  // received bit log (from the output DMA words)
  bit rx [$];
  int rx_pending_bits;

  always @(posedge clk) if (rst_n) begin
    if (m_valid) for (int b = 0; b < 32; b++) rx.push_back(m_data[b]);
    if (bt_corrected) n_bt_corr++;
    if (gsm_facch_rx && gsm_burst_done) n_facch++;
    if (gsm_burst_done && gsm_ts_ok) n_ts_ok++;
    if (dut.w_v7 && dut.w_e7 != 2'b00) n_punct++;
    if (dut.g_v8 && !dut.g_coded8) n_bypass++;
    if (overflow) begin failures++; $display("FAIL: buffer overflow"); end
  end
  // count negations done by the soft descrambler
  always @(posedge clk) if (rst_n) begin
    if (dut.l_v6 && dut.l_drdy && dut.u_lte_descr.u_gold.c) n_lte_neg++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_packet(input bit bits[$]);
    int n = bits.size();
    for (int w = 0; w < n; w += 32) begin
      logic [31:0] d = '0;
      int nb = (n - w >= 32) ? 32 : n - w;
      for (int b = 0; b < nb; b++) d[b] = bits[w + b];
      @(negedge clk);
      s_valid = 1'b1; s_data = d; s_nbits = 6'(nb);
      do @(posedge clk); while (!s_ready);
      @(negedge clk);
      s_valid = 1'b0;
    end
  endtask

  task automatic start_frame(input std_e s);
    @(negedge clk);
    if (s != std_sel) n_switch++;
    std_sel = s;
    frame_start = 1'b1;
    @(negedge clk);
    frame_start = 1'b0;
  endtask

  task automatic collect(input int nbits, input int max_cycles);
    int c = 0;
    while (rx.size() < nbits && c < max_cycles) begin
      @(posedge clk); c++;
      if (c % 2000 == 0) begin @(negedge clk); flush = 1'b1; @(negedge clk); flush = 1'b0; end
    end
    @(negedge clk); flush = 1'b1; @(negedge clk); flush = 1'b0;
    repeat (4) @(posedge clk);
  endtask

  // Run one packet of standard s with n random bits; inject channel errors
  // after err_at cycles (0 = none). Returns the number of mismatching bits.
  task automatic run_packet(input std_e s, input int n, input int err_at, input int err_at2,
                            input bit expect_ok, output int bad);
    bit tx [$];
    bit b;
    int exp_n;
    int crc_seen_ok;
    tx = {};
    for (int i = 0; i < n; i++) begin b = 1'($urandom_range(0, 1)); tx.push_back(b); end
    rx = {};
    start_frame(s);
    if (s == STD_LTE) begin
      int c = 0;
      while (!lte_ready && c < 5000) begin @(posedge clk); c++; end
    end
    fork
      send_packet(tx);
      begin
        if (err_at < 0) begin
          // 2G: hit burst bit -err_at (a coded bit after interleaving)
          repeat (-err_at) begin @(posedge clk); while (!dut.g_v5) @(posedge clk); end
          @(negedge clk); chan_err = 1'b1; @(negedge clk); chan_err = 1'b0;
        end
        if (err_at > 0) begin
          repeat (err_at) @(posedge clk);
          @(negedge clk); chan_err = 1'b1; @(negedge clk); chan_err = 1'b0;
        end
        if (err_at2 > 0) begin
          repeat (err_at2) @(posedge clk);
          @(negedge clk); chan_err = 1'b1; @(negedge clk); chan_err = 1'b0;
        end
      end
    join
    exp_n = (s == STD_LTE) ? 3 * (n + 24 + 4) : n;
    collect(exp_n, 60000);
    bad = 0;
    check(rx.size() >= exp_n, $sformatf("std %0d: got %0d bits, expected %0d", s, rx.size(), exp_n));
    if (s == STD_LTE) begin
      for (int k = 0; k < n; k++) if (rx.size() > 3 * k && rx[3 * k] != tx[k]) bad++;
    end else begin
      for (int k = 0; k < n; k++) if (rx.size() > k && rx[k] != tx[k]) bad++;
    end
    if (expect_ok) check(bad == 0, $sformatf("std %0d: %0d bit errors (err_at %0d)", s, bad, err_at));
    repeat (200) @(posedge clk);
  endtask

  // CRC/HEC status monitors
  always @(posedge clk) if (rst_n) begin
    if (bt_hec_done) begin check(bt_hec_ok, "BT HEC"); if (bt_hec_ok) n_crc_ok++; end
    if (bt_crc_done) begin check(bt_crc_ok, "BT CRC"); if (bt_crc_ok) n_crc_ok++; end
    if (umts_crc_done) begin check(umts_crc_ok, "3G CRC"); if (umts_crc_ok) n_crc_ok++; end
    if (gsm_crc_done && !gsm_steal_flag) begin check(gsm_crc_ok, "2G CRC"); if (gsm_crc_ok) n_crc_ok++; end
  end

  initial begin
    int bad;
    std_sel = STD_BT; frame_start = 0; chan_err = 0; s_valid = 0; s_data = '0; s_nbits = '0;
    flush = 0; bt_uap = 8'h47; scr_seed = 7'h5B; gsm_steal_flag = 0;
    gsm_facch = {$urandom(), $urandom(), $urandom(), 18'($urandom())};
    lte_n_rnti = 16'h1234; lte_q = 0; lte_n_s = 5'd6; lte_n_id = 9'd77;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // Bluetooth: clean, then one header error (majority) and one payload error (Hamming)
    run_packet(STD_BT, 154, 0, 0, 1'b1, bad);
    run_packet(STD_BT, 154, 20, 600, 1'b1, bad);
    if (bad == 0) n_hdr_fix++;
    // Wi-Fi MCS4 (QPSK, rate 3/4): clean, then one channel error
    run_packet(STD_WIFI, 66, 0, 0, 1'b1, bad);
    run_packet(STD_WIFI, 66, 1000, 0, 1'b1, bad);
    if (bad == 0) n_vit_fix++;
    // 2G: clean, channel error, then a FACCH (stolen) packet
    run_packet(STD_GSM, 260, 0, 0, 1'b1, bad);
    run_packet(STD_GSM, 260, -4, 0, 1'b1, bad);
    if (bad == 0) n_vit_fix++;
    gsm_steal_flag = 1'b1;
    run_packet(STD_GSM, 260, 0, 0, 1'b0, bad);
    gsm_steal_flag = 1'b0;
    // 3G: clean, then a chip error
    run_packet(STD_UMTS, 96, 0, 0, 1'b1, bad);
    run_packet(STD_UMTS, 96, 2500, 0, 1'b1, bad);
    if (bad == 0) n_despread_fix++;
    // LTE: two packets
    run_packet(STD_LTE, 16, 0, 0, 1'b1, bad);
    run_packet(STD_LTE, 16, 0, 0, 1'b1, bad);
    // back to Bluetooth after the others
    run_packet(STD_BT, 154, 0, 0, 1'b1, bad);

    $display("mechanisms: hdr_fix=%0d switches=%0d hamming_fix=%0d viterbi_fix=%0d despread_fix=%0d facch=%0d punct_erasures=%0d lte_negations=%0d ts_ok=%0d crc_ok=%0d class2_bypass=%0d",
             n_hdr_fix, n_switch, n_bt_corr, n_vit_fix, n_despread_fix, n_facch, n_punct, n_lte_neg, n_ts_ok, n_crc_ok, n_bypass);
    check(n_switch >= 5, "standard switches");
    check(n_bt_corr > 0, "Hamming correction never happened");
    check(n_hdr_fix > 0, "header repetition correction never happened");
    check(n_vit_fix > 0, "Viterbi correction never happened");
    check(n_despread_fix > 0, "despreading correction never happened");
    check(n_facch > 0, "FACCH burst never received");
    check(n_punct > 0, "depuncturing erasures never happened");
    check(n_lte_neg > 0, "LTE soft negation never happened");
    check(n_ts_ok > 0, "training sequence never matched");
    check(n_crc_ok > 0, "no CRC passed");
    check(n_bypass > 0, "2G class-2 bypass never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_wifi_mcs: runs the Wi-Fi chain of sdr_top in all six modulation and
// coding schemes (MCS1 BPSK 1/2, MCS2 BPSK 3/4, MCS3 QPSK 1/2, MCS4 QPSK 3/4,
// MCS5 16-QAM 1/2, MCS6 16-QAM 3/4). One top per scheme is built, each
// with the packet size that fills exactly one OFDM symbol
// (NCBPS * rate - 6 tail bits: 18, 30, 42, 66, 90, 138 bits). Every top
// gets two random packets, the second with one channel error, and the
// received bits must equal the sent ones. The number of received bits and
// the depunctured erasures (schemes 2, 4, 6) and the injected channel
// errors (exactly one per scheme) are counted; a scheme whose
// packets never came back counts as a failure. A watchdog ends the run.
module tb_wifi_mcs;
  import sdr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge before the first clock edge
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit fin [1:6];

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  for (genvar m = 1; m <= 6; m++) begin : g_mcs
    localparam int NCBPS = (m <= 2) ? 48 : (m <= 4) ? 96 : 192;
    localparam int NBITS = ((m % 2 == 0) ? NCBPS * 3 / 4 : NCBPS / 2) - 6;
    logic frame_start = 0, chan_err = 0, s_valid = 0, s_ready, flush = 0, m_valid;
    logic [31:0] s_data = '0, m_data;
    logic [5:0]  s_nbits = '0;
    logic bt_hec_done, bt_hec_ok, bt_crc_done, bt_crc_ok, bt_corrected;
    logic gsm_crc_done, gsm_crc_ok, gsm_burst_done, gsm_facch_rx, gsm_ts_ok;
    logic umts_crc_done, umts_crc_ok, lte_ready, lte_soft_valid, overflow;
    sample_t lte_soft;
    sdr_top #(.WIFI_MCS(m), .WIFI_N(NBITS)) dut (
      .clk, .rst_n, .std_sel(STD_WIFI), .frame_start, .chan_err,
      .s_valid, .s_data, .s_nbits, .s_ready, .flush, .m_valid, .m_data,
      .bt_uap(8'h00), .scr_seed(7'h5D), .gsm_steal_flag(1'b0), .gsm_facch('0),
      .lte_n_rnti(16'h0), .lte_q(1'b0), .lte_n_s(5'd0), .lte_n_id(9'd0),
      .bt_hec_done, .bt_hec_ok, .bt_crc_done, .bt_crc_ok, .bt_corrected,
      .gsm_crc_done, .gsm_crc_ok, .gsm_burst_done, .gsm_facch_rx, .gsm_ts_ok,
      .umts_crc_done, .umts_crc_ok, .lte_ready, .lte_soft_valid, .lte_soft, .overflow);

    bit rx [$];
    int n_erase = 0, n_flip = 0;
    always @(posedge clk) if (rst_n) begin
      if (m_valid) for (int b = 0; b < 32; b++) rx.push_back(m_data[b]);
      if (dut.w_v7 && dut.w_e7 != 2'b00) n_erase++;
      if (dut.flip_now) n_flip++;
      if (overflow) check(1'b0, $sformatf("MCS%0d overflow at %0t", m, $time));
    end

    initial begin
      repeat (5) @(posedge clk);
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        automatic bit tx [$] = {};
        automatic int bad = 0;
        for (int i = 0; i < NBITS; i++) tx.push_back(1'($urandom_range(0, 1)));
        rx = {};
        @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
        fork
          for (int w = 0; w < NBITS; w += 32) begin
            automatic logic [31:0] d = '0;
            automatic int nb = (NBITS - w >= 32) ? 32 : NBITS - w;
            for (int b = 0; b < nb; b++) d[b] = tx[w + b];
            @(negedge clk); s_valid = 1; s_data = d; s_nbits = 6'(nb);
            do @(posedge clk); while (!s_ready);
            @(negedge clk); s_valid = 0;
          end
          if (p == 1) begin
            repeat (10) @(posedge clk);
            @(negedge clk); chan_err = 1; @(negedge clk); chan_err = 0;
          end
        join
        repeat (NBITS * 16 + 3000) @(posedge clk);
        @(negedge clk); flush = 1; @(negedge clk); flush = 0;
        repeat (4) @(posedge clk);
        check(rx.size() >= NBITS, $sformatf("MCS%0d packet %0d: %0d bits back", m, p, rx.size()));
        for (int i = 0; i < NBITS && i < rx.size(); i++) if (rx[i] != tx[i]) bad++;
        check(bad == 0, $sformatf("MCS%0d packet %0d: %0d bit errors", m, p, bad));
      end
      check(n_flip == 1, $sformatf("MCS%0d: %0d channel errors injected", m, n_flip));
      if (m % 2 == 0) check(n_erase > 0, $sformatf("MCS%0d: no depunctured erasures", m));
      fin[m] = 1'b1;
    end
  end

  initial begin
    wait (rst_n == 1'b0);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin[1] && fin[2] && fin[3] && fin[4] && fin[5] && fin[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

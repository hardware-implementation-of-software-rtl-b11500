// sdr_top: multi-standard SDR transceiver (Bluetooth, Wi-Fi, 2G, 3G, LTE).
//
// Bits arrive from the input DMA as 32-bit words; input_interface sends them
// one every DIV cycles. std_sel steers them into one of five transmit chains
// (the multiplexer that, in the reconfigurable build, replaces the loading of
// a partial bitstream). Each transmitter feeds its own receiver directly, the
// transmitter-to-receiver arrangement of the single-partition system, and the
// receiver selected by std_sel drives output_interface, which packs the
// decoded bits into 32-bit words for the output DMA.
//
//   BT   header: HEC(8) -> whitening -> repetition 1/3 -> DQPSK map ->
//        DQPSK demap -> majority decode -> dewhitening -> De-HEC
//        payload: CRC16 -> whitening -> Hamming(15,10) -> DQPSK map ->
//        DQPSK demap -> Hamming decode -> dewhitening -> De-CRC
//        (header and payload are whitened and modulated as the document
//        describes, but by separate instances: each whitening generator
//        starts from scr_seed and each DQPSK path from phase 0; this
//        design's choice, so the two paths need no shared serialiser)
//   WiFi scrambler -> conv K=7 -> puncture -> interleaver -> BPSK/QPSK/16-QAM map ->
//        demap -> deinterleaver -> depuncture -> Viterbi -> descrambler
//   2G   CRC3 on class 1a + reordering -> conv K=5 on class 1 (class 2
//        uncoded) -> 8x57 interleaver -> burst formation -> differential
//        code -> differential decode -> burst deformation -> deinterleaver
//        -> Viterbi on class 1 -> reordering back + De-CRC
//   3G   CRC -> conv K=9 -> 30-column interleaver -> spreading/scrambling ->
//        BPSK -> demap -> despreading -> deinterleaver -> Viterbi -> De-CRC
//   LTE  CRC24 -> turbo encoder -> scrambler -> QPSK -> CP insert ->
//        CP remove -> soft demap -> soft descrambler (soft values out)
//
// Not present (see the README): the vendor IFFT/FFT cores, the LTE 14-point
// DFT, rate matching and turbo decoder, Wi-Fi preamble, 3G/LTE code
// block segmentation; the receive side of LTE therefore ends with the
// descrambled soft values (lte_soft_*), whose hard decisions also go to the
// output interface.
//
// frame_start (one cycle, while the chains are idle) restarts every
// per-packet generator: whitening/scrambler seeds, the DQPSK reference phase,
// the 2G differential coder, the 3G code generators and the LTE Gold
// sequence (which then needs 1600 cycles before LTE data may enter).
// chan_err is a channel-error hook: a pulse inverts the next channel bit of
// the selected standard (BT payload after the Hamming encoder, BT header
// after the repetition encoder, Wi-Fi after the interleaver, 2G after the
// differential encoder, 3G chip, LTE after the scrambler).
//
// Several sub-block status outputs (busy flags, soft values of the hard-
// decision chains, the 2G steal flag pair) are left unconnected: the
// input pacing and the idle time between packets already keep every stage
// within its rate, so the top needs no back-pressure from them.
//
// Packet sizes at the defaults: BT 10 header + 144 payload bits, Wi-Fi 66
// bits (one 96-bit QPSK rate-3/4 symbol), 2G 260 bits (456 coded, four bursts), 3G 96
// bits, LTE 16 bits (turbo block K=40). Packets must be separated by idle
// time long enough for the previous one to leave the receiver.
module sdr_top
  import sdr_pkg::*;
#(
  parameter int DIV      = 16,
  parameter int BT_HDR   = 10,
  parameter int BT_PAY   = 144,
  parameter int WIFI_MCS = 4,      // 1..6: BPSK/QPSK/16-QAM, with or without rate 3/4
  parameter int WIFI_N   = 66,
  parameter int GSM_N    = 260,
  parameter int UMTS_N   = 96,
  parameter int UMTS_CRC = 16,     // 8, 12, 16 or 24
  parameter int LTE_N    = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  std_e         std_sel,
  input  logic         frame_start,
  input  logic         chan_err,
  // input DMA stream
  input  logic         s_valid,
  input  logic [31:0]  s_data,
  input  logic [5:0]   s_nbits,
  output logic         s_ready,
  // output DMA stream
  input  logic         flush,
  output logic         m_valid,
  output logic [31:0]  m_data,
  // per-standard controls and status
  input  logic [7:0]   bt_uap,
  input  logic [6:0]   scr_seed,
  input  logic         gsm_steal_flag,
  input  logic [113:0] gsm_facch,
  input  logic [15:0]  lte_n_rnti,
  input  logic         lte_q,
  input  logic [4:0]   lte_n_s,
  input  logic [8:0]   lte_n_id,
  output logic         bt_hec_done,
  output logic         bt_hec_ok,
  output logic         bt_crc_done,
  output logic         bt_crc_ok,
  output logic         bt_corrected,
  output logic         gsm_crc_done,
  output logic         gsm_crc_ok,
  output logic         gsm_burst_done,
  output logic         gsm_facch_rx,
  output logic         gsm_ts_ok,
  output logic         umts_crc_done,
  output logic         umts_crc_ok,
  output logic         lte_ready,
  output logic         lte_soft_valid,
  output sample_t      lte_soft,
  output logic         overflow
);
  // ---------------------------------------------------------------- shared
  localparam bit WIFI_PUNCT = (WIFI_MCS % 2) == 0;
  localparam bit WIFI_QPSK  = (WIFI_MCS > 2);
  localparam bit WIFI_QAM   = (WIFI_MCS > 4);
  localparam int WIFI_NBPSC = WIFI_QAM ? 4 : WIFI_QPSK ? 2 : 1;
  localparam int WIFI_NCBPS = 48 * WIFI_NBPSC;
  localparam logic [23:0] UMTS_POLY =
      (UMTS_CRC == 24) ? 24'h800063 :
      (UMTS_CRC == 16) ? 24'h001021 :
      (UMTS_CRC == 12) ? 24'h00080F : 24'h00009B;

  logic in_valid, in_bit, chain_rst_n;
  logic flip_pend, flip_now;

  input_interface #(.DIV(DIV)) u_in (
    .clk, .rst_n, .s_valid, .s_data, .s_nbits, .s_ready,
    .out_valid(in_valid), .out_bit(in_bit), .chain_rst_n
  );

  // channel error hook: armed by chan_err, spent on the next channel bit
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        flip_pend <= 1'b0;
    else if (chan_err) flip_pend <= 1'b1;
    else if (flip_now) flip_pend <= 1'b0;
  end

  logic v_bt, v_wifi, v_gsm, v_umts, v_lte;
  assign v_bt   = in_valid && std_sel == STD_BT;
  assign v_wifi = in_valid && std_sel == STD_WIFI;
  assign v_gsm  = in_valid && std_sel == STD_GSM;
  assign v_umts = in_valid && std_sel == STD_UMTS;
  assign v_lte  = in_valid && std_sel == STD_LTE;

  // ---------------------------------------------------------------- Bluetooth
  // Segmentation: the first BT_HDR bits of a packet are header, the rest
  // payload.
  logic [$clog2(BT_HDR + BT_PAY + 1)-1:0] bt_cnt;
  logic bt_is_hdr;
  assign bt_is_hdr = (int'(bt_cnt) < BT_HDR);
  always_ff @(posedge clk or negedge chain_rst_n) begin
    if (!chain_rst_n) bt_cnt <= '0;
    else if (frame_start) bt_cnt <= '0;
    else if (v_bt) bt_cnt <= (int'(bt_cnt) == BT_HDR + BT_PAY - 1) ? '0 : bt_cnt + 1'b1;
  end

  logic bh_v0, bh_b0, bh_vw, bh_bw, bh_v1, bh_b1, bh_v2, bh_b2, bh_v3, bh_b3, bh_busy0, bh_busy1;
  logic bh_vm, bh_vd, bh_bd, bh_vx, bh_bx;
  sample_t bh_i, bh_q;
  crc_append #(.W(8), .POLY(8'hA7), .N(BT_HDR), .PACE(DIV)) u_bt_hec (
    .clk, .rst_n(chain_rst_n), .init(bt_uap), .in_valid(v_bt & bt_is_hdr), .in_bit,
    .out_valid(bh_v0), .out_bit(bh_b0), .busy(bh_busy0));
  lfsr_scrambler u_bt_hwhite (
    .clk, .rst_n(chain_rst_n), .load(frame_start), .seed(scr_seed),
    .in_valid(bh_v0), .in_bit(bh_b0), .out_valid(bh_vw), .out_bit(bh_bw));
  repetition_encoder u_bt_rep (
    .clk, .rst_n(chain_rst_n), .in_valid(bh_vw), .in_bit(bh_bw),
    .out_valid(bh_v1), .out_bit(bh_b1), .busy(bh_busy1));
  logic bh_b1c;
  assign bh_b1c = bh_b1 ^ (flip_pend && std_sel == STD_BT && bh_v1);
  dqpsk_mapper u_bt_hmap (
    .clk, .rst_n(chain_rst_n), .clear(frame_start), .in_valid(bh_v1), .in_bit(bh_b1c),
    .out_valid(bh_vm), .out_i(bh_i), .out_q(bh_q));
  dqpsk_demapper u_bt_hdemap (
    .clk, .rst_n(chain_rst_n), .clear(frame_start), .in_valid(bh_vm), .in_i(bh_i), .in_q(bh_q),
    .out_valid(bh_vd), .out_bit(bh_bd));
  repetition_decoder u_bt_repdec (
    .clk, .rst_n(chain_rst_n), .in_valid(bh_vd), .in_bit(bh_bd),
    .out_valid(bh_v2), .out_bit(bh_b2));
  lfsr_scrambler u_bt_hdewhite (
    .clk, .rst_n(chain_rst_n), .load(frame_start), .seed(scr_seed),
    .in_valid(bh_v2), .in_bit(bh_b2), .out_valid(bh_vx), .out_bit(bh_bx));
  crc_check #(.W(8), .POLY(8'hA7), .N(BT_HDR)) u_bt_dehec (
    .clk, .rst_n(chain_rst_n), .init(bt_uap), .in_valid(bh_vx), .in_bit(bh_bx),
    .out_valid(bh_v3), .out_bit(bh_b3), .done(bt_hec_done), .crc_ok(bt_hec_ok));

  logic bp_v0, bp_b0, bp_v1, bp_b1, bp_v2, bp_b2, bp_busy0;
  logic bp_v3, bp_v4, bp_b4, bp_v5, bp_b5, bp_v6, bp_b6;
  sample_t bp_i, bp_q;
  crc_append #(.W(16), .POLY(16'h1021), .N(BT_PAY), .PACE(DIV)) u_bt_crc (
    .clk, .rst_n(chain_rst_n), .init(16'h0000), .in_valid(v_bt & ~bt_is_hdr), .in_bit,
    .out_valid(bp_v0), .out_bit(bp_b0), .busy(bp_busy0));
  lfsr_scrambler u_bt_white (
    .clk, .rst_n(chain_rst_n), .load(frame_start), .seed(scr_seed),
    .in_valid(bp_v0), .in_bit(bp_b0), .out_valid(bp_v1), .out_bit(bp_b1));
  hamming_encoder u_bt_ham (
    .clk, .rst_n(chain_rst_n), .in_valid(bp_v1), .in_bit(bp_b1),
    .out_valid(bp_v2), .out_bit(bp_b2));
  logic bp_b2c;
  assign bp_b2c = bp_b2 ^ (flip_pend && std_sel == STD_BT && bp_v2 && !bh_v1);
  dqpsk_mapper u_bt_map (
    .clk, .rst_n(chain_rst_n), .clear(frame_start), .in_valid(bp_v2), .in_bit(bp_b2c),
    .out_valid(bp_v3), .out_i(bp_i), .out_q(bp_q));
  dqpsk_demapper u_bt_demap (
    .clk, .rst_n(chain_rst_n), .clear(frame_start), .in_valid(bp_v3), .in_i(bp_i), .in_q(bp_q),
    .out_valid(bp_v4), .out_bit(bp_b4));
  hamming_decoder u_bt_hamdec (
    .clk, .rst_n(chain_rst_n), .in_valid(bp_v4), .in_bit(bp_b4),
    .out_valid(bp_v5), .out_bit(bp_b5), .corrected(bt_corrected));
  lfsr_scrambler u_bt_dewhite (
    .clk, .rst_n(chain_rst_n), .load(frame_start), .seed(scr_seed),
    .in_valid(bp_v5), .in_bit(bp_b5), .out_valid(bp_v6), .out_bit(bp_b6));
  logic bp_v7, bp_b7;
  crc_check #(.W(16), .POLY(16'h1021), .N(BT_PAY)) u_bt_decrc (
    .clk, .rst_n(chain_rst_n), .init(16'h0000), .in_valid(bp_v6), .in_bit(bp_b6),
    .out_valid(bp_v7), .out_bit(bp_b7), .done(bt_crc_done), .crc_ok(bt_crc_ok));

  // Concatenation of the decoded header and payload (the header finishes
  // long before the first payload word is decoded).
  logic bt_ov, bt_ob;
  assign bt_ov = bh_v3 | bp_v7;
  assign bt_ob = bh_v3 ? bh_b3 : bp_b7;

  // ---------------------------------------------------------------- Wi-Fi
  logic w_v0, w_b0, w_v1, w_busy1, w_v2, w_b2, w_v3, w_b3, w_ovf0, w_ovf1;
  logic [1:0] w_p1;
  lfsr_scrambler u_wifi_scr (
    .clk, .rst_n(chain_rst_n), .load(frame_start), .seed(scr_seed),
    .in_valid(v_wifi), .in_bit, .out_valid(w_v0), .out_bit(w_b0));
  conv_encoder #(.K(7), .G0(7'b1101101), .G1(7'b1001111), .N(WIFI_N), .TAIL(1'b1), .PACE(DIV)) u_wifi_enc (
    .clk, .rst_n(chain_rst_n), .in_valid(w_v0), .in_bit(w_b0),
    .out_valid(w_v1), .out_pair(w_p1), .busy(w_busy1));
  puncture #(.PUNCT(WIFI_PUNCT)) u_wifi_punct (
    .clk, .rst_n(chain_rst_n), .in_valid(w_v1), .in_pair(w_p1),
    .out_valid(w_v2), .out_bit(w_b2));
  wifi_interleaver #(.NCBPS(WIFI_NCBPS), .NBPSC(WIFI_NBPSC), .DEINT(1'b0)) u_wifi_il (
    .clk, .rst_n(chain_rst_n), .in_valid(w_v2), .in_bit(w_b2), .out_ready(1'b1),
    .out_valid(w_v3), .out_bit(w_b3), .overflow(w_ovf0));
  logic w_b3c, w_v4, w_v5, w_b5, w_v6, w_b6, w_v7, w_v8, w_b8, w_v9, w_b9, w_vbusy;
  sample_t w_i, w_q, w_soft;
  logic [1:0] w_p7, w_e7;
  assign w_b3c = w_b3 ^ (flip_pend && std_sel == STD_WIFI && w_v3);
  if (WIFI_QAM) begin : g_wifi_qam
    qam16_mapper u_wifi_map (
      .clk, .rst_n(chain_rst_n), .in_valid(w_v3), .in_bit(w_b3c),
      .out_valid(w_v4), .out_i(w_i), .out_q(w_q));
    qam16_demapper u_wifi_demap (
      .clk, .rst_n(chain_rst_n), .in_valid(w_v4), .in_i(w_i), .in_q(w_q),
      .out_valid(w_v5), .out_bit(w_b5), .out_soft(w_soft));
  end else begin : g_wifi_psk
    psk_mapper #(.QPSK(WIFI_QPSK)) u_wifi_map (
      .clk, .rst_n(chain_rst_n), .in_valid(w_v3), .in_bit(w_b3c),
      .out_valid(w_v4), .out_i(w_i), .out_q(w_q));
    psk_demapper #(.QPSK(WIFI_QPSK)) u_wifi_demap (
      .clk, .rst_n(chain_rst_n), .in_valid(w_v4), .in_i(w_i), .in_q(w_q),
      .out_valid(w_v5), .out_bit(w_b5), .out_soft(w_soft));
  end
  wifi_interleaver #(.NCBPS(WIFI_NCBPS), .NBPSC(WIFI_NBPSC), .DEINT(1'b1)) u_wifi_deil (
    .clk, .rst_n(chain_rst_n), .in_valid(w_v5), .in_bit(w_b5), .out_ready(1'b1),
    .out_valid(w_v6), .out_bit(w_b6), .overflow(w_ovf1));
  depuncture #(.PUNCT(WIFI_PUNCT)) u_wifi_depunct (
    .clk, .rst_n(chain_rst_n), .in_valid(w_v6), .in_bit(w_b6),
    .out_valid(w_v7), .out_pair(w_p7), .out_erase(w_e7));
  viterbi_decoder #(.K(7), .G0(7'b1101101), .G1(7'b1001111), .N(WIFI_N)) u_wifi_vit (
    .clk, .rst_n(chain_rst_n), .in_valid(w_v7), .in_pair(w_p7), .in_erase(w_e7),
    .out_valid(w_v8), .out_bit(w_b8), .busy(w_vbusy));
  lfsr_scrambler u_wifi_descr (
    .clk, .rst_n(chain_rst_n), .load(frame_start), .seed(scr_seed),
    .in_valid(w_v8), .in_bit(w_b8), .out_valid(w_v9), .out_bit(w_b9));

  // ---------------------------------------------------------------- 2G
  localparam int GSM_N1A = 50;      // class 1a bits (CRC protected)
  localparam int GSM_N1  = GSM_N - 78;  // class 1 bits (coded); 78 class-2 bits are not
  logic g_v0, g_b0, g_c0, g_busy0, g_v1, g_v2, g_b2, g_v2i, g_b2i, g_v3, g_b3, g_ovf0, g_rdy;
  logic [1:0] g_p1;
  gsm_reorder #(.N(GSM_N), .N1A(GSM_N1A), .N1(GSM_N1), .W(3), .POLY(3'b011), .TB(4), .PACE(DIV)) u_gsm_reord (
    .clk, .rst_n(chain_rst_n), .in_valid(v_gsm), .in_bit,
    .out_valid(g_v0), .out_bit(g_b0), .out_coded(g_c0), .busy(g_busy0));
  conv_encoder #(.K(5), .G0(5'b11001), .G1(5'b11011), .N(GSM_N1 + 3 + 4), .TAIL(1'b0), .PACE(DIV)) u_gsm_enc (
    .clk, .rst_n(chain_rst_n), .in_valid(g_v0 && g_c0), .in_bit(g_b0),
    .out_valid(g_v1), .out_pair(g_p1), .busy());
  puncture #(.PUNCT(1'b0)) u_gsm_p2s (
    .clk, .rst_n(chain_rst_n), .in_valid(g_v1), .in_pair(g_p1),
    .out_valid(g_v2), .out_bit(g_b2));
  // class-2 bits skip the encoder; they come PACE cycles after the last
  // coded pair has left the parallel-to-serial converter
  assign g_v2i = g_v2 || (g_v0 && !g_c0);
  assign g_b2i = g_v2 ? g_b2 : g_b0;
  block_interleaver #(.ROWS(8), .COLS(57), .PERM(0), .DEINT(1'b0)) u_gsm_il (
    .clk, .rst_n(chain_rst_n), .in_valid(g_v2i), .in_bit(g_b2i), .out_ready(g_rdy),
    .out_valid(g_v3), .out_bit(g_b3), .overflow(g_ovf0));
  logic g_v4, g_b4, g_bf_busy, g_v5, g_b5, g_b5c, g_v6, g_b6, g_v7, g_b7;
  burst_formation u_gsm_burst (
    .clk, .rst_n(chain_rst_n), .steal_flag(gsm_steal_flag), .facch(gsm_facch),
    .in_valid(g_v3), .in_bit(g_b3), .out_valid(g_v4), .out_bit(g_b4),
    .in_ready(g_rdy), .busy(g_bf_busy));
  gsm_diff_encoder u_gsm_diff (
    .clk, .rst_n(chain_rst_n), .clear(frame_start), .in_valid(g_v4), .in_bit(g_b4),
    .out_valid(g_v5), .out_bit(g_b5));
  assign g_b5c = g_b5 ^ (flip_pend && std_sel == STD_GSM && g_v5);
  gsm_diff_decoder u_gsm_ddec (
    .clk, .rst_n(chain_rst_n), .clear(frame_start), .in_valid(g_v5), .in_bit(g_b5c),
    .out_valid(g_v6), .out_bit(g_b6));
  logic [1:0] g_sf;
  burst_deformation u_gsm_deburst (
    .clk, .rst_n(chain_rst_n), .in_valid(g_v6), .in_bit(g_b6),
    .out_valid(g_v7), .out_bit(g_b7), .done(gsm_burst_done), .steal_flags(g_sf),
    .facch(gsm_facch_rx), .ts_ok(gsm_ts_ok));
  logic g_v8, g_b8, g_ovf1, g_v9, g_v10, g_b10, g_vbusy, g_v11, g_b11;
  logic [1:0] g_p9, g_e9;
  block_interleaver #(.ROWS(8), .COLS(57), .PERM(0), .DEINT(1'b1)) u_gsm_deil (
    .clk, .rst_n(chain_rst_n), .in_valid(g_v7), .in_bit(g_b7), .out_ready(1'b1),
    .out_valid(g_v8), .out_bit(g_b8), .overflow(g_ovf1));
  // the first 2*(GSM_N1+7) deinterleaved bits are coded, the rest class 2
  logic [8:0] g_k8;
  logic       g_coded8;
  assign g_coded8 = g_k8 < 9'(2 * (GSM_N1 + 7));
  always_ff @(posedge clk or negedge chain_rst_n) begin
    if (!chain_rst_n)                 g_k8 <= '0;
    else if (g_v8 && g_k8 == 9'(455)) g_k8 <= '0;
    else if (g_v8)                    g_k8 <= g_k8 + 1'b1;
  end
  depuncture #(.PUNCT(1'b0)) u_gsm_s2p (
    .clk, .rst_n(chain_rst_n), .in_valid(g_v8 && g_coded8), .in_bit(g_b8),
    .out_valid(g_v9), .out_pair(g_p9), .out_erase(g_e9));
  viterbi_decoder #(.K(5), .G0(5'b11001), .G1(5'b11011), .N(GSM_N1 + 3)) u_gsm_vit (
    .clk, .rst_n(chain_rst_n), .in_valid(g_v9), .in_pair(g_p9), .in_erase(g_e9),
    .out_valid(g_v10), .out_bit(g_b10), .busy(g_vbusy));
  gsm_dereorder #(.N(GSM_N), .N1A(GSM_N1A), .N1(GSM_N1), .W(3), .POLY(3'b011)) u_gsm_decrc (
    .clk, .rst_n(chain_rst_n), .dec_valid(g_v10), .dec_bit(g_b10),
    .raw_valid(g_v8 && !g_coded8), .raw_bit(g_b8),
    .out_valid(g_v11), .out_bit(g_b11), .done(gsm_crc_done), .crc_ok(gsm_crc_ok));

  // ---------------------------------------------------------------- 3G
  localparam int UMTS_COLS = 30;
  localparam int UMTS_ROWS = (2 * (UMTS_N + UMTS_CRC + 8) + UMTS_COLS - 1) / UMTS_COLS;
  logic u_v0, u_b0, u_busy0, u_v1, u_busy1, u_v2, u_b2, u_v3, u_b3, u_ovf0;
  logic [1:0] u_p1;
  logic u_v4, u_b4, u_b4c, u_sbusy, u_v5, u_v6, u_v7, u_b7;
  sample_t u_i, u_q, u_soft;
  logic signed [SAMPLE_W+3:0] u_dsoft;
  crc_append #(.W(UMTS_CRC), .POLY(UMTS_POLY[UMTS_CRC-1:0]), .N(UMTS_N), .PACE(DIV)) u_umts_crc (
    .clk, .rst_n(chain_rst_n), .init('0), .in_valid(v_umts), .in_bit,
    .out_valid(u_v0), .out_bit(u_b0), .busy(u_busy0));
  conv_encoder #(.K(9), .G0(9'b100011101), .G1(9'b110101111), .N(UMTS_N + UMTS_CRC), .TAIL(1'b1), .PACE(DIV)) u_umts_enc (
    .clk, .rst_n(chain_rst_n), .in_valid(u_v0), .in_bit(u_b0),
    .out_valid(u_v1), .out_pair(u_p1), .busy(u_busy1));
  puncture #(.PUNCT(1'b0)) u_umts_p2s (
    .clk, .rst_n(chain_rst_n), .in_valid(u_v1), .in_pair(u_p1),
    .out_valid(u_v2), .out_bit(u_b2));
  block_interleaver #(.ROWS(UMTS_ROWS), .COLS(UMTS_COLS), .PERM(1), .DEINT(1'b0)) u_umts_il (
    .clk, .rst_n(chain_rst_n), .in_valid(u_v2), .in_bit(u_b2), .out_ready(~u_sbusy & ~u_v3),
    .out_valid(u_v3), .out_bit(u_b3), .overflow(u_ovf0));
  spreader #(.SF(4), .CODE(4'b0100)) u_umts_spread (
    .clk, .rst_n(chain_rst_n), .clear(frame_start), .in_valid(u_v3), .in_bit(u_b3),
    .out_valid(u_v4), .out_chip(u_b4), .busy(u_sbusy));
  assign u_b4c = u_b4 ^ (flip_pend && std_sel == STD_UMTS && u_v4);
  psk_mapper #(.QPSK(1'b0)) u_umts_map (
    .clk, .rst_n(chain_rst_n), .in_valid(u_v4), .in_bit(u_b4c),
    .out_valid(u_v5), .out_i(u_i), .out_q(u_q));
  logic u_hb;
  psk_demapper #(.QPSK(1'b0)) u_umts_demap (
    .clk, .rst_n(chain_rst_n), .in_valid(u_v5), .in_i(u_i), .in_q(u_q),
    .out_valid(u_v6), .out_bit(u_hb), .out_soft(u_soft));
  despreader #(.SF(4), .CODE(4'b0100)) u_umts_despread (
    .clk, .rst_n(chain_rst_n), .clear(frame_start), .in_valid(u_v6), .in_chip(u_soft),
    .out_valid(u_v7), .out_bit(u_b7), .out_soft(u_dsoft));
  logic u_v8, u_b8, u_ovf1, u_v9, u_v10, u_b10, u_vbusy, u_v11, u_b11;
  logic [1:0] u_p9, u_e9;
  block_interleaver #(.ROWS(UMTS_ROWS), .COLS(UMTS_COLS), .PERM(1), .DEINT(1'b1)) u_umts_deil (
    .clk, .rst_n(chain_rst_n), .in_valid(u_v7), .in_bit(u_b7), .out_ready(1'b1),
    .out_valid(u_v8), .out_bit(u_b8), .overflow(u_ovf1));
  depuncture #(.PUNCT(1'b0)) u_umts_s2p (
    .clk, .rst_n(chain_rst_n), .in_valid(u_v8), .in_bit(u_b8),
    .out_valid(u_v9), .out_pair(u_p9), .out_erase(u_e9));
  viterbi_decoder #(.K(9), .G0(9'b100011101), .G1(9'b110101111), .N(UMTS_N + UMTS_CRC)) u_umts_vit (
    .clk, .rst_n(chain_rst_n), .in_valid(u_v9), .in_pair(u_p9), .in_erase(u_e9),
    .out_valid(u_v10), .out_bit(u_b10), .busy(u_vbusy));
  crc_check #(.W(UMTS_CRC), .POLY(UMTS_POLY[UMTS_CRC-1:0]), .N(UMTS_N)) u_umts_decrc (
    .clk, .rst_n(chain_rst_n), .init('0), .in_valid(u_v10), .in_bit(u_b10),
    .out_valid(u_v11), .out_bit(u_b11), .done(umts_crc_done), .crc_ok(umts_crc_ok));

  // ---------------------------------------------------------------- LTE
  localparam int LTE_K   = LTE_N + 24;
  localparam int LTE_SYM = 3 * (LTE_K + 4) / 2;   // QPSK symbols per block
  logic l_v0, l_b0, l_busy0, l_v1, l_b1, l_tbusy, l_v2, l_b2, l_b2c, l_srdy;
  logic l_v3, l_v4, l_v5, l_first, l_v6, l_hb, l_drdy;
  sample_t l_i3, l_q3, l_i4, l_q4, l_i5, l_q5, l_s6;
  crc_append #(.W(24), .POLY(24'h800063), .N(LTE_N), .PACE(1)) u_lte_crc (
    .clk, .rst_n(chain_rst_n), .init('0), .in_valid(v_lte), .in_bit,
    .out_valid(l_v0), .out_bit(l_b0), .busy(l_busy0));
  turbo_encoder #(.K(LTE_K), .F1(3), .F2(10)) u_lte_turbo (
    .clk, .rst_n(chain_rst_n), .in_valid(l_v0), .in_bit(l_b0),
    .out_valid(l_v1), .out_bit(l_b1), .busy(l_tbusy));
  lte_scrambler u_lte_scr (
    .clk, .rst_n(chain_rst_n), .init(frame_start), .n_rnti(lte_n_rnti), .q(lte_q),
    .n_s(lte_n_s), .n_id(lte_n_id), .in_valid(l_v1), .in_bit(l_b1),
    .out_valid(l_v2), .out_bit(l_b2), .ready(l_srdy));
  assign l_b2c = l_b2 ^ (flip_pend && std_sel == STD_LTE && l_v2);
  psk_mapper #(.QPSK(1'b1)) u_lte_map (
    .clk, .rst_n(chain_rst_n), .in_valid(l_v2), .in_bit(l_b2c),
    .out_valid(l_v3), .out_i(l_i3), .out_q(l_q3));
  cp_insert #(.NFFT(LTE_SYM), .CP(LTE_SYM / 4), .PACE(2)) u_lte_cpi (
    .clk, .rst_n(chain_rst_n), .in_valid(l_v3), .in_i(l_i3), .in_q(l_q3),
    .out_valid(l_v4), .out_i(l_i4), .out_q(l_q4));
  cp_remove #(.NFFT(LTE_SYM), .CP(LTE_SYM / 4)) u_lte_cpr (
    .clk, .rst_n(chain_rst_n), .in_valid(l_v4), .in_i(l_i4), .in_q(l_q4),
    .out_valid(l_v5), .first(l_first), .out_i(l_i5), .out_q(l_q5));
  psk_demapper #(.QPSK(1'b1)) u_lte_demap (
    .clk, .rst_n(chain_rst_n), .in_valid(l_v5), .in_i(l_i5), .in_q(l_q5),
    .out_valid(l_v6), .out_bit(l_hb), .out_soft(l_s6));
  lte_descrambler u_lte_descr (
    .clk, .rst_n(chain_rst_n), .init(frame_start), .n_rnti(lte_n_rnti), .q(lte_q),
    .n_s(lte_n_s), .n_id(lte_n_id), .in_valid(l_v6), .in_soft(l_s6),
    .out_valid(lte_soft_valid), .out_soft(lte_soft), .ready(l_drdy));
  assign lte_ready = l_srdy & l_drdy;

  // ---------------------------------------------------------------- output
  logic chan_v, rx_v, rx_b;
  always_comb begin
    unique case (std_sel)
      STD_BT:   begin rx_v = bt_ov;          rx_b = bt_ob;        chan_v = bh_v1 | bp_v2; end
      STD_WIFI: begin rx_v = w_v9;           rx_b = w_b9;         chan_v = w_v3; end
      STD_GSM:  begin rx_v = g_v11;          rx_b = g_b11;        chan_v = g_v5; end
      STD_UMTS: begin rx_v = u_v11;          rx_b = u_b11;        chan_v = u_v4; end
      STD_LTE:  begin rx_v = lte_soft_valid; rx_b = lte_soft[SAMPLE_W-1]; chan_v = l_v2; end
      default:  begin rx_v = 1'b0;           rx_b = 1'b0;         chan_v = 1'b0; end
    endcase
  end
  assign flip_now = flip_pend & chan_v;

  output_interface u_out (
    .clk, .rst_n(chain_rst_n), .in_valid(rx_v), .in_bit(rx_b), .flush, .m_valid, .m_data);

  assign overflow = w_ovf0 | w_ovf1 | g_ovf0 | g_ovf1 | u_ovf0 | u_ovf1;
endmodule

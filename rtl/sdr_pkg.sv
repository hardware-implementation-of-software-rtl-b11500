// sdr_pkg: types and constants shared by the multi-standard SDR transceiver.
// The five standards (Bluetooth, Wi-Fi, 2G/GSM, 3G/UMTS, LTE) are selected at
// run time by std_e; in the FPGA prototype the choice is made by loading a
// partial bitstream, here by a multiplexer. Sample words are signed fixed
// point with SAMPLE_W bits (5 integer and 9 fraction bits, as used for the
// LTE symbol representation); FRAC is the number of fraction bits.
package sdr_pkg;
  typedef enum logic [2:0] {
    STD_BT   = 3'd0,
    STD_WIFI = 3'd1,
    STD_GSM  = 3'd2,
    STD_UMTS = 3'd3,
    STD_LTE  = 3'd4
  } std_e;

  localparam int SAMPLE_W = 14;
  localparam int FRAC     = 9;
  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // 1/sqrt(2) and 1.0 in the sample format
  localparam sample_t INV_SQRT2 = sample_t'(362);
  localparam sample_t ONE       = sample_t'(512);
endpackage

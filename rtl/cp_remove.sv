// cp_remove: cyclic prefix removal. Of every NFFT+CP received samples the
// first CP are dropped and the remaining NFFT are forwarded, registered one
// cycle, with `first` marking the first sample of a symbol. Used in front of
// the FFT of the LTE receiver (and of the Wi-Fi receiver's FFT controller).
module cp_remove
  import sdr_pkg::*;
#(
  parameter int NFFT = 128,
  parameter int CP   = 32
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_i,
  input  sample_t in_q,
  output logic    out_valid,
  output logic    first,
  output sample_t out_i,
  output sample_t out_q
);
  localparam int OW = $clog2(NFFT + CP);
  logic [OW-1:0] cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; out_valid <= 1'b0; first <= 1'b0; out_i <= '0; out_q <= '0;
    end else begin
      out_valid <= 1'b0;
      first     <= 1'b0;
      if (in_valid) begin
        if (cnt >= OW'(CP)) begin
          out_valid <= 1'b1; out_i <= in_i; out_q <= in_q;
          first <= (cnt == OW'(CP));
        end
        cnt <= (cnt == OW'(NFFT + CP - 1)) ? '0 : cnt + 1'b1;
      end
    end
  end
endmodule

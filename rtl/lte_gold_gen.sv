// lte_gold_gen: LTE pseudo-random (Gold) sequence generator,
//   c(n) = x1(n+Nc) XOR x2(n+Nc), Nc = 1600,
//   x1(n+31) = x1(n+3) XOR x1(n),                 x1 starts 1,0,0,...,0
//   x2(n+31) = x2(n+3) XOR x2(n+2) XOR x2(n+1) XOR x2(n), x2 starts c_init.
// `init` loads both 31-bit registers and then advances them NC times on its
// own (ready low for NC cycles); afterwards every `step` moves to the next
// c(n), available on c without delay. The equations are the document's; the
// warm-up by clocking (instead of two pre-filled BRAMs) is this design's.
module lte_gold_gen #(
  parameter int NC = 1600
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic [30:0] c_init,
  input  logic        step,
  output logic        c,
  output logic        ready
);
  localparam int CW = $clog2(NC + 1);
  logic [30:0] x1, x2;     // bit 0 = x(n)
  logic [CW-1:0] warm;

  assign c     = x1[0] ^ x2[0];
  assign ready = (warm == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= 31'd1; x2 <= '0; warm <= '0;
    end else if (init) begin
      x1 <= 31'd1; x2 <= c_init; warm <= CW'(NC);
    end else if (warm != 0 || step) begin
      x1 <= {x1[3] ^ x1[0], x1[30:1]};
      x2 <= {x2[3] ^ x2[2] ^ x2[1] ^ x2[0], x2[30:1]};
      if (warm != 0) warm <= warm - 1'b1;
    end
  end
endmodule

// Block downscaler: 6x6 source pixels -> 5x5 output pixels (factor 5/6).
//
// The document specifies a separable integer Lanczos filter working on
// 6x6 blocks and an 8x8 sub-block read for scaling; the weights are this
// design's own: Lanczos-2, four taps per output pixel, sum 64, listed in
// sme_pkg::lanczos_w. The input is the 8x8 neighbourhood that starts one
// pixel above and left of the 6x6 block. The horizontal pass keeps full
// precision, the vertical pass follows, and the 4096-scaled result is
// rounded (add 2048, arithmetic shift by 12) and clamped to 0 .. 2^PIX_W-1.
//
// Interface: src[r][c*PIX_W +: PIX_W] is pixel (r, c) of the 8x8 block,
// dst[r][c*PIX_W +: PIX_W] pixel (r, c) of the 5x5 result.
// Timing: result registered, one cycle after src, one block per cycle.
module lanczos_kernel
  import sme_pkg::*;
(
  input  logic                    clk,
  input  logic                    en,
  input  logic [7:0][8*PIX_W-1:0] src,
  output logic [4:0][5*PIX_W-1:0] dst
);

  localparam int HW = PIX_W + 9;   // horizontal partial sum width (signed)
  localparam int VW = HW + 8;      // vertical sum width (signed)

  logic signed [HW-1:0] hs [8][5];
  logic [4:0][5*PIX_W-1:0] res;

  always_comb begin
    for (int r = 0; r < 8; r++) begin
      for (int k = 0; k < 5; k++) begin
        hs[r][k] = '0;
        for (int i = 0; i < 4; i++)
          hs[r][k] += HW'($signed({1'b0, src[r][(k+i)*PIX_W +: PIX_W]})) * HW'(lanczos_w(k, i));
      end
    end
    for (int kr = 0; kr < 5; kr++) begin
      for (int k = 0; k < 5; k++) begin
        logic signed [VW-1:0] v;
        v = VW'(2048);
        for (int i = 0; i < 4; i++)
          v += VW'(hs[kr+i][k]) * VW'(lanczos_w(kr, i));
        v = v >>> 12;
        if (v < 0)
          res[kr][k*PIX_W +: PIX_W] = '0;
        else if (v > VW'((1 << PIX_W) - 1))
          res[kr][k*PIX_W +: PIX_W] = '1;
        else
          res[kr][k*PIX_W +: PIX_W] = v[PIX_W-1:0];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (en) dst <= res;
  end

endmodule

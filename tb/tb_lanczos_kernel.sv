// Block downscaler test: random and flat 8x8 neighbourhoods; each 5x5
// result is compared with the separable Lanczos sum computed here from the
// weight table, one cycle after the input. A flat block must stay flat.
module tb_lanczos_kernel;
  import sme_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en;
  logic [7:0][8*PIX_W-1:0] src;
  logic [4:0][5*PIX_W-1:0] dst;

  lanczos_kernel dut (.*);

  // weights written out independently of the package function
  int wt [5][4] = '{'{-3, 62, 5, 0}, '{-5, 52, 19, -2}, '{-4, 36, 36, -4},
                    '{-2, 19, 52, -5}, '{0, 4, 63, -3}};

  initial begin
    en = 1;
    src = '0;
    for (int n = 0; n < 2000; n++) begin
      int flat;
      @(negedge clk);
      flat = $urandom_range(255);
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          src[r][c*PIX_W +: PIX_W] = (n % 4 == 0) ? PIX_W'(flat) :
                                     (n % 4 == 1) ? PIX_W'(((r + c) % 2) * 255) : PIX_W'($urandom);
      @(negedge clk);
      for (int kr = 0; kr < 5; kr++)
        for (int kc = 0; kc < 5; kc++) begin
          int acc, e;
          acc = 2048;
          for (int i = 0; i < 4; i++) begin
            int h;
            h = 0;
            for (int m = 0; m < 4; m++) h += wt[kc][m] * int'(src[kr + i][(kc + m)*PIX_W +: PIX_W]);
            acc += wt[kr][i] * h;
          end
          e = acc >>> 12;
          if (e < 0) e = 0;
          if (e > 255) e = 255;
          if (n % 4 == 0) e = flat;
          checks++;
          if (int'(dst[kr][kc*PIX_W +: PIX_W]) != e) begin
            failures++;
            if (failures < 5) $display("FAIL: block %0d out (%0d,%0d) = %0d expected %0d", n, kr, kc,
                                       dst[kr][kc*PIX_W +: PIX_W], e);
          end
        end
    end
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

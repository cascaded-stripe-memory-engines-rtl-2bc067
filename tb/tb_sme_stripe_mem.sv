// Stripe memory test: fills the 4096 x 32 raster through port B with
// masked word writes, keeps a pixel-level copy, and then reads random
// 16 x 8 blocks (any line, any 4-pixel-aligned column, lines wrapping past
// 31) on both ports, checking every pixel one cycle after the address.
module tb_sme_stripe_mem;
  import sme_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic a_en, b_en, b_we;
  logic [ROW_W-1:0] a_row, b_row;
  logic [WCOL_W-1:0] a_wcol, b_wcol;
  logic [SME_B*PIX_W-1:0] b_wdata;
  logic [SME_B-1:0] b_wmask;
  logic [SME_V-1:0][BLK_W*PIX_W-1:0] a_blk, b_blk;

  sme_stripe_mem dut (.*);

  byte unsigned ref_px [SME_H][SME_W];

  task automatic check_blk(string port, logic [SME_V-1:0][BLK_W*PIX_W-1:0] blk, int row, int wcol);
    int bad;
    bad = 0;
    for (int k = 0; k < SME_V; k++)
      for (int p = 0; p < BLK_W; p++)
        if (blk[k][p*PIX_W +: PIX_W] != ref_px[(row + k) % SME_H][(wcol * SME_B + p) % SME_W]) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      if (failures < 5) $display("FAIL: port %s block row %0d wcol %0d: %0d pixels differ", port, row, wcol, bad);
    end
  endtask

  initial begin
    a_en = 0; b_en = 0; b_we = 0; a_row = 0; b_row = 0; a_wcol = 0; b_wcol = 0;
    b_wdata = 0; b_wmask = 0;
    // full fill
    for (int r = 0; r < SME_H; r++)
      for (int c = 0; c < WCOLS; c++) begin
        @(negedge clk);
        b_en = 1; b_we = 1; b_row = ROW_W'(r); b_wcol = WCOL_W'(c);
        b_wdata = $urandom; b_wmask = '1;
        for (int p = 0; p < SME_B; p++) ref_px[r][c*SME_B + p] = b_wdata[p*PIX_W +: PIX_W];
      end
    // masked overwrites
    repeat (2000) begin
      int r, c;
      @(negedge clk);
      r = $urandom_range(SME_H - 1); c = $urandom_range(WCOLS - 1);
      b_en = 1; b_we = 1; b_row = ROW_W'(r); b_wcol = WCOL_W'(c);
      b_wdata = $urandom; b_wmask = 4'($urandom);
      for (int p = 0; p < SME_B; p++)
        if (b_wmask[p]) ref_px[r][c*SME_B + p] = b_wdata[p*PIX_W +: PIX_W];
    end
    @(negedge clk);
    b_we = 0; b_en = 0;
    // random block reads on both ports
    repeat (3000) begin
      int ar, ac, br, bc;
      @(negedge clk);
      ar = $urandom_range(SME_H - 1); ac = $urandom_range(WCOLS - 1);
      br = $urandom_range(SME_H - 1); bc = $urandom_range(WCOLS - 1);
      a_en = 1; a_row = ROW_W'(ar); a_wcol = WCOL_W'(ac);
      b_en = 1; b_row = ROW_W'(br); b_wcol = WCOL_W'(bc);
      @(negedge clk);
      a_en = 0; b_en = 0;
      check_blk("A", a_blk, ar, ac);
      check_blk("B", b_blk, br, bc);
    end
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

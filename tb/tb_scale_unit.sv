// Scaling unit test. A random 50 x 40 source scale is placed at stripe
// column 3; for every group of six source lines the test stores the lines
// the group needs (stripe row = line mod 32), starts the unit and grants
// port B at random. The unit reads through a stripe memory instance and
// writes scale j+1 (42 x 34 at column 61). Checked against a Lanczos
// 6 -> 5 reference with edge replication computed here: every pixel of the
// new lines, the line count of each group (5, and 4 for the last), and
// that the columns on either side of the new scale are untouched. A second
// pass sends the same scale to the output buffer (dst_out) and checks
// every 5-pixel word written there, the commit, and that the unit waits
// for the buffer to be free.
module tb_scale_unit;
  import sme_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int SW = 50, SH = 40, SX = 3, DW = 42, DH = 34, DX = 61, BW = 10;
  logic rst = 1'b1;

  logic start, dst_out, busy, done, req, gnt, we, ob_free, ob_we, ob_commit;
  logic [LINE_W-1:0] group;
  scale_cfg_t src, dst;
  logic [2:0] nrows, ob_row;
  logic [ROW_W-1:0] row;
  logic [WCOL_W-1:0] wcol;
  logic [SME_B*PIX_W-1:0] wdata;
  logic [SME_B-1:0] wmask;
  logic [SME_V-1:0][BLK_W*PIX_W-1:0] a_blk, b_blk;
  logic [BW-1:0] ob_blk;
  logic [5*PIX_W-1:0] ob_data;

  scale_unit #(.MAX_BLK(1 << BW)) dut (.*);

  // stripe memory: port B shared between the test (loading) and the unit
  logic a_en, b_en, b_we, tb_load;
  logic [ROW_W-1:0] a_row, b_row, tb_row;
  logic [WCOL_W-1:0] a_wcol, b_wcol, tb_wcol;
  logic [SME_B*PIX_W-1:0] b_wdata, tb_wdata;
  logic [SME_B-1:0] b_wmask;
  logic gnt_rnd;
  always_comb begin
    gnt     = req && gnt_rnd && !tb_load;
    b_en    = tb_load || gnt;
    b_we    = tb_load || (gnt && we);
    b_row   = tb_load ? tb_row : row;
    b_wcol  = tb_load ? tb_wcol : wcol;
    b_wdata = tb_load ? tb_wdata : wdata;
    b_wmask = tb_load ? '1 : wmask;
  end
  sme_stripe_mem sme (.clk, .a_en, .a_row, .a_wcol, .a_blk, .b_en, .b_we, .b_row, .b_wcol,
                      .b_wdata, .b_wmask, .b_blk);

  byte unsigned sp [SH][SW];
  byte unsigned dp [DH][DW];
  int wt [5][4] = '{'{-3, 62, 5, 0}, '{-5, 52, 19, -2}, '{-4, 36, 36, -4},
                    '{-2, 19, 52, -5}, '{0, 4, 63, -3}};
  byte unsigned stripe [SME_H][SME_W];   // what the test has stored, for untouched checks

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  always @(negedge clk) gnt_rnd = ($urandom_range(99) < 35);

  // output buffer model
  byte unsigned obuf [5][(1 << BW) * 5];
  int n_commit, ob_free_cnt;
  always @(negedge clk) if (!rst) begin
    #1;
    if (ob_we) begin
      checks++;
      if (!ob_free) begin failures++; $display("FAIL: output buffer written while busy"); end
      for (int p = 0; p < 5; p++) obuf[ob_row][int'(ob_blk) * 5 + p] = ob_data[p*PIX_W +: PIX_W];
    end
    if (ob_commit) n_commit++;
  end

  task automatic load_word(int r, int wc, logic [SME_B*PIX_W-1:0] d);
    @(negedge clk);
    tb_load = 1; tb_row = ROW_W'(r); tb_wcol = WCOL_W'(wc); tb_wdata = d;
    for (int p = 0; p < SME_B; p++) stripe[r][wc*SME_B + p] = d[p*PIX_W +: PIX_W];
  endtask

  // store source line y; the words keep whatever else the stripe row holds
  task automatic load_line(int y);
    for (int wc = SX / SME_B; wc <= (SX + SW - 1) / SME_B; wc++) begin
      logic [SME_B*PIX_W-1:0] d;
      for (int p = 0; p < SME_B; p++) begin
        int c;
        c = wc * SME_B + p;
        d[p*PIX_W +: PIX_W] = (c >= SX && c < SX + SW) ? sp[y][c - SX] : stripe[y % SME_H][c];
      end
      load_word(y % SME_H, wc, d);
    end
    @(negedge clk) tb_load = 0;
  endtask

  task automatic read_pixel(int r, int c, output int v);
    @(negedge clk);
    a_en = 1; a_row = ROW_W'(r); a_wcol = WCOL_W'(c / SME_B);
    @(negedge clk);
    a_en = 0;
    v = int'(a_blk[0][(c % SME_B)*PIX_W +: PIX_W]);
  endtask

  task automatic run_group(int g, bit to_out);
    @(negedge clk);
    start = 1; group = LINE_W'(g); dst_out = to_out;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (int'(nrows) != ((DH - 5*g < 5) ? DH - 5*g : 5)) begin
      failures++; $display("FAIL: group %0d made %0d lines", g, nrows);
    end
    @(negedge clk);
  endtask

  initial begin
    start = 0; group = 0; dst_out = 0; ob_free = 1; tb_load = 0; tb_row = 0; tb_wcol = 0;
    tb_wdata = 0; a_en = 0; a_row = 0; a_wcol = 0; n_commit = 0;
    foreach (stripe[r, c]) stripe[r][c] = 0;
    src = '{x_off: COL_W'(SX), width: LINE_W'(SW), height: LINE_W'(SH)};
    dst = '{x_off: COL_W'(DX), width: LINE_W'(DW), height: LINE_W'(DH)};
    foreach (sp[y, x]) sp[y][x] = byte'($urandom);
    foreach (dp[y, x]) begin
      int acc;
      acc = 2048;
      for (int i = 0; i < 4; i++) begin
        int h;
        h = 0;
        for (int m = 0; m < 4; m++)
          h += wt[x % 5][m] * int'(sp[clampi(6*(y/5) - 1 + y%5 + i, 0, SH - 1)]
                                     [clampi(6*(x/5) - 1 + x%5 + m, 0, SW - 1)]);
        acc += wt[y % 5][i] * h;
      end
      dp[y][x] = byte'(clampi(acc >>> 12, 0, 255));
    end
    // sentinels beside the new scale
    for (int r = 0; r < SME_H; r++) begin
      logic [SME_B*PIX_W-1:0] d;
      d = {4{8'h5A}};
      load_word(r, (DX - 1) / SME_B, d);
      load_word(r, (DX + DW) / SME_B, d);
    end
    @(negedge clk) tb_load = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // pass 1: into the stripe
    for (int g = 0; g * 6 < SH; g++) begin
      for (int y = 6*g - 1; y <= 6*g + 6; y++)
        if (y >= 0 && y < SH) load_line(y);
      run_group(g, 1'b0);
      for (int y = 5*g; y < 5*g + 5 && y < DH; y++) begin
        int v, bad;
        bad = 0;
        for (int x = 0; x < DW; x++) begin
          read_pixel(y % SME_H, DX + x, v);
          if (v != int'(dp[y][x])) bad++;
        end
        read_pixel(y % SME_H, DX - 1, v);
        if (v != 8'h5A) bad++;
        read_pixel(y % SME_H, DX + DW, v);
        if (v != 8'h5A) bad++;
        checks++;
        if (bad != 0) begin
          failures++;
          if (failures < 5) $display("FAIL: scaled line %0d: %0d pixels wrong", y, bad);
        end
      end
    end

    // pass 2: into the output buffer
    for (int g = 0; g * 6 < SH; g++) begin
      int nc;
      for (int y = 6*g - 1; y <= 6*g + 6; y++)
        if (y >= 0 && y < SH) load_line(y);
      // buffer busy at first: the unit must wait
      ob_free = 0;
      nc = n_commit;
      @(negedge clk);
      start = 1; group = LINE_W'(g); dst_out = 1;
      @(negedge clk);
      start = 0;
      repeat (30) @(negedge clk);
      checks++;
      if (done || n_commit != nc) begin failures++; $display("FAIL: group %0d did not wait", g); end
      ob_free = 1;
      while (!done) @(negedge clk);
      @(negedge clk);
      checks++;
      if (n_commit != nc + 1) begin failures++; $display("FAIL: group %0d committed %0d times", g, n_commit - nc); end
      for (int y = 5*g; y < 5*g + 5 && y < DH; y++) begin
        int bad;
        bad = 0;
        for (int x = 0; x < DW; x++) if (obuf[y - 5*g][x] != dp[y][x]) bad++;
        checks++;
        if (bad != 0) begin
          failures++;
          if (failures < 5) $display("FAIL: output buffer line %0d: %0d pixels wrong", y, bad);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

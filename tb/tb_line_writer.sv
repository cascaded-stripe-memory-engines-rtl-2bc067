// Image input test: frames of random pixels are streamed into the line
// writer at an unaligned stripe offset with random valid gaps, random
// port-B grant delays and random line_ok / frame_idle gating. A model of
// port B records every granted masked word write. Checked: every stored
// pixel lands at stripe row (line mod 32) and column offset + x, nothing
// outside the line is touched, line_done pulses once per line, sof once per
// frame, the line counter, and that no pixel is taken at the start of a
// line while line_ok is low or at the start of a frame while frame_idle
// is low.
module tb_line_writer;
  import sme_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int W = 45, H = 40, XOFF = 6;
  logic rst = 1'b1;
  logic [COL_W-1:0] x_off;
  logic [PIX_W-1:0] s_tdata;
  logic s_tvalid, s_tready, s_tuser, s_tlast, line_ok, frame_idle, sof, line_done, wr_req, wr_gnt;
  logic [LINE_W-1:0] line;
  logic [ROW_W-1:0] wr_row;
  logic [WCOL_W-1:0] wr_wcol;
  logic [SME_B*PIX_W-1:0] wr_data;
  logic [SME_B-1:0] wr_mask;

  line_writer dut (.*);

  byte unsigned mem [SME_H][XOFF + W + 8];
  int n_done, n_sof;
  bit at_line_start;

  always @(negedge clk) if (!rst) begin
    wr_gnt = ($urandom_range(99) < 40);
    line_ok = ($urandom_range(99) < 60);
    frame_idle = ($urandom_range(99) < 50);
    #1;
    if (wr_req && wr_gnt)
      for (int p = 0; p < SME_B; p++)
        if (wr_mask[p]) mem[wr_row][int'(wr_wcol) * SME_B + p] = wr_data[p*PIX_W +: PIX_W];
    if (line_done) n_done++;
    if (sof) n_sof++;
    if (s_tvalid && s_tready && at_line_start) begin
      checks++;
      if (s_tuser ? !frame_idle : !line_ok) begin
        failures++;
        if (failures < 5) $display("FAIL: line started while gated");
      end
    end
  end

  initial begin
    byte unsigned img [H][W];
    x_off = COL_W'(XOFF); s_tvalid = 0; s_tdata = 0; s_tuser = 0; s_tlast = 0;
    wr_gnt = 0; line_ok = 0; frame_idle = 0; n_done = 0; n_sof = 0; at_line_start = 0;
    foreach (mem[r, c]) mem[r][c] = 8'hEE;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int f = 0; f < 2; f++) begin
      foreach (img[y, x]) img[y][x] = byte'($urandom);
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          s_tvalid = 0;
          while ($urandom_range(99) < 20) @(negedge clk);
          s_tdata = img[y][x]; s_tuser = (x == 0 && y == 0); s_tlast = (x == W - 1);
          s_tvalid = 1; at_line_start = (x == 0);
          #2;
          while (!s_tready) begin @(negedge clk); #2; end
        end
        @(negedge clk);
        s_tvalid = 0; at_line_start = 0;
        while (n_done != f * H + y + 1) @(negedge clk);
        #2;
        // the line is stored: check it and its neighbours
        checks++;
        begin
          int bad;
          bad = 0;
          for (int x = 0; x < W; x++) if (mem[y % SME_H][XOFF + x] != img[y][x]) bad++;
          if (f == 0 && y < SME_H) begin
            if (mem[y % SME_H][XOFF - 1] != 8'hEE || mem[y % SME_H][XOFF + W] != 8'hEE) bad++;
          end
          if (bad != 0 || int'(line) != y + 1) begin
            failures++;
            if (failures < 5) $display("FAIL: frame %0d line %0d: %0d bad pixels, counter %0d", f, y, bad, line);
          end
        end
      end
      checks++;
      if (n_sof != f + 1) begin failures++; $display("FAIL: %0d frame starts", n_sof); end
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

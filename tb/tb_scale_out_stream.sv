// Downscaled output test: groups of 1 to 5 lines of random pixels are
// written into the buffer as 5-pixel words, in random word order, and
// committed; the video stream must return them line by line, with tuser on
// the first pixel of the frame only and tlast on the last pixel of each
// line, under random back-pressure, one pixel per cycle when not stalled.
module tb_scale_out_stream;
  import sme_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int MAX_BLK = 40, BW = 6, WIDTH = 37;
  logic rst = 1'b1;
  logic frame_start, free, we, commit, m_tvalid, m_tready, m_tuser, m_tlast;
  logic [LINE_W-1:0] width;
  logic [2:0] row, nrows;
  logic [BW-1:0] blk;
  logic [5*PIX_W-1:0] data;
  logic [PIX_W-1:0] m_tdata;

  scale_out_stream #(.MAX_BLK(MAX_BLK)) dut (.*);

  byte unsigned exp_q [$];
  int out_x, out_y, stall_cyc, px_cyc;

  always @(negedge clk) if (!rst) begin
    m_tready = ($urandom_range(99) < 70);
    #1;
    if (m_tvalid && m_tready) begin
      checks++;
      px_cyc++;
      if (exp_q.size() == 0 || m_tdata != exp_q[0] || m_tuser != (out_x == 0 && out_y == 0) ||
          m_tlast != (out_x == WIDTH - 1)) begin
        failures++;
        if (failures < 5) $display("FAIL: pixel (%0d,%0d) = %0d", out_y, out_x, m_tdata);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      if (out_x == WIDTH - 1) begin out_x = 0; out_y++; end else out_x++;
    end
  end

  initial begin
    frame_start = 0; we = 0; commit = 0; row = 0; nrows = 0; blk = 0; data = 0;
    width = LINE_W'(WIDTH); m_tready = 0; out_x = 0; out_y = 0; px_cyc = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    @(negedge clk) frame_start = 1;
    @(negedge clk) frame_start = 0;
    repeat (60) begin
      int n;
      byte unsigned g [5][MAX_BLK*5];
      int order [MAX_BLK];
      n = $urandom_range(1, 5);
      foreach (g[r, c]) g[r][c] = byte'($urandom);
      while (!free) @(negedge clk);
      foreach (order[i]) order[i] = i;
      order.shuffle();
      for (int r = 0; r < n; r++)
        foreach (order[i]) begin
          @(negedge clk);
          we = 1; row = 3'(r); blk = BW'(order[i]);
          for (int p = 0; p < 5; p++) data[p*PIX_W +: PIX_W] = g[r][order[i]*5 + p];
        end
      @(negedge clk);
      we = 0; commit = 1; nrows = 3'(n);
      for (int r = 0; r < n; r++)
        for (int c = 0; c < WIDTH; c++) exp_q.push_back(g[r][c]);
      @(negedge clk);
      commit = 0;
      #2;
      checks++;
      if (free) begin failures++; $display("FAIL: still free after commit"); end
    end
    wait (exp_q.size() == 0);
    repeat (5) @(negedge clk);
    checks++;
    if (m_tvalid || !free) begin failures++; $display("FAIL: output not idle at the end"); end
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

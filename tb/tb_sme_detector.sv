// Single detector instance test. A 60 x 45 image is sent twice through one
// instance that stores three scales (60, 50, 42 pixels wide at unaligned
// stripe offsets) and streams the fourth scale (35 x 27) on its video
// output. Checked against a reference computed here:
//   - every detection (position, scale, response) of a random 6-long LRD
//     classifier with 10 x 10 windows, exactly once, none extra;
//   - every pixel of the downscaled output stream, with tuser on the first
//     pixel of the frame and tlast on the last pixel of each line;
//   - the status register (frame idle, events done) after the frame;
//   - the rate: while both pipelines retire occupied ring slots they
//     execute at least 1.70 weak classifiers per clock (the peak is 1.75:
//     port B is lent away one cycle in four; windows entering or leaving
//     the ring cost a little more).
module tb_sme_detector;
  import sme_pkg::*;

  localparam int W0 = 60, H0 = 45, NS = 3, WIN = 10, TLEN = 6, NF = 2;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [PIX_W-1:0] s_tdata, m_vdata;
  logic s_tvalid, s_tready, s_tuser, s_tlast, m_vvalid, m_vuser, m_vlast;
  logic [63:0] r_tdata;
  logic r_tvalid, r_tready;
  logic [23:0] awaddr, araddr;
  logic [31:0] wdata, rdata;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [1:0] bresp, rresp;

  sme_detector dut (
    .clk, .rst,
    .s_vid_tdata (s_tdata), .s_vid_tvalid (s_tvalid), .s_vid_tready (s_tready),
    .s_vid_tuser (s_tuser), .s_vid_tlast (s_tlast),
    .m_vid_tdata (m_vdata), .m_vid_tvalid (m_vvalid), .m_vid_tready (1'b1),
    .m_vid_tuser (m_vuser), .m_vid_tlast (m_vlast),
    .m_res_tdata (r_tdata), .m_res_tvalid (r_tvalid), .m_res_tready (r_tready),
    .s_axil_awaddr (awaddr), .s_axil_awvalid (awvalid), .s_axil_awready (awready),
    .s_axil_wdata (wdata), .s_axil_wvalid (wvalid), .s_axil_wready (wready),
    .s_axil_bresp (bresp), .s_axil_bvalid (bvalid), .s_axil_bready (bready),
    .s_axil_araddr (araddr), .s_axil_arvalid (arvalid), .s_axil_arready (arready),
    .s_axil_rdata (rdata), .s_axil_rresp (rresp), .s_axil_rvalid (rvalid),
    .s_axil_rready (rready)
  );

  int sw [NS+1], sh [NS+1], sx [NS+1];
  int ins_x [TLEN], ins_y [TLEN], ins_w2 [TLEN], ins_h2 [TLEN], ins_a [TLEN], ins_b [TLEN];
  int alpha [TLEN][17];
  typedef byte unsigned img_t [];
  img_t pyr [NS+1];

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  // Lanczos weights, written out here
  int wt [5][4] = '{'{-3, 62, 5, 0}, '{-5, 52, 19, -2}, '{-4, 36, 36, -4},
                    '{-2, 19, 52, -5}, '{0, 4, 63, -3}};

  function automatic int px(int s, int y, int x);
    return int'(pyr[s][y * sw[s] + x]);
  endfunction

  task automatic build_scale(int s);
    pyr[s+1] = new[sw[s+1] * sh[s+1]];
    for (int y = 0; y < sh[s+1]; y++)
      for (int x = 0; x < sw[s+1]; x++) begin
        int acc;
        acc = 2048;
        for (int i = 0; i < 4; i++) begin
          int h;
          h = 0;
          for (int m = 0; m < 4; m++)
            h += wt[x % 5][m] * px(s, clampi(6*(y/5) - 1 + y%5 + i, 0, sh[s] - 1),
                                       clampi(6*(x/5) - 1 + x%5 + m, 0, sw[s] - 1));
          acc += wt[y % 5][i] * h;
        end
        pyr[s+1][y * sw[s+1] + x] = byte'(clampi(acc >>> 12, 0, 255));
      end
  endtask

  function automatic bit classify(int s, int wx, int wy, output int hsum);
    hsum = 0;
    for (int t = 0; t < TLEN; t++) begin
      int c [9];
      int ra, rb;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin
          c[3*i+j] = 0;
          for (int dy = 0; dy <= ins_h2[t]; dy++)
            for (int dx = 0; dx <= ins_w2[t]; dx++)
              c[3*i+j] += px(s, wy + ins_y[t] + i*(ins_h2[t]+1) + dy, wx + ins_x[t] + j*(ins_w2[t]+1) + dx);
        end
      ra = 0; rb = 0;
      for (int k = 0; k < 9; k++) begin
        ra += int'(c[k] > c[ins_a[t]]);
        rb += int'(c[k] > c[ins_b[t]]);
      end
      hsum += alpha[t][ra - rb + 8];
      if (hsum < -15) return 1'b0;
    end
    return 1'b1;
  endfunction

  int expected [longint];
  function automatic longint key(int s, int y, int x);
    return (longint'(s) << 32) | (longint'(y) << 16) | longint'(x);
  endfunction

  task automatic axil_write(int addr, int data);
    @(negedge clk);
    awaddr = 24'(addr); wdata = data; awvalid = 1'b1; wvalid = 1'b1;
    #1;
    while (!(awready && wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    awvalid = 1'b0; wvalid = 1'b0;
    while (!bvalid) @(negedge clk);
  endtask

  task automatic axil_read(int addr, output int data);
    @(negedge clk);
    araddr = 24'(addr); arvalid = 1'b1;
    #1;
    while (!arready) begin @(negedge clk); #1; end
    @(negedge clk);
    arvalid = 1'b0;
    while (!rvalid) @(negedge clk);
    data = rdata;
  endtask

  // results
  always @(negedge clk) if (!rst) begin
    r_tready = ($urandom_range(99) < 75);
    if (r_tvalid && r_tready) begin
      result_t r;
      longint k;
      r = result_t'(r_tdata);
      k = key(int'(r.scale), int'(r.y), int'(r.x));
      checks++;
      if (!expected.exists(k) || expected[k] != int'(r.conf)) begin
        failures++;
        if (failures < 10) $display("FAIL: detection scale %0d y %0d x %0d H %0d", r.scale, r.y, r.x, r.conf);
      end else expected.delete(k);
    end
  end

  // downscaled output
  int ox, oy;
  always @(negedge clk) if (!rst && m_vvalid) begin
    checks++;
    if (int'(m_vdata) != px(NS, oy, ox) || m_vuser != (ox == 0 && oy == 0) ||
        m_vlast != (ox == sw[NS] - 1)) begin
      failures++;
      if (failures < 10) $display("FAIL: output pixel (%0d,%0d) = %0d expected %0d", oy, ox, m_vdata, px(NS, oy, ox));
    end
    if (ox == sw[NS] - 1) begin ox = 0; oy++; end else ox++;
  end

  // rate: cycles in which both pipelines retire an occupied ring slot
  longint both_cyc = 0, both_exec = 0;
  always @(negedge clk) if (!rst && dut.g_pipe[0].u_pipe.ret.valid && dut.g_pipe[1].u_pipe.ret.valid) begin
    both_cyc++;
    both_exec += longint'(dut.p_exec[0]) + longint'(dut.p_exec[1]);
  end

  initial begin
    s_tvalid = 0; s_tdata = 0; s_tuser = 0; s_tlast = 0; r_tready = 0;
    awvalid = 0; wvalid = 0; arvalid = 0; bready = 1; rready = 1; awaddr = 0; araddr = 0; wdata = 0;
    ox = 0; oy = 0;
    sw[0] = W0; sh[0] = H0; sx[0] = 7;
    for (int s = 1; s <= NS; s++) begin
      sw[s] = (sw[s-1] * 5 + 5) / 6;
      sh[s] = (sh[s-1] * 5 + 5) / 6;
      sx[s] = sx[s-1] + sw[s-1] + 2;
    end
    for (int t = 0; t < TLEN; t++) begin
      ins_w2[t] = $urandom_range(1); ins_h2[t] = $urandom_range(1);
      ins_x[t]  = $urandom_range(WIN - 3 * (ins_w2[t] + 1));
      ins_y[t]  = $urandom_range(WIN - 3 * (ins_h2[t] + 1));
      ins_a[t]  = $urandom_range(8); ins_b[t] = $urandom_range(8);
      for (int g = 0; g < 17; g++) alpha[t][g] = int'($urandom_range(63)) - 32;
    end
    repeat (5) @(posedge clk);
    rst = 1'b0;
    axil_write('h0, (WIN << 16) | WIN);
    axil_write('h4, TLEN);
    axil_write('h8, 32'h100 | NS);
    axil_write('hC, 0);
    for (int j = 0; j <= NS; j++) begin
      axil_write('h100 + 16*j, sx[j]);
      axil_write('h104 + 16*j, sw[j]);
      axil_write('h108 + 16*j, sh[j]);
    end
    for (int t = 0; t < TLEN; t++) begin
      axil_write('h10000 + 4*t, (ins_b[t] << 22) | (ins_a[t] << 18) | (ins_h2[t] << 17) |
                                (ins_w2[t] << 16) | (ins_y[t] << 8) | ins_x[t]);
      axil_write('h20000 + 4*t, -15 & 'h3FFFF);
      for (int g = 0; g < 17; g++) axil_write('h400000 + 4*(t*17 + g), alpha[t][g] & 'h1FF);
    end
    for (int f = 0; f < NF; f++) begin
      int st, n0;
      pyr[0] = new[W0 * H0];
      foreach (pyr[0][i]) pyr[0][i] = byte'($urandom_range(255));
      for (int s = 0; s < NS; s++) build_scale(s);
      expected.delete();
      for (int s = 0; s < NS; s++)
        for (int y = 0; y + WIN <= sh[s]; y++)
          for (int x = 0; x + WIN <= sw[s]; x++) begin
            int hs;
            if (classify(s, x, y, hs)) expected[key(s, y, x)] = hs;
          end
      n0 = expected.num();
      ox = 0; oy = 0;
      for (int y = 0; y < H0; y++)
        for (int x = 0; x < W0; x++) begin
          @(negedge clk);
          s_tvalid = 1'b0;
          while ($urandom_range(99) >= 85) @(negedge clk);
          s_tdata = pyr[0][y * W0 + x]; s_tuser = (x == 0 && y == 0); s_tlast = (x == W0 - 1);
          s_tvalid = 1'b1;
          while (!s_tready) @(negedge clk);
        end
      @(negedge clk);
      s_tvalid = 1'b0;
      while (expected.num() != 0 || !dut.frame_idle || r_tvalid) @(posedge clk);
      repeat (50) @(posedge clk);
      axil_read('h10, st);
      checks += 3;
      if (st != ((1 << 16) | H0)) begin failures++; $display("FAIL: status %h", st); end
      if (oy != sh[NS] || ox != 0) begin failures++; $display("FAIL: output ended at line %0d x %0d", oy, ox); end
      if (n0 == 0) begin failures++; $display("FAIL: no detections in frame %0d", f); end
      $display("frame %0d: %0d detections", f, n0);
    end
    checks++;
    $display("both pipelines busy %0d cycles, %0d weak classifiers", both_cyc, both_exec);
    if (both_cyc == 0 || both_exec * 100 < both_cyc * 170) begin
      failures++;
      $display("FAIL: rate below 1.70 per clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d detections missing", expected.num());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

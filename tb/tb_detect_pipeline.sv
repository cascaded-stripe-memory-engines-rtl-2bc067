// Detection pipeline test. A random 40 x 32 image is stored in a stripe
// memory at column 5; program, threshold and alpha tables hold a random
// LRD classifier. Part 1 offers every 10 x 10 window position with random
// gaps, random result room and the port taken away one cycle in four (as
// for the second pipeline); every position must retire exactly once, and
// the detections must match, in position and response, the classifier run
// here on the same image. Part 2 checks the timing on an empty pipeline
// with a classifier that accepts everything: a window of T weak
// classifiers comes out 14 cycles later for each extra weak classifier,
// and with the port always available a full ring executes one weak
// classifier per clock.
module tb_detect_pipeline;
  import sme_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int IW = 40, IH = 32, XO = 5, WIN = 10, TL = 8;
  localparam int ADEPTH = T_MAX * 17, AAW = $clog2(ADEPTH);
  logic rst = 1'b1;

  logic [T_W:0] t_len;
  logic pos_want, pos_gnt, pos_tag, port_ok, sme_en, res_room, res_valid, retire, retire_tag, exec_ok, busy;
  logic [SC_W-1:0] pos_scale;
  logic [LINE_W-1:0] pos_x, pos_y;
  logic [COL_W-1:0] pos_col;
  logic [T_W-1:0] prog_addr, thr_addr;
  logic [INSTR_W-1:0] prog_data;
  logic [ROW_W-1:0] sme_row;
  logic [WCOL_W-1:0] sme_wcol;
  logic [SME_V-1:0][BLK_W*PIX_W-1:0] sme_blk, b_blk;
  logic [AAW-1:0] alpha_addr;
  logic [ALPHA_W-1:0] alpha_data;
  logic [THR_W-1:0] thr_data;
  result_t res_data;

  detect_pipeline dut (.*);

  // memories around it
  logic tw_prog, tw_thr, tw_alpha, b_en;
  logic [31:0] tw_data;
  logic [AAW-1:0] tw_addr;
  logic [ROW_W-1:0] b_row;
  logic [WCOL_W-1:0] b_wcol;
  logic [SME_B*PIX_W-1:0] b_wdata;
  table_mem #(.DEPTH(T_MAX), .WIDTH(INSTR_W)) u_prog (.clk, .we (tw_prog), .waddr (T_W'(tw_addr)),
    .wdata (tw_data), .raddr0 (prog_addr), .rdata0 (prog_data), .raddr1 ('0), .rdata1 ());
  table_mem #(.DEPTH(T_MAX), .WIDTH(THR_W)) u_thr (.clk, .we (tw_thr), .waddr (T_W'(tw_addr)),
    .wdata (tw_data[THR_W-1:0]), .raddr0 (thr_addr), .rdata0 (thr_data), .raddr1 ('0), .rdata1 ());
  table_mem #(.DEPTH(ADEPTH), .WIDTH(ALPHA_W)) u_alpha (.clk, .we (tw_alpha), .waddr (tw_addr),
    .wdata (tw_data[ALPHA_W-1:0]), .raddr0 (alpha_addr), .rdata0 (alpha_data), .raddr1 ('0), .rdata1 ());
  sme_stripe_mem sme (.clk, .a_en (sme_en && port_ok), .a_row (sme_row), .a_wcol (sme_wcol), .a_blk (sme_blk),
    .b_en, .b_we (b_en), .b_row, .b_wcol, .b_wdata, .b_wmask ('1), .b_blk);

  byte unsigned img [IH][IW];
  int ins_x [TL], ins_y [TL], ins_w2 [TL], ins_h2 [TL], ins_a [TL], ins_b [TL], thr [TL];
  int alpha [TL][17];

  function automatic bit classify(int wx, int wy, int tl, output int hsum);
    hsum = 0;
    for (int t = 0; t < tl; t++) begin
      int c [9];
      int ra, rb;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin
          c[3*i+j] = 0;
          for (int dy = 0; dy <= ins_h2[t]; dy++)
            for (int dx = 0; dx <= ins_w2[t]; dx++)
              c[3*i+j] += int'(img[wy + ins_y[t] + i*(ins_h2[t]+1) + dy][wx + ins_x[t] + j*(ins_w2[t]+1) + dx]);
        end
      ra = 0; rb = 0;
      for (int k = 0; k < 9; k++) begin
        ra += int'(c[k] > c[ins_a[t]]);
        rb += int'(c[k] > c[ins_b[t]]);
      end
      hsum += alpha[t][ra - rb + 8];
      if (hsum < thr[t]) return 1'b0;
    end
    return 1'b1;
  endfunction

  task automatic twrite(int which, int a, int d);
    @(negedge clk);
    tw_prog = (which == 0); tw_thr = (which == 1); tw_alpha = (which == 2);
    tw_addr = AAW'(a); tw_data = d;
    @(negedge clk);
    tw_prog = 0; tw_thr = 0; tw_alpha = 0;
  endtask

  task automatic load_tables(int thr_all);
    for (int t = 0; t < TL; t++) begin
      twrite(0, t, (ins_b[t] << 22) | (ins_a[t] << 18) | (ins_h2[t] << 17) | (ins_w2[t] << 16) |
                   (ins_y[t] << 8) | ins_x[t]);
      twrite(1, t, ((thr_all != 0) ? -100000 : thr[t]) & 'h3FFFF);
      for (int g = 0; g < 17; g++) twrite(2, t * 17 + g, alpha[t][g] & 'h1FF);
    end
  endtask

  // positions offered by the test
  int q_x [$], q_y [$];
  int expected [int];
  int n_retired, n_results, n_exec;
  int res_cycle;
  bit gaps, lend, tight;
  int cyc;

  always @(negedge clk) if (!rst) begin
    cyc++;
    pos_gnt = 1'b0;
    if (q_x.size() != 0) begin
      pos_x = LINE_W'(q_x[0]); pos_y = LINE_W'(q_y[0]);
      pos_col = COL_W'(XO + q_x[0]);
      pos_tag = q_x[0][0];
    end
    res_room = tight ? ($urandom_range(99) < 50) : 1'b1;
    port_ok  = lend ? (cyc % 4 != 3) : 1'b1;
    #1;
    if (q_x.size() != 0 && pos_want && (!gaps || $urandom_range(99) < 60)) pos_gnt = 1'b1;
    #1;
    if (pos_gnt) begin void'(q_x.pop_front()); void'(q_y.pop_front()); end
    if (exec_ok) n_exec++;
    if (retire) n_retired++;
    if (res_valid) begin
      int k;
      k = int'(res_data.y) * 256 + int'(res_data.x);
      n_results++;
      res_cycle = cyc;
      checks++;
      if (!retire || !expected.exists(k) || expected[k] != int'($signed(res_data.conf)) || res_data.scale != 3) begin
        failures++;
        if (failures < 10) $display("FAIL: result x %0d y %0d H %0d", res_data.x, res_data.y, $signed(res_data.conf));
      end else expected.delete(k);
    end
  end

  initial begin
    int n_pos;
    tw_prog = 0; tw_thr = 0; tw_alpha = 0; tw_addr = 0; tw_data = 0;
    b_en = 0; b_row = 0; b_wcol = 0; b_wdata = 0;
    pos_gnt = 0; pos_x = 0; pos_y = 0; pos_col = 0; pos_tag = 0; pos_scale = SC_W'(3);
    res_room = 1; port_ok = 1; t_len = (T_W+1)'(TL);
    n_retired = 0; n_results = 0; n_exec = 0; gaps = 1; lend = 1; tight = 1; cyc = 0;
    foreach (img[y, x]) img[y][x] = byte'($urandom);
    for (int t = 0; t < TL; t++) begin
      ins_w2[t] = $urandom_range(1); ins_h2[t] = $urandom_range(1);
      ins_x[t]  = $urandom_range(WIN - 3 * (ins_w2[t] + 1));
      ins_y[t]  = $urandom_range(WIN - 3 * (ins_h2[t] + 1));
      ins_a[t]  = $urandom_range(8); ins_b[t] = $urandom_range(8);
      thr[t]    = -40 + 5 * t;
      for (int g = 0; g < 17; g++) alpha[t][g] = int'($urandom_range(63)) - 30;
    end
    // image into the stripe, lines 0 .. 31
    for (int y = 0; y < IH; y++)
      for (int wc = 0; wc < (XO + IW + 3) / 4; wc++) begin
        @(negedge clk);
        b_en = 1; b_row = ROW_W'(y); b_wcol = WCOL_W'(wc);
        for (int p = 0; p < 4; p++) begin
          int c;
          c = wc * 4 + p - XO;
          b_wdata[p*PIX_W +: PIX_W] = (c >= 0 && c < IW) ? img[y][c] : 8'h00;
        end
      end
    @(negedge clk) b_en = 0;
    load_tables(0);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // part 1
    n_pos = 0;
    for (int y = 0; y + WIN <= IH; y++)
      for (int x = 0; x + WIN <= IW; x++) begin
        int hs;
        q_x.push_back(x); q_y.push_back(y); n_pos++;
        if (classify(x, y, TL, hs)) expected[y * 256 + x] = hs;
      end
    $display("%0d positions, %0d expected detections", n_pos, expected.num());
    while (n_retired != n_pos) @(negedge clk);
    repeat (30) @(negedge clk);
    checks += 2;
    if (expected.num() != 0) begin failures++; $display("FAIL: %0d detections missing", expected.num()); end
    if (n_retired != n_pos || busy) begin failures++; $display("FAIL: %0d retired of %0d", n_retired, n_pos); end

    // part 2: timing, accept everything
    load_tables(1);
    gaps = 0; lend = 0; tight = 0;
    begin
      int lat [3];
      int tls [3] = '{1, 2, 6};
      for (int i = 0; i < 3; i++) begin
        int hs, c0;
        t_len = (T_W+1)'(tls[i]);
        thr = '{default: -100000};
        void'(classify(4, 7, tls[i], hs));
        expected[7 * 256 + 4] = hs;
        @(negedge clk);
        c0 = cyc;
        q_x.push_back(4); q_y.push_back(7);
        while (expected.num() != 0) @(negedge clk);
        lat[i] = res_cycle - c0;
        repeat (20) @(negedge clk);
      end
      $display("latency for T = 1, 2, 6: %0d %0d %0d cycles", lat[0], lat[1], lat[2]);
      checks += 2;
      if (lat[1] - lat[0] != PIPE_LEN || lat[2] - lat[0] != 5 * PIPE_LEN) begin
        failures++; $display("FAIL: a weak classifier does not take one %0d-cycle pass", PIPE_LEN);
      end
      // full ring: 14 windows of 6 weak classifiers, one per clock
      begin
        int e0, c0;
        e0 = n_exec; c0 = cyc;
        for (int i = 0; i < 3 * PIPE_LEN; i++) begin
          int hs;
          void'(classify(i % 30, i / 30, 6, hs));
          expected[(i / 30) * 256 + (i % 30)] = hs;
          q_x.push_back(i % 30); q_y.push_back(i / 30);
        end
        while (expected.num() != 0) @(negedge clk);
        $display("%0d weak classifiers in %0d cycles", n_exec - e0, cyc - c0);
        if (n_exec - e0 != 3 * PIPE_LEN * 6 || cyc - c0 > 3 * PIPE_LEN * 6 + 2 * PIPE_LEN + 4) begin
          failures++; $display("FAIL: full ring below one weak classifier per clock");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d retired, %0d missing", n_retired, expected.num());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

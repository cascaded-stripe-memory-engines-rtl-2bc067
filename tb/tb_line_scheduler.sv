// Execution scheduler test. The scheduler is driven by models of its
// surroundings: an image input that starts line n only while line_ok is
// high, a scaling unit that finishes a started group after a random delay
// with the number of lines it makes, a job queue that accepts at random,
// and two pipelines that retire queued windows in order at up to two per
// clock. Three stored scales (48 x 60, 40 x 50, 34 x 42) and an output
// scale (29 x 35), 8 x 27 windows (the tallest that fits), two frames. Checked:
//   - every window row of every stored scale is queued exactly once, with
//     the right window count, stripe column and event tag, and only after
//     its bottom line exists;
//   - every six-line group of every scale is scaled exactly once, in order,
//     only when its source lines exist, into the output scale last;
//   - no line is written (by the input or the scaling unit) over a stripe
//     row that a queued, not yet retired window still reads;
//   - frame_idle rises after each frame.
module tb_line_scheduler;
  import sme_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NS = 3, WW = 8, WH = 27;
  logic rst = 1'b1;
  scale_cfg_t [MAX_SCALES-1:0] scfg;
  logic [SC_W-1:0] n_scales;
  logic out_en, sof, line_done, line_ok, frame_idle, sc_start, sc_out, sc_done, ob_free;
  logic [LINE_W-1:0] win_w, win_h, wr_line, sc_group, job_y, job_n, events_done;
  scale_cfg_t sc_src, sc_dst;
  logic [2:0] sc_nrows;
  logic job_valid, job_ready, job_tag, scaling_active;
  logic [SC_W-1:0] job_scale;
  logic [COL_W-1:0] job_col;
  logic [1:0] retire, retire_tag;

  line_scheduler dut (.*);

  int sw [NS+1], sh [NS+1];
  int lines [NS+1];          // lines of each scale that exist
  int next_grp [NS];
  bit job_seen [NS][64];
  // queued windows, oldest first: scale, top line, remaining count, tag
  int pq_s [$], pq_y [$], pq_n [$], pq_t [$];
  int sc_busy_cnt;
  int sc_j, sc_g;
  bit sc_running;

  function automatic bit row_in_use(int s, int line);
    foreach (pq_s[i])
      if (pq_s[i] == s && line >= pq_y[i] && line < pq_y[i] + WH) return 1'b1;
    return 1'b0;
  endfunction

  function automatic void fail(string m);
    failures++;
    if (failures < 10) $display("FAIL: %s", m);
  endfunction

  always @(negedge clk) if (!rst) begin
    job_ready = ($urandom_range(99) < 60);
    // pipelines: retire up to two queued windows
    retire = '0; retire_tag = '0;
    for (int q = 0; q < 2; q++)
      if (pq_s.size() != 0 && $urandom_range(99) < 20) begin
        retire[q] = 1'b1; retire_tag[q] = pq_t[0][0];
        pq_n[0]--;
        if (pq_n[0] == 0) begin
          void'(pq_s.pop_front()); void'(pq_y.pop_front()); void'(pq_n.pop_front()); void'(pq_t.pop_front());
        end
      end
    // scaling unit model
    sc_done = 1'b0;
    if (sc_running) begin
      if (sc_busy_cnt == 0) begin
        sc_done = 1'b1;
        sc_running = 1'b0;
        lines[sc_j + 1] += int'(sc_nrows);
      end else sc_busy_cnt--;
    end
    #1;
    if (job_valid && job_ready) begin
      int s, y;
      s = int'(job_scale); y = int'(job_y);
      checks++;
      if (s >= NS || y < 0 || y + WH > sh[s] || job_seen[s][y] || int'(job_n) != sw[s] - WW + 1 ||
          int'(job_col) != int'(scfg[s].x_off) || y + WH > lines[s])
        fail($sformatf("job scale %0d y %0d n %0d (lines %0d)", s, y, job_n, lines[s]));
      else job_seen[s][y] = 1'b1;
      pq_s.push_back(s); pq_y.push_back(y); pq_n.push_back(int'(job_n)); pq_t.push_back(int'(job_tag));
    end
    if (sc_start) begin
      int j, g, need, nr;
      j = -1;
      for (int k = 0; k < NS; k++) if (sc_src == scfg[k] && sc_dst == scfg[k + 1]) j = k;
      g = int'(sc_group);
      need = (6 * g + 7 < sh[j]) ? 6 * g + 7 : sh[j];
      nr = (sh[j + 1] - 5 * g < 5) ? sh[j + 1] - 5 * g : 5;
      checks++;
      if (j < 0 || sc_running || g != next_grp[j] || lines[j] < need || sc_out != (j == NS - 1))
        fail($sformatf("scaling scale %0d group %0d (lines %0d)", j, g, j >= 0 ? lines[j] : -1));
      else begin
        next_grp[j]++;
        if (j + 1 < NS)
          for (int l = lines[j + 1]; l < lines[j + 1] + nr; l++) begin
            checks++;
            if (row_in_use(j + 1, l - SME_H)) fail($sformatf("scale %0d line %0d overwrites a line in use", j + 1, l));
          end
        sc_j = j; sc_running = 1'b1; sc_busy_cnt = $urandom_range(40);
        sc_nrows = 3'(nr);
      end
    end
  end

  initial begin
    scfg = '0;
    sw[0] = 48; sh[0] = 60;
    for (int s = 1; s <= NS; s++) begin sw[s] = (sw[s-1]*5 + 5) / 6; sh[s] = (sh[s-1]*5 + 5) / 6; end
    for (int s = 0; s <= NS; s++) scfg[s] = '{x_off: COL_W'(s * 50 + 1), width: LINE_W'(sw[s]), height: LINE_W'(sh[s])};
    n_scales = SC_W'(NS); out_en = 1; win_w = LINE_W'(WW); win_h = LINE_W'(WH);
    sof = 0; line_done = 0; wr_line = 0; sc_done = 0; sc_nrows = 0; ob_free = 1;
    job_ready = 0; retire = 0; retire_tag = 0; sc_running = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int f = 0; f < 2; f++) begin
      foreach (lines[s]) lines[s] = 0;
      foreach (next_grp[s]) next_grp[s] = 0;
      foreach (job_seen[s, y]) job_seen[s][y] = 0;
      while (!frame_idle) @(negedge clk);
      @(negedge clk) sof = 1;
      @(negedge clk) sof = 0;
      for (int n = 0; n < sh[0]; n++) begin
        @(negedge clk);
        wr_line = LINE_W'(n);
        #1;
        while (!line_ok) begin @(negedge clk); #1; end
        checks++;
        if (row_in_use(0, n - SME_H)) fail($sformatf("input line %0d overwrites a line in use", n));
        repeat ($urandom_range(1, 8)) @(negedge clk);   // the line arrives
        line_done = 1; lines[0]++;
        @(negedge clk);
        line_done = 0; wr_line = LINE_W'(n + 1);
      end
      while (!frame_idle) @(negedge clk);
      repeat (5) @(negedge clk);
      // everything done?
      for (int s = 0; s < NS; s++) begin
        int miss;
        miss = 0;
        for (int y = 0; y + WH <= sh[s]; y++) if (!job_seen[s][y]) miss++;
        checks += 2;
        if (miss != 0) fail($sformatf("frame %0d scale %0d: %0d window rows never queued", f, s, miss));
        if (next_grp[s] * 6 < sh[s]) fail($sformatf("frame %0d scale %0d: only %0d groups scaled", f, s, next_grp[s]));
      end
      checks++;
      if (pq_s.size() != 0 || int'(events_done) != sh[0]) fail("frame did not finish");
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

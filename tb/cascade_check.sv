// End-to-end check of the two-instance stripe memory cascade.
//
// Configures both instances over AXI-Lite with the same random LRD
// classifier, sends N_FRAMES frames of a random image, and compares every
// detection with a reference computed here independently: the image
// pyramid is rebuilt with the same 6 -> 5 Lanczos weights and edge
// replication, and Algorithm 1 (cell sums, LRD, alpha look-up, rejection
// threshold) is run on every window of every scale. Each expected window
// must come out exactly once with the same response, and nothing else may.
//
// Instance 0 stores scales 0 .. NS0-1 and streams scale NS0 to instance 1,
// which stores NS1 scales. The harness also counts how often each mechanism
// of the design happened (rejection, acceptance, the second pipeline losing
// its port-B slot, line gating, scaling into the stripe and into the output
// stream, the cascade link, result back-pressure) and fails if one never did.
module cascade_check #(
  parameter int W0      = 48,
  parameter int H0      = 36,
  parameter int NS0     = 2,
  parameter int NS1     = 2,
  parameter int WIN_W   = 8,
  parameter int WIN_H   = 8,
  parameter int TLEN    = 4,
  parameter int THR     = -20,   // rejection threshold of weak classifiers 0 .. N_STRICT-1
  parameter int N_STRICT = 1 << 30,
  parameter int THR_LATE = -131072, // threshold of the later weak classifiers
  parameter int N_FRAMES = 2,
  parameter int OFF0    = 5,     // stripe x offset of the first scale of each instance
  parameter int GAP     = 3,     // gap between scales in the stripe
  parameter int VALID_PCT = 80,  // input pixel valid probability
  parameter int READY_PCT = 70,  // result ready probability
  parameter longint MAX_CYCLES = 2_000_000
) (
  output int checks,
  output int failures,
  output logic finished
);
  import sme_pkg::*;

  localparam int NI = 2;
  localparam int NSC = NS0 + NS1;        // global scales with detection
  localparam int NSALL = NSC;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  // ---------------- DUT ----------------
  logic [PIX_W-1:0] s_tdata;
  logic s_tvalid, s_tready, s_tuser, s_tlast;
  logic [PIX_W-1:0] m_vdata;
  logic m_vvalid, m_vuser, m_vlast;
  logic [63:0] r_tdata;
  logic r_tvalid, r_tready;
  logic [NI-1:0][23:0] awaddr, araddr;
  logic [NI-1:0][31:0] wdata, rdata;
  logic [NI-1:0] awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [NI-1:0][1:0] bresp, rresp;

  sme_cascade dut (
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

  // ---------------- scale geometry ----------------
  int sw [NSC+1];
  int sh [NSC+1];
  int sx [NSC+1];     // stripe x offset inside its instance

  // ---------------- classifier ----------------
  int ins_x [TLEN], ins_y [TLEN], ins_w2 [TLEN], ins_h2 [TLEN], ins_a [TLEN], ins_b [TLEN];
  int alpha [TLEN][17];
  int thr [TLEN];

  // ---------------- pyramid (reference) ----------------
  typedef byte unsigned img_t [];
  img_t pyr [NSC+1];

  function automatic int lw(int k, int i);
    return int'(lanczos_w(k, i));
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  function automatic int px(int s, int y, int x);
    return int'(pyr[s][y * sw[s] + x]);
  endfunction

  task automatic build_scale(int s);
    pyr[s+1] = new[sw[s+1] * sh[s+1]];
    for (int y = 0; y < sh[s+1]; y++) begin
      for (int x = 0; x < sw[s+1]; x++) begin
        int g, kr, b, kc, acc;
        g = y / 5; kr = y % 5; b = x / 5; kc = x % 5;
        acc = 2048;
        for (int i = 0; i < 4; i++) begin
          int rr, hsum;
          rr = clampi(6*g - 1 + kr + i, 0, sh[s] - 1);
          hsum = 0;
          for (int m = 0; m < 4; m++)
            hsum += lw(kc, m) * px(s, rr, clampi(6*b - 1 + kc + m, 0, sw[s] - 1));
          acc += lw(kr, i) * hsum;
        end
        acc = acc >>> 12;
        pyr[s+1][y * sw[s+1] + x] = byte'(clampi(acc, 0, 255));
      end
    end
  endtask

  // reference classifier: returns 1 and the response when accepted
  function automatic bit classify(int s, int wx, int wy, output int hsum);
    hsum = 0;
    for (int t = 0; t < TLEN; t++) begin
      int c [9];
      int ra, rb, lrd, cw, ch;
      cw = ins_w2[t] + 1; ch = ins_h2[t] + 1;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin
          c[3*i+j] = 0;
          for (int dy = 0; dy < ch; dy++)
            for (int dx = 0; dx < cw; dx++)
              c[3*i+j] += px(s, wy + ins_y[t] + i*ch + dy, wx + ins_x[t] + j*cw + dx);
        end
      ra = 0; rb = 0;
      for (int k = 0; k < 9; k++) begin
        ra += int'(c[k] > c[ins_a[t]]);
        rb += int'(c[k] > c[ins_b[t]]);
      end
      lrd = ra - rb;
      hsum += alpha[t][lrd + 8];
      if (hsum < thr[t]) return 1'b0;
    end
    return 1'b1;
  endfunction

  // expected detections: key {scale, y, x} -> response
  int expected [longint];
  int n_expected;

  function automatic longint key(int s, int y, int x);
    return (longint'(s) << 32) | (longint'(y) << 16) | longint'(x);
  endfunction

  // ---------------- AXI-Lite ----------------
  // Inputs change on the falling edge; a handshake completes on the rising
  // edge that follows a falling edge at which valid and ready were both
  // high (ready is looked at one time unit after the inputs changed).
  task automatic axil_write(int inst, int addr, int data);
    @(negedge clk);
    awaddr[inst]  = 24'(addr);
    wdata[inst]   = data;
    awvalid[inst] = 1'b1;
    wvalid[inst]  = 1'b1;
    #1;
    while (!(awready[inst] && wready[inst])) begin @(negedge clk); #1; end
    @(negedge clk);
    awvalid[inst] = 1'b0;
    wvalid[inst]  = 1'b0;
    while (!bvalid[inst]) @(negedge clk);
  endtask

  task automatic axil_read(int inst, int addr, output int data);
    @(negedge clk);
    araddr[inst]  = 24'(addr);
    arvalid[inst] = 1'b1;
    #1;
    while (!arready[inst]) begin @(negedge clk); #1; end
    @(negedge clk);
    arvalid[inst] = 1'b0;
    while (!rvalid[inst]) @(negedge clk);
    data = rdata[inst];
  endtask

  task automatic configure(int inst);
    int first, ns, rd;
    first = (inst == 0) ? 0 : NS0;
    ns    = (inst == 0) ? NS0 : NS1;
    axil_write(inst, 'h0, (WIN_H << 16) | WIN_W);
    axil_write(inst, 'h4, TLEN);
    axil_write(inst, 'h8, ((inst == 0) ? 32'h100 : 32'h0) | ns);
    axil_write(inst, 'hC, first);
    for (int j = 0; j <= ns && first + j <= NSC; j++) begin
      axil_write(inst, 'h100 + 16*j + 0, sx[first + j]);
      axil_write(inst, 'h100 + 16*j + 4, sw[first + j]);
      axil_write(inst, 'h100 + 16*j + 8, sh[first + j]);
    end
    for (int t = 0; t < TLEN; t++) begin
      axil_write(inst, 'h10000 + 4*t,
                 (ins_b[t] << 22) | (ins_a[t] << 18) | (ins_h2[t] << 17) | (ins_w2[t] << 16) |
                 (ins_y[t] << 8) | ins_x[t]);
      axil_write(inst, 'h20000 + 4*t, thr[t] & 'h3FFFF);
      for (int g = 0; g < 17; g++)
        axil_write(inst, 'h400000 + 4*(t*17 + g), alpha[t][g] & 'h1FF);
    end
    axil_read(inst, 'h0, rd);
    checks++;
    if (rd != ((WIN_H << 16) | WIN_W)) begin
      failures++;
      $display("FAIL: instance %0d window register reads %h", inst, rd);
    end
  endtask

  // ---------------- mechanism counters ----------------
  longint n_reject, n_accept, n_slot_lost, n_line_gate, n_scale_sme, n_scale_out;
  longint n_link, n_backpressure, n_dual, n_cycles;

  always @(negedge clk) if (!rst) begin
    n_cycles++;
    if (dut.g_inst[0].u_det.g_pipe[1].u_pipe.tok[0].valid && dut.g_inst[0].u_det.maint) n_slot_lost++;
    if (dut.g_inst[0].u_det.g_pipe[0].u_pipe.exec_ok && dut.g_inst[0].u_det.g_pipe[1].u_pipe.exec_ok) n_dual++;
    if (s_tvalid && !s_tready && !dut.g_inst[0].u_det.line_ok) n_line_gate++;
    for (int k = 0; k < 2; k++) begin
      if (k == 0 ? (dut.g_inst[0].u_det.u_scale.done && !dut.g_inst[0].u_det.sc_out)
                 : (dut.g_inst[1].u_det.u_scale.done && !dut.g_inst[1].u_det.sc_out)) n_scale_sme++;
    end
    if (dut.g_inst[0].u_det.u_scale.done && dut.g_inst[0].u_det.sc_out) n_scale_out++;
    if (dut.v_valid[1] && dut.v_ready[1]) n_link++;
    if (r_tvalid && !r_tready) n_backpressure++;
    n_reject += longint'(dut.g_inst[0].u_det.retire[0] & ~dut.g_inst[0].u_det.res_valid[0]);
    n_reject += longint'(dut.g_inst[0].u_det.retire[1] & ~dut.g_inst[0].u_det.res_valid[1]);
    n_reject += longint'(dut.g_inst[1].u_det.retire[0] & ~dut.g_inst[1].u_det.res_valid[0]);
    n_reject += longint'(dut.g_inst[1].u_det.retire[1] & ~dut.g_inst[1].u_det.res_valid[1]);
  end

  // ---------------- result checking ----------------
  int got;
  int bad_scale [int];
  int bad_ymin [int], bad_ymax [int];
  always @(negedge clk) if (!rst) begin
    r_tready = ($urandom_range(99) < READY_PCT);
    if (r_tvalid && r_tready) begin
      result_t r;
      longint k;
      r = result_t'(r_tdata);
      k = key(int'(r.scale), int'(r.y), int'(r.x));
      checks++;
      got++;
      n_accept++;
      if (!expected.exists(k)) begin
        failures++;
        if (failures < 10) $display("FAIL: unexpected detection scale %0d y %0d x %0d H %0d",
                                    r.scale, r.y, r.x, r.conf);
      end else begin
        if (expected[k] != int'(r.conf)) begin
          failures++;
          bad_scale[int'(r.scale)]++;
          if (!bad_ymin.exists(int'(r.scale)) || bad_ymin[int'(r.scale)] > int'(r.y)) bad_ymin[int'(r.scale)] = int'(r.y);
          if (!bad_ymax.exists(int'(r.scale)) || bad_ymax[int'(r.scale)] < int'(r.y)) bad_ymax[int'(r.scale)] = int'(r.y);
          if (failures < 10) $display("FAIL: scale %0d y %0d x %0d H %0d expected %0d",
                                      r.scale, r.y, r.x, r.conf, expected[k]);
        end
        expected.delete(k);
      end
    end
  end

  // ---------------- stimulus ----------------
  initial begin
    int seed_dummy;
    checks = 0; failures = 0; finished = 1'b0;
    n_reject = 0; n_accept = 0; n_slot_lost = 0; n_line_gate = 0; n_scale_sme = 0;
    n_scale_out = 0; n_link = 0; n_backpressure = 0; n_dual = 0; n_cycles = 0; got = 0;
    s_tvalid = 1'b0; s_tdata = '0; s_tuser = 1'b0; s_tlast = 1'b0;
    awvalid = '0; wvalid = '0; arvalid = '0; bready = '1; rready = '1;
    awaddr = '0; araddr = '0; wdata = '0;

    // geometry
    sw[0] = W0; sh[0] = H0;
    for (int s = 1; s <= NSC; s++) begin
      sw[s] = (sw[s-1] * 5 + 5) / 6;
      sh[s] = (sh[s-1] * 5 + 5) / 6;
    end
    begin
      int xo;
      xo = OFF0;
      for (int s = 0; s <= NS0; s++) begin
        sx[s] = xo;
        xo += sw[s] + GAP;
      end
      xo = OFF0;
      for (int s = NS0; s <= NSC; s++) begin
        sx[s] = xo;
        xo += sw[s] + GAP;
      end
    end

    // classifier
    for (int t = 0; t < TLEN; t++) begin
      ins_w2[t] = $urandom_range(1);
      ins_h2[t] = $urandom_range(1);
      ins_x[t]  = $urandom_range(WIN_W - 3 * (ins_w2[t] + 1));
      ins_y[t]  = $urandom_range(WIN_H - 3 * (ins_h2[t] + 1));
      ins_a[t]  = $urandom_range(8);
      ins_b[t]  = $urandom_range(8);
      thr[t]    = (t < N_STRICT) ? THR : THR_LATE;
      for (int g = 0; g < 17; g++) alpha[t][g] = int'($urandom_range(127)) - 64;
    end

    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (2) @(posedge clk);
    configure(0);
    configure(1);

    for (int f = 0; f < N_FRAMES; f++) begin
      // image and reference
      pyr[0] = new[W0 * H0];
      for (int i = 0; i < W0 * H0; i++) pyr[0][i] = byte'($urandom_range(255));
      for (int s = 0; s < NSC; s++) build_scale(s);
      expected.delete();
      for (int s = 0; s < NSC; s++)
        for (int y = 0; y + WIN_H <= sh[s]; y++)
          for (int x = 0; x + WIN_W <= sw[s]; x++) begin
            int hs;
            if (classify(s, x, y, hs)) expected[key(s, y, x)] = hs;
          end
      n_expected = expected.num();
      $display("frame %0d: %0d expected detections", f, n_expected);
      got = 0;

      // send the frame
      for (int y = 0; y < H0; y++) begin
        for (int x = 0; x < W0; x++) begin
          @(negedge clk);
          s_tvalid = 1'b0;
          while ($urandom_range(99) >= VALID_PCT) @(negedge clk);
          s_tdata  = pyr[0][y * W0 + x];
          s_tuser  = (x == 0 && y == 0);
          s_tlast  = (x == W0 - 1);
          s_tvalid = 1'b1;
          while (!s_tready) @(negedge clk);
        end
      end
      @(negedge clk);
      s_tvalid = 1'b0;
      // drain
      while (expected.num() != 0 || !dut.g_inst[0].u_det.frame_idle ||
             !dut.g_inst[1].u_det.frame_idle || r_tvalid) @(posedge clk);
      repeat (100) @(posedge clk);
      checks++;
      if (expected.num() != 0) begin
        failures++;
        $display("FAIL: frame %0d: %0d detections missing", f, expected.num());
      end
      $display("frame %0d done at cycle %0d, %0d detections", f, n_cycles, got);
    end

    foreach (bad_scale[sc])
      $display("FAIL: scale %0d: %0d responses differ, window rows %0d .. %0d",
               sc, bad_scale[sc], bad_ymin[sc], bad_ymax[sc]);
    // every mechanism must have happened
    begin
      longint cnt [9];
      string  nm [9];
      cnt = '{n_reject, n_accept, n_slot_lost, n_line_gate, n_scale_sme, n_scale_out, n_link,
              n_backpressure, n_dual};
      nm  = '{"rejection", "acceptance", "port-B slot lent", "line gating", "scaling to stripe",
              "scaling to output", "cascade link", "result back-pressure", "two pipelines busy"};
      for (int i = 0; i < 9; i++) begin
        checks++;
        $display("mechanism %-22s %0d", nm[i], cnt[i]);
        if (cnt[i] == 0) begin
          failures++;
          $display("FAIL: mechanism %s never happened", nm[i]);
        end
      end
    end
    finished = 1'b1;
  end

  // watchdog
  initial begin
    wait (!rst);
    while (n_cycles < MAX_CYCLES && !finished) @(posedge clk);
    if (!finished) begin
      failures++;
      $display("FAIL: watchdog after %0d cycles, %0d detections still missing", n_cycles, expected.num());
      foreach (expected[k]) begin
        if (failures < 20) $display("  missing scale %0d y %0d x %0d", k >> 32, (k >> 16) & 'hFFFF, k & 'hFFFF);
        failures++;
      end
      finished = 1'b1;
    end
  end

endmodule

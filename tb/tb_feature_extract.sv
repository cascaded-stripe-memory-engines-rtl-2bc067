// Feature extraction test: random 6x6 blocks and random (w, h, a, b),
// checked against LBP and LRD computed here from the cell definition, on
// an LRD and an LBP instance side by side; the result must appear exactly
// two cycles after its inputs, with a new block every cycle.
module tb_feature_extract;
  import sme_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [5:0][6*PIX_W-1:0] blk;
  logic w2, h2;
  logic [3:0] a, b;
  logic [7:0] f_lrd, f_lbp;

  feature_extract #(.FEATURE(FEAT_LRD)) dut_lrd (.clk, .blk, .w2, .h2, .a, .b, .feature (f_lrd));
  feature_extract #(.FEATURE(FEAT_LBP)) dut_lbp (.clk, .blk, .w2, .h2, .a, .b, .feature (f_lbp));

  int exp_lrd [$], exp_lbp [$];

  function automatic void model(input logic [5:0][6*PIX_W-1:0] bk, input int cw, input int ch,
                                input int ia, input int ib, output int lrd, output int lbp);
    int c [9];
    int ra, rb, bit_i;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        c[3*i+j] = 0;
        for (int dy = 0; dy < ch; dy++)
          for (int dx = 0; dx < cw; dx++)
            c[3*i+j] += int'(bk[i*ch + dy][(j*cw + dx)*PIX_W +: PIX_W]);
      end
    ra = 0; rb = 0;
    foreach (c[k]) begin
      ra += int'(c[k] > c[ia]);
      rb += int'(c[k] > c[ib]);
    end
    lrd = ra - rb + 8;
    lbp = 0; bit_i = 0;
    for (int k = 0; k < 9; k++)
      if (k != 4) begin
        if (c[k] > c[4]) lbp |= (1 << bit_i);
        bit_i++;
      end
  endfunction

  initial begin
    int n;
    n = 0;
    blk = '0; w2 = 0; h2 = 0; a = 0; b = 0;
    repeat (3000) begin
      int l, p;
      @(negedge clk);
      // compare outputs of the inputs applied two cycles ago
      if (exp_lrd.size() == 2) begin
        int el, ep;
        el = exp_lrd.pop_front(); ep = exp_lbp.pop_front();
        checks += 2;
        if (int'(f_lrd) != el) begin failures++; if (failures < 5) $display("FAIL: LRD %0d expected %0d", f_lrd, el); end
        if (int'(f_lbp) != ep) begin failures++; if (failures < 5) $display("FAIL: LBP %0d expected %0d", f_lbp, ep); end
      end
      for (int r = 0; r < 6; r++)
        for (int c = 0; c < 6; c++)
          blk[r][c*PIX_W +: PIX_W] = (n % 3 == 0) ? PIX_W'($urandom_range(3) * 60) : PIX_W'($urandom);
      w2 = $urandom_range(1); h2 = $urandom_range(1);
      a = $urandom_range(8); b = $urandom_range(8);
      model(blk, w2 + 1, h2 + 1, a, b, l, p);
      exp_lrd.push_back(l); exp_lbp.push_back(p);
      n++;
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

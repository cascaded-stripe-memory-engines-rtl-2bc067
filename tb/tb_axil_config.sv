// Configuration interface test: writes every register and scale slot with
// random values over AXI-Lite and reads them back, reads the status
// register against the values driven into it, and writes program,
// threshold and alpha words, checking that exactly the right table strobe
// pulses with the word address and data of the write.
module tb_axil_config;
  import sme_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int AAW = $clog2(T_MAX * 17);
  logic rst = 1'b1;
  logic [23:0] s_awaddr, s_araddr;
  logic s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready, s_arvalid, s_arready, s_rvalid, s_rready;
  logic [31:0] s_wdata, s_rdata, tbl_wdata;
  logic [1:0] s_bresp, s_rresp;
  logic [LINE_W-1:0] win_w, win_h, stat_events;
  logic [T_W:0] t_len;
  logic [SC_W-1:0] n_scales;
  logic out_en, stat_idle, prog_we, thr_we, alpha_we;
  logic [7:0] scale_base;
  scale_cfg_t [MAX_SCALES-1:0] scfg;
  logic [T_W-1:0] prog_waddr, thr_waddr;
  logic [AAW-1:0] alpha_waddr;

  axil_config dut (.*);

  // table strobes seen during the last write
  int n_prog, n_thr, n_alpha;
  int last_addr, last_data;
  always @(posedge clk) begin
    if (prog_we)  begin n_prog++;  last_addr = prog_waddr;  last_data = tbl_wdata; end
    if (thr_we)   begin n_thr++;   last_addr = thr_waddr;   last_data = tbl_wdata; end
    if (alpha_we) begin n_alpha++; last_addr = alpha_waddr; last_data = tbl_wdata; end
  end

  task automatic wr(int addr, int data);
    @(negedge clk);
    s_awaddr = 24'(addr); s_wdata = data; s_awvalid = 1; s_wvalid = 1;
    #1;
    while (!(s_awready && s_wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    s_awvalid = 0; s_wvalid = 0;
    while (!s_bvalid) @(negedge clk);
    checks++;
    if (s_bresp != 2'b00) begin failures++; $display("FAIL: write response %0d", s_bresp); end
  endtask

  task automatic rd(int addr, output int data);
    @(negedge clk);
    s_araddr = 24'(addr); s_arvalid = 1;
    #1;
    while (!s_arready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_arvalid = 0;
    while (!s_rvalid) @(negedge clk);
    data = s_rdata;
  endtask

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL: %s = %h, expected %h", what, got, exp);
    end
  endtask

  initial begin
    int v, r;
    s_awaddr = 0; s_araddr = 0; s_awvalid = 0; s_wvalid = 0; s_wdata = 0; s_arvalid = 0;
    s_bready = 1; s_rready = 1; stat_events = 0; stat_idle = 0;
    n_prog = 0; n_thr = 0; n_alpha = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // reset values
    expect_eq("reset window", {20'(win_h), 12'(win_w)}, {20'd24, 12'd24});
    expect_eq("reset T", int'(t_len), T_MAX);
    repeat (20) begin
      int ww, wh, t, ns, sb;
      ww = $urandom_range(1, 100); wh = $urandom_range(1, 27);
      t = $urandom_range(1, T_MAX); ns = $urandom_range(1, MAX_SCALES - 1); sb = $urandom_range(255);
      wr('h0, (wh << 16) | ww);  rd('h0, r); expect_eq("window", r, (wh << 16) | ww);
      expect_eq("win_w", int'(win_w), ww); expect_eq("win_h", int'(win_h), wh);
      wr('h4, t);   rd('h4, r); expect_eq("T", r, t); expect_eq("t_len", int'(t_len), t);
      wr('h8, 'h100 | ns); rd('h8, r); expect_eq("scales", r, 'h100 | ns);
      expect_eq("n_scales", int'(n_scales), ns); expect_eq("out_en", int'(out_en), 1);
      wr('hC, sb);  rd('hC, r); expect_eq("scale base", r, sb);
      expect_eq("scale_base", int'(scale_base), sb);
    end
    for (int j = 0; j < MAX_SCALES; j++) begin
      int xo, w, h;
      xo = $urandom_range(SME_W - 1); w = $urandom_range(1, 4095); h = $urandom_range(1, 4095);
      wr('h100 + 16*j, xo); wr('h104 + 16*j, w); wr('h108 + 16*j, h);
      rd('h100 + 16*j, r); expect_eq("x offset", r, xo);
      rd('h104 + 16*j, r); expect_eq("width", r, w);
      rd('h108 + 16*j, r); expect_eq("height", r, h);
      expect_eq("scfg", {int'(scfg[j].x_off), int'(scfg[j].width), int'(scfg[j].height)} == {xo, w, h}, 1);
    end
    stat_events = 12'd345; stat_idle = 1;
    rd('h10, r); expect_eq("status", r, (1 << 16) | 345);
    // table writes
    repeat (100) begin
      int kind, a, d, np, nt, na;
      kind = $urandom_range(2); d = $urandom;
      np = n_prog; nt = n_thr; na = n_alpha;
      case (kind)
        0: begin a = $urandom_range(T_MAX - 1);      wr('h10000 + 4*a, d); end
        1: begin a = $urandom_range(T_MAX - 1);      wr('h20000 + 4*a, d); end
        default: begin a = $urandom_range(T_MAX * 17 - 1); wr('h400000 + 4*a, d); end
      endcase
      expect_eq("strobes", (n_prog - np) * 100 + (n_thr - nt) * 10 + (n_alpha - na),
                kind == 0 ? 100 : (kind == 1 ? 10 : 1));
      expect_eq("table address", last_addr, a);
      expect_eq("table data", last_data, d);
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

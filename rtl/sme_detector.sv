// Stripe memory engine detector: one complete detector instance.
//
// The instance stores the incoming image and the scales it derives in a
// 4096 x 32 pixel stripe memory, and two detection pipelines evaluate a
// soft-cascade classifier on every window position of every stored scale.
// It has one input and two outputs, as in the document:
//   s_vid_*   image input, AXI Stream Video, 8-bit pixels
//   m_vid_*   the next smaller scale, AXI Stream Video, for the next
//             instance of a cascade (only when the output scale is enabled)
//   m_res_*   detections, AXI Stream, one sme_pkg::result_t per window that
//             passed all T weak classifiers (global scale index, window top
//             line and left column in that scale, response H_T)
//   s_axil_*  configuration (see axil_config for the register map)
//
// Port use of the stripe memory: pipeline 1 owns port A. Pipeline 2 owns
// port B three cycles out of four; every fourth cycle port B serves the
// line writer and the scaling unit (alternating when both wait). This gives
// the document's 1.75 feature evaluations per clock cycle.
//
// The block structure (stripe memory, scaling unit, two pipelines with
// feature extraction, alpha table, threshold memory, position control and
// a shared program) follows the document's block diagram; the scheduler,
// queues and handshakes between the blocks are this design's.
module sme_detector
  import sme_pkg::*;
#(
  parameter feat_type_e   FEATURE = FEAT_LRD,
  parameter int unsigned  ALPHA_DEPTH = T_MAX * ((FEATURE == FEAT_LBP) ? 256 : 17),
  parameter int unsigned  JOB_DEPTH = 64,
  parameter int unsigned  RES_DEPTH = 32
) (
  input  logic          clk,
  input  logic          rst,
  // image input
  input  logic [PIX_W-1:0] s_vid_tdata,
  input  logic          s_vid_tvalid,
  output logic          s_vid_tready,
  input  logic          s_vid_tuser,
  input  logic          s_vid_tlast,
  // downscaled image output
  output logic [PIX_W-1:0] m_vid_tdata,
  output logic          m_vid_tvalid,
  input  logic          m_vid_tready,
  output logic          m_vid_tuser,
  output logic          m_vid_tlast,
  // detection results
  output logic [63:0]   m_res_tdata,
  output logic          m_res_tvalid,
  input  logic          m_res_tready,
  // configuration
  input  logic [23:0]   s_axil_awaddr,
  input  logic          s_axil_awvalid,
  output logic          s_axil_awready,
  input  logic [31:0]   s_axil_wdata,
  input  logic          s_axil_wvalid,
  output logic          s_axil_wready,
  output logic [1:0]    s_axil_bresp,
  output logic          s_axil_bvalid,
  input  logic          s_axil_bready,
  input  logic [23:0]   s_axil_araddr,
  input  logic          s_axil_arvalid,
  output logic          s_axil_arready,
  output logic [31:0]   s_axil_rdata,
  output logic [1:0]    s_axil_rresp,
  output logic          s_axil_rvalid,
  input  logic          s_axil_rready
);

  localparam int unsigned AAW = $clog2(ALPHA_DEPTH);
  localparam int unsigned OBW = $clog2(SME_W / 6 + 1);

  // ---------------- configuration ----------------
  logic [LINE_W-1:0]           win_w, win_h;
  logic [T_W:0]                t_len;
  logic [SC_W-1:0]             n_scales;
  logic                        out_en;
  logic [7:0]                  scale_base;
  scale_cfg_t [MAX_SCALES-1:0] scfg;
  logic [LINE_W-1:0]           events_done;
  logic                        frame_idle;
  logic                        prog_we, thr_we, alpha_we;
  logic [T_W-1:0]              prog_waddr, thr_waddr;
  logic [AAW-1:0]              alpha_waddr;
  logic [31:0]                 tbl_wdata;

  axil_config #(.ALPHA_DEPTH(ALPHA_DEPTH)) u_cfg (
    .clk, .rst,
    .s_awaddr (s_axil_awaddr), .s_awvalid (s_axil_awvalid), .s_awready (s_axil_awready),
    .s_wdata  (s_axil_wdata),  .s_wvalid  (s_axil_wvalid),  .s_wready  (s_axil_wready),
    .s_bresp  (s_axil_bresp),  .s_bvalid  (s_axil_bvalid),  .s_bready  (s_axil_bready),
    .s_araddr (s_axil_araddr), .s_arvalid (s_axil_arvalid), .s_arready (s_axil_arready),
    .s_rdata  (s_axil_rdata),  .s_rresp   (s_axil_rresp),   .s_rvalid  (s_axil_rvalid),
    .s_rready (s_axil_rready),
    .win_w, .win_h, .t_len, .n_scales, .out_en, .scale_base, .scfg,
    .stat_events (events_done), .stat_idle (frame_idle),
    .prog_we, .prog_waddr, .thr_we, .thr_waddr, .alpha_we, .alpha_waddr, .tbl_wdata
  );

  // ---------------- classifier tables ----------------
  logic [T_W-1:0]     prog_ra [2];
  logic [INSTR_W-1:0] prog_rd [2];
  logic [T_W-1:0]     thr_ra  [2];
  logic [THR_W-1:0]   thr_rd  [2];
  logic [AAW-1:0]     alpha_ra [2];
  logic [ALPHA_W-1:0] alpha_rd [2];

  table_mem #(.DEPTH(T_MAX), .WIDTH(INSTR_W)) u_prog (
    .clk, .we (prog_we), .waddr (prog_waddr), .wdata (tbl_wdata),
    .raddr0 (prog_ra[0]), .rdata0 (prog_rd[0]), .raddr1 (prog_ra[1]), .rdata1 (prog_rd[1])
  );
  table_mem #(.DEPTH(T_MAX), .WIDTH(THR_W)) u_thr (
    .clk, .we (thr_we), .waddr (thr_waddr), .wdata (tbl_wdata[THR_W-1:0]),
    .raddr0 (thr_ra[0]), .rdata0 (thr_rd[0]), .raddr1 (thr_ra[1]), .rdata1 (thr_rd[1])
  );
  table_mem #(.DEPTH(ALPHA_DEPTH), .WIDTH(ALPHA_W)) u_alpha (
    .clk, .we (alpha_we), .waddr (alpha_waddr), .wdata (tbl_wdata[ALPHA_W-1:0]),
    .raddr0 (alpha_ra[0]), .rdata0 (alpha_rd[0]), .raddr1 (alpha_ra[1]), .rdata1 (alpha_rd[1])
  );

  // ---------------- stripe memory and its port B ----------------
  logic [1:0] phase;
  logic       maint;       // port B lent to writer / scaler this cycle
  logic       pri;         // writer / scaler alternation
  assign maint = (phase == 2'd3);

  logic                      a_en;
  logic [ROW_W-1:0]          a_row;
  logic [WCOL_W-1:0]         a_wcol;
  logic [SME_V-1:0][BLK_W*PIX_W-1:0] a_blk, b_blk;
  logic                      b_en, b_we;
  logic [ROW_W-1:0]          b_row;
  logic [WCOL_W-1:0]         b_wcol;
  logic [SME_B*PIX_W-1:0]    b_wdata;
  logic [SME_B-1:0]          b_wmask;

  sme_stripe_mem u_sme (
    .clk,
    .a_en, .a_row, .a_wcol, .a_blk,
    .b_en, .b_we, .b_row, .b_wcol, .b_wdata, .b_wmask, .b_blk
  );

  // line writer
  logic                   wr_req, wr_gnt, sof, line_done, line_ok;
  logic [LINE_W-1:0]      wr_line;
  logic [ROW_W-1:0]       wr_row;
  logic [WCOL_W-1:0]      wr_wcol;
  logic [SME_B*PIX_W-1:0] wr_data;
  logic [SME_B-1:0]       wr_mask;

  line_writer u_writer (
    .clk, .rst, .x_off (scfg[0].x_off),
    .s_tdata (s_vid_tdata), .s_tvalid (s_vid_tvalid), .s_tready (s_vid_tready),
    .s_tuser (s_vid_tuser), .s_tlast (s_vid_tlast),
    .line_ok, .frame_idle, .line (wr_line), .sof, .line_done,
    .wr_req, .wr_gnt, .wr_row, .wr_wcol, .wr_data, .wr_mask
  );

  // scaling unit
  logic                   sc_start, sc_busy, sc_done, sc_out;
  logic [2:0]             sc_nrows;
  logic [LINE_W-1:0]      sc_group;
  scale_cfg_t             sc_src, sc_dst;
  logic                   sc_req, sc_gnt, sc_we;
  logic [ROW_W-1:0]       sc_row;
  logic [WCOL_W-1:0]      sc_wcol;
  logic [SME_B*PIX_W-1:0] sc_wdata;
  logic [SME_B-1:0]       sc_wmask;
  logic                   ob_free, ob_we, ob_commit;
  logic [2:0]             ob_row;
  logic [OBW-1:0]         ob_blk;
  logic [5*PIX_W-1:0]     ob_data;

  scale_unit u_scale (
    .clk, .rst, .start (sc_start), .group (sc_group), .src (sc_src), .dst (sc_dst),
    .dst_out (sc_out), .busy (sc_busy), .done (sc_done), .nrows (sc_nrows),
    .req (sc_req), .gnt (sc_gnt), .we (sc_we), .row (sc_row), .wcol (sc_wcol),
    .wdata (sc_wdata), .wmask (sc_wmask), .b_blk (b_blk),
    .ob_free, .ob_we, .ob_row, .ob_blk, .ob_data, .ob_commit
  );

  scale_out_stream u_out (
    .clk, .rst, .frame_start (sof), .width (scfg[n_scales].width),
    .free (ob_free), .we (ob_we), .row (ob_row), .blk (ob_blk), .data (ob_data),
    .commit (ob_commit), .nrows (sc_nrows),
    .m_tdata (m_vid_tdata), .m_tvalid (m_vid_tvalid), .m_tready (m_vid_tready),
    .m_tuser (m_vid_tuser), .m_tlast (m_vid_tlast)
  );

  // port-B arbitration
  logic              p2_en;
  logic [ROW_W-1:0]  p2_row;
  logic [WCOL_W-1:0] p2_wcol;
  always_comb begin
    wr_gnt = 1'b0;
    sc_gnt = 1'b0;
    if (maint) begin
      if (wr_req && (!sc_req || !pri)) wr_gnt = 1'b1;
      else if (sc_req) sc_gnt = 1'b1;
    end
    b_en    = 1'b0;
    b_we    = 1'b0;
    b_row   = p2_row;
    b_wcol  = p2_wcol;
    b_wdata = wr_data;
    b_wmask = wr_mask;
    if (wr_gnt) begin
      b_en = 1'b1; b_we = 1'b1; b_row = wr_row; b_wcol = wr_wcol;
    end else if (sc_gnt) begin
      b_en = 1'b1; b_we = sc_we; b_row = sc_row; b_wcol = sc_wcol;
      b_wdata = sc_wdata; b_wmask = sc_wmask;
    end else if (!maint) begin
      b_en = p2_en;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0;
      pri   <= 1'b0;
    end else begin
      phase <= phase + 1'b1;
      if (wr_gnt) pri <= 1'b1;
      else if (sc_gnt) pri <= 1'b0;
    end
  end

  // ---------------- scheduling ----------------
  logic [1:0] retire, retire_tag;

  localparam int unsigned JW = SC_W + LINE_W + COL_W + LINE_W + 1;
  logic              sj_valid, sj_ready, qj_valid, qj_ready;
  logic [SC_W-1:0]   sj_scale;
  logic [LINE_W-1:0] sj_y, sj_n;
  logic [COL_W-1:0]  sj_col;
  logic              sj_tag;
  logic [JW-1:0]     qj_data;
  logic [$clog2(JOB_DEPTH):0] qj_count;

  line_scheduler u_sched (
    .clk, .rst, .scfg, .n_scales, .out_en, .win_w, .win_h,
    .sof, .line_done, .wr_line, .line_ok, .frame_idle,
    .sc_start, .sc_group, .sc_src, .sc_dst, .sc_out, .sc_done, .sc_nrows, .ob_free,
    .job_valid (sj_valid), .job_ready (sj_ready), .job_scale (sj_scale), .job_y (sj_y),
    .job_col (sj_col), .job_n (sj_n), .job_tag (sj_tag),
    .retire, .retire_tag, .events_done, .scaling_active ()
  );

  sync_fifo #(.WIDTH(JW), .DEPTH(JOB_DEPTH)) u_jobs (
    .clk, .rst,
    .in_valid (sj_valid), .in_ready (sj_ready), .in_data ({sj_scale, sj_y, sj_col, sj_n, sj_tag}),
    .out_valid (qj_valid), .out_ready (qj_ready), .out_data (qj_data), .count (qj_count)
  );

  logic [1:0]        want, pgnt;
  logic [SC_W-1:0]   pg_scale;
  logic [LINE_W-1:0] pg_y, pg_x0, pg_x1;
  logic [COL_W-1:0]  pg_col0, pg_col1;
  logic              pg_tag, pg_active;

  position_gen u_pos (
    .clk, .rst,
    .job_valid (qj_valid), .job_ready (qj_ready),
    .job_scale (qj_data[JW-1 -: SC_W]),
    .job_y     (qj_data[JW-1-SC_W -: LINE_W]),
    .job_col   (qj_data[JW-1-SC_W-LINE_W -: COL_W]),
    .job_n     (qj_data[LINE_W:1]),
    .job_tag   (qj_data[0]),
    .want, .gnt (pgnt), .scale (pg_scale), .y (pg_y), .tag (pg_tag),
    .x0 (pg_x0), .col0 (pg_col0), .x1 (pg_x1), .col1 (pg_col1), .active (pg_active)
  );

  // ---------------- detection pipelines ----------------
  logic [1:0]        res_valid, res_room, rq_valid, rq_ready, p_busy, p_exec;
  result_t           res_data [2];
  logic [1:0][63:0]  rq_data;
  logic [$clog2(RES_DEPTH):0] rq_count [2];

  for (genvar p = 0; p < 2; p++) begin : g_pipe
    logic              sme_en;
    logic [ROW_W-1:0]  sme_row;
    logic [WCOL_W-1:0] sme_wcol;
    result_t           gres;

    detect_pipeline #(.FEATURE(FEATURE), .ALPHA_DEPTH(ALPHA_DEPTH)) u_pipe (
      .clk, .rst, .t_len,
      .pos_want (want[p]), .pos_gnt (pgnt[p]), .pos_scale (pg_scale),
      .pos_x (p == 0 ? pg_x0 : pg_x1), .pos_y (pg_y),
      .pos_col (p == 0 ? pg_col0 : pg_col1), .pos_tag (pg_tag),
      .prog_addr (prog_ra[p]), .prog_data (prog_rd[p]),
      .port_ok (p == 0 ? 1'b1 : !maint),
      .sme_en, .sme_row, .sme_wcol, .sme_blk (p == 0 ? a_blk : b_blk),
      .alpha_addr (alpha_ra[p]), .alpha_data (alpha_rd[p]),
      .thr_addr (thr_ra[p]), .thr_data (thr_rd[p]),
      .res_room (res_room[p]), .res_valid (res_valid[p]), .res_data (res_data[p]),
      .retire (retire[p]), .retire_tag (retire_tag[p]), .exec_ok (p_exec[p]), .busy (p_busy[p])
    );

    if (p == 0) begin : g_porta
      assign a_en   = sme_en;
      assign a_row  = sme_row;
      assign a_wcol = sme_wcol;
    end else begin : g_portb
      assign p2_en   = sme_en;
      assign p2_row  = sme_row;
      assign p2_wcol = sme_wcol;
    end

    always_comb begin
      gres = res_data[p];
      gres.scale = res_data[p].scale + scale_base;
    end

    assign res_room[p] = rq_count[p] < (($clog2(RES_DEPTH)+1))'(RES_DEPTH - PIPE_LEN - 1);

    sync_fifo #(.WIDTH(64), .DEPTH(RES_DEPTH)) u_resq (
      .clk, .rst,
      .in_valid (res_valid[p]), .in_ready (), .in_data (gres),
      .out_valid (rq_valid[p]), .out_ready (rq_ready[p]), .out_data (rq_data[p]),
      .count (rq_count[p])
    );
  end

  stream_merge #(.N(2), .WIDTH(64)) u_merge (
    .clk, .rst,
    .in_valid (rq_valid), .in_ready (rq_ready), .in_data (rq_data),
    .out_valid (m_res_tvalid), .out_ready (m_res_tready), .out_data (m_res_tdata)
  );

endmodule

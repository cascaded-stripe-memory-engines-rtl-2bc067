// Stripe memory cascade: the complete multi-scale object detector.
//
// N_INST detector instances (sme_detector) are chained: the camera image
// enters instance 0, and each instance sends the next smaller scale it
// produces to the following instance as an ordinary video stream, so the
// first instance holds a few large scales and later instances hold the
// many small ones. All instances work at the same time; their detection
// streams are merged round-robin into one result stream. The frame rate of
// the cascade is that of its busiest instance. The chain, the merge and
// the default of two instances (the document's HD configuration with two
// instances) follow the document.
//
// Each instance has its own AXI-Lite configuration port, brought out as
// arrays indexed by instance. The video output of the last instance is
// brought out too, so that a further cascade can be attached; tie its
// ready high when unused.
module sme_cascade
  import sme_pkg::*;
#(
  parameter int unsigned  N_INST  = 2,
  parameter feat_type_e   FEATURE = FEAT_LRD
) (
  input  logic                      clk,
  input  logic                      rst,
  // image input
  input  logic [PIX_W-1:0]          s_vid_tdata,
  input  logic                      s_vid_tvalid,
  output logic                      s_vid_tready,
  input  logic                      s_vid_tuser,
  input  logic                      s_vid_tlast,
  // downscaled output of the last instance
  output logic [PIX_W-1:0]          m_vid_tdata,
  output logic                      m_vid_tvalid,
  input  logic                      m_vid_tready,
  output logic                      m_vid_tuser,
  output logic                      m_vid_tlast,
  // merged detections (sme_pkg::result_t)
  output logic [63:0]               m_res_tdata,
  output logic                      m_res_tvalid,
  input  logic                      m_res_tready,
  // configuration, one AXI-Lite port per instance
  input  logic [N_INST-1:0][23:0]   s_axil_awaddr,
  input  logic [N_INST-1:0]         s_axil_awvalid,
  output logic [N_INST-1:0]         s_axil_awready,
  input  logic [N_INST-1:0][31:0]   s_axil_wdata,
  input  logic [N_INST-1:0]         s_axil_wvalid,
  output logic [N_INST-1:0]         s_axil_wready,
  output logic [N_INST-1:0][1:0]    s_axil_bresp,
  output logic [N_INST-1:0]         s_axil_bvalid,
  input  logic [N_INST-1:0]         s_axil_bready,
  input  logic [N_INST-1:0][23:0]   s_axil_araddr,
  input  logic [N_INST-1:0]         s_axil_arvalid,
  output logic [N_INST-1:0]         s_axil_arready,
  output logic [N_INST-1:0][31:0]   s_axil_rdata,
  output logic [N_INST-1:0][1:0]    s_axil_rresp,
  output logic [N_INST-1:0]         s_axil_rvalid,
  input  logic [N_INST-1:0]         s_axil_rready
);

  // video chain: link k feeds instance k
  logic [N_INST:0][PIX_W-1:0] v_data;
  logic [N_INST:0]            v_valid, v_ready, v_user, v_last;
  logic [N_INST-1:0][63:0]    r_data;
  logic [N_INST-1:0]          r_valid, r_ready;

  assign v_data[0]     = s_vid_tdata;
  assign v_valid[0]    = s_vid_tvalid;
  assign s_vid_tready  = v_ready[0];
  assign v_user[0]     = s_vid_tuser;
  assign v_last[0]     = s_vid_tlast;
  assign m_vid_tdata   = v_data[N_INST];
  assign m_vid_tvalid  = v_valid[N_INST];
  assign v_ready[N_INST] = m_vid_tready;
  assign m_vid_tuser   = v_user[N_INST];
  assign m_vid_tlast   = v_last[N_INST];

  for (genvar k = 0; k < N_INST; k++) begin : g_inst
    sme_detector #(.FEATURE(FEATURE)) u_det (
      .clk, .rst,
      .s_vid_tdata (v_data[k]),   .s_vid_tvalid (v_valid[k]),   .s_vid_tready (v_ready[k]),
      .s_vid_tuser (v_user[k]),   .s_vid_tlast  (v_last[k]),
      .m_vid_tdata (v_data[k+1]), .m_vid_tvalid (v_valid[k+1]), .m_vid_tready (v_ready[k+1]),
      .m_vid_tuser (v_user[k+1]), .m_vid_tlast  (v_last[k+1]),
      .m_res_tdata (r_data[k]),   .m_res_tvalid (r_valid[k]),   .m_res_tready (r_ready[k]),
      .s_axil_awaddr (s_axil_awaddr[k]), .s_axil_awvalid (s_axil_awvalid[k]),
      .s_axil_awready (s_axil_awready[k]),
      .s_axil_wdata (s_axil_wdata[k]), .s_axil_wvalid (s_axil_wvalid[k]),
      .s_axil_wready (s_axil_wready[k]),
      .s_axil_bresp (s_axil_bresp[k]), .s_axil_bvalid (s_axil_bvalid[k]),
      .s_axil_bready (s_axil_bready[k]),
      .s_axil_araddr (s_axil_araddr[k]), .s_axil_arvalid (s_axil_arvalid[k]),
      .s_axil_arready (s_axil_arready[k]),
      .s_axil_rdata (s_axil_rdata[k]), .s_axil_rresp (s_axil_rresp[k]),
      .s_axil_rvalid (s_axil_rvalid[k]), .s_axil_rready (s_axil_rready[k])
    );
  end

  stream_merge #(.N(N_INST), .WIDTH(64)) u_merge (
    .clk, .rst,
    .in_valid (r_valid), .in_ready (r_ready), .in_data (r_data),
    .out_valid (m_res_tvalid), .out_ready (m_res_tready), .out_data (m_res_tdata)
  );

endmodule

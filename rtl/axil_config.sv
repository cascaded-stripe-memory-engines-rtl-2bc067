// Configuration interface: AXI4-Lite slave holding a detector instance's
// settings and loading its classifier tables.
//
// The document lists what is configured (the detector definition, i.e.
// instructions and their look-up tables, the input image size and the
// sizes of the scaled versions) and that AXI-Lite carries it; the register
// map is this design's:
//   0x000000  [15:0] window width, [31:16] window height
//   0x000004  classifier length T (1 .. 1024)
//   0x000008  [7:0] number of stored scales, [8] produce output scale
//   0x00000C  [7:0] global index of this instance's scale 0
//   0x000010  status, read only: [11:0] events done, [16] frame idle
//   0x000100 + 16*j  scale j: +0 stripe x offset, +4 width, +8 height
//                    (slot n_scales describes the output scale)
//   0x010000 + 4*t   program word t
//   0x020000 + 4*t   threshold T[t] (18-bit two's complement, low bits)
//   0x400000 + 4*i   alpha entry i (9-bit two's complement); entry
//                    t*17 + (LRD+8) for LRD, t*256 + code for LBP
// Registers read back as written; table words read as zero. A write takes
// AW and W together and answers on B in the next cycle (OKAY).
module axil_config
  import sme_pkg::*;
#(
  parameter int unsigned ALPHA_DEPTH = T_MAX * 17,
  localparam int unsigned AAW = $clog2(ALPHA_DEPTH)
) (
  input  logic                        clk,
  input  logic                        rst,
  // AXI4-Lite slave
  input  logic [23:0]                 s_awaddr,
  input  logic                        s_awvalid,
  output logic                        s_awready,
  input  logic [31:0]                 s_wdata,
  input  logic                        s_wvalid,
  output logic                        s_wready,
  output logic [1:0]                  s_bresp,
  output logic                        s_bvalid,
  input  logic                        s_bready,
  input  logic [23:0]                 s_araddr,
  input  logic                        s_arvalid,
  output logic                        s_arready,
  output logic [31:0]                 s_rdata,
  output logic [1:0]                  s_rresp,
  output logic                        s_rvalid,
  input  logic                        s_rready,
  // settings
  output logic [LINE_W-1:0]           win_w,
  output logic [LINE_W-1:0]           win_h,
  output logic [T_W:0]                t_len,
  output logic [SC_W-1:0]             n_scales,
  output logic                        out_en,
  output logic [7:0]                  scale_base,
  output scale_cfg_t [MAX_SCALES-1:0] scfg,
  input  logic [LINE_W-1:0]           stat_events,
  input  logic                        stat_idle,
  // table write bus
  output logic                        prog_we,
  output logic [T_W-1:0]              prog_waddr,
  output logic                        thr_we,
  output logic [T_W-1:0]              thr_waddr,
  output logic                        alpha_we,
  output logic [AAW-1:0]              alpha_waddr,
  output logic [31:0]                 tbl_wdata
);

  logic wr;
  assign s_awready = s_awvalid && s_wvalid && !s_bvalid;
  assign s_wready  = s_awready;
  assign wr        = s_awready;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;

  assign tbl_wdata   = s_wdata;
  assign prog_we     = wr && s_awaddr[23:16] == 8'h01;
  assign prog_waddr  = T_W'(s_awaddr[15:2]);
  assign thr_we      = wr && s_awaddr[23:16] == 8'h02;
  assign thr_waddr   = T_W'(s_awaddr[15:2]);
  assign alpha_we    = wr && s_awaddr[23:22] == 2'b01;
  assign alpha_waddr = AAW'(s_awaddr[21:2]);

  logic reg_sel;
  assign reg_sel = s_awaddr[23:16] == 8'h00;

  always_ff @(posedge clk) begin
    if (rst) begin
      s_bvalid   <= 1'b0;
      win_w      <= LINE_W'(24);
      win_h      <= LINE_W'(24);
      t_len      <= (T_W+1)'(T_MAX);
      n_scales   <= SC_W'(1);
      out_en     <= 1'b0;
      scale_base <= '0;
      scfg       <= '0;
    end else begin
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (wr) begin
        s_bvalid <= 1'b1;
        if (reg_sel) begin
          if (s_awaddr[15:8] == 8'h00) begin
            case (s_awaddr[7:2])
              6'd0: begin
                win_w <= LINE_W'(s_wdata[15:0]);
                win_h <= LINE_W'(s_wdata[31:16]);
              end
              6'd1: t_len <= (T_W+1)'(s_wdata);
              6'd2: begin
                n_scales <= SC_W'(s_wdata[7:0]);
                out_en   <= s_wdata[8];
              end
              6'd3: scale_base <= s_wdata[7:0];
              default: ;
            endcase
          end else begin
            int sj;
            sj = (int'(s_awaddr[15:4]) - 16);
            if (sj >= 0 && sj < MAX_SCALES) begin
              case (s_awaddr[3:2])
                2'd0: scfg[sj].x_off  <= COL_W'(s_wdata);
                2'd1: scfg[sj].width  <= LINE_W'(s_wdata);
                2'd2: scfg[sj].height <= LINE_W'(s_wdata);
                default: ;
              endcase
            end
          end
        end
      end
    end
  end

  // read channel
  assign s_arready = !s_rvalid;
  always_ff @(posedge clk) begin
    if (rst) begin
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else begin
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (s_arvalid && s_arready) begin
        int sj;
        s_rvalid <= 1'b1;
        s_rdata  <= '0;
        sj = int'(s_araddr[15:4]) - 16;
        if (s_araddr[23:16] == 8'h00) begin
          if (s_araddr[15:8] == 8'h00) begin
            case (s_araddr[7:2])
              6'd0: s_rdata <= {4'b0, win_h, 4'b0, win_w};
              6'd1: s_rdata <= 32'(t_len);
              6'd2: s_rdata <= {23'b0, out_en, 8'(n_scales)};
              6'd3: s_rdata <= {24'b0, scale_base};
              6'd4: s_rdata <= {15'b0, stat_idle, 4'b0, stat_events};
              default: ;
            endcase
          end else if (sj >= 0 && sj < MAX_SCALES) begin
            case (s_araddr[3:2])
              2'd0: s_rdata <= 32'(scfg[sj].x_off);
              2'd1: s_rdata <= 32'(scfg[sj].width);
              2'd2: s_rdata <= 32'(scfg[sj].height);
              default: ;
            endcase
          end
        end
      end
    end
  end

endmodule

// Image input: receives the AXI Stream Video input of the detector and
// stores each line as the newest line of scale 0 in the stripe memory.
//
// Pixels are packed into B-pixel words at their stripe column
// (scale 0 x offset + x) and written through port B of the stripe memory
// with a per-pixel mask, so a scale may start at any column. Line l goes
// to stripe row l mod SME_H. The stream follows the AXI4-Stream video
// convention: tuser marks the first pixel of a frame, tlast the last pixel
// of a line.
//
// Flow control (this design's choice; the document only says that incoming
// lines are written in the slots left free by the second pipeline):
//   - a line is started only when line_ok is high; the scheduler raises it
//     once every window that could still read the stripe row about to be
//     overwritten has been evaluated;
//   - the first pixel of a frame waits for frame_idle, then sof pulses and
//     the line counter restarts at 0;
//   - while a packed word waits for its port-B slot (wr_req high until
//     wr_gnt) no pixel is taken.
// line_done pulses in the cycle after the last word of a line is written.
module line_writer
  import sme_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst,
  input  logic [COL_W-1:0]       x_off,        // scale 0 placement
  // AXI Stream Video input
  input  logic [PIX_W-1:0]       s_tdata,
  input  logic                   s_tvalid,
  output logic                   s_tready,
  input  logic                   s_tuser,
  input  logic                   s_tlast,
  // scheduling
  input  logic                   line_ok,
  input  logic                   frame_idle,
  output logic [LINE_W-1:0]      line,         // line being received
  output logic                   sof,
  output logic                   line_done,
  // stripe memory port-B write request
  output logic                   wr_req,
  input  logic                   wr_gnt,
  output logic [ROW_W-1:0]       wr_row,
  output logic [WCOL_W-1:0]      wr_wcol,
  output logic [SME_B*PIX_W-1:0] wr_data,
  output logic [SME_B-1:0]       wr_mask
);

  logic [LINE_W-1:0] x;
  logic              eol;       // pending word ends the line
  logic [COL_W-1:0]  col;
  logic              start_ok;

  assign col      = x_off + COL_W'(x);
  assign start_ok = (x != '0) || (s_tuser ? frame_idle : line_ok);
  assign s_tready = !wr_req && start_ok;
  assign wr_row   = ROW_W'(line);

  always_ff @(posedge clk) begin
    if (rst) begin
      x         <= '0;
      line      <= '0;
      eol       <= 1'b0;
      wr_req    <= 1'b0;
      wr_mask   <= '0;
      wr_wcol   <= '0;
      wr_data   <= '0;
      sof       <= 1'b0;
      line_done <= 1'b0;
    end else begin
      sof       <= 1'b0;
      line_done <= 1'b0;
      if (s_tvalid && s_tready) begin
        logic [1:0] p;
        p = col[1:0];
        if (s_tuser && x == '0) begin
          line <= '0;
          sof  <= 1'b1;
        end
        wr_data[p*PIX_W +: PIX_W] <= s_tdata;
        wr_mask[p] <= 1'b1;
        wr_wcol    <= col[COL_W-1:2];
        if (p == 2'd3 || s_tlast) begin
          wr_req <= 1'b1;
          eol    <= s_tlast;
        end
        x <= s_tlast ? '0 : x + 1'b1;
      end
      if (wr_req && wr_gnt) begin
        wr_req  <= 1'b0;
        wr_mask <= '0;
        if (eol) begin
          line_done <= 1'b1;
          line      <= line + 1'b1;
        end
      end
    end
  end

endmodule

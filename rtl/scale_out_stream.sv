// Downscaled image output: the first of the detector's two outputs.
//
// The scaling unit produces the next (smallest) scale as 5x5 blocks, five
// lines at a time, but the next instance of a cascade expects an ordinary
// raster stream. This unit buffers one group of up to five output lines,
// stored as 5-pixel words (one word per 5x5 block and line), and then sends
// them line by line as AXI Stream Video: tuser on the first pixel of the
// frame, tlast on the last pixel of each line. The document states what
// this output carries; the five-line buffer is this design's choice.
//
// Handshake with the scaling unit: while `free` is high the unit may write
// words (we, row, blk, data); `commit` with `nrows` then hands the group
// over and `free` stays low until its last pixel has left. `frame_start`
// restarts the output line count (and so the tuser marker).
// Timing: one pixel per cycle while m_tready is high.
module scale_out_stream
  import sme_pkg::*;
#(
  parameter int unsigned MAX_BLK = SME_W / 6 + 1,  // output words per line
  localparam int unsigned BW     = $clog2(MAX_BLK)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 frame_start,
  input  logic [LINE_W-1:0]    width,         // output line length in pixels
  // write side (scaling unit)
  output logic                 free,
  input  logic                 we,
  input  logic [2:0]           row,
  input  logic [BW-1:0]        blk,
  input  logic [5*PIX_W-1:0]   data,
  input  logic                 commit,
  input  logic [2:0]           nrows,
  // AXI Stream Video output
  output logic [PIX_W-1:0]     m_tdata,
  output logic                 m_tvalid,
  input  logic                 m_tready,
  output logic                 m_tuser,
  output logic                 m_tlast
);

  logic [5*PIX_W-1:0] buf_q [5][MAX_BLK];
  logic               busy;
  logic [2:0]         r, nr;
  logic [BW-1:0]      b;
  logic [2:0]         sub;
  logic [LINE_W-1:0]  x;
  logic [LINE_W-1:0]  out_line;

  assign free     = !busy;
  assign m_tvalid = busy;
  assign m_tdata  = buf_q[r][b][sub*PIX_W +: PIX_W];
  assign m_tuser  = (out_line == '0) && (x == '0);
  assign m_tlast  = (x == width - 1'b1);

  always_ff @(posedge clk) begin
    if (we) buf_q[row][blk] <= data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      r        <= '0;
      nr       <= '0;
      b        <= '0;
      sub      <= '0;
      x        <= '0;
      out_line <= '0;
    end else begin
      if (frame_start) out_line <= '0;
      if (!busy && commit && nrows != '0) begin
        busy <= 1'b1;
        nr   <= nrows;
        r    <= '0;
        b    <= '0;
        sub  <= '0;
        x    <= '0;
      end else if (busy && m_tready) begin
        if (m_tlast) begin
          x        <= '0;
          b        <= '0;
          sub      <= '0;
          out_line <= out_line + 1'b1;
          if (r == nr - 1'b1) busy <= 1'b0;
          else r <= r + 1'b1;
        end else begin
          x <= x + 1'b1;
          if (sub == 3'd4) begin
            sub <= '0;
            b   <= b + 1'b1;
          end else begin
            sub <= sub + 1'b1;
          end
        end
      end
    end
  end

endmodule

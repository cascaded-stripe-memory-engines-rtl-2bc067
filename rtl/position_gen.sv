// Position generator: turns detection jobs into window positions for the
// two detection pipelines.
//
// A job is one row of windows in one scale: every window whose top line is
// `y`, from x = 0 to x = n-1 (n = scale width - window width + 1). Each
// cycle the generator grants the next position to pipeline 0 if it wants
// one and the following position to pipeline 1, so both pipelines fill
// their free slots in the same cycle. A finished job is replaced from the
// job queue on the next cycle. The document says that on a rejection a new
// position is scheduled; this hand-out order is this design's choice.
module position_gen
  import sme_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // job queue
  input  logic              job_valid,
  output logic              job_ready,
  input  logic [SC_W-1:0]   job_scale,
  input  logic [LINE_W-1:0] job_y,
  input  logic [COL_W-1:0]  job_col,   // stripe column of x = 0
  input  logic [LINE_W-1:0] job_n,     // number of windows (>= 1)
  input  logic              job_tag,
  // pipelines
  input  logic [1:0]        want,
  output logic [1:0]        gnt,
  output logic [SC_W-1:0]   scale,
  output logic [LINE_W-1:0] y,
  output logic              tag,
  output logic [LINE_W-1:0] x0,
  output logic [COL_W-1:0]  col0,
  output logic [LINE_W-1:0] x1,
  output logic [COL_W-1:0]  col1,
  output logic              active
);

  logic [LINE_W-1:0] x, n;
  logic [COL_W-1:0]  base;

  assign job_ready = !active;

  always_comb begin
    gnt[0] = active && want[0];
    gnt[1] = active && want[1] && ((x + LINE_W'(gnt[0])) < n);
    x0   = x;
    col0 = base + COL_W'(x);
    x1   = x + LINE_W'(gnt[0]);
    col1 = base + COL_W'(x1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0;
      x      <= '0;
      n      <= '0;
      base   <= '0;
      scale  <= '0;
      y      <= '0;
      tag    <= 1'b0;
    end else if (!active) begin
      if (job_valid) begin
        active <= 1'b1;
        x      <= '0;
        n      <= job_n;
        base   <= job_col;
        scale  <= job_scale;
        y      <= job_y;
        tag    <= job_tag;
      end
    end else begin
      logic [LINE_W-1:0] nx;
      nx = x + LINE_W'(gnt[0]) + LINE_W'(gnt[1]);
      x <= nx;
      if (nx >= n) active <= 1'b0;
    end
  end

endmodule

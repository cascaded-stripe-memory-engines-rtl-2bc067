// Execution scheduler: decides, line by line, what the stripe memory
// engine does with each newly stored image line.
//
// Every stored input line is an event. For event e (line e of scale 0):
//   1. a detection job is queued for the row of windows whose bottom line
//      is line e (top line e - win_h + 1), if that row exists;
//   2. for each stored scale j in turn, while a group of six lines of scale
//      j is complete (line 6g+6 stored, or the scale's last line stored),
//      the scaling unit turns it into up to five lines of scale j+1 (or of
//      the output stream when j+1 is the output scale), and a detection
//      job is queued for each window row that these new lines complete.
// Each queued job adds its number of windows to a counter kept per event
// parity; the pipelines' retire pulses count it down. Event e is done when
// its scaling has finished and its counter is zero. Line n of the input may
// be written only once event n-2 is done (line_ok): by then no window can
// still read the stripe row that line n overwrites, and the pipelines keep
// working on event n-1 while line n arrives. The same holds for the lines
// the scaling unit writes into scale j+1, except when groups follow each
// other closely (at the end of a frame every scale is flushed in one
// event): a group whose five new lines could overwrite a line that a queued
// window still reads waits until all queued windows have retired. Both
// rules need window height + 5 <= 32, the document's limit of 27 lines.
// A new frame waits for
// everything to finish (frame_idle).
//
// The document drives this sequence from a static schedule held in block
// RAM, spread so that detection bursts after every sixth line are evened
// out. This scheduler computes the same sequence from line counters; the
// burst smoothing is left to the job queue. That, and the gating rule
// above, are this design's choices.
module line_scheduler
  import sme_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst,
  // configuration
  input  scale_cfg_t [MAX_SCALES-1:0] scfg,
  input  logic [SC_W-1:0]             n_scales,   // stored scales (>= 1)
  input  logic                        out_en,     // produce output scale n_scales
  input  logic [LINE_W-1:0]           win_w,
  input  logic [LINE_W-1:0]           win_h,
  // line writer
  input  logic                        sof,
  input  logic                        line_done,
  input  logic [LINE_W-1:0]           wr_line,
  output logic                        line_ok,
  output logic                        frame_idle,
  // scaling unit
  output logic                        sc_start,
  output logic [LINE_W-1:0]           sc_group,
  output scale_cfg_t                  sc_src,
  output scale_cfg_t                  sc_dst,
  output logic                        sc_out,
  input  logic                        sc_done,
  input  logic [2:0]                  sc_nrows,
  input  logic                        ob_free,
  // job queue
  output logic                        job_valid,
  input  logic                        job_ready,
  output logic [SC_W-1:0]             job_scale,
  output logic [LINE_W-1:0]           job_y,
  output logic [COL_W-1:0]            job_col,
  output logic [LINE_W-1:0]           job_n,
  output logic                        job_tag,
  // window retirement
  input  logic [1:0]                  retire,
  input  logic [1:0]                  retire_tag,
  // status
  output logic [LINE_W-1:0]           events_done,
  output logic                        scaling_active
);

  typedef enum logic [2:0] {S_IDLE, S_JOB0, S_CHECK, S_SCALE, S_JOBS, S_FIN} st_e;
  st_e st;

  logic [LINE_W-1:0] lines [MAX_SCALES];
  logic [LINE_W-1:0] grp   [MAX_SCALES];
  logic [LINE_W-1:0] snap_cur  [MAX_SCALES];   // lines[] when the current event began
  logic [LINE_W-1:0] snap_prev [MAX_SCALES];   // lines[] when the previous event began
  logic [LINE_W-1:0] ev_written, ev_scaled, ev_done;
  logic [31:0]       cnt [2];
  logic [SC_W-1:0]   j;
  logic [LINE_W-1:0] jr, jr_end;     // new lines of scale j+1 to queue jobs for
  logic              tag;

  // group readiness of scale j
  logic              grp_ready;
  logic              has_dst;
  logic              wr_safe;
  logic [LINE_W+3:0] g6;
  logic [LINE_W+3:0] ovw_end, keep_from;
  always_comb begin
    g6 = (LINE_W+4)'(grp[j]) * 6;
    has_dst   = (int'(j) + 1 < int'(n_scales)) || out_en;
    grp_ready = (j < n_scales) && has_dst && (int'(g6) < int'(scfg[j].height)) &&
                ((int'(lines[j]) >= int'(g6) + 7) || (lines[j] == scfg[j].height));
    // The group writes up to five lines of scale j+1 from line lines[j+1]
    // on, overwriting the stripe rows of lines 32 further up. Windows still
    // queued were all queued in this event or the previous one, so their top
    // lines are at least snap_prev[j+1] - win_h + 1. If the overwritten lines
    // may reach that far, wait until every queued window has retired.
    ovw_end   = (LINE_W+4)'(lines[j + 1'b1]) + 5 + (LINE_W+4)'(win_h);
    keep_from = (LINE_W+4)'(int'(snap_prev[j + 1'b1]) + SME_H);
    wr_safe   = sc_out || (ovw_end <= keep_from) || (cnt[0] == 0 && cnt[1] == 0);
  end

  // job for window row whose bottom line is `bl` in scale `sc`
  function automatic logic row_has_job(input scale_cfg_t c, input logic [LINE_W-1:0] bl,
                                       input logic [LINE_W-1:0] ww, input logic [LINE_W-1:0] wh);
    return (bl + 1'b1 >= wh) && (c.width >= ww) && (wh != '0) && (ww != '0);
  endfunction

  logic [SC_W-1:0]   jsc;
  logic [LINE_W-1:0] jbl;
  always_comb begin
    jsc = (st == S_JOB0) ? '0 : j + 1'b1;
    jbl = (st == S_JOB0) ? lines[0] - 1'b1 : jr;
  end

  assign job_valid = ((st == S_JOB0) || (st == S_JOBS && jr != jr_end)) &&
                     row_has_job(scfg[jsc], jbl, win_w, win_h);
  assign job_scale = jsc;
  assign job_y     = jbl + 1'b1 - win_h;
  assign job_col   = scfg[jsc].x_off;
  assign job_n     = scfg[jsc].width - win_w + 1'b1;
  assign job_tag   = tag;

  assign sc_start  = (st == S_CHECK) && grp_ready && wr_safe;
  assign sc_group  = grp[j];
  assign sc_src    = scfg[j];
  assign sc_dst    = scfg[j + 1'b1];
  assign sc_out    = (int'(j) + 1 == int'(n_scales));

  assign line_ok    = (wr_line < 2) || (ev_done + 1'b1 >= wr_line);
  assign frame_idle = (st == S_IDLE) && (ev_done == ev_written) && ob_free;
  assign events_done = ev_done;
  assign scaling_active = (st == S_SCALE);

  always_ff @(posedge clk) begin
    if (rst || sof) begin
      st         <= S_IDLE;
      ev_written <= '0;
      ev_scaled  <= '0;
      ev_done    <= '0;
      j          <= '0;
      jr         <= '0;
      jr_end     <= '0;
      tag        <= 1'b0;
      for (int k = 0; k < MAX_SCALES; k++) begin
        lines[k]     <= '0;
        grp[k]       <= '0;
        snap_cur[k]  <= '0;
        snap_prev[k] <= '0;
      end
      if (rst) begin
        cnt[0] <= '0;
        cnt[1] <= '0;
      end
    end else begin
      // outstanding windows per event parity
      for (int p = 0; p < 2; p++) begin
        logic [31:0] c;
        c = cnt[p];
        if (job_valid && job_ready && tag == p[0]) c += 32'(job_n);
        for (int q = 0; q < 2; q++)
          if (retire[q] && retire_tag[q] == p[0]) c -= 32'd1;
        cnt[p] <= c;
      end
      if (line_done) ev_written <= ev_written + 1'b1;
      if (ev_done < ev_scaled && cnt[ev_done[0]] == 0) ev_done <= ev_done + 1'b1;

      case (st)
        S_IDLE: if (ev_scaled != ev_written) begin
          tag      <= ev_scaled[0];
          lines[0] <= lines[0] + 1'b1;
          snap_cur  <= lines;
          snap_prev <= snap_cur;
          st       <= S_JOB0;
        end
        S_JOB0: if (!job_valid || job_ready) begin
          j  <= '0;
          st <= S_CHECK;
        end
        S_CHECK: begin
          if (grp_ready) begin
            if (wr_safe) st <= S_SCALE;
          end else if (int'(j) + 1 >= int'(n_scales)) st <= S_FIN;
          else j <= j + 1'b1;
        end
        S_SCALE: if (sc_done) begin
          grp[j] <= grp[j] + 1'b1;
          if (!sc_out) begin
            lines[j + 1'b1] <= lines[j + 1'b1] + LINE_W'(sc_nrows);
            jr     <= lines[j + 1'b1];
            jr_end <= lines[j + 1'b1] + LINE_W'(sc_nrows);
            st     <= S_JOBS;
          end else begin
            st <= S_CHECK;
          end
        end
        S_JOBS: begin
          if (jr == jr_end) st <= S_CHECK;
          else if (!job_valid || job_ready) jr <= jr + 1'b1;
        end
        S_FIN: begin
          ev_scaled <= ev_scaled + 1'b1;
          st        <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule

// Scaling unit: builds scale j+1 from scale j, one group of six source
// lines (one row of 6x6 blocks) at a time.
//
// For each block b of group g it reads, through port B of the stripe
// memory, the aligned 16x8 block that holds the 8x8 neighbourhood of
// source lines 6g-1 .. 6g+6 and columns 6b-1 .. 6b+6, replicates edge
// pixels where the neighbourhood leaves the scale (clamping the source
// coordinates), downscales it with lanczos_kernel and writes the 5x5
// result to lines 5g .. 5g+4, columns 5b .. 5b+4 of scale j+1. Output
// pixels beyond the configured size of scale j+1 are not written. Each
// 5-pixel run spans at most two 4-pixel words, so a block costs one read
// and up to ten masked word writes. When dst_out is set the result goes to
// the downscaled-output buffer instead of the stripe (the smallest scale,
// sent to the next instance).
//
// The block-based 6x6 -> 5x5 scheme, the 8x8 read and the use of a share of
// port-B slots are the document's; edge replication, the group trigger
// (line 6g+6 stored, or the last line of the scale) and the order of
// operations are this design's.
//
// Interface: `start` with the group number and the two scales' placement;
// `done` pulses when the last write is made; `nrows` is then the number of
// scale j+1 lines the group produced. Port-B requests (req/we/...) are held
// until `gnt`; read data arrives on b_blk in the cycle after the grant.
module scale_unit
  import sme_pkg::*;
#(
  parameter int unsigned MAX_BLK = SME_W / 6 + 1,
  localparam int unsigned BW     = $clog2(MAX_BLK)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  input  logic [LINE_W-1:0]       group,
  input  scale_cfg_t              src,
  input  scale_cfg_t              dst,
  input  logic                    dst_out,
  output logic                    busy,
  output logic                    done,
  output logic [2:0]              nrows,
  // stripe memory port B
  output logic                    req,
  input  logic                    gnt,
  output logic                    we,
  output logic [ROW_W-1:0]        row,
  output logic [WCOL_W-1:0]       wcol,
  output logic [SME_B*PIX_W-1:0]  wdata,
  output logic [SME_B-1:0]        wmask,
  input  logic [SME_V-1:0][SME_U*SME_B*PIX_W-1:0] b_blk,
  // downscaled-output buffer
  input  logic                    ob_free,
  output logic                    ob_we,
  output logic [2:0]              ob_row,
  output logic [BW-1:0]           ob_blk,
  output logic [5*PIX_W-1:0]      ob_data,
  output logic                    ob_commit
);

  typedef enum logic [2:0] {S_IDLE, S_WAIT_OB, S_READ, S_DATA, S_KERN, S_WRITE, S_DONE} st_e;
  st_e st;

  scale_cfg_t        s, d;
  logic              to_out;
  logic [LINE_W-1:0] g;
  logic [BW-1:0]     b, nblk;
  logic [2:0]        r;        // output line within the group
  logic              half;     // second word of a 5-pixel run
  logic [COL_W-1:0]  fcol;     // first pixel column of the fetched block

  // 8x8 neighbourhood with clamped coordinates
  logic [7:0][8*PIX_W-1:0] nb;
  logic [4:0][5*PIX_W-1:0] res;

  always_comb begin
    for (int rr = 0; rr < 8; rr++) begin
      int ln, ri;
      ln = int'(g) * 6 - 1 + rr;
      if (ln < 0) ln = 0;
      if (ln > int'(s.height) - 1) ln = int'(s.height) - 1;
      ri = ln - (int'(g) * 6 - 1);
      for (int cc = 0; cc < 8; cc++) begin
        int cl, ci;
        cl = int'(b) * 6 - 1 + cc;
        if (cl < 0) cl = 0;
        if (cl > int'(s.width) - 1) cl = int'(s.width) - 1;
        ci = cl + int'(s.x_off) - int'(fcol);
        nb[rr][cc*PIX_W +: PIX_W] = b_blk[ri[2:0]][ci[3:0]*PIX_W +: PIX_W];
      end
    end
  end

  lanczos_kernel u_kernel (
    .clk (clk),
    .en  (st == S_DATA),
    .src (nb),
    .dst (res)
  );

  // destination run of the current output line
  logic [COL_W-1:0]        dcol;
  logic [1:0]              doff;
  logic [8*PIX_W-1:0]      run_data;
  logic [7:0]              run_mask;
  logic                    line_ok;

  always_comb begin
    dcol = d.x_off + COL_W'(int'(b) * 5);
    doff = dcol[1:0];
    run_data = '0;
    run_mask = '0;
    for (int c = 0; c < 5; c++) begin
      run_data[(int'(doff) + c)*PIX_W +: PIX_W] = res[r][c*PIX_W +: PIX_W];
      run_mask[int'(doff) + c] = (int'(b) * 5 + c) < int'(d.width);
    end
    line_ok = (int'(g) * 5 + int'(r)) < int'(d.height);
  end

  // port-B request
  always_comb begin
    logic [COL_W-1:0] c0;
    int cs;
    req   = 1'b0;
    we    = 1'b0;
    row   = '0;
    wcol  = '0;
    wdata = '0;
    wmask = '0;
    cs    = int'(b) * 6 - 1;
    if (cs < 0) cs = 0;
    c0 = s.x_off + COL_W'(cs);
    if (st == S_READ) begin
      req  = 1'b1;
      row  = ROW_W'(int'(g) * 6 - 1);
      wcol = c0[COL_W-1:2];
    end else if (st == S_WRITE && !to_out && line_ok) begin
      req   = half ? (run_mask[7:4] != '0) : (run_mask[3:0] != '0);
      we    = 1'b1;
      row   = ROW_W'(int'(g) * 5 + int'(r));
      wcol  = dcol[COL_W-1:2] + WCOL_W'(half);
      wdata = half ? run_data[8*PIX_W-1:4*PIX_W] : run_data[4*PIX_W-1:0];
      wmask = half ? run_mask[7:4] : run_mask[3:0];
    end
  end

  assign ob_we     = (st == S_WRITE) && to_out && line_ok;
  assign ob_row    = r;
  assign ob_blk    = b;
  assign ob_data   = res[r];
  assign ob_commit = (st == S_DONE) && to_out;
  assign busy      = (st != S_IDLE);

  // one step of the write loop: next word, next line or next block
  logic step;
  always_comb begin
    step = 1'b0;
    if (st == S_WRITE) begin
      if (to_out || !line_ok) step = 1'b1;
      else step = !req || gnt;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st    <= S_IDLE;
      done  <= 1'b0;
      nrows <= '0;
      s     <= '0;
      d     <= '0;
      to_out <= 1'b0;
      g     <= '0;
      b     <= '0;
      nblk  <= '0;
      r     <= '0;
      half  <= 1'b0;
      fcol  <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          int rem;
          s      <= src;
          d      <= dst;
          to_out <= dst_out;
          g      <= group;
          b      <= '0;
          nblk   <= BW'((int'(dst.width) + 4) / 5);
          rem    = int'(dst.height) - int'(group) * 5;
          nrows  <= (rem >= 5) ? 3'd5 : (rem <= 0 ? 3'd0 : 3'(rem));
          st     <= dst_out ? S_WAIT_OB : S_READ;
        end
        S_WAIT_OB: if (ob_free) st <= S_READ;
        S_READ: if (gnt) begin
          logic [COL_W-1:0] c0;
          int cs;
          cs = int'(b) * 6 - 1;
          if (cs < 0) cs = 0;
          c0   = s.x_off + COL_W'(cs);
          fcol <= {c0[COL_W-1:2], 2'b00};
          st   <= S_DATA;
        end
        S_DATA: begin
          st   <= S_KERN;
        end
        S_KERN: begin
          r    <= '0;
          half <= 1'b0;
          st   <= S_WRITE;
        end
        S_WRITE: if (step) begin
          if (!to_out && line_ok && !half) begin
            half <= 1'b1;
          end else begin
            half <= 1'b0;
            if (r == 3'd4) begin
              r <= '0;
              if (b == nblk - 1'b1) st <= S_DONE;
              else begin
                b  <= b + 1'b1;
                st <= S_READ;
              end
            end else begin
              r <= r + 1'b1;
            end
          end
        end
        S_DONE: begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule

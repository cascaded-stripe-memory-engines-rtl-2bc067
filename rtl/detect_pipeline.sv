// Detection pipeline: evaluates the soft-cascade classifier on window
// positions, one weak classifier per token pass, with up to PIPE_LEN
// windows in flight.
//
// The pipeline is a ring of PIPE_LEN (14) registers. Each token is one
// window: its scale, position, stripe column of its left edge, the index t
// of its next weak classifier and the accumulated response H. One pass
// through the ring executes instruction t (document, Algorithm 1):
//   stage 0   instruction word arrives from the program memory
//   stage 1   stripe block of the feature read (port A or B), column and
//             line = window position + feature position from the instruction
//   stage 2   6x6 sub-block selected at the feature's offset in the block
//   stage 3-4 feature_extract (cells, then LBP/LRD)
//   stage 5   alpha entry A[t][feature] and threshold T[t] read
//   stage 6   H += alpha; reject flag H < T[t]; last flag t == T-1
//   7 .. 13   delay to the ring length
//   stage 13  position control: a rejected window retires, a window that
//             passed its last weak classifier retires and is sent out as a
//             detection, any other window re-enters with t + 1. A freed slot
//             is filled with a new position when one is offered.
// Every slot is used every cycle, so the pipeline runs full whenever
// positions are available. The ring length and the 100 % use are the
// document's; the placement of the work in the stages is this design's.
//
// port_ok low in a cycle means the stripe port is lent to the scaling unit
// and line writer (the second pipeline loses one cycle in four): the token
// then passes without executing and repeats its instruction on the next
// pass. New positions are only taken while res_room is high, so the result
// queue behind the pipeline can never overflow.
module detect_pipeline
  import sme_pkg::*;
#(
  parameter feat_type_e   FEATURE = FEAT_LRD,
  parameter int unsigned  ALPHA_DEPTH = T_MAX * ((FEATURE == FEAT_LBP) ? 256 : 17),
  localparam int unsigned AAW = $clog2(ALPHA_DEPTH)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [T_W:0]           t_len,       // classifier length T (1..T_MAX)
  // new positions
  output logic                   pos_want,
  input  logic                   pos_gnt,
  input  logic [SC_W-1:0]        pos_scale,
  input  logic [LINE_W-1:0]      pos_x,
  input  logic [LINE_W-1:0]      pos_y,
  input  logic [COL_W-1:0]       pos_col,     // stripe column of the window's left edge
  input  logic                   pos_tag,
  // memories
  output logic [T_W-1:0]         prog_addr,
  input  logic [INSTR_W-1:0]     prog_data,
  input  logic                   port_ok,
  output logic                   sme_en,
  output logic [ROW_W-1:0]       sme_row,
  output logic [WCOL_W-1:0]      sme_wcol,
  input  logic [SME_V-1:0][BLK_W*PIX_W-1:0] sme_blk,
  output logic [AAW-1:0]         alpha_addr,
  input  logic [ALPHA_W-1:0]     alpha_data,
  output logic [T_W-1:0]         thr_addr,
  input  logic [THR_W-1:0]       thr_data,
  // results
  input  logic                   res_room,
  output logic                   res_valid,
  output result_t                res_data,
  output logic                   retire,
  output logic                   retire_tag,
  output logic                   exec_ok,     // an instruction was executed (stage 13)
  output logic                   busy
);

  typedef struct packed {
    logic                    valid;
    logic                    exec;
    logic                    tag;
    logic                    rej;
    logic                    last;
    logic [SC_W-1:0]         scale;
    logic [LINE_W-1:0]       wx;
    logic [LINE_W-1:0]       wy;
    logic [COL_W-1:0]        bcol;
    logic [T_W-1:0]          t;
    logic signed [ACC_W-1:0] acc;
  } tok_t;

  tok_t tok [PIPE_LEN];
  tok_t nt, ret;

  instr_t ins0, ins1, ins2;
  logic [1:0] dx1;
  logic [5:0][6*PIX_W-1:0] blk6;
  logic [7:0] feature;

  // ---- stage 13: position control ----
  logic reenter;
  assign ret = tok[PIPE_LEN-1];
  assign reenter = ret.valid && (!ret.exec || (!ret.rej && !ret.last));
  assign exec_ok = ret.valid && ret.exec;
  assign retire = ret.valid && ret.exec && (ret.rej || ret.last);
  assign retire_tag = ret.tag;
  assign res_valid = ret.valid && ret.exec && !ret.rej && ret.last;
  always_comb begin
    res_data = '0;
    res_data.conf  = 32'(ret.acc);
    res_data.scale = 8'(ret.scale);
    res_data.y     = 12'(ret.wy);
    res_data.x     = 12'(ret.wx);
  end

  assign pos_want = !reenter && res_room;

  always_comb begin
    nt = '0;
    if (reenter) begin
      nt = ret;
      if (ret.exec) nt.t = ret.t + 1'b1;
    end else if (pos_gnt) begin
      nt.valid = 1'b1;
      nt.scale = pos_scale;
      nt.wx    = pos_x;
      nt.wy    = pos_y;
      nt.bcol  = pos_col;
      nt.tag   = pos_tag;
      nt.t     = '0;
      nt.acc   = '0;
    end
    nt.exec = nt.valid;
    nt.rej  = 1'b0;
    nt.last = 1'b0;
  end
  assign prog_addr = nt.t;

  // ---- stage 1 address ----
  logic [COL_W-1:0]  fcol;
  logic [LINE_W-1:0] fline;
  assign ins0    = instr_t'(prog_data);
  assign fcol    = tok[0].bcol + COL_W'(ins0.x);
  assign fline   = tok[0].wy + LINE_W'(ins0.y);
  assign sme_en  = tok[0].valid && port_ok;
  assign sme_row = ROW_W'(fline);
  assign sme_wcol = fcol[COL_W-1:2];

  // ---- stage 2 sub-block select ----
  logic [5:0][6*PIX_W-1:0] sel6;
  always_comb begin
    for (int r = 0; r < 6; r++)
      sel6[r] = sme_blk[r][int'(dx1)*PIX_W +: 6*PIX_W];
  end

  feature_extract #(.FEATURE(FEATURE)) u_fe (
    .clk     (clk),
    .blk     (blk6),
    .w2      (ins2.w2),
    .h2      (ins2.h2),
    .a       (ins2.a),
    .b       (ins2.b),
    .feature (feature)
  );

  // ---- stage 5 table addresses ----
  assign thr_addr = tok[4].t;
  always_comb begin
    if (FEATURE == FEAT_LBP) alpha_addr = AAW'({tok[4].t, feature});
    else alpha_addr = AAW'(int'(tok[4].t) * 17 + int'(feature[4:0]));
  end

  // ---- stage 6 accumulate and compare ----
  logic signed [ACC_W-1:0] acc_new;
  assign acc_new = tok[5].acc + ACC_W'($signed(alpha_data));

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < PIPE_LEN; i++) tok[i] <= '0;
      ins1 <= '0;
      ins2 <= '0;
      dx1  <= '0;
      blk6 <= '0;
    end else begin
      tok[0] <= nt;
      tok[1] <= tok[0];
      tok[1].exec <= tok[0].exec && port_ok;
      ins1 <= ins0;
      dx1  <= fcol[1:0];
      tok[2] <= tok[1];
      ins2 <= ins1;
      blk6 <= sel6;
      for (int i = 3; i < PIPE_LEN; i++) tok[i] <= tok[i-1];
      if (tok[5].exec) begin
        tok[6].acc  <= acc_new;
        tok[6].rej  <= acc_new < ACC_W'($signed(thr_data));
        tok[6].last <= (T_W+1)'(tok[5].t) == t_len - 1'b1;
      end
    end
  end

  always_comb begin
    busy = 1'b0;
    for (int i = 0; i < PIPE_LEN; i++) busy |= tok[i].valid;
  end

endmodule

// Shared constants and types of the stripe-memory object detector.
//
// The detector keeps a narrow horizontal stripe of the input image and of
// its 5/6-downscaled versions in block RAM (the stripe memory, SME) and runs
// a boosted soft-cascade classifier built from LBP or LRD features on every
// window position of every scale. The sizes below follow the document: a
// 4096 x 32 pixel stripe in a 4 x 8 pattern of banks holding 4-pixel words,
// 32-bit instructions, 9-bit alpha values, 18-bit thresholds, classifiers of
// up to 1024 weak classifiers and a 14-cycle evaluation pipeline. The
// instruction bit layout, the result word layout and the accumulator width
// are choices of this design.
package sme_pkg;

  // ---- stripe memory geometry ----
  localparam int unsigned SME_W   = 4096;          // stripe width in pixels
  localparam int unsigned SME_H   = 32;            // stripe height in lines
  localparam int unsigned PIX_W   = 8;             // bits per pixel
  localparam int unsigned SME_B   = 4;             // pixels per bank word
  localparam int unsigned SME_U   = 4;             // bank columns
  localparam int unsigned SME_V   = 8;             // bank rows
  localparam int unsigned BLK_W   = SME_B * SME_U; // aligned block width (16)
  localparam int unsigned BLK_H   = SME_V;         // aligned block height (8)
  localparam int unsigned WCOLS   = SME_W / SME_B; // words per stripe line
  localparam int unsigned COL_W   = $clog2(SME_W); // pixel column bits
  localparam int unsigned WCOL_W  = $clog2(WCOLS); // word column bits
  localparam int unsigned ROW_W   = $clog2(SME_H); // stripe row bits

  // ---- image / scale geometry ----
  localparam int unsigned LINE_W     = 12;         // line counter and coordinate bits
  localparam int unsigned MAX_SCALES = 20;         // scale slots per instance (stored + output)
  localparam int unsigned SC_W       = $clog2(MAX_SCALES + 1);

  // ---- classifier ----
  localparam int unsigned T_MAX   = 1024;          // maximum classifier length
  localparam int unsigned T_W     = $clog2(T_MAX);
  localparam int unsigned INSTR_W = 32;
  localparam int unsigned ALPHA_W = 9;
  localparam int unsigned THR_W   = 18;
  localparam int unsigned ACC_W   = 20;            // |sum| <= 1024 * 256 fits in 20 signed bits
  localparam int unsigned CELL_W  = PIX_W + 2;     // sum of up to 4 pixels
  localparam int unsigned PIPE_LEN = 14;

  typedef enum logic {FEAT_LRD = 1'b0, FEAT_LBP = 1'b1} feat_type_e;

  // Instruction word: feature position in the window, cell size and the two
  // LRD cell indices (row-major 0..8). Bits 31:26 are reserved.
  typedef struct packed {
    logic [5:0] rsvd;
    logic [3:0] b;
    logic [3:0] a;
    logic       h2;   // cell height: 0 -> 1 pixel, 1 -> 2 pixels
    logic       w2;   // cell width:  0 -> 1 pixel, 1 -> 2 pixels
    logic [7:0] y;
    logic [7:0] x;
  } instr_t;

  // Detection result: 64-bit AXI Stream word.
  typedef struct packed {
    logic signed [31:0] conf;   // classifier response H_T (sign extended)
    logic [7:0]         scale;  // global scale index
    logic [11:0]        y;      // window top line in that scale
    logic [11:0]        x;      // window left column in that scale
  } result_t;

  // Per-scale placement in the stripe.
  typedef struct packed {
    logic [COL_W-1:0]  x_off;   // first stripe column of the scale
    logic [LINE_W-1:0] width;
    logic [LINE_W-1:0] height;
  } scale_cfg_t;

  // Lanczos-2 weights (sum 64) for the 6 -> 5 block downscale. Output pixel k
  // of a 5-pixel run sits at source position 1.2k + 0.1 of the 6-pixel run;
  // its four taps are source pixels k-1 .. k+2, i.e. indices k .. k+3 of the
  // 8-pixel neighbourhood that starts one pixel before the run. Each weight
  // is round(64 * L(d) / sum L) with L(d) = sinc(d) sinc(d/2), the rounding
  // remainder added to the second tap.
  function automatic logic signed [7:0] lanczos_w(input int k, input int i);
    logic signed [7:0] w [5][4];
    w[0] = '{-8'sd3, 8'sd62, 8'sd5,  8'sd0};
    w[1] = '{-8'sd5, 8'sd52, 8'sd19, -8'sd2};
    w[2] = '{-8'sd4, 8'sd36, 8'sd36, -8'sd4};
    w[3] = '{-8'sd2, 8'sd19, 8'sd52, -8'sd5};
    w[4] = '{ 8'sd0, 8'sd4,  8'sd63, -8'sd3};
    return w[k][i];
  endfunction

  function automatic int unsigned ceil56(input int unsigned n);
    return (n * 5 + 5) / 6;
  endfunction

endpackage

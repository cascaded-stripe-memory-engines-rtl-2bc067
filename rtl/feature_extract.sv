// Feature extraction unit: turns a 6x6 pixel block into an LBP or LRD
// feature value.
//
// Stage 1 forms the 3x3 cell sums for all four cell sizes (1x1, 2x1, 1x2,
// 2x2 pixels) in parallel, as the document's circuit does with DSP blocks,
// and selects one set by the instruction's (w, h). Stage 2 compares the
// cells: LBP sets bit k of an 8-bit code when border cell k is greater than
// the centre cell (weights 1,2,4,8,-,16,32,64,128 over the row-major cells);
// LRD counts, for cells a and b, how many cells are greater than each, and
// outputs count(a) - count(b) in -8..+8, offset by 8 to 0..16 so that it can
// index the 17-entry alpha table. Cell indices above 8 are read as 8. Both are computed; the parameter FEATURE
// picks which one leaves the unit.
//
// Cell (i, j) of size w x h covers block rows i*h .. i*h+h-1 and columns
// j*w .. j*w+w-1. Pixel (r, c) of the block is blk[r][c*PIX_W +: PIX_W].
// Timing: fully pipelined, one block per cycle, latency 2 cycles.
module feature_extract
  import sme_pkg::*;
#(
  parameter feat_type_e FEATURE = FEAT_LRD
) (
  input  logic                     clk,
  input  logic [5:0][6*PIX_W-1:0]  blk,
  input  logic                     w2,     // cell width 2
  input  logic                     h2,     // cell height 2
  input  logic [3:0]               a,      // LRD cell a (0..8)
  input  logic [3:0]               b,      // LRD cell b (0..8)
  output logic [7:0]               feature // LBP code, or LRD value + 8
);

  logic [CELL_W-1:0] c_d [9];
  logic [3:0]        a_d, b_d;
  logic [CELL_W-1:0] c [9];

  function automatic logic [PIX_W-1:0] px(input logic [5:0][6*PIX_W-1:0] bk,
                                          input int r, input int col);
    return bk[r][col*PIX_W +: PIX_W];
  endfunction

  // stage 1: cell sums for every size, selected by (w, h)
  always_comb begin
    for (int i = 0; i < 3; i++) begin
      for (int j = 0; j < 3; j++) begin
        logic [CELL_W-1:0] s11, s21, s12, s22;
        s11 = CELL_W'(px(blk, i, j));
        s21 = CELL_W'(px(blk, i, 2*j)) + CELL_W'(px(blk, i, 2*j+1));
        s12 = CELL_W'(px(blk, 2*i, j)) + CELL_W'(px(blk, 2*i+1, j));
        s22 = CELL_W'(px(blk, 2*i, 2*j)) + CELL_W'(px(blk, 2*i, 2*j+1))
            + CELL_W'(px(blk, 2*i+1, 2*j)) + CELL_W'(px(blk, 2*i+1, 2*j+1));
        case ({h2, w2})
          2'b00:   c[3*i+j] = s11;
          2'b01:   c[3*i+j] = s21;
          2'b10:   c[3*i+j] = s12;
          default: c[3*i+j] = s22;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    c_d <= c;
    a_d <= a;
    b_d <= b;
  end

  // stage 2: LBP code and LRD rank difference
  logic [7:0] lbp;
  logic [3:0] rank_a, rank_b;
  logic [4:0] lrd;

  always_comb begin
    int bit_i;
    lbp = '0;
    bit_i = 0;
    for (int k = 0; k < 9; k++) begin
      if (k != 4) begin
        lbp[bit_i] = c_d[k] > c_d[4];
        bit_i++;
      end
    end
    rank_a = '0;
    rank_b = '0;
    for (int k = 0; k < 9; k++) begin
      rank_a += 4'(c_d[k] > c_d[(a_d > 4'd8) ? 4'd8 : a_d]);
      rank_b += 4'(c_d[k] > c_d[(b_d > 4'd8) ? 4'd8 : b_d]);
    end
    lrd = 5'(rank_a) - 5'(rank_b) + 5'd8;
  end

  always_ff @(posedge clk) begin
    feature <= (FEATURE == FEAT_LBP) ? lbp : {3'b000, lrd};
  end

endmodule

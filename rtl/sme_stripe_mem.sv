// Stripe memory (SME) storage: a SME_W x SME_H pixel raster kept in
// U x V banks, each bank holding B-pixel words.
//
// Word column c of stripe row r lives in bank (r mod V, c mod U) at address
// (r div V) * (WCOLS / U) + (c div U). Any V consecutive rows (any vertical
// alignment, rows wrap modulo SME_H) and U consecutive word columns touch
// every bank exactly once, so a (B*U) x V pixel block aligned to B pixels
// horizontally is read in one access. This organisation is the document's;
// the default sizes (4096 x 32 pixels, U = 4, V = 8, B = 4) are its numbers.
//
// Two ports, matching true dual-port block RAM:
//   port A  read only  (detection pipeline 1)
//   port B  read, or write of one word with a per-pixel mask (pipeline 2,
//           the line writer and the scaling unit)
// A read presents (row, wcol) of the block's top-left word; the block comes
// out one cycle later, already rotated so that blk[k][p] is pixel p of row
// row+k. Pixel p of the block is bits p*PIX_W +: PIX_W of the row vector.
// A write updates the pixels whose mask bit is set; read-during-write on
// port B returns the old data. Writes to wrapped rows are the caller's
// business: the scheduler keeps rows in use from being overwritten.
module sme_stripe_mem
  import sme_pkg::*;
#(
  parameter int unsigned W     = SME_W,
  parameter int unsigned H     = SME_H,
  parameter int unsigned U     = SME_U,
  parameter int unsigned V     = SME_V,
  parameter int unsigned B     = SME_B,
  parameter int unsigned PW    = PIX_W,
  localparam int unsigned NWC  = W / B,
  localparam int unsigned RW   = $clog2(H),
  localparam int unsigned CW   = $clog2(NWC),
  localparam int unsigned WORD = B * PW,
  localparam int unsigned DEPTH = (H / V) * (NWC / U),
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                  clk,
  // port A
  input  logic                  a_en,
  input  logic [RW-1:0]         a_row,
  input  logic [CW-1:0]         a_wcol,
  output logic [V-1:0][U*WORD-1:0] a_blk,
  // port B
  input  logic                  b_en,
  input  logic                  b_we,
  input  logic [RW-1:0]         b_row,
  input  logic [CW-1:0]         b_wcol,
  input  logic [WORD-1:0]       b_wdata,
  input  logic [B-1:0]          b_wmask,
  output logic [V-1:0][U*WORD-1:0] b_blk
);

  localparam int unsigned VB = $clog2(V);
  localparam int unsigned UB = $clog2(U);

  // raw bank outputs, indexed by bank row / bank column
  logic [WORD-1:0] a_q [V][U];
  logic [WORD-1:0] b_q [V][U];
  logic [VB-1:0]   a_rrot, b_rrot;
  logic [UB-1:0]   a_crot, b_crot;

  // Address of bank (i, j) for a block whose top-left word is (row, wcol).
  function automatic logic [AW-1:0] bank_addr(input logic [RW-1:0] row,
                                               input logic [CW-1:0] wcol,
                                               input int i, input int j);
    logic [RW-1:0] r;
    logic [CW-1:0] c;
    logic [VB-1:0] dr;
    logic [UB-1:0] dc;
    dr = VB'(i) - row[VB-1:0];
    dc = UB'(j) - wcol[UB-1:0];
    r  = row + RW'(dr);
    c  = wcol + CW'(dc);
    return AW'((int'(r) >> VB) * (NWC / U) + (int'(c) >> UB));
  endfunction

  for (genvar i = 0; i < V; i++) begin : g_row
    for (genvar j = 0; j < U; j++) begin : g_col
      logic [WORD-1:0] mem [DEPTH];
      logic [AW-1:0]   aa, ba;
      logic            bwe;
      assign aa  = bank_addr(a_row, a_wcol, i, j);
      assign ba  = bank_addr(b_row, b_wcol, i, j);
      assign bwe = b_en && b_we && (b_row[VB-1:0] == VB'(i)) && (b_wcol[UB-1:0] == UB'(j));

      always_ff @(posedge clk) begin
        if (a_en) a_q[i][j] <= mem[aa];
      end

      always_ff @(posedge clk) begin
        if (b_en) b_q[i][j] <= mem[ba];
        if (bwe) begin
          for (int p = 0; p < B; p++)
            if (b_wmask[p]) mem[ba][p*PW +: PW] <= b_wdata[p*PW +: PW];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rrot <= a_row[VB-1:0];
      a_crot <= a_wcol[UB-1:0];
    end
    if (b_en) begin
      b_rrot <= b_row[VB-1:0];
      b_crot <= b_wcol[UB-1:0];
    end
  end

  // Rotate bank outputs into block order.
  always_comb begin
    for (int k = 0; k < V; k++) begin
      for (int m = 0; m < U; m++) begin
        a_blk[k][m*WORD +: WORD] = a_q[VB'(a_rrot + VB'(k))][UB'(a_crot + UB'(m))];
        b_blk[k][m*WORD +: WORD] = b_q[VB'(b_rrot + VB'(k))][UB'(b_crot + UB'(m))];
      end
    end
  end

endmodule

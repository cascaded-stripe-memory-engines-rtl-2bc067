// Classifier table memory: one configuration write port and two read
// ports, one for each detection pipeline.
//
// The detector holds three such tables, as in the document: the program
// (32-bit instructions, one per weak classifier), the alpha table A
// (9-bit responses, 17 per weak classifier for LRD or 256 for LBP) and the
// threshold table T (18-bit rejection thresholds). Two read ports map onto
// a true dual-port block RAM if writes are restricted to configuration
// time; here the write shares the array with the reads, which is how an
// FPGA tool would build it from two RAM copies.
//
// Timing: reads registered, data one cycle after the address; a read of
// the address being written returns the old word.
module table_mem #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr0,
  output logic [WIDTH-1:0] rdata0,
  input  logic [AW-1:0]    raddr1,
  output logic [WIDTH-1:0] rdata1
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata0 <= mem[raddr0];
    rdata1 <= mem[raddr1];
  end

endmodule

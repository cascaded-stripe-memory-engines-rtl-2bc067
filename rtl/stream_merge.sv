// Round-robin merge of N valid/ready streams into one.
//
// Merges the result streams of the two detection pipelines of an instance
// and the result streams of all instances of a cascade, as the document's
// cascade figure shows. The document says the streams are merged; the
// round-robin order is this design's choice. The grant is held while the
// output is stalled, so a word never changes under a waiting consumer.
module stream_merge #(
  parameter int unsigned N     = 2,
  parameter int unsigned WIDTH = 64,
  localparam int unsigned IW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [N-1:0]             in_valid,
  output logic [N-1:0]             in_ready,
  input  logic [N-1:0][WIDTH-1:0]  in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [WIDTH-1:0]         out_data
);

  logic [IW-1:0] last;   // last granted input
  logic [IW-1:0] sel;
  logic          any;
  logic          locked;  // output stalled: keep the current grant
  logic [IW-1:0] lsel;

  always_comb begin
    int idx;
    idx = 0;
    sel = last;
    any = 1'b0;
    if (locked) begin
      sel = lsel;
      any = 1'b1;
    end else for (int k = 1; k <= N; k++) begin
      idx = (int'(last) + k) % N;
      if (!any && in_valid[idx]) begin
        sel = IW'(idx);
        any = 1'b1;
      end
    end
  end

  assign out_valid = any;
  assign out_data  = in_data[sel];

  always_comb begin
    in_ready = '0;
    if (any) in_ready[sel] = out_ready;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      last   <= IW'(N - 1);
      locked <= 1'b0;
      lsel   <= '0;
    end else begin
      if (any && out_ready) last <= sel;
      locked <= any && !out_ready;
      lsel   <= sel;
    end
  end

endmodule

// Classifier table memory test: random writes and reads on both read ports
// against an array kept here; read data must appear one cycle after the
// address, and a location written earlier must read back on either port.
module tb_table_mem;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int DEPTH = 1024, WIDTH = 32, AW = 10;
  logic we;
  logic [AW-1:0] waddr, raddr0, raddr1;
  logic [WIDTH-1:0] wdata, rdata0, rdata1;

  table_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  logic [WIDTH-1:0] model [DEPTH];

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr0 = 0; raddr1 = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = $urandom; model[i] = wdata;
    end
    repeat (5000) begin
      int a0, a1;
      @(negedge clk);
      a0 = $urandom_range(DEPTH - 1); a1 = $urandom_range(DEPTH - 1);
      raddr0 = AW'(a0); raddr1 = AW'(a1);
      // write somewhere not read this cycle
      we = $urandom_range(1);
      waddr = AW'($urandom_range(DEPTH - 1));
      if (waddr == raddr0 || waddr == raddr1) we = 0;
      wdata = $urandom;
      if (we) model[waddr] = wdata;
      @(negedge clk);
      we = 0;
      checks += 2;
      if (rdata0 != model[a0]) begin failures++; if (failures < 5) $display("FAIL: port 0 addr %0d", a0); end
      if (rdata1 != model[a1]) begin failures++; if (failures < 5) $display("FAIL: port 1 addr %0d", a1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

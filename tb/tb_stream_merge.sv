// Result merge test: three sources send numbered words with random valid
// gaps into a 3-way merge whose output is randomly stalled. Every word must
// come out exactly once, in order per source, the output must hold still
// while stalled, and with all sources busy no source may wait for more than
// two other words.
module tb_stream_merge;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 3, WIDTH = 64, PER = 2000;
  logic rst = 1'b1;
  logic [N-1:0] in_valid, in_ready;
  logic [N-1:0][WIDTH-1:0] in_data;
  logic out_valid, out_ready;
  logic [WIDTH-1:0] out_data;

  stream_merge #(.N(N), .WIDTH(WIDTH)) dut (.*);

  int sent [N], rcvd [N], wait_cnt [N];
  logic prev_stall;
  logic [WIDTH-1:0] prev_data;

  // Inputs change on the falling edge; one time unit later the handshakes
  // that the next rising edge will take are recorded.
  logic [N-1:0] src_fire;
  always @(negedge clk) if (!rst) begin
    for (int s = 0; s < N; s++) begin
      if (src_fire[s]) sent[s]++;
      if (!in_valid[s] || src_fire[s]) begin
        in_valid[s] = (sent[s] < PER) && ($urandom_range(99) < 70);
        in_data[s]  = (64'(s) << 32) | 64'(sent[s]);
      end
    end
    out_ready = ($urandom_range(99) < 60);
    #1;
    src_fire = in_valid & in_ready;
    if (prev_stall) begin
      checks++;
      if (!out_valid || out_data != prev_data) begin
        failures++;
        if (failures < 5) $display("FAIL: output changed while stalled");
      end
    end
    if (out_valid && out_ready) begin
      int s, q;
      s = int'(out_data >> 32); q = int'(out_data[31:0]);
      checks++;
      if (s >= N || q != rcvd[s]) begin
        failures++;
        if (failures < 5) $display("FAIL: got source %0d word %0d", s, q);
      end else rcvd[s]++;
      for (int k = 0; k < N; k++) begin
        if (k == s || !in_valid[k]) wait_cnt[k] = 0;
        else wait_cnt[k]++;
        if (wait_cnt[k] > N - 1) begin
          failures++;
          if (failures < 5) $display("FAIL: source %0d passed over %0d times", k, wait_cnt[k]);
        end
      end
    end
    prev_stall = out_valid && !out_ready;
    prev_data  = out_data;
  end

  initial begin
    in_valid = '0; in_data = '0; src_fire = '0; out_ready = 0; prev_stall = 0; prev_data = '0;
    foreach (sent[s]) begin sent[s] = 0; rcvd[s] = 0; wait_cnt[s] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (rcvd[0] == PER && rcvd[1] == PER && rcvd[2] == PER);
    repeat (20) @(posedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL: extra output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, received %0d %0d %0d", rcvd[0], rcvd[1], rcvd[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Position generator test: random jobs (scale, line, stripe column, window
// count) and random requests from the two pipelines. The granted positions
// must cover x = 0 .. n-1 of every job exactly once and in order, with the
// job's scale, line and tag and column = job column + x. With both
// pipelines asking every cycle, a job of n windows must take ceil(n/2)
// cycles: two positions per clock.
module tb_position_gen;
  import sme_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst = 1'b1;
  logic job_valid, job_ready, job_tag, tag, active;
  logic [SC_W-1:0] job_scale, scale;
  logic [LINE_W-1:0] job_y, job_n, y, x0, x1;
  logic [COL_W-1:0] job_col, col0, col1;
  logic [1:0] want, gnt;

  position_gen dut (.*);

  typedef struct { int sc; int y; int col; int n; int tag; } job_s;
  job_s jobs [$];
  int nx;          // next expected x of the job at the head
  logic job_taken = 1'b0;
  int gcycles = 0;     // cycles in which at least one position was granted
  bit full_rate;

  task automatic expect_pos(int xg, int cg);
    checks++;
    if (jobs.size() == 0 || xg != nx || cg != ((jobs[0].col + nx) % SME_W) ||
        int'(scale) != jobs[0].sc || int'(y) != jobs[0].y || int'(tag) != jobs[0].tag) begin
      failures++;
      if (failures < 5) $display("FAIL: granted x %0d col %0d, expected x %0d", xg, cg, nx);
    end
    nx++;
    if (jobs.size() != 0 && nx == jobs[0].n) begin
      void'(jobs.pop_front());
      nx = 0;
    end
  endtask

  // inputs change on the falling edge; the grants and the job handshake
  // that the next rising edge takes are read one time unit later
  always @(negedge clk) if (!rst) begin
    if (job_valid && job_taken) job_valid = 1'b0;
    want = full_rate ? 2'b11 : 2'($urandom);
    #1;
    job_taken = 1'b0;
    if (gnt != 2'b00) gcycles++;
    if (gnt[0]) expect_pos(int'(x0), int'(col0));
    if (gnt[1]) expect_pos(int'(x1), int'(col1));
    if (job_valid && job_ready) begin
      jobs.push_back('{int'(job_scale), int'(job_y), int'(job_col), int'(job_n), int'(job_tag)});
      job_taken = 1'b1;
    end
  end

  task automatic send_job(int n);
    @(negedge clk);
    job_scale = SC_W'($urandom_range(MAX_SCALES - 1));
    job_y     = LINE_W'($urandom_range(2000));
    job_col   = COL_W'($urandom_range(SME_W - 1));
    job_n     = LINE_W'(n);
    job_tag   = 1'($urandom);
    job_valid = 1'b1;
    #2;
    while (job_valid) @(negedge clk);
  endtask

  initial begin
    job_valid = 0; job_scale = 0; job_y = 0; job_col = 0; job_n = 0; job_tag = 0;
    want = 0; nx = 0; full_rate = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (400) send_job($urandom_range(1, 40));
    wait (jobs.size() == 0);
    // rate: both pipelines always asking
    full_rate = 1;
    repeat (20) begin
      int n, c0;
      n = $urandom_range(1, 300);
      wait (!active && jobs.size() == 0);
      send_job(n);
      c0 = gcycles;
      wait (jobs.size() == 0);
      checks++;
      if (gcycles - c0 != (n + 1) / 2) begin
        failures++;
        $display("FAIL: %0d windows took %0d cycles, expected %0d", n, gcycles - c0, (n + 1) / 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

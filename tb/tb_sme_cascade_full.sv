// Full-size test: one 1280 x 720 frame through the cascade with every
// parameter at its default, in the two-instance HD configuration. Instance
// 0 holds the four largest scales (1280, 1067, 890, 742 pixels wide, 3979
// stripe columns), instance 1 the sixteen smaller ones (619 .. 42 pixels
// wide, 3536 columns); 24 x 24 windows; a random 32-long LRD classifier
// whose first four weak classifiers reject most windows. Every detection
// is compared with the reference model in cascade_check.
module tb_sme_cascade_full;
  int checks, failures;
  logic finished;

  cascade_check #(
    .W0 (1280), .H0 (720), .NS0 (4), .NS1 (16), .WIN_W (24), .WIN_H (24), .TLEN (32),
    .THR (10), .N_STRICT (4), .N_FRAMES (1), .OFF0 (0), .GAP (0),
    .VALID_PCT (100), .READY_PCT (90), .MAX_CYCLES (40_000_000)
  ) u_check (.checks, .failures, .finished);

  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

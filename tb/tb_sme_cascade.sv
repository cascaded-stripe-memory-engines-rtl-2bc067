// End-to-end test of the cascade on a small image (48 x 36, two stored
// scales per instance, 8 x 8 windows, four weak classifiers), two frames.
// All checking is done by cascade_check; this module only reports.
module tb_sme_cascade;
  int checks, failures;
  logic finished;

  cascade_check #(
    .W0 (48), .H0 (36), .NS0 (2), .NS1 (2), .WIN_W (8), .WIN_H (8), .TLEN (4),
    .THR (-20), .N_FRAMES (2), .MAX_CYCLES (400_000)
  ) u_check (.checks, .failures, .finished);

  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_health_rct: self-checking test of the repetition count test.
//
// Drives random raw bits with runs of random length (some longer than the
// cutoff), a stuck stream, and a mid-run clear, and compares fail_o in every
// clock with an independent run-length model: a failure is expected exactly
// for each sample that makes the run of identical values reach CUTOFF or more.
module tb_health_rct;
  localparam int unsigned CUTOFF = 41;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, valid = 1'b0, bit_in = 1'b0;
  logic fail;
  int checks = 0, failures = 0, fails_seen = 0;
  int ref_run = 0;
  logic ref_last = 1'b0;
  logic exp_fail;

  health_rct #(.CUTOFF(CUTOFF)) dut (.clk_i(clk), .rst_ni(rst_n), .clear_i(clear),
    .valid_i(valid), .bit_i(bit_in), .fail_o(fail));

  always #5 clk = ~clk;

  task automatic step(input logic v, input logic b);
    valid = v; bit_in = b; exp_fail = 1'b0;
    if (v) begin
      if (ref_run == 0 || b != ref_last) ref_run = 1; else ref_run++;
      ref_last = b;
      exp_fail = (ref_run >= CUTOFF);
    end
    @(posedge clk); #1;
    checks++;
    if (fail !== exp_fail) begin
      failures++;
      $display("mismatch: run=%0d fail=%b exp=%b", ref_run, fail, exp_fail);
    end
    if (fail) fails_seen++;
    valid = 1'b0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic b;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    b = 1'b0;
    for (int r = 0; r < 400; r++) begin
      int len;
      len = (r % 7 == 3) ? int'($urandom_range(60, 30)) : int'($urandom_range(8, 1));
      for (int i = 0; i < len; i++) step($urandom_range(3, 0) != 0, b);
      b = ~b;
    end
    // stuck stream: fails on every sample from the CUTOFF-th on
    for (int i = 0; i < 100; i++) step(1'b1, 1'b1);
    // clear zeroizes the run
    clear = 1'b1; @(posedge clk); #1; clear = 1'b0; ref_run = 0;
    checks++;
    if (fail !== 1'b0) failures++;
    for (int i = 0; i < CUTOFF - 1; i++) step(1'b1, 1'b1);
    step(1'b1, 1'b1);
    checks++;
    if (fails_seen < 60 + 1) begin
      failures++;
      $display("too few failures exercised: %0d", fails_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

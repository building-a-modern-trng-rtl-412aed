// tb_es_ctrl: self-checking test of the operational-state machine.
//
// Uses a short start-up test (BIST_SAMPLES = 20) and drives the sample,
// health, buffer, poll and fatal inputs directly. Checked scenarios: reset
// enters BIST; BIST lasts exactly BIST_SAMPLES samples and leaves to WAIT;
// WAIT/ES16 follow buffer readiness; an ES16 poll produces read_o and
// returns to WAIT; a health failure while live returns to BIST, pulses
// health_clear_o, and BIST is held until a poll has seen it; a failure in
// BIST and a fatal environmental alarm both enter DEAD, which stays.
module tb_es_ctrl;
  import es_pkg::*;
  localparam int unsigned BIST_SAMPLES = 20;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sv = 1'b0, hf = 1'b0, fatal = 1'b0, bready = 1'b0, poll = 1'b0;
  opst_e opst;
  logic run, hclear, rd;
  int checks = 0, failures = 0;

  es_ctrl #(.BIST_SAMPLES(BIST_SAMPLES)) dut (.clk_i(clk), .rst_ni(rst_n),
    .sample_valid_i(sv), .health_fail_i(hf), .env_fatal_i(fatal), .buf_ready_i(bready),
    .poll_i(poll), .opst_o(opst), .run_o(run), .health_clear_o(hclear), .read_o(rd));

  always #5 clk = ~clk;

  task automatic expect_state(input opst_e e, input string what);
    checks++;
    if (opst !== e) begin
      failures++;
      $display("%s: state %s expected %s", what, opst.name(), e.name());
    end
    checks++;
    if (run !== (e == OPST_WAIT || e == OPST_ES16)) begin
      failures++;
      $display("%s: run_o=%b", what, run);
    end
  endtask

  task automatic clk1();
    @(posedge clk); #1;
  endtask

  // n raw samples, one every other clock
  task automatic samples(input int n);
    for (int i = 0; i < n; i++) begin
      sv = 1'b1; clk1(); sv = 1'b0; clk1();
    end
  endtask

  task automatic do_reset();
    rst_n = 1'b0; clk1(); rst_n = 1'b1;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk1();
    do_reset();
    expect_state(OPST_BIST, "after reset");
    samples(BIST_SAMPLES - 1);
    expect_state(OPST_BIST, "one sample short of the test period");
    sv = 1'b1; clk1(); sv = 1'b0;   // last sample
    expect_state(OPST_BIST, "counter full, leaving next clock");
    clk1();
    expect_state(OPST_WAIT, "start-up test passed");
    // WAIT -> ES16 when a word is released
    bready = 1'b1; clk1();
    expect_state(OPST_ES16, "word ready");
    // poll in ES16: read_o in the same clock, WAIT afterwards
    poll = 1'b1; #1;
    checks++;
    if (rd !== 1'b1) begin failures++; $display("read_o missing on ES16 poll"); end
    clk1(); poll = 1'b0; bready = 1'b0;
    expect_state(OPST_WAIT, "after ES16 poll");
    // poll in WAIT is no read
    poll = 1'b1; #1;
    checks++;
    if (rd !== 1'b0) begin failures++; $display("read_o on WAIT poll"); end
    clk1(); poll = 1'b0;
    // non-fatal alarm while live
    hf = 1'b1; #1;
    checks++;
    if (hclear !== 1'b1) begin failures++; $display("health_clear_o missing"); end
    clk1(); hf = 1'b0;
    expect_state(OPST_BIST, "non-fatal alarm");
    samples(BIST_SAMPLES + 5);
    clk1(); clk1();
    expect_state(OPST_BIST, "alarm latched until polled");
    poll = 1'b1; clk1(); poll = 1'b0;
    clk1();
    expect_state(OPST_WAIT, "alarm polled, test period over");
    // alarm from ES16, poll early during the new test: test period still applies
    bready = 1'b1; clk1(); expect_state(OPST_ES16, "ES16 again");
    hf = 1'b1; clk1(); hf = 1'b0; bready = 1'b0;
    expect_state(OPST_BIST, "alarm from ES16");
    poll = 1'b1; clk1(); poll = 1'b0;
    samples(BIST_SAMPLES / 2);
    expect_state(OPST_BIST, "polled but test not finished");
    // failure during BIST is fatal
    hf = 1'b1; clk1(); hf = 1'b0;
    expect_state(OPST_DEAD, "failure during BIST");
    bready = 1'b1; poll = 1'b1; samples(BIST_SAMPLES * 2); poll = 1'b0; bready = 1'b0;
    expect_state(OPST_DEAD, "DEAD stays");
    // fatal environmental alarm from WAIT and from BIST
    do_reset();
    samples(BIST_SAMPLES); clk1();
    expect_state(OPST_WAIT, "live again after reset");
    fatal = 1'b1; clk1(); fatal = 1'b0;
    expect_state(OPST_DEAD, "fatal alarm from WAIT");
    do_reset();
    expect_state(OPST_BIST, "reset leaves DEAD");
    samples(3);
    fatal = 1'b1; clk1(); fatal = 1'b0;
    expect_state(OPST_DEAD, "fatal alarm from BIST");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

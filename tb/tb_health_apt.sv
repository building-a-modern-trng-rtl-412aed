// tb_health_apt: self-checking test of the adaptive proportion test.
//
// Feeds windows of 1024 samples in which the reference value occurs a chosen
// number of times (below, at and above the cutoff), with the extra
// occurrences placed at random, plus random idle clocks. An independent
// window model predicts in which clock fail_o must pulse.
module tb_health_apt;
  localparam int unsigned WINDOW = 1024;
  localparam int unsigned CUTOFF = 793;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, valid = 1'b0, bit_in = 1'b0;
  logic fail;
  int checks = 0, failures = 0, fails_seen = 0;
  int pos = 0, cnt = 0;
  logic refv = 1'b0, exp_fail;

  health_apt #(.WINDOW(WINDOW), .CUTOFF(CUTOFF)) dut (.clk_i(clk), .rst_ni(rst_n),
    .clear_i(clear), .valid_i(valid), .bit_i(bit_in), .fail_o(fail));

  always #5 clk = ~clk;

  task automatic step(input logic v, input logic b);
    valid = v; bit_in = b; exp_fail = 1'b0;
    if (v) begin
      if (pos == 0) begin refv = b; cnt = 1; end
      else if (b == refv) begin
        cnt++;
        exp_fail = (cnt >= CUTOFF);
      end
      pos = (pos == WINDOW - 1) ? 0 : pos + 1;
    end
    @(posedge clk); #1;
    checks++;
    if (fail !== exp_fail) begin
      failures++;
      $display("mismatch pos=%0d cnt=%0d fail=%b exp=%b", pos, cnt, fail, exp_fail);
    end
    if (fail) fails_seen++;
    valid = 1'b0;
  endtask

  // one window whose reference value r occurs `n_match` times in total
  task automatic window(input logic r, input int n_match);
    logic pattern [WINDOW];
    int placed;
    pattern[0] = r;
    for (int i = 1; i < WINDOW; i++) pattern[i] = ~r;
    placed = 1;
    while (placed < n_match) begin
      int k;
      k = int'($urandom_range(WINDOW - 1, 1));
      if (pattern[k] != r) begin pattern[k] = r; placed++; end
    end
    for (int i = 0; i < WINDOW; i++) begin
      if ($urandom_range(7, 0) == 0) step(1'b0, 1'b0);
      step(1'b1, pattern[i]);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    window(1'b0, 512);
    window(1'b1, CUTOFF - 1);
    window(1'b0, CUTOFF);
    window(1'b1, 1000);
    window(1'b1, 700);
    // clear in the middle of a window restarts it
    for (int i = 0; i < 300; i++) step(1'b1, 1'b0);
    clear = 1'b1; @(posedge clk); #1; clear = 1'b0; pos = 0; cnt = 0;
    window(1'b0, CUTOFF + 5);
    checks++;
    if (fails_seen != 1 + (1000 - CUTOFF + 1) + 6) begin
      failures++;
      $display("unexpected failure count %0d", fails_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

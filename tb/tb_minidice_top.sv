// tb_minidice_top: end-to-end test of the complete entropy source at its
// default sizes (three ring oscillators, 16 clocks per raw sample, 1024-sample
// start-up test, 1024-sample proportion window, release tick every 64 clocks,
// RV32 output). The reference clock has a period of 10 ns against ring half
// periods of 35 to 73 ns. A passive monitor checks every clock of the PollEntropy port. The
// scenario: start-up test and first seeds, polls at random intervals and
// back to back; a stuck source that raises the non-fatal alarm, which must be
// seen by a poll before the source goes live again; a source that stays stuck
// through the repeated test and so goes DEAD; and, after a reset, a fatal
// environmental alarm. The stuck source is made by disabling the rings. Each
// of these mechanisms must occur at least once, and the polled seeds must be
// balanced.
module tb_minidice_top;
  localparam int unsigned XLEN = 32;
  localparam int unsigned RELEASE_PERIOD = 64;
  localparam int unsigned N_SEEDS = 256;

  logic clk = 1'b0, rst_n = 1'b0, fatal = 1'b0, poll = 1'b0, stuck = 1'b0;
  logic [XLEN-1:0] rd;
  int checks, failures, n_es16, n_wait, n_bist, n_dead, n_alarm, n_dead_entry;
  int n_latched_poll, n_back_to_back, ones, seed_bits, n_upper_ones;
  int my_checks = 0, my_failures = 0;
  longint cyc = 0, t_live = 0, t_seed32 = 0;

  minidice_top dut (
    .clk_i(clk), .rst_ni(rst_n), .noise_en_i(!stuck), .env_fatal_i(fatal), .poll_i(poll),
    .rd_o(rd));

  tb_es_monitor #(.XLEN(XLEN), .RELEASE_PERIOD(RELEASE_PERIOD)) mon (
    .clk_i(clk), .rst_ni(rst_n), .poll_i(poll), .rd_i(rd),
    .checks, .failures, .n_es16, .n_wait, .n_bist, .n_dead, .n_alarm, .n_dead_entry,
    .n_latched_poll, .n_back_to_back, .ones, .seed_bits, .n_upper_ones);

  always #5 clk = ~clk;

  // cycles from reset to the first WAIT, and to the 32nd ES16 poll
  // (32 x 16 = 512 bits, the seed of a 256-bit DRBG)
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (t_live == 0 && rst_n && rd[31:30] == 2'b10) t_live <= cyc;
    if (t_seed32 == 0 && n_es16 >= 32) t_seed32 <= cyc;
  end


  task automatic report();
    $display("es16=%0d wait=%0d bist=%0d dead=%0d alarms=%0d dead_entries=%0d latched=%0d b2b=%0d ones=%0d/%0d",
             n_es16, n_wait, n_bist, n_dead, n_alarm, n_dead_entry, n_latched_poll,
             n_back_to_back, ones, seed_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks + my_checks, failures + my_failures);
  endtask

  task automatic need(input bit cond, input string what);
    my_checks++;
    if (!cond) begin my_failures++; $display("not reached: %s", what); end
  endtask

  // one poll; sometimes immediately followed by another
  task automatic poll_once();
    @(negedge clk); poll = 1'b1;
    if ($urandom_range(3, 0) == 0) @(negedge clk);
    @(negedge clk); poll = 1'b0;
    repeat ($urandom_range(6, 0)) @(negedge clk);
  endtask

  task automatic poll_until(input logic [1:0] st, input int max_polls);
    for (int i = 0; i < max_polls && rd[31:30] != st; i++) poll_once();
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    my_failures++;
    $display("watchdog expired");
    report();
    $finish;
  end

  initial begin
    int e;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // start-up test, then seeds
    while (n_es16 < N_SEEDS) poll_once();
    $display("start-up test over after %0d clocks; 32 seeds (512 bits) after %0d clocks",
             t_live, t_seed32);
    need(t_live >= 1024 * 16, "start-up test lasts at least 1024 samples of 16 clocks");
    need(n_bist > 0, "BIST seen by a poll after reset");
    need(n_wait > 0, "WAIT seen by a poll");
    need(n_back_to_back > 0, "back-to-back poll after ES16 (wipe-on-read)");
    need(seed_bits > 0 && ones * 100 > seed_bits * 45 && ones * 100 < seed_bits * 55,
         "balanced seeds");
    // stuck source: non-fatal alarm, latched until polled
    stuck = 1'b1;
    for (int i = 0; i < 100000 && n_alarm == 0; i++) @(negedge clk);
    need(n_alarm == 1, "non-fatal alarm");
    stuck = 1'b0;
    repeat (20000) @(negedge clk);
    need(rd[31:30] == 2'b00, "alarm held in BIST until polled");
    poll_once();
    need(n_latched_poll == 1, "latched alarm seen by a poll");
    e = n_es16;
    while (n_es16 < e + 10) poll_once();
    // stuck through the repeated test: DEAD
    stuck = 1'b1;
    for (int i = 0; i < 100000 && n_alarm < 2; i++) @(negedge clk);
    poll_once();
    for (int i = 0; i < 100000 && n_dead_entry == 0; i++) @(negedge clk);
    need(n_dead_entry == 1, "failure during BIST enters DEAD");
    stuck = 1'b0;
    repeat (300) poll_once();
    need(rd[31:30] == 2'b11 && n_dead > 0, "DEAD stays");
    // reset, fatal environmental alarm
    @(negedge clk); rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    poll_until(2'b10, 100000);
    @(negedge clk); fatal = 1'b1; @(negedge clk); fatal = 1'b0;
    repeat (2) @(negedge clk);
    need(n_dead_entry == 2 && rd[31:30] == 2'b11, "fatal environmental alarm enters DEAD");
    report();
    $finish;
  end
endmodule

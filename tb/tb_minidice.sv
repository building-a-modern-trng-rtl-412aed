// tb_minidice: end-to-end test of the synthesizable core with RV64 output.
//
// The chain inputs are driven with fresh random bits every clock (an ideal
// noise source), and the parameters are shortened (two clocks per sample,
// 64-sample start-up test, release tick every 8 clocks) to keep the run
// short. A passive monitor checks every clock of the PollEntropy port. The
// scenario: start-up test and first seeds, polls at random intervals and
// back to back; a stuck source that raises the non-fatal alarm, which must be
// seen by a poll before the source goes live again; a source that stays stuck
// through the repeated test and so goes DEAD; and, after a reset, a fatal
// environmental alarm. Each of these mechanisms must occur at least once, and
// the polled seeds must be balanced.
module tb_minidice;
  localparam int unsigned CHAINS = 3;
  localparam int unsigned XLEN = 64;
  localparam int unsigned RELEASE_PERIOD = 8;
  localparam int unsigned N_SEEDS = 200;

  logic clk = 1'b0, rst_n = 1'b0, fatal = 1'b0, poll = 1'b0, stuck = 1'b0;
  logic [CHAINS-1:0] noise = '0;
  logic [XLEN-1:0] rd;
  int checks, failures, n_es16, n_wait, n_bist, n_dead, n_alarm, n_dead_entry;
  int n_latched_poll, n_back_to_back, ones, seed_bits, n_upper_ones;
  int my_checks = 0, my_failures = 0;

  minidice #(.CHAINS(CHAINS), .XLEN(XLEN), .SAMPLE_DIV(2), .BIST_SAMPLES(64),
             .RELEASE_PERIOD(RELEASE_PERIOD)) dut (
    .clk_i(clk), .rst_ni(rst_n), .noise_i(noise), .env_fatal_i(fatal), .poll_i(poll), .rd_o(rd));

  tb_es_monitor #(.XLEN(XLEN), .RELEASE_PERIOD(RELEASE_PERIOD)) mon (
    .clk_i(clk), .rst_ni(rst_n), .poll_i(poll), .rd_i(rd),
    .checks, .failures, .n_es16, .n_wait, .n_bist, .n_dead, .n_alarm, .n_dead_entry,
    .n_latched_poll, .n_back_to_back, .ones, .seed_bits, .n_upper_ones);

  always #5 clk = ~clk;

  always @(posedge clk) noise <= stuck ? '0 : CHAINS'($urandom);

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
    repeat (400000) @(posedge clk);
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
    need(n_bist > 0, "BIST seen by a poll after reset");
    need(n_wait > 0, "WAIT seen by a poll");
    need(n_back_to_back > 0, "back-to-back poll after ES16 (wipe-on-read)");
    need(seed_bits > 0 && ones * 100 > seed_bits * 45 && ones * 100 < seed_bits * 55,
         "balanced seeds");
    need(n_upper_ones > 0, "sign extension of a status with bit 31 set");
    // stuck source: non-fatal alarm, latched until polled
    stuck = 1'b1;
    for (int i = 0; i < 5000 && n_alarm == 0; i++) @(negedge clk);
    need(n_alarm == 1, "non-fatal alarm");
    stuck = 1'b0;
    repeat (2000) @(negedge clk);
    need(rd[31:30] == 2'b00, "alarm held in BIST until polled");
    poll_once();
    need(n_latched_poll == 1, "latched alarm seen by a poll");
    e = n_es16;
    while (n_es16 < e + 10) poll_once();
    // stuck through the repeated test: DEAD
    stuck = 1'b1;
    for (int i = 0; i < 5000 && n_alarm < 2; i++) @(negedge clk);
    poll_once();
    for (int i = 0; i < 5000 && n_dead_entry == 0; i++) @(negedge clk);
    need(n_dead_entry == 1, "failure during BIST enters DEAD");
    stuck = 1'b0;
    repeat (3000) poll_once();
    need(rd[31:30] == 2'b11 && n_dead > 0, "DEAD stays");
    // reset, fatal environmental alarm
    @(negedge clk); rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    poll_until(2'b10, 10000);
    @(negedge clk); fatal = 1'b1; @(negedge clk); fatal = 1'b0;
    repeat (2) @(negedge clk);
    need(n_dead_entry == 2 && rd[31:30] == 2'b11, "fatal environmental alarm enters DEAD");
    report();
    $finish;
  end
endmodule

// tb_ro_noise_source: checks the ring oscillator model.
//
// While enabled, every half period must last between STAGES*GATE_DELAY and
// STAGES*GATE_DELAY + JITTER time units, and the jitter must actually vary.
// When disabled, the output must go low and stay still; re-enabling restarts it.
module tb_ro_noise_source;
  localparam int unsigned STAGES = 11;
  localparam int unsigned GATE_DELAY = 5;
  localparam int unsigned JITTER = 8;
  logic en = 1'b0;
  logic osc;
  int checks = 0, failures = 0, edges = 0, min_hp = 1000000, max_hp = 0;
  time last_edge = 0;

  ro_noise_source #(.STAGES(STAGES), .GATE_DELAY(GATE_DELAY), .JITTER(JITTER)) dut (
    .en_i(en), .osc_o(osc));

  always @(osc) if (en) begin
    int hp;
    hp = int'($time - last_edge);
    if (edges > 0) begin
      checks++;
      if (hp < STAGES * GATE_DELAY || hp > STAGES * GATE_DELAY + JITTER) begin
        failures++;
        $display("half period %0d out of range", hp);
      end
      if (hp < min_hp) min_hp = hp;
      if (hp > max_hp) max_hp = hp;
    end
    edges++;
    last_edge = $time;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int frozen;
    #100;
    checks++;
    if (osc !== 1'b0) begin failures++; $display("output not low while disabled"); end
    en = 1'b1; last_edge = $time;
    #100000;
    checks++;
    if (edges < 100000 / (STAGES * GATE_DELAY + JITTER) - 2) begin
      failures++; $display("too few edges: %0d", edges);
    end
    checks++;
    if (max_hp == min_hp) begin failures++; $display("no jitter"); end
    en = 1'b0;
    #1;
    frozen = edges;
    #10000;
    checks++;
    if (osc !== 1'b0 || edges != frozen) begin failures++; $display("ring did not stop"); end
    edges = 0;
    en = 1'b1; last_edge = $time;
    #10000;
    checks++;
    if (edges < 100) begin failures++; $display("ring did not restart"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// ro_noise_source: behavioural model of one free-running ring oscillator.
//
// Behavioural model, not synthesizable. A real chain is an odd number of
// inverters closed into a loop (plus an enable gate); in silicon it is built
// from hand-placed standard cells. A zero-delay inverter loop cannot be
// simulated, so this model toggles its output every STAGES*GATE_DELAY time
// units plus a random jitter of 0..JITTER units, which stands in for the
// thermal timing jitter that the sampler turns into entropy. When en_i is low
// the ring stops with its output low, which models a dead or disabled source.
// Like the real ring, the model is a loop: its output feeds back into the
// process that drives it, so synthesis reports a combinational loop here.
// That loop is the oscillator itself and is intended.
//
// Ports: en_i (enable), osc_o (oscillator output, asynchronous to any clock).
// STAGES should be odd, and parallel chains should use coprime stage counts so
// that they do not lock to each other; the jitter model is this design's own.
module ro_noise_source #(
  parameter int unsigned STAGES     = 7,  // inverters in the loop
  parameter int unsigned GATE_DELAY = 5,  // delay of one stage, time units
  parameter int unsigned JITTER     = 8   // max extra delay per half period
) (
  input  logic en_i,
  output logic osc_o
);

  logic osc_q;
  logic start;  // one event at time 1 starts a ring enabled from time 0

  initial begin
    osc_q = 1'b0;
    start = 1'b0;
    #1 start = 1'b1;
  end

  // The loop: each change of the output (or of the enable) schedules the
  // next inverted value one jittered half period later.
  always @(osc_q, en_i, start) begin
    if (!en_i) osc_q <= 1'b0;
    else       osc_q <= #(STAGES * GATE_DELAY + $urandom_range(JITTER, 0)) ~osc_q;
  end

  assign osc_o = osc_q;

endmodule

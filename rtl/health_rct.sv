// health_rct: repetition count test on the raw noise bits.
//
// The test keeps the last sample value and the length of the current run of
// identical samples. The run counter restarts at 1 whenever the value changes.
// When a run reaches CUTOFF samples the test fails: fail_o pulses in the clock
// after the failing sample is accepted, and again for every further identical
// sample, so a stuck source keeps failing. clear_i (and reset) zeroize the
// state, since it is correlated with the secret output.
//
// The test itself is the standard repetition count test. The cutoff
// 41 = 1 + ceil(20 / H) for an assumed min-entropy H = 0.5 bit per raw sample
// and a false-alarm rate of 2^-20 is this design's own choice.
module health_rct #(
  parameter int unsigned CUTOFF = 41
) (
  input  logic clk_i,
  input  logic rst_ni,
  input  logic clear_i,
  input  logic valid_i,
  input  logic bit_i,
  output logic fail_o
);

  localparam int unsigned CNT_W = $clog2(CUTOFF + 1);

  logic             last_q;
  logic [CNT_W-1:0] run_q, run_d;

  always_comb begin
    if (run_q == '0 || bit_i != last_q) run_d = CNT_W'(1);
    else if (run_q == CNT_W'(CUTOFF))  run_d = run_q;  // saturate
    else                               run_d = run_q + 1'b1;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      last_q <= 1'b0;
      run_q  <= '0;
      fail_o <= 1'b0;
    end else if (clear_i) begin
      last_q <= 1'b0;
      run_q  <= '0;
      fail_o <= 1'b0;
    end else begin
      fail_o <= valid_i && (run_d == CNT_W'(CUTOFF));
      if (valid_i) begin
        last_q <= bit_i;
        run_q  <= run_d;
      end
    end
  end

endmodule

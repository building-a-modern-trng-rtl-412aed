// noise_sampler: samples the ring oscillators and combines them into raw bits.
//
// Each oscillator output is asynchronous. It is captured by a sampling
// flip-flop on the reference clock (whose metastability is part of the noise)
// and passed through one more flip-flop to synchronize it. The synchronized
// chain bits are XORed into a single raw bit, which reduces bias when several
// chains are present. A raw sample is taken only every SAMPLE_DIV clocks so
// that consecutive samples are far apart in time and close to independent.
//
// Interface: sample_valid_o pulses for one clock per raw sample, sample_o is
// the XORed bit for that sample. First sample 2 + SAMPLE_DIV clocks after
// reset at most. Sampling against a reference clock and XOR of parallel chains
// follow the Minidice description; the two-flop capture and the divider value
// are this design's own choices.
module noise_sampler #(
  parameter int unsigned CHAINS     = 3,
  parameter int unsigned SAMPLE_DIV = 16  // clocks per raw sample, >= 1
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic [CHAINS-1:0] noise_i,
  output logic              sample_valid_o,
  output logic              sample_o
);

  localparam int unsigned DIV_W = (SAMPLE_DIV > 1) ? $clog2(SAMPLE_DIV) : 1;

  logic [CHAINS-1:0] capture_q, sync_q;
  logic [DIV_W-1:0]  div_q;
  logic              tick;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      capture_q <= '0;
      sync_q    <= '0;
    end else begin
      capture_q <= noise_i;
      sync_q    <= capture_q;
    end
  end

  assign tick = (div_q == DIV_W'(SAMPLE_DIV - 1));

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      div_q          <= '0;
      sample_valid_o <= 1'b0;
      sample_o       <= 1'b0;
    end else begin
      div_q          <= tick ? '0 : div_q + 1'b1;
      sample_valid_o <= tick;
      if (tick) sample_o <= ^sync_q;
    end
  end

endmodule

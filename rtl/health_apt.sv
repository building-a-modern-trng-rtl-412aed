// health_apt: adaptive proportion test on the raw noise bits.
//
// The first sample of every window of WINDOW samples becomes the reference.
// The test counts how often the reference value occurs in that window (the
// reference itself counts as the first occurrence). If the count reaches
// CUTOFF the test fails: fail_o pulses in the clock after the failing sample.
// After WINDOW samples the next sample starts a new window, so no state
// survives longer than one window. clear_i (and reset) zeroize the state.
//
// The window of 1024 samples follows the suggested flush size; the cutoff
// 793 = 1 + CRITBINOM(1024, 2^-0.5, 1 - 2^-20), for an assumed H = 0.5 bit per
// raw sample, is this design's own choice.
module health_apt #(
  parameter int unsigned WINDOW = 1024,
  parameter int unsigned CUTOFF = 793
) (
  input  logic clk_i,
  input  logic rst_ni,
  input  logic clear_i,
  input  logic valid_i,
  input  logic bit_i,
  output logic fail_o
);

  localparam int unsigned WIN_W = $clog2(WINDOW + 1);
  localparam int unsigned CNT_W = $clog2(CUTOFF + 1);

  logic             ref_q;
  logic [WIN_W-1:0] pos_q;    // samples taken in the current window, 0 = none
  logic [CNT_W-1:0] cnt_q, cnt_d;
  logic             first;

  assign first = (pos_q == '0);

  always_comb begin
    if (first)                         cnt_d = CNT_W'(1);
    else if (bit_i == ref_q && cnt_q != CNT_W'(CUTOFF)) cnt_d = cnt_q + 1'b1;
    else                               cnt_d = cnt_q;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ref_q  <= 1'b0;
      pos_q  <= '0;
      cnt_q  <= '0;
      fail_o <= 1'b0;
    end else if (clear_i) begin
      ref_q  <= 1'b0;
      pos_q  <= '0;
      cnt_q  <= '0;
      fail_o <= 1'b0;
    end else begin
      fail_o <= valid_i && !first && (bit_i == ref_q) && (cnt_d == CNT_W'(CUTOFF));
      if (valid_i) begin
        if (first) ref_q <= bit_i;
        cnt_q <= cnt_d;
        pos_q <= (pos_q == WIN_W'(WINDOW - 1)) ? '0 : pos_q + 1'b1;
      end
    end
  end

endmodule

// minidice: synthesizable core of a small RISC-V entropy source.
//
// The core turns asynchronous ring-oscillator outputs into 16-bit seed words
// for the PollEntropy read. Data path: noise_sampler captures and XORs the
// chains into one raw bit every SAMPLE_DIV clocks; the repetition count and
// adaptive proportion tests watch every raw bit; blum_conditioner removes
// bias and first-order correlation; es_output_buffer collects 16 conditioned
// bits, keeps XORing new bits in until a release tick, and wipes the word when
// it is read. es_ctrl holds the operational state (BIST, WAIT, ES16, DEAD).
//
// PollEntropy port: poll_i is a one-clock read strobe from the CPU; rd_o is
// combinational from registered state and is valid in the same clock. rd_o
// holds OPST in bits 31:30, zero in bits 29:16, and the seed in bits 15:0 only
// when OPST is ES16; with XLEN = 64 bit 31 is sign-extended. A poll that
// returns ES16 wipes the word at the end of that clock, so each seed is
// delivered once. Each 16-bit seed must be treated as carrying at least 8 bits
// of entropy and conditioned 2:1 in software before use.
//
// The structure follows the Minidice reference design; the sizes marked as
// defaults below (except the 16-bit seed and the 1024-sample window) are this
// design's own choices.
module minidice
  import es_pkg::*;
#(
  parameter int unsigned CHAINS         = 3,
  parameter int unsigned XLEN           = 32,   // 32 or 64
  parameter int unsigned SAMPLE_DIV     = 16,
  parameter int unsigned RCT_CUTOFF     = 41,
  parameter int unsigned APT_WINDOW     = 1024,
  parameter int unsigned APT_CUTOFF     = 793,
  parameter int unsigned RELEASE_PERIOD = 64,
  parameter int unsigned BIST_SAMPLES   = 1024
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic [CHAINS-1:0] noise_i,
  input  logic              env_fatal_i,
  input  logic              poll_i,
  output logic [XLEN-1:0]   rd_o
);

  logic              raw_valid, raw_bit;
  logic              rct_fail, apt_fail, health_clear;
  logic              cond_valid, cond_bit;
  logic              buf_ready, run, read;
  logic [SEED_W-1:0] seed;
  logic [31:0]       word;
  opst_e             opst;

  noise_sampler #(.CHAINS(CHAINS), .SAMPLE_DIV(SAMPLE_DIV)) u_sampler (
    .clk_i, .rst_ni, .noise_i,
    .sample_valid_o(raw_valid), .sample_o(raw_bit)
  );

  health_rct #(.CUTOFF(RCT_CUTOFF)) u_rct (
    .clk_i, .rst_ni, .clear_i(health_clear),
    .valid_i(raw_valid), .bit_i(raw_bit), .fail_o(rct_fail)
  );

  health_apt #(.WINDOW(APT_WINDOW), .CUTOFF(APT_CUTOFF)) u_apt (
    .clk_i, .rst_ni, .clear_i(health_clear),
    .valid_i(raw_valid), .bit_i(raw_bit), .fail_o(apt_fail)
  );

  blum_conditioner u_cond (
    .clk_i, .rst_ni, .flush_i(!run),
    .valid_i(raw_valid && run), .bit_i(raw_bit),
    .valid_o(cond_valid), .bit_o(cond_bit)
  );

  es_output_buffer #(.WIDTH(SEED_W), .RELEASE_PERIOD(RELEASE_PERIOD)) u_buf (
    .clk_i, .rst_ni, .flush_i(!run),
    .valid_i(cond_valid), .bit_i(cond_bit), .read_i(read),
    .ready_o(buf_ready), .data_o(seed)
  );

  es_ctrl #(.BIST_SAMPLES(BIST_SAMPLES)) u_ctrl (
    .clk_i, .rst_ni,
    .sample_valid_i(raw_valid), .health_fail_i(rct_fail || apt_fail),
    .env_fatal_i, .buf_ready_i(buf_ready), .poll_i,
    .opst_o(opst), .run_o(run), .health_clear_o(health_clear), .read_o(read)
  );

  assign word = poll_word(opst, seed);
  assign rd_o = XLEN'($signed(word));

  // A seed is never shown outside ES16.
  a_no_seed_outside_es16: assert property (@(posedge clk_i) disable iff (!rst_ni)
    opst != OPST_ES16 |-> rd_o[SEED_W-1:0] == '0);

endmodule

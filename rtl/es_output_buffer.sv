// es_output_buffer: seed word buffer with XOR accumulation, delayed release
// and wipe-on-read.
//
// Conditioned bits arrive at a variable rate. Each bit is XORed into the
// buffer at a rotating bit position. Once WIDTH bits have arrived the word is
// complete, but it is not shown yet: it keeps absorbing further bits by XOR
// until the next release tick, which comes from a free-running counter every
// RELEASE_PERIOD clocks. Release times are thus fixed to a grid and do not
// reveal the exact rate of the conditioner. A released word is frozen, shown
// on data_o with ready_o high, and wiped to zero by read_i (a successful
// poll) or flush_i. data_o is zero whenever ready_o is low, so no partial
// word ever leaves the buffer.
//
// Timing: ready_o rises in the clock after a release tick at which the word
// was complete; read_i clears it in the next clock. XOR overwriting, the
// release delay and wipe-on-read follow the Minidice description; the
// tick-grid form of the delay and RELEASE_PERIOD = 64 are this design's own.
module es_output_buffer #(
  parameter int unsigned WIDTH          = 16,
  parameter int unsigned RELEASE_PERIOD = 64  // clocks between release ticks, >= 1
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             flush_i,
  input  logic             valid_i,
  input  logic             bit_i,
  input  logic             read_i,
  output logic             ready_o,
  output logic [WIDTH-1:0] data_o
);

  localparam int unsigned POS_W = (WIDTH > 1) ? $clog2(WIDTH) : 1;
  localparam int unsigned CNT_W = $clog2(WIDTH + 1);
  localparam int unsigned TCK_W = (RELEASE_PERIOD > 1) ? $clog2(RELEASE_PERIOD) : 1;

  logic [WIDTH-1:0] buf_q;
  logic [POS_W-1:0] pos_q;
  logic [CNT_W-1:0] fill_q;
  logic [TCK_W-1:0] tick_q;
  logic             ready_q, tick, full;

  assign tick = (tick_q == TCK_W'(RELEASE_PERIOD - 1));
  assign full = (fill_q == CNT_W'(WIDTH));

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) tick_q <= '0;
    else         tick_q <= tick ? '0 : tick_q + 1'b1;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      buf_q   <= '0;
      pos_q   <= '0;
      fill_q  <= '0;
      ready_q <= 1'b0;
    end else if (flush_i || (read_i && ready_q)) begin
      buf_q   <= '0;
      pos_q   <= '0;
      fill_q  <= '0;
      ready_q <= 1'b0;
    end else if (!ready_q) begin
      if (valid_i) begin
        buf_q[pos_q] <= buf_q[pos_q] ^ bit_i;
        pos_q        <= (pos_q == POS_W'(WIDTH - 1)) ? '0 : pos_q + 1'b1;
        if (!full) fill_q <= fill_q + 1'b1;
      end
      if (tick && full) ready_q <= 1'b1;
    end
  end

  assign ready_o = ready_q;
  assign data_o  = ready_q ? buf_q : '0;

endmodule

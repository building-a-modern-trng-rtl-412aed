// minidice_top: complete entropy source, oscillators included.
//
// Instantiates CHAINS free-running ring oscillators with coprime stage counts
// (7, 11, 13, then further primes) and the synthesizable minidice core that
// samples, tests, conditions and buffers their noise and answers PollEntropy
// reads. The oscillators are behavioural models here; for silicon or an FPGA
// they are replaced by a hand-built inverter loop of the same ports. Each
// ring is a combinational loop by nature, and synthesis reports it as one.
//
// Ports: clk_i is the reference clock the rings are sampled against; rst_ni
// zeroizes everything and starts the start-up self test; noise_en_i enables
// the rings (low stops them, which the health tests detect); env_fatal_i is a
// critical alarm from environmental sensors; poll_i/rd_o are the PollEntropy
// read port described in minidice. The oscillator enable is this design's
// own addition.
module minidice_top #(
  parameter int unsigned CHAINS = 3,   // 1 to 8
  parameter int unsigned XLEN   = 32
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic            noise_en_i,
  input  logic            env_fatal_i,
  input  logic            poll_i,
  output logic [XLEN-1:0] rd_o
);

  // Coprime (prime) stage counts for up to 8 chains.
  localparam int unsigned RING_STAGES [8] = '{7, 11, 13, 17, 19, 23, 29, 31};

  logic [CHAINS-1:0] noise;

  for (genvar i = 0; i < CHAINS; i++) begin : g_ring
    ro_noise_source #(.STAGES(RING_STAGES[i])) u_ring (
      .en_i(noise_en_i), .osc_o(noise[i])
    );
  end

  minidice #(.CHAINS(CHAINS), .XLEN(XLEN)) u_core (
    .clk_i, .rst_ni, .noise_i(noise), .env_fatal_i, .poll_i, .rd_o
  );

endmodule

// tb_noise_sampler: self-checking test of the sampler and chain combiner.
//
// The test drives the chain inputs with random values that change just after
// each clock edge and keeps their history. Every raw sample must appear
// exactly every SAMPLE_DIV clocks and equal the XOR of the chains as they
// were two clocks (capture plus synchronizer flop) before the sample.
module tb_noise_sampler;
  localparam int unsigned CHAINS = 3;
  localparam int unsigned SAMPLE_DIV = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [CHAINS-1:0] noise = '0;
  logic sv, sb;
  int checks = 0, failures = 0, samples = 0, last_sample = -1;
  logic [CHAINS-1:0] hist [int];
  int cyc = 0;

  noise_sampler #(.CHAINS(CHAINS), .SAMPLE_DIV(SAMPLE_DIV)) dut (.clk_i(clk), .rst_ni(rst_n),
    .noise_i(noise), .sample_valid_o(sv), .sample_o(sb));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      noise = CHAINS'($urandom);
      hist[cyc + 1] = noise;   // value present at the next edge
      @(posedge clk); #1;
      cyc++;
      if (sv) begin
        samples++;
        checks++;
        if (cyc >= 3 && sb !== ^hist[cyc - 2]) begin
          failures++;
          $display("cycle %0d: sample %b expected %b", cyc, sb, ^hist[cyc - 2]);
        end
        if (last_sample >= 0) begin
          checks++;
          if (cyc - last_sample != SAMPLE_DIV) begin
            failures++;
            $display("sample spacing %0d", cyc - last_sample);
          end
        end
        last_sample = cyc;
      end
    end
    checks++;
    if (samples < 20000 / SAMPLE_DIV - 2) begin failures++; $display("samples %0d", samples); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_es_output_buffer: self-checking test of the seed buffer.
//
// A model XORs each incoming bit into a rotating position, counts the bits,
// and marks the word released only at a release tick (every RELEASE_PERIOD
// clocks from reset) once 16 bits have arrived. The test checks in every
// clock that ready_o and data_o match the model, that data_o is zero while
// not ready, that a read wipes the word (wipe-on-read) and that flush clears
// it. It also checks that release times fall on the tick grid.
module tb_es_output_buffer;
  localparam int unsigned WIDTH = 16;
  localparam int unsigned RELEASE_PERIOD = 64;
  logic clk = 1'b0, rst_n = 1'b0, flush = 1'b0, valid = 1'b0, bit_in = 1'b0, rd = 1'b0;
  logic ready;
  logic [WIDTH-1:0] data;
  int grid_errors = 0;
  int checks = 0, failures = 0, releases = 0, reads = 0, overwrites = 0, flushes = 0;

  // model state
  logic [WIDTH-1:0] m_buf = '0;
  int m_pos = 0, m_fill = 0, m_tick = 0, cyc = 0;
  logic m_ready = 1'b0;

  es_output_buffer #(.WIDTH(WIDTH), .RELEASE_PERIOD(RELEASE_PERIOD)) dut (.clk_i(clk),
    .rst_ni(rst_n), .flush_i(flush), .valid_i(valid), .bit_i(bit_in), .read_i(rd),
    .ready_o(ready), .data_o(data));

  always #5 clk = ~clk;

  // advance the model by one clock with the current inputs
  task automatic model_clock();
    logic tick, was_full;
    tick = (m_tick == RELEASE_PERIOD - 1);
    was_full = (m_fill == WIDTH);   // a word must be complete before the tick
    if (flush || (rd && m_ready)) begin
      if (flush) flushes++;
      else reads++;
      m_buf = '0; m_pos = 0; m_fill = 0; m_ready = 1'b0;
    end else if (!m_ready) begin
      if (valid) begin
        if (m_fill == WIDTH) overwrites++;
        m_buf[m_pos] = m_buf[m_pos] ^ bit_in;
        m_pos = (m_pos + 1) % WIDTH;
        if (m_fill < WIDTH) m_fill++;
      end
        if (tick && was_full) begin
        m_ready = 1'b1;
        releases++;
        if ((cyc + 1) % RELEASE_PERIOD != 0) grid_errors++;
      end
    end
    m_tick = tick ? 0 : m_tick + 1;
  endtask

  task automatic cycle(input logic v, input logic b, input logic r, input logic f);
    valid = v; bit_in = b; rd = r; flush = f;
    model_clock();
    @(posedge clk); #1;
    cyc++;
    checks++;
    if (ready !== m_ready || data !== (m_ready ? m_buf : '0)) begin
      failures++;
      $display("cycle %0d: ready=%b data=%h expected %b %h", cyc, ready, data, m_ready, m_buf);
    end
    valid = 1'b0; rd = 1'b0; flush = 1'b0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;   // the release counter starts counting at this point
    for (int i = 0; i < 30000; i++) begin
      logic v, r, f;
      v = ($urandom_range(2, 0) == 0);
      r = ($urandom_range(40, 0) == 0);
      f = ($urandom_range(3000, 0) == 0);
      cycle(v, $urandom_range(1, 0) == 1, r, f);
    end
    checks++;
    if (grid_errors != 0) begin failures++; $display("releases off the tick grid"); end
    checks++;
    if (releases < 50 || reads < 50 || overwrites < 50 || flushes < 1) begin
      failures++;
      $display("coverage: releases=%0d reads=%0d overwrites=%0d flushes=%0d",
               releases, reads, overwrites, flushes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

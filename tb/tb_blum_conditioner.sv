// tb_blum_conditioner: self-checking test of the Blum-style conditioner.
//
// An independent model keeps, for each previous-bit value, a queue of the
// bits that followed it and pairs them up von-Neumann style; every output of
// the module is compared in order with the model's output. A biased and a
// correlated (sticky Markov) source are used; the output of each must be
// close to balanced. flush_i is checked to drop all pending state.
module tb_blum_conditioner;
  logic clk = 1'b0, rst_n = 1'b0, flush = 1'b0, valid = 1'b0, bit_in = 1'b0;
  logic vo, bo;
  int checks = 0, failures = 0;
  logic exp_q [$];
  int have_prev = 0;
  logic prev = 1'b0;
  int npend [2];
  logic pend [2];
  int ones = 0, total = 0;

  blum_conditioner dut (.clk_i(clk), .rst_ni(rst_n), .flush_i(flush), .valid_i(valid),
    .bit_i(bit_in), .valid_o(vo), .bit_o(bo));

  always #5 clk = ~clk;

  // model
  task automatic model(input logic b);
    if (have_prev != 0) begin
      int s;
      s = int'(prev);
      if (npend[s] == 0) begin npend[s] = 1; pend[s] = b; end
      else begin
        npend[s] = 0;
        if (pend[s] != b) exp_q.push_back(pend[s]);
      end
    end
    prev = b; have_prev = 1;
  endtask

  always @(posedge clk) if (rst_n && vo) begin
    logic e;
    checks++;
    total++; if (bo) ones++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = exp_q.pop_front();
      if (e !== bo) begin failures++; $display("output %b expected %b", bo, e); end
    end
  end

  task automatic drive(input logic b);
    valid = 1'b1; bit_in = b; model(b);
    @(posedge clk); #1; valid = 1'b0;
    if ($urandom_range(1, 0) == 1) begin @(posedge clk); #1; end
  endtask

  task automatic check_balance(input string name);
    checks++;
    if (total < 500 || ones * 100 < total * 45 || ones * 100 > total * 55) begin
      failures++;
      $display("%s: %0d ones of %0d", name, ones, total);
    end
    ones = 0; total = 0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic b;
    npend[0] = 0; npend[1] = 0; pend[0] = 1'b0; pend[1] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    // biased source: P(1) = 0.8
    for (int i = 0; i < 8000; i++) drive($urandom_range(9, 0) < 8);
    @(posedge clk); #1;
    check_balance("biased");
    // correlated source: repeats the previous bit with probability 0.85
    b = 1'b0;
    for (int i = 0; i < 12000; i++) begin
      if ($urandom_range(99, 0) >= 85) b = ~b;
      drive(b);
    end
    @(posedge clk); #1;
    check_balance("correlated");
    // flush drops pending bits: 0 then flush then 1,0 -> no output from the 0
    drive(1'b1); drive(1'b0);
    flush = 1'b1; @(posedge clk); #1; flush = 1'b0;
    have_prev = 0; npend[0] = 0; npend[1] = 0; exp_q.delete();
    for (int i = 0; i < 2000; i++) drive($urandom_range(1, 0) == 1);
    @(posedge clk); #1;
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("missing outputs %0d", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

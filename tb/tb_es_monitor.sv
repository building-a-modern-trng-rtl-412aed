// tb_es_monitor: passive checker of a PollEntropy read port, shared by the
// core and top-level testbenches.
//
// Looks at rd_o in every clock (rd_o shows the current state even without a
// poll) and checks: bits 29:16 are zero; the seed is zero unless OPST is
// ES16; on RV64 bits 63:32 copy bit 31; every change of state is one of the
// transitions of the state diagram (BIST to WAIT or DEAD, WAIT and ES16 to
// each other, to BIST or to DEAD, DEAD to nothing); ES16 is left for WAIT only
// after a poll (wipe-on-read) and never survives a poll; and every WAIT-to-
// ES16 change falls on the same phase of the RELEASE_PERIOD grid. It counts
// polls by returned state, alarms (live to BIST), entries to DEAD, polls
// that saw a latched alarm, and the ones in all seeds polled with ES16.
module tb_es_monitor #(
  parameter int unsigned XLEN           = 32,
  parameter int unsigned RELEASE_PERIOD = 64
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic            poll_i,
  input  logic [XLEN-1:0] rd_i,
  output int              checks,
  output int              failures,
  output int              n_es16,
  output int              n_wait,
  output int              n_bist,
  output int              n_dead,
  output int              n_alarm,
  output int              n_dead_entry,
  output int              n_latched_poll,
  output int              n_back_to_back,
  output int              ones,
  output int              seed_bits,
  output int              n_upper_ones
);
  logic [1:0] prev, opst;
  logic       prev_poll, alarm_pending;
  int         cyc, phase;
  logic [15:0] seed;

  initial begin
    checks = 0; failures = 0; n_es16 = 0; n_wait = 0; n_bist = 0; n_dead = 0;
    n_alarm = 0; n_dead_entry = 0; n_latched_poll = 0; n_back_to_back = 0;
    ones = 0; seed_bits = 0; n_upper_ones = 0;
    prev = 2'b00; prev_poll = 1'b0; alarm_pending = 1'b0; cyc = 0; phase = -1;
  end

  function automatic bit legal(logic [1:0] a, logic [1:0] b);
    // 00 BIST, 01 ES16, 10 WAIT, 11 DEAD
    if (a == b) return 1'b1;
    case (a)
      2'b00:   return b == 2'b10 || b == 2'b11;
      2'b10:   return 1'b1;
      2'b01:   return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  always @(posedge clk_i) begin
    if (!rst_ni) begin
      prev <= 2'b00; prev_poll <= 1'b0; alarm_pending <= 1'b0; cyc <= 0;
    end else begin
      opst = rd_i[31:30];
      seed = rd_i[15:0];
      cyc <= cyc + 1;
      checks++;
      if (rd_i[29:16] != '0) begin failures++; $display("reserved/custom bits set: %h", rd_i); end
      if (opst != 2'b01 && seed != '0) begin
        failures++; $display("seed visible outside ES16: %h", rd_i);
      end
      if (XLEN > 32) begin
        if (rd_i != XLEN'($signed(rd_i[31:0]))) begin
          failures++; $display("bit 31 not sign-extended: %h", rd_i);
        end
        if (rd_i[31]) n_upper_ones++;
      end
      if (!legal(prev, opst)) begin
        failures++; $display("illegal transition %b -> %b", prev, opst);
      end
      if (prev == 2'b01 && prev_poll && opst == 2'b01) begin
        failures++; $display("ES16 survived a poll");
      end
      if (prev == 2'b01 && opst == 2'b10 && !prev_poll) begin
        failures++; $display("ES16 lost without a poll");
      end
      if (prev == 2'b10 && opst == 2'b01) begin
        if (phase < 0) phase = cyc % RELEASE_PERIOD;
        else if (cyc % RELEASE_PERIOD != phase) begin
          failures++; $display("release off the grid at cycle %0d", cyc);
        end
      end
      if ((prev == 2'b01 || prev == 2'b10) && opst == 2'b00) begin
        n_alarm++; alarm_pending <= 1'b1;
      end
      if (prev != 2'b11 && opst == 2'b11) n_dead_entry++;
      if (prev == 2'b01 && prev_poll && poll_i) n_back_to_back++;
      if (poll_i) begin
        case (opst)
          2'b00: begin
            n_bist++;
            if (alarm_pending) begin n_latched_poll++; alarm_pending <= 1'b0; end
          end
          2'b01: begin
            n_es16++;
            seed_bits += 16;
            ones += $countones(seed);
          end
          2'b10: n_wait++;
          default: n_dead++;
        endcase
      end
      prev <= opst;
      prev_poll <= poll_i;
    end
  end
endmodule

// es_ctrl: operational-state machine of the entropy source.
//
// The state register holds the OPST value itself (00 BIST, 01 ES16, 10 WAIT,
// 11 DEAD). Reset enters BIST. BIST is the start-up test: a delay counter
// waits for BIST_SAMPLES raw samples while the continuous health tests run.
// A health failure during BIST is fatal (DEAD); otherwise the source goes
// live in WAIT. While live, the state is ES16 when the output buffer holds a
// released word and WAIT otherwise; a successful ES16 poll (read_o) wipes the
// word and returns to WAIT. A health failure while live is a non-fatal alarm:
// the health tests are zeroized and the source returns to BIST and repeats
// the test. That alarm is latched: BIST is left only after at least one poll
// has returned BIST. A fatal environmental alarm enters DEAD from any state,
// and only reset leaves DEAD.
//
// Interface: opst_o is registered; poll_i is sampled with opst_o, so a poll
// sees the state of the current clock. run_o is high in WAIT and ES16 and
// enables the conditioner and output buffer (they are flushed otherwise).
// The states, their encoding and the kinds of transition follow the interface
// definition; BIST_SAMPLES and the rule that a failure during BIST is fatal
// follow the Minidice start-up description, with the count this design's own.
module es_ctrl
  import es_pkg::*;
#(
  parameter int unsigned BIST_SAMPLES = 1024
) (
  input  logic  clk_i,
  input  logic  rst_ni,
  input  logic  sample_valid_i,
  input  logic  health_fail_i,
  input  logic  env_fatal_i,
  input  logic  buf_ready_i,
  input  logic  poll_i,
  output opst_e opst_o,
  output logic  run_o,
  output logic  health_clear_o,
  output logic  read_o
);

  localparam int unsigned CNT_W = $clog2(BIST_SAMPLES + 1);

  opst_e            state_q, state_d;
  logic [CNT_W-1:0] bist_cnt_q, bist_cnt_d;
  logic             alarm_q, alarm_d;
  logic             live;

  assign live   = (state_q == OPST_WAIT) || (state_q == OPST_ES16);
  assign read_o = poll_i && (state_q == OPST_ES16);

  always_comb begin
    state_d        = state_q;
    bist_cnt_d     = bist_cnt_q;
    alarm_d        = alarm_q;
    health_clear_o = 1'b0;
    if (env_fatal_i) begin
      state_d = OPST_DEAD;
    end else begin
      unique case (state_q)
        OPST_BIST: begin
          if (poll_i) alarm_d = 1'b0;
          if (health_fail_i) begin
            state_d = OPST_DEAD;
          end else begin
            if (sample_valid_i && bist_cnt_q != CNT_W'(BIST_SAMPLES))
              bist_cnt_d = bist_cnt_q + 1'b1;
            if (bist_cnt_q == CNT_W'(BIST_SAMPLES) && !alarm_q)
              state_d = OPST_WAIT;
          end
        end
        OPST_WAIT, OPST_ES16: begin
          if (health_fail_i) begin
            state_d        = OPST_BIST;
            bist_cnt_d     = '0;
            alarm_d        = 1'b1;
            health_clear_o = 1'b1;
          end else if (read_o) begin
            state_d = OPST_WAIT;
          end else begin
            state_d = buf_ready_i ? OPST_ES16 : OPST_WAIT;
          end
        end
        OPST_DEAD: state_d = OPST_DEAD;
        default:   state_d = OPST_DEAD;
      endcase
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q    <= OPST_BIST;
      bist_cnt_q <= '0;
      alarm_q    <= 1'b0;
    end else begin
      state_q    <= state_d;
      bist_cnt_q <= bist_cnt_d;
      alarm_q    <= alarm_d;
    end
  end

  assign opst_o = state_q;
  assign run_o  = live;

  // DEAD is permanent until reset.
  a_dead_sticky: assert property (@(posedge clk_i) disable iff (!rst_ni)
    state_q == OPST_DEAD |=> state_q == OPST_DEAD);
  // BIST is left through WAIT: the buffer is empty while not live.
  a_bist_to_wait: assert property (@(posedge clk_i) disable iff (!rst_ni)
    state_q == OPST_BIST |=> state_q inside {OPST_BIST, OPST_WAIT, OPST_DEAD});

endmodule

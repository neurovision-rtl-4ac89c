// net_controller: finite state machine that sequences the network layers.
//
// In IDLE (and in DONE) the FSM waits for a rising edge on `start`, which on
// the board comes from a switch. It then clears the membranes and spike
// counters and runs the image-dependent front end once:
//   START_CONV -> WAIT_CONV (until conv_done) -> START_POOL -> WAIT_POOL.
// Because the image is applied unchanged at every time step, the convolution
// and pooling results are the same for each step and are computed only once.
// Then, for each of NUM_STEPS time steps:
//   STEP_LIF1  hidden LIF layer integrates the pooled maps (lif1_step)
//   START_FC   fully connected layer starts on the new hidden spikes
//   WAIT_FC    until fc_done
//   STEP_LIF2  output LIF layer integrates the FC outputs (lif2_step)
//   NEXT_STEP  output spikes are counted (count_step); loop or finish
// and finally DONE, where `done` stays high until the next start.
// IDLE, START_CONV, WAIT_CONV, START_POOL, WAIT_POOL and DONE are the states
// the accelerator is built around; the per-step states are this design's.
//
// All outputs are decoded from the registered state (Moore), so each start or
// step strobe is a one-cycle pulse.
module net_controller
  import nv_pkg::*;
#(
  parameter int unsigned NUM_STEPS = 50,
  localparam int unsigned SB = $clog2(NUM_STEPS) > 0 ? $clog2(NUM_STEPS) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic          conv_done,
  input  logic          pool_done,
  input  logic          fc_done,
  output logic          clear,
  output logic          conv_start,
  output logic          pool_start,
  output logic          fc_start,
  output logic          lif1_step,
  output logic          lif2_step,
  output logic          count_step,
  output logic          busy,
  output logic          done,
  output logic [SB-1:0] step_idx,
  output nv_state_e     state
);

  logic start_q, start_rise;
  nv_state_e state_n;

  assign start_rise = start && !start_q;

  always_comb begin
    state_n = state;
    unique case (state)
      ST_IDLE, ST_DONE: if (start_rise) state_n = ST_START_CONV;
      ST_START_CONV:    state_n = ST_WAIT_CONV;
      ST_WAIT_CONV:     if (conv_done) state_n = ST_START_POOL;
      ST_START_POOL:    state_n = ST_WAIT_POOL;
      ST_WAIT_POOL:     if (pool_done) state_n = ST_STEP_LIF1;
      ST_STEP_LIF1:     state_n = ST_START_FC;
      ST_START_FC:      state_n = ST_WAIT_FC;
      ST_WAIT_FC:       if (fc_done) state_n = ST_STEP_LIF2;
      ST_STEP_LIF2:     state_n = ST_NEXT_STEP;
      ST_NEXT_STEP:     state_n = (step_idx == SB'(NUM_STEPS - 1)) ? ST_DONE : ST_STEP_LIF1;
      default:          state_n = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= ST_IDLE;
      start_q  <= 1'b0;
      step_idx <= '0;
    end else begin
      state   <= state_n;
      start_q <= start;
      if (state == ST_START_CONV) step_idx <= '0;
      else if (state == ST_NEXT_STEP && state_n == ST_STEP_LIF1) step_idx <= step_idx + 1'b1;
    end
  end

  assign clear      = (state == ST_START_CONV);
  assign conv_start = (state == ST_START_CONV);
  assign pool_start = (state == ST_START_POOL);
  assign fc_start   = (state == ST_START_FC);
  assign lif1_step  = (state == ST_STEP_LIF1);
  assign lif2_step  = (state == ST_STEP_LIF2);
  assign count_step = (state == ST_NEXT_STEP);
  assign busy       = (state != ST_IDLE) && (state != ST_DONE);
  assign done       = (state == ST_DONE);

  // The layer handshakes: a done pulse only arrives while its state waits.
  a_conv_done: assert property (@(posedge clk) disable iff (rst) conv_done |-> state == ST_WAIT_CONV);
  a_pool_done: assert property (@(posedge clk) disable iff (rst) pool_done |-> state == ST_WAIT_POOL);
  a_fc_done:   assert property (@(posedge clk) disable iff (rst) fc_done   |-> state == ST_WAIT_FC);

endmodule

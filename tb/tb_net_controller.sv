// tb_net_controller: self-checking test of the layer-sequencing FSM.
//
// Simple models of the three layers answer each start pulse with a done pulse
// after a random delay. With NUM_STEPS = 5 the testbench checks the order
// of the strobes (clear+conv start, pool start, then per step LIF1 step, FC
// start, LIF2 step, count), the number of each (1 conv, 1 pool, 5 of each
// per-step strobe), that the FSM waits in WAIT states until done, that a held
// start does not restart it, that `done` holds in DONE, and that a new start
// from DONE runs again.
module tb_net_controller;

  import nv_pkg::*;
  localparam int STEPS = 5;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, start, conv_done, pool_done, fc_done;
  logic clear, conv_start, pool_start, fc_start, lif1_step, lif2_step, count_step, busy, done;
  logic [2:0] step_idx;
  nv_state_e state;
  int checks = 0, failures = 0;

  net_controller #(.NUM_STEPS(STEPS)) dut (
    .clk, .rst, .start, .conv_done, .pool_done, .fc_done, .clear, .conv_start, .pool_start,
    .fc_start, .lif1_step, .lif2_step, .count_step, .busy, .done, .step_idx, .state
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Layer models: done pulse 2..9 cycles after start (sampled mid-cycle).
  initial begin
    conv_done = 0;
    forever begin
      @(negedge clk);
      if (conv_start) begin
        repeat ($urandom_range(2, 9)) @(negedge clk);
        conv_done = 1; @(negedge clk); conv_done = 0;
      end
    end
  end
  initial begin
    pool_done = 0;
    forever begin
      @(negedge clk);
      if (pool_start) begin
        repeat ($urandom_range(2, 9)) @(negedge clk);
        pool_done = 1; @(negedge clk); pool_done = 0;
      end
    end
  end
  initial begin
    fc_done = 0;
    forever begin
      @(negedge clk);
      if (fc_start) begin
        repeat ($urandom_range(2, 9)) @(negedge clk);
        fc_done = 1; @(negedge clk); fc_done = 0;
      end
    end
  end

  // Event log: 1 conv, 2 pool, 3 lif1, 4 fc, 5 lif2, 6 count.
  int log_q [$];
  int n_clear;
  always @(posedge clk) if (!rst) begin
    if (conv_start) log_q.push_back(1);
    if (pool_start) log_q.push_back(2);
    if (lif1_step)  log_q.push_back(3);
    if (fc_start)   log_q.push_back(4);
    if (lif2_step)  log_q.push_back(5);
    if (count_step) log_q.push_back(6);
    if (clear)      n_clear++;
  end

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_once(input int pass);
    int expect_q [$];
    log_q.delete(); n_clear = 0;
    @(negedge clk); start = 1;
    @(negedge clk);
    check(busy, "busy after start");
    wait (done);
    @(negedge clk);
    expect_q = '{1, 2};
    for (int s = 0; s < STEPS; s++) expect_q = {expect_q, 3, 4, 5, 6};
    check(log_q.size() == expect_q.size(), $sformatf("pass %0d: %0d strobes, expected %0d", pass, log_q.size(), expect_q.size()));
    for (int i = 0; i < expect_q.size() && i < log_q.size(); i++)
      check(log_q[i] == expect_q[i], $sformatf("pass %0d: strobe %0d is %0d expected %0d", pass, i, log_q[i], expect_q[i]));
    check(n_clear == 1, "one clear per run");
    // start still held: must stay in DONE
    repeat (20) @(negedge clk);
    check(done && !busy && state == ST_DONE, "held start does not restart; done holds");
    start = 0;
    @(negedge clk);
  endtask

  initial begin
    rst = 1; start = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    check(state == ST_IDLE && !busy && !done, "idle after reset");
    run_once(0);
    run_once(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

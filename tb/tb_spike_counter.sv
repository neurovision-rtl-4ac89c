// tb_spike_counter: self-checking test of spike_counter (10 classes, 16-bit).
//
// Random spike vectors are presented, with and without `step`; the counts are
// compared with a reference count after every cycle and `predicted` with the
// reference arg-max (lowest index on ties). A biased run makes class 7 win.
// A small 3-bit instance checks saturation at the maximum count.
module tb_spike_counter;

  localparam int N = 10;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, clear, step;
  logic [N-1:0] spikes;
  logic [15:0] counts [N];
  logic [3:0] predicted;
  int checks = 0, failures = 0;

  spike_counter dut (.clk, .rst, .clear, .step, .spikes, .counts, .predicted);

  logic s_step;
  logic [1:0] s_spk;
  logic [2:0] s_cnt [2];
  logic s_pred;
  spike_counter #(.N(2), .CW(3)) dut_sat (.clk, .rst, .clear, .step(s_step), .spikes(s_spk), .counts(s_cnt), .predicted(s_pred));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref_c [N];
    int best;
    rst = 1; clear = 0; step = 0; spikes = '0; s_step = 0; s_spk = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int run = 0; run < 3; run++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      foreach (ref_c[n]) ref_c[n] = 0;
      for (int t = 0; t < 200; t++) begin
        step = ($urandom_range(0, 3) != 0);
        for (int n = 0; n < N; n++)
          spikes[n] = (run == 1 && n == 7) ? ($urandom_range(0, 9) != 0) : ($urandom_range(0, 1) == 1);
        if (step) for (int n = 0; n < N; n++) if (spikes[n]) ref_c[n]++;
        @(negedge clk);
        best = 0;
        for (int n = 0; n < N; n++) begin
          check(int'(counts[n]) == ref_c[n], $sformatf("run %0d t %0d count[%0d]=%0d expected %0d", run, t, n, counts[n], ref_c[n]));
          if (ref_c[n] > ref_c[best]) best = n;
        end
        check(int'(predicted) == best, $sformatf("run %0d t %0d predicted %0d expected %0d", run, t, predicted, best));
      end
      if (run == 1) check(predicted == 4'd7, "biased class 7 wins");
      step = 0;
    end
    // Saturation of a 3-bit counter.
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    s_spk = 2'b01; s_step = 1;
    repeat (12) @(negedge clk);
    s_step = 0;
    check(s_cnt[0] == 3'd7 && s_cnt[1] == 3'd0, "3-bit counter saturates at 7");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_lif_layer: self-checking test of lif_layer (default 72 neurons, Q2.14).
//
// Random currents are applied for 40 steps; after each step every neuron's
// membrane and spike are compared with an integer model of
// U[t+1] = beta*U[t] + I - beta*S[t]*thr (weight 1.0, floored products,
// 16-bit saturation). Checks that all neurons update together on one step,
// that some but not all neurons spike, and that clear zeroes the layer.
module tb_lif_layer;

  localparam int N = 72;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, clear, step;
  logic signed [15:0] cur [N];
  logic signed [15:0] mem [N];
  logic signed [15:0] beta, thr;
  logic [N-1:0] spikes;
  int checks = 0, failures = 0;

  lif_layer dut (.clk, .rst, .clear, .step, .cur, .beta, .thr, .mem, .spikes);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint m [N];
    int total_spikes = 0;
    rst = 1; clear = 0; step = 0;
    beta = 16'sd13418; thr = 16'sd16384;
    foreach (m[i]) m[i] = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) cur[i] = 16'(int'($urandom_range(0, 12000)) - 3000 + i * 40);
      step = 1;
      for (int i = 0; i < N; i++) begin
        longint s;
        s = ((longint'(beta) * m[i]) >>> 14) + longint'(cur[i]) -
            ((m[i] > longint'(thr)) ? ((longint'(beta) * longint'(thr)) >>> 14) : 0);
        if (s > 32767) s = 32767;
        if (s < -32768) s = -32768;
        m[i] = s;
      end
      @(negedge clk);
      step = 0;
      for (int i = 0; i < N; i++) begin
        check(longint'(mem[i]) == m[i], $sformatf("t=%0d neuron %0d mem %0d expected %0d", t, i, mem[i], m[i]));
        check(spikes[i] == (m[i] > longint'(thr)), $sformatf("t=%0d neuron %0d spike", t, i));
        if (spikes[i]) total_spikes++;
      end
    end
    check(total_spikes > 0 && total_spikes < 40 * N, $sformatf("spike total %0d is neither none nor all", total_spikes));
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < N; i++) check(mem[i] == 0 && !spikes[i], "clear zeroes neuron");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_lif_neuron: self-checking test of lif_neuron.
//
// Part 1 repeats the published single-neuron experiment in Q16.16
// (x = 0.4, w = 0.5, beta = 0.819, threshold ~1.0) for 30 steps and compares
// the membrane each step with a real-number model of
// U[t+1] = beta*U[t] + w*x - beta*S[t]*thr (tolerance 1e-3) and the spike
// with the model's spike. Part 2 drives random inputs in Q2.14 and compares
// bit-exactly with an integer model that floors each product and saturates
// to 16 bits. It also checks that `clear` zeroes the membrane and that the
// neuron holds its state without `step`.
module tb_lif_neuron;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- Part 1: Q16.16 ----------------
  logic rst, clear, step;
  logic signed [31:0] x, w, beta, thr, mem;
  logic spike;

  lif_neuron #(.W(32), .FRAC(16)) dut32 (
    .clk, .rst, .clear, .step, .x, .w, .beta, .thr, .mem, .spike
  );

  // ---------------- Part 2: Q2.14 ----------------
  logic clear16, step16;
  logic signed [15:0] x16, w16, beta16, thr16, mem16;
  logic spike16;

  lif_neuron #(.W(16), .FRAC(14)) dut16 (
    .clk, .rst, .clear(clear16), .step(step16), .x(x16), .w(w16), .beta(beta16),
    .thr(thr16), .mem(mem16), .spike(spike16)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic longint flr_mul(longint a, longint b, int frac);
    return (a * b) >>> frac;
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real u, b, xr, wr, tr;
    bit  s, fired;
    longint um, nm;
    int n_spikes;

    rst = 1; clear = 0; step = 0; clear16 = 0; step16 = 0;
    x = 26214; w = 32768; beta = 53673; thr = 65535;
    x16 = 0; w16 = 0; beta16 = 0; thr16 = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    check(mem == 0 && !spike, "membrane zero after reset");

    xr = 26214.0 / 65536.0; wr = 0.5; b = 53673.0 / 65536.0; tr = 65535.0 / 65536.0;
    u = 0.0; n_spikes = 0; fired = 0;
    for (int t = 0; t < 30; t++) begin
      s = (u > tr);
      u = b * u + wr * xr - (s ? b * tr : 0.0);
      step = 1;
      @(negedge clk);
      step = 0;
      check((real'(mem) / 65536.0 - u) < 1e-3 && (u - real'(mem) / 65536.0) < 1e-3,
            $sformatf("Q16.16 step %0d: mem %f expected %f", t, real'(mem) / 65536.0, u));
      check(spike == (u > tr), $sformatf("Q16.16 step %0d: spike %0b", t, spike));
      if (spike) n_spikes++;
    end
    // Steady state 0.2/(1-0.819) = 1.105 exceeds the threshold, so it must fire.
    check(n_spikes > 0, "neuron fired at least once in 30 steps");
    // Hold without step.
    um = mem;
    repeat (3) @(negedge clk);
    check(mem == um, "membrane holds without step");
    clear = 1; @(negedge clk); clear = 0;
    check(mem == 0, "clear zeroes membrane");

    // Part 2: random bit-exact in Q2.14.
    nm = 0;
    for (int r = 0; r < 400; r++) begin
      longint sum, p1, p2, p3;
      bit sp;
      x16 = 16'($urandom_range(0, 65535));
      w16 = 16'($urandom_range(0, 65535));
      beta16 = 16'($urandom_range(0, 16384));   // 0 .. 1.0
      thr16  = 16'($urandom_range(4096, 24576));
      if (r % 50 == 0) begin
        clear16 = 1; @(negedge clk); clear16 = 0;
        nm = 0;
        check(mem16 == 0, "Q2.14 clear");
      end
      sp = (nm > longint'(thr16));
      p1 = flr_mul(longint'(beta16), nm, 14);
      p2 = flr_mul(longint'(w16), longint'(x16), 14);
      p3 = sp ? flr_mul(longint'(beta16), longint'(thr16), 14) : 0;
      sum = p1 + p2 - p3;
      if (sum > 32767) sum = 32767;
      if (sum < -32768) sum = -32768;
      #1;
      check(spike16 == sp, $sformatf("Q2.14 #%0d spike before step", r));
      step16 = 1; @(negedge clk); step16 = 0;
      nm = sum;
      check(longint'(mem16) == nm, $sformatf("Q2.14 #%0d mem %0d expected %0d", r, mem16, nm));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

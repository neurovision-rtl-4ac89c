// tb_fc_layer: self-checking test of fc_layer.
//
// Part 1 is the published 5-input, 2-output example in Q2.14: inputs
// [-0.5, 0.7, 0.2, -0.3, 0.6], weights [[-0.2, 0.4, -0.6, 0.8, -0.1],
// [0.5, -0.3, 0.2, -0.4, 0.7]], biases [0.1, -0.1]. Its weighted sums are
// 0.06 and 0.02, checked to within 1e-3. Part 2 uses the default sizes
// (72 inputs, 10 outputs) with random data, including 0/1.0 spike inputs as
// the network supplies, compares bit-exactly with an integer reference and
// checks that a pass takes 72*10 = 720 cycles.
module tb_fc_layer;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic signed [15:0] q14(real v);
    return 16'($rtoi(v * 16384.0 + (v >= 0 ? 0.5 : -0.5)));
  endfunction

  logic s_start, s_busy, s_done;
  logic signed [15:0] s_in [5];
  logic signed [15:0] s_w  [2][5];
  logic signed [15:0] s_b  [2];
  logic signed [15:0] s_out [2];
  fc_layer #(.N_IN(5), .N_OUT(2), .W(16), .FRAC(14)) dut_s (
    .clk, .rst, .start(s_start), .busy(s_busy), .done(s_done),
    .in_vec(s_in), .weights(s_w), .bias(s_b), .out_vec(s_out)
  );

  localparam int NI = 72, NO = 10;
  logic d_start, d_busy, d_done;
  logic signed [15:0] d_in [NI];
  logic signed [15:0] d_w  [NO][NI];
  logic signed [15:0] d_b  [NO];
  logic signed [15:0] d_out [NO];
  fc_layer dut_d (
    .clk, .rst, .start(d_start), .busy(d_busy), .done(d_done),
    .in_vec(d_in), .weights(d_w), .bias(d_b), .out_vec(d_out)
  );

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xin [5] = '{-0.5, 0.7, 0.2, -0.3, 0.6};
    real wr [2][5] = '{'{-0.2, 0.4, -0.6, 0.8, -0.1}, '{0.5, -0.3, 0.2, -0.4, 0.7}};
    real br [2] = '{0.1, -0.1};
    real expv [2] = '{0.06, 0.02};
    int cycles;
    rst = 1; s_start = 0; d_start = 0;
    for (int i = 0; i < 5; i++) s_in[i] = q14(xin[i]);
    for (int j = 0; j < 2; j++) begin
      s_b[j] = q14(br[j]);
      for (int i = 0; i < 5; i++) s_w[j][i] = q14(wr[j][i]);
    end
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk); s_start = 1; @(negedge clk); s_start = 0;
    wait (s_done); @(negedge clk);
    for (int j = 0; j < 2; j++) begin
      real v;
      v = real'(s_out[j]) / 16384.0;
      check(v > expv[j] - 1e-3 && v < expv[j] + 1e-3, $sformatf("published example out[%0d] = %f expected %f", j, v, expv[j]));
    end

    for (int run = 0; run < 4; run++) begin
      for (int i = 0; i < NI; i++)
        d_in[i] = (run < 2) ? (($urandom_range(0, 1) == 1) ? 16'sd16384 : 16'sd0) : 16'($urandom_range(0, 65535));
      for (int j = 0; j < NO; j++) begin
        d_b[j] = 16'($urandom_range(0, 65535));
        for (int i = 0; i < NI; i++) d_w[j][i] = 16'($urandom_range(0, 65535));
      end
      @(negedge clk); d_start = 1; @(negedge clk); d_start = 0;
      cycles = 1;
      while (!d_done) begin @(negedge clk); cycles++; end
      check(cycles == NI * NO + 1, $sformatf("fc pass took %0d cycles", cycles));
      for (int j = 0; j < NO; j++) begin
        longint acc;
        acc = longint'(d_b[j]);
        for (int i = 0; i < NI; i++) acc += (longint'(d_w[j][i]) * longint'(d_in[i])) >>> 14;
        if (acc > 32767) acc = 32767;
        if (acc < -32768) acc = -32768;
        check(longint'(d_out[j]) == acc, $sformatf("run %0d out[%0d] = %0d expected %0d", run, j, d_out[j], acc));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

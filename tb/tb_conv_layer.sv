// tb_conv_layer: self-checking test of conv_layer.
//
// Part 1 is the published 2x2 example in Q1.15: input [0.47 0.78; 0.31 0.59],
// filters [-0.3 0.8; 0.6 -0.5] and [0.1 -0.7; 0.4 0.2], biases 0.01 and -0.01,
// expected outputs 0.384 and -0.267 (checked to within 1e-3). Part 2 uses the
// default geometry (8x8 image, eight 3x3 filters, Q2.14) with random data and
// compares every output with an integer reference model (floored products,
// saturation), and checks that a pass takes OUT_CH*36*9 = 2592 cycles.
module tb_conv_layer;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic signed [15:0] q15(real v);
    return 16'($rtoi(v * 32768.0 + (v >= 0 ? 0.5 : -0.5)));
  endfunction

  // ---- Part 1: 2x2 image, 2x2 filters, two output channels, Q1.15 ----
  logic s_start, s_busy, s_done;
  logic signed [15:0] s_in [1][2][2];
  logic signed [15:0] s_w  [2][1][2][2];
  logic signed [15:0] s_b  [2];
  logic signed [15:0] s_out [2][1][1];

  conv_layer #(.IMG(2), .K(2), .IN_CH(1), .OUT_CH(2), .W(16), .FRAC(15)) dut_s (
    .clk, .rst, .start(s_start), .busy(s_busy), .done(s_done),
    .in_map(s_in), .weights(s_w), .bias(s_b), .out_map(s_out)
  );

  // ---- Part 2: default geometry, Q2.14 ----
  localparam int IMG = 8, K = 3, OC = 8, O = 6;
  logic d_start, d_busy, d_done;
  logic signed [15:0] d_in [1][IMG][IMG];
  logic signed [15:0] d_w  [OC][1][K][K];
  logic signed [15:0] d_b  [OC];
  logic signed [15:0] d_out [OC][O][O];

  conv_layer dut_d (
    .clk, .rst, .start(d_start), .busy(d_busy), .done(d_done),
    .in_map(d_in), .weights(d_w), .bias(d_b), .out_map(d_out)
  );

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r0, r1;
    int cycles;
    rst = 1; s_start = 0; d_start = 0;
    s_in[0][0][0] = q15(0.47); s_in[0][0][1] = q15(0.78);
    s_in[0][1][0] = q15(0.31); s_in[0][1][1] = q15(0.59);
    s_w[0][0][0][0] = q15(-0.3); s_w[0][0][0][1] = q15(0.8);
    s_w[0][0][1][0] = q15(0.6);  s_w[0][0][1][1] = q15(-0.5);
    s_w[1][0][0][0] = q15(0.1);  s_w[1][0][0][1] = q15(-0.7);
    s_w[1][0][1][0] = q15(0.4);  s_w[1][0][1][1] = q15(0.2);
    s_b[0] = q15(0.01); s_b[1] = q15(-0.01);
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk); s_start = 1; @(negedge clk); s_start = 0;
    wait (s_done); @(negedge clk);
    r0 = real'(s_out[0][0][0]) / 32768.0;
    r1 = real'(s_out[1][0][0]) / 32768.0;
    check(r0 > 0.383 && r0 < 0.385, $sformatf("published example ch0 = %f, expected 0.384", r0));
    check(r1 > -0.268 && r1 < -0.266, $sformatf("published example ch1 = %f, expected -0.267", r1));

    for (int run = 0; run < 3; run++) begin
      for (int y = 0; y < IMG; y++)
        for (int x = 0; x < IMG; x++) d_in[0][y][x] = 16'($urandom_range(0, 65535));
      for (int o = 0; o < OC; o++) begin
        d_b[o] = 16'($urandom_range(0, 65535));
        for (int y = 0; y < K; y++)
          for (int x = 0; x < K; x++)
            d_w[o][0][y][x] = (run == 2) ? 16'sh7fff : 16'($urandom_range(0, 65535));
      end
      if (run == 2) for (int y = 0; y < IMG; y++) for (int x = 0; x < IMG; x++) d_in[0][y][x] = 16'sh7fff;
      @(negedge clk); d_start = 1; @(negedge clk); d_start = 0;
      cycles = 1;
      while (!d_done) begin @(negedge clk); cycles++; end
      check(cycles == OC * O * O * K * K + 1,
            $sformatf("conv pass took %0d cycles, expected %0d", cycles, OC * O * O * K * K + 1));
      for (int o = 0; o < OC; o++)
        for (int oy = 0; oy < O; oy++)
          for (int ox = 0; ox < O; ox++) begin
            longint acc;
            acc = longint'(d_b[o]);
            for (int ky = 0; ky < K; ky++)
              for (int kx = 0; kx < K; kx++)
                acc += (longint'(d_w[o][0][ky][kx]) * longint'(d_in[0][oy + ky][ox + kx])) >>> 14;
            if (acc > 32767) acc = 32767;
            if (acc < -32768) acc = -32768;
            check(longint'(d_out[o][oy][ox]) == acc,
                  $sformatf("run %0d out[%0d][%0d][%0d] = %0d expected %0d", run, o, oy, ox, d_out[o][oy][ox], acc));
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

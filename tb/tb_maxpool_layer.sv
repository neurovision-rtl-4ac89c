// tb_maxpool_layer: self-checking test of maxpool_layer.
//
// Part 1 is the published 4x4 example (values in [-1, 1], Q2.14), whose 2x2
// max pooling with stride 2 must give [[0.7, 0.9], [0.5, 0.6]]. Part 2 uses
// the default geometry (8 channels of 6x6) with random data and compares with
// a reference maximum over every window, and checks that a pass takes
// 8*3*3*4 = 288 cycles.
module tb_maxpool_layer;

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
  logic signed [15:0] s_in  [1][4][4];
  logic signed [15:0] s_out [1][2][2];
  maxpool_layer #(.CH(1), .IN_DIM(4), .POOL(2), .W(16)) dut_s (
    .clk, .rst, .start(s_start), .busy(s_busy), .done(s_done), .in_map(s_in), .out_map(s_out)
  );

  localparam int CH = 8, D = 6, OD = 3;
  logic d_start, d_busy, d_done;
  logic signed [15:0] d_in  [CH][D][D];
  logic signed [15:0] d_out [CH][OD][OD];
  maxpool_layer dut_d (
    .clk, .rst, .start(d_start), .busy(d_busy), .done(d_done), .in_map(d_in), .out_map(d_out)
  );

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ex [4][4] = '{'{-0.5, 0.2, 0.8, -0.1}, '{0.7, -0.6, 0.4, 0.9},
                       '{-0.3, 0.5, -0.2, 0.1}, '{0.2, -0.8, 0.6, -0.4}};
    real exp_out [2][2] = '{'{0.7, 0.9}, '{0.5, 0.6}};
    int cycles;
    rst = 1; s_start = 0; d_start = 0;
    for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) s_in[0][y][x] = q14(ex[y][x]);
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk); s_start = 1; @(negedge clk); s_start = 0;
    wait (s_done); @(negedge clk);
    for (int y = 0; y < 2; y++)
      for (int x = 0; x < 2; x++)
        check(s_out[0][y][x] == q14(exp_out[y][x]),
              $sformatf("published example out[%0d][%0d] = %f expected %f", y, x, real'(s_out[0][y][x]) / 16384.0, exp_out[y][x]));

    for (int run = 0; run < 4; run++) begin
      for (int c = 0; c < CH; c++)
        for (int y = 0; y < D; y++)
          for (int x = 0; x < D; x++)
            d_in[c][y][x] = (run == 3) ? -16'sd32768 + 16'(x) : 16'($urandom_range(0, 65535));
      @(negedge clk); d_start = 1; @(negedge clk); d_start = 0;
      cycles = 1;
      while (!d_done) begin @(negedge clk); cycles++; end
      check(cycles == CH * OD * OD * 4 + 1, $sformatf("pool pass took %0d cycles", cycles));
      for (int c = 0; c < CH; c++)
        for (int oy = 0; oy < OD; oy++)
          for (int ox = 0; ox < OD; ox++) begin
            logic signed [15:0] m;
            m = d_in[c][2 * oy][2 * ox];
            for (int py = 0; py < 2; py++)
              for (int px = 0; px < 2; px++)
                if (d_in[c][2 * oy + py][2 * ox + px] > m) m = d_in[c][2 * oy + py][2 * ox + px];
            check(d_out[c][oy][ox] == m, $sformatf("run %0d out[%0d][%0d][%0d] = %0d expected %0d", run, c, oy, ox, d_out[c][oy][ox], m));
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

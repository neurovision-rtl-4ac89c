// tb_mnist28_network: the 28x28 MNIST variant of the network, assembled from
// the same layer modules and run end to end.
//
//   image 28x28 -> conv 8x5x5 (24x24x8) -> max-pool (12x12x8) -> LIF x1152
//   -> conv 16x5x5 on the spikes (8x8x16) -> max-pool (4x4x16) -> LIF x256
//   -> flatten -> FC 256->10 -> LIF x10 -> spike counter
//
// The accelerator top only contains the single-stage 8x8 network; here the
// testbench itself sequences the layers (start/done handshakes) for STEPS
// time steps. The first convolution and pooling depend only on the image and
// run once; the second convolution runs every step because its input is the
// changing spike map of the first LIF layer (spike = 1.0). A reference model
// in integer arithmetic (floored products, 16-bit saturation) checks the
// first pooled map, the number of spikes of each LIF layer at every step, the
// final spike counts and the predicted class, and each layer's cycle count.
module tb_mnist28_network;

  localparam int STEPS = 6;
  localparam int I1 = 28, K = 5, C1 = 8, O1 = 24, P1 = 12, N1 = C1 * P1 * P1;
  localparam int C2 = 16, O2 = 8, P2 = 4, N2 = C2 * P2 * P2, NO = 10;
  localparam logic signed [15:0] ONE = 16'sd16384;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, clear;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  logic signed [15:0] beta = 16'sd13418, thr = 16'sd16384;

  // Stage 1
  logic c1_start, c1_busy, c1_done, p1_start, p1_busy, p1_done, l1_step;
  logic signed [15:0] img  [1][I1][I1];
  logic signed [15:0] w1   [C1][1][K][K];
  logic signed [15:0] b1   [C1];
  logic signed [15:0] c1_map [C1][O1][O1];
  logic signed [15:0] p1_map [C1][P1][P1];
  logic signed [15:0] l1_cur [N1];
  logic signed [15:0] l1_mem [N1];
  logic [N1-1:0]      l1_spk;

  conv_layer #(.IMG(I1), .K(K), .IN_CH(1), .OUT_CH(C1)) u_c1 (
    .clk, .rst, .start(c1_start), .busy(c1_busy), .done(c1_done),
    .in_map(img), .weights(w1), .bias(b1), .out_map(c1_map));
  maxpool_layer #(.CH(C1), .IN_DIM(O1)) u_p1 (
    .clk, .rst, .start(p1_start), .busy(p1_busy), .done(p1_done), .in_map(c1_map), .out_map(p1_map));
  for (genvar c = 0; c < C1; c++) for (genvar y = 0; y < P1; y++) for (genvar x = 0; x < P1; x++)
    assign l1_cur[(c * P1 + y) * P1 + x] = p1_map[c][y][x];
  lif_layer #(.N(N1)) u_l1 (.clk, .rst, .clear, .step(l1_step), .cur(l1_cur), .beta, .thr, .mem(l1_mem), .spikes(l1_spk));

  // Stage 2
  logic c2_start, c2_busy, c2_done, p2_start, p2_busy, p2_done, l2_step;
  logic signed [15:0] s1_map [C1][P1][P1];
  logic signed [15:0] w2   [C2][C1][K][K];
  logic signed [15:0] b2   [C2];
  logic signed [15:0] c2_map [C2][O2][O2];
  logic signed [15:0] p2_map [C2][P2][P2];
  logic signed [15:0] l2_cur [N2];
  logic signed [15:0] l2_mem [N2];
  logic [N2-1:0]      l2_spk;

  for (genvar c = 0; c < C1; c++) for (genvar y = 0; y < P1; y++) for (genvar x = 0; x < P1; x++)
    assign s1_map[c][y][x] = l1_spk[(c * P1 + y) * P1 + x] ? ONE : '0;
  conv_layer #(.IMG(P1), .K(K), .IN_CH(C1), .OUT_CH(C2)) u_c2 (
    .clk, .rst, .start(c2_start), .busy(c2_busy), .done(c2_done),
    .in_map(s1_map), .weights(w2), .bias(b2), .out_map(c2_map));
  maxpool_layer #(.CH(C2), .IN_DIM(O2)) u_p2 (
    .clk, .rst, .start(p2_start), .busy(p2_busy), .done(p2_done), .in_map(c2_map), .out_map(p2_map));
  for (genvar c = 0; c < C2; c++) for (genvar y = 0; y < P2; y++) for (genvar x = 0; x < P2; x++)
    assign l2_cur[(c * P2 + y) * P2 + x] = p2_map[c][y][x];
  lif_layer #(.N(N2)) u_l2 (.clk, .rst, .clear, .step(l2_step), .cur(l2_cur), .beta, .thr, .mem(l2_mem), .spikes(l2_spk));

  // Classifier
  logic f_start, f_busy, f_done, l3_step, cnt_step;
  logic signed [15:0] f_in  [N2];
  logic signed [15:0] wf    [NO][N2];
  logic signed [15:0] bf    [NO];
  logic signed [15:0] f_out [NO];
  logic signed [15:0] l3_mem [NO];
  logic [NO-1:0]      l3_spk;
  logic [15:0]        counts [NO];
  logic [3:0]         predicted;

  for (genvar i = 0; i < N2; i++) assign f_in[i] = l2_spk[i] ? ONE : '0;
  fc_layer #(.N_IN(N2), .N_OUT(NO)) u_fc (
    .clk, .rst, .start(f_start), .busy(f_busy), .done(f_done),
    .in_vec(f_in), .weights(wf), .bias(bf), .out_vec(f_out));
  lif_layer #(.N(NO)) u_l3 (.clk, .rst, .clear, .step(l3_step), .cur(f_out), .beta, .thr, .mem(l3_mem), .spikes(l3_spk));
  spike_counter #(.N(NO)) u_cnt (.clk, .rst, .clear, .step(cnt_step), .spikes(l3_spk), .counts, .predicted);

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat16(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction
  function automatic longint mulq(longint a, longint b);
    return (a * b) >>> 14;
  endfunction

  // Pulse a strobe for one cycle.
  task automatic pulse(ref logic s);
    s = 1; @(negedge clk); s = 0;
  endtask

  // Start a layer, wait for done and return the cycles taken.
  task automatic run_layer(ref logic st, ref logic dn, output int cycles);
    st = 1; @(negedge clk); st = 0;
    cycles = 1;
    while (!dn) begin @(negedge clk); cycles++; end
  endtask

  // Reference state.
  longint rp1 [C1][P1][P1];
  longint rm1 [N1], rm2 [N2], rm3 [NO];
  bit     rs1 [N1], rs2 [N2], rs3 [NO];
  int     rcnt [NO];

  // One LIF update of the reference model.
  function automatic longint lif_next(longint m, longint cur, longint b, longint th);
    return sat16(mulq(b, m) + cur - ((m > th) ? mulq(b, th) : 0));
  endfunction

  initial begin
    int cyc, best, n1_total, n2_total, n3_total;
    rst = 1; clear = 0;
    {c1_start, p1_start, l1_step, c2_start, p2_start, l2_step, f_start, l3_step, cnt_step} = '0;
    // Data: a bright diagonal stroke and a bar on a dark background.
    for (int y = 0; y < I1; y++)
      for (int x = 0; x < I1; x++)
        img[0][y][x] = (x == y || x == y + 1 || (y == 14 && x > 4 && x < 22)) ? 16'(15000 + $urandom_range(0, 1300)) : 16'($urandom_range(0, 800));
    for (int o = 0; o < C1; o++) begin
      b1[o] = 16'($urandom_range(0, 3000));
      for (int y = 0; y < K; y++) for (int x = 0; x < K; x++) w1[o][0][y][x] = 16'(int'($urandom_range(0, 6000)) - 2000);
    end
    for (int o = 0; o < C2; o++) begin
      b2[o] = 16'(int'($urandom_range(0, 4000)) - 1000);
      for (int c = 0; c < C1; c++)
        for (int y = 0; y < K; y++) for (int x = 0; x < K; x++) w2[o][c][y][x] = 16'(int'($urandom_range(0, 2400)) - 1100);
    end
    for (int j = 0; j < NO; j++) begin
      bf[j] = 16'(int'($urandom_range(0, 8000)) - 2000);
      for (int i = 0; i < N2; i++) wf[j][i] = 16'(int'($urandom_range(0, 5000)) - 2500 + ((j == 3) ? 300 : 0));
    end
    repeat (3) @(negedge clk);
    rst = 0;
    pulse(clear);

    // Reference: stage 1 front end.
    for (int o = 0; o < C1; o++)
      for (int y = 0; y < P1; y++)
        for (int x = 0; x < P1; x++) begin
          longint m;
          for (int py = 0; py < 2; py++)
            for (int px = 0; px < 2; px++) begin
              longint a;
              a = b1[o];
              for (int ky = 0; ky < K; ky++)
                for (int kx = 0; kx < K; kx++) a += mulq(w1[o][0][ky][kx], img[0][2 * y + py + ky][2 * x + px + kx]);
              a = sat16(a);
              if ((py == 0 && px == 0) || a > m) m = a;
            end
          rp1[o][y][x] = m;
        end
    foreach (rm1[i]) rm1[i] = 0;
    foreach (rm2[i]) rm2[i] = 0;
    foreach (rm3[i]) rm3[i] = 0;
    foreach (rcnt[i]) rcnt[i] = 0;

    run_layer(c1_start, c1_done, cyc);
    check(cyc == C1 * O1 * O1 * K * K + 1, $sformatf("conv1 took %0d cycles", cyc));
    run_layer(p1_start, p1_done, cyc);
    check(cyc == C1 * P1 * P1 * 4 + 1, $sformatf("pool1 took %0d cycles", cyc));
    for (int o = 0; o < C1; o++) for (int y = 0; y < P1; y++) for (int x = 0; x < P1; x++)
      check(longint'(p1_map[o][y][x]) == rp1[o][y][x], $sformatf("pool1[%0d][%0d][%0d]", o, y, x));

    n1_total = 0; n2_total = 0; n3_total = 0;
    for (int t = 0; t < STEPS; t++) begin
      int n1, n2, n1d, n2d;
      // Reference for this step.
      n1 = 0;
      for (int i = 0; i < N1; i++) begin
        rm1[i] = lif_next(rm1[i], rp1[i / 144][(i % 144) / 12][i % 12], beta, thr);
        rs1[i] = rm1[i] > thr;
        if (rs1[i]) n1++;
      end
      n2 = 0;
      for (int o = 0; o < C2; o++)
        for (int y = 0; y < P2; y++)
          for (int x = 0; x < P2; x++) begin
            longint m;
            for (int py = 0; py < 2; py++)
              for (int px = 0; px < 2; px++) begin
                longint a;
                a = b2[o];
                for (int c = 0; c < C1; c++)
                  for (int ky = 0; ky < K; ky++)
                    for (int kx = 0; kx < K; kx++)
                      if (rs1[(c * P1 + 2 * y + py + ky) * P1 + 2 * x + px + kx]) a += mulq(w2[o][c][ky][kx], 16384);
                a = sat16(a);
                if ((py == 0 && px == 0) || a > m) m = a;
              end
            rm2[(o * P2 + y) * P2 + x] = lif_next(rm2[(o * P2 + y) * P2 + x], m, beta, thr);
            rs2[(o * P2 + y) * P2 + x] = rm2[(o * P2 + y) * P2 + x] > thr;
            if (rs2[(o * P2 + y) * P2 + x]) n2++;
          end
      for (int j = 0; j < NO; j++) begin
        longint a;
        a = bf[j];
        for (int i = 0; i < N2; i++) if (rs2[i]) a += mulq(wf[j][i], 16384);
        rm3[j] = lif_next(rm3[j], sat16(a), beta, thr);
        rs3[j] = rm3[j] > thr;
        if (rs3[j]) begin rcnt[j]++; n3_total++; end
      end
      n1_total += n1; n2_total += n2;

      // Design.
      pulse(l1_step);
      n1d = $countones(l1_spk);
      check(n1d == n1, $sformatf("step %0d: LIF1 spikes %0d expected %0d", t, n1d, n1));
      run_layer(c2_start, c2_done, cyc);
      check(cyc == C2 * O2 * O2 * C1 * K * K + 1, $sformatf("conv2 took %0d cycles", cyc));
      run_layer(p2_start, p2_done, cyc);
      pulse(l2_step);
      n2d = $countones(l2_spk);
      check(n2d == n2, $sformatf("step %0d: LIF2 spikes %0d expected %0d", t, n2d, n2));
      run_layer(f_start, f_done, cyc);
      check(cyc == NO * N2 + 1, $sformatf("fc took %0d cycles", cyc));
      pulse(l3_step);
      for (int j = 0; j < NO; j++) check(l3_spk[j] == rs3[j], $sformatf("step %0d: output spike %0d", t, j));
      pulse(cnt_step);
    end
    best = 0;
    for (int j = 0; j < NO; j++) begin
      check(int'(counts[j]) == rcnt[j], $sformatf("count[%0d] = %0d expected %0d", j, counts[j], rcnt[j]));
      if (rcnt[j] > rcnt[best]) best = j;
    end
    check(int'(predicted) == best, "predicted class");
    $display("28x28 network: LIF1 spikes %0d, LIF2 spikes %0d, output spikes %0d, counts %p, predicted %0d",
             n1_total, n2_total, n3_total, rcnt, best);
    check(n1_total > 0 && n2_total > 0 && n3_total > 0, "every LIF layer spiked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

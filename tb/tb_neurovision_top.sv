// tb_neurovision_top: end-to-end test of the whole classifier at its default
// sizes (8x8 image, eight 3x3 filters, 72 hidden LIF neurons, 10 outputs,
// 50 time steps, 16-bit words with 14 fractional bits).
//
// The testbench generates an image and a random parameter set, writes them
// through the load port, starts a classification and waits for `done`. A
// reference model written here (integer arithmetic: floored products, 16-bit
// saturation) computes the convolution, pooling, hidden LIF spikes per step,
// FC outputs, output LIF spikes, spike counts and the predicted class; the
// design's conv and pool maps, every per-class count and the predicted class
// are compared with it, and the total cycle count with the schedule
//   1 + (2592+1) + 1 + (288+1) + 50*(1 + 1 + (720+1) + 1 + 1).
// Three images are classified back to back (restart from DONE), the last with
// beta and threshold reprogrammed. The test counts how often each mechanism
// occurred (hidden spikes, output spikes, soft resets, membrane saturation,
// saturated conv outputs, restarts, histogram pixels lit) and fails any that
// never did.
module tb_neurovision_top;

  import nv_pkg::*;

  localparam int IMG = 8, K = 3, OC = 8, O = 6, PD = 3, NH = 72, NO = 10, STEPS = 50;
  localparam int A_CW = 64, A_CB = A_CW + 72, A_FW = A_CB + 8, A_FB = A_FW + 720;
  localparam int A_BETA = A_FB + 10, A_THR = A_BETA + 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, start, ld_en, busy, done;
  logic [11:0] ld_addr;
  logic signed [15:0] ld_data;
  logic [3:0] predicted;
  logic [15:0] spike_count [NO];
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic [23:0] pixel;

  neurovision_top dut (
    .clk, .rst, .start, .ld_en, .ld_addr, .ld_data, .busy, .done, .predicted, .spike_count,
    .hcount, .vcount, .pixel
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  // Mechanism counters.
  int n_hid_spikes, n_out_spikes, n_soft_reset, n_mem_sat, n_conv_sat, n_restart, n_pixels_lit;

  // Parameters and image (reference copies).
  longint img [IMG][IMG];
  longint cw [OC][K][K];
  longint cb [OC];
  longint fw [NO][NH];
  longint fb [NO];
  longint beta_r, thr_r;

  function automatic longint sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic longint mulq(longint a, longint b);
    return (a * b) >>> 14;
  endfunction

  function automatic longint rnd(int lo, int hi);
    return longint'($urandom_range(0, hi - lo)) + lo;
  endfunction

  task automatic write_word(int a, longint v);
    @(negedge clk);
    ld_en = 1; ld_addr = 12'(a); ld_data = 16'(v);
    @(negedge clk);
    ld_en = 0;
  endtask

  task automatic load_all(int img_no);
    // Image: a bright stroke pattern that differs per image, values 0 .. ~1.
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++) begin
        img[y][x] = ((x + y + img_no) % 3 == 0 || x == img_no + 2) ? rnd(12000, 16383) : rnd(0, 2000);
        write_word(y * IMG + x, img[y][x]);
      end
    for (int o = 0; o < OC; o++) begin
      for (int y = 0; y < K; y++)
        for (int x = 0; x < K; x++) begin
          // Filter 0 is all +0.9 so that its output saturates at the bright stroke.
          cw[o][y][x] = (o == 0) ? 14746 : rnd(-8000, 8000);
          write_word(A_CW + (o * K + y) * K + x, cw[o][y][x]);
        end
      cb[o] = rnd(-1000, 3000);
      write_word(A_CB + o, cb[o]);
    end
    for (int j = 0; j < NO; j++) begin
      for (int i = 0; i < NH; i++) begin
        fw[j][i] = rnd(-5000, 5000) + ((j == (7 + 3 * img_no) % NO) ? 1200 : 0);
        write_word(A_FW + j * NH + i, fw[j][i]);
      end
      fb[j] = rnd(-3000, 6000);
      write_word(A_FB + j, fb[j]);
    end
  endtask

  task automatic classify_and_check(int img_no);
    longint conv [OC][O][O];
    longint pool [OC][PD][PD];
    longint hmem [NH];
    longint omem [NO];
    bit     hspk [NH];
    bit     ospk [NO];
    longint fco [NO];
    int     cnt [NO];
    int     best, cycles, expect_cycles;

    // Reference model.
    for (int o = 0; o < OC; o++)
      for (int y = 0; y < O; y++)
        for (int x = 0; x < O; x++) begin
          longint a;
          a = cb[o];
          for (int ky = 0; ky < K; ky++)
            for (int kx = 0; kx < K; kx++) a += mulq(cw[o][ky][kx], img[y + ky][x + kx]);
          if (a != sat16(a)) n_conv_sat++;
          conv[o][y][x] = sat16(a);
        end
    for (int o = 0; o < OC; o++)
      for (int y = 0; y < PD; y++)
        for (int x = 0; x < PD; x++) begin
          longint m;
          m = conv[o][2 * y][2 * x];
          for (int py = 0; py < 2; py++)
            for (int px = 0; px < 2; px++) if (conv[o][2 * y + py][2 * x + px] > m) m = conv[o][2 * y + py][2 * x + px];
          pool[o][y][x] = m;
        end
    foreach (hmem[i]) hmem[i] = 0;
    foreach (omem[i]) omem[i] = 0;
    foreach (cnt[i]) cnt[i] = 0;
    for (int t = 0; t < STEPS; t++) begin
      for (int i = 0; i < NH; i++) begin
        longint s;
        bit sp;
        sp = hmem[i] > thr_r;
        if (sp) n_soft_reset++;
        s = mulq(beta_r, hmem[i]) + pool[i / 9][(i % 9) / 3][i % 3] - (sp ? mulq(beta_r, thr_r) : 0);
        if (s != sat16(s)) n_mem_sat++;
        hmem[i] = sat16(s);
        hspk[i] = hmem[i] > thr_r;
        if (hspk[i]) n_hid_spikes++;
      end
      for (int j = 0; j < NO; j++) begin
        longint a;
        a = fb[j];
        for (int i = 0; i < NH; i++) a += hspk[i] ? mulq(fw[j][i], 16384) : 0;
        fco[j] = sat16(a);
      end
      for (int j = 0; j < NO; j++) begin
        longint s;
        bit sp;
        sp = omem[j] > thr_r;
        if (sp) n_soft_reset++;
        s = mulq(beta_r, omem[j]) + fco[j] - (sp ? mulq(beta_r, thr_r) : 0);
        if (s != sat16(s)) n_mem_sat++;
        omem[j] = sat16(s);
        ospk[j] = omem[j] > thr_r;
        if (ospk[j]) begin n_out_spikes++; cnt[j]++; end
      end
    end
    best = 0;
    for (int j = 1; j < NO; j++) if (cnt[j] > cnt[best]) best = j;

    // Run the design.
    @(negedge clk); start = 1;
    cycles = 0;
    @(negedge clk);
    while (!done) begin @(negedge clk); cycles++; end
    start = 0;
    expect_cycles = 1 + (OC * O * O * K * K + 1) + 1 + (OC * PD * PD * 4 + 1) + STEPS * (1 + 1 + (NO * NH + 1) + 1 + 1);
    check(cycles == expect_cycles, $sformatf("image %0d took %0d cycles, expected %0d", img_no, cycles, expect_cycles));
    for (int o = 0; o < OC; o++)
      for (int y = 0; y < O; y++)
        for (int x = 0; x < O; x++)
          check(longint'(dut.conv_map[o][y][x]) == conv[o][y][x], $sformatf("image %0d conv[%0d][%0d][%0d]", img_no, o, y, x));
    for (int o = 0; o < OC; o++)
      for (int y = 0; y < PD; y++)
        for (int x = 0; x < PD; x++)
          check(longint'(dut.pool_map[o][y][x]) == pool[o][y][x], $sformatf("image %0d pool[%0d][%0d][%0d]", img_no, o, y, x));
    for (int j = 0; j < NO; j++)
      check(int'(spike_count[j]) == cnt[j], $sformatf("image %0d count[%0d] = %0d expected %0d", img_no, j, spike_count[j], cnt[j]));
    check(int'(predicted) == best, $sformatf("image %0d predicted %0d expected %0d", img_no, predicted, best));
    $display("image %0d: counts %p predicted %0d, %0d cycles", img_no, cnt, best, cycles);

    // Histogram: bottom pixel of the predicted bar is red if its count is non-zero.
    @(negedge clk); hcount = 11'(best * 100 + 50); vcount = 10'd719;
    @(negedge clk); @(negedge clk);
    check(pixel == ((cnt[best] > 0) ? 24'hE02020 : 24'h000000), "histogram shows predicted bar");
    if (pixel != 0) n_pixels_lit++;
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; start = 0; ld_en = 0; ld_addr = '0; ld_data = '0; hcount = '0; vcount = '0;
    n_hid_spikes = 0; n_out_spikes = 0; n_soft_reset = 0; n_mem_sat = 0; n_conv_sat = 0;
    n_restart = 0; n_pixels_lit = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    beta_r = 13418; thr_r = 16384;
    for (int n = 0; n < 3; n++) begin
      load_all(n);
      if (n == 2) begin
        beta_r = 11469; thr_r = 12288;    // beta 0.7, threshold 0.75
        write_word(A_BETA, beta_r);
        write_word(A_THR, thr_r);
      end
      if (n > 0) begin
        check(done && !busy, "restart from DONE");
        n_restart++;
      end
      classify_and_check(n);
    end
    $display("mechanisms: hidden spikes %0d, output spikes %0d, soft resets %0d, membrane saturations %0d, conv saturations %0d, restarts %0d, histogram bars %0d",
             n_hid_spikes, n_out_spikes, n_soft_reset, n_mem_sat, n_conv_sat, n_restart, n_pixels_lit);
    check(n_hid_spikes > 0, "hidden LIF layer spiked");
    check(n_out_spikes > 0, "output LIF layer spiked");
    check(n_soft_reset > 0, "soft reset occurred");
    check(n_mem_sat > 0, "membrane saturation occurred");
    check(n_conv_sat > 0, "conv output saturation occurred");
    check(n_restart > 0, "restart from DONE occurred");
    check(n_pixels_lit > 0, "histogram drew a bar");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// neurovision_top: convolutional spiking neural network classifier for
// small (8x8) images.
//
// Data path, in order:
//   param_store      image, filters, FC weights, biases, beta and threshold
//   conv_layer       OUT_CH filters of KxK, stride 1, no padding (8x8 -> 6x6x8)
//   maxpool_layer    2x2, stride 2 (6x6x8 -> 3x3x8)
//   lif_layer (hid)  one LIF neuron per pooled value (72 neurons)
//   flatten          wiring: index = c*PD*PD + row*PD + col
//   fc_layer         N_HID inputs (spike = 1.0, no spike = 0) -> N_OUT outputs
//   lif_layer (out)  one LIF neuron per class (10 neurons)
//   spike_counter    per-class spike counts and the arg-max class
//   histogram_display  bar chart of the counts for a video output
// net_controller runs convolution and pooling once per image (the image is the
// same input at every time step), then NUM_STEPS time steps of
// hidden LIF -> FC -> output LIF -> count.
//
// Use: write the image and parameters through ld_en/ld_addr/ld_data (address
// map in param_store), raise `start`; `busy` is high while running and `done`
// rises when all steps are finished, with `predicted` and `spike_count` valid.
// With the default sizes one classification takes about
// 2600 (conv) + 290 (pool) + NUM_STEPS * 725 clock cycles.
//
// The layer sequence, sizes, 16-bit words with 14 fractional bits, the LIF
// equation and spike-count decoding follow the published design; the number
// of time steps, the load port, the reuse of conv/pool results across steps
// and the display geometry are this design's choices. hcount/vcount come
// from, and pixel goes to, a video timing and HDMI encoder outside this module.
module neurovision_top
  import nv_pkg::*;
#(
  parameter int unsigned IMG       = NV_IMG,
  parameter int unsigned K         = NV_K,
  parameter int unsigned OUT_CH    = NV_OUT_CH,
  parameter int unsigned N_OUT     = NV_N_OUT,
  parameter int unsigned NUM_STEPS = 50,
  parameter int unsigned W         = NV_W,
  parameter int unsigned FRAC      = NV_FRAC,
  parameter int unsigned CW        = 16,
  parameter int unsigned ADDR_W    = 12,
  localparam int unsigned O        = IMG - K + 1,
  localparam int unsigned PD       = O / 2,
  localparam int unsigned N_HID    = OUT_CH * PD * PD,
  localparam int unsigned IW       = $clog2(N_OUT) > 0 ? $clog2(N_OUT) : 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic                ld_en,
  input  logic [ADDR_W-1:0]   ld_addr,
  input  logic signed [W-1:0] ld_data,
  output logic                busy,
  output logic                done,
  output logic [IW-1:0]       predicted,
  output logic [CW-1:0]       spike_count [N_OUT],
  input  logic [10:0]         hcount,
  input  logic [9:0]          vcount,
  output logic [23:0]         pixel
);

  localparam logic signed [W-1:0] ONE = W'(1) << FRAC;

  // Stored operands.
  logic signed [W-1:0] image  [1][IMG][IMG];
  logic signed [W-1:0] conv_w [OUT_CH][1][K][K];
  logic signed [W-1:0] conv_b [OUT_CH];
  logic signed [W-1:0] fc_w   [N_OUT][N_HID];
  logic signed [W-1:0] fc_b   [N_OUT];
  logic signed [W-1:0] beta, thr;

  // Layer results.
  logic signed [W-1:0] conv_map [OUT_CH][O][O];
  logic signed [W-1:0] pool_map [OUT_CH][PD][PD];
  logic signed [W-1:0] hid_cur  [N_HID];
  logic signed [W-1:0] hid_mem  [N_HID];
  logic [N_HID-1:0]    hid_spk;
  logic signed [W-1:0] fc_in    [N_HID];
  logic signed [W-1:0] fc_out   [N_OUT];
  logic signed [W-1:0] out_mem  [N_OUT];
  logic [N_OUT-1:0]    out_spk;

  // Control.
  logic clear, conv_start, pool_start, fc_start, lif1_step, lif2_step, count_step;
  logic conv_busy, conv_done, pool_busy, pool_done, fc_busy, fc_done;
  logic [($clog2(NUM_STEPS) > 0 ? $clog2(NUM_STEPS) : 1)-1:0] step_idx;
  nv_state_e state;

  param_store #(
    .IMG(IMG), .IN_CH(1), .K(K), .OUT_CH(OUT_CH), .N_FC_IN(N_HID), .N_OUT(N_OUT),
    .W(W), .ADDR_W(ADDR_W),
    .BETA_INIT(W'((53673 * (2 ** FRAC)) / 65536)),   // beta = 0.819
    .THR_INIT(ONE)                                  // threshold = 1.0
  ) u_store (
    .clk, .rst, .we(ld_en), .addr(ld_addr), .wdata(ld_data),
    .image, .conv_w, .conv_b, .fc_w, .fc_b, .beta, .thr
  );

  net_controller #(.NUM_STEPS(NUM_STEPS)) u_ctrl (
    .clk, .rst, .start, .conv_done, .pool_done, .fc_done,
    .clear, .conv_start, .pool_start, .fc_start, .lif1_step, .lif2_step, .count_step,
    .busy, .done, .step_idx, .state
  );

  conv_layer #(.IMG(IMG), .K(K), .IN_CH(1), .OUT_CH(OUT_CH), .W(W), .FRAC(FRAC)) u_conv (
    .clk, .rst, .start(conv_start), .busy(conv_busy), .done(conv_done),
    .in_map(image), .weights(conv_w), .bias(conv_b), .out_map(conv_map)
  );

  maxpool_layer #(.CH(OUT_CH), .IN_DIM(O), .POOL(2), .W(W)) u_pool (
    .clk, .rst, .start(pool_start), .busy(pool_busy), .done(pool_done),
    .in_map(conv_map), .out_map(pool_map)
  );

  // Flatten: channel-major, then row, then column.
  for (genvar c = 0; c < OUT_CH; c++) begin : g_flat_c
    for (genvar r = 0; r < PD; r++) begin : g_flat_r
      for (genvar q = 0; q < PD; q++) begin : g_flat_q
        assign hid_cur[(c * PD + r) * PD + q] = pool_map[c][r][q];
      end
    end
  end

  lif_layer #(.N(N_HID), .W(W), .FRAC(FRAC)) u_lif_hid (
    .clk, .rst, .clear, .step(lif1_step), .cur(hid_cur), .beta, .thr,
    .mem(hid_mem), .spikes(hid_spk)
  );

  for (genvar i = 0; i < N_HID; i++) begin : g_spk_val
    assign fc_in[i] = hid_spk[i] ? ONE : '0;
  end

  fc_layer #(.N_IN(N_HID), .N_OUT(N_OUT), .W(W), .FRAC(FRAC)) u_fc (
    .clk, .rst, .start(fc_start), .busy(fc_busy), .done(fc_done),
    .in_vec(fc_in), .weights(fc_w), .bias(fc_b), .out_vec(fc_out)
  );

  lif_layer #(.N(N_OUT), .W(W), .FRAC(FRAC)) u_lif_out (
    .clk, .rst, .clear, .step(lif2_step), .cur(fc_out), .beta, .thr,
    .mem(out_mem), .spikes(out_spk)
  );

  spike_counter #(.N(N_OUT), .CW(CW)) u_count (
    .clk, .rst, .clear, .step(count_step), .spikes(out_spk),
    .counts(spike_count), .predicted
  );

  histogram_display #(.N(N_OUT), .CW(CW)) u_hist (
    .clk, .hcount, .vcount, .counts(spike_count), .predicted, .pixel
  );

endmodule

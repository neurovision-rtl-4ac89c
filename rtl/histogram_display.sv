// histogram_display: draws the output spike counts as a bar chart.
//
// For the pixel at (hcount, vcount) of an H_ACTIVE x V_ACTIVE frame the module
// returns a 24-bit RGB colour. The screen is split into N columns of BAR_W
// pixels; column n shows a bar rising from the bottom edge whose height is
// counts[n]*SCALE pixels (clipped to the frame), with a GAP-pixel margin on
// each side. Bars are green, the bar of the currently predicted class is red,
// the background is black. As the counters grow during a classification the
// bars grow, giving a live view of the output activity.
//
// Timing: the pixel is registered, one clock after hcount/vcount. The video
// timing and the HDMI encoder that supply hcount/vcount and consume `pixel`
// are outside this module. Frame size, bar geometry and colours are this
// design's choice.
module histogram_display #(
  parameter int unsigned N        = 10,
  parameter int unsigned CW       = 16,
  parameter int unsigned H_ACTIVE = 1280,
  parameter int unsigned V_ACTIVE = 720,
  parameter int unsigned BAR_W    = 100,
  parameter int unsigned GAP      = 10,
  parameter int unsigned SCALE    = 8,
  localparam int unsigned IW      = $clog2(N) > 0 ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic [10:0]   hcount,
  input  logic [9:0]    vcount,
  input  logic [CW-1:0] counts [N],
  input  logic [IW-1:0] predicted,
  output logic [23:0]   pixel
);

  localparam logic [23:0] BAR_RGB  = 24'h00_C0_00;
  localparam logic [23:0] WIN_RGB  = 24'hE0_20_20;
  localparam logic [23:0] BACK_RGB = 24'h00_00_00;

  logic [31:0] col, xin, height, from_bottom;
  logic        in_bar;
  logic [23:0] colour;

  always_comb begin
    col         = 32'(hcount) / BAR_W;
    xin         = 32'(hcount) - col * BAR_W;
    from_bottom = V_ACTIVE - 32'(vcount);     // 1 on the last row
    height      = '0;
    for (int n = 0; n < N; n++)
      if (col == n) height = 32'(counts[n]) * SCALE;
    in_bar = (32'(hcount) < H_ACTIVE) && (32'(vcount) < V_ACTIVE) && (col < N) &&
             (xin >= GAP) && (xin < BAR_W - GAP) && (from_bottom <= height);
    if (!in_bar)                 colour = BACK_RGB;
    else if (col == 32'(predicted)) colour = WIN_RGB;
    else                         colour = BAR_RGB;
  end

  always_ff @(posedge clk) pixel <= colour;

endmodule

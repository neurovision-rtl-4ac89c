// nv_pkg: constants and types shared by the NeuroVision spiking-CNN accelerator.
//
// The network works on signed fixed-point numbers. The default word is 16 bits
// with 14 fractional bits (two integer bits including the sign, range [-2, 2)),
// the format used for the complete 8x8 network. Modules take the word width
// and the fraction as parameters so that single layers can also run in other
// formats (Q1.15, Q16.16). The controller's state encoding lives here so that
// testbenches can name the states.
package nv_pkg;

  // Default fixed-point format of the full network.
  localparam int unsigned NV_W    = 16;
  localparam int unsigned NV_FRAC = 14;

  // Default network geometry: 8x8 image, eight 3x3 filters, 2x2 pooling,
  // 72 flattened spikes, 10 output classes.
  localparam int unsigned NV_IMG    = 8;
  localparam int unsigned NV_K      = 3;
  localparam int unsigned NV_OUT_CH = 8;
  localparam int unsigned NV_N_OUT  = 10;

  // Word-sized signed value in the default format.
  typedef logic signed [NV_W-1:0] word_t;

  // Sequencer states. The first five and DONE follow the controller the
  // accelerator is built around; the per-time-step states are this design's.
  typedef enum logic [3:0] {
    ST_IDLE       = 4'd0,
    ST_START_CONV = 4'd1,
    ST_WAIT_CONV  = 4'd2,
    ST_START_POOL = 4'd3,
    ST_WAIT_POOL  = 4'd4,
    ST_STEP_LIF1  = 4'd5,
    ST_START_FC   = 4'd6,
    ST_WAIT_FC    = 4'd7,
    ST_STEP_LIF2  = 4'd8,
    ST_NEXT_STEP  = 4'd9,
    ST_DONE       = 4'd10
  } nv_state_e;

endpackage

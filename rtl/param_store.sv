// param_store: register file holding the network's input image, trained
// parameters and neuron constants, written one word at a time.
//
// The convolution, FC and LIF layers read all of their operands in parallel,
// so the store is plain registers exposed as arrays. Words are written through
// a single address-mapped port (one word per cycle when `we` is high):
//
//   base                          words                 contents
//   0                             IMG*IMG               image, row-major
//   A_CW = IMG*IMG                OUT_CH*IN_CH*K*K      conv weights [oc][ic][ky][kx]
//   A_CB = A_CW + OUT_CH*IN_CH*K*K OUT_CH               conv biases
//   A_FW = A_CB + OUT_CH          N_OUT*N_FC_IN         FC weights [j][i]
//   A_FB = A_FW + N_OUT*N_FC_IN   N_OUT                 FC biases
//   A_BETA = A_FB + N_OUT         1                     LIF decay beta
//   A_THR  = A_BETA + 1           1                     LIF threshold
//
// Writes to other addresses are ignored. Reset clears the image and the
// weights and loads BETA_INIT and THR_INIT. Loading the parameters through a
// port, rather than fixing them at build time, is this design's choice.
module param_store #(
  parameter int unsigned IMG      = 8,
  parameter int unsigned IN_CH    = 1,
  parameter int unsigned K        = 3,
  parameter int unsigned OUT_CH   = 8,
  parameter int unsigned N_FC_IN  = 72,
  parameter int unsigned N_OUT    = 10,
  parameter int unsigned W        = 16,
  parameter int unsigned ADDR_W   = 12,
  parameter logic signed [W-1:0] BETA_INIT = W'(13418),
  parameter logic signed [W-1:0] THR_INIT  = W'(16384)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                we,
  input  logic [ADDR_W-1:0]   addr,
  input  logic signed [W-1:0] wdata,
  output logic signed [W-1:0] image  [IN_CH][IMG][IMG],
  output logic signed [W-1:0] conv_w [OUT_CH][IN_CH][K][K],
  output logic signed [W-1:0] conv_b [OUT_CH],
  output logic signed [W-1:0] fc_w   [N_OUT][N_FC_IN],
  output logic signed [W-1:0] fc_b   [N_OUT],
  output logic signed [W-1:0] beta,
  output logic signed [W-1:0] thr
);

  localparam int unsigned A_CW   = IN_CH * IMG * IMG;
  localparam int unsigned A_CB   = A_CW + OUT_CH * IN_CH * K * K;
  localparam int unsigned A_FW   = A_CB + OUT_CH;
  localparam int unsigned A_FB   = A_FW + N_OUT * N_FC_IN;
  localparam int unsigned A_BETA = A_FB + N_OUT;
  localparam int unsigned A_THR  = A_BETA + 1;

  initial assert (A_THR < 2 ** ADDR_W) else $error("param_store: ADDR_W too small");

  localparam int unsigned NWORDS = A_THR + 1;

  // One register per word; word a is loaded when `we` is high and `addr`
  // equals a.
  for (genvar a = 0; a < NWORDS; a++) begin : g_word
    logic [W-1:0] q;
    always_ff @(posedge clk) begin
      if (rst)                            q <= (a == A_BETA) ? BETA_INIT : (a == A_THR) ? THR_INIT : '0;
      else if (we && 32'(addr) == 32'(a)) q <= wdata;
    end
  end

  // Views of the registers in the shapes the layers use.
  for (genvar c = 0; c < IN_CH; c++) begin : g_img_c
    for (genvar y = 0; y < IMG; y++) begin : g_img_y
      for (genvar x = 0; x < IMG; x++) begin : g_img_x
        assign image[c][y][x] = g_word[(c * IMG + y) * IMG + x].q;
      end
    end
  end

  for (genvar o = 0; o < OUT_CH; o++) begin : g_cw_o
    assign conv_b[o] = g_word[A_CB + o].q;
    for (genvar c = 0; c < IN_CH; c++) begin : g_cw_c
      for (genvar y = 0; y < K; y++) begin : g_cw_y
        for (genvar x = 0; x < K; x++) begin : g_cw_x
          assign conv_w[o][c][y][x] = g_word[A_CW + ((o * IN_CH + c) * K + y) * K + x].q;
        end
      end
    end
  end

  for (genvar j = 0; j < N_OUT; j++) begin : g_fc_j
    assign fc_b[j] = g_word[A_FB + j].q;
    for (genvar i = 0; i < N_FC_IN; i++) begin : g_fc_i
      assign fc_w[j][i] = g_word[A_FW + j * N_FC_IN + i].q;
    end
  end

  assign beta = g_word[A_BETA].q;
  assign thr  = g_word[A_THR].q;

endmodule

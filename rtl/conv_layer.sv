// conv_layer: sequential 2-D convolution with bias, signed fixed point.
//
// Computes, for every output channel oc and position (oy, ox),
//     out[oc][oy][ox] = bias[oc] + sum_{ic,ky,kx} w[oc][ic][ky][kx] * in[ic][oy+ky][ox+kx]
// with stride 1 and no padding, so an IMGxIMG map gives OxO outputs,
// O = IMG-K+1 (8x8 with 3x3 filters gives 6x6). One product is formed per
// clock: the layer walks kx, ky, ic (innermost) then ox, oy, oc, so a full
// pass takes OUT_CH*O*O*IN_CH*K*K cycles (2592 for the default sizes).
// Sequential execution is how the layer was made to fit a small FPGA.
//
// Arithmetic: each W x W product is shifted right by FRAC (floor) and added to
// an accumulator that starts at the bias; the final sum is saturated to W
// bits. Rounding and saturation are this design's choice.
//
// Interface: pulse `start` (inputs must stay stable until `done`); `busy` is
// high while working; `done` pulses for one cycle the cycle after the last
// output is written into `out_map`, which holds its value until the next run.
module conv_layer #(
  parameter int unsigned IMG    = 8,
  parameter int unsigned K      = 3,
  parameter int unsigned IN_CH  = 1,
  parameter int unsigned OUT_CH = 8,
  parameter int unsigned W      = 16,
  parameter int unsigned FRAC   = 14,
  localparam int unsigned O     = IMG - K + 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  output logic                busy,
  output logic                done,
  input  logic signed [W-1:0] in_map  [IN_CH][IMG][IMG],
  input  logic signed [W-1:0] weights [OUT_CH][IN_CH][K][K],
  input  logic signed [W-1:0] bias    [OUT_CH],
  output logic signed [W-1:0] out_map [OUT_CH][O][O]
);

  localparam int unsigned AW = 2 * W + $clog2(IN_CH * K * K + 1) + 1;
  localparam logic signed [AW-1:0] MAXV = AW'((2 ** (W - 1)) - 1);
  localparam logic signed [AW-1:0] MINV = -AW'(2 ** (W - 1));

  localparam int unsigned KB = $clog2(K) > 0 ? $clog2(K) : 1;
  localparam int unsigned OB = $clog2(O) > 0 ? $clog2(O) : 1;
  localparam int unsigned IB = $clog2(IN_CH) > 0 ? $clog2(IN_CH) : 1;
  localparam int unsigned CB = $clog2(OUT_CH) > 0 ? $clog2(OUT_CH) : 1;

  logic [KB-1:0] kx, ky;
  logic [IB-1:0] ic;
  logic [OB-1:0] ox, oy;
  logic [CB-1:0] oc;

  logic signed [AW-1:0]  acc, acc_next;
  logic signed [2*W-1:0] prod;
  logic signed [W-1:0]   result;
  logic                  last_tap, last_out;

  assign last_tap = (kx == KB'(K - 1)) && (ky == KB'(K - 1)) && (ic == IB'(IN_CH - 1));
  assign last_out = (ox == OB'(O - 1)) && (oy == OB'(O - 1)) && (oc == CB'(OUT_CH - 1));

  always_comb begin
    prod     = (2*W)'(weights[oc][ic][ky][kx]) * (2*W)'(in_map[ic][32'(oy) + 32'(ky)][32'(ox) + 32'(kx)]);
    acc_next = acc + AW'(prod >>> FRAC);
    if (acc_next > MAXV)      result = MAXV[W-1:0];
    else if (acc_next < MINV) result = MINV[W-1:0];
    else                      result = acc_next[W-1:0];
  end

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      busy <= 1'b0;
      kx <= '0; ky <= '0; ic <= '0; ox <= '0; oy <= '0; oc <= '0;
      acc <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        kx <= '0; ky <= '0; ic <= '0; ox <= '0; oy <= '0; oc <= '0;
        acc <= AW'(bias[0]);
      end
    end else if (!last_tap) begin
      acc <= acc_next;
      if (kx != KB'(K - 1)) kx <= kx + 1'b1;
      else begin
        kx <= '0;
        if (ky != KB'(K - 1)) ky <= ky + 1'b1;
        else begin
          ky <= '0;
          ic <= ic + 1'b1;
        end
      end
    end else begin
      // Last product of this output: store it and move to the next output.
      out_map[oc][oy][ox] <= result;
      kx <= '0; ky <= '0; ic <= '0;
      if (last_out) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else if (ox != OB'(O - 1)) begin
        ox  <= ox + 1'b1;
        acc <= AW'(bias[oc]);
      end else begin
        ox <= '0;
        if (oy != OB'(O - 1)) begin
          oy  <= oy + 1'b1;
          acc <= AW'(bias[oc]);
        end else begin
          oy  <= '0;
          oc  <= oc + 1'b1;
          acc <= AW'(bias[32'(oc) + 1]);
        end
      end
    end
  end

endmodule

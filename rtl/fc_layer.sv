// fc_layer: sequential fully connected layer with bias, signed fixed point.
//
//     out[j] = bias[j] + sum_i w[j][i] * in[i],   j < N_OUT, i < N_IN
//
// One product per clock: the layer walks i (inner) then j, so a pass takes
// N_OUT*N_IN cycles (720 for 72 inputs and 10 outputs). In the network the
// inputs are the flattened spikes of the hidden LIF layer, given as 1.0 or 0,
// but any signed values are accepted.
//
// Arithmetic: each product is shifted right by FRAC (floor) and added to an
// accumulator that starts at the bias; the sum is saturated to W bits.
//
// Interface: pulse `start` (inputs stable until `done`); `busy` is high while
// working; `done` pulses for one cycle after the last output is written into
// `out_vec`, which holds until the next run.
module fc_layer #(
  parameter int unsigned N_IN  = 72,
  parameter int unsigned N_OUT = 10,
  parameter int unsigned W     = 16,
  parameter int unsigned FRAC  = 14
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  output logic                busy,
  output logic                done,
  input  logic signed [W-1:0] in_vec  [N_IN],
  input  logic signed [W-1:0] weights [N_OUT][N_IN],
  input  logic signed [W-1:0] bias    [N_OUT],
  output logic signed [W-1:0] out_vec [N_OUT]
);

  localparam int unsigned AW = 2 * W + $clog2(N_IN + 1) + 1;
  localparam logic signed [AW-1:0] MAXV = AW'((2 ** (W - 1)) - 1);
  localparam logic signed [AW-1:0] MINV = -AW'(2 ** (W - 1));
  localparam int unsigned IB = $clog2(N_IN) > 0 ? $clog2(N_IN) : 1;
  localparam int unsigned JB = $clog2(N_OUT) > 0 ? $clog2(N_OUT) : 1;

  logic [IB-1:0] i;
  logic [JB-1:0] j;
  logic signed [AW-1:0]  acc, acc_next;
  logic signed [2*W-1:0] prod;
  logic signed [W-1:0]   result;

  always_comb begin
    prod     = (2*W)'(weights[j][i]) * (2*W)'(in_vec[i]);
    acc_next = acc + AW'(prod >>> FRAC);
    if (acc_next > MAXV)      result = MAXV[W-1:0];
    else if (acc_next < MINV) result = MINV[W-1:0];
    else                      result = acc_next[W-1:0];
  end

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      busy <= 1'b0;
      i <= '0; j <= '0;
      acc <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        i <= '0; j <= '0;
        acc <= AW'(bias[0]);
      end
    end else if (i != IB'(N_IN - 1)) begin
      acc <= acc_next;
      i   <= i + 1'b1;
    end else begin
      out_vec[j] <= result;
      i <= '0;
      if (j == JB'(N_OUT - 1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        j   <= j + 1'b1;
        acc <= AW'(bias[32'(j) + 1]);
      end
    end
  end

endmodule

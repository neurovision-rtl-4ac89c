// lif_neuron: one leaky integrate-and-fire neuron in signed fixed point.
//
// On every cycle with `step` high the membrane is updated by
//     U[t+1] = beta*U[t] + w*x - beta*S[t]*thr,   S[t] = (U[t] > thr)
// i.e. the membrane decays, integrates the weighted input and, if the neuron
// fired, is lowered by beta*thr (soft reset, as in the model the design
// follows). `spike` is S for the value currently held in `mem`, so one cycle
// after a step `spike` shows whether the new membrane crossed the threshold.
// `clear` (or `rst`) zeroes the membrane before a new input is presented and
// takes priority over `step`.
//
// Arithmetic: every product is W x W -> 2W bits, shifted right by FRAC
// (floor), the three terms are summed in W+3 bits and the result is saturated
// to W bits. Rounding and saturation are this design's choice.
//
// Timing: one update per step, result registered; no internal latency.
module lif_neuron #(
  parameter int unsigned W    = 16,
  parameter int unsigned FRAC = 14
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                clear,
  input  logic                step,
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] w,
  input  logic signed [W-1:0] beta,
  input  logic signed [W-1:0] thr,
  output logic signed [W-1:0] mem,
  output logic                spike
);

  localparam int unsigned SW = W + 3;
  localparam logic signed [SW-1:0] MAXV = SW'((2 ** (W - 1)) - 1);
  localparam logic signed [SW-1:0] MINV = -SW'(2 ** (W - 1));

  logic signed [2*W-1:0] p_decay, p_in, p_reset;
  logic signed [SW-1:0]  sum;
  logic signed [W-1:0]   mem_next;

  assign spike = (mem > thr);

  always_comb begin
    p_decay = (2*W)'(beta) * (2*W)'(mem);
    p_in    = (2*W)'(w) * (2*W)'(x);
    p_reset = spike ? (2*W)'(beta) * (2*W)'(thr) : '0;
    sum = SW'(p_decay >>> FRAC) + SW'(p_in >>> FRAC) - SW'(p_reset >>> FRAC);
    if (sum > MAXV)      mem_next = MAXV[W-1:0];
    else if (sum < MINV) mem_next = MINV[W-1:0];
    else                 mem_next = sum[W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst || clear) mem <= '0;
    else if (step)    mem <= mem_next;
  end

endmodule

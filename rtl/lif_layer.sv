// lif_layer: a layer of N leaky integrate-and-fire neurons updated in parallel.
//
// Each neuron receives one input current from the preceding layer (a pooled
// feature value or an FC output) that is already weighted, so the per-neuron
// weight is fixed at 1.0. All neurons share the decay `beta` and threshold
// `thr`. A `step` pulse advances every membrane by one time step; `clear`
// zeroes them. `spikes[i]` is the spike of neuron i for its current membrane,
// valid the cycle after the step.
//
// Updating all neurons at once (rather than time-multiplexing one neuron) is
// this design's choice; the layer is small (72 or 10 neurons).
module lif_layer #(
  parameter int unsigned N    = 72,
  parameter int unsigned W    = 16,
  parameter int unsigned FRAC = 14
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                clear,
  input  logic                step,
  input  logic signed [W-1:0] cur   [N],
  input  logic signed [W-1:0] beta,
  input  logic signed [W-1:0] thr,
  output logic signed [W-1:0] mem   [N],
  output logic [N-1:0]        spikes
);

  // 1.0 in the chosen format; needs at least one integer bit besides the sign.
  localparam logic signed [W-1:0] ONE = W'(1) << FRAC;

  initial assert (FRAC <= W - 2) else $error("lif_layer: 1.0 must be representable");

  for (genvar i = 0; i < N; i++) begin : g_neuron
    lif_neuron #(.W(W), .FRAC(FRAC)) u_neuron (
      .clk   (clk),
      .rst   (rst),
      .clear (clear),
      .step  (step),
      .x     (cur[i]),
      .w     (ONE),
      .beta  (beta),
      .thr   (thr),
      .mem   (mem[i]),
      .spike (spikes[i])
    );
  end

endmodule

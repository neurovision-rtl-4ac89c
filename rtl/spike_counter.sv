// spike_counter: decodes the output layer by spike counting.
//
// Each output neuron owns a CW-bit counter that is incremented on every
// `step` pulse at which its spike is high (counters saturate at the maximum).
// `predicted` is the index of the neuron with the highest count, i.e. the
// class the network votes for; on a tie the lowest index wins. `clear`
// zeroes all counters before a new image. `predicted` is combinational from
// the counters.
module spike_counter #(
  parameter int unsigned N  = 10,
  parameter int unsigned CW = 16,
  localparam int unsigned IW = $clog2(N) > 0 ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,
  input  logic          step,
  input  logic [N-1:0]  spikes,
  output logic [CW-1:0] counts [N],
  output logic [IW-1:0] predicted
);

  always_ff @(posedge clk) begin
    for (int n = 0; n < N; n++) begin
      if (rst || clear) counts[n] <= '0;
      else if (step && spikes[n] && counts[n] != '1) counts[n] <= counts[n] + 1'b1;
    end
  end

  always_comb begin
    logic [CW-1:0] best;
    best      = counts[0];
    predicted = '0;
    for (int n = 1; n < N; n++) begin
      if (counts[n] > best) begin
        best      = counts[n];
        predicted = IW'(n);
      end
    end
  end

endmodule

// maxpool_layer: sequential POOLxPOOL max pooling with stride POOL.
//
// For each channel c and output position (oy, ox) the layer outputs the
// largest signed value in the window in[c][oy*POOL +: POOL][ox*POOL +: POOL].
// An IN_DIMxIN_DIM map gives ODxOD outputs with OD = IN_DIM / POOL (a
// trailing odd row/column is ignored). One input element is compared per
// clock, so a pass takes CH*OD*OD*POOL*POOL cycles (288 for 8 channels of
// 6x6). Sequential execution is how the layer was made to fit a small FPGA.
//
// Interface: pulse `start` (inputs stable until `done`); `busy` is high while
// working; `done` pulses for one cycle after the last output is written.
module maxpool_layer #(
  parameter int unsigned CH     = 8,
  parameter int unsigned IN_DIM = 6,
  parameter int unsigned POOL   = 2,
  parameter int unsigned W      = 16,
  localparam int unsigned OD    = IN_DIM / POOL
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  output logic                busy,
  output logic                done,
  input  logic signed [W-1:0] in_map  [CH][IN_DIM][IN_DIM],
  output logic signed [W-1:0] out_map [CH][OD][OD]
);

  localparam int unsigned PB = $clog2(POOL) > 0 ? $clog2(POOL) : 1;
  localparam int unsigned OB = $clog2(OD) > 0 ? $clog2(OD) : 1;
  localparam int unsigned CB = $clog2(CH) > 0 ? $clog2(CH) : 1;

  logic [PB-1:0] px, py;
  logic [OB-1:0] ox, oy;
  logic [CB-1:0] c;

  logic signed [W-1:0] best, sample, best_next;
  logic                first, last_px, last_out;

  assign sample    = in_map[c][32'(oy) * POOL + 32'(py)][32'(ox) * POOL + 32'(px)];
  assign first     = (px == '0) && (py == '0);
  assign best_next = (first || sample > best) ? sample : best;
  assign last_px   = (px == PB'(POOL - 1)) && (py == PB'(POOL - 1));
  assign last_out  = (ox == OB'(OD - 1)) && (oy == OB'(OD - 1)) && (c == CB'(CH - 1));

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      busy <= 1'b0;
      px <= '0; py <= '0; ox <= '0; oy <= '0; c <= '0;
      best <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        px <= '0; py <= '0; ox <= '0; oy <= '0; c <= '0;
      end
    end else begin
      best <= best_next;
      if (!last_px) begin
        if (px != PB'(POOL - 1)) px <= px + 1'b1;
        else begin
          px <= '0;
          py <= py + 1'b1;
        end
      end else begin
        out_map[c][oy][ox] <= best_next;
        px <= '0; py <= '0;
        if (last_out) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else if (ox != OB'(OD - 1)) ox <= ox + 1'b1;
        else begin
          ox <= '0;
          if (oy != OB'(OD - 1)) oy <= oy + 1'b1;
          else begin
            oy <= '0;
            c  <= c + 1'b1;
          end
        end
      end
    end
  end

endmodule

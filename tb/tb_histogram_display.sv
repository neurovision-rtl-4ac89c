// tb_histogram_display: self-checking test of the histogram pixel generator.
//
// Counts are set to known values; pixels are sampled one clock after their
// coordinates and compared with the expected bar geometry: bar n spans
// columns n*100+10 .. n*100+89 and rises counts[n]*8 rows from the bottom
// (row 719) of a 1280x720 frame; the predicted class is drawn red, others
// green, background black. Rows just inside and just outside each bar top
// and columns at each bar edge are checked, plus random pixels.
module tb_histogram_display;

  localparam int N = 10;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic [15:0] counts [N];
  logic [3:0] predicted;
  logic [23:0] pixel;
  int checks = 0, failures = 0;

  histogram_display dut (.clk, .hcount, .vcount, .counts, .predicted, .pixel);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [23:0] expect_px(int h, int v);
    int col, xin, ht;
    if (h >= 1280 || v >= 720) return 24'h0;
    col = h / 100;
    xin = h % 100;
    if (col >= N || xin < 10 || xin >= 90) return 24'h0;
    ht = int'(counts[col]) * 8;
    if (720 - v > ht) return 24'h0;
    return (col == int'(predicted)) ? 24'hE02020 : 24'h00C000;
  endfunction

  task automatic probe(int h, int v);
    hcount = 11'(h); vcount = 10'(v);
    @(posedge clk); #1;
    check(pixel == expect_px(h, v), $sformatf("pixel (%0d,%0d) = %h expected %h", h, v, pixel, expect_px(h, v)));
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lit = 0;
    counts = '{0, 28, 0, 0, 0, 0, 8, 37, 18, 200};
    predicted = 4'd7;
    for (int n = 0; n < N; n++) begin
      int top;
      top = 720 - int'(counts[n]) * 8;
      if (top < 0) top = 0;
      probe(n * 100 + 50, top);
      probe(n * 100 + 50, top - 1 >= 0 ? top - 1 : 0);
      probe(n * 100 + 50, 719);
      probe(n * 100 + 9, 719);
      probe(n * 100 + 10, 719);
      probe(n * 100 + 89, 719);
      probe(n * 100 + 90, 719);
    end
    for (int r = 0; r < 1000; r++) begin
      probe($urandom_range(0, 1299), $urandom_range(0, 730));
      if (pixel != 0) lit++;
    end
    check(lit > 0, "some random pixels fall on bars");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

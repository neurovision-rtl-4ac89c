// tb_param_store: self-checking test of param_store (default sizes).
//
// After reset the image and weights must be zero and beta/threshold at their
// initial values. Every address of the map is then written with a value
// derived from its address (in shuffled order) and each array element is
// compared with the value its documented address should have received. A
// write outside the map must change nothing.
module tb_param_store;

  localparam int IMG = 8, K = 3, OC = 8, NI = 72, NO = 10;
  localparam int A_CW = 64, A_CB = A_CW + 72, A_FW = A_CB + 8, A_FB = A_FW + 720;
  localparam int A_BETA = A_FB + 10, A_THR = A_BETA + 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, we;
  logic [11:0] addr;
  logic signed [15:0] wdata;
  logic signed [15:0] image [1][IMG][IMG];
  logic signed [15:0] conv_w [OC][1][K][K];
  logic signed [15:0] conv_b [OC];
  logic signed [15:0] fc_w [NO][NI];
  logic signed [15:0] fc_b [NO];
  logic signed [15:0] beta, thr;
  int checks = 0, failures = 0;

  param_store dut (.clk, .rst, .we, .addr, .wdata, .image, .conv_w, .conv_b, .fc_w, .fc_b, .beta, .thr);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic signed [15:0] val(int a);
    return 16'(a * 37 + 1234);
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [A_THR + 1];
    rst = 1; we = 0; addr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    check(image[0][3][5] == 0 && conv_w[7][0][2][2] == 0 && fc_w[9][71] == 0 && fc_b[0] == 0, "cleared by reset");
    check(beta == 16'sd13418 && thr == 16'sd16384, "beta 0.819 and threshold 1.0 after reset");
    foreach (order[i]) order[i] = i;
    order.shuffle();
    foreach (order[i]) begin
      we = 1; addr = 12'(order[i]); wdata = val(order[i]);
      @(negedge clk);
    end
    we = 1; addr = 12'(A_THR + 1); wdata = 16'h5555; @(negedge clk);
    we = 0;
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++) check(image[0][y][x] == val(y * IMG + x), $sformatf("image[%0d][%0d]", y, x));
    for (int o = 0; o < OC; o++) begin
      check(conv_b[o] == val(A_CB + o), $sformatf("conv_b[%0d]", o));
      for (int y = 0; y < K; y++)
        for (int x = 0; x < K; x++) check(conv_w[o][0][y][x] == val(A_CW + (o * K + y) * K + x), $sformatf("conv_w[%0d][%0d][%0d]", o, y, x));
    end
    for (int j = 0; j < NO; j++) begin
      check(fc_b[j] == val(A_FB + j), $sformatf("fc_b[%0d]", j));
      for (int i = 0; i < NI; i++) check(fc_w[j][i] == val(A_FW + j * NI + i), $sformatf("fc_w[%0d][%0d]", j, i));
    end
    check(beta == val(A_BETA) && thr == val(A_THR), "beta and threshold written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

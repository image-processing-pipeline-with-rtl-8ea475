// tb_neural_network: self-checking test of the 784-10-10-10 classifier.
//
// Loads random 16-bit weights and biases through the load port, presents
// random 28x28 4-bit images, and compares the ten output scores and the three
// best digits with a 128-bit reference forward pass (ReLU on the two hidden
// layers, linear output). Checks the start-to-done latency of 856 cycles and
// runs one image with all-negative first-layer biases, which the ReLU must
// clamp to zero.
module tb_neural_network;
  localparam int N_IN = 784, N = 10, ACC_W = 72;
  localparam int LAT = 856 + 1;  // counted from the cycle start is driven, one before it is sampled
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, wt_we;
  logic [9:0] pix_addr, wt_row;
  logic [3:0] pix_data, wt_col;
  logic [2:0] wt_sel;
  logic signed [15:0] wt_data;
  logic signed [ACC_W-1:0] scores [N];
  logic [3:0] top [3];

  neural_network dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int img [N_IN];
  int W1 [N_IN][N], W2 [N][N], W3 [N][N], B [3][N];
  assign pix_data = 4'(img[pix_addr]);

  task automatic load(int sel, int row, int col, int v);
    wt_we <= 1; wt_sel <= 3'(sel); wt_row <= 10'(row); wt_col <= 4'(col); wt_data <= 16'(v);
    @(posedge clk);
  endtask

  function automatic int rnd16(int range);
    return int'($urandom_range(0, 2*range)) - range;
  endfunction

  task automatic load_all(int bias_offset);
    for (int r = 0; r < N_IN; r++) for (int c = 0; c < N; c++) begin W1[r][c] = rnd16(32767); load(0, r, c, W1[r][c]); end
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin W2[r][c] = rnd16(32767); load(1, r, c, W2[r][c]); end
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin W3[r][c] = rnd16(32767); load(2, r, c, W3[r][c]); end
    for (int l = 0; l < 3; l++) for (int c = 0; c < N; c++) begin
      B[l][c] = rnd16(32767);
      if (l == 0 && bias_offset != 0) B[l][c] = -32768;
      load(3 + l, 0, c, B[l][c]);
    end
    wt_we <= 0;
    @(posedge clk);
  endtask

  task automatic run_and_check(bit scale_down);
    logic signed [127:0] h1 [N], h2 [N], o [N];
    int t0, best [3];
    bit taken [N];
    int relu_zero = 0;
    for (int i = 0; i < N_IN; i++) img[i] = scale_down ? $urandom_range(0, 1) : $urandom_range(0, 15);
    for (int n = 0; n < N; n++) begin
      h1[n] = B[0][n];
      for (int i = 0; i < N_IN; i++) h1[n] += 128'(img[i]) * 128'(W1[i][n]);
      if (h1[n] < 0) begin h1[n] = 0; relu_zero++; end
    end
    for (int n = 0; n < N; n++) begin
      h2[n] = B[1][n];
      for (int i = 0; i < N; i++) h2[n] += h1[i] * 128'(W2[i][n]);
      if (h2[n] < 0) h2[n] = 0;
    end
    for (int n = 0; n < N; n++) begin
      o[n] = B[2][n];
      for (int i = 0; i < N; i++) o[n] += h2[i] * 128'(W3[i][n]);
    end
    for (int n = 0; n < N; n++) taken[n] = 0;
    for (int k = 0; k < 3; k++) begin
      best[k] = -1;
      for (int n = 0; n < N; n++)
        if (!taken[n] && (best[k] < 0 || o[n] > o[best[k]])) best[k] = n;
      taken[best[k]] = 1;
    end
    start <= 1; t0 = cyc; @(posedge clk); start <= 0;
    while (!done) @(posedge clk);
    checks++;
    if (cyc - t0 != LAT) begin failures++; $display("FAIL: latency %0d, expected %0d", cyc - t0, LAT); end
    for (int n = 0; n < N; n++) begin
      checks++;
      if (128'(scores[n]) != o[n]) begin
        failures++; $display("FAIL: score %0d = %0d expected %0d", n, scores[n], o[n]);
      end
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (int'(top[k]) != best[k]) begin failures++; $display("FAIL: top[%0d] = %0d expected %0d", k, top[k], best[k]); end
    end
    $display("image done: top %0d %0d %0d, %0d first-layer neurons clamped", top[0], top[1], top[2], relu_zero);
  endtask

  initial begin
    start = 0; wt_we = 0; wt_sel = 0; wt_row = 0; wt_col = 0; wt_data = 0;
    for (int i = 0; i < N_IN; i++) img[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    load_all(0);
    run_and_check(0);
    run_and_check(0);
    run_and_check(1);
    load_all(1);
    run_and_check(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

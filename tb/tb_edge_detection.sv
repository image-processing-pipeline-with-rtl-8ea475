// tb_edge_detection: self-checking test of the Sobel edge detector.
//
// Streams three random 12x7 frames (plus one flat frame) with random gaps,
// computes |Gx|+|Gy| with zero padding in the testbench and compares every
// output pixel, its address and frame markers in raster order. It also checks
// that the last two rows leave back to back within 2*W+2 cycles of the last
// input pixel.
module tb_edge_detection;
  localparam int W = 12, H = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_sof, in_ready;
  logic [3:0] in_pix;
  logic [7:0] threshold;
  logic out_valid, out_edge, out_sof, out_last;
  logic [$clog2(W*H)-1:0] out_addr;

  edge_detection #(.W(W), .H(H)) dut (.*);

  int checks = 0, failures = 0;
  int img [H][W];
  int exp_edge [$];
  int exp_addr [$];
  int last_in_cycle, last_out_cycle, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int px(int r, int c);
    if (r < 0 || r >= H || c < 0 || c >= W) return 0;
    return img[r][c];
  endfunction

  task automatic build_expected(int thr);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int gx, gy;
        gx = px(r-1,c+1) + 2*px(r,c+1) + px(r+1,c+1) - px(r-1,c-1) - 2*px(r,c-1) - px(r+1,c-1);
        gy = px(r+1,c-1) + 2*px(r+1,c) + px(r+1,c+1) - px(r-1,c-1) - 2*px(r-1,c) - px(r-1,c+1);
        if (gx < 0) gx = -gx;
        if (gy < 0) gy = -gy;
        exp_edge.push_back(int'((gx + gy) > thr));
        exp_addr.push_back(r*W + c);
      end
  endtask

  // Output checker
  always @(posedge clk) if (rst_n && out_valid) begin
    int e, a;
    checks++;
    if (exp_edge.size() == 0) begin
      failures++; $display("FAIL: unexpected output at addr %0d", out_addr);
    end else begin
      e = exp_edge.pop_front(); a = exp_addr.pop_front();
      if (out_edge !== e[0] || int'(out_addr) != a || out_sof != (a == 0) || out_last != (a == W*H-1)) begin
        failures++;
        $display("FAIL: addr %0d/%0d edge %0d exp %0d sof %0d last %0d", out_addr, a, out_edge, e, out_sof, out_last);
      end
    end
    if (out_last) last_out_cycle = cycle;
  end

  task automatic send_frame(int thr, bit flat);
    threshold = 8'(thr);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        img[r][c] = flat ? 9 : int'($urandom_range(0, 15));
    build_expected(thr);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        while (!in_ready) @(posedge clk);
        if ($urandom_range(0, 3) == 0) begin
          in_valid <= 0; in_sof <= 0; @(posedge clk);
        end
        in_valid <= 1; in_sof <= (r == 0 && c == 0); in_pix <= 4'(img[r][c]);
        @(posedge clk);
      end
    in_valid <= 0; in_sof <= 0;
    last_in_cycle = cycle;
    repeat (2*W + 6) @(posedge clk);
    checks++;
    if (last_out_cycle - last_in_cycle > 2*W + 2) begin
      failures++; $display("FAIL: flush took %0d cycles", last_out_cycle - last_in_cycle);
    end
    checks++;
    if (exp_edge.size() != 0) begin
      failures++; $display("FAIL: %0d outputs missing", exp_edge.size());
      exp_edge.delete(); exp_addr.delete();
    end
  endtask

  initial begin
    in_valid = 0; in_sof = 0; in_pix = 0; threshold = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    send_frame(20, 0);
    send_frame(40, 0);
    send_frame(9, 1);     // flat frame: edges only on the zero-padded border
    send_frame(0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

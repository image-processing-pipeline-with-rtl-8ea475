// tb_de_noise: self-checking test of the edge denoiser.
//
// Streams random 1-bit edge frames of 12x7 (sparse and dense, plus an all-edge
// frame) with random gaps and thresholds 0..8, counts the edge neighbours of
// every pixel in the testbench (outside the frame counts as no edge) and
// compares every output pixel, its address and frame markers in raster order. It also checks
// that the last two rows leave back to back within 2*W+2 cycles of the last
// input pixel.
module tb_de_noise;
  localparam int W = 12, H = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_sof, in_ready;
  logic in_edge;
  logic [3:0] threshold;
  logic out_valid, out_edge, out_sof, out_last;
  logic [$clog2(W*H)-1:0] out_addr;

  de_noise #(.W(W), .H(H)) dut (.*);

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
        int n;
        n = 0;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            if (dr != 0 || dc != 0) n += px(r+dr, c+dc);
        exp_edge.push_back(int'(img[r][c] == 1 && n >= thr));
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

  task automatic send_frame(int thr, int density);
    threshold = 4'(thr);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        img[r][c] = (int'($urandom_range(0, 99)) < density) ? 1 : 0;
    build_expected(thr);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        while (!in_ready) @(posedge clk);
        if ($urandom_range(0, 3) == 0) begin
          in_valid <= 0; in_sof <= 0; @(posedge clk);
        end
        in_valid <= 1; in_sof <= (r == 0 && c == 0); in_edge <= img[r][c][0];
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
    in_valid = 0; in_sof = 0; in_edge = 0; threshold = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    send_frame(2, 30);
    send_frame(3, 60);
    send_frame(8, 100);   // all edges: only pixels with eight neighbours survive
    send_frame(0, 50);
    send_frame(1, 20);
    send_frame(5, 80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

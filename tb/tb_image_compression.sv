// tb_image_compression: self-checking test of the 28x28 frame compressor.
//
// Uses a 62x58 frame and 2x2 blocks (a 56x56 centred crop). Streams random
// frames with random gaps, computes in the testbench each block's mean,
// inverts it and applies the black threshold, and compares all 784 stored
// pixels through both read ports after `image_done`. Also checks that
// `image_done` pulses once per frame, within two cycles of the band's last
// crop pixel.
module tb_image_compression;
  localparam int W = 62, H = 58, OUT = 28, BL = 1, B = 2;
  localparam int X0 = (W - OUT*B)/2, Y0 = (H - OUT*B)/2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pix_valid, image_done;
  logic [3:0] pix, threshold, rd_data_a, rd_data_b;
  logic [$clog2(W)-1:0] x;
  logic [$clog2(H)-1:0] y;
  logic [9:0] rd_addr_a, rd_addr_b;

  image_compression #(.W(W), .H(H), .OUT(OUT), .BLK_LOG2(BL)) dut (.*);

  int checks = 0, failures = 0, dones = 0, cyc = 0, last_crop_cyc = 0, done_cyc = 0;
  int img [H][W];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && image_done) begin dones++; done_cyc = cyc; end
  end

  task automatic frame(int thr, int lo, int hi);
    threshold = 4'(thr);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        img[r][c] = $urandom_range(lo, hi);
        if ($urandom_range(0, 4) == 0) begin pix_valid <= 0; @(posedge clk); end
        pix_valid <= 1; pix <= 4'(img[r][c]); x <= 6'(c); y <= 6'(r);
        if (r == Y0 + OUT*B - 1 && c == X0 + OUT*B - 1) last_crop_cyc = cyc + 1;
        @(posedge clk);
      end
    pix_valid <= 0;
    repeat (4) @(posedge clk);
    checks++;
    if (done_cyc - last_crop_cyc > 2 || done_cyc < last_crop_cyc) begin
      failures++; $display("FAIL: image_done at %0d, last crop pixel at %0d", done_cyc, last_crop_cyc);
    end
    for (int i = 0; i < OUT*OUT; i++) begin
      int s, m, e;
      s = 0;
      for (int dr = 0; dr < B; dr++)
        for (int dc = 0; dc < B; dc++)
          s += img[Y0 + (i / OUT) * B + dr][X0 + (i % OUT) * B + dc];
      m = s / (B*B);
      e = 15 - m;
      if (e < thr) e = 0;
      rd_addr_a = 10'(i); rd_addr_b = 10'(OUT*OUT - 1 - i);
      #1;
      checks++;
      if (int'(rd_data_a) != e) begin
        failures++; $display("FAIL: pixel %0d = %0d expected %0d", i, rd_data_a, e);
      end
      @(posedge clk);
      rd_addr_b = 10'(i);
      #1;
      checks++;
      if (rd_data_b != rd_data_a) begin failures++; $display("FAIL: port b differs at %0d", i); end
    end
  endtask

  initial begin
    pix_valid = 0; pix = 0; x = 0; y = 0; threshold = 0; rd_addr_a = 0; rd_addr_b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    frame(0, 0, 15);
    frame(6, 0, 15);
    frame(10, 0, 8);
    frame(15, 0, 2);
    checks++;
    if (dones != 4) begin failures++; $display("FAIL: %0d image_done pulses", dones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_camera_capture: self-checking test of the camera bus capture.
//
// Two capture blocks run side by side from two camera models with a 12x6
// frame: one with PCLK much slower than the system clock (period 156 ns
// against 50 ns) and one with PCLK just slower than the system clock
// (period 52 ns against 50 ns, the ratio of a 24 MHz camera to a 25.2 MHz
// system clock). For each, every pixel of several frames must come out once,
// in raster order, with the upper four luma bits, its coordinates and the
// start-of-frame marker. The capture's overflow assertion guards the fast case.
module tb_camera_capture;
  localparam int W = 12, H = 6;
  localparam int N = 2;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;

  int checks = 0, failures = 0;
  int frames_seen [N];

  for (genvar k = 0; k < N; k++) begin : g_pair
    logic cam_pclk, cam_href, cam_vsync;
    logic [7:0] cam_data;
    logic pix_valid, pix_sof;
    logic [3:0] pix;
    logic [$clog2(W)-1:0] x;
    logic [$clog2(H)-1:0] y;
    int ex = 0, ey = 0, ef = -1;

    ov7670_model #(.W(W), .H(H), .HBLANK(6), .VBLANK(2), .HALF_NS(k == 0 ? 78 : 26)) cam (.*);
    camera_capture #(.W(W), .H(H)) dut (.*);

    always @(posedge clk) if (pix_valid) begin
      checks++;
      if (pix_sof) begin
        if (ef >= 0 && (ex != 0 || ey != 0)) begin
          failures++; $display("FAIL: pair %0d frame %0d ended early at %0d,%0d", k, ef, ex, ey);
        end
        ef++; ex = 0; ey = 0;
        frames_seen[k] = ef + 1;
      end
      if (ef >= 0) begin
        if (int'(x) != ex || int'(y) != ey || pix != cam.luma(ef, ex, ey) >> 4 || pix_sof != (ex == 0 && ey == 0)) begin
          failures++;
          $display("FAIL: pair %0d f%0d got (%0d,%0d)=%h expected (%0d,%0d)=%h", k, ef, x, y, pix, ex, ey, cam.luma(ef, ex, ey) >> 4);
        end
        ex++;
        if (ex == W) begin ex = 0; ey++; if (ey == H) ey = 0; end
      end
    end
  end

  initial begin
    for (int k = 0; k < N; k++) frames_seen[k] = 0;
    repeat (20) @(posedge clk);   // several PCLK cycles inside reset
    rst_n = 1;
    wait (g_pair[0].cam.frames == 4);
    repeat (10) @(posedge clk);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (frames_seen[k] < 3) begin failures++; $display("FAIL: pair %0d saw only %0d frames", k, frames_seen[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

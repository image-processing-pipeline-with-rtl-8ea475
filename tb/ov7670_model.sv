// ov7670_model: behavioural model of the camera's parallel video output.
//
// Produces frames of W x H pixels in YUV 4:2:2 (luma byte first, then a chroma
// byte), with a VSYNC pulse before each frame, HREF high for 2*W PCLK cycles
// per line and HBLANK idle PCLK cycles after each line. The luma of pixel
// (x, y) in frame f is luma(f, x, y); PATTERN selects a pseudo-random image (0)
// or a blocky scene with strong edges and a dark stroke in the middle (1).
// `frames` counts frames finished. Setting `abort_frame` to a frame number
// cuts that frame short after `abort_line` lines (a camera that restarts).
module ov7670_model #(
  parameter int W       = 16,
  parameter int H       = 8,
  parameter int HBLANK  = 8,
  parameter int VBLANK  = 4,     // idle lines after VSYNC
  parameter int HALF_NS = 10,    // half PCLK period
  parameter int PATTERN = 0
) (
  output logic       cam_pclk,
  output logic       cam_href,
  output logic       cam_vsync,
  output logic [7:0] cam_data
);
  int frames = 0;
  int abort_frame = -1, abort_line = 0;

  function automatic logic [7:0] luma(int f, int x, int y);
    if (PATTERN == 0)
      return 8'((x * 37 + y * 101 + f * 53) ^ (x * y) ^ (f << 4));
    // scene: bright background, dark square frame, dark vertical stroke
    if (x > W/2 - W/16 && x < W/2 + W/16 && y > H/4 && y < 3*H/4) return 8'h08;
    if ((x / (W/8)) % 3 == 0 && (y / (H/8)) % 3 == 0) return 8'h00;
    return 8'hF0 - 8'((f % 2) * 16);
  endfunction

  initial begin
    cam_pclk = 0; cam_href = 0; cam_vsync = 0; cam_data = 0;
    forever #(HALF_NS) cam_pclk = ~cam_pclk;
  end

  task automatic pclk_cycles(int n);
    repeat (n) @(negedge cam_pclk);
  endtask

  initial begin
    pclk_cycles(20);
    forever begin
      cam_vsync = 1;
      pclk_cycles(2 * HBLANK);
      cam_vsync = 0;
      pclk_cycles(VBLANK * (2 * W + HBLANK));
      for (int y = 0; y < H; y++) begin
        if (frames == abort_frame && y == abort_line) break;
        for (int x = 0; x < W; x++) begin
          cam_href = 1;
          cam_data = luma(frames, x, y);
          pclk_cycles(1);
          cam_data = 8'h80 + 8'(x);
          pclk_cycles(1);
        end
        cam_href = 0;
        pclk_cycles(HBLANK);
      end
      if (frames == abort_frame) abort_frame = -1;
      frames++;
    end
  end
endmodule

// image_compression: shrinks the camera frame to a 28x28 4-bit image for the
// digit classifier and the picture-in-picture preview.
//
// A centred square of OUT*BLK pixels (448x448 of the 640x480 frame by default)
// is cut into OUT x OUT blocks of BLK x BLK pixels. While the frame streams
// past, one accumulator per block column sums the 4-bit pixels of the current
// band of BLK rows; at the end of each band every block's mean (sum shifted
// right by 2*BLK_LOG2, so 0..15) is inverted (15 - mean, so dark ink becomes a
// bright stroke on a black background, like the training digits) and any
// result below `threshold` is forced to 0 (pure black), which removes the
// darker frame corners. The 28 results of a band are written into the image
// store in one clock cycle, the cycle after the band's last pixel.
// `image_done` pulses after the last band of a frame.
//
// The image store (OUT*OUT x 4 bits) has two combinational read ports, one for
// the classifier and one for the preview. Inversion, the black threshold, the
// 28x28 size and 4-bit depth follow the design description; the centred square
// crop and the block mean are this design's choices.
module image_compression #(
  parameter int unsigned W        = 640,
  parameter int unsigned H        = 480,
  parameter int unsigned OUT      = 28,
  parameter int unsigned BLK_LOG2 = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         pix_valid,
  input  logic [3:0]                   pix,
  input  logic [$clog2(W)-1:0]         x,
  input  logic [$clog2(H)-1:0]         y,
  input  logic [3:0]                   threshold,
  output logic                         image_done,
  // read ports
  input  logic [$clog2(OUT*OUT)-1:0]   rd_addr_a,
  output logic [3:0]                   rd_data_a,
  input  logic [$clog2(OUT*OUT)-1:0]   rd_addr_b,
  output logic [3:0]                   rd_data_b
);
  localparam int unsigned BLK  = 1 << BLK_LOG2;
  localparam int unsigned SIDE = OUT * BLK;
  localparam int unsigned X0   = (W - SIDE) / 2;
  localparam int unsigned Y0   = (H - SIDE) / 2;
  localparam int unsigned ACCW = 4 + 2 * BLK_LOG2;
  localparam int unsigned OW   = $clog2(OUT);
  localparam int unsigned IAW  = $clog2(OUT*OUT);

  initial begin
    assert (SIDE <= W && SIDE <= H) else $error("crop larger than the frame");
  end

  logic [3:0]      img [OUT*OUT];
  logic [ACCW-1:0] acc [OUT];
  logic            band_end;
  logic [OW-1:0]   band;

  // Position inside the crop
  logic            in_crop;
  logic [31:0]     cx, cy;
  logic [OW-1:0]   bx;
  always_comb begin
    cx      = 32'(x) - 32'(X0);
    cy      = 32'(y) - 32'(Y0);
    in_crop = pix_valid && (32'(x) >= X0) && (32'(x) < X0 + SIDE)
                        && (32'(y) >= Y0) && (32'(y) < Y0 + SIDE);
    bx      = OW'(cx >> BLK_LOG2);
  end

  function automatic logic [3:0] shade(input logic [ACCW-1:0] sum, input logic [3:0] thr);
    logic [3:0] inv;
    inv = 4'd15 - sum[ACCW-1 -: 4];
    return (inv < thr) ? 4'd0 : inv;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      band_end   <= 1'b0;
      band       <= '0;
      image_done <= 1'b0;
      for (int i = 0; i < OUT; i++) acc[i] <= '0;
    end else begin
      image_done <= 1'b0;
      band_end   <= in_crop && (cx == SIDE - 1) && ((cy & 32'(BLK - 1)) == 32'(BLK - 1));
      if (in_crop) band <= OW'(cy >> BLK_LOG2);
      for (int i = 0; i < OUT; i++) begin
        logic [ACCW-1:0] base;
        base = band_end ? '0 : acc[i];
        acc[i] <= (in_crop && bx == OW'(i)) ? base + ACCW'(pix) : base;
      end
      if (band_end && band == OW'(OUT - 1)) image_done <= 1'b1;
    end
  end

  // Image store: one band of OUT pixels written per band_end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < OUT*OUT; i++) img[i] <= '0;
    end else if (band_end) begin
      for (int i = 0; i < OUT; i++)
        img[IAW'(band) * IAW'(OUT) + IAW'(i)] <= shade(acc[i], threshold);
    end
  end

  assign rd_data_a = img[rd_addr_a];
  assign rd_data_b = img[rd_addr_b];
endmodule

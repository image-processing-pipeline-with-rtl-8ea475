// edge_detection: Sobel edge detector over a raster stream of 4-bit grey pixels.
//
// A four-row rolling line buffer (line_window3x3) supplies one zero-padded 3x3
// window per input pixel; sobel_mac forms |Gx|+|Gy| and a pixel is an edge when
// that sum is above the user threshold. The output frame has the input frame's
// size. Output row k-2 is produced while input row k arrives; the last two rows
// follow the last input pixel back to back, one per cycle (in_ready is low for
// those 2*W cycles).
//
// Interface: in_valid/in_sof/in_pix (in_sof on pixel (0,0)); out_valid with the
// edge bit, its raster address (row*W+col), out_sof on (0,0) and out_last on
// (H-1,W-1). Latency: two cycles from the releasing input pixel.
// Buffering, kernels, absolute-value sum and threshold follow the design
// description; "above" is read as strictly greater, and the flush and address
// outputs are this design's choices.
module edge_detection #(
  parameter int unsigned W = 640,
  parameter int unsigned H = 480
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic                      in_sof,
  input  logic [3:0]                in_pix,
  output logic                      in_ready,
  input  logic [7:0]                threshold,
  output logic                      out_valid,
  output logic                      out_edge,
  output logic [$clog2(W*H)-1:0]    out_addr,
  output logic                      out_sof,
  output logic                      out_last
);
  localparam int unsigned RW = $clog2(H);
  localparam int unsigned CW = $clog2(W);
  localparam int unsigned AW = $clog2(W*H);

  logic                    w_valid;
  logic [2:0][2:0][3:0]    w_win;
  logic [RW-1:0]           w_row;
  logic [CW-1:0]           w_col;
  logic [6:0]              mag;

  line_window3x3 #(.W(W), .H(H), .PW(4)) u_win (
    .clk, .rst_n,
    .in_valid, .in_sof, .in_pix, .in_ready,
    .out_valid(w_valid), .win(w_win), .out_row(w_row), .out_col(w_col)
  );

  sobel_mac u_mac (.win(w_win), .mag(mag));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_edge  <= 1'b0;
      out_addr  <= '0;
      out_sof   <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= w_valid;
      if (w_valid) begin
        out_edge <= {1'b0, mag} > threshold;
        out_addr <= AW'(w_row) * AW'(W) + AW'(w_col);
        out_sof  <= (w_row == '0) && (w_col == '0);
        out_last <= (w_row == RW'(H-1)) && (w_col == CW'(W-1));
      end
    end
  end
endmodule

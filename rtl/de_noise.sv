// de_noise: removes isolated edge pixels from a 1-bit edge stream.
//
// Uses the same four-row rolling line buffer as the edge detector, with 1-bit
// pixels, and replaces the Sobel unit with neighbour_count: an edge pixel stays
// an edge only if at least `threshold` of its eight neighbours are edges;
// non-edge pixels stay non-edges. Pixels outside the frame count as non-edges.
// Interface and timing are those of edge_detection (two cycles from the
// releasing input pixel, the last two rows flushed back to back).
// The algorithm follows the design description. Its pseudo-code compares
// "n > THRESHOLD" while its prose says "greater than or equal to"; this module
// uses greater-or-equal.
module de_noise #(
  parameter int unsigned W = 640,
  parameter int unsigned H = 480
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic                      in_sof,
  input  logic                      in_edge,
  output logic                      in_ready,
  input  logic [3:0]                threshold,
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
  logic [2:0][2:0][0:0]    w_win;
  logic [RW-1:0]           w_row;
  logic [CW-1:0]           w_col;
  logic                    keep;

  line_window3x3 #(.W(W), .H(H), .PW(1)) u_win (
    .clk, .rst_n,
    .in_valid, .in_sof, .in_pix(in_edge), .in_ready,
    .out_valid(w_valid), .win(w_win), .out_row(w_row), .out_col(w_col)
  );

  neighbour_count u_cnt (.win(w_win), .threshold, .keep);

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
        out_edge <= keep;
        out_addr <= AW'(w_row) * AW'(W) + AW'(w_col);
        out_sof  <= (w_row == '0) && (w_col == '0);
        out_last <= (w_row == RW'(H-1)) && (w_col == CW'(W-1));
      end
    end
  end
endmodule

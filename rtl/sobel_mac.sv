// sobel_mac: Sobel gradient magnitude of one 3x3 window of 4-bit pixels.
//
// Gx = [-1 0 1; -2 0 2; -1 0 1], Gy = its transpose. The result is |Gx|+|Gy|
// (at most 120 for 4-bit pixels), combinational. Summing the two absolute
// gradients follows the design description; the weights are the standard
// Sobel kernels it names.
module sobel_mac (
  input  logic [2:0][2:0][3:0] win,
  output logic [6:0]           mag
);
  logic signed [7:0] gx, gy;
  logic [6:0]        ax, ay;

  function automatic logic signed [7:0] p(input logic [3:0] v);
    return $signed({4'b0, v});
  endfunction

  always_comb begin
    gx = (p(win[0][2]) + 8'sd2 * p(win[1][2]) + p(win[2][2]))
       - (p(win[0][0]) + 8'sd2 * p(win[1][0]) + p(win[2][0]));
    gy = (p(win[2][0]) + 8'sd2 * p(win[2][1]) + p(win[2][2]))
       - (p(win[0][0]) + 8'sd2 * p(win[0][1]) + p(win[0][2]));
    ax  = 7'(gx < 0 ? -gx : gx);
    ay  = 7'(gy < 0 ? -gy : gy);
    mag = ax + ay;
  end
endmodule

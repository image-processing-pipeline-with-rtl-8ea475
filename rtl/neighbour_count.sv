// neighbour_count: denoise decision for one 3x3 window of 1-bit edge pixels.
//
// Counts how many of the eight neighbours of the centre pixel are edges and
// keeps the centre as an edge only if it is one and the count is greater than
// or equal to the threshold. Combinational.
module neighbour_count (
  input  logic [2:0][2:0][0:0] win,
  input  logic [3:0]           threshold,
  output logic                 keep
);
  logic [3:0] count;

  always_comb begin
    count = '0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        if (!(r == 1 && c == 1))
          count = count + 4'(win[r][c]);
    keep = win[1][1][0] && (count >= threshold);
  end
endmodule

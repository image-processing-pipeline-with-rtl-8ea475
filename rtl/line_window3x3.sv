// line_window3x3: rolling four-row line buffer that turns a raster pixel
// stream into a stream of zero-padded 3x3 neighbourhoods.
//
// Pixels arrive one at a time in raster order (in_sof marks pixel (0,0)). Row k
// is written into buffer k mod 4. While row k is being written, the three
// complete rows k-3..k-1 are read to produce output row k-2, one output window
// per input pixel, so the fourth buffer is always the one being filled. After
// the last input row, the last two output rows are produced back to back, one
// window per cycle (the "flush"); in_ready is low during the flush. Rows above
// the top, below the bottom and columns outside the frame read as zero, so the
// output frame has the same size as the input frame.
//
// Output timing: a window is registered, one cycle after the input pixel that
// released it. win[r][c] is row (out_row-1+r), column (out_col-1+c).
// The four-row scheme follows the design description; the flush ordering and
// the ready signal are this design's choices.
module line_window3x3 #(
  parameter int unsigned W  = 640,
  parameter int unsigned H  = 480,
  parameter int unsigned PW = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic                   in_sof,
  input  logic [PW-1:0]          in_pix,
  output logic                   in_ready,
  output logic                   out_valid,
  output logic [2:0][2:0][PW-1:0] win,
  output logic [$clog2(H)-1:0]   out_row,
  output logic [$clog2(W)-1:0]   out_col
);
  localparam int unsigned RW = $clog2(H);
  localparam int unsigned CW = $clog2(W);

  logic [PW-1:0] rows [4][W];

  logic [RW-1:0] in_row;
  logic [CW-1:0] in_col;
  logic          flushing;
  logic          flush_second;     // producing row H-1 during the flush
  logic [CW-1:0] flush_col;

  assign in_ready = !flushing;

  // Which output row / column is produced this cycle, if any
  logic          produce;
  logic [RW:0]   o_row;            // one extra bit so that row-1 < 0 is visible
  logic [CW-1:0] o_col;
  logic [RW-1:0] cur_row;          // row of the pixel being accepted
  logic [CW-1:0] cur_col;

  always_comb begin
    cur_row = in_sof ? '0 : in_row;
    cur_col = in_sof ? '0 : in_col;
    produce = 1'b0;
    o_row   = '0;
    o_col   = '0;
    if (flushing) begin
      produce = 1'b1;
      o_row   = flush_second ? (RW+1)'(H-1) : (RW+1)'(H-2);
      o_col   = flush_col;
    end else if (in_valid && cur_row >= RW'(2)) begin
      produce = 1'b1;
      o_row   = (RW+1)'(cur_row) - (RW+1)'(2);
      o_col   = cur_col;
    end
  end

  // Zero-padded read of pixel (r, c); r and c carry one guard bit each way
  function automatic logic [PW-1:0] rd(input logic signed [RW+1:0] r,
                                       input logic signed [CW+1:0] c);
    if (r < 0 || r >= $signed((RW+2)'(H)) || c < 0 || c >= $signed((CW+2)'(W)))
      return '0;
    return rows[r[1:0]][c[CW-1:0]];
  endfunction

  always_ff @(posedge clk) begin
    if (in_valid && !flushing)
      rows[cur_row[1:0]][cur_col] <= in_pix;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_row       <= '0;
      in_col       <= '0;
      flushing     <= 1'b0;
      flush_second <= 1'b0;
      flush_col    <= '0;
      out_valid    <= 1'b0;
      win          <= '0;
      out_row      <= '0;
      out_col      <= '0;
    end else begin
      out_valid <= produce;
      if (produce) begin
        out_row <= o_row[RW-1:0];
        out_col <= o_col;
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++)
            win[r][c] <= rd($signed({1'b0, o_row}) + (RW+2)'(r) - (RW+2)'(1),
                            $signed({2'b0, o_col}) + (CW+2)'(c) - (CW+2)'(1));
      end
      if (flushing) begin
        if (flush_col == CW'(W-1)) begin
          flush_col <= '0;
          if (flush_second) begin
            flushing     <= 1'b0;
            flush_second <= 1'b0;
          end else begin
            flush_second <= 1'b1;
          end
        end else begin
          flush_col <= flush_col + 1'b1;
        end
      end else if (in_valid) begin
        if (cur_col == CW'(W-1)) begin
          in_col <= '0;
          if (cur_row == RW'(H-1)) begin
            in_row   <= '0;
            flushing <= 1'b1;
          end else begin
            in_row <= cur_row + 1'b1;
          end
        end else begin
          in_row <= cur_row;
          in_col <= cur_col + 1'b1;
        end
      end
    end
  end

endmodule

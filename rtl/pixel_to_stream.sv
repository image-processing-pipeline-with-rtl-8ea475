// pixel_to_stream: packs processed pixels into 64-bit stream beats for the
// frame buffer.
//
// Each incoming pixel carries its raster address. The two low address bits
// choose its 16-bit slot in the beat being built (pixel k in bits
// [16k+11:16k], upper four bits of each slot zero); the pixel in slot 3
// completes the beat, which is offered on the stream in the next cycle. The
// beat holding the frame's last pixel (address W*H-1) carries TLAST, so the
// memory side can start the next frame at the start of a buffer.
// A completed beat waits in a one-beat register until taken; a beat completed
// while the previous one is still waiting replaces it and `overflow` pulses
// (the input has no back-pressure; the FIFO behind this block is deep enough
// that this does not happen in normal operation).
// Four 12-bit pixels zero-padded per beat and TLAST from the address follow
// the design description; the overflow handling is this design's choice.
module pixel_to_stream #(
  parameter int unsigned W = 640,
  parameter int unsigned H = 480
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      pix_valid,
  input  logic [11:0]               pix,
  input  logic [$clog2(W*H)-1:0]    pix_addr,
  output logic [63:0]               m_tdata,
  output logic                      m_tvalid,
  output logic                      m_tlast,
  input  logic                      m_tready,
  output logic                      overflow
);
  localparam int unsigned AW = $clog2(W*H);

  logic [2:0][11:0] part;   // slots 0..2 of the beat being built

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      part     <= '0;
      m_tdata  <= '0;
      m_tvalid <= 1'b0;
      m_tlast  <= 1'b0;
      overflow <= 1'b0;
    end else begin
      overflow <= 1'b0;
      if (m_tvalid && m_tready) m_tvalid <= 1'b0;
      if (pix_valid) begin
        if (pix_addr[1:0] == 2'd3) begin
          m_tdata  <= {4'h0, pix, 4'h0, part[2], 4'h0, part[1], 4'h0, part[0]};
          m_tlast  <= (pix_addr == AW'(W*H - 1));
          m_tvalid <= 1'b1;
          overflow <= m_tvalid && !m_tready;
        end else begin
          part[pix_addr[1:0]] <= pix;
        end
      end
    end
  end
endmodule

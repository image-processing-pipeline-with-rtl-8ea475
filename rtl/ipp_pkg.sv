// ipp_pkg: types and constants shared by the image processing pipeline.
//
// The frame geometry (640x480, 4-bit grey processing pixels, 12-bit RGB444
// display pixels padded to 16 bits, four pixels per 64-bit stream beat) follows
// the design description. The DataMover command layout is the standard 72-bit
// format of the Xilinx AXI DataMover (BTT, type, EOF, start address, tag); the
// field positions are this design's choice, taken from that IP's convention.
package ipp_pkg;

  // Frame geometry
  localparam int unsigned FRAME_W   = 640;
  localparam int unsigned FRAME_H   = 480;
  localparam int unsigned GREY_W    = 4;   // processing pixel width
  localparam int unsigned RGB_W     = 12;  // display colour width (4:4:4)
  localparam int unsigned STREAM_W  = 64;  // stream and memory data width
  localparam int unsigned PIX_PER_BEAT = STREAM_W / 16;

  // One beat of a 64-bit AXI-Stream (data plus end-of-frame marker)
  typedef struct packed {
    logic [STREAM_W-1:0] data;
    logic                last;
  } axis_beat_t;

  // 72-bit DataMover command word
  typedef struct packed {
    logic [3:0]  rsvd;    // [71:68]
    logic [3:0]  tag;     // [67:64]
    logic [31:0] saddr;   // [63:32]
    logic        drr;     // [31]
    logic        eof;     // [30]
    logic [5:0]  dsa;     // [29:24]
    logic        incr;    // [23]
    logic [22:0] btt;     // [22:0] bytes to transfer
  } dm_cmd_t;

  function automatic dm_cmd_t make_dm_cmd(input logic [31:0] addr,
                                          input logic [22:0] btt,
                                          input logic        eof,
                                          input logic [3:0]  tag);
    dm_cmd_t c;
    c       = '0;
    c.saddr = addr;
    c.btt   = btt;
    c.eof   = eof;
    c.incr  = 1'b1;
    c.tag   = tag;
    return c;
  endfunction

  // Status flags of the whole pipeline (pulses unless noted)
  typedef struct packed {
    logic       wr_region;        // level: frame region being written
    logic       rd_region;        // level: frame region being displayed
    logic [1:0] complete;         // level: regions holding a complete frame
    logic       frame_written;    // a complete frame reached memory
    logic       frame_dropped;    // an early end of frame restarted the write
    logic       discarding;       // level: writing past a frame's end
    logic       frame_shown;      // the display finished reading a frame
    logic       region_switch;    // ... and moved to the other region
    logic       vga_resync;       // the display re-aligned on an early TLAST
    logic       vga_underflow;    // the display repeated four pixels
    logic       stream_overflow;  // a packed beat was overwritten
    logic       edge_flush;       // level: edge detector emitting its last rows
    logic       denoise_flush;    // level: denoiser emitting its last rows
  } pipe_status_t;

  // Grey level to the 12-bit display colour used for every channel
  function automatic logic [RGB_W-1:0] grey_to_rgb(input logic [3:0] g);
    return {g, g, g};
  endfunction

endpackage

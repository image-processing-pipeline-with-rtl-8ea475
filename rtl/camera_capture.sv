// camera_capture: OV7670 parallel video bus to a 4-bit grey pixel stream in
// the system clock domain.
//
// The camera drives PCLK, HREF, VSYNC and an 8-bit data bus; in the YUV 4:2:2
// mode set by the configuration table each pixel is two bytes, luma first.
// The bus is registered on the rising edge of PCLK, in PCLK's own clock
// domain: VSYNC high restarts the frame, every other byte while HREF is high
// is a luma byte, and the end of HREF ends a row. For each luma byte inside
// the W x H frame, its upper four bits, its column and row and a start-of-frame
// bit are written into a small asynchronous FIFO (cdc_fifo) that carries them
// into the system clock. The system side pops one word per clock and presents
// it for one cycle. The camera delivers a pixel every two PCLK cycles, so any
// system clock faster than PCLK/2 keeps the FIFO from filling (the OV7670's
// 24 MHz PCLK at 30 frames/s against the 25.2 MHz system clock); an assertion
// checks this in simulation.
//
// Reset: rst_n resets both sides; its release is synchronised into the PCLK
// domain with two flops, and back into the system clock before the FIFO's
// read side starts, so PCLK must run for a few cycles while rst_n is low.
// Outputs: pix_valid for one cycle per pixel with pix, its column x and row y,
// and pix_sof on pixel (0,0). Latency: about three system clocks plus one PCLK
// cycle after the PCLK edge that carried the luma byte.
// The 4-bit black-and-white pixel format follows the design description;
// taking it from the luma byte and the clock crossing are this design's choices.
module camera_capture #(
  parameter int unsigned W = 640,
  parameter int unsigned H = 480
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cam_pclk,
  input  logic                  cam_href,
  input  logic                  cam_vsync,
  input  logic [7:0]            cam_data,
  output logic                  pix_valid,
  output logic                  pix_sof,
  output logic [3:0]            pix,
  output logic [$clog2(W)-1:0]  x,
  output logic [$clog2(H)-1:0]  y
);
  localparam int unsigned CW = $clog2(W);
  localparam int unsigned RW = $clog2(H);
  localparam int unsigned DW = 1 + 4 + CW + RW;

  // ---------------- camera (PCLK) domain ----------------
  logic [1:0] prst_sync;
  logic       prst_n;
  always_ff @(posedge cam_pclk or negedge rst_n) begin
    if (!rst_n) prst_sync <= '0;
    else        prst_sync <= {prst_sync[0], 1'b1};
  end
  assign prst_n = prst_sync[1];

  logic        href_q, vsync_q;
  logic [7:0]  data_q;
  logic        byte_phase;       // 0: luma byte, 1: chroma byte
  logic        in_line;
  logic [CW:0] col;
  logic [RW:0] row;
  logic          w_en, w_full;
  logic [DW-1:0] w_data;

  always_ff @(posedge cam_pclk or negedge prst_n) begin
    if (!prst_n) begin
      href_q  <= 1'b0;
      vsync_q <= 1'b0;
      data_q  <= '0;
    end else begin
      href_q  <= cam_href;
      vsync_q <= cam_vsync;
      data_q  <= cam_data;
    end
  end

  always_ff @(posedge cam_pclk or negedge prst_n) begin
    if (!prst_n) begin
      byte_phase <= 1'b0;
      in_line    <= 1'b0;
      col        <= '0;
      row        <= '0;
      w_en       <= 1'b0;
      w_data     <= '0;
    end else begin
      w_en <= 1'b0;
      if (vsync_q) begin
        row        <= '0;
        col        <= '0;
        byte_phase <= 1'b0;
        in_line    <= 1'b0;
      end else if (href_q) begin
        in_line    <= 1'b1;
        byte_phase <= !byte_phase;
        if (!byte_phase) begin
          if (col < (CW+1)'(W) && row < (RW+1)'(H)) begin
            w_en   <= 1'b1;
            w_data <= {(col == '0) && (row == '0), data_q[7:4], col[CW-1:0], row[RW-1:0]};
          end
          col <= col + 1'b1;
        end
      end else if (in_line) begin
        in_line    <= 1'b0;
        byte_phase <= 1'b0;
        col        <= '0;
        row        <= row + 1'b1;
      end
    end
  end

  no_overflow: assert property (@(posedge cam_pclk) disable iff (!prst_n) !(w_en && w_full))
    else $error("camera pixel lost: system clock too slow for PCLK");

  // ---------------- crossing ----------------
  // The read side leaves reset only after the camera side has, so it never
  // compares against a write pointer that has not been reset yet.
  logic [1:0]    crst_sync;
  logic          crst_n;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) crst_sync <= '0;
    else        crst_sync <= {crst_sync[0], prst_n};
  end
  assign crst_n = crst_sync[1];

  logic          r_empty;
  logic [DW-1:0] r_data;
  cdc_fifo #(.DW(DW), .AW(3)) u_cdc (
    .wclk(cam_pclk), .wrst_n(prst_n), .w_en, .w_data, .w_full,
    .rclk(clk), .rrst_n(crst_n), .r_en(!r_empty), .r_data, .r_empty);

  // ---------------- system domain ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_valid <= 1'b0;
      pix_sof   <= 1'b0;
      pix       <= '0;
      x         <= '0;
      y         <= '0;
    end else begin
      pix_valid <= !r_empty;
      if (!r_empty) {pix_sof, pix, x, y} <= r_data;
      else          pix_sof <= 1'b0;
    end
  end
endmodule

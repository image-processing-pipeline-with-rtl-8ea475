// cdc_fifo: small asynchronous FIFO that carries words from one clock domain
// to another.
//
// Classic Gray-code pointer design. Each side keeps a binary pointer and its
// Gray-coded copy; the Gray pointer of the other side is brought across with a
// two-flop synchroniser. The reader sees the FIFO empty when its Gray pointer
// equals the synchronised write pointer; the writer sees it full when the
// synchronised read pointer equals its own with the two top bits inverted.
// Because at most one bit of a Gray pointer changes per step, a pointer caught
// mid-change is either the old or the new value, so the flags are only ever
// pessimistic. The storage is a 2^AW-entry array written in the write domain
// and read combinationally in the read domain (r_data shows the oldest word
// while r_empty is low; r_en pops it).
//
// Both sides are reset by their own active-low reset, which must be released
// synchronously to that side's clock. The FIFO is this design's own means of
// crossing from the camera clock into the system clock.
module cdc_fifo #(
  parameter int unsigned DW = 8,
  parameter int unsigned AW = 3
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          w_en,
  input  logic [DW-1:0] w_data,
  output logic          w_full,
  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          r_en,
  output logic [DW-1:0] r_data,
  output logic          r_empty
);
  logic [DW-1:0] mem [2**AW];
  logic [AW:0]   wbin, wgray, rbin, rgray;
  logic [AW:0]   rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0]   wbin_next, rbin_next;

  // write side
  assign wbin_next = wbin + 1'b1;
  assign w_full    = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wclk) begin
    if (w_en && !w_full) mem[wbin[AW-1:0]] <= w_data;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (w_en && !w_full) begin
        wbin  <= wbin_next;
        wgray <= wbin_next ^ (wbin_next >> 1);
      end
    end
  end

  // read side
  assign rbin_next = rbin + 1'b1;
  assign r_empty   = (rgray == wgray_r2);
  assign r_data    = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (r_en && !r_empty) begin
        rbin  <= rbin_next;
        rgray <= rbin_next ^ (rbin_next >> 1);
      end
    end
  end
endmodule

// datamover_controller: drives the memory mover that keeps two frame buffers
// ("ping-pong") in external DRAM.
//
// It has two nearly independent halves that share only reset and the two
// "frame complete" flags.
//
// Write half (stream to memory): when the input FIFO holds at least one burst
// (in_low low) it issues a write command for BURST beats at
// base[wr_region] + n*ADDR_STEP and waits for the mover's status. It watches
// the beats leaving the input FIFO for TLAST. After the last burst of a frame
// (n reaches FRAME_TXNS) with TLAST seen, the region is marked complete and the
// other region becomes the write region (its complete flag is cleared). If
// FRAME_TXNS bursts are done without TLAST, further bursts overwrite the last
// burst's address, discarding data until TLAST comes. A TLAST that arrives in
// an earlier burst ends the frame there: the partial frame is not marked
// complete and the next frame is written from the start of the same region, so
// the reader never enters a region the writer is ahead in.
//
// Read half (memory to stream): when the output FIFO has room for a burst
// (out_high low) it issues a read command for BURST beats at
// base[rd_region] + n*ADDR_STEP; the frame's last command has its EOF bit set,
// so the mover ends that burst with TLAST. At the end of a frame it moves to
// the other region only if that region holds a complete frame, otherwise it
// shows the same frame again. Reading runs at least twice as fast as writing,
// so a reader that stays in a region the writer has just entered stays ahead of
// the writer.
//
// Commands use the 72-bit mover command format (ipp_pkg::dm_cmd_t) with
// valid/ready handshakes; one command per half is outstanding at a time.
// ADDR_STEP is twice the burst size: the mover used with this design leaves a
// gap of one beat after each beat written with 64-bit bursts of eight, and the
// same step on both sides keeps reads and writes consistent.
// The halves, the counters, the TLAST rules, the level checks, the burst of 8
// and the doubled step follow the design description; the handling of an early
// TLAST and the base addresses are this design's choices.
module datamover_controller
  import ipp_pkg::*;
#(
  parameter int unsigned FRAME_BEATS = FRAME_W * FRAME_H / PIX_PER_BEAT,  // 76800
  parameter int unsigned BURST       = 8,
  parameter int unsigned BEAT_BYTES  = STREAM_W / 8,
  parameter int unsigned ADDR_STEP   = 2 * BURST * BEAT_BYTES,
  parameter logic [31:0] BASE0       = 32'h8000_0000,
  parameter logic [31:0] BASE1       = 32'h8020_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  // write half
  input  logic        in_low,          // input FIFO holds less than a burst
  input  logic        in_beat,         // a beat leaves the input FIFO
  input  logic        in_beat_last,    // ... and it carries TLAST
  output dm_cmd_t     s2mm_cmd,
  output logic        s2mm_cmd_valid,
  input  logic        s2mm_cmd_ready,
  input  logic        s2mm_sts_valid,
  output logic        s2mm_sts_ready,
  // read half
  input  logic        out_high,        // output FIFO has room for less than a burst
  output dm_cmd_t     mm2s_cmd,
  output logic        mm2s_cmd_valid,
  input  logic        mm2s_cmd_ready,
  input  logic        mm2s_sts_valid,
  output logic        mm2s_sts_ready,
  // status
  output logic        wr_region,
  output logic        rd_region,
  output logic [1:0]  complete,
  output logic        frame_written,   // pulse: a complete frame was stored
  output logic        frame_dropped,   // pulse: an early TLAST ended a partial frame
  output logic        discarding,      // writing past the frame end, waiting for TLAST
  output logic        frame_shown,     // pulse: a frame read ended
  output logic        region_switch    // pulse: ... and the reader changed region
);
  localparam int unsigned TXNS = FRAME_BEATS / BURST;
  localparam int unsigned NW   = $clog2(TXNS + 1);
  localparam logic [22:0] BTT  = 23'(BURST * BEAT_BYTES);

  initial begin
    assert (FRAME_BEATS % BURST == 0) else $error("a frame must be a whole number of bursts");
  end

  function automatic logic [31:0] addr_of(input logic region, input logic [NW-1:0] n);
    return (region ? BASE1 : BASE0) + 32'(n) * 32'(ADDR_STEP);
  endfunction

  assign s2mm_sts_ready = 1'b1;
  assign mm2s_sts_ready = 1'b1;

  // ---------------- write half ----------------
  typedef enum logic [1:0] {W_IDLE, W_CMD, W_WAIT} wstate_t;
  wstate_t       wstate;
  logic [NW-1:0] wcnt;
  logic          tlast_seen;
  logic [NW-1:0] wcnt_next;

  assign wcnt_next  = wcnt + 1'b1;
  assign discarding = (wcnt == NW'(TXNS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wstate         <= W_IDLE;
      wcnt           <= '0;
      tlast_seen     <= 1'b0;
      wr_region      <= 1'b0;
      complete       <= 2'b00;
      s2mm_cmd       <= '0;
      s2mm_cmd_valid <= 1'b0;
      frame_written  <= 1'b0;
      frame_dropped  <= 1'b0;
    end else begin
      frame_written <= 1'b0;
      frame_dropped <= 1'b0;
      unique case (wstate)
        W_IDLE: if (!in_low) begin
          s2mm_cmd       <= make_dm_cmd(addr_of(wr_region, (wcnt == NW'(TXNS)) ? NW'(TXNS - 1) : wcnt),
                                        BTT, 1'b1, {3'b000, wr_region});
          s2mm_cmd_valid <= 1'b1;
          tlast_seen     <= 1'b0;
          wstate         <= W_CMD;
        end
        W_CMD: begin
          if (in_beat && in_beat_last) tlast_seen <= 1'b1;
          if (s2mm_cmd_ready) begin
            s2mm_cmd_valid <= 1'b0;
            wstate         <= W_WAIT;
          end
        end
        W_WAIT: begin
          if (in_beat && in_beat_last) tlast_seen <= 1'b1;
          if (s2mm_sts_valid) begin
            wstate <= W_IDLE;
            if ((tlast_seen || (in_beat && in_beat_last)) && wcnt_next >= NW'(TXNS)) begin
              complete[wr_region]  <= 1'b1;
              complete[!wr_region] <= 1'b0;
              wr_region            <= !wr_region;
              wcnt                 <= '0;
              frame_written        <= 1'b1;
            end else if (tlast_seen || (in_beat && in_beat_last)) begin
              // early TLAST: start the next frame over in the same region
              wcnt          <= '0;
              frame_dropped <= 1'b1;
            end else if (wcnt != NW'(TXNS)) begin
              wcnt <= wcnt_next;
            end
          end
        end
        default: wstate <= W_IDLE;
      endcase
    end
  end

  // ---------------- read half ----------------
  typedef enum logic [1:0] {R_IDLE, R_CMD, R_WAIT} rstate_t;
  rstate_t       rstate;
  logic [NW-1:0] rcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate         <= R_IDLE;
      rcnt           <= '0;
      rd_region      <= 1'b0;
      mm2s_cmd       <= '0;
      mm2s_cmd_valid <= 1'b0;
      frame_shown    <= 1'b0;
      region_switch  <= 1'b0;
    end else begin
      frame_shown   <= 1'b0;
      region_switch <= 1'b0;
      unique case (rstate)
        R_IDLE: if (!out_high) begin
          mm2s_cmd       <= make_dm_cmd(addr_of(rd_region, rcnt), BTT,
                                        rcnt == NW'(TXNS - 1), {3'b000, rd_region});
          mm2s_cmd_valid <= 1'b1;
          rstate         <= R_CMD;
        end
        R_CMD: if (mm2s_cmd_ready) begin
          mm2s_cmd_valid <= 1'b0;
          rstate         <= R_WAIT;
        end
        R_WAIT: if (mm2s_sts_valid) begin
          rstate <= R_IDLE;
          if (rcnt == NW'(TXNS - 1)) begin
            rcnt        <= '0;
            frame_shown <= 1'b1;
            if (complete[!rd_region]) begin
              rd_region     <= !rd_region;
              region_switch <= 1'b1;
            end
          end else begin
            rcnt <= rcnt + 1'b1;
          end
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end

  // command handshake rule: a command offered is held until taken
  assert property (@(posedge clk) disable iff (!rst_n)
                   (s2mm_cmd_valid && !s2mm_cmd_ready) |=> (s2mm_cmd_valid && $stable(s2mm_cmd)));
  assert property (@(posedge clk) disable iff (!rst_n)
                   (mm2s_cmd_valid && !mm2s_cmd_ready) |=> (mm2s_cmd_valid && $stable(mm2s_cmd)));
endmodule

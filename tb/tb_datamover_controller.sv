// tb_datamover_controller: self-checking test of the ping-pong frame buffer
// controller, with stream FIFOs and a behavioural mover and memory.
//
// Uses 32-beat frames (four bursts of eight). A source writes numbered frames
// (each beat holds its frame number and index) into a 64-deep input FIFO at a
// quarter of the clock rate; the reader side drains a 16-deep output FIFO at
// full rate. Checks:
//  * every write and read command address is base + n*ADDR_STEP of its region;
//  * no write burst waits for data and no read burst waits for room (the
//    level flags are honoured);
//  * every frame read out is whole: 32 beats of one source frame in order,
//    TLAST on the last beat only, and the frame number never goes backwards;
//  * the reader changes region only to a completed frame, and shows frames
//    again while no newer one is complete;
//  * a frame sent 8 beats too long has its surplus written over its last
//    burst (the write side discards until TLAST, as specified, so that one
//    frame is wrong at the end) and a frame sent 8 beats short ends early and
//    is never shown; the frames after both are whole again.
module tb_datamover_controller;
  import ipp_pkg::*;
  localparam int FB = 32, BURST = 8, STEP = 2 * BURST * 8;
  localparam logic [31:0] B0 = 32'h8000_0000, B1 = 32'h8020_0000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // source -> input FIFO
  logic [63:0] src_tdata; logic src_tlast, src_tvalid, src_tready;
  logic [63:0] w_tdata;   logic w_tlast, w_tvalid, w_tready;
  logic [63:0] r_tdata;   logic r_tlast, r_tvalid, r_tready;
  logic [63:0] o_tdata;   logic o_tlast, o_tvalid, o_tready;
  logic [6:0] in_level; logic [4:0] out_level;
  logic in_low, in_high, out_low, out_high;
  dm_cmd_t s2mm_cmd, mm2s_cmd;
  logic s2mm_cmd_valid, s2mm_cmd_ready, s2mm_sts_valid, s2mm_sts_ready;
  logic mm2s_cmd_valid, mm2s_cmd_ready, mm2s_sts_valid, mm2s_sts_ready;
  logic wr_region, rd_region, frame_written, frame_dropped, discarding, frame_shown, region_switch;
  logic [1:0] complete;

  axis_fifo #(.DEPTH(64), .MARK(8)) fin (.clk, .rst_n,
    .s_tdata(src_tdata), .s_tlast(src_tlast), .s_tvalid(src_tvalid), .s_tready(src_tready),
    .m_tdata(w_tdata), .m_tlast(w_tlast), .m_tvalid(w_tvalid), .m_tready(w_tready),
    .level(in_level), .low(in_low), .high(in_high));
  axis_fifo #(.DEPTH(16), .MARK(8)) fout (.clk, .rst_n,
    .s_tdata(r_tdata), .s_tlast(r_tlast), .s_tvalid(r_tvalid), .s_tready(r_tready),
    .m_tdata(o_tdata), .m_tlast(o_tlast), .m_tvalid(o_tvalid), .m_tready(o_tready),
    .level(out_level), .low(out_low), .high(out_high));

  datamover_controller #(.FRAME_BEATS(FB), .BURST(BURST), .BASE0(B0), .BASE1(B1)) dut (
    .clk, .rst_n, .in_low, .in_beat(w_tvalid && w_tready), .in_beat_last(w_tlast),
    .s2mm_cmd, .s2mm_cmd_valid, .s2mm_cmd_ready, .s2mm_sts_valid, .s2mm_sts_ready,
    .out_high, .mm2s_cmd, .mm2s_cmd_valid, .mm2s_cmd_ready, .mm2s_sts_valid, .mm2s_sts_ready,
    .wr_region, .rd_region, .complete, .frame_written, .frame_dropped, .discarding,
    .frame_shown, .region_switch);

  datamover_model mover (.clk, .rst_n,
    .s2mm_cmd, .s2mm_cmd_valid, .s2mm_cmd_ready,
    .s2mm_tdata(w_tdata), .s2mm_tlast(w_tlast), .s2mm_tvalid(w_tvalid), .s2mm_tready(w_tready),
    .s2mm_sts_valid,
    .mm2s_cmd, .mm2s_cmd_valid, .mm2s_cmd_ready,
    .mm2s_tdata(r_tdata), .mm2s_tlast(r_tlast), .mm2s_tvalid(r_tvalid), .mm2s_tready(r_tready),
    .mm2s_sts_valid);

  int checks = 0, failures = 0;
  int n_written = 0, n_dropped = 0, n_discard = 0, n_shown = 0, n_switch = 0, n_repeat = 0;

  // ---------------- source ----------------
  int sf = 1, sb = 0, cyc = 0;
  function automatic int len_of(int f);
    return (f == 5) ? FB + 8 : (f == 8) ? FB - 8 : FB;
  endfunction
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (src_tvalid && src_tready) begin
      sb++;
      if (sb == len_of(sf)) begin sb = 0; sf++; end
    end
    if (!(src_tvalid && !src_tready)) begin
      src_tvalid <= (cyc % 4 == 0) && sf <= 14;
      src_tdata  <= {32'(sf), 32'(sb)};
      src_tlast  <= (sb == len_of(sf) - 1);
    end
  end

  // ---------------- command and sink checks ----------------
  int ob = 0, of = -1, last_f = 0;
  bit bad_frame = 0;
  always @(posedge clk) if (rst_n) begin
    if (s2mm_cmd_valid && s2mm_cmd_ready) begin
      longint off;
      off = longint'(s2mm_cmd.saddr) - longint'(wr_region ? B1 : B0);
      checks++;
      if (off < 0 || off % STEP != 0 || off / STEP >= FB / BURST || s2mm_cmd.btt != 23'(BURST * 8)) begin
        failures++; $display("FAIL: write command at %h", s2mm_cmd.saddr);
      end
    end
    if (mm2s_cmd_valid && mm2s_cmd_ready) begin
      longint off;
      off = longint'(mm2s_cmd.saddr) - longint'(rd_region ? B1 : B0);
      checks++;
      if (off < 0 || off % STEP != 0 || off / STEP >= FB / BURST ||
          mm2s_cmd.eof != (off / STEP == FB / BURST - 1)) begin
        failures++; $display("FAIL: read command at %h eof %b", mm2s_cmd.saddr, mm2s_cmd.eof);
      end
    end
    if (frame_written) n_written++;
    if (frame_dropped) n_dropped++;
    if (discarding && s2mm_cmd_valid && s2mm_cmd_ready) n_discard++;
    if (frame_shown) n_shown++;
    if (region_switch) begin
      n_switch++;
      checks++;
      if (!complete[rd_region]) begin failures++; $display("FAIL: switched to an incomplete region"); end
    end
    if (o_tvalid && o_tready) begin
      int f, b;
      f = int'(o_tdata[63:32]); b = int'(o_tdata[31:0]);
      if (ob == 0) of = f;
      // frames read before the first region switch may be partly unwritten:
      // only frames that start after it are checked. Frame 5 was sent eight
      // beats long: its last burst holds the eight extra beats.
      if (ob == 0 && n_switch == 0) of = 0;
      if (of != 0) begin
        int eb;
        eb = (of == 5 && ob >= FB - BURST) ? ob + 8 : ob;
        checks++;
        if (f != of || b != eb || o_tlast != (ob == FB - 1)) begin
          failures++; $display("FAIL: output beat %0d of frame %0d holds %0d.%0d last %b", ob, of, f, b, o_tlast);
        end
      end
      ob++;
      if (ob == FB) begin
        ob = 0;
        if (of != 0) begin
          checks++;
          if (of < last_f) begin failures++; $display("FAIL: frame %0d shown after %0d", of, last_f); end
          if (of == last_f) n_repeat++;
          last_f = of;
        end
      end
    end
  end

  initial begin
    src_tvalid = 0; src_tdata = 0; src_tlast = 0; o_tready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (sf == 15);
    repeat (2000) @(posedge clk);
    checks += 8;
    if (mover.stalls_w != 0) begin failures++; $display("FAIL: write bursts waited %0d cycles for data", mover.stalls_w); end
    if (mover.stalls_r != 0) begin failures++; $display("FAIL: read bursts waited %0d cycles for room", mover.stalls_r); end
    if (n_written < 10) begin failures++; $display("FAIL: only %0d frames written", n_written); end
    if (n_dropped == 0) begin failures++; $display("FAIL: the short frame did not end early"); end
    if (n_discard == 0) begin failures++; $display("FAIL: the long frame was not trimmed"); end
    if (n_switch < 8)   begin failures++; $display("FAIL: only %0d region switches", n_switch); end
    if (n_repeat == 0)  begin failures++; $display("FAIL: no frame shown twice"); end
    if (last_f < 12)    begin failures++; $display("FAIL: last frame shown %0d", last_f); end
    $display("written %0d dropped %0d discard bursts %0d shown %0d switches %0d repeats %0d last %0d",
             n_written, n_dropped, n_discard, n_shown, n_switch, n_repeat, last_f);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// datamover_model: behavioural model of the stream/memory mover and the DRAM
// behind it, for testbenches.
//
// Accepts 72-bit commands (ipp_pkg::dm_cmd_t) on two channels. A write command
// takes BTT/8 beats from the write stream and stores beat k at byte address
// saddr + 8k; a read command waits READ_LAT cycles, then sends BTT/8 beats
// read from the same addresses (never-written words read as zero), with TLAST
// on the last beat if the command's EOF bit is set. Each finished command
// returns one status pulse. `stalls_w` counts cycles a write command waited for
// a beat; `stalls_r` cycles a read beat waited for the sink. `last_w_addr` and
// `last_r_addr` hold the start address of the latest commands. While `pause_r`
// is set no new read burst starts (a memory that falls behind).
module datamover_model
  import ipp_pkg::*;
#(
  parameter int READ_LAT = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  dm_cmd_t     s2mm_cmd,
  input  logic        s2mm_cmd_valid,
  output logic        s2mm_cmd_ready,
  input  logic [63:0] s2mm_tdata,
  input  logic        s2mm_tlast,
  input  logic        s2mm_tvalid,
  output logic        s2mm_tready,
  output logic        s2mm_sts_valid,
  input  dm_cmd_t     mm2s_cmd,
  input  logic        mm2s_cmd_valid,
  output logic        mm2s_cmd_ready,
  output logic [63:0] mm2s_tdata,
  output logic        mm2s_tlast,
  output logic        mm2s_tvalid,
  input  logic        mm2s_tready,
  output logic        mm2s_sts_valid
);
  logic [63:0] mem [longint];
  int stalls_w = 0, stalls_r = 0, n_wcmd = 0, n_rcmd = 0;
  longint last_w_addr = 0, last_r_addr = 0;

  // write channel
  bit     w_busy = 0;
  longint w_addr;
  int     w_left;
  assign s2mm_cmd_ready = rst_n && !w_busy;
  assign s2mm_tready    = w_busy;
  always @(posedge clk) begin
    s2mm_sts_valid <= 0;
    if (!rst_n) w_busy <= 0;
    else if (!w_busy) begin
      if (s2mm_cmd_valid) begin
        w_busy <= 1; w_addr = longint'(s2mm_cmd.saddr); w_left = int'(s2mm_cmd.btt) / 8;
        last_w_addr = w_addr; n_wcmd++;
      end
    end else if (s2mm_tvalid) begin
      mem[w_addr] = s2mm_tdata;
      w_addr += 8; w_left--;
      if (w_left == 0) begin w_busy <= 0; s2mm_sts_valid <= 1; end
    end else stalls_w++;
  end

  // read channel
  bit     r_busy = 0;
  longint r_addr;
  int     r_left, r_wait;
  bit     r_eof;
  bit     pause_r = 0;
  assign mm2s_cmd_ready = rst_n && !r_busy;
  always @(posedge clk) begin
    mm2s_sts_valid <= 0;
    if (!rst_n) begin r_busy <= 0; mm2s_tvalid <= 0; end
    else if (!r_busy) begin
      if (mm2s_cmd_valid) begin
        r_busy <= 1; r_addr = longint'(mm2s_cmd.saddr); r_left = int'(mm2s_cmd.btt) / 8;
        r_eof = mm2s_cmd.eof; r_wait = READ_LAT; last_r_addr = r_addr; n_rcmd++;
      end
    end else if (r_wait > 0) begin
      if (!pause_r) r_wait--;
      if (r_wait == 0) begin
        mm2s_tvalid <= 1;
        mm2s_tdata  <= mem.exists(r_addr) ? mem[r_addr] : 64'h0;
        mm2s_tlast  <= r_eof && r_left == 1;
      end
    end else if (mm2s_tvalid && mm2s_tready) begin
      r_addr += 8; r_left--;
      if (r_left == 0) begin
        mm2s_tvalid <= 0; r_busy <= 0; mm2s_sts_valid <= 1;
      end else begin
        mm2s_tdata <= mem.exists(r_addr) ? mem[r_addr] : 64'h0;
        mm2s_tlast <= r_eof && r_left == 1;
      end
    end else if (mm2s_tvalid) stalls_r++;
  end
endmodule

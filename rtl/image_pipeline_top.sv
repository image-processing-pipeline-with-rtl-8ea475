// image_pipeline_top: camera-to-VGA edge detection pipeline with a handwritten
// digit classifier, built entirely from logic (no processor).
//
// Data flow:
//   camera bus -> camera_capture (4-bit grey) -+-> edge_detection -> de_noise
//                                              |     -> pixel_to_stream -> input FIFO (512)
//                                              |     -> memory mover write channel (DRAM)
//                                              |   memory mover read channel -> output FIFO (64)
//                                              |     -> vga_driver -> VGA connector
//                                              +-> image_compression (28x28) -> neural_network
// The camera is configured once after reset (cam_config walks cam_config_rom
// and writes each register through sccb_master). The datamover_controller
// issues burst commands to the external memory mover so that complete frames
// alternate between two DRAM regions and the display always reads a completed
// frame; because the display runs at 60 frames/s and the camera slower, frames
// are shown more than once. threshold_control sets the edge, denoise and
// compression thresholds from the buttons; seven_seg shows them and the three
// best digits. The 28x28 image is shown scaled in the top left corner when
// pip_en is set. Edge pixels are drawn white, others black.
//
// Interface: the camera bus and SCCB pins, buttons, switch, LEDs, seven-segment
// and VGA pins, the command/status/stream ports of the external memory mover
// (the vendor mover, memory controller and DRAM are outside this RTL), and a
// port for loading the classifier's parameters, the three best digits with all
// ten scores, and a status word of pipeline events.
// Timing: everything runs on clk, the 25.2 MHz VGA pixel clock, except the
// first register stage of camera_capture, which runs on the camera's PCLK and
// hands pixels to clk through a small asynchronous FIFO (clk must be faster
// than PCLK/2; the OV7670's 24 MHz PCLK qualifies).
// The structure follows the design description; the clock crossing and the
// parameter load port are this design's choices.
module image_pipeline_top
  import ipp_pkg::*;
#(
  parameter int unsigned W          = FRAME_W,
  parameter int unsigned H          = FRAME_H,
  parameter int unsigned H_FP       = 16,
  parameter int unsigned H_SYNC     = 96,
  parameter int unsigned H_BP       = 48,
  parameter int unsigned V_FP       = 10,
  parameter int unsigned V_SYNC     = 2,
  parameter int unsigned V_BP       = 33,
  parameter int unsigned IN_FIFO    = 512,
  parameter int unsigned OUT_FIFO   = 64,
  parameter int unsigned BURST      = 8,
  parameter int unsigned CMP_OUT    = 28,
  parameter int unsigned BLK_LOG2   = 4,
  parameter int unsigned PIP_SCALE  = 4,
  parameter int unsigned SCCB_QUARTER = 63,
  parameter int unsigned CFG_DELAY  = 25_200,
  parameter int unsigned DEBOUNCE   = 250_000,
  parameter int unsigned REFRESH    = 25_000
) (
  input  logic        clk,
  input  logic        rst_n,
  // camera
  input  logic        cam_pclk,
  input  logic        cam_href,
  input  logic        cam_vsync,
  input  logic [7:0]  cam_data,
  output logic        cam_sioc,
  output logic        cam_siod_out,
  output logic        cam_siod_oe,
  output logic        cam_config_done,
  // board controls and displays
  input  logic        btn_c,
  input  logic        btn_u,
  input  logic        btn_d,
  input  logic        pip_en,
  output logic [2:0]  led,
  output logic [7:0]  an,
  output logic [6:0]  seg,
  // VGA
  output logic [3:0]  vga_r,
  output logic [3:0]  vga_g,
  output logic [3:0]  vga_b,
  output logic        vga_hs,
  output logic        vga_vs,
  // external memory mover: write channel
  output dm_cmd_t     s2mm_cmd,
  output logic        s2mm_cmd_valid,
  input  logic        s2mm_cmd_ready,
  output logic [63:0] s2mm_tdata,
  output logic        s2mm_tlast,
  output logic        s2mm_tvalid,
  input  logic        s2mm_tready,
  input  logic        s2mm_sts_valid,
  output logic        s2mm_sts_ready,
  // external memory mover: read channel
  output dm_cmd_t     mm2s_cmd,
  output logic        mm2s_cmd_valid,
  input  logic        mm2s_cmd_ready,
  input  logic [63:0] mm2s_tdata,
  input  logic        mm2s_tlast,
  input  logic        mm2s_tvalid,
  output logic        mm2s_tready,
  input  logic        mm2s_sts_valid,
  output logic        mm2s_sts_ready,
  // classifier parameters and result
  input  logic        wt_we,
  input  logic [2:0]  wt_sel,
  input  logic [9:0]  wt_row,
  input  logic [3:0]  wt_col,
  input  logic signed [15:0] wt_data,
  output logic [3:0]  digit [3],
  output logic        digit_valid,
  output logic signed [71:0] digit_scores [10],
  // status
  output pipe_status_t status,
  output logic [1:0]  thr_sel
);
  localparam int unsigned AW  = $clog2(W * H);
  localparam int unsigned IAW = $clog2(CMP_OUT * CMP_OUT);

  // ---------------- camera configuration ----------------
  logic       cfg_start, cfg_started;
  logic [4:0] rom_addr;
  logic [15:0] rom_data;
  logic       sccb_start, sccb_ready, sccb_done;
  logic [7:0] sccb_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_start   <= 1'b0;
      cfg_started <= 1'b0;
    end else begin
      cfg_start   <= !cfg_started;
      cfg_started <= 1'b1;
    end
  end

  cam_config #(.DELAY(CFG_DELAY)) u_cfg (
    .clk, .rst_n, .start(cfg_start), .done(cam_config_done),
    .rom_addr, .rom_data, .sccb_start, .sccb_data, .sccb_ready, .sccb_done);
  cam_config_rom u_rom (.addr(rom_addr), .dout(rom_data));
  sccb_master #(.QUARTER(SCCB_QUARTER)) u_sccb (
    .clk, .rst_n, .start(sccb_start), .data(sccb_data), .ready(sccb_ready), .done(sccb_done),
    .sioc(cam_sioc), .siod_out(cam_siod_out), .siod_oe(cam_siod_oe));

  // ---------------- capture ----------------
  logic                 g_valid, g_sof;
  logic [3:0]           g_pix;
  logic [$clog2(W)-1:0] g_x;
  logic [$clog2(H)-1:0] g_y;
  camera_capture #(.W(W), .H(H)) u_cap (
    .clk, .rst_n, .cam_pclk, .cam_href, .cam_vsync, .cam_data,
    .pix_valid(g_valid), .pix_sof(g_sof), .pix(g_pix), .x(g_x), .y(g_y));

  // ---------------- thresholds and display ----------------
  logic [7:0] edge_thr;
  logic [3:0] denoise_thr, compress_thr;
  threshold_control #(.DEBOUNCE(DEBOUNCE)) u_thr (
    .clk, .rst_n, .btn_c, .btn_u, .btn_d, .edge_thr, .denoise_thr, .compress_thr,
    .sel(thr_sel), .sel_led(led));

  logic have_digits;
  seven_seg #(.REFRESH(REFRESH)) u_seg (
    .clk, .rst_n,
    .digits({edge_thr[7:4], edge_thr[3:0], denoise_thr, compress_thr, 4'h0, digit[0], digit[1], digit[2]}),
    .blank({4'b0000, 1'b1, {3{!have_digits}}}),
    .an, .seg);

  // ---------------- edge detection and denoise ----------------
  logic          e_valid, e_edge, e_sof, e_last, e_ready;
  logic [AW-1:0] e_addr;
  edge_detection #(.W(W), .H(H)) u_edge (
    .clk, .rst_n, .in_valid(g_valid), .in_sof(g_sof), .in_pix(g_pix), .in_ready(e_ready),
    .threshold(edge_thr), .out_valid(e_valid), .out_edge(e_edge), .out_addr(e_addr),
    .out_sof(e_sof), .out_last(e_last));

  logic          d_valid, d_edge, d_sof, d_last, d_ready;
  logic [AW-1:0] d_addr;
  de_noise #(.W(W), .H(H)) u_dn (
    .clk, .rst_n, .in_valid(e_valid), .in_sof(e_sof), .in_edge(e_edge), .in_ready(d_ready),
    .threshold(denoise_thr), .out_valid(d_valid), .out_edge(d_edge), .out_addr(d_addr),
    .out_sof(d_sof), .out_last(d_last));

  // ---------------- to the frame buffer ----------------
  logic [63:0] p_tdata;
  logic        p_tvalid, p_tlast, p_tready, p_overflow;
  pixel_to_stream #(.W(W), .H(H)) u_p2s (
    .clk, .rst_n, .pix_valid(d_valid), .pix(d_edge ? 12'hFFF : 12'h000), .pix_addr(d_addr),
    .m_tdata(p_tdata), .m_tvalid(p_tvalid), .m_tlast(p_tlast), .m_tready(p_tready),
    .overflow(p_overflow));

  logic [$clog2(IN_FIFO+1)-1:0]  in_level;
  logic                          in_low, in_high;
  axis_fifo #(.DEPTH(IN_FIFO), .MARK(BURST)) u_fin (
    .clk, .rst_n,
    .s_tdata(p_tdata), .s_tlast(p_tlast), .s_tvalid(p_tvalid), .s_tready(p_tready),
    .m_tdata(s2mm_tdata), .m_tlast(s2mm_tlast), .m_tvalid(s2mm_tvalid), .m_tready(s2mm_tready),
    .level(in_level), .low(in_low), .high(in_high));

  logic [$clog2(OUT_FIFO+1)-1:0] out_level;
  logic                          out_low, out_high;
  logic [63:0] v_tdata;
  logic        v_tvalid, v_tlast, v_tready;
  axis_fifo #(.DEPTH(OUT_FIFO), .MARK(BURST)) u_fout (
    .clk, .rst_n,
    .s_tdata(mm2s_tdata), .s_tlast(mm2s_tlast), .s_tvalid(mm2s_tvalid), .s_tready(mm2s_tready),
    .m_tdata(v_tdata), .m_tlast(v_tlast), .m_tvalid(v_tvalid), .m_tready(v_tready),
    .level(out_level), .low(out_low), .high(out_high));

  logic       wr_region, rd_region, frame_written, frame_dropped, discarding, frame_shown, region_switch;
  logic [1:0] complete;
  datamover_controller #(.FRAME_BEATS(W * H / PIX_PER_BEAT), .BURST(BURST)) u_dmc (
    .clk, .rst_n, .in_low, .in_beat(s2mm_tvalid && s2mm_tready), .in_beat_last(s2mm_tlast),
    .s2mm_cmd, .s2mm_cmd_valid, .s2mm_cmd_ready, .s2mm_sts_valid, .s2mm_sts_ready,
    .out_high, .mm2s_cmd, .mm2s_cmd_valid, .mm2s_cmd_ready, .mm2s_sts_valid, .mm2s_sts_ready,
    .wr_region, .rd_region, .complete, .frame_written, .frame_dropped, .discarding,
    .frame_shown, .region_switch);

  // ---------------- compression, classifier, display ----------------
  logic           img_done;
  logic [IAW-1:0] nn_addr, pip_addr;
  logic [3:0]     nn_pix, pip_pix;
  image_compression #(.W(W), .H(H), .OUT(CMP_OUT), .BLK_LOG2(BLK_LOG2)) u_cmp (
    .clk, .rst_n, .pix_valid(g_valid), .pix(g_pix), .x(g_x), .y(g_y), .threshold(compress_thr),
    .image_done(img_done), .rd_addr_a(nn_addr), .rd_data_a(nn_pix),
    .rd_addr_b(pip_addr), .rd_data_b(pip_pix));

  logic              nn_busy;
  neural_network #(.N_IN(CMP_OUT * CMP_OUT)) u_nn (
    .clk, .rst_n, .start(img_done && !nn_busy), .busy(nn_busy), .done(digit_valid),
    .pix_addr(nn_addr), .pix_data(nn_pix),
    .wt_we, .wt_sel, .wt_row(10'(wt_row)), .wt_col, .wt_data,
    .scores(digit_scores), .top(digit));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) have_digits <= 1'b0;
    else if (digit_valid) have_digits <= 1'b1;
  end

  logic vga_resync, vga_underflow;
  vga_driver #(.H_ACT(W), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
               .V_ACT(H), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP),
               .PIP_N(CMP_OUT), .PIP_SCALE(PIP_SCALE)) u_vga (
    .clk, .rst_n, .s_tdata(v_tdata), .s_tvalid(v_tvalid), .s_tlast(v_tlast), .s_tready(v_tready),
    .pip_en, .pip_addr, .pip_data(pip_pix),
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs, .resync(vga_resync), .underflow(vga_underflow));

  assign status = '{wr_region: wr_region, rd_region: rd_region, complete: complete,
                    frame_written: frame_written, frame_dropped: frame_dropped,
                    discarding: discarding, frame_shown: frame_shown,
                    region_switch: region_switch, vga_resync: vga_resync,
                    vga_underflow: vga_underflow, stream_overflow: p_overflow,
                    edge_flush: !e_ready, denoise_flush: !d_ready};
endmodule

// pipeline_harness: end-to-end test bench body for image_pipeline_top, shared
// by the reduced-size and the full-size testbenches.
//
// What it does: drives the whole pipeline from a behavioural camera, with a
// behavioural memory mover and an SCCB listener attached, and checks every
// mechanism of the design from the outside:
//   - the camera register writes on the SCCB bus,
//   - the classifier parameters load, and every classification result
//     (scores and top 3) against a reference computed here from the camera
//     picture,
//   - whole displayed VGA frames against the edge + denoise reference of one
//     complete camera frame (a torn or mixed frame fails),
//   - the VGA frame period,
//   - the picture-in-picture preview against the compressed reference,
//   - a threshold change through the buttons, seen on the VGA picture, the
//     seven-segment display and the LEDs,
//   - frame buffer behaviour: region switches, repeated frames when the
//     camera is slower than the display, the discard mode after a camera frame
//     is cut short, underflow and TLAST resync after the memory stalls,
//   - the end-of-frame flush of both 3x3 window stages.
// Each mechanism has a counter; one that never happened counts as a failure.
//
// How: FULL=1 instantiates the top with no parameter overrides (all defaults,
// 640x480); FULL=0 passes the reduced parameters of this module. The VGA
// picture is rebuilt from the sync pulses: after the VSYNC falling edge,
// V_SYNC+V_BP HSYNC falling edges precede line 0, and pixel x of a line
// appears H_SYNC+H_BP+x cycles after that line's preceding HSYNC fall.
// The system clock period is 50 ns and PCLK's 52 ns: the ratio of a 24 MHz
// camera to the 25.2 MHz system clock.
module pipeline_harness
  import ipp_pkg::*;
#(
  parameter bit FULL      = 1'b0,
  parameter int W         = FRAME_W,
  parameter int H         = FRAME_H,
  parameter int H_FP      = 16,
  parameter int H_SYNC    = 96,
  parameter int H_BP      = 48,
  parameter int V_FP      = 10,
  parameter int V_SYNC    = 2,
  parameter int V_BP      = 33,
  parameter int BLK_LOG2  = 4,
  parameter int PIP_SCALE = 4,
  parameter int SCCB_QUARTER = 63,
  parameter int CFG_DELAY = 25_200,
  parameter int DEBOUNCE  = 250_000,
  parameter int REFRESH   = 25_000,
  parameter int CAM_HBLANK = 8,
  parameter int CAM_VBLANK = 4,
  parameter longint WATCHDOG = 64'd60_000_000
) ();
  localparam int H_TOT = W + H_FP + H_SYNC + H_BP;
  localparam int V_TOT = H + V_FP + V_SYNC + V_BP;
  localparam int N_OUT = 28;
  localparam int N_IN  = N_OUT * N_OUT;
  localparam int NN    = 10;
  localparam int BLK   = 1 << BLK_LOG2;
  localparam int X0    = (W - N_OUT * BLK) / 2;
  localparam int Y0    = (H - N_OUT * BLK) / 2;

  int checks = 0, failures = 0;
  longint cyc = 0;

  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- DUT and models ----------------
  logic       cam_pclk, cam_href, cam_vsync;
  logic [7:0] cam_data;
  logic       cam_sioc, cam_siod_out, cam_siod_oe, cam_config_done;
  logic       btn_c, btn_u, btn_d, pip_en;
  logic [2:0] led;
  logic [7:0] an;
  logic [6:0] seg;
  logic [3:0] vga_r, vga_g, vga_b;
  logic       vga_hs, vga_vs;
  dm_cmd_t    s2mm_cmd, mm2s_cmd;
  logic       s2mm_cmd_valid, s2mm_cmd_ready, s2mm_tlast, s2mm_tvalid, s2mm_tready;
  logic       s2mm_sts_valid, s2mm_sts_ready;
  logic       mm2s_cmd_valid, mm2s_cmd_ready, mm2s_tlast, mm2s_tvalid, mm2s_tready;
  logic       mm2s_sts_valid, mm2s_sts_ready;
  logic [63:0] s2mm_tdata, mm2s_tdata;
  logic       wt_we = 0;
  logic [2:0] wt_sel = 0;
  logic [9:0] wt_row = 0;
  logic [3:0] wt_col = 0;
  logic signed [15:0] wt_data = 0;
  logic [3:0] digit [3];
  logic       digit_valid;
  logic signed [71:0] digit_scores [10];
  pipe_status_t status;
  logic [1:0] thr_sel;

  ov7670_model #(.W(W), .H(H), .HBLANK(CAM_HBLANK), .VBLANK(CAM_VBLANK), .HALF_NS(26),
                 .PATTERN(1)) cam (.*);
  sccb_slave_model sccb (.sioc(cam_sioc), .siod(cam_siod_oe ? cam_siod_out : 1'b1));
  datamover_model mover (.*);

  generate
    if (FULL) begin : g_full
      image_pipeline_top dut (.*);
    end else begin : g_small
      image_pipeline_top #(
        .W(W), .H(H), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
        .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP), .BLK_LOG2(BLK_LOG2),
        .PIP_SCALE(PIP_SCALE), .SCCB_QUARTER(SCCB_QUARTER), .CFG_DELAY(CFG_DELAY),
        .DEBOUNCE(DEBOUNCE), .REFRESH(REFRESH)) dut (.*);
    end
  endgenerate

  // ---------------- reference models ----------------
  int edge_thr_ref = 48, dn_thr_ref = 2, cmp_thr_ref = 4;

  function automatic int grey(int f, int x, int y);
    if (x < 0 || y < 0 || x >= W || y >= H) return 0;
    return int'(cam.luma(f, x, y)) >> 4;
  endfunction

  function automatic bit is_edge(int f, int x, int y, int thr);
    int gx, gy;
    if (x < 0 || y < 0 || x >= W || y >= H) return 0;
    gx = (grey(f, x+1, y-1) + 2*grey(f, x+1, y) + grey(f, x+1, y+1))
       - (grey(f, x-1, y-1) + 2*grey(f, x-1, y) + grey(f, x-1, y+1));
    gy = (grey(f, x-1, y+1) + 2*grey(f, x, y+1) + grey(f, x+1, y+1))
       - (grey(f, x-1, y-1) + 2*grey(f, x, y-1) + grey(f, x+1, y-1));
    return ((gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy)) > thr;
  endfunction

  // edge + denoise picture of camera frame f, into ref_pic
  bit ref_e [H][W], ref_pic [H][W];
  function automatic void ref_frame(int f);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) ref_e[y][x] = is_edge(f, x, y, edge_thr_ref);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      int n = 0;
      for (int dy = -1; dy <= 1; dy++) for (int dx = -1; dx <= 1; dx++)
        if ((dx != 0 || dy != 0) && y+dy >= 0 && y+dy < H && x+dx >= 0 && x+dx < W)
          n += int'(ref_e[y+dy][x+dx]);
      ref_pic[y][x] = ref_e[y][x] && n >= dn_thr_ref;
    end
  endfunction

  // compressed 28x28 picture of camera frame f
  function automatic int cmp_pix(int f, int i);
    int sum = 0, inv;
    for (int dy = 0; dy < BLK; dy++) for (int dx = 0; dx < BLK; dx++)
      sum += grey(f, X0 + (i % N_OUT) * BLK + dx, Y0 + (i / N_OUT) * BLK + dy);
    inv = 15 - (sum >> (2 * BLK_LOG2));
    return inv < cmp_thr_ref ? 0 : inv;
  endfunction

  // ---------------- classifier parameters ----------------
  int W1 [N_IN][NN], W2 [NN][NN], W3 [NN][NN], B [3][NN];
  bit weights_loaded = 0;

  function automatic int rnd16();
    return int'($urandom_range(0, 65534)) - 32767;
  endfunction

  task automatic load(int sel, int row, int col, int v);
    wt_we <= 1; wt_sel <= 3'(sel); wt_row <= 10'(row); wt_col <= 4'(col); wt_data <= 16'(v);
    @(posedge clk);
  endtask

  task automatic load_all();
    for (int r = 0; r < N_IN; r++) for (int c = 0; c < NN; c++) begin W1[r][c] = rnd16(); load(0, r, c, W1[r][c]); end
    for (int r = 0; r < NN; r++) for (int c = 0; c < NN; c++) begin W2[r][c] = rnd16(); load(1, r, c, W2[r][c]); end
    for (int r = 0; r < NN; r++) for (int c = 0; c < NN; c++) begin W3[r][c] = rnd16(); load(2, r, c, W3[r][c]); end
    for (int l = 0; l < 3; l++) for (int c = 0; c < NN; c++) begin B[l][c] = rnd16(); load(3 + l, 0, c, B[l][c]); end
    wt_we <= 0;
    @(posedge clk);
    weights_loaded = 1;
  endtask

  // 1 if the classifier output matches camera frame f
  function automatic bit nn_match(int f);
    logic signed [127:0] h1 [NN], h2 [NN], o [NN];
    int img [N_IN], best [3];
    bit taken [NN];
    for (int i = 0; i < N_IN; i++) img[i] = cmp_pix(f, i);
    for (int n = 0; n < NN; n++) begin
      h1[n] = B[0][n];
      for (int i = 0; i < N_IN; i++) h1[n] += 128'(img[i]) * 128'(W1[i][n]);
      if (h1[n] < 0) h1[n] = 0;
    end
    for (int n = 0; n < NN; n++) begin
      h2[n] = B[1][n];
      for (int i = 0; i < NN; i++) h2[n] += h1[i] * 128'(W2[i][n]);
      if (h2[n] < 0) h2[n] = 0;
    end
    for (int n = 0; n < NN; n++) begin
      o[n] = B[2][n];
      for (int i = 0; i < NN; i++) o[n] += h2[i] * 128'(W3[i][n]);
      if (128'(digit_scores[n]) != o[n]) return 0;
      taken[n] = 0;
    end
    for (int k = 0; k < 3; k++) begin
      best[k] = -1;
      for (int n = 0; n < NN; n++)
        if (!taken[n] && (best[k] < 0 || o[n] > o[best[k]])) best[k] = n;
      taken[best[k]] = 1;
      if (int'(digit[k]) != best[k]) return 0;
    end
    return 1;
  endfunction

  int nn_ok = 0;
  always @(posedge clk) begin
    if (rst_n && digit_valid && weights_loaded) begin
      checks++;
      // the classified picture belongs to the frame being captured or the one before
      if (nn_match(cam.frames) || nn_match(cam.frames - 1)) nn_ok++;
      else begin failures++; $display("FAIL: classifier result does not match frame %0d or %0d", cam.frames, cam.frames - 1); end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_switch = 0, n_repeat = 0, n_discard = 0, n_resync = 0, n_underflow = 0;
  int n_eflush = 0, n_dflush = 0, n_written = 0, n_overflow = 0;
  bit eflush_d = 0, dflush_d = 0, discard_d = 0;
  always @(posedge clk) if (rst_n) begin
    if (status.region_switch) n_switch++;
    if (status.frame_shown && !status.region_switch) n_repeat++;
    if (status.discarding && !discard_d) n_discard++;
    if (status.vga_resync) n_resync++;
    if (status.vga_underflow) n_underflow++;
    if (status.edge_flush && !eflush_d) n_eflush++;
    if (status.denoise_flush && !dflush_d) n_dflush++;
    if (status.frame_written) n_written++;
    if (status.stream_overflow) n_overflow++;
    eflush_d <= status.edge_flush;
    dflush_d <= status.denoise_flush;
    discard_d <= status.discarding;
  end

  // ---------------- VGA picture capture ----------------
  bit disp [H][W];
  bit disp_bad;
  int lcnt = -1000, hcnt = 0, npix = 0;
  longint last_vs = -1;
  bit vs_d = 1, hs_d = 1;
  bit check_disp = 0, check_pip = 0;
  int disp_ok = 0, pip_checked = 0, period_ok = 0, frames_seen = 0;
  int pip_img [N_IN];

  task automatic judge_frame();
    bit hit = 0;
    // a displayed frame must equal one complete camera frame
    for (int f = cam.frames - 1; f >= 0 && f >= cam.frames - 5 && !hit; f--) begin
      bit same = 1;
      ref_frame(f);
      for (int y = 0; y < H && same; y++) for (int x = 0; x < W && same; x++) begin
        if (check_pip && x < N_OUT * PIP_SCALE && y < N_OUT * PIP_SCALE) continue;
        if (ref_pic[y][x] != disp[y][x]) same = 0;
      end
      hit = same;
    end
    checks++;
    if (hit && !disp_bad) disp_ok++;
    else begin failures++; $display("FAIL: displayed frame %0d matches no recent camera frame (camera at %0d, bad colour %0d, preview %0d)", frames_seen, cam.frames, disp_bad, check_pip); end
    if (check_pip) begin
      int fails = 0;
      for (int i = 0; i < N_IN; i++)
        if (pip_img[i] != cmp_pix(cam.frames, i) && pip_img[i] != cmp_pix(cam.frames - 1, i)) fails++;
      checks++;
      if (fails == 0) pip_checked++;
      else begin failures++; $display("FAIL: %0d preview pixels wrong", fails); end
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    vs_d <= vga_vs;
    hs_d <= vga_hs;
    if (hs_d && !vga_hs) begin hcnt = 0; lcnt++; end
    else hcnt++;
    if (vs_d && !vga_vs) begin
      if (check_disp) begin
        checks++;
        if (last_vs >= 0 && cyc - last_vs == longint'(H_TOT * V_TOT)) period_ok++;
        else begin failures++; $display("FAIL: VGA frame period %0d, expected %0d", cyc - last_vs, H_TOT * V_TOT); end
        if (npix == W * H) judge_frame();
        else begin checks++; failures++; $display("FAIL: captured %0d pixels of a frame", npix); end
        frames_seen++;
      end
      last_vs = cyc;
      lcnt = -(V_SYNC + V_BP);
      npix = 0;
      disp_bad = 0;
    end
    if (lcnt >= 0 && lcnt < H && hcnt >= H_SYNC + H_BP && hcnt < H_SYNC + H_BP + W) begin
      int x;
      x = hcnt - (H_SYNC + H_BP);
      npix++;
      if (check_pip && x < N_OUT * PIP_SCALE && lcnt < N_OUT * PIP_SCALE) begin
        if (vga_r != vga_g || vga_r != vga_b) disp_bad = 1;
        pip_img[(lcnt / PIP_SCALE) * N_OUT + x / PIP_SCALE] = int'(vga_r);
      end else begin
        if ({vga_r, vga_g, vga_b} == 12'hFFF) disp[lcnt][x] = 1;
        else if ({vga_r, vga_g, vga_b} == 12'h000) disp[lcnt][x] = 0;
        else disp_bad = 1;
      end
    end
  end

  // ---------------- seven-segment capture ----------------
  logic [6:0] seg_seen [8];
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < 8; i++) if (!an[i]) seg_seen[i] <= ~seg;

  function automatic logic [6:0] seg_of(int v);
    case (v)
      0: return 7'h3F; 1: return 7'h06; 2: return 7'h5B; 3: return 7'h4F;
      4: return 7'h66; 5: return 7'h6D; 6: return 7'h7D; 7: return 7'h07;
      8: return 7'h7F; 9: return 7'h6F; 10: return 7'h77; 11: return 7'h7C;
      12: return 7'h39; 13: return 7'h5E; 14: return 7'h79; default: return 7'h71;
    endcase
  endfunction

  task automatic check_seg();
    int want [8];
    want[7] = edge_thr_ref >> 4; want[6] = edge_thr_ref & 15; want[5] = dn_thr_ref; want[4] = cmp_thr_ref;
    want[2] = digit[0]; want[1] = digit[1]; want[0] = digit[2];
    repeat (8 * REFRESH + 8) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      if (i == 3) continue;
      checks++;
      if (seg_seen[i] != seg_of(want[i])) begin
        failures++; $display("FAIL: digit %0d shows %h, expected %0d", i, seg_seen[i], want[i]);
      end
    end
  endtask

  // 0 = centre, 1 = up, 2 = down
  task automatic press(int which);
    btn_c <= which == 0; btn_u <= which == 1; btn_d <= which == 2;
    repeat (3 * DEBOUNCE + 4) @(posedge clk);
    btn_c <= 0; btn_u <= 0; btn_d <= 0;
    repeat (3 * DEBOUNCE + 4) @(posedge clk);
  endtask

  // wait for a condition with a cycle limit
  task automatic wait_frames_written(int n);
    int target;
    target = n_written + n;
    while (n_written < target) @(posedge clk);
  endtask

  task automatic wait_cam_frames(int n);
    int target;
    target = cam.frames + n;
    while (cam.frames < target) @(posedge clk);
  endtask

  task automatic wait_vga_frames(int n);
    int target;
    target = frames_seen + n;
    while (frames_seen < target) @(posedge clk);
  endtask

  task automatic mech(string name, int count);
    checks++;
    if (count == 0) begin failures++; $display("FAIL: mechanism never happened: %s", name); end
    else $display("  %-34s %0d", name, count);
  endtask

  // ---------------- sequence ----------------
  initial begin
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) disp[y][x] = 0;
    for (int i = 0; i < N_IN; i++) pip_img[i] = 0;
    for (int i = 0; i < 8; i++) seg_seen[i] = 0;
    disp_bad = 0;
    btn_c = 0; btn_u = 0; btn_d = 0; pip_en = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    load_all();

    // camera configuration
    while (!cam_config_done) @(posedge clk);
    checks++;
    if (sccb.writes.size() != 11 || sccb.errors != 0) begin
      failures++; $display("FAIL: %0d camera register writes, %0d bus errors", sccb.writes.size(), sccb.errors);
    end
    foreach (sccb.writes[i]) begin
      checks++;
      if (sccb.writes[i][23:16] != 8'h42) begin failures++; $display("FAIL: SCCB id %h", sccb.writes[i][23:16]); end
    end
    checks++;
    if (sccb.writes.size() > 0 && sccb.writes[0][15:0] != 16'h1280) begin
      failures++; $display("FAIL: first camera write %h, expected reset 1280", sccb.writes[0][15:0]);
    end

    // let the frame buffer settle on real frames
    while (n_switch < 2) @(posedge clk);

    // the memory falls behind for a while: underflow, then resync on TLAST
    mover.pause_r = 1;
    repeat (H_TOT * 4) @(posedge clk);
    mover.pause_r = 0;

    // a camera frame cut short: the writer discards until the next frame end
    cam.abort_line  = H / 2;
    cam.abort_frame = cam.frames + 1;
    while (n_discard == 0) @(posedge clk);
    wait_frames_written(3);

    // whole displayed frames against the reference
    while (vga_vs) @(posedge clk);
    check_disp = 1;
    wait_vga_frames(3);
    check_disp = 0;
    check_seg();

    // preview on, checked from the next whole frame
    pip_en <= 1;
    @(negedge vga_vs);
    @(posedge clk);
    #1 check_pip = 1;
    check_disp = 1;
    wait_vga_frames(2);
    check_pip = 0;
    pip_en <= 0;
    check_disp = 0;

    // raise the edge threshold by two steps with the up button
    checks++;
    if (thr_sel != 2'd0 || led != 3'b001) begin failures++; $display("FAIL: threshold select %0d leds %b", thr_sel, led); end
    press(1);
    press(1);
    edge_thr_ref += 8;
    press(0);
    checks++;
    if (thr_sel != 2'd1 || led != 3'b010) begin failures++; $display("FAIL: threshold select %0d leds %b after centre", thr_sel, led); end
    press(1);
    dn_thr_ref += 1;
    wait_cam_frames(3);
    while (vga_vs) @(posedge clk);
    check_disp = 1;
    wait_vga_frames(3);
    check_disp = 0;
    check_seg();

    $display("mechanisms:");
    mech("classifier results checked", nn_ok);
    mech("displayed frames matched", disp_ok);
    mech("VGA frame periods checked", period_ok);
    mech("preview frames checked", pip_checked);
    mech("frame buffer region switches", n_switch);
    mech("frames shown again (repeat)", n_repeat);
    mech("discard mode entered", n_discard);
    mech("VGA underflow cycles", n_underflow);
    mech("VGA TLAST resyncs", n_resync);
    mech("edge stage end-of-frame flushes", n_eflush);
    mech("denoise stage end-of-frame flushes", n_dflush);
    mech("frames written", n_written);
    mech("mover write commands", mover.n_wcmd);
    mech("mover read commands", mover.n_rcmd);
    checks++;
    if (n_overflow != 0) begin failures++; $display("FAIL: %0d stream overflows", n_overflow); end
    $display("camera frames %0d, cycles %0d", cam.frames, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule

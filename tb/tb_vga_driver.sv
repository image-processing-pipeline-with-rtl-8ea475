// tb_vga_driver: self-checking test of the stream-fed VGA driver.
//
// Runs a reduced screen (16x6 visible, 24x10 total, 2x2 picture-in-picture at
// scale 2) and checks every output cycle against a screen model: colour,
// HSYNC and VSYNC, and s_tready. The stream source sends numbered frames whose
// beats encode their frame and group, and exercises, in turn: steady video;
// gaps in the stream (the driver must repeat the last four pixels); a frame
// shortened by five beats (its early TLAST must move the next beat to the top
// left of the next frame); and the picture-in-picture overlay with the video
// beats under it still consumed. Each of these events must occur.
module tb_vga_driver;
  localparam int HA = 16, HF = 2, HS = 3, HB = 3, VA = 6, VF = 1, VS = 1, VB = 2;
  localparam int HT = HA + HF + HS + HB, VT = VA + VF + VS + VB;
  localparam int PN = 2, PS = 2, NB = HA * VA / 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [63:0] s_tdata;
  logic s_tvalid, s_tlast, s_tready, pip_en, vga_hs, vga_vs, resync, underflow;
  logic [1:0] pip_addr;
  logic [3:0] pip_data, vga_r, vga_g, vga_b;

  vga_driver #(.H_ACT(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB), .V_ACT(VA), .V_FP(VF),
               .V_SYNC(VS), .V_BP(VB), .PIP_N(PN), .PIP_SCALE(PS)) dut (.*);

  // PIP image: pixel i has grey 3*i+5
  assign pip_data = 4'(3 * int'(pip_addr) + 5);

  function automatic logic [11:0] pixel(int f, int g, int k);
    return 12'(f * 397 + g * 13 + k * 5 + 1);
  endfunction

  // ---------------- stream source ----------------
  int frame = 0, beat = 0, frame_len = NB, phase = 0;
  int n_gap = 0, n_resync = 0, n_pip = 0;
  function automatic logic [63:0] beat_data(int f, int g);
    logic [63:0] d;
    d = '0;
    for (int k = 0; k < 4; k++) d[16*k +: 12] = pixel(f, g, k);
    return d;
  endfunction
  always @(posedge clk) if (rst_n) begin
    int nb, nf;
    nb = beat; nf = frame;
    if (s_tvalid && s_tready) begin
      nb = beat + 1;
      if (nb == frame_len) begin
        nb = 0; nf = frame + 1;
      end
    end
    beat <= nb; frame <= nf;
    // phase 2: frame 4 is five beats short
    frame_len <= (phase == 2 && nf == 4) ? NB - 5 : NB;
    s_tvalid  <= !(phase == 1 && ($urandom_range(0, 2) == 0));
    s_tdata   <= beat_data(nf, nb);
    s_tlast   <= (nb == ((phase == 2 && nf == 4) ? NB - 5 : NB) - 1);
  end

  // ---------------- screen model ----------------
  int mh = 0, mv = 0, checks = 0, failures = 0;
  logic [63:0] mbuf = '0;
  logic [11:0] e_rgb; logic e_hs, e_vs; bit e_ok = 0;
  always @(posedge clk) if (rst_n) begin
    int nh, nv;
    bit ready;
    logic [11:0] c;
    // compare what the driver registered one cycle ago
    if (e_ok) begin
      checks++;
      if ({vga_r, vga_g, vga_b} != e_rgb || vga_hs != e_hs || vga_vs != e_vs) begin
        failures++;
        if (failures < 10) $display("FAIL: rgb %h/%h hs %b/%b vs %b/%b", {vga_r, vga_g, vga_b}, e_rgb, vga_hs, e_hs, vga_vs, e_vs);
      end
    end
    // expected output for the current position
    c = mbuf[16 * (mh % 4) +: 12];
    if (pip_en && mh < PN * PS && mv < PN * PS) begin
      c = {3{4'(3 * ((mv / PS) * PN + mh / PS) + 5)}};
      if (mh < HA && mv < VA) n_pip++;
    end
    if (!(mh < HA && mv < VA)) c = '0;
    e_rgb = c;
    e_hs = !(mh >= HA + HF && mh < HA + HF + HS);
    e_vs = !(mv >= VA + VF && mv < VA + VF + VS);
    e_ok = 1;
    // advance
    nh = mh + 1; nv = mv;
    if (nh == HT) begin nh = 0; nv = (mv + 1) % VT; end
    ready = (nh < HA) && (nv < VA) && (nh % 4 == 0);
    checks++;
    if (s_tready != ready) begin failures++; $display("FAIL: tready %b at (%0d,%0d)", s_tready, nh, nv); end
    if (ready && !s_tvalid) n_gap++;
    if (ready && s_tvalid) begin
      mbuf = s_tdata;
      if (s_tlast && !(nh == HA - 4 && nv == VA - 1)) begin
        nh = 0; nv = VA; n_resync++;
        checks++;
        if (resync !== 1'b0) begin failures++; $display("FAIL: resync early"); end
      end
    end
    mh = nh; mv = nv;
  end

  initial begin
    pip_en = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (HT * VT * 2) @(posedge clk);
    phase = 1;                       // gaps
    repeat (HT * VT * 2) @(posedge clk);
    phase = 2;                       // short frame 4
    wait (frame == 5);
    repeat (HT * VT * 2) @(posedge clk);
    phase = 3; pip_en = 1;           // picture in picture
    repeat (HT * VT * 2) @(posedge clk);
    checks += 3;
    if (n_gap == 0)    begin failures++; $display("FAIL: no stream gap happened"); end
    if (n_resync == 0) begin failures++; $display("FAIL: no resync happened"); end
    if (n_pip == 0)    begin failures++; $display("FAIL: no PIP pixel shown"); end
    $display("gaps %0d, resyncs %0d, PIP pixels %0d", n_gap, n_resync, n_pip);
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

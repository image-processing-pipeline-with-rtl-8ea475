// vga_driver: 640x480 60 Hz VGA output fed by a 64-bit pixel stream, with a
// scaled picture-in-picture overlay.
//
// Free-running horizontal and vertical counters (800 x 525 clocks at the
// 25.2 MHz pixel clock) generate the active-low HSYNC and VSYNC pulses and the
// blanking. Each stream beat carries four pixels, pixel k in bits
// [16k+11:16k] as 4:4:4 RGB (upper four bits of each 16-bit slot unused). The
// driver does not wait for data: it takes a beat (s_tready high) in the cycle
// before each group of four visible pixels, and if none is offered it shows
// the previous four pixels again. TLAST marks the beat of the frame's last
// four pixels; if it arrives on any other beat, the counters jump to the start
// of vertical blanking so that the next beat is drawn at the top left corner
// of the next frame (`resync` pulses).
//
// When pip_en is high, the top-left (PIP_N*PIP_SCALE)^2 pixels show the 28x28
// grey image read from pip_addr/pip_data (combinational), each image pixel
// repeated PIP_SCALE times in both directions; the video pixels under it are
// still taken from the stream and discarded, so the stream stays aligned.
// All VGA outputs are registered (one clock after the counters).
// Stream slicing, the repeat-on-underflow, the TLAST reset and the PIP scaling
// follow the design description; the slot order inside a beat and the resync
// point are this design's choices.
module vga_driver #(
  parameter int unsigned H_ACT     = 640,
  parameter int unsigned H_FP      = 16,
  parameter int unsigned H_SYNC    = 96,
  parameter int unsigned H_BP      = 48,
  parameter int unsigned V_ACT     = 480,
  parameter int unsigned V_FP      = 10,
  parameter int unsigned V_SYNC    = 2,
  parameter int unsigned V_BP      = 33,
  parameter int unsigned PIP_N     = 28,
  parameter int unsigned PIP_SCALE = 4
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // pixel stream
  input  logic [63:0]                       s_tdata,
  input  logic                              s_tvalid,
  input  logic                              s_tlast,
  output logic                              s_tready,
  // picture-in-picture image
  input  logic                              pip_en,
  output logic [$clog2(PIP_N*PIP_N)-1:0]    pip_addr,
  input  logic [3:0]                        pip_data,
  // VGA connector
  output logic [3:0]                        vga_r,
  output logic [3:0]                        vga_g,
  output logic [3:0]                        vga_b,
  output logic                              vga_hs,
  output logic                              vga_vs,
  // status
  output logic                              resync,
  output logic                              underflow
);
  localparam int unsigned H_TOT = H_ACT + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_ACT + V_FP + V_SYNC + V_BP;
  localparam int unsigned HW = $clog2(H_TOT);
  localparam int unsigned VW = $clog2(V_TOT);
  localparam int unsigned PIP_SIDE = PIP_N * PIP_SCALE;
  localparam int unsigned PAW = $clog2(PIP_N*PIP_N);

  logic [HW-1:0] h, hn;
  logic [VW-1:0] v, vn;
  logic [63:0]   pix4;

  // Next counter position
  always_comb begin
    hn = h + 1'b1;
    vn = v;
    if (h == HW'(H_TOT - 1)) begin
      hn = '0;
      vn = (v == VW'(V_TOT - 1)) ? '0 : v + 1'b1;
    end
  end

  logic load_slot, last_slot, take;
  assign load_slot = (hn < HW'(H_ACT)) && (vn < VW'(V_ACT)) && (hn[1:0] == 2'b00);
  assign last_slot = (hn == HW'(H_ACT - 4)) && (vn == VW'(V_ACT - 1));
  assign s_tready  = load_slot;
  assign take      = load_slot && s_tvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h         <= '0;
      v         <= '0;
      pix4      <= '0;
      resync    <= 1'b0;
      underflow <= 1'b0;
    end else begin
      resync    <= 1'b0;
      underflow <= load_slot && !s_tvalid;
      if (take) pix4 <= s_tdata;
      if (take && s_tlast && !last_slot) begin
        h      <= '0;
        v      <= VW'(V_ACT);
        resync <= 1'b1;
      end else begin
        h <= hn;
        v <= vn;
      end
    end
  end

  // Pixel selection
  logic        active, in_pip;
  logic [11:0] rgb;
  always_comb begin
    active   = (h < HW'(H_ACT)) && (v < VW'(V_ACT));
    in_pip   = pip_en && (32'(h) < PIP_SIDE) && (32'(v) < PIP_SIDE);
    pip_addr = PAW'((32'(v) / PIP_SCALE) * PIP_N + 32'(h) / PIP_SCALE);
    unique case (h[1:0])
      2'd0: rgb = pix4[11:0];
      2'd1: rgb = pix4[27:16];
      2'd2: rgb = pix4[43:32];
      default: rgb = pix4[59:48];
    endcase
    if (in_pip) rgb = {pip_data, pip_data, pip_data};
    if (!active) rgb = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {vga_r, vga_g, vga_b} <= '0;
      vga_hs <= 1'b1;
      vga_vs <= 1'b1;
    end else begin
      {vga_r, vga_g, vga_b} <= rgb;
      vga_hs <= !((h >= HW'(H_ACT + H_FP)) && (h < HW'(H_ACT + H_FP + H_SYNC)));
      vga_vs <= !((v >= VW'(V_ACT + V_FP)) && (v < VW'(V_ACT + V_FP + V_SYNC)));
    end
  end
endmodule

// threshold_control: the three user thresholds of the image processing chain.
//
// Holds the edge detection, denoise and compression thresholds. A press of the
// centre button moves the selection to the next of the three (edge, denoise,
// compression, then edge again); up and down step the selected threshold by
// its step size, saturating at 0 and at its maximum. Each button is
// synchronised and debounced: a level must be stable for DEBOUNCE cycles
// before it counts, and only the press (the debounced rising edge) acts.
// `sel_led` is one-hot under the selected value's display.
// Values change one cycle after the debounced press. The three values, the
// button roles and the indicator follow the design description; reset values,
// ranges, steps and the debounce are this design's choices.
module threshold_control #(
  parameter int unsigned DEBOUNCE      = 250_000,   // 10 ms at 25.2 MHz
  parameter logic [7:0]  EDGE_INIT     = 8'd48,
  parameter logic [7:0]  EDGE_MAX      = 8'd120,    // largest |Gx|+|Gy|
  parameter logic [7:0]  EDGE_STEP     = 8'd4,
  parameter logic [3:0]  DENOISE_INIT  = 4'd2,
  parameter logic [3:0]  DENOISE_MAX   = 4'd8,      // eight neighbours
  parameter logic [3:0]  COMPRESS_INIT = 4'd4,
  parameter logic [3:0]  COMPRESS_MAX  = 4'd15
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       btn_c,
  input  logic       btn_u,
  input  logic       btn_d,
  output logic [7:0] edge_thr,
  output logic [3:0] denoise_thr,
  output logic [3:0] compress_thr,
  output logic [1:0] sel,
  output logic [2:0] sel_led
);
  logic [2:0] raw, press;

  for (genvar b = 0; b < 3; b++) begin : g_btn
    logic [1:0] sync;
    logic       stable, stable_d;
    logic [$clog2(DEBOUNCE+1)-1:0] cnt;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        sync     <= '0;
        stable   <= 1'b0;
        stable_d <= 1'b0;
        cnt      <= '0;
      end else begin
        sync     <= {sync[0], raw[b]};
        stable_d <= stable;
        if (sync[1] == stable) begin
          cnt <= '0;
        end else if (cnt == $bits(cnt)'(DEBOUNCE - 1)) begin
          cnt    <= '0;
          stable <= sync[1];
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
    assign press[b] = stable && !stable_d;
  end

  assign raw = {btn_d, btn_u, btn_c};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel          <= 2'd0;
      edge_thr     <= EDGE_INIT;
      denoise_thr  <= DENOISE_INIT;
      compress_thr <= COMPRESS_INIT;
    end else begin
      if (press[0]) sel <= (sel == 2'd2) ? 2'd0 : sel + 1'b1;
      unique case (sel)
        2'd0: begin
          if (press[1])      edge_thr <= (edge_thr > EDGE_MAX - EDGE_STEP) ? EDGE_MAX : edge_thr + EDGE_STEP;
          else if (press[2]) edge_thr <= (edge_thr < EDGE_STEP) ? 8'd0 : edge_thr - EDGE_STEP;
        end
        2'd1: begin
          if (press[1])      denoise_thr <= (denoise_thr >= DENOISE_MAX) ? DENOISE_MAX : denoise_thr + 1'b1;
          else if (press[2]) denoise_thr <= (denoise_thr == '0) ? '0 : denoise_thr - 1'b1;
        end
        default: begin
          if (press[1])      compress_thr <= (compress_thr >= COMPRESS_MAX) ? COMPRESS_MAX : compress_thr + 1'b1;
          else if (press[2]) compress_thr <= (compress_thr == '0) ? '0 : compress_thr - 1'b1;
        end
      endcase
    end
  end

  assign sel_led = 3'b001 << sel;
endmodule

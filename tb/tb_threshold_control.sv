// tb_threshold_control: self-checking test of the threshold selector.
//
// Presses the centre, up and down buttons in a random sequence (each press
// preceded by contact bounce shorter than the debounce time) and checks after
// every press the selected threshold, the indicator LEDs and all three values
// against a model with the same ranges, steps and saturation. A bounce burst on
// its own must change nothing.
module tb_threshold_control;
  localparam int DB = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic btn_c, btn_u, btn_d;
  logic [7:0] edge_thr;
  logic [3:0] denoise_thr, compress_thr;
  logic [1:0] sel;
  logic [2:0] sel_led;

  threshold_control #(.DEBOUNCE(DB)) dut (.*);

  int checks = 0, failures = 0;
  int m_sel = 0, m_e = 48, m_n = 2, m_c = 4;

  task automatic bounce(int b);
    for (int k = 0; k < 3; k++) begin
      {btn_d, btn_u, btn_c} <= 3'b001 << b;
      repeat (2) @(posedge clk);
      {btn_d, btn_u, btn_c} <= 3'b000;
      repeat (2) @(posedge clk);
    end
  endtask

  task automatic press(int b);
    bounce(b);
    {btn_d, btn_u, btn_c} <= 3'b001 << b;
    repeat (DB + 6) @(posedge clk);
    {btn_d, btn_u, btn_c} <= 3'b000;
    repeat (DB + 6) @(posedge clk);
  endtask

  task automatic check(string what);
    checks++;
    if (int'(sel) != m_sel || sel_led != 3'(1 << m_sel) || int'(edge_thr) != m_e ||
        int'(denoise_thr) != m_n || int'(compress_thr) != m_c) begin
      failures++;
      $display("FAIL after %s: sel %0d/%0d edge %0d/%0d denoise %0d/%0d compress %0d/%0d", what,
               sel, m_sel, edge_thr, m_e, denoise_thr, m_n, compress_thr, m_c);
    end
  endtask

  initial begin
    btn_c = 0; btn_u = 0; btn_d = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    check("reset");
    bounce(0); bounce(1); repeat (DB + 4) @(posedge clk);
    check("bounce only");
    for (int i = 0; i < 150; i++) begin
      int b;
      b = (i % 9 == 0) ? 0 : int'($urandom_range(1, 2));
      press(b);
      if (b == 0) m_sel = (m_sel + 1) % 3;
      else begin
        int up;
        up = (b == 1);
        case (m_sel)
          0: m_e = up ? ((m_e + 4 > 120) ? 120 : m_e + 4) : ((m_e < 4) ? 0 : m_e - 4);
          1: m_n = up ? ((m_n + 1 > 8) ? 8 : m_n + 1) : ((m_n < 1) ? 0 : m_n - 1);
          default: m_c = up ? ((m_c + 1 > 15) ? 15 : m_c + 1) : ((m_c < 1) ? 0 : m_c - 1);
        endcase
      end
      check(b == 0 ? "centre" : (b == 1 ? "up" : "down"));
    end
    // drive each value into both limits
    for (int s = 0; s < 3; s++) begin
      while (m_sel != s) begin press(0); m_sel = (m_sel + 1) % 3; end
      repeat (32) press(1);
      case (s) 0: m_e = 120; 1: m_n = 8; default: m_c = 15; endcase
      check("upper limit");
      repeat (32) press(2);
      case (s) 0: m_e = 0; 1: m_n = 0; default: m_c = 0; endcase
      check("lower limit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

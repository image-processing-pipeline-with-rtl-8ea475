// tb_pixel_to_stream: self-checking test of the pixel packer.
//
// Feeds two 8x3 frames of random 12-bit pixels with random gaps while the sink
// applies random back-pressure that never lasts long enough to overflow, and
// checks every beat: four pixels in order in the low 12 bits of each 16-bit
// slot, zero padding, TLAST only on the frame's last beat. Then holds the sink
// off while two beats complete and checks that `overflow` pulses.
module tb_pixel_to_stream;
  localparam int W = 8, H = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic pix_valid, m_tvalid, m_tlast, m_tready, overflow;
  logic [11:0] pix;
  logic [4:0] pix_addr;
  logic [63:0] m_tdata;

  pixel_to_stream #(.W(W), .H(H)) dut (.*);

  int checks = 0, failures = 0, n_over = 0;
  logic [63:0] exp_q [$];
  logic        exp_l [$];
  bit hold_off = 0;

  always @(posedge clk) if (rst_n) begin
    if (overflow) n_over++;
    if (m_tvalid && m_tready) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected beat"); end
      else begin
        logic [63:0] d; logic l;
        d = exp_q.pop_front(); l = exp_l.pop_front();
        if (m_tdata != d || m_tlast != l) begin
          failures++; $display("FAIL: beat %h last %b expected %h %b", m_tdata, m_tlast, d, l);
        end
      end
    end
    m_tready <= hold_off ? 1'b0 : ($urandom_range(0, 1) == 1);
  end

  initial begin
    logic [63:0] d;
    pix_valid = 0; pix = 0; pix_addr = 0; m_tready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int a = 0; a < W * H; a++) begin
        logic [11:0] p;
        p = 12'($urandom);
        d[16 * (a % 4) +: 16] = {4'h0, p};
        if (a % 4 == 3) begin exp_q.push_back(d); exp_l.push_back(a == W * H - 1); end
        pix_valid <= 1; pix <= p; pix_addr <= 5'(a);
        @(posedge clk);
        pix_valid <= 0;
        repeat ($urandom_range(3, 6)) @(posedge clk);
      end
    repeat (20) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d beats missing", exp_q.size()); end
    // overflow: two beats completed with the sink held off
    hold_off = 1;
    @(posedge clk);
    for (int a = 0; a < 8; a++) begin
      pix_valid <= 1; pix <= 12'(a); pix_addr <= 5'(a);
      @(posedge clk);
    end
    pix_valid <= 0;
    repeat (2) @(posedge clk);
    checks++;
    if (n_over != 1) begin failures++; $display("FAIL: %0d overflow pulses, expected 1", n_over); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

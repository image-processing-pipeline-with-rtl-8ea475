// tb_axis_fifo: self-checking test of the stream FIFO.
//
// With DEPTH 16 and MARK 4, pushes and pops random beats under random valid and
// ready patterns (bursty, so the FIFO runs both full and empty), compares the
// output order and content with a queue model, and checks the count, s_tready,
// m_tvalid and the low/high level flags every cycle.
module tb_axis_fifo;
  localparam int D = 16, M = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [63:0] s_tdata, m_tdata;
  logic s_tlast, s_tvalid, s_tready, m_tlast, m_tvalid, m_tready, low, high;
  logic [4:0] level;

  axis_fifo #(.DEPTH(D), .MARK(M)) dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_empty = 0, cyc = 0;
  logic [64:0] model [$];

  always @(posedge clk) if (rst_n) begin
    int pin, pout;
    cyc++;
    checks++;
    if (int'(level) != model.size() || s_tready != (model.size() < D) || m_tvalid != (model.size() > 0) ||
        low != (model.size() < M) || high != (D - model.size() < M)) begin
      failures++;
      $display("FAIL: level %0d/%0d rdy %b vld %b low %b high %b", level, model.size(), s_tready, m_tvalid, low, high);
    end
    if (model.size() == D) n_full++;
    if (model.size() == 0) n_empty++;
    if (m_tvalid && m_tready) begin
      logic [64:0] e;
      e = model.pop_front();
      checks++;
      if ({m_tdata, m_tlast} != e) begin failures++; $display("FAIL: data %h expected %h", {m_tdata, m_tlast}, e); end
    end
    if (s_tvalid && s_tready) model.push_back({s_tdata, s_tlast});
    // bursty traffic: phases that favour filling or draining
    pin  = ((cyc / 200) % 2 == 0) ? 80 : 30;
    pout = ((cyc / 200) % 2 == 0) ? 30 : 80;
    if (!(s_tvalid && !s_tready)) begin
      s_tvalid <= ($urandom_range(0, 99) < pin);
      s_tdata  <= {$urandom, $urandom};
      s_tlast  <= 1'($urandom);
    end
    m_tready <= ($urandom_range(0, 99) < pout);
  end

  initial begin
    s_tvalid = 0; s_tdata = 0; s_tlast = 0; m_tready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2000) @(posedge clk);
    checks += 2;
    if (n_full == 0)  begin failures++; $display("FAIL: never full"); end
    if (n_empty == 0) begin failures++; $display("FAIL: never empty"); end
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

// tb_sccb_master: self-checking test of the SCCB write master.
//
// Sends a series of random {register, value} writes through the byte-at-a-time
// handshake and checks, with a bus listener, that each appears on SIO_C/SIO_D
// as START, ID 0x42, register, value, STOP. Also checks the bit rate: one
// three-byte write takes 27 bits of 4 quarters plus start and stop.
module tb_sccb_master;
  localparam int Q = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, ready, done, sioc, siod_out, siod_oe;
  logic [7:0] data;
  wire siod = siod_oe ? siod_out : 1'b1;

  sccb_master #(.QUARTER(Q)) dut (.*);
  sccb_slave_model bus (.sioc, .siod);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic send(input logic [7:0] b);
    while (!ready) @(posedge clk);
    start <= 1; data <= b;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
  endtask

  initial begin
    logic [7:0] r, v;
    int t0;
    start = 0; data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      r = 8'($urandom); v = 8'($urandom);
      t0 = cyc;
      send(r);
      send(v);
      while (!done) @(posedge clk);
      checks++;
      // 2 start quarters + 27 bits * 4 quarters + 4 stop quarters
      if (cyc - t0 > (2 + 27*4 + 4) * Q + 12 || cyc - t0 < (2 + 27*4 + 4) * Q) begin
        failures++; $display("FAIL: write took %0d cycles", cyc - t0);
      end
      @(posedge clk);
      checks++;
      if (bus.writes.size() != 1 || bus.writes[0] != {8'h42, r, v}) begin
        failures++;
        $display("FAIL: write %0d: got %0d txns, %h expected %h", i, bus.writes.size(),
                 bus.writes.size() ? bus.writes[0] : 24'h0, {8'h42, r, v});
      end
      bus.writes.delete();
      checks++;
      if (sioc !== 1'b1 || siod !== 1'b1) begin failures++; $display("FAIL: bus not idle"); end
    end
    checks++;
    if (bus.errors != 0) begin failures++; $display("FAIL: %0d framing errors", bus.errors); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

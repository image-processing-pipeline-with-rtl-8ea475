// tb_cam_config: self-checking test of the camera configuration sequencer.
//
// Wires the sequencer to the settings table and the SCCB master, listens on the
// bus, and checks that after `start` every register write of the table appears
// on the bus once, in order, as {0x42, register, value}; that the wait entry
// holds the bus idle for DELAY cycles; and that `done` rises only at the end.
// A second `start` must replay the whole table.
module tb_cam_config;
  localparam int Q = 2, DLY = 200;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, done, sccb_start, sccb_ready, sccb_done, sioc, siod_out, siod_oe;
  logic [4:0] rom_addr;
  logic [15:0] rom_data;
  logic [7:0] sccb_data;
  wire siod = siod_oe ? siod_out : 1'b1;

  cam_config #(.DELAY(DLY)) dut (.*);
  cam_config_rom rom (.addr(rom_addr), .dout(rom_data));
  sccb_master #(.QUARTER(Q)) sccb (.clk, .rst_n, .start(sccb_start), .data(sccb_data),
                                   .ready(sccb_ready), .done(sccb_done), .sioc, .siod_out, .siod_oe);
  sccb_slave_model bus (.sioc, .siod);

  // Expected register writes, in order (the wait entry follows the first one)
  localparam logic [15:0] EXP [11] = '{16'h1280, 16'h1200, 16'h1101, 16'h0C00, 16'h3E00,
                                       16'h40C0, 16'h3A04, 16'h3D88, 16'h1418, 16'h13E7, 16'h6B0A};
  int checks = 0, failures = 0, cyc = 0, t_first = -1, t_second = -1;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) begin
    if (sccb_done && bus.writes.size() == 0 && t_first < 0) t_first = cyc;
    if (sccb_start && bus.writes.size() == 1 && t_second < 0 && t_first >= 0) t_second = cyc;
  end

  task automatic run_once();
    start <= 1; @(posedge clk); start <= 0;
    @(posedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL: done high right after start"); end
    while (!done) @(posedge clk);
    repeat (4*Q + 4) @(posedge clk);
    checks++;
    if (bus.writes.size() != 11) begin
      failures++; $display("FAIL: %0d writes on the bus, expected 11", bus.writes.size());
    end
    for (int i = 0; i < 11 && i < bus.writes.size(); i++) begin
      checks++;
      if (bus.writes[i] != {8'h42, EXP[i]}) begin
        failures++; $display("FAIL: write %0d = %h, expected %h", i, bus.writes[i], {8'h42, EXP[i]});
      end
    end
    checks++;
    if (bus.errors != 0) begin failures++; $display("FAIL: bus framing errors"); end
    bus.writes.delete();
  endtask

  initial begin
    start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run_once();
    checks++;
    if (t_second - t_first < DLY) begin
      failures++; $display("FAIL: reset wait only %0d cycles", t_second - t_first);
    end
    run_once();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

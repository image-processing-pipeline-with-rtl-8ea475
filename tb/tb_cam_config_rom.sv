// tb_cam_config_rom: checks every address of the camera settings table against
// the intended OV7670 settings, that the wait code follows the soft reset, and
// that every address past the table reads as the end code.
module tb_cam_config_rom;
  logic [4:0] addr;
  logic [15:0] dout;
  cam_config_rom dut (.*);

  localparam logic [15:0] EXP [12] = '{16'h1280, 16'hFFF0, 16'h1200, 16'h1101, 16'h0C00, 16'h3E00,
                                       16'h40C0, 16'h3A04, 16'h3D88, 16'h1418, 16'h13E7, 16'h6B0A};
  int checks = 0, failures = 0;
  initial begin
    for (int i = 0; i < 32; i++) begin
      addr = 5'(i);
      #1;
      checks++;
      if (dout != (i < 12 ? EXP[i] : 16'hFFFF)) begin
        failures++; $display("FAIL: addr %0d = %h", i, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

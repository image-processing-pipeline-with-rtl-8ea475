// cam_config_rom: table of camera register settings, one {register, value}
// word per address, read combinationally.
//
// Two code words are not register writes: 16'hFFF0 asks the configuration FSM
// to wait (the camera needs time after its soft reset) and 16'hFFFF marks the
// end of the table. The table puts the OV7670 in VGA YUV 4:2:2 output with Y
// first (so the grey level is every other byte) and enables automatic gain,
// exposure and white balance. The design keeps these settings in a user-editable
// table; the particular values here are this design's choice.
module cam_config_rom (
  input  logic [4:0]  addr,
  output logic [15:0] dout
);
  always_comb begin
    unique case (addr)
      5'd0:  dout = 16'h12_80;   // COM7: soft reset
      5'd1:  dout = 16'hFF_F0;   // wait for the reset to finish
      5'd2:  dout = 16'h12_00;   // COM7: VGA, YUV output
      5'd3:  dout = 16'h11_01;   // CLKRC: input clock / 2
      5'd4:  dout = 16'h0C_00;   // COM3: no scaling or windowing changes
      5'd5:  dout = 16'h3E_00;   // COM14: normal PCLK
      5'd6:  dout = 16'h40_C0;   // COM15: full 00..FF output range
      5'd7:  dout = 16'h3A_04;   // TSLB: YUYV byte order
      5'd8:  dout = 16'h3D_88;   // COM13: gamma on, UV auto adjust
      5'd9:  dout = 16'h14_18;   // COM9: 4x automatic gain ceiling
      5'd10: dout = 16'h13_E7;   // COM8: AGC, AWB and AEC enabled
      5'd11: dout = 16'h6B_0A;   // DBLV: PLL bypass, regulator on
      default: dout = 16'hFF_FF; // end of table
    endcase
  end
endmodule

// tb_image_pipeline_full: end-to-end test of image_pipeline_top at its default
// parameters (640x480 camera and VGA picture, 16x16 compression blocks,
// 28x28 preview scaled by 4, 100 kHz-class SCCB, real debounce and display
// refresh). PCLK runs just slower than the system clock (52 ns against
// 50 ns). The same checks as the reduced test run through pipeline_harness,
// which instantiates the top without any parameter override; it ends with
// the TB_RESULT line and holds the watchdog.
module tb_image_pipeline_full;
  pipeline_harness #(.FULL(1'b1), .WATCHDOG(64'd60_000_000)) h ();
endmodule

// tb_image_pipeline_top: end-to-end test of image_pipeline_top at a reduced
// size (64x32 picture, 2x2 compression blocks, short sync porches, fast
// SCCB, configuration delay, debounce and display refresh) so that many frames
// run in a short time. All checks live in pipeline_harness: SCCB writes,
// classifier results, displayed frames, VGA frame period, preview, button
// thresholds, frame buffer region switches, repeats, discard, underflow and
// resync, and the window flushes; each mechanism that never happened counts
// as a failure. Ends with the TB_RESULT line; the harness holds the watchdog.
module tb_image_pipeline_top;
  pipeline_harness #(
    .FULL(1'b0), .W(64), .H(32), .H_FP(2), .H_SYNC(4), .H_BP(4),
    .V_FP(1), .V_SYNC(1), .V_BP(2), .BLK_LOG2(0), .PIP_SCALE(1),
    .SCCB_QUARTER(2), .CFG_DELAY(50), .DEBOUNCE(16), .REFRESH(8),
    .CAM_HBLANK(8), .CAM_VBLANK(4), .WATCHDOG(64'd3_000_000)) h ();
endmodule

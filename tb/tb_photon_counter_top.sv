// End-to-end testbench of photon_counter_top at reduced size: 64 x 64
// pixel sensor (8 words per row), small event FIFOs, a 512-word RAM. Runs
// centroid frames over the parallel port and the optical link, a windowed
// frame, a frame with the host link stalled so that the event FIFOs
// overflow, and a frame grabber acquisition larger than the RAM followed by
// its read-back, and counts that each of these happened.
// The mechanisms follow the published detector description; the reduced
// sizes used here are this testbench's own, to keep the run short.
module tb_photon_counter_top;
  pc_harness #(.NROWS(64), .WORDS_PER_ROW(8), .EV_FIFO_DEPTH(4), .AF_DEPTH(8),
               .ZBT_ADDR_W(9), .CONV_CYCLES(12)) h ();

  initial begin
    #5ms;
    h.failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures);
    $finish;
  end

  initial begin
    h.make_image(60);
    h.reset_all();
    h.run_centroid(0, 64, pc_pkg::LINK_PARALLEL, 0);
    h.run_centroid(0, 64, pc_pkg::LINK_OPTICAL, 0);
    h.run_centroid(20, 32, pc_pkg::LINK_OPTICAL, 0);   // windowed: half frame
    h.make_image(400);
    h.run_centroid(0, 64, pc_pkg::LINK_PARALLEL, 1);   // host stalled
    h.run_centroid(3, 40, pc_pkg::LINK_PARALLEL, 0);
    h.run_grabber(10, 40);                             // 32 rows fit
    h.run_centroid(0, 64, pc_pkg::LINK_OPTICAL, 0);    // back to centroiding
    h.finish(1);
  end
endmodule

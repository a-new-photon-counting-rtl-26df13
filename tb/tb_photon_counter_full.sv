// Full-size testbench of photon_counter_top with every parameter at its
// default: 1024 x 1024 sensor, 128 words per row, 256-word event FIFOs,
// 512-word clock-crossing FIFOs, 128 K-word ZBT RAM. Runs a full centroid
// frame over the optical link, a half frame (windowing) over the parallel
// port, a full frame with the host stalled so that events are dropped, and a
// frame grabber acquisition of 600 rows of which the first 512 fit the RAM,
// read back completely. It also checks the frame time of a full and of a
// half frame: 128 readout clocks per row plus the per-row control overhead.
// Sizes are the published detector's (1024 x 1024 pixels, 64-bit words,
// 128 K x 32 RAM); the FIFO depths and the sensor conversion time (100
// clocks) are this design's own assumptions.
module tb_photon_counter_full;
  pc_harness #(.FULL_SIZE(1), .CONV_CYCLES(100)) h ();

  initial begin
    #200ms;
    h.failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures);
    $finish;
  end

  // Pixel clock edges since time 0.
  longint unsigned cmos_cycles = 0;
  always @(posedge h.clk_cmos) cmos_cycles++;

  // One centroid frame of n rows from row first, timed in pixel clocks:
  // each row takes 128 readout clocks + 3 control clocks.
  task automatic frame_time(int first, int n);
    longint unsigned c0;
    real clocks;
    h.mode = pc_pkg::MODE_CENTROID;
    h.first_row = 10'(first);
    h.num_rows = 11'(n);
    c0 = cmos_cycles;
    h.one_frame();
    clocks = real'(cmos_cycles - c0);
    h.checks++;
    if (clocks > n * 131 + 200 || clocks < n * 131) begin
      h.failures++;
      $display("frame of %0d rows took %0.0f pixel clocks", n, clocks);
    end
    $display("%0d-row frame: %0.0f pixel clocks = %0.1f / %0.1f / %0.1f frames/s at 20 / 40 / 50 MHz",
             n, clocks, 20.0e6 / clocks, 40.0e6 / clocks, 50.0e6 / clocks);
  endtask

  initial begin
    h.make_image(3000);
    h.reset_all();
    h.run_centroid(0, 1024, pc_pkg::LINK_OPTICAL, 0);
    h.run_centroid(512, 512, pc_pkg::LINK_PARALLEL, 0);
    h.make_image(12000);
    h.run_centroid(0, 1024, pc_pkg::LINK_PARALLEL, 1);
    h.run_grabber(200, 600);
    frame_time(0, 1024);   // full frame
    frame_time(256, 512);  // half frame by windowing
    h.finish(1);
  end
endmodule

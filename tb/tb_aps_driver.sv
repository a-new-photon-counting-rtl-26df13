// Self-checking testbench for aps_driver driving the sensor model. Two
// driver/sensor pairs run side by side: one where the row conversion is
// slower than the readout (4 words per row, 20-clock conversion), one where
// the readout is slower (16 words per row, 2-clock conversion). Each takes
// frames of various sizes and window positions, back to back. Checked: the
// pixel words and their row/word tags against the sensor image, pix_sof and
// pix_eof framing, one ROW_START and one LOAD_SHFT per row, conversion and
// readout overlapping (ping-pong), and the row period, which is
// max(conversion + 4, words + 3) clocks with this control sequence.
// The 64-bit word, 128 words per row and the overlap of conversion and
// readout come from the published detector description; the expected control
// sequence and row period are those of this design's driver.
module tb_aps_driver;
  import pc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic       run [2];
  logic [9:0] first_row [2];
  logic [10:0] num_rows [2];
  int         done [2];

  for (genvar g = 0; g < 2; g++) begin : g_pair
    localparam int W    = g ? 16 : 4;
    localparam int CONV = g ? 2 : 20;
    localparam int WB   = $clog2(W);
    logic [9:0]  row_addr;
    logic        row_start_n, data_read_en_n, load_shft_n, logic_rst_n, row_done_n;
    logic [63:0] aps_data, pix_data;
    logic        pix_valid, pix_sof, pix_eof, busy;
    logic [9:0]  pix_row;
    logic [WB-1:0] pix_word;
    logic [15:0] frame_count;

    aps_driver #(.NUM_ROWS(64), .WORDS_PER_ROW(W)) dut (
      .clk, .rst_n, .run(run[g]), .first_row(first_row[g]), .num_rows(num_rows[g]),
      .row_addr, .row_start_n, .data_read_en_n, .load_shft_n, .logic_rst_n,
      .row_done_n, .aps_data, .pix_valid, .pix_data, .pix_row, .pix_word,
      .pix_sof, .pix_eof, .busy, .frame_count);

    aps_model #(.NROWS(64), .WORDS_PER_ROW(W), .CONV_CYCLES(CONV)) sensor (
      .clk, .logic_rst_n, .row_addr, .row_start_n, .row_done_n, .load_shft_n,
      .data_read_en_n, .dout(aps_data));

    int exp_row, exp_word, in_frame, n_words, last_start, period_err, n_periods;
    int n_starts, n_loads, f_rows;

    initial begin
      for (int r = 0; r < 64; r++) for (int c = 0; c < W * 8; c++) sensor.img[r][c] = 8'($urandom);
      in_frame = 0; n_periods = 0; period_err = 0; last_start = -1; done[g] = 0;
    end

    always @(posedge clk) if (rst_n) begin
      if (!row_start_n) begin
        if (last_start >= 0 && in_frame && n_starts >= 2) begin
          n_periods++;
          if (($time / 10) - last_start != ((CONV + 4 > W + 3) ? CONV + 4 : W + 3)) begin
            period_err++;
            if (period_err < 4) $display("pair %0d period %0d at %0t, rows %0d", g, ($time / 10) - last_start, $time, dut.nrows);
          end
        end
        last_start = $time / 10;
      end
      if (pix_sof) begin
        in_frame = 1; n_words = 0;
        // the frame's window as latched by the driver at its start
        exp_row = int'(dut.row0); f_rows = int'(dut.nrows);
        exp_word = 0; last_start = -1;
      end
      if (pix_valid) begin
        checks++;
        if (!in_frame || int'(pix_row) != exp_row || int'(pix_word) != exp_word) begin
          failures++;
          if (failures < 10) $display("pair %0d: tag r%0d w%0d, expected r%0d w%0d", g, pix_row, pix_word, exp_row, exp_word);
        end
        for (int p = 0; p < 8; p++) begin
          checks++;
          if (pix_data[8*p +: 8] !== sensor.img[pix_row][int'(pix_word) * 8 + p]) begin failures++; if (failures < 5) $display("%0t pair %0d r%0d w%0d p%0d: %h vs %h", $time, g, pix_row, pix_word, p, pix_data[8*p +: 8], sensor.img[pix_row][int'(pix_word) * 8 + p]); end
        end
        n_words++;
        exp_word++;
        if (exp_word == W) begin exp_word = 0; exp_row++; end
      end
      if (pix_eof) begin
        checks += 3;
        if (n_words != f_rows * W) begin failures++; $display("pair %0d: %0d words", g, n_words); end
        if (n_starts != f_rows) begin failures++; $display("row starts %0d of %0d at %0t", n_starts, f_rows, $time); end
        if (n_loads != f_rows) begin failures++; $display("loads"); end
        in_frame = 0;
        done[g]++;
      end
      // control pulses of the frame that LOGIC_RST_N opens
      if (!logic_rst_n) begin n_starts = 0; n_loads = 0; end
      if (!row_start_n) n_starts++;
      if (!load_shft_n) n_loads++;
    end
  end

  task automatic frames(int g, int f, int n);
    first_row[g] = 10'(f); num_rows[g] = 11'(n); run[g] = 1;
  endtask

  initial begin
    run[0] = 0; run[1] = 0;
    first_row[0] = 0; first_row[1] = 0; num_rows[0] = 3; num_rows[1] = 3;
    repeat (2) @(negedge clk);
    rst_n = 1;
    frames(0, 0, 64); frames(1, 10, 20);
    wait (done[0] >= 1 && done[1] >= 1);
    @(negedge clk);
    frames(0, 32, 32); frames(1, 0, 3);     // half frame; smallest frame
    wait (done[0] >= 3 && done[1] >= 3);
    @(negedge clk);
    run[0] = 0; run[1] = 0;
    // a frame in progress is completed, then the driver stops
    wait (!g_pair[0].busy && !g_pair[1].busy);
    repeat (5) @(negedge clk);
    checks += 6;
    if (int'(g_pair[0].frame_count) != done[0] || int'(g_pair[1].frame_count) != done[1]) begin failures++; $display("frame counts %0d/%0d %0d/%0d", g_pair[0].frame_count, done[0], g_pair[1].frame_count, done[1]); end
    if (g_pair[0].period_err != 0 || g_pair[1].period_err != 0) begin
      failures++; $display("row period errors %0d %0d", g_pair[0].period_err, g_pair[1].period_err);
    end
    if (g_pair[0].n_periods == 0 || g_pair[1].n_periods == 0) begin failures++; $display("no periods"); end
    if (g_pair[0].sensor.reads_during_conv == 0) begin failures++; $display("no ping-pong overlap"); end
    if (g_pair[1].sensor.reads_during_conv == 0) begin failures++; $display("no ping-pong overlap"); end
    if (g_pair[0].busy || g_pair[1].busy) begin failures++; $display("still busy"); end
    $display("row periods checked: %0d and %0d", g_pair[0].n_periods, g_pair[1].n_periods);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

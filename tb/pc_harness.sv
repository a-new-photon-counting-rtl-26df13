// Test harness for photon_counter_top: the design with a sensor model and a
// ZBT SRAM model, host-side receivers for both links, an independent
// reference for the centroid events, and routines that run one acquisition.
// The testbenches instantiate it and call those routines. The pixel clock runs
// at 50 MHz and the host clock at 125 MHz.
//
//  run_centroid(first, n, link, stall): one frame of n rows from row first
//    in centroid mode; the received event words must all be reference events,
//    none twice; without stall all must arrive, with stall (host link not
//    ready during the frame) the missing ones must equal n_dropped.
//  run_grabber(first, n): one frame in frame grabber mode, then the stored
//    rows that fit the RAM are read back over the parallel port and compared
//    with the image.
// The sensor and RAM models and the link receivers stand in for parts the
// published detector takes from elsewhere; their timing is this design's
// assumption. The event reference uses the same rules as the RTL
// (truncated three-point centre of gravity, strict peak before, >= after).
module pc_harness #(
  parameter int unsigned NROWS         = 1024,
  parameter int unsigned WORDS_PER_ROW = 128,
  parameter int unsigned EV_FIFO_DEPTH = 256,
  parameter int unsigned AF_DEPTH      = 512,
  parameter int unsigned ZBT_ADDR_W    = 17,
  parameter int unsigned CONV_CYCLES   = 100,
  parameter bit          FULL_SIZE     = 0     // top at its defaults
);
  import pc_pkg::*;
  localparam int NC = WORDS_PER_ROW * 8;

  logic clk_cmos = 0, clk_sys = 0, rst_cmos_n = 0, rst_sys_n = 0;
  always #10 clk_cmos = ~clk_cmos;
  always #4  clk_sys  = ~clk_sys;

  logic run = 0;
  acq_mode_e mode = MODE_CENTROID;
  link_sel_e link_sel = LINK_PARALLEL;
  logic [9:0] first_row = '0;
  logic [10:0] num_rows = 11'd3;
  pixel_t threshold = 8'd40;
  logic fg_read_start = 0;
  logic [ZBT_ADDR_W:0] fg_read_len = '0;
  logic [9:0] aps_row_addr;
  logic aps_row_start_n, aps_data_read_en_n, aps_load_shft_n, aps_logic_rst_n, aps_row_done_n;
  logic [63:0] aps_data;
  logic zbt_cs_n, zbt_we_n;
  logic [ZBT_ADDR_W-1:0] zbt_addr;
  logic [31:0] zbt_wdata, zbt_rdata;
  logic pp_valid, pp_ready = 1, ol_valid, ol_ready = 1;
  logic [7:0] pp_data;
  logic [15:0] ol_data;
  logic aps_busy, fg_overrun, fg_reading;
  logic [15:0] frame_count;
  logic [31:0] n_events, n_dropped, n_skipped;

  if (FULL_SIZE) begin : g_full
    photon_counter_top dut (.*);
  end else begin : g_small
    photon_counter_top #(.NUM_ROWS(NROWS), .WORDS_PER_ROW(WORDS_PER_ROW),
                         .EV_FIFO_DEPTH(EV_FIFO_DEPTH), .AF_DEPTH(AF_DEPTH),
                         .PIX_FIFO_DEPTH(16), .ZBT_ADDR_W(ZBT_ADDR_W)) dut (.*);
  end

  aps_model #(.NROWS(NROWS), .WORDS_PER_ROW(WORDS_PER_ROW), .CONV_CYCLES(CONV_CYCLES)) sensor (
    .clk(clk_cmos), .logic_rst_n(aps_logic_rst_n), .row_addr(aps_row_addr),
    .row_start_n(aps_row_start_n), .row_done_n(aps_row_done_n), .load_shft_n(aps_load_shft_n),
    .data_read_en_n(aps_data_read_en_n), .dout(aps_data));

  zbt_model #(.ADDR_W(ZBT_ADDR_W)) ram (
    .clk(clk_sys), .cs_n(zbt_cs_n), .we_n(zbt_we_n), .addr(zbt_addr),
    .wdata(zbt_wdata), .rdata(zbt_rdata));

  int checks = 0, failures = 0;
  // how often each mechanism happened
  int n_cent_frames = 0, n_events_rx = 0, n_pp_words = 0, n_ol_words = 0;
  int n_windowed = 0, n_drop_seen = 0, n_fg_frames = 0, n_fg_words = 0, n_fg_skipped = 0;

  // ---------------------------------------------------------- host receivers
  logic [31:0] pp_acc, ol_acc;
  int pp_k = 0, ol_k = 0;
  logic [31:0] rx_q [$];

  always @(posedge clk_sys) if (rst_sys_n) begin
    if (pp_valid && pp_ready) begin
      pp_acc = {pp_acc[23:0], pp_data};
      pp_k++;
      if (pp_k == 4) begin pp_k = 0; rx_q.push_back(pp_acc); n_pp_words++; end
    end
    if (ol_valid && ol_ready) begin
      ol_acc = {ol_acc[15:0], ol_data};
      ol_k++;
      if (ol_k == 2) begin ol_k = 0; rx_q.push_back(ol_acc); n_ol_words++; end
    end
  end

  // ---------------------------------------------------------------- image
  task automatic make_image(int nspots);
    for (int r = 0; r < NROWS; r++) for (int c = 0; c < NC; c++) sensor.img[r][c] = 8'($urandom_range(25));
    repeat (nspots) begin
      automatic int r = $urandom_range(NROWS - 1), c = $urandom_range(NC - 1);
      automatic int pk = $urandom_range(60, 255);
      for (int dr = -1; dr <= 1; dr++) for (int dc = -1; dc <= 1; dc++)
        if (r + dr >= 0 && r + dr < NROWS && c + dc >= 0 && c + dc < NC)
          sensor.img[r+dr][c+dc] = 8'((dr == 0 && dc == 0) ? pk : $urandom_range(pk * 3 / 4));
    end
  endtask

  function automatic int cog(int a, int b, int c);
    return (a + b + c == 0) ? 0 : ((c - a) * 32) / (a + b + c);
  endfunction

  int expected [logic [31:0]];

  task automatic reference(int f, int n);
    expected.delete();
    for (int r = f + 1; r < f + n - 1; r++)
      for (int c = 1; c < NC - 1; c++) begin
        automatic int b = sensor.img[r][c];
        automatic bit ok = (b > threshold);
        for (int k = 0; k < 9 && ok; k++) begin
          automatic int v = sensor.img[r + k / 3 - 1][c + k % 3 - 1];
          if (k < 4 && !(b > v))  ok = 0;
          if (k > 4 && !(b >= v)) ok = 0;
        end
        if (ok) begin
          event_t e;
          e.row = 10'(r);
          e.col = 10'(c);
          e.dx  = 6'(cog(sensor.img[r][c-1], b, sensor.img[r][c+1]));
          e.dy  = 6'(cog(sensor.img[r-1][c], b, sensor.img[r+1][c]));
          expected[e] = 1;
        end
      end
  endtask

  task automatic reset_all();
    rst_cmos_n = 0; rst_sys_n = 0;
    repeat (3) @(negedge clk_cmos);
    rst_cmos_n = 1; rst_sys_n = 1;
    repeat (3) @(negedge clk_cmos);
  endtask

  task automatic one_frame();
    int fc;
    fc = int'(frame_count);
    @(negedge clk_cmos); run = 1;
    wait (int'(frame_count) == fc + 1);
    @(negedge clk_cmos); run = 0;
    wait (!aps_busy);
  endtask

  task automatic run_centroid(int f, int n, link_sel_e lk, bit stall);
    int nexp, got = 0, drop0, ev0, idle;
    mode = MODE_CENTROID; link_sel = lk;
    first_row = 10'(f); num_rows = 11'(n);
    reference(f, n);
    nexp = expected.num();
    drop0 = int'(n_dropped); ev0 = int'(n_events);
    rx_q.delete();
    if (stall) begin pp_ready = 0; ol_ready = 0; end
    one_frame();
    repeat (20) @(negedge clk_cmos);
    pp_ready = 1; ol_ready = 1;
    // drain: stop after 2000 host clocks without a new word
    idle = 0;
    while (idle < 2000) begin
      @(negedge clk_sys);
      if (rx_q.size() > 0) idle = 0; else idle++;
      while (rx_q.size() > 0) begin
        automatic logic [31:0] w = rx_q.pop_front();
        checks++;
        got++;
        n_events_rx++;
        if (!expected.exists(w)) begin
          failures++;
          if (failures < 10) $display("unexpected event word %h (row %0d col %0d)", w, w[31:22], w[21:12]);
        end else if (expected[w] != 1) begin
          failures++; $display("event %h received twice", w);
        end else expected[w] = 2;
      end
    end
    checks += 2;
    if (int'(n_events) - ev0 != nexp) begin failures++; $display("n_events %0d, reference %0d", int'(n_events) - ev0, nexp); end
    if (got + (int'(n_dropped) - drop0) != nexp) begin
      failures++; $display("received %0d + dropped %0d != %0d", got, int'(n_dropped) - drop0, nexp);
    end
    if (int'(n_dropped) > drop0) n_drop_seen++;
    if (!stall && int'(n_dropped) != drop0) begin failures++; $display("events dropped without stall"); end
    if (n < int'(NROWS)) n_windowed++;
    n_cent_frames++;
    begin
      string lname, sname;
      lname = (lk == LINK_PARALLEL) ? "parallel port" : "optical link";
      sname = stall ? " (host stalled)" : "";
      $display("centroid frame rows %0d..%0d via %s%s: %0d events, %0d received, %0d dropped",
               f, f + n - 1, lname, sname, nexp, got, int'(n_dropped) - drop0);
    end
  endtask

  task automatic run_grabber(int f, int n);
    int per_row, fit, nwords, got = 0, sk0, idle;
    mode = MODE_FRAME_GRABBER; link_sel = LINK_PARALLEL;
    first_row = 10'(f); num_rows = 11'(n);
    per_row = WORDS_PER_ROW * 2;
    fit = (2 ** ZBT_ADDR_W) / per_row;
    if (fit > n) fit = n;
    sk0 = int'(n_skipped);
    rx_q.delete();
    one_frame();
    repeat (50) @(negedge clk_sys);
    checks++;
    if (int'(n_skipped) - sk0 != (n - fit) * int'(WORDS_PER_ROW)) begin
      failures++; $display("skipped %0d words", int'(n_skipped) - sk0);
    end
    if (int'(n_skipped) > sk0) n_fg_skipped++;
    nwords = fit * per_row;
    @(negedge clk_sys);
    fg_read_len = (ZBT_ADDR_W + 1)'(nwords);
    fg_read_start = 1;
    @(negedge clk_sys);
    fg_read_start = 0;
    idle = 0;
    while (idle < 500) begin
      @(negedge clk_sys);
      if (rx_q.size() > 0) idle = 0; else idle++;
      while (rx_q.size() > 0) begin
        automatic logic [31:0] w = rx_q.pop_front();
        automatic int r = got / per_row, c0 = (got % per_row) * 4;
        automatic logic [31:0] e;
        for (int p = 0; p < 4; p++) e[8*p +: 8] = sensor.img[f + r][c0 + p];
        checks++;
        if (w !== e) begin
          failures++;
          if (failures < 10) $display("image word %0d: %h expected %h", got, w, e);
        end
        got++;
        n_fg_words++;
      end
    end
    checks += 2;
    if (got != nwords) begin failures++; $display("image words %0d of %0d", got, nwords); end
    if (fg_overrun) begin failures++; $display("pixel FIFO overrun"); end
    n_fg_frames++;
    $display("frame grabber rows %0d..%0d: %0d rows stored, %0d words read back", f, f + n - 1, fit, got);
  endtask

  task automatic finish(bit need_drop);
    checks += 6;
    if (n_cent_frames == 0 || n_events_rx == 0) begin failures++; $display("centroiding never ran"); end
    if (n_pp_words == 0) begin failures++; $display("parallel port never used"); end
    if (n_ol_words == 0) begin failures++; $display("optical link never used"); end
    if (n_windowed == 0) begin failures++; $display("no windowed frame"); end
    if (n_fg_frames == 0 || n_fg_words == 0) begin failures++; $display("frame grabber never ran"); end
    if (sensor.reads_during_conv == 0) begin failures++; $display("no ping-pong readout"); end
    if (need_drop) begin
      checks += 2;
      if (n_drop_seen == 0) begin failures++; $display("event FIFOs never overflowed"); end
      if (n_fg_skipped == 0) begin failures++; $display("frame grabber never ran out of RAM"); end
    end
    $display("mechanisms: centroid frames %0d, events received %0d, parallel words %0d, optical words %0d,",
             n_cent_frames, n_events_rx, n_pp_words, n_ol_words);
    $display("  windowed frames %0d, frames with dropped events %0d, grabbed frames %0d, image words %0d,",
             n_windowed, n_drop_seen, n_fg_frames, n_fg_words);
    $display("  grabs with rows beyond the RAM %0d, clocks of ping-pong overlap %0d",
             n_fg_skipped, sensor.reads_during_conv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule

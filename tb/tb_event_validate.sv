// Self-checking testbench for event_validate: random windows with few grey
// levels (so that ties are frequent) against a model of the rule: centre
// above the threshold, strictly above the neighbours that precede it in
// raster order, not below those that follow, and not on an edge column.
// Threshold and peak search follow the published detector description; the
// tie and edge rules checked here are this design's own.
module tb_event_validate;
  import pc_pkg::*;
  window_t win;
  pixel_t  thr;
  logic    on_edge, valid;
  int checks = 0, failures = 0, n_valid = 0, n_tie = 0;

  event_validate dut (.win, .threshold(thr), .on_edge, .valid);

  function automatic logic model(window_t w, pixel_t t, logic e);
    int b = w[1][1];
    if (e || b <= t) return 1'b0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        int idx = r * 3 + c;
        if (idx < 4 && !(b > w[r][c])) return 1'b0;
        if (idx > 4 && !(b >= w[r][c])) return 1'b0;
      end
    return 1'b1;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      automatic int lv = (i % 2) ? 4 : 256;
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) win[r][c] = pixel_t'($urandom_range(lv - 1) * ((lv == 4) ? 60 : 1));
      if (i % 3 == 0) win[1][1] = 8'd200;
      thr     = pixel_t'($urandom_range(120));
      on_edge = ($urandom_range(9) == 0);
      #1;
      checks++;
      if (valid !== model(win, thr, on_edge)) begin
        failures++;
        if (failures < 10) $display("mismatch win=%h thr=%0d edge=%0b got %0b", win, thr, on_edge, valid);
      end
      if (valid) n_valid++;
      if (valid && (win[1][2] == win[1][1] || win[2][1] == win[1][1])) n_tie++;
    end
    // a plateau of two equal pixels is reported once: only the first
    win = '0; win[1][1] = 8'd90; win[1][2] = 8'd90; thr = 8'd10; on_edge = 0; #1;
    checks++; if (!valid) failures++;
    win = '0; win[1][1] = 8'd90; win[1][0] = 8'd90; #1;
    checks++; if (valid) failures++;
    if (n_valid == 0 || n_tie == 0) begin
      failures++;
      $display("coverage: valid=%0d ties=%0d", n_valid, n_tie);
    end
    $display("valid=%0d valid-with-tie=%0d", n_valid, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

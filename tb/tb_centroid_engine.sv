// Self-checking testbench for centroid_engine (WORDS_PER_ROW = 4: frames of
// 32 columns). Frames of noise with bright spots are streamed in, one with
// words back to back (full rate: eight windows per clock) and two with idle
// clocks. An independent model scans the frame for pixels that pass the
// validation rule (above threshold, raster-order peak, not on the frame
// border) and computes their centre-of-gravity offsets; the set of event
// words from the eight lanes must equal the model's set, and n_events must
// count them.
// Eight windows per clock and the centre of gravity follow the published
// detector description; the expected latency and word layout are this
// design's own.
module tb_centroid_engine;
  import pc_pkg::*;
  localparam int W = 4;
  localparam int NC = W * 8;
  localparam int MAXR = 16;
  logic clk = 0, rst_n = 0;
  logic pix_valid = 0, pix_sof = 0, pix_eof = 0;
  logic [63:0] pix_data = '0;
  logic [9:0]  pix_row = '0;
  pixel_t threshold = 8'd40;
  logic [7:0] ev_valid;
  event_t ev [8];
  logic flushing;
  logic [31:0] n_events;
  int checks = 0, failures = 0;

  centroid_engine #(.WORDS_PER_ROW(W)) dut (.*);

  always #5 clk = ~clk;

  logic [7:0] img [MAXR][NC];
  int expected [logic [31:0]];
  int got_total;

  function automatic int cog(int a, int b, int c);
    return (a + b + c == 0) ? 0 : ((c - a) * 32) / (a + b + c);
  endfunction

  task automatic make_frame(int L, int nspots);
    for (int r = 0; r < L; r++) for (int c = 0; c < NC; c++) img[r][c] = 8'($urandom_range(25));
    repeat (nspots) begin
      automatic int r = $urandom_range(L - 1), c = $urandom_range(NC - 1);
      automatic int pk = $urandom_range(60, 255);
      for (int dr = -1; dr <= 1; dr++) for (int dc = -1; dc <= 1; dc++)
        if (r + dr >= 0 && r + dr < L && c + dc >= 0 && c + dc < NC)
          img[r+dr][c+dc] = 8'((dr == 0 && dc == 0) ? pk : $urandom_range(pk));
    end
  endtask

  task automatic model(int f, int L);
    expected.delete();
    for (int r = 1; r < L - 1; r++)
      for (int c = 1; c < NC - 1; c++) begin
        automatic int b = img[r][c];
        automatic bit ok = (b > threshold);
        for (int k = 0; k < 9; k++) begin
          automatic int v = img[r + k / 3 - 1][c + k % 3 - 1];
          if (k < 4 && !(b > v))  ok = 0;
          if (k > 4 && !(b >= v)) ok = 0;
        end
        if (ok) begin
          event_t e;
          e.row = 10'(f + r);
          e.col = 10'(c);
          e.dx  = 6'(cog(img[r][c-1], b, img[r][c+1]));
          e.dy  = 6'(cog(img[r-1][c], b, img[r+1][c]));
          expected[e] = 1;
        end
      end
  endtask

  always @(negedge clk) if (rst_n)
    for (int j = 0; j < 8; j++) if (ev_valid[j]) begin
      checks++;
      got_total++;
      if (!expected.exists(ev[j])) begin
        failures++;
        if (failures < 10) $display("unexpected event r=%0d c=%0d dx=%0d dy=%0d", ev[j].row, ev[j].col, ev[j].dx, ev[j].dy);
      end else if (expected[ev[j]] != 1) begin
        failures++;
        $display("duplicate event r=%0d c=%0d", ev[j].row, ev[j].col);
      end else expected[ev[j]] = 2;
      if (ev[j].col % 8 != j) begin failures++; $display("event in wrong lane"); end
    end

  task automatic drive(logic v, logic [63:0] d, int r, logic sof, logic eof);
    @(negedge clk);
    pix_valid = v; pix_data = d; pix_row = 10'(r); pix_sof = sof; pix_eof = eof;
  endtask

  task automatic run_frame(int f, int L, int nspots, bit gaps);
    int n_before, nexp;
    make_frame(L, nspots);
    model(f, L);
    nexp = expected.num();
    n_before = n_events;
    got_total = 0;
    drive(0, '0, 0, 1, 0);
    for (int r = 0; r < L; r++) begin
      for (int k = 0; k < W; k++) begin
        logic [63:0] d;
        for (int p = 0; p < 8; p++) d[8*p +: 8] = img[r][k*8+p];
        drive(1, d, f + r, 0, 0);
        if (gaps && $urandom_range(2) == 0) drive(0, '0, 0, 0, 0);
      end
      if (gaps) repeat ($urandom_range(4)) drive(0, '0, 0, 0, 0);
    end
    drive(0, '0, 0, 0, 1);
    repeat (W + 6) drive(0, '0, 0, 0, 0);
    checks += 2;
    if (got_total != nexp) begin failures++; $display("frame at %0d: %0d events, expected %0d", f, got_total, nexp); end
    if (int'(n_events) - n_before != nexp) begin failures++; $display("n_events off"); end
    $display("frame at row %0d, %0d rows: %0d events", f, L, nexp);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) drive(0, '0, 0, 0, 0);
    rst_n = 1;
    run_frame(0, 12, 20, 0);
    run_frame(300, 16, 40, 1);
    run_frame(1000, 5, 8, 1);
    run_frame(20, 16, 80, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for window_latches. Three rows of random pixels
// (WORDS_PER_ROW = 4, so 32 columns) are fed word by word, twice: once with
// idle clocks between words and once back to back, rows following each
// other without a gap. Every emitted window is compared with the 3 x 3
// neighbourhood taken from the reference rows (zero outside the row), and
// every window must appear exactly once, one clock after the word to its
// right (or, for the last word, one clock after the last word).
// Eight 3 x 3 windows per clock follow the published detector description;
// the boundary handling checked here is this design's own.
module tb_window_latches;
  import pc_pkg::*;
  localparam int W = 4;
  localparam int NC = W * 8;
  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic [63:0] in_top, in_mid, in_bot;
  logic [9:0] in_row;
  logic [1:0] in_word;
  logic win_valid;
  window_t win [8];
  logic [9:0] win_row;
  logic [1:0] win_word;
  int checks = 0, failures = 0;

  window_latches #(.WORDS_PER_ROW(W)) dut (.*);

  always #5 clk = ~clk;

  logic [7:0] img [8][3][NC];   // [row set][row][col]
  int seen [8][W];

  function automatic logic [7:0] ref_px(int s, int r, int c);
    if (c < 0 || c >= NC) return 8'd0;
    return img[s][r][c];
  endfunction

  always @(negedge clk) if (rst_n && win_valid) begin
    automatic int s = int'(win_row);
    seen[s][win_word]++;
    for (int j = 0; j < 8; j++)
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          checks++;
          if (win[j][r][c] !== ref_px(s, r, int'(win_word) * 8 + j + c - 1)) begin
            failures++;
            if (failures < 10) $display("set %0d word %0d lane %0d [%0d][%0d]: %h vs %h", s, win_word, j, r, c,
                                        win[j][r][c], ref_px(s, r, int'(win_word) * 8 + j + c - 1));
          end
        end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // inputs change on the falling edge; one call = one clock with a word
  task automatic send(int s, int k);
    @(negedge clk);
    in_valid = 1'b1;
    in_row   = 10'(s);
    in_word  = 2'(k);
    for (int p = 0; p < 8; p++) begin
      in_top[8*p +: 8] = img[s][0][k*8+p];
      in_mid[8*p +: 8] = img[s][1][k*8+p];
      in_bot[8*p +: 8] = img[s][2][k*8+p];
    end
  endtask

  task automatic idle(int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 1'b0;
    end
  endtask

  int lat_first;
  initial begin
    for (int s = 0; s < 8; s++) begin
      for (int r = 0; r < 3; r++) for (int c = 0; c < NC; c++) img[s][r][c] = 8'($urandom);
      for (int k = 0; k < W; k++) seen[s][k] = 0;
    end
    in_valid = 0; in_top = 0; in_mid = 0; in_bot = 0; in_row = 0; in_word = 0;
    idle(3);
    rst_n = 1'b1;
    idle(1);
    // sets 0..3 with idle clocks
    for (int s = 0; s < 4; s++) begin
      for (int k = 0; k < W; k++) begin
        send(s, k);
        idle($urandom_range(3));
      end
    end
    // sets 4..7 back to back; latency: word 1 in -> window of word 0 out
    for (int s = 4; s < 8; s++)
      for (int k = 0; k < W; k++) send(s, k);
    idle(5);
    for (int s = 0; s < 8; s++)
      for (int k = 0; k < W; k++) begin
        checks++;
        if (seen[s][k] != 1) begin
          failures++;
          $display("set %0d word %0d seen %0d times", s, k, seen[s][k]);
        end
      end
    // timing: a single word 1 after word 0 gives the window of word 0 one clock later
    send(0, 0); send(0, 1); idle(1);
    checks++;
    if (!win_valid || win_word != 2'd0) begin failures++; $display("latency check failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

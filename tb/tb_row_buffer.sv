// Self-checking testbench for row_buffer (WORDS_PER_ROW = 4). Two frames of
// random words (6 rows from row 100, then 3 rows from row 7, the second
// checking that pix_sof clears the FIFOs) are pushed with random idle
// clocks. Each released word triple must be rows n-3, n-2, n-1 at the word
// position of the word pushed from row n, with out_row = centre row, and the
// flush row after pix_eof must release the last centre row: (L-2)*W triples
// per frame of L rows.
// Three row FIFOs follow the published detector description; the flush row
// and the centre-row tag checked here are this design's own.
module tb_row_buffer;
  import pc_pkg::*;
  localparam int W = 4;
  logic clk = 0, rst_n = 0;
  logic pix_valid = 0, pix_sof = 0, pix_eof = 0;
  logic [63:0] pix_data = '0;
  logic [9:0]  pix_row = '0;
  logic out_valid, flushing;
  logic [63:0] out_top, out_mid, out_bot;
  logic [9:0]  out_row;
  logic [1:0]  out_word;
  int checks = 0, failures = 0;

  row_buffer #(.WORDS_PER_ROW(W)) dut (.*);

  always #5 clk = ~clk;

  logic [63:0] rows [16][W];
  int first, nout, exp_word;

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic int c = int'(out_row) - first;   // centre row offset
    checks += 4;
    if (out_top !== rows[c-1][out_word]) failures++;
    if (out_mid !== rows[c][out_word])   failures++;
    if (out_bot !== rows[c+1][out_word]) failures++;
    if (int'(out_word) != exp_word) begin failures++; $display("word order %0d vs %0d", out_word, exp_word); end
    exp_word = (exp_word + 1) % W;
    nout++;
  end

  task automatic clk_in(logic v, logic [63:0] d, int r, logic sof, logic eof);
    @(negedge clk);
    pix_valid = v; pix_data = d; pix_row = 10'(r); pix_sof = sof; pix_eof = eof;
  endtask

  task automatic frame(int f, int L);
    first = f; nout = 0; exp_word = 0;
    for (int r = 0; r < 16; r++) for (int k = 0; k < W; k++) rows[r][k] = (r < L) ? {$urandom, $urandom} : '0;
    clk_in(0, '0, 0, 1, 0);
    for (int r = 0; r < L; r++) begin
      for (int k = 0; k < W; k++) begin
        clk_in(1, rows[r][k], f + r, 0, 0);
        if ($urandom_range(1)) clk_in(0, '0, 0, 0, 0);
      end
      repeat ($urandom_range(3)) clk_in(0, '0, 0, 0, 0);
    end
    clk_in(0, '0, 0, 0, 1);
    repeat (W + 4) clk_in(0, '0, 0, 0, 0);
    checks++;
    if (nout != (L - 2) * W) begin failures++; $display("frame of %0d rows: %0d triples", L, nout); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) clk_in(0, '0, 0, 0, 0);
    rst_n = 1;
    frame(100, 6);
    frame(7, 3);
    frame(500, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

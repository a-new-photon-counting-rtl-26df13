// Self-checking testbench for frame_grabber with a pipelined ZBT SRAM model
// (ADDR_W = 8: 256 RAM words; WORDS_PER_ROW = 4, so 32 rows fit). A frame
// of 34 rows starting at row 40 is captured from a random pixel word stream
// with gaps; the last two rows do not fit and must be counted as skipped.
// The stored image is then read back with random ready and every 32-bit
// word must equal the corresponding half of the pixel word written; a
// second read with ready always high must deliver one word per clock once
// the pipeline is full.
// The ZBT image store follows the published detector description; the
// address map and the two-clock RAM pipeline are this design's assumptions.
module tb_frame_grabber;
  import pc_pkg::*;
  localparam int W = 4, AW = 8, ROWS = 34, FIT = 32;
  logic clk = 0, rst_n = 0;
  logic capture = 0;
  logic [9:0] first_row = 10'd40;
  logic in_valid = 0;
  logic [63:0] in_data = '0;
  logic [9:0] in_row = '0;
  logic [1:0] in_word = '0;
  logic in_rd_en;
  logic read_start = 0;
  logic [AW:0] read_len = '0;
  logic reading, out_valid, out_ready = 0;
  logic [31:0] out_data, n_skipped;
  logic zbt_cs_n, zbt_we_n;
  logic [AW-1:0] zbt_addr;
  logic [31:0] zbt_wdata, zbt_rdata;
  int checks = 0, failures = 0;

  frame_grabber #(.WORDS_PER_ROW(W), .ADDR_W(AW)) dut (.*);
  zbt_model #(.ADDR_W(AW)) u_ram (.clk, .cs_n(zbt_cs_n), .we_n(zbt_we_n), .addr(zbt_addr),
                                  .wdata(zbt_wdata), .rdata(zbt_rdata));

  always #5 clk = ~clk;

  logic [63:0] img [ROWS][W];
  int rd_idx = 0, n_rd = 0;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    automatic int a = rd_idx;
    automatic logic [63:0] w = img[a / (2 * W)][(a / 2) % W];
    checks++;
    if (out_data !== ((a % 2) ? w[63:32] : w[31:0])) begin
      failures++;
      if (failures < 10) $display("word %0d: %h expected %h", a, out_data, (a % 2) ? w[63:32] : w[31:0]);
    end
    rd_idx++;
    n_rd++;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t0, t1;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    capture = 1;
    // pixel word source: holds a word until in_rd_en takes it
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < W; k++) begin
        img[r][k] = {$urandom, $urandom};
        @(negedge clk);
        in_valid = 1; in_data = img[r][k]; in_row = 10'(40 + r); in_word = 2'(k);
        do @(posedge clk); while (!in_rd_en);
        @(negedge clk);
        in_valid = 0;
        repeat ($urandom_range(2)) @(negedge clk);
      end
    repeat (5) @(negedge clk);
    capture = 0;
    checks++;
    if (int'(n_skipped) != (ROWS - FIT) * W) begin failures++; $display("skipped %0d", n_skipped); end
    // read back with random ready
    read_len = (AW + 1)'(FIT * W * 2);
    read_start = 1; @(negedge clk); read_start = 0;
    while (reading || out_valid) begin
      out_ready = $urandom_range(1);
      @(negedge clk);
    end
    checks++;
    if (n_rd != FIT * W * 2) begin failures++; $display("read %0d words", n_rd); end
    // second read at full rate
    rd_idx = 0; n_rd = 0; out_ready = 1;
    read_start = 1; @(negedge clk); read_start = 0;
    t0 = $time;
    while (reading || out_valid) @(negedge clk);
    t1 = $time;
    checks += 2;
    if (n_rd != FIT * W * 2) begin failures++; $display("read %0d words", n_rd); end
    if ((t1 - t0) / 10 > FIT * W * 2 + 6) begin failures++; $display("full-rate read took %0d clocks", (t1 - t0) / 10); end
    $display("full-rate read of %0d words: %0d clocks", FIT * W * 2, (t1 - t0) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for async_fifo (WIDTH 32, DEPTH 16) with write
// clock 10 ns and read clock 7 ns, then 23 ns. Random writes and reads; the
// read side must see every accepted word once, in order. With reads
// stopped, full must rise after exactly DEPTH writes (once the read pointer
// has crossed) and rd_valid must fall once everything is read.
// The reference is a plain queue; the clock ratios are this testbench's own.
// Clock-domain crossing through FIFOs follows the published detector
// description; depth and construction are this design's own.
module tb_async_fifo;
  localparam int D = 16;
  logic wr_clk = 0, rd_clk = 0, wr_rst_n = 0, rd_rst_n = 0;
  logic wr_en = 0, rd_en = 0, full, rd_valid;
  logic [31:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0;
  int rd_half = 7;
  logic [31:0] q [$];
  int n_read = 0;

  async_fifo #(.WIDTH(32), .DEPTH(D)) dut (.*);

  always #5 wr_clk = ~wr_clk;
  always begin #(rd_half) rd_clk = ~rd_clk; end

  always @(posedge wr_clk) if (wr_rst_n && wr_en && !full) q.push_back(wr_data);
  always @(posedge rd_clk) if (rd_rst_n && rd_en && rd_valid) begin
    checks++;
    n_read++;
    if (q.size() == 0 || rd_data !== q[0]) begin failures++; $display("read mismatch %h", rd_data); end
    else void'(q.pop_front());
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fork
      begin
        repeat (3) @(negedge wr_clk);
        wr_rst_n = 1;
        for (int i = 0; i < 2000; i++) begin
          @(negedge wr_clk);
          wr_en = $urandom_range(1); wr_data = $urandom;
        end
        @(negedge wr_clk); wr_en = 0;
      end
      begin
        repeat (3) @(negedge rd_clk);
        rd_rst_n = 1;
        for (int i = 0; i < 3000; i++) begin
          @(negedge rd_clk);
          rd_en = $urandom_range(1);
        end
        rd_en = 1;
        repeat (60) @(negedge rd_clk);
      end
    join
    checks++;
    if (q.size() != 0 || rd_valid) begin failures++; $display("%0d words left", q.size()); end
    // fill test with a slow read clock
    rd_half = 23;
    rd_en = 0;
    repeat (10) @(negedge wr_clk);
    for (int i = 0; i < D; i++) begin
      checks++;
      if (full) begin failures++; $display("full after %0d writes", i); end
      @(negedge wr_clk); wr_en = 1; wr_data = $urandom;
    end
    @(negedge wr_clk); wr_en = 0;
    checks++;
    if (!full) begin failures++; $display("not full after DEPTH writes"); end
    @(negedge rd_clk); rd_en = 1;
    repeat (D + 4) @(negedge rd_clk);
    checks++;
    if (rd_valid || q.size() != 0) begin failures++; $display("not drained"); end
    repeat (6) @(negedge wr_clk);
    checks++;
    if (full) begin failures++; $display("still full after drain"); end
    $display("words read: %0d", n_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

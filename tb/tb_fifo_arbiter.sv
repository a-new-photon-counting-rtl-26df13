// Self-checking testbench for fifo_arbiter (N = 4). Four queue models act as
// first-word-fall-through FIFOs and are refilled at random; the output is
// taken with random ready. Every word must leave exactly once and in its
// FIFO's order. With all four FIFOs full and ready always high, the output
// must rotate 0,1,2,3,0,... at one word per clock.
// Merging the four FIFOs follows the published detector description; the
// round-robin order checked here is this design's own choice.
module tb_fifo_arbiter;
  logic clk = 0, rst_n = 0;
  logic [3:0] in_valid, in_rd_en;
  logic [31:0] in_data [4];
  logic out_valid, out_ready = 0;
  logic [31:0] out_data;
  int checks = 0, failures = 0;
  logic [31:0] src [4][$];
  int seq = 0;
  int n_out = 0;

  fifo_arbiter #(.N(4), .WIDTH(32)) dut (.*);

  always #5 clk = ~clk;

  always_comb
    for (int i = 0; i < 4; i++) begin
      in_valid[i] = src[i].size() > 0;
      in_data[i]  = (src[i].size() > 0) ? src[i][0] : '0;
    end

  // word = {source, sequence}
  int last_seq [4];
  int last_src = -1;
  bit rr_phase = 0;
  int rr_err = 0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 4; i++) if (in_rd_en[i]) begin
      checks++;
      if (!(out_valid && out_ready && out_data == src[i][0])) begin failures++; $display("pop mismatch"); end
      if (int'(out_data[15:0]) <= last_seq[i]) begin failures++; $display("order"); end
      last_seq[i] = int'(out_data[15:0]);
      if (rr_phase && last_src >= 0 && i != (last_src + 1) % 4) rr_err++;
      last_src = i;
      void'(src[i].pop_front());
      n_out++;
    end
    if (out_valid && out_ready && in_rd_en == 0) begin failures++; $display("transfer without pop"); end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_in = 0;
  initial begin
    for (int i = 0; i < 4; i++) last_seq[i] = -1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2000) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++)
        if ($urandom_range(4) == 0) begin src[i].push_back({16'(i), 16'(seq)}); seq++; n_in++; end
      out_ready = $urandom_range(1);
    end
    out_ready = 1;
    repeat (1500) @(negedge clk);
    checks++;
    if (n_out != n_in) begin failures++; $display("in %0d out %0d", n_in, n_out); end
    // round-robin rotation with all sources busy
    out_ready = 0;
    for (int k = 0; k < 8; k++) for (int i = 0; i < 4; i++) begin src[i].push_back({16'(i), 16'(seq)}); seq++; end
    @(negedge clk);
    rr_phase = 1; last_src = -1; out_ready = 1;
    repeat (32) @(negedge clk);
    checks += 2;
    if (rr_err != 0) begin failures++; $display("round robin broken %0d times", rr_err); end
    if (n_out != n_in + 32) begin failures++; $display("rate: %0d of 32 words in 32 clocks", n_out - n_in); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

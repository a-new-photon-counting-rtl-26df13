// Self-checking testbench for word_serializer, as the 32-to-8 bit and the
// 32-to-16 bit multiplexer side by side. Random words with random valid and
// random ready must come out as slices, most significant first, with
// out_last on the final slice of each word. With both sides always ready,
// 64 words must take 4 x 64 (8-bit) and 2 x 64 (16-bit) clocks.
// The 32-to-8 and 32-to-16 widths follow the published detector description;
// slice order and handshake are this design's own.
module tb_word_serializer;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic        v8, r8, ov8, or8, l8;
  logic [31:0] d8;
  logic [7:0]  od8;
  logic        v16, r16, ov16, or16, l16;
  logic [31:0] d16;
  logic [15:0] od16;

  word_serializer #(.IN_W(32), .OUT_W(8)) u8 (
    .clk, .rst_n, .in_valid(v8), .in_data(d8), .in_ready(r8),
    .out_valid(ov8), .out_data(od8), .out_ready(or8), .out_last(l8));
  word_serializer #(.IN_W(32), .OUT_W(16)) u16 (
    .clk, .rst_n, .in_valid(v16), .in_data(d16), .in_ready(r16),
    .out_valid(ov16), .out_data(od16), .out_ready(or16), .out_last(l16));

  logic [31:0] q8 [$], q16 [$];
  int k8 = 0, k16 = 0, n8 = 0, n16 = 0;
  bit rnd = 1;

  always @(posedge clk) if (rst_n) begin
    if (v8 && r8) q8.push_back(d8);
    if (v16 && r16) q16.push_back(d16);
    if (ov8 && or8) begin
      checks++;
      if (q8.size() == 0 || od8 !== q8[0][31 - 8*k8 -: 8] || l8 != (k8 == 3)) begin failures++; $display("8-bit slice mismatch"); end
      k8++;
      if (k8 == 4) begin k8 = 0; void'(q8.pop_front()); n8++; end
    end
    if (ov16 && or16) begin
      checks++;
      if (q16.size() == 0 || od16 !== q16[0][31 - 16*k16 -: 16] || l16 != (k16 == 1)) begin failures++; $display("16-bit slice mismatch"); end
      k16++;
      if (k16 == 2) begin k16 = 0; void'(q16.pop_front()); n16++; end
    end
  end

  // source: keeps a word until it is taken
  always @(negedge clk) if (rst_n) begin
    if (!v8 || r8q) begin v8 = rnd ? 1'($urandom_range(1)) : 1'b1; d8 = $urandom; end
    if (!v16 || r16q) begin v16 = rnd ? 1'($urandom_range(1)) : 1'b1; d16 = $urandom; end
    or8  = rnd ? 1'($urandom_range(1)) : 1'b1;
    or16 = rnd ? 1'($urandom_range(1)) : 1'b1;
  end
  logic r8q, r16q;   // handshake of the last edge
  always @(posedge clk) begin r8q <= v8 && r8; r16q <= v16 && r16; end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s8, s16;
    v8 = 0; v16 = 0; d8 = 0; d16 = 0; or8 = 0; or16 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3000) @(negedge clk);
    // full rate
    rnd = 0;
    repeat (10) @(negedge clk);
    s8 = n8; s16 = n16;
    repeat (256) @(negedge clk);
    checks += 2;
    if (n8 - s8 != 64)   begin failures++; $display("8-bit rate: %0d words in 256 clocks", n8 - s8); end
    if (n16 - s16 != 128) begin failures++; $display("16-bit rate: %0d words in 256 clocks", n16 - s16); end
    $display("words: %0d (8-bit) %0d (16-bit)", n8, n16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

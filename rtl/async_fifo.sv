// Dual-clock first-word-fall-through FIFO.
//
// Crosses data words from the wr_clk domain to the rd_clk domain. Read and
// write pointers are kept in binary and Gray code; each Gray pointer is
// passed to the other domain through a two-flop synchroniser, so full and
// empty are pessimistic by the synchroniser delay but never wrong.
// DEPTH must be a power of two. rd_data shows the head word while rd_valid
// is high; rd_en pops it. Writes while full are dropped (callers check full).
// The clock-domain crossing FIFO role follows the published detector description; the Gray-pointer
// construction is this design's own choice.
module async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen in read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain ----------------
  logic        do_wr;
  logic [AW:0] wbin_nxt;
  assign do_wr    = wr_en && !full;
  assign wbin_nxt = wbin + (AW+1)'(do_wr);
  // Full when the write pointer is one lap ahead of the synchronised read
  // pointer: in Gray code the two MSBs differ and the rest match.
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nxt;
      wgray    <= bin2gray(wbin_nxt);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge wr_clk) begin
    if (do_wr) mem[wbin[AW-1:0]] <= wr_data;
  end

  // ---------------- read domain ----------------
  logic        do_rd;
  logic [AW:0] rbin_nxt;
  assign rd_valid = (rgray != wgray_r2);
  assign do_rd    = rd_en && rd_valid;
  assign rbin_nxt = rbin + (AW+1)'(do_rd);
  assign rd_data  = mem[rbin[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nxt;
      rgray    <= bin2gray(rbin_nxt);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

endmodule

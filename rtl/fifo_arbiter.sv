// Round-robin arbiter merging N first-word-fall-through FIFOs into one
// 32-bit word stream with a valid/ready handshake.
//
// The arbiter holds a pointer to the FIFO it serves. out_valid/out_data show
// that FIFO's head word; when out_ready is high in the same clock the word is
// popped (rd_en) and the pointer moves to the next FIFO that has data. When
// the current FIFO is empty the pointer moves on without a transfer, so one
// word per clock is sustained while any FIFO holds data and no FIFO waits
// longer than N words. Reads come from the asynchronous FIFOs in the host
// clock domain. The merging multiplexer follows the published detector description; round-robin
// order is this design's own choice.
module fifo_arbiter #(
  parameter int unsigned N     = 4,
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     in_valid,
  input  logic [WIDTH-1:0] in_data [N],
  output logic [N-1:0]     in_rd_en,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data,
  input  logic             out_ready
);
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1;

  logic [SW-1:0] sel, nxt;

  // next FIFO after sel that holds data (sel itself if none other does)
  always_comb begin
    nxt = sel;
    for (int k = N - 1; k >= 1; k--) begin
      logic [SW-1:0] cand;
      cand = SW'((32'(sel) + 32'(k)) % N);
      if (in_valid[cand]) nxt = cand;
    end
  end

  assign out_valid = in_valid[sel];
  assign out_data  = in_data[sel];

  always_comb begin
    in_rd_en      = '0;
    in_rd_en[sel] = out_ready && in_valid[sel];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel <= '0;
    else if (!in_valid[sel] || out_ready) sel <= nxt;
  end
endmodule

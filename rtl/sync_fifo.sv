// Single-clock first-word-fall-through FIFO.
//
// The head word is always visible on rd_data while rd_valid is high; rd_en
// pops it. A push and a pop may happen in the same cycle, also when the FIFO
// is full (the pop frees the place the push takes). clr empties the FIFO
// synchronously. Writes to a full FIFO without a pop are ignored, and reads
// of an empty one likewise; the callers check full/rd_valid first.
// Storage is a plain array with an asynchronous read (distributed RAM).
// Helper used for the row FIFOs, the event FIFOs and the frame grabber's
// output buffer; its fall-through behaviour and clear are this design's own.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;

  logic do_wr, do_rd;
  assign do_rd = rd_en && (count != '0);
  assign do_wr = wr_en && ((count != CW'(DEPTH)) || do_rd);

  assign full     = (count == CW'(DEPTH));
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else if (clr) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= inc(wr_ptr);
      if (do_rd) rd_ptr <= inc(rd_ptr);
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

endmodule

// Row buffer: three synchronous FIFOs, each holding one pixel row.
//
// The FIFOs form a cascade of row delays. An incoming 64-bit word is pushed
// into FIFO 0; a FIFO that already holds a full row pops its oldest word at
// the same time and hands it to the next FIFO, and FIFO 2 drops it. Once the
// first three rows of a frame are packed in the FIFOs, every incoming word
// therefore releases the three words of the same column position from rows
// n-3, n-2 and n-1 (n = row now arriving), which leave on top/mid/bot with
// out_valid in the same clock, tagged with the absolute row of the middle
// (centre) row and the word index. Rows 1 .. num_rows-2 of a frame become
// centre rows; the last of them needs one more row, so at pix_eof the
// buffer pushes one row of zero words by itself (flush). pix_sof clears it.
// The three-row FIFO structure follows the published detector description; the cascade and the flush
// row are this implementation's way of getting all windows out of a frame.
module row_buffer
  import pc_pkg::*;
#(
  parameter int unsigned WORDS_PER_ROW = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 pix_valid,
  input  logic [WORD_W-1:0]    pix_data,
  input  logic [ROW_W-1:0]     pix_row,
  input  logic                 pix_sof,
  input  logic                 pix_eof,
  output logic                 out_valid,
  output logic [WORD_W-1:0]    out_top,
  output logic [WORD_W-1:0]    out_mid,
  output logic [WORD_W-1:0]    out_bot,
  output logic [ROW_W-1:0]     out_row,
  output logic [$clog2(WORDS_PER_ROW)-1:0] out_word,
  output logic                 flushing
);
  localparam int unsigned WBITS = $clog2(WORDS_PER_ROW);
  localparam int unsigned CW    = $clog2(WORDS_PER_ROW + 1);

  logic              push;
  logic [WORD_W-1:0] push_data;
  logic [WBITS-1:0]  wcnt;       // word index of the word being pushed
  logic [ROW_W-1:0]  last_row;   // row tag of the last real word
  logic              fl;         // flush row in progress

  assign push      = pix_valid || fl;
  assign push_data = fl ? '0 : pix_data;
  assign flushing  = fl;

  logic [2:0]            full;
  logic [2:0]            rvalid;
  logic [WORD_W-1:0]     head [3];
  logic [CW-1:0]         cnt  [3];
  logic [2:0]            wr_en;
  logic [WORD_W-1:0]     wr_d [3];
  logic [2:0]            rd_en;

  // a stage pops when it holds a whole row and a word is pushed into it
  assign wr_en[0] = push;
  assign wr_d[0]  = push_data;
  assign rd_en[0] = push && full[0];
  for (genvar k = 1; k < 3; k++) begin : g_casc
    assign wr_en[k] = rd_en[k-1];
    assign wr_d[k]  = head[k-1];
    assign rd_en[k] = rd_en[k-1] && full[k];
  end

  for (genvar k = 0; k < 3; k++) begin : g_fifo
    sync_fifo #(.WIDTH(WORD_W), .DEPTH(WORDS_PER_ROW)) u_fifo (
      .clk     (clk),
      .rst_n   (rst_n),
      .clr     (pix_sof),
      .wr_en   (wr_en[k]),
      .wr_data (wr_d[k]),
      .full    (full[k]),
      .rd_en   (rd_en[k]),
      .rd_data (head[k]),
      .rd_valid(rvalid[k]),
      .count   (cnt[k])
    );
  end

  // windows leave when all three rows are present
  assign out_valid = push && (full == 3'b111);
  assign out_top   = head[2];
  assign out_mid   = head[1];
  assign out_bot   = head[0];
  assign out_word  = wcnt;
  // rows: FIFO0 holds n-1 where n is the arriving row; centre is n-2
  assign out_row   = (fl ? last_row + 1'b1 : pix_row) - ROW_W'(2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt     <= '0;
      last_row <= '0;
      fl       <= 1'b0;
    end else if (pix_sof) begin
      wcnt     <= '0;
      fl       <= 1'b0;
    end else begin
      if (push) wcnt <= (wcnt == WBITS'(WORDS_PER_ROW - 1)) ? '0 : wcnt + 1'b1;
      if (pix_valid) last_row <= pix_row;
      if (pix_eof) fl <= 1'b1;
      else if (fl && wcnt == WBITS'(WORDS_PER_ROW - 1)) fl <= 1'b0;
    end
  end

  a_no_push_in_flush: assert property (@(posedge clk) disable iff (!rst_n)
                        fl |-> !pix_valid);
endmodule

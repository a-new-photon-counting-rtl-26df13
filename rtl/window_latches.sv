// Window latches: turn three row words per clock into eight 3 x 3 windows.
//
// Each accepted input is one 64-bit word (eight pixels) from each of three
// consecutive rows, at the same word position. The latches keep the previous
// word of the three rows and the last pixel of the word before it; when word
// k arrives, the eight windows centred on the pixels of word k-1 are complete
// (their right neighbours are the first pixels of word k) and are registered
// on win_*, one clock later. After the last word of a row the windows of that
// word are emitted in the following clock with zero right neighbours; a new
// row's word 0 may arrive in that same clock. Pixel p of a word sits in bits
// [8p+7:8p] and is column 8*word+p. The left neighbour of column 0 is zero.
// Eight windows per clock from a bank of latches follows the published detector description; the
// neighbour bookkeeping across word boundaries is this design's own.
module window_latches
  import pc_pkg::*;
#(
  parameter int unsigned WORDS_PER_ROW = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [WORD_W-1:0]    in_top,
  input  logic [WORD_W-1:0]    in_mid,
  input  logic [WORD_W-1:0]    in_bot,
  input  logic [ROW_W-1:0]     in_row,
  input  logic [$clog2(WORDS_PER_ROW)-1:0] in_word,
  output logic                 win_valid,
  output window_t              win [WORD_PIX],
  output logic [ROW_W-1:0]     win_row,
  output logic [$clog2(WORDS_PER_ROW)-1:0] win_word
);
  localparam int unsigned WBITS = $clog2(WORDS_PER_ROW);

  logic [WORD_W-1:0] cur  [3];     // word k-1 of top, mid, bottom row
  pixel_t            left [3];     // last pixel of word k-2
  logic [ROW_W-1:0]  cur_row;
  logic [WBITS-1:0]  cur_word;
  logic              pending;      // last word of a row not yet emitted

  logic              emit;
  pixel_t            right [3];    // first pixel of word k
  logic [WORD_W-1:0] in_w  [3];

  assign in_w[0] = in_top;
  assign in_w[1] = in_mid;
  assign in_w[2] = in_bot;

  assign emit = pending || (in_valid && in_word != '0);

  always_comb begin
    for (int r = 0; r < 3; r++)
      right[r] = pending ? '0 : in_w[r][PIX_W-1:0];
  end

  function automatic pixel_t px(input logic [WORD_W-1:0] w, input int p);
    return w[p*PIX_W +: PIX_W];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 3; r++) begin
        cur[r]  <= '0;
        left[r] <= '0;
      end
      cur_row   <= '0;
      cur_word  <= '0;
      pending   <= 1'b0;
      win_valid <= 1'b0;
      win_row   <= '0;
      win_word  <= '0;
      for (int j = 0; j < WORD_PIX; j++) win[j] <= '0;
    end else begin
      win_valid <= emit;
      if (emit) begin
        win_row  <= cur_row;
        win_word <= cur_word;
        for (int j = 0; j < WORD_PIX; j++)
          for (int r = 0; r < 3; r++) begin
            win[j][r][0] <= (j == 0) ? left[r] : px(cur[r], j - 1);
            win[j][r][1] <= px(cur[r], j);
            win[j][r][2] <= (j == WORD_PIX - 1) ? right[r] : px(cur[r], j + 1);
          end
      end
      if (in_valid) begin
        for (int r = 0; r < 3; r++) begin
          left[r] <= (in_word == '0) ? '0 : px(cur[r], WORD_PIX - 1);
          cur[r]  <= in_w[r];
        end
        cur_row  <= in_row;
        cur_word <= in_word;
        pending  <= (in_word == WBITS'(WORDS_PER_ROW - 1));
      end else begin
        pending  <= 1'b0;
      end
    end
  end

  a_row_order: assert property (@(posedge clk) disable iff (!rst_n)
                 (pending && in_valid) |-> (in_word == '0));
endmodule

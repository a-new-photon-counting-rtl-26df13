// Centroid engine: from the 64-bit pixel stream to validated event words.
//
// Pixel words go through the three-row buffer (row_buffer) into the window
// latches (window_latches), which deliver eight 3 x 3 windows per clock.
// Eight lanes, each an event validator (event_validate) and a centre-of-
// gravity unit (center_cog), work on the eight windows at once. The row and
// column registers give every lane its coordinates: row of the window centre
// and column 8*word + lane. A lane's result is registered as a 32-bit event
// word (pc_pkg::event_t) with ev_valid[lane]; so an event word leaves two
// clocks after the word that completed its window entered the engine.
// Up to eight events per clock can be produced; because of the validator's
// tie rule, lanes 2i and 2i+1 are never valid together.
// n_events counts validated events (wraps).
// The eight parallel lanes, the three-row FIFOs, the latches and the row and
// column registers follow the published detector description; the two-clock
// latency and the event word layout are this design's own choices.
module centroid_engine
  import pc_pkg::*;
#(
  parameter int unsigned WORDS_PER_ROW = 128
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pix_valid,
  input  logic [WORD_W-1:0] pix_data,
  input  logic [ROW_W-1:0]  pix_row,
  input  logic              pix_sof,
  input  logic              pix_eof,
  input  pixel_t            threshold,
  output logic [WORD_PIX-1:0] ev_valid,
  output event_t            ev [WORD_PIX],
  output logic              flushing,
  output logic [31:0]       n_events
);
  localparam int unsigned WBITS  = $clog2(WORDS_PER_ROW);
  localparam int unsigned NCOLS  = WORDS_PER_ROW * WORD_PIX;

  logic              rb_valid;
  logic [WORD_W-1:0] rb_top, rb_mid, rb_bot;
  logic [ROW_W-1:0]  rb_row;
  logic [WBITS-1:0]  rb_word;

  row_buffer #(.WORDS_PER_ROW(WORDS_PER_ROW)) u_rows (
    .clk, .rst_n,
    .pix_valid, .pix_data, .pix_row, .pix_sof, .pix_eof,
    .out_valid(rb_valid), .out_top(rb_top), .out_mid(rb_mid), .out_bot(rb_bot),
    .out_row(rb_row), .out_word(rb_word), .flushing
  );

  logic             w_valid;
  window_t          w_win [WORD_PIX];
  logic [ROW_W-1:0] w_row;
  logic [WBITS-1:0] w_word;

  window_latches #(.WORDS_PER_ROW(WORDS_PER_ROW)) u_win (
    .clk, .rst_n,
    .in_valid(rb_valid), .in_top(rb_top), .in_mid(rb_mid), .in_bot(rb_bot),
    .in_row(rb_row), .in_word(rb_word),
    .win_valid(w_valid), .win(w_win), .win_row(w_row), .win_word(w_word)
  );

  logic [WORD_PIX-1:0]     lane_ok;
  logic signed [SUB_W-1:0] lane_dx [WORD_PIX];
  logic signed [SUB_W-1:0] lane_dy [WORD_PIX];
  logic [COL_W-1:0]        lane_col [WORD_PIX];

  for (genvar j = 0; j < WORD_PIX; j++) begin : g_lane
    assign lane_col[j] = COL_W'(w_word) * COL_W'(WORD_PIX) + COL_W'(j);

    event_validate u_val (
      .win       (w_win[j]),
      .threshold (threshold),
      .on_edge   (lane_col[j] == '0 || lane_col[j] == COL_W'(NCOLS - 1)),
      .valid     (lane_ok[j])
    );

    center_cog u_cog (
      .win (w_win[j]),
      .dx  (lane_dx[j]),
      .dy  (lane_dy[j])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ev_valid <= '0;
      n_events <= '0;
      for (int j = 0; j < WORD_PIX; j++) ev[j] <= '0;
    end else begin
      ev_valid <= w_valid ? lane_ok : '0;
      if (w_valid) n_events <= n_events + 32'($countones(lane_ok));
      for (int j = 0; j < WORD_PIX; j++)
        if (w_valid && lane_ok[j])
          ev[j] <= '{row: w_row, col: lane_col[j], dy: lane_dy[j], dx: lane_dx[j]};
    end
  end
endmodule

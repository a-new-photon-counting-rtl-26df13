// CMOS-APS driver: sequences row conversion and row readout of the sensor.
//
// The sensor digitises a whole pixel row at once (one ADC per column) into
// an ADC register, and a second "ping-pong" output register is read out
// eight pixels (64 bits) per clock, 128 clocks per row. The driver overlaps
// the two: while row i is being converted, row i-1 is read from the output
// register. Per row step it
//   1. drives ROW ADDRESS and pulses ROW_START_N low for one clock (row i),
//   2. holds DATA_READ_EN_N low for WORDS_PER_ROW clocks (reads row i-1),
//   3. waits for ROW_DONE_N low (conversion of row i finished); a low level
//      counts only after ROW_DONE_N has been seen high since step 1, so the
//      done flag of the previous frame's last row is not mistaken for it,
//   4. pulses LOAD_SHFT_N low for one clock (ADC register -> output register).
// A frame is num_rows rows starting at first_row (windowing: num_rows = 512
// halves the frame time). LOGIC_RST_N is pulsed once at the start of a frame.
// While run is high, frames follow each other back to back.
//
// Downstream interface (all in the pixel clock domain): the sensor drives
// its data one clock after it samples DATA_READ_EN_N low, and the driver
// registers it once more, so pix_valid/pix_data appear two clocks after the
// read enable. pix_sof is a one-clock pulse before the first word of a frame,
// pix_eof a pulse after its last word, both carried through the same
// two-stage delay so that they stay ordered with the data.
// The signal names and the ping-pong scheme follow the published detector description; the exact
// order of the control pulses and the one-clock sensor read latency are
// assumptions of this implementation.
module aps_driver
  import pc_pkg::*;
#(
  parameter int unsigned NUM_ROWS      = 1024,
  parameter int unsigned WORDS_PER_ROW = 128
) (
  input  logic                 clk,          // CLK_CMOS
  input  logic                 rst_n,
  input  logic                 run,
  input  logic [ROW_W-1:0]     first_row,
  input  logic [ROW_W:0]       num_rows,     // 3 .. NUM_ROWS
  // sensor side
  output logic [ROW_W-1:0]     row_addr,
  output logic                 row_start_n,
  output logic                 data_read_en_n,
  output logic                 load_shft_n,
  output logic                 logic_rst_n,
  input  logic                 row_done_n,
  input  logic [WORD_W-1:0]    aps_data,
  // pixel stream
  output logic                 pix_valid,
  output logic [WORD_W-1:0]    pix_data,
  output logic [ROW_W-1:0]     pix_row,
  output logic [$clog2(WORDS_PER_ROW)-1:0] pix_word,
  output logic                 pix_sof,
  output logic                 pix_eof,
  output logic                 busy,
  output logic [15:0]          frame_count
);
  localparam int unsigned WBITS = $clog2(WORDS_PER_ROW);

  typedef enum logic [2:0] {
    S_IDLE, S_LRST, S_START, S_READ, S_WAIT, S_LOAD, S_END
  } state_e;

  state_e             state;
  logic [ROW_W:0]     step;        // row step i, 0 .. num_rows
  logic [ROW_W:0]     nrows;       // latched frame size
  logic [ROW_W-1:0]   row0;        // latched first row
  logic [WBITS-1:0]   wcnt;
  logic               conv_ack;    // ROW_DONE_N seen high since ROW_START_N

  // read-side tags travelling with the sensor latency
  logic               rd_q, sof_q, eof_q;
  logic [ROW_W-1:0]   row_q;
  logic [WBITS-1:0]   word_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      step           <= '0;
      nrows          <= '0;
      row0           <= '0;
      wcnt           <= '0;
      row_addr       <= '0;
      row_start_n    <= 1'b1;
      data_read_en_n <= 1'b1;
      load_shft_n    <= 1'b1;
      logic_rst_n    <= 1'b1;
      frame_count    <= '0;
      conv_ack       <= 1'b0;
    end else begin
      if (row_done_n) conv_ack <= 1'b1;
      row_start_n <= 1'b1;
      load_shft_n <= 1'b1;
      logic_rst_n <= 1'b1;
      unique case (state)
        S_IDLE: if (run) begin
          nrows       <= num_rows;
          row0        <= first_row;
          step        <= '0;
          logic_rst_n <= 1'b0;
          state       <= S_LRST;
        end
        S_LRST: state <= S_START;
        S_START: begin
          if (step < nrows) begin
            row_addr    <= row0 + step[ROW_W-1:0];
            row_start_n <= 1'b0;
            conv_ack    <= 1'b0;
          end
          if (step != 0) begin
            data_read_en_n <= 1'b0;
            wcnt           <= '0;
            state          <= S_READ;
          end else begin
            state <= S_WAIT;
          end
        end
        S_READ: begin
          if (wcnt == WBITS'(WORDS_PER_ROW - 1)) begin
            data_read_en_n <= 1'b1;
            state          <= S_WAIT;
          end
          wcnt <= wcnt + 1'b1;
        end
        S_WAIT: begin
          if (step == nrows)  state <= S_END;
          else if (conv_ack && !row_done_n) begin
            load_shft_n <= 1'b0;
            state       <= S_LOAD;
          end
        end
        S_LOAD: begin
          step  <= step + 1'b1;
          state <= S_START;
        end
        S_END: begin
          frame_count <= frame_count + 1'b1;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Stage 1: the cycle the sensor drives the word selected by the read
  // enable of the previous clock. Stage 2: word registered in the FPGA.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q <= 1'b0; sof_q <= 1'b0; eof_q <= 1'b0;
      row_q <= '0; word_q <= '0;
      pix_valid <= 1'b0; pix_sof <= 1'b0; pix_eof <= 1'b0;
      pix_data <= '0; pix_row <= '0; pix_word <= '0;
    end else begin
      rd_q   <= (state == S_READ);
      sof_q  <= (state == S_LRST);
      eof_q  <= (state == S_END);
      row_q  <= row0 + step[ROW_W-1:0] - 1'b1;  // row being read = i-1
      word_q <= wcnt;
      pix_valid <= rd_q;
      pix_sof   <= sof_q;
      pix_eof   <= eof_q;
      pix_row   <= row_q;
      pix_word  <= word_q;
      if (rd_q) pix_data <= aps_data;
    end
  end

  assign busy = (state != S_IDLE);

  // A frame needs at least three rows for a 3 x 3 window.
  a_rows: assert property (@(posedge clk) disable iff (!rst_n)
            (state == S_IDLE && run) |-> (num_rows >= 3 && 32'(num_rows) <= NUM_ROWS));
endmodule

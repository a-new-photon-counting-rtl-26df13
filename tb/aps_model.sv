// Behavioural model of the CMOS-APS sensor's digital interface (testbench
// only, not synthesizable logic of this design).
//
// The model holds an image in img[row][col]. ROW_START_N low for a clock
// starts the conversion of row ROW ADDRESS; CONV_CYCLES clocks later the
// digitised row sits in the ADC register and ROW_DONE_N goes low (it goes
// high again at the next ROW_START_N). LOAD_SHFT_N low copies the ADC
// register into the output register. Every clock in which DATA_READ_EN_N is
// sampled low, the next 64-bit word (eight pixels, lowest column in bits
// 7:0) of the output register is driven on dout one clock later.
// LOGIC_RST_N low clears the read pointer. reads_during_conv counts clocks
// in which a conversion and a readout overlap (ping-pong operation).
module aps_model #(
  parameter int unsigned NROWS         = 1024,
  parameter int unsigned WORDS_PER_ROW = 128,
  parameter int unsigned CONV_CYCLES   = 20
) (
  input  logic        clk,
  input  logic        logic_rst_n,
  input  logic [9:0]  row_addr,
  input  logic        row_start_n,
  output logic        row_done_n,
  input  logic        load_shft_n,
  input  logic        data_read_en_n,
  output logic [63:0] dout
);
  localparam int unsigned NCOLS = WORDS_PER_ROW * 8;

  logic [7:0] img     [NROWS][NCOLS];
  logic [7:0] adc_reg [NCOLS];
  logic [7:0] out_reg [NCOLS];
  int         conv_left = 0;
  int         conv_row  = 0;
  int         rptr      = 0;
  int         n_row_starts = 0;
  int         n_loads      = 0;
  int         reads_during_conv = 0;

  initial begin
    row_done_n = 1'b1;
    dout       = '0;
    for (int c = 0; c < NCOLS; c++) begin
      adc_reg[c] = '0;
      out_reg[c] = '0;
    end
  end

  always @(posedge clk) begin
    if (!logic_rst_n) rptr = 0;
    if (!data_read_en_n) begin
      if (conv_left > 0) reads_during_conv++;
      for (int p = 0; p < 8; p++)
        dout[8*p +: 8] <= out_reg[(rptr % WORDS_PER_ROW) * 8 + p];
      rptr++;
    end
    if (conv_left > 0) begin
      conv_left--;
      if (conv_left == 0) begin
        for (int c = 0; c < NCOLS; c++) adc_reg[c] = img[conv_row][c];
        row_done_n <= 1'b0;
      end
    end
    if (!row_start_n) begin
      conv_row  = int'(row_addr) % NROWS;
      conv_left = CONV_CYCLES;
      row_done_n <= 1'b1;
      n_row_starts++;
    end
    if (!load_shft_n) begin
      for (int c = 0; c < NCOLS; c++) out_reg[c] = adc_reg[c];
      rptr = 0;
      n_loads++;
    end
  end
endmodule

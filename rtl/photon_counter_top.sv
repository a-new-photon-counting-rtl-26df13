// FPGA design of the intensified CMOS-APS photon counter.
//
// An MCP image intensifier turns each detected photon into a light spot a
// few pixels wide on a 1024 x 1024 CMOS active pixel sensor. This design
// drives the sensor, finds the spots in real time and sends one 32-bit
// coordinate word per photon to the host (centroid mode), or stores raw
// frames in an external ZBT SRAM and sends them later (frame grabber mode).
//
// Pixel clock domain (clk_cmos, the sensor clock):
//   aps_driver -> centroid_engine (row FIFOs, 3 x 3 window latches, eight
//   validation and centre-of-gravity lanes, row/column registers)
//   -> event_fifo_bank (four synchronous FIFOs, lanes paired)
//   -> four async_fifo write sides.
//   In frame grabber mode the pixel words go to a fifth async_fifo instead.
// Host clock domain (clk_sys, at least twice clk_cmos):
//   four async_fifo read sides -> fifo_arbiter (round robin), or the
//   frame_grabber read stream -> word_serializer 32->8 (parallel port) or
//   word_serializer 32->16 (optical link), chosen by link_sel.
// Configuration inputs (mode, link_sel, first_row, num_rows, threshold) are
// static while a frame is taken. rst_cmos_n and rst_sys_n are asynchronous
// resets, released synchronously to their own clock.
// The parallel port protocol and the optical transceiver are outside this
// design: their byte/half-word valid/ready streams are the ports here.
// The block chain, the two modes, the 64-bit sensor bus, the four FIFO stages,
// the 8/16-bit output paths and the 128 K x 32 RAM follow the published
// detector description; the fifth clock-crossing FIFO for frame grabber mode,
// the valid/ready link ports and the status counters are this design's own.
module photon_counter_top
  import pc_pkg::*;
#(
  parameter int unsigned NUM_ROWS       = 1024,
  parameter int unsigned WORDS_PER_ROW  = 128,
  parameter int unsigned EV_FIFO_DEPTH  = 256,
  parameter int unsigned AF_DEPTH       = 512,
  parameter int unsigned PIX_FIFO_DEPTH = 256,
  parameter int unsigned ZBT_ADDR_W     = 17
) (
  input  logic                 clk_cmos,
  input  logic                 rst_cmos_n,
  input  logic                 clk_sys,
  input  logic                 rst_sys_n,
  // configuration and control
  input  logic                 run,
  input  acq_mode_e            mode,
  input  link_sel_e            link_sel,
  input  logic [ROW_W-1:0]     first_row,
  input  logic [ROW_W:0]       num_rows,
  input  pixel_t               threshold,
  input  logic                 fg_read_start,     // clk_sys
  input  logic [ZBT_ADDR_W:0]  fg_read_len,
  // CMOS-APS
  output logic [ROW_W-1:0]     aps_row_addr,
  output logic                 aps_row_start_n,
  output logic                 aps_data_read_en_n,
  output logic                 aps_load_shft_n,
  output logic                 aps_logic_rst_n,
  input  logic                 aps_row_done_n,
  input  logic [WORD_W-1:0]    aps_data,
  // ZBT SRAM (clk_sys)
  output logic                 zbt_cs_n,
  output logic                 zbt_we_n,
  output logic [ZBT_ADDR_W-1:0] zbt_addr,
  output logic [31:0]          zbt_wdata,
  input  logic [31:0]          zbt_rdata,
  // parallel port, 8 bits (clk_sys)
  output logic                 pp_valid,
  output logic [7:0]           pp_data,
  input  logic                 pp_ready,
  // optical link, 16 bits (clk_sys)
  output logic                 ol_valid,
  output logic [15:0]          ol_data,
  input  logic                 ol_ready,
  // status
  output logic                 aps_busy,
  output logic [15:0]          frame_count,
  output logic [31:0]          n_events,
  output logic [31:0]          n_dropped,
  output logic [31:0]          n_skipped,
  output logic                 fg_overrun,        // sticky, clk_cmos
  output logic                 fg_reading
);
  localparam int unsigned WBITS = $clog2(WORDS_PER_ROW);
  localparam int unsigned NFIFO = 4;

  // ------------------------------------------------------------ pixel domain
  logic              pix_valid, pix_sof, pix_eof;
  logic [WORD_W-1:0] pix_data;
  logic [ROW_W-1:0]  pix_row;
  logic [WBITS-1:0]  pix_word;

  aps_driver #(.NUM_ROWS(NUM_ROWS), .WORDS_PER_ROW(WORDS_PER_ROW)) u_drv (
    .clk(clk_cmos), .rst_n(rst_cmos_n),
    .run, .first_row, .num_rows,
    .row_addr(aps_row_addr), .row_start_n(aps_row_start_n),
    .data_read_en_n(aps_data_read_en_n), .load_shft_n(aps_load_shft_n),
    .logic_rst_n(aps_logic_rst_n), .row_done_n(aps_row_done_n), .aps_data,
    .pix_valid, .pix_data, .pix_row, .pix_word, .pix_sof, .pix_eof,
    .busy(aps_busy), .frame_count
  );

  logic centroid_mode;
  assign centroid_mode = (mode == MODE_CENTROID);

  logic [2*NFIFO-1:0] ev_valid;
  event_t             ev [2*NFIFO];
  logic               flushing;

  centroid_engine #(.WORDS_PER_ROW(WORDS_PER_ROW)) u_cent (
    .clk(clk_cmos), .rst_n(rst_cmos_n),
    .pix_valid(pix_valid && centroid_mode), .pix_data, .pix_row,
    .pix_sof, .pix_eof(pix_eof && centroid_mode),
    .threshold, .ev_valid, .ev, .flushing, .n_events
  );

  logic [NFIFO-1:0] sf_rd_en, sf_valid, af_full;
  event_t           sf_data [NFIFO];

  event_fifo_bank #(.NFIFO(NFIFO), .DEPTH(EV_FIFO_DEPTH)) u_evf (
    .clk(clk_cmos), .rst_n(rst_cmos_n),
    .ev_valid, .ev,
    .rd_en(sf_rd_en), .rd_valid(sf_valid), .rd_data(sf_data), .n_dropped
  );

  // ------------------------------------------------------- clock crossing
  logic [NFIFO-1:0] af_valid, af_rd_en;
  logic [31:0]      af_data [NFIFO];

  for (genvar i = 0; i < NFIFO; i++) begin : g_af
    assign sf_rd_en[i] = sf_valid[i] && !af_full[i];

    async_fifo #(.WIDTH(EVENT_W), .DEPTH(AF_DEPTH)) u_af (
      .wr_clk(clk_cmos), .wr_rst_n(rst_cmos_n),
      .wr_en(sf_rd_en[i]), .wr_data(sf_data[i]), .full(af_full[i]),
      .rd_clk(clk_sys), .rd_rst_n(rst_sys_n),
      .rd_en(af_rd_en[i]), .rd_data(af_data[i]), .rd_valid(af_valid[i])
    );
  end

  localparam int unsigned PF_W = ROW_W + WBITS + WORD_W;
  logic            pf_full, pf_valid, pf_rd_en;
  logic [PF_W-1:0] pf_data;

  async_fifo #(.WIDTH(PF_W), .DEPTH(PIX_FIFO_DEPTH)) u_pf (
    .wr_clk(clk_cmos), .wr_rst_n(rst_cmos_n),
    .wr_en(pix_valid && !centroid_mode), .wr_data({pix_row, pix_word, pix_data}),
    .full(pf_full),
    .rd_clk(clk_sys), .rd_rst_n(rst_sys_n),
    .rd_en(pf_rd_en), .rd_data(pf_data), .rd_valid(pf_valid)
  );

  // A pixel word that finds the frame grabber's FIFO full is lost; the host
  // clock is then too slow for the pixel clock. Sticky until reset.
  always_ff @(posedge clk_cmos or negedge rst_cmos_n) begin
    if (!rst_cmos_n)                                 fg_overrun <= 1'b0;
    else if (pix_valid && !centroid_mode && pf_full) fg_overrun <= 1'b1;
  end

  // ------------------------------------------------------------ host domain
  logic        arb_valid, arb_ready;
  logic [31:0] arb_data;

  fifo_arbiter #(.N(NFIFO), .WIDTH(EVENT_W)) u_arb (
    .clk(clk_sys), .rst_n(rst_sys_n),
    .in_valid(af_valid), .in_data(af_data), .in_rd_en(af_rd_en),
    .out_valid(arb_valid), .out_data(arb_data), .out_ready(arb_ready)
  );

  logic        fg_valid, fg_ready;
  logic [31:0] fg_data;

  frame_grabber #(.WORDS_PER_ROW(WORDS_PER_ROW), .ADDR_W(ZBT_ADDR_W)) u_fg (
    .clk(clk_sys), .rst_n(rst_sys_n),
    .capture(!centroid_mode), .first_row,
    .in_valid(pf_valid), .in_data(pf_data[WORD_W-1:0]),
    .in_row(pf_data[PF_W-1 -: ROW_W]), .in_word(pf_data[WORD_W +: WBITS]),
    .in_rd_en(pf_rd_en),
    .read_start(fg_read_start), .read_len(fg_read_len), .reading(fg_reading),
    .out_valid(fg_valid), .out_data(fg_data), .out_ready(fg_ready),
    .n_skipped,
    .zbt_cs_n, .zbt_we_n, .zbt_addr, .zbt_wdata, .zbt_rdata
  );

  // source selection: event words or stored image words
  logic        src_valid, src_ready;
  logic [31:0] src_data;
  assign src_valid = centroid_mode ? arb_valid : fg_valid;
  assign src_data  = centroid_mode ? arb_data  : fg_data;
  assign arb_ready = centroid_mode && src_ready;
  assign fg_ready  = !centroid_mode && src_ready;

  // link selection: 32 -> 8 bit parallel port, 32 -> 16 bit optical link
  logic pp_in_ready, ol_in_ready, pp_last, ol_last;
  assign src_ready = (link_sel == LINK_PARALLEL) ? pp_in_ready : ol_in_ready;

  word_serializer #(.IN_W(32), .OUT_W(8)) u_ser8 (
    .clk(clk_sys), .rst_n(rst_sys_n),
    .in_valid(src_valid && link_sel == LINK_PARALLEL), .in_data(src_data),
    .in_ready(pp_in_ready),
    .out_valid(pp_valid), .out_data(pp_data), .out_ready(pp_ready), .out_last(pp_last)
  );

  word_serializer #(.IN_W(32), .OUT_W(16)) u_ser16 (
    .clk(clk_sys), .rst_n(rst_sys_n),
    .in_valid(src_valid && link_sel == LINK_OPTICAL), .in_data(src_data),
    .in_ready(ol_in_ready),
    .out_valid(ol_valid), .out_data(ol_data), .out_ready(ol_ready), .out_last(ol_last)
  );

endmodule

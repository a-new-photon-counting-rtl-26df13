// Frame grabber: stores raw frames in the external ZBT SRAM and reads them
// back to the host at the host link's own rate.
//
// Write side: while capture is high, every 64-bit pixel word (eight pixels,
// tagged with its sensor row and word index) taken from in_* is written as
// two 32-bit ZBT words, low half first, at word address
//   {row - first_row, word, half}
// so an image is stored row after row, four pixels per RAM word, pixel p of a
// RAM word in bits [8p+7:8p]. The RAM holds 2^ADDR_W words; rows whose offset
// does not fit are not stored and counted in n_skipped.
// Read side: a pulse on read_start reads RAM words 0 .. read_len-1 in order
// and offers them on out_valid/out_data/out_ready. Reads are issued only
// while the 8-word output buffer has room for every read in flight.
// ZBT timing (pipelined, no bus turnaround): address, zbt_cs_n and zbt_we_n
// in clock t; write data on zbt_wdata, or read data on zbt_rdata, in clock
// t+2. Writes take priority over reads. Runs in the host clock domain, which
// must be at least twice the pixel clock to keep up with the sensor.
// The RAM size and its use as image store follow the published detector description; the address
// map and the access scheduling are this design's own.
module frame_grabber
  import pc_pkg::*;
#(
  parameter int unsigned WORDS_PER_ROW = 128,
  parameter int unsigned ADDR_W        = 17      // 128 K words of 32 bits
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 capture,
  input  logic [ROW_W-1:0]     first_row,
  input  logic                 in_valid,
  input  logic [WORD_W-1:0]    in_data,
  input  logic [ROW_W-1:0]     in_row,
  input  logic [$clog2(WORDS_PER_ROW)-1:0] in_word,
  output logic                 in_rd_en,
  input  logic                 read_start,
  input  logic [ADDR_W:0]      read_len,
  output logic                 reading,
  output logic                 out_valid,
  output logic [31:0]          out_data,
  input  logic                 out_ready,
  output logic [31:0]          n_skipped,
  // ZBT SRAM
  output logic                 zbt_cs_n,
  output logic                 zbt_we_n,
  output logic [ADDR_W-1:0]    zbt_addr,
  output logic [31:0]          zbt_wdata,
  input  logic [31:0]          zbt_rdata
);
  localparam int unsigned WBITS   = $clog2(WORDS_PER_ROW);
  localparam int unsigned ROFF_W  = ADDR_W - WBITS - 1;
  localparam int unsigned OB_DEPTH = 8;

  // ---------------- write side ----------------
  logic             half;          // 0: low half of the word pending
  logic [ROW_W-1:0] roff;
  logic             fits;
  logic             wr_now;

  assign roff     = in_row - first_row;
  assign fits     = (roff >> ROFF_W) == '0;
  assign wr_now   = in_valid && capture && fits;
  // a word is consumed after its second half, or at once when not stored
  assign in_rd_en = in_valid && (!(capture && fits) || half);

  // ---------------- read side ----------------
  logic [ADDR_W:0]  rd_addr, rd_left;
  logic             rd_issue;
  logic [2:0]       rv;            // read command in flight, by age
  logic [1:0]       inflight;
  logic             ob_full, ob_valid;
  logic [$clog2(OB_DEPTH+1)-1:0] ob_cnt;
  logic             ob_pop;

  assign reading  = (rd_left != 0);
  assign inflight = {1'b0, rv[0]} + {1'b0, rv[1]} + {1'b0, rv[2]};
  assign rd_issue = reading && !wr_now &&
                    (32'(ob_cnt) + 32'(inflight) < OB_DEPTH);

  assign ob_pop    = out_ready && ob_valid;
  assign out_valid = ob_valid;

  sync_fifo #(.WIDTH(32), .DEPTH(OB_DEPTH)) u_obuf (
    .clk, .rst_n, .clr(1'b0),
    .wr_en(rv[2]), .wr_data(zbt_rdata), .full(ob_full),
    .rd_en(ob_pop), .rd_data(out_data), .rd_valid(ob_valid), .count(ob_cnt)
  );

  // ---------------- ZBT command and data pipeline ----------------
  logic [31:0] wd1, wd2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half      <= 1'b0;
      zbt_cs_n  <= 1'b1;
      zbt_we_n  <= 1'b1;
      zbt_addr  <= '0;
      zbt_wdata <= '0;
      wd1       <= '0;
      wd2       <= '0;
      rv        <= '0;
      rd_addr   <= '0;
      rd_left   <= '0;
      n_skipped <= '0;
    end else begin
      zbt_cs_n <= 1'b1;
      zbt_we_n <= 1'b1;
      if (wr_now) begin
        zbt_cs_n <= 1'b0;
        zbt_we_n <= 1'b0;
        zbt_addr <= ADDR_W'({roff[ROFF_W-1:0], in_word, half});
        wd1      <= half ? in_data[WORD_W-1:32] : in_data[31:0];
        half     <= !half;
      end else if (rd_issue) begin
        zbt_cs_n <= 1'b0;
        zbt_addr <= rd_addr[ADDR_W-1:0];
        rd_addr  <= rd_addr + 1'b1;
        rd_left  <= rd_left - 1'b1;
      end
      if (in_valid && capture && !fits && in_rd_en) n_skipped <= n_skipped + 1'b1;
      // data phase two clocks after the command
      wd2       <= wd1;
      zbt_wdata <= wd2;
      rv        <= {rv[1:0], rd_issue};
      if (read_start && !reading) begin
        rd_addr <= '0;
        rd_left <= read_len;
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) rv[2] |-> !ob_full);
endmodule

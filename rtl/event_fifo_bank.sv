// Event FIFO bank: four synchronous FIFOs collecting the event words.
//
// The eight centroid lanes are paired, lanes 2i and 2i+1 feeding FIFO i; the
// validator guarantees that at most one lane of a pair fires per clock, so
// each FIFO takes at most one word per clock. If both fire anyway, the lower
// lane is kept and the other counted as dropped. An event arriving at a full
// FIFO is also dropped and counted (n_dropped); the FIFO contents are never
// overwritten. Each FIFO is first-word-fall-through and is read through
// rd_en/rd_valid/rd_data, in the same clock domain.
// Four synchronous event FIFOs follow the published detector description; the lane pairing, the
// depth and the drop policy are this design's own.
module event_fifo_bank
  import pc_pkg::*;
#(
  parameter int unsigned NFIFO = 4,
  parameter int unsigned DEPTH = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [2*NFIFO-1:0] ev_valid,
  input  event_t            ev [2*NFIFO],
  input  logic [NFIFO-1:0]  rd_en,
  output logic [NFIFO-1:0]  rd_valid,
  output event_t            rd_data [NFIFO],
  output logic [31:0]       n_dropped
);
  logic [NFIFO-1:0] wr_en, full;
  logic [1:0]       lost [NFIFO];
  event_t           wr_d [NFIFO];

  for (genvar i = 0; i < NFIFO; i++) begin : g_fifo
    logic [$clog2(DEPTH+1)-1:0] cnt;

    always_comb begin
      wr_en[i] = ev_valid[2*i] || ev_valid[2*i+1];
      wr_d[i]  = ev_valid[2*i] ? ev[2*i] : ev[2*i+1];
      // words lost this clock: both lanes, or a full FIFO
      lost[i]  = {1'b0, ev_valid[2*i] && ev_valid[2*i+1]} +
                 {1'b0, wr_en[i] && full[i] && !rd_en[i]};
    end

    sync_fifo #(.WIDTH(EVENT_W), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n, .clr(1'b0),
      .wr_en(wr_en[i]), .wr_data(wr_d[i]), .full(full[i]),
      .rd_en(rd_en[i]), .rd_data(rd_data[i]), .rd_valid(rd_valid[i]),
      .count(cnt)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) n_dropped <= '0;
    else begin
      logic [31:0] sum;
      sum = '0;
      for (int i = 0; i < NFIFO; i++) sum += 32'(lost[i]);
      n_dropped <= n_dropped + sum;
    end
  end
endmodule

// Behavioural model of a pipelined ZBT SRAM, 2^ADDR_W words of 32 bits
// (testbench only). A cycle with cs_n low is a read or, with we_n low, a
// write; its data is on the bus two clocks later: write data is taken from
// wdata then, read data is driven on rdata then. Back-to-back reads and
// writes in any order need no idle cycles.
// The 128 K x 32 size follows the published detector description; the
// two-clock pipeline is the usual ZBT behaviour, assumed here.
module zbt_model #(
  parameter int unsigned ADDR_W = 17
) (
  input  logic              clk,
  input  logic              cs_n,
  input  logic              we_n,
  input  logic [ADDR_W-1:0] addr,
  input  logic [31:0]       wdata,
  output logic [31:0]       rdata
);
  logic [31:0] mem [2**ADDR_W];
  logic [1:0]  act, wr;
  logic [ADDR_W-1:0] a1, a2;
  int n_writes = 0;
  int n_reads  = 0;

  initial begin
    act = '0; wr = '0; a1 = '0; a2 = '0; rdata = '0;
  end

  always @(posedge clk) begin
    // data phase of the command issued two clocks ago (wdata is valid in
    // the clock before this edge)
    if (act[1] && wr[1]) begin
      mem[a2] <= wdata;
      n_writes++;
    end
    if (act[0] && !wr[0]) begin
      rdata <= mem[a1];       // visible in the second clock after the command
      n_reads++;
    end
    act <= {act[0], !cs_n};
    wr  <= {wr[0], !we_n};
    a2  <= a1;
    a1  <= addr;
  end
endmodule

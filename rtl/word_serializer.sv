// Word serialiser: the 32-to-8 and 32-to-16 bit multiplexers in front of
// the host links.
//
// Accepts one IN_W-bit word (valid/ready) and sends it as IN_W/OUT_W slices,
// most significant slice first, on an OUT_W-bit valid/ready port. A new word
// is accepted in the clock its last slice is taken, so a link that is always
// ready receives one slice per clock without gaps. With OUT_W = 8 it feeds
// the parallel port, with OUT_W = 16 the optical link.
// The widths follow the published detector description; slice order and handshake are this design's.
module word_serializer #(
  parameter int unsigned IN_W  = 32,
  parameter int unsigned OUT_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [IN_W-1:0]  in_data,
  output logic             in_ready,
  output logic             out_valid,
  output logic [OUT_W-1:0] out_data,
  input  logic             out_ready,
  output logic             out_last    // last slice of a word
);
  localparam int unsigned NS = IN_W / OUT_W;
  localparam int unsigned CW = (NS > 1) ? $clog2(NS) : 1;

  logic [IN_W-1:0] sh;
  logic [CW-1:0]   idx;     // slice being offered
  logic            full;

  assign out_valid = full;
  assign out_data  = sh[IN_W-1 -: OUT_W];
  assign out_last  = (idx == CW'(NS - 1));
  assign in_ready  = !full || (out_ready && out_last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh   <= '0;
      idx  <= '0;
      full <= 1'b0;
    end else if (in_valid && in_ready) begin
      sh   <= in_data;
      idx  <= '0;
      full <= 1'b1;
    end else if (full && out_ready) begin
      if (out_last) full <= 1'b0;
      sh  <= sh << OUT_W;
      idx <= idx + 1'b1;
    end
  end

  initial begin
    assert (IN_W % OUT_W == 0) else $error("IN_W must be a multiple of OUT_W");
  end
endmodule

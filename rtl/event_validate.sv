// Event validation for one 3 x 3 window.
//
// An event is valid when the centre pixel b is above the discrimination
// level and is the peak of its window. To make a flat top of equal pixels
// yield exactly one event, the centre must be strictly greater than the four
// neighbours that precede it in raster order (the whole top row and the left
// pixel) and greater than or equal to the four that follow it. Hence two
// neighbouring pixels can never both be validated. on_edge (centre on the
// first or last column) suppresses the event, as the window is incomplete.
// Purely combinational. Thresholding and peak search follow the published detector description; the
// tie rule and the edge rule are this design's own.
module event_validate
  import pc_pkg::*;
(
  input  window_t  win,
  input  pixel_t   threshold,
  input  logic     on_edge,
  output logic     valid
);
  pixel_t b;
  logic   peak;

  assign b = win[1][1];

  always_comb begin
    peak = (b > win[0][0]) && (b > win[0][1]) && (b > win[0][2]) && (b > win[1][0]) &&
           (b >= win[1][2]) && (b >= win[2][0]) && (b >= win[2][1]) && (b >= win[2][2]);
    valid = peak && (b > threshold) && !on_edge;
  end
endmodule

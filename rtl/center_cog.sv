// Three-point truncated centre of gravity for one 3 x 3 window.
//
// With a, b, c the three pixels along one axis through the window centre (b
// the centre, the highest), the offset of the light spot from the centre is
// (c - a) / (a + b + c) pixel. It is computed for x (left, centre, right) and
// for y (top, centre, bottom) and given as a signed integer in units of
// 1/SUB_SCALE pixel, the quotient truncated toward zero. With b the largest
// of the three the offset lies within +-1/2 pixel, so SUB_W = 6 bits hold
// +-SUB_SCALE/2 = +-16. A zero sum gives zero. Purely combinational.
// The formula follows the published detector description; the fixed-point scaling is this design's.
module center_cog
  import pc_pkg::*;
(
  input  window_t                 win,
  output logic signed [SUB_W-1:0] dx,
  output logic signed [SUB_W-1:0] dy
);
  localparam int unsigned NUM_W = PIX_W + 1 + $clog2(SUB_SCALE) + 1;  // signed

  function automatic logic signed [SUB_W-1:0] cog(input pixel_t a, input pixel_t b,
                                                  input pixel_t c);
    logic signed [NUM_W-1:0] num;
    logic signed [NUM_W-1:0] den;
    logic signed [NUM_W-1:0] q;
    num = (NUM_W'(c) - NUM_W'(a)) * NUM_W'(SUB_SCALE);
    den = NUM_W'(a) + NUM_W'(b) + NUM_W'(c);
    if (den == 0) q = '0;
    else          q = num / den;   // signed division truncates toward zero
    return q[SUB_W-1:0];
  endfunction

  assign dx = cog(win[1][0], win[1][1], win[1][2]);
  assign dy = cog(win[0][1], win[1][1], win[2][1]);
endmodule

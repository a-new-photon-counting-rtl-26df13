// Shared types and constants of the intensified CMOS-APS photon counter.
//
// The sensor is a 1024 x 1024 pixel APS with 8-bit pixels, read eight
// pixels (one 64-bit word) per pixel clock, so one row is 128 words. The
// centroiding pipeline turns every validated photon event into one 32-bit
// word holding the row and column of the peak pixel and a signed sub-pixel
// offset on each axis. Sensor geometry and pixel/word widths follow the
// sensor description; the packing of the event word is this design's own.
package pc_pkg;

  localparam int unsigned PIX_W       = 8;     // ADC resolution
  localparam int unsigned WORD_PIX    = 8;     // pixels per output word
  localparam int unsigned WORD_W      = PIX_W * WORD_PIX;  // 64-bit APS output
  localparam int unsigned ROW_W       = 10;    // 1024 rows
  localparam int unsigned COL_W       = 10;    // 1024 columns
  localparam int unsigned SUB_W       = 6;     // signed sub-pixel offset
  localparam int unsigned SUB_SCALE   = 32;    // sub-pixel units per pixel
  localparam int unsigned EVENT_W     = 32;

  typedef logic [PIX_W-1:0] pixel_t;

  // 3 x 3 neighbourhood, w[r][c]: r = 0 top row, c = 0 left column.
  typedef pixel_t [2:0][2:0] window_t;

  // Event word sent to the host. dx/dy are two's complement, in units of
  // 1/SUB_SCALE pixel, and lie in [-SUB_SCALE/2, +SUB_SCALE/2].
  typedef struct packed {
    logic [ROW_W-1:0]        row;
    logic [COL_W-1:0]        col;
    logic signed [SUB_W-1:0] dy;
    logic signed [SUB_W-1:0] dx;
  } event_t;

  // Acquisition modes of the FPGA.
  typedef enum logic {
    MODE_CENTROID      = 1'b0,
    MODE_FRAME_GRABBER = 1'b1
  } acq_mode_e;

  // Host link selection.
  typedef enum logic {
    LINK_PARALLEL = 1'b0,
    LINK_OPTICAL  = 1'b1
  } link_sel_e;

endpackage

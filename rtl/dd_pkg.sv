// Shared types and constants of the defect detector.
//
// Pixels travel as 8-bit tokens (the emulator's PIXEL type) next to a small
// sideband: a valid strobe and an end-of-frame marker on the last pixel of
// each frame. There is no back-pressure: a source offers at most one pixel
// per clock and every stage accepts it, as on a pixel-clocked video path.
// Booleans carried as pixels use 0 for false and 255 for true, the
// convention of the operator library (XOR(255) negates them).
package dd_pkg;

  localparam int unsigned PIX_W  = 8;    // PIXEL width
  localparam int unsigned MAG_W  = 5;    // scaled gradient magnitude (10-bit atan address / 2)
  localparam int unsigned DIR_W  = 8;    // edge direction code, 0..253 for 0..180 degrees
  localparam int unsigned DIR_MOD = 254; // direction codes per half turn
  localparam int unsigned CNT_W  = 20;   // per-frame pixel counts (572x768 < 2**20)
  localparam int unsigned LINE_DEPTH = 512; // on-chip line FIFO of the extraction chip

  localparam logic [PIX_W-1:0] PIX_TRUE  = '1;
  localparam logic [PIX_W-1:0] PIX_FALSE = '0;

  // Sideband that travels with every token.
  typedef struct packed {
    logic valid;  // a token is present this cycle
    logic eof;    // this token is the last of its frame
  } ctl_t;

endpackage

// tracking_pkg: types and constants shared by the moving-object tracking core.
//
// The core implements the Adaptive Hybrid Difference (AHD) background model:
// a Threshold Definer (TD) accumulates per-pixel sums of frame differences and
// of their squares over N frames, a finaliser turns them into the interval
// [mu-sigma, mu+sigma], and a Binary Image Builder (BIB) marks a pixel as moving
// when any of its differences to the preceding frames falls outside it.
//
// The frame memory is split into regions of one frame each (FRAME_PIX words):
// six frame slots (a frame f lives in slot f mod 6), the two lookup tables and
// the binary image. Six read streams and two write streams move data between
// the memory and the units; pass_cfg_t describes one pass over a frame.
package tracking_pkg;

  // Number of frame slots the memory holds at a time (document: six frames).
  localparam int unsigned FRAME_SLOTS = 6;
  // Memory regions, in units of one frame.
  localparam int unsigned REG_LUT1 = 6;   // sum of D, later mu+sigma
  localparam int unsigned REG_LUT2 = 7;   // sum of D^2, later mu-sigma
  localparam int unsigned REG_BIN  = 8;   // binary image
  localparam int unsigned NUM_REGIONS = 9;

  localparam int unsigned NUM_RD = 6;     // read FIFOs (memory -> unit)
  localparam int unsigned NUM_WR = 2;     // write FIFOs (unit -> memory)

  // What the unit side does during a pass.
  typedef enum logic [2:0] {
    MODE_INGEST = 3'd0,  // camera pixels -> write stream 0
    MODE_TD     = 3'd1,  // Threshold Definer accumulation
    MODE_FIN    = 3'd2,  // sums -> mu+sigma / mu-sigma
    MODE_BIB    = 3'd3   // Binary Image Builder
  } pass_mode_e;

  // Region index of each stream for one pass. Read streams:
  //   TD : 0 frame t, 1 frame t-k, 2 frame t+1, 3 frame t+1-k, 4 LUT1, 5 LUT2
  //   FIN: 4 LUT1, 5 LUT2
  //   BIB: 0 frame t, 1 frame t-s, 2 frame t-s-1, 3 binary image, 4 LUT1, 5 LUT2
  // Write streams: 0 camera / LUT1 / binary image, 1 LUT2.
  typedef struct packed {
    pass_mode_e                mode;
    logic [NUM_RD-1:0]         rd_en;
    logic [NUM_RD-1:0][3:0]    rd_region;
    logic [NUM_WR-1:0]         wr_en;
    logic [NUM_WR-1:0][3:0]    wr_region;
    logic                      last;   // BIB: last pass of a frame (publish the image)
  } pass_cfg_t;

endpackage

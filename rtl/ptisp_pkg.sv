// ptisp_pkg: types and constants shared by the pyramid tile-based image signal
// processor (PTISP).
//
// The image pipeline is organised as a pyramid of four floors. Floor 1 holds the
// Bayer source frame, floor 2 the noise-reduced Bayer frame, floor 3 the colour
// interpolated frame and floor 4 the edge-enhanced YUV output. Three tile
// processing elements (TPEs) carry a 7x5 window filter from one floor to the next;
// per-pixel processing elements (PPEs) sit between them. Every pixel travels with
// a small side-band record (pix_meta_t) holding the frame, tile-row and tile start
// flags and the pixel's position on the source (floor 1) grid. The kernel size,
// tile size and frame size are the defaults of the design (7x5 kernel, 16x16
// tiles, 3840x2160 output). The side-band record layout is this design's choice.
package ptisp_pkg;

  // Filter kernel is (M+1) x (N+1) = 7 wide by 5 high.
  localparam int unsigned KM = 6;
  localparam int unsigned KN = 4;
  localparam int unsigned KW = KM + 1;
  localparam int unsigned KH = KN + 1;

  // Output tile size s x t.
  localparam int unsigned TS = 16;
  localparam int unsigned TT = 16;

  // Number of floors in the pyramid.
  localparam int unsigned NFLOOR = 4;

  // Tile buffer organisation: one strip is NBANK pixel columns, one column per
  // two-port bank; NSTRIP strips form a circular column buffer.
  localparam int unsigned NBANK  = KM + 2;
  localparam int unsigned NSTRIP = 5;
  localparam int unsigned BUFW   = NBANK * NSTRIP;
  localparam int unsigned HMAX   = TT + 3 * KN;

  // Coordinate width on the source grid (source frame is 3858 x 2172 at QFHD).
  localparam int unsigned CW = 12;

  // Side-band record carried with every pixel.
  typedef struct packed {
    logic          sof;  // first pixel of a frame (vertical sync)
    logic          sor;  // first pixel of the first tile of a tile row (horizontal sync)
    logic          sot;  // first pixel of a tile
    logic [CW-1:0] x;    // column on the source grid
    logic [CW-1:0] y;    // row on the source grid
  } pix_meta_t;

  // Filter core selection of a TPE.
  typedef enum logic [1:0] {
    CORE_NR = 2'd0,
    CORE_CI = 2'd1,
    CORE_EE = 2'd2
  } core_kind_e;

  // Settings written through the AHB slave.
  typedef struct packed {
    logic [31:0] src_base;   // word address of the source frame
    logic [31:0] irr_base1;  // word address of the IRR area of TPE 1 (two banks)
    logic [31:0] irr_base2;
    logic [31:0] irr_base3;
    logic [9:0]  blc;        // black level subtracted by f1
    logic [11:0] lsc_cx;     // lens centre on the source grid (f2)
    logic [11:0] lsc_cy;
    logic [15:0] lsc_k;      // radial gain slope (f2)
    logic [9:0]  wb_r;       // white-balance gains, 1.0 = 256 (f4)
    logic [9:0]  wb_g;
    logic [9:0]  wb_b;
    logic [9:0]  nr_thr;     // impulse detector threshold (f3)
    logic [2:0]  nr_rs;      // range weight shift (f3)
    logic [1:0]  nr_ss;      // spatial weight shift (f3)
    logic [7:0]  ee_thr;     // edge threshold (f8)
    logic [7:0]  ee_alpha;   // edge gain, 1.0 = 16 (f8)
    logic [7:0]  frame_tx;   // output tiles across, 0 = build maximum
    logic [7:0]  frame_ty;   // output tile rows, 0 = build maximum
    logic [2:0][2:0][11:0] ccm;  // colour matrix [out][in], signed, 1.0 = 256
  } cfg_t;

  // Bayer colour of a source-grid position (RGGB: R at even row, even column).
  function automatic logic [1:0] bayer_phase(input logic [CW-1:0] x, input logic [CW-1:0] y);
    return {y[0], x[0]};
  endfunction

endpackage

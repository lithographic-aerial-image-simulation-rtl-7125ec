// litho_pkg: shared sizes and types of the polygon-based aerial-image
// accelerator.
//
// The defaults are the main configuration: a 400 x 400 kernel sampled on a
// 5 nm grid (16-bit fixed point), a 40 x 40 image region on a 25 nm grid
// (32-bit partial sums), up to 800 layout corners (200 rectangles) per region
// and a 5 x 5 interleaved memory partitioning. The corner word layout, the
// coordinate width and the kernel-centre offset are this design's own choice.
package litho_pkg;

  localparam int unsigned P_DEF    = 5;    // partitions per axis (5 x 5)
  localparam int unsigned GRID_DEF = 5;    // kernel samples per image pixel (25 nm / 5 nm)
  localparam int unsigned KDIM_DEF = 400;  // kernel samples per axis
  localparam int unsigned IMG_DEF  = 40;   // image pixels per axis in one region
  localparam int unsigned MAXC_DEF = 800;  // corners per region (4 x 200 rectangles)
  localparam int unsigned KOFF_DEF = 200;  // kernel index of offset 0 (centre)

  localparam int unsigned KW  = 16;        // kernel sample width
  localparam int unsigned SW  = 32;        // partial-sum width
  localparam int unsigned CW  = 16;        // one corner coordinate (signed, 5 nm units)
  localparam int unsigned AW  = 20;        // SRAM word-address width
  localparam int unsigned DW  = 32;        // SRAM data width

  // One layout corner as stored in SRAM and in the corner buffer: signed
  // x and y on the 5 nm grid, relative to the region's lower-left pixel.
  typedef struct packed {
    logic signed [CW-1:0] x;
    logic signed [CW-1:0] y;
  } corner_t;

  // What a PE does with the partial sum it reads.
  typedef enum logic [1:0] {
    ACC_ADD   = 2'd0,   // sum := sum +/- kernel
    ACC_FIRST = 2'd1,   // sum := 0 +/- kernel (first corner of a region)
    ACC_CLEAR = 2'd2    // sum := 0 (region without corners)
  } acc_mode_e;

endpackage

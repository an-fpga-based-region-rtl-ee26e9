// regrow_pkg: constants and types shared by the region-growing modules.
//
// The frame is a raster of IMG_COLS x IMG_ROWS pixels, 8 bits each, held in
// 128K x 8 memories (17-bit address). Pixels are binary: 0 is background and
// anything else is object; the auxiliary image uses 0 and 255 (all ones).
// Pixel addresses follow Add = col_count * i + j + 1, so the first pixel of a
// frame sits at address 1 and address 0 is never used.
//
// Each pixel takes two clock cycles (see reg_grow): a read phase in which all
// memories are read, and a write phase in which the new auxiliary pixel is
// written back. That split is this design's own choice, made so that every
// memory keeps the single address bus and single R/W line of a plain SRAM.
package regrow_pkg;

  localparam int unsigned IMG_COLS = 320;  // pixels per line
  localparam int unsigned IMG_ROWS = 240;  // lines per frame
  localparam int unsigned ADDR_W   = 17;   // 128K x 8 memory
  localparam int unsigned PIX_W    = 8;    // bits per pixel

  // Phase of the two-cycle pixel slot.
  typedef enum logic {
    PH_READ  = 1'b0,   // memories read, new auxiliary pixel computed
    PH_WRITE = 1'b1    // new auxiliary pixel written to aux and N1..N4
  } phase_e;

  // What a frame does, chosen at the rising edge of vertical sync.
  typedef enum logic {
    MODE_GROW = 1'b0,  // one region-growing pass over the frame
    MODE_LOAD = 1'b1   // store incoming video, initialise aux and N1..N4
  } mode_e;

endpackage

// vga_pkg: timing constants, shared types and the content formulas of the
// two look-up memories of the 640x480 VGA controller.
//
// Horizontal line (pixel clocks): 640 visible, 20 front porch, 95 sync,
// 45 back porch = 800. Vertical frame (lines): 480 visible, 11 front porch,
// 2 sync, 32 back porch = 525. The sync, back porch, visible and front porch
// lengths follow the published 640x480 timing description; the vertical
// front porch of 11 lines is chosen so that the frame totals 525 lines.
// Counters start at the first visible pixel, so h_count/v_count double as
// the pixel column/row while the beam is in the visible window.
//
// The picture and colour table that a real system would load from a memory
// initialisation file are not part of this design. When no file is given the
// memories are filled from image_index_at() and palette_rgb() below: an
// 8-bit test pattern of the pixel position and a 3-3-2 colour table.
package vga_pkg;

  // Horizontal timing, in pixel clocks
  localparam int unsigned H_DISP  = 640;
  localparam int unsigned H_FP    = 20;
  localparam int unsigned H_SYNC  = 95;
  localparam int unsigned H_BP    = 45;
  // Vertical timing, in lines
  localparam int unsigned V_DISP  = 480;
  localparam int unsigned V_FP    = 11;
  localparam int unsigned V_SYNC  = 2;
  localparam int unsigned V_BP    = 32;

  localparam int unsigned IDX_W   = 8;   // colour index width
  localparam int unsigned COL_W   = 8;   // width of each of R, G, B

  typedef logic [IDX_W-1:0] idx_t;

  // 24-bit colour word laid out as R[23:16], G[15:8], B[7:0]
  typedef struct packed {
    logic [COL_W-1:0] r;
    logic [COL_W-1:0] g;
    logic [COL_W-1:0] b;
  } rgb_t;

  // Default picture: colour index of the pixel at column x, row y (only the
  // low bits of x and y matter, so the pattern repeats every 512 x 128).
  function automatic idx_t image_index_at(logic [8:0] x, logic [6:0] y);
    return idx_t'({y[6:4], x[8:4]} ^ {y[3:0], x[3:0]});
  endfunction

  // Default colour table: 3 bits red, 3 bits green, 2 bits blue, each
  // expanded to 8 bits by repeating its top bits.
  function automatic rgb_t palette_rgb(idx_t i);
    rgb_t c;
    c.r = {i[7:5], i[7:5], i[7:6]};
    c.g = {i[4:2], i[4:2], i[4:3]};
    c.b = {i[1:0], i[1:0], i[1:0], i[1:0]};
    return c;
  endfunction

endpackage

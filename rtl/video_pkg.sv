// video_pkg: constants and types shared by the video subsystem.
//
// Holds the processor-side address map (framebuffer window, colour-map
// window, line-engine register file), the width of a drawing coordinate and
// the line engine's state encoding. The addresses and the 11-bit coordinate
// width follow the published register map of the subsystem; the framebuffer
// upper bound (0x803F_FFFC) reserves 1024 rows of 4 KB even though only the
// first V_ACTIVE rows hold pixels.
package video_pkg;

  // Framebuffer window: word address {Y[9:0], X[9:0]}, byte offset Y*4K + X*4.
  localparam logic [31:0] FB_BASE     = 32'h8000_0000;
  localparam logic [31:0] FB_LAST     = 32'h803F_FFFC;

  // Colour map: 16 entries, one 24-bit entry per word address.
  localparam logic [31:0] CMAP_BASE   = 32'h8040_0000;
  localparam logic [31:0] CMAP_LAST   = 32'h8040_003C;

  // Line engine registers.
  localparam logic [31:0] LE_X0       = 32'h8040_0040;  // non-trigger x0,y0,x1,y1
  localparam logic [31:0] LE_X0_TRIG  = 32'h8040_0050;  // trigger x0,y0,x1,y1
  localparam logic [31:0] LE_COLOR    = 32'h8040_0060;
  localparam logic [31:0] LE_STATUS   = 32'h8040_0064;  // read-only, bit 0 = ready

  // Coordinates in the line-engine registers are 11 bits wide ([10:0]).
  localparam int unsigned COORD_W = 11;
  typedef logic [COORD_W-1:0] coord_t;

  // Index of a line-engine end-point register, taken from address bits [3:2].
  typedef enum logic [1:0] {
    REG_X0 = 2'd0,
    REG_Y0 = 2'd1,
    REG_X1 = 2'd2,
    REG_Y1 = 2'd3
  } le_reg_e;

  typedef enum logic [1:0] {
    LE_IDLE  = 2'd0,
    LE_SETUP = 2'd1,
    LE_DRAW  = 2'd2
  } le_state_e;

endpackage

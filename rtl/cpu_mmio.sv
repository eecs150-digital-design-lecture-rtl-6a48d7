// cpu_mmio: processor-side memory-mapped interface of the video subsystem.
//
// Decodes the CPU's word stores and loads against the subsystem's address
// map:
//   0x8000_0000-0x803F_FFFC  framebuffer; byte offset Y*4096 + X*4, so the
//                            word address is {Y[9:0], X[9:0]} and X and Y
//                            come straight from address bits [11:2] and
//                            [21:12]
//   0x8040_0000-0x8040_003C  colour map, entry = address bits [5:2]
//   0x8040_0040-0x8040_004C  line engine x0, y0, x1, y1 (no trigger)
//   0x8040_0050-0x8040_005C  line engine x0, y0, x1, y1 (write also starts it)
//   0x8040_0060              line engine colour
//   0x8040_0064              read-only status, bit 0 = line engine ready
// Stores elsewhere are ignored; loads elsewhere return zero.
//
// Interface: cpu_addr/cpu_wdata/cpu_we/cpu_re is a single-cycle word access.
// The write side outputs are combinational decodes of the access in the
// same cycle. cpu_rdata is registered: it holds the result of the load
// issued in the previous cycle, like a synchronous data memory.
//
// From the document: the addresses and field positions. Own choices: whole-
// word stores only (byte lanes are ignored), registered read data, and
// loads from the framebuffer returning zero (the CPU only writes it).
module cpu_mmio
  import video_pkg::*;
#(
  parameter int unsigned PIX_W = 24
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [31:0]      cpu_addr,
  input  logic [31:0]      cpu_wdata,
  input  logic             cpu_we,
  input  logic             cpu_re,
  output logic [31:0]      cpu_rdata,
  // framebuffer write
  output logic             fb_we,
  output coord_t           fb_x,
  output coord_t           fb_y,
  output logic [PIX_W-1:0] fb_data,
  // colour map write
  output logic             cmap_we,
  output logic [3:0]       cmap_idx,
  output logic [23:0]      cmap_color,
  // line engine registers
  output logic             le_reg_we,
  output le_reg_e          le_reg_sel,
  output logic             le_reg_trig,
  output logic             le_color_we,
  output logic [31:0]      le_wdata,
  input  logic             le_ready
);

  logic in_fb, in_cmap, in_le_pts, is_color, is_status;

  always_comb begin
    in_fb     = cpu_addr[31:22] == FB_BASE[31:22];
    in_cmap   = cpu_addr[31:6]  == CMAP_BASE[31:6];
    // 0x40..0x5C: bits [5:4] are 2'b00 (0x40-0x4C) or 2'b01 (0x50-0x5C)
    in_le_pts = (cpu_addr[31:5] == LE_X0[31:5]);
    is_color  = cpu_addr[31:2]  == LE_COLOR[31:2];
    is_status = cpu_addr[31:2]  == LE_STATUS[31:2];

    fb_we       = cpu_we && in_fb;
    fb_x        = coord_t'(cpu_addr[11:2]);
    fb_y        = coord_t'(cpu_addr[21:12]);
    fb_data     = cpu_wdata[PIX_W-1:0];

    cmap_we     = cpu_we && in_cmap;
    cmap_idx    = cpu_addr[5:2];
    cmap_color  = cpu_wdata[23:0];

    le_reg_we   = cpu_we && in_le_pts;
    le_reg_sel  = le_reg_e'(cpu_addr[3:2]);
    le_reg_trig = cpu_addr[4];
    le_color_we = cpu_we && is_color;
    le_wdata    = cpu_wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cpu_rdata <= '0;
    end else if (cpu_re) begin
      cpu_rdata <= is_status ? {31'b0, le_ready} : '0;
    end
  end

  // A store is a store: the CPU never loads and stores in the same cycle.
  a_no_rw: assert property (@(posedge clk) disable iff (rst) !(cpu_we && cpu_re));

endmodule

// video_subsystem_top: memory-mapped framebuffer video subsystem with a
// hardware line-drawing engine.
//
// The CPU sees the screen as memory: a store into the framebuffer window
// sets one pixel, and no handshake with the display is needed because an
// independent process, the video interface, re-reads the whole framebuffer
// in scan-line order at the display rate and streams it, with sync and data
// enable, to the DVI transmitter. For 2-D acceleration the CPU can instead
// hand two end points and a colour to the line engine, which draws the line
// itself at up to one pixel per cycle. The framebuffer has a single write
// port, shared by the CPU and the line engine; the CPU has priority and the
// engine stalls during CPU stores.
//
//   CPU bus --> cpu_mmio --+--> fb_write_arbiter --> framebuffer --> video_interface --> DVI
//                          |          ^                                    |
//                          +--> line_engine                               (color map,
//                          +--> color_map ------------------------------>  4-bit mode)
//
// Parameters: H_ACTIVE x V_ACTIVE visible pixels, blanking and sync widths,
// PIX_W bits per framebuffer pixel. With PIX_W = 24 (the default) the pixel
// is {Red[7:0], Green[7:0], Blue[7:0]} and goes straight to the video
// output. With PIX_W = 16 it is {Red[4:0], Green[5:0], Blue[4:0]}, widened
// to 24 bits by repeating the top bits of each colour (the 800 x 600
// configuration). With PIX_W = 4 each pixel is an index into the 16-entry
// colour map (the block-RAM-sized configuration). The colour map is on the
// bus in every case. The widening rule is this design's choice.
//
// Interface
//   cpu_addr/cpu_wdata/cpu_we/cpu_re/cpu_rdata : word load/store port of the
//       CPU (rdata one cycle after a load)
//   vid_data/vid_de/vid_hsync_n/vid_vsync_n     : pixel stream to the DVI
//       transmitter (24-bit parallel, one pixel per clock)
//   frame_start, le_ready, le_stall             : status for observation
//
// Everything runs on one clock, which is also the pixel clock. The DRAM and
// its controller, and the transmitter chip, are outside this design: an
// on-chip dual-port memory stands for the framebuffer store.
module video_subsystem_top
  import video_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 1024,
  parameter int unsigned H_FP     = 24,
  parameter int unsigned H_SYNC   = 136,
  parameter int unsigned H_BP     = 160,
  parameter int unsigned V_ACTIVE = 768,
  parameter int unsigned V_FP     = 3,
  parameter int unsigned V_SYNC   = 6,
  parameter int unsigned V_BP     = 29,
  parameter int unsigned PIX_W    = 24
) (
  input  logic        clk,
  input  logic        rst,
  // CPU port
  input  logic [31:0] cpu_addr,
  input  logic [31:0] cpu_wdata,
  input  logic        cpu_we,
  input  logic        cpu_re,
  output logic [31:0] cpu_rdata,
  // to the DVI transmitter
  output logic [23:0] vid_data,
  output logic        vid_de,
  output logic        vid_hsync_n,
  output logic        vid_vsync_n,
  output logic        frame_start,
  // status
  output logic        le_ready,
  output logic        le_stall
);

  // bus decode outputs
  logic             mm_fb_we;
  coord_t           mm_fb_x, mm_fb_y;
  logic [PIX_W-1:0] mm_fb_data;
  logic             cmap_we;
  logic [3:0]       cmap_idx;
  logic [23:0]      cmap_wcolor;
  logic             le_reg_we, le_reg_trig, le_color_we;
  le_reg_e          le_reg_sel;
  logic [31:0]      le_wdata;

  // line engine requests
  logic             le_valid, le_grant;
  coord_t           le_x, le_y;
  logic [PIX_W-1:0] le_color;

  // framebuffer ports
  logic             fb_we, fb_re;
  coord_t           fb_wx, fb_wy, fb_rx, fb_ry;
  logic [PIX_W-1:0] fb_wdata, fb_rdata, scan_pixel;
  logic             scan_de;
  logic [23:0]      cmap_rcolor;

  cpu_mmio #(.PIX_W(PIX_W)) u_mmio (
    .clk, .rst,
    .cpu_addr, .cpu_wdata, .cpu_we, .cpu_re, .cpu_rdata,
    .fb_we(mm_fb_we), .fb_x(mm_fb_x), .fb_y(mm_fb_y), .fb_data(mm_fb_data),
    .cmap_we, .cmap_idx, .cmap_color(cmap_wcolor),
    .le_reg_we, .le_reg_sel, .le_reg_trig, .le_color_we, .le_wdata,
    .le_ready
  );

  line_engine #(.PIX_W(PIX_W)) u_line (
    .clk, .rst,
    .reg_we(le_reg_we), .reg_sel(le_reg_sel), .reg_trig(le_reg_trig),
    .color_we(le_color_we), .wdata(le_wdata), .ready(le_ready),
    .px_valid(le_valid), .px_grant(le_grant),
    .px_x(le_x), .px_y(le_y), .px_color(le_color)
  );

  fb_write_arbiter #(.PIX_W(PIX_W)) u_arb (
    .clk, .rst,
    .cpu_we(mm_fb_we), .cpu_x(mm_fb_x), .cpu_y(mm_fb_y), .cpu_data(mm_fb_data),
    .le_valid, .le_x, .le_y, .le_data(le_color),
    .le_grant, .le_stall,
    .fb_we, .fb_x(fb_wx), .fb_y(fb_wy), .fb_data(fb_wdata)
  );

  framebuffer #(.H_ACTIVE(H_ACTIVE), .V_ACTIVE(V_ACTIVE), .PIX_W(PIX_W)) u_fb (
    .clk,
    .wr_en(fb_we), .wr_x(fb_wx), .wr_y(fb_wy), .wr_data(fb_wdata),
    .rd_en(fb_re), .rd_x(fb_rx), .rd_y(fb_ry), .rd_data(fb_rdata)
  );

  video_interface #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP),
    .PIX_W(PIX_W)
  ) u_vid (
    .clk, .rst,
    .fb_rd_en(fb_re), .fb_rd_x(fb_rx), .fb_rd_y(fb_ry), .fb_rd_data(fb_rdata),
    .vid_data(scan_pixel), .vid_de(scan_de),
    .vid_hsync_n, .vid_vsync_n, .frame_start
  );

  color_map u_cmap (
    .clk, .rst,
    .wr_en(cmap_we), .wr_idx(cmap_idx), .wr_color(cmap_wcolor),
    .rd_idx(4'(scan_pixel)), .rd_color(cmap_rcolor)
  );

  // Full-colour pixels go straight out; 5-6-5 pixels are widened to 8 bits
  // per colour by repeating their top bits; 4-bit pixels pass through the
  // colour map.
  if (PIX_W >= 24) begin : g_rgb888
    assign vid_data = scan_pixel[23:0];
  end else if (PIX_W == 16) begin : g_rgb565
    logic [4:0] r5, b5;
    logic [5:0] g6;
    assign {r5, g6, b5} = scan_pixel[15:0];
    assign vid_data     = {r5, r5[4:2], g6, g6[5:4], b5, b5[4:2]};
  end else begin : g_indexed
    assign vid_data = scan_de ? cmap_rcolor : 24'h0;
  end
  assign vid_de = scan_de;

endmodule

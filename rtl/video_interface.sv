// video_interface: scan-out of the framebuffer to the video transmitter.
//
// A pair of counters walks every pixel position of the video frame,
// including the blanking intervals, one position per clock. While the
// position is inside the visible area the block reads that pixel from the
// framebuffer; the framebuffer returns it one cycle later, so the sync and
// data-enable signals derived from the counters are delayed by one register
// stage to line up with the pixel. The CPU never has to synchronise with
// this process: it simply writes memory while the frame is re-read at the
// display rate.
//
// Interface
//   fb_rd_en/fb_rd_x/fb_rd_y : read request to the framebuffer read port
//   fb_rd_data               : pixel returned one cycle after the request
//   vid_data                 : pixel value, zero outside the visible area
//   vid_de                   : data enable, high for visible pixels
//   vid_hsync_n/vid_vsync_n  : horizontal and vertical sync, active low
//   frame_start              : one-cycle pulse with the first visible pixel
//
// Timing: outputs change one clock after the counters; a frame is
// (H_ACTIVE+H_FP+H_SYNC+H_BP) x (V_ACTIVE+V_FP+V_SYNC+V_BP) clocks.
//
// From the document: visible size, scan-line order, pixels and control
// signals streamed to the physical device. Own choices: the blanking and
// sync widths and polarities (standard 1024x768 at 60 Hz, 65 MHz pixel
// clock), and running the block on the same clock as the framebuffer.
module video_interface
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
  input  logic             clk,
  input  logic             rst,
  output logic             fb_rd_en,
  output coord_t           fb_rd_x,
  output coord_t           fb_rd_y,
  input  logic [PIX_W-1:0] fb_rd_data,
  output logic [PIX_W-1:0] vid_data,
  output logic             vid_de,
  output logic             vid_hsync_n,
  output logic             vid_vsync_n,
  output logic             frame_start
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  coord_t hc, vc;
  logic   active, hsync, vsync, first;

  always_ff @(posedge clk) begin
    if (rst) begin
      hc <= '0;
      vc <= '0;
    end else if (32'(hc) == H_TOTAL - 1) begin
      hc <= '0;
      vc <= (32'(vc) == V_TOTAL - 1) ? '0 : vc + 1'b1;
    end else begin
      hc <= hc + 1'b1;
    end
  end

  always_comb begin
    active   = (32'(hc) < H_ACTIVE) && (32'(vc) < V_ACTIVE);
    hsync    = (32'(hc) >= H_ACTIVE + H_FP) && (32'(hc) < H_ACTIVE + H_FP + H_SYNC);
    vsync    = (32'(vc) >= V_ACTIVE + V_FP) && (32'(vc) < V_ACTIVE + V_FP + V_SYNC);
    first    = (hc == '0) && (vc == '0);
    fb_rd_en = active;
    fb_rd_x  = hc;
    fb_rd_y  = vc;
  end

  // align control with the pixel coming back from the framebuffer
  always_ff @(posedge clk) begin
    if (rst) begin
      vid_de      <= 1'b0;
      vid_hsync_n <= 1'b1;
      vid_vsync_n <= 1'b1;
      frame_start <= 1'b0;
    end else begin
      vid_de      <= active;
      vid_hsync_n <= !hsync;
      vid_vsync_n <= !vsync;
      frame_start <= first;
    end
  end

  assign vid_data = vid_de ? fb_rd_data : '0;

endmodule

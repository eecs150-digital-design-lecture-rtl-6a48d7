// tb_video_interface: self-checking test of the scan-out block at a reduced
// frame (8 x 5 visible pixels, short blanking). A behavioural framebuffer in
// the testbench answers reads one cycle later with a pixel value computed
// from its coordinates. Over three frames the test checks that the visible
// pixels arrive in scan-line order with the right values, that each frame
// has H x V enabled pixels, the frame period, the width of the sync pulses
// and their place relative to the visible area, and that no pixel is driven
// outside the visible area.
`timescale 1ns/1ps
module tb_video_interface;
  import video_pkg::*;

  localparam int HA = 8, HF = 2, HS = 3, HB = 1;
  localparam int VA = 5, VF = 1, VS = 2, VB = 1;
  localparam int HT = HA + HF + HS + HB, VT = VA + VF + VS + VB;

  logic        clk = 0, rst = 1;
  logic        fb_rd_en;
  coord_t      fb_rd_x, fb_rd_y;
  logic [23:0] fb_rd_data;
  logic [23:0] vid_data;
  logic        vid_de, vid_hsync_n, vid_vsync_n, frame_start;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  video_interface #(
    .H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
    .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB), .PIX_W(24)
  ) dut (.*);

  function automatic logic [23:0] pix(int x, int y);
    return 24'((y << 12) | (x << 4) | 4'h5);
  endfunction

  // behavioural framebuffer read port, one cycle of latency
  always_ff @(posedge clk)
    if (fb_rd_en) fb_rd_data <= pix(fb_rd_x, fb_rd_y);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y, frames, de_cnt, cyc, last_start, hs_len, line_cyc, vs_cnt;
    int hs_first_pos;
    bit hs_prev;
    fb_rd_data = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    x = 0; y = 0; frames = 0; de_cnt = 0; cyc = 0; last_start = -1;
    hs_len = 0; line_cyc = 0; vs_cnt = 0; hs_prev = 1; hs_first_pos = -1;
    while (frames < 3) begin
      @(posedge clk);
      #1;
      cyc++;
      if (frame_start) begin
        if (last_start >= 0) begin
          checks++;
          if (cyc - last_start != HT * VT) begin
            failures++; $display("frame period %0d, expected %0d", cyc - last_start, HT * VT);
          end
          checks++;
          if (de_cnt != HA * VA) begin
            failures++; $display("frame had %0d visible pixels", de_cnt);
          end
          checks++;
          if (vs_cnt != VS * HT) begin
            failures++; $display("vsync low for %0d cycles, expected %0d", vs_cnt, VS * HT);
          end
          frames++;
        end
        last_start = cyc; de_cnt = 0; x = 0; y = 0; vs_cnt = 0; line_cyc = 0;
        checks++;
        if (!vid_de) begin failures++; $display("frame_start without data enable"); end
      end
      if (last_start < 0) continue;
      // visible pixels, in scan-line order
      if (vid_de) begin
        checks++;
        if (vid_data !== pix(x, y)) begin
          failures++; $display("pixel (%0d,%0d) = %h expected %h", x, y, vid_data, pix(x, y));
        end
        de_cnt++;
        x++;
        if (x == HA) begin x = 0; y++; end
      end else if (vid_data !== '0) begin
        failures++; $display("data driven in blanking");
      end
      // horizontal sync: HS cycles long, starting HF cycles after the line
      if (!vid_hsync_n) hs_len++;
      if (hs_prev == 0 && vid_hsync_n == 1) begin
        checks++;
        if (hs_len != HS) begin failures++; $display("hsync %0d cycles", hs_len); end
        hs_len = 0;
      end
      if (hs_prev == 1 && vid_hsync_n == 0 && hs_first_pos < 0)
        hs_first_pos = (cyc - last_start) % HT;
      hs_prev = vid_hsync_n;
      if (!vid_vsync_n) vs_cnt++;
      if (!vid_vsync_n && vid_de) begin failures++; $display("vsync during visible data"); end
    end
    checks++;
    if (hs_first_pos != HA + HF) begin
      failures++; $display("hsync starts %0d cycles into the line, expected %0d", hs_first_pos, HA + HF);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

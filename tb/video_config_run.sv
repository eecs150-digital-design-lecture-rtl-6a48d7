// video_config_run: one complete run of the video subsystem in a given
// configuration, for the configuration testbench. It plays the CPU on its
// own copy of the subsystem: loads the colour map, clears the screen with
// one store per cycle, sets pixels, draws lines with the engine (one of
// them while the CPU keeps storing, so that the engine stalls), then
// captures one frame from the video output and compares every visible
// pixel with a reference image. The expected output colour depends on the
// pixel format: 24-bit pixels directly, 16-bit 5-6-5 pixels widened by
// the scale factors 33/4 and 65/16 (maximum to 255), 4-bit pixels through the palette. Results come out on the ports
// when done rises.
`timescale 1ns/1ps
module video_config_run
  import line_ref_pkg::*;
#(
  parameter string NAME = "config",
  parameter int H = 32, parameter int V = 24,
  parameter int HF = 2, parameter int HS = 4, parameter int HB = 2,
  parameter int VF = 1, parameter int VS = 2, parameter int VB = 1,
  parameter int PIX_W = 24
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);

  logic        rst = 1;
  logic [31:0] cpu_addr = '0, cpu_wdata = '0;
  logic        cpu_we = 0, cpu_re = 0;
  logic [31:0] rdata24;
  logic [23:0] vd24;
  logic        de24, hs24, vs24, fs24, rdy24, st24;

  logic [31:0] ref_img [V][H];
  logic [23:0] ref_pal [16];
  int          n_stall = 0, n_trig = 0, n_plain = 0, n_busy_read = 0, n_drop = 0;
  int          n_steep = 0, n_reverse = 0;

  initial begin
    done = 0; checks = 0; failures = 0;
  end

  video_subsystem_top #(
    .H_ACTIVE(H), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
    .V_ACTIVE(V), .V_FP(VF), .V_SYNC(VS), .V_BP(VB), .PIX_W(PIX_W)
  ) dut (
    .clk, .rst, .cpu_addr, .cpu_wdata, .cpu_we, .cpu_re, .cpu_rdata(rdata24),
    .vid_data(vd24), .vid_de(de24), .vid_hsync_n(hs24), .vid_vsync_n(vs24),
    .frame_start(fs24), .le_ready(rdy24), .le_stall(st24)
  );

  always @(posedge clk) if (st24) n_stall++;

  function automatic logic [23:0] expected(logic [31:0] p);
    int r, g, b;
    if (PIX_W >= 24) return p[23:0];
    if (PIX_W == 4)  return ref_pal[p[3:0]];
    r = int'(p[15:11]); g = int'(p[10:5]); b = int'(p[4:0]);
    r = (r * 33) / 4; g = (g * 65) / 16; b = (b * 33) / 4;   // 31 -> 255, 63 -> 255
    return {8'(r), 8'(g), 8'(b)};
  endfunction

  // ---------------------------------------------------------------- CPU
  task automatic store(logic [31:0] a, logic [31:0] d);
    int x, y;
    @(negedge clk);
    cpu_addr = a; cpu_wdata = d; cpu_we = 1; cpu_re = 0;
    if (a[31:6] == 26'h201_0000) ref_pal[a[5:2]] = d[23:0];
    if (a[31:22] == 10'h200) begin
      y = int'(a[21:12]); x = int'(a[11:2]);
      if (x < H && y < V) ref_img[y][x] = d;
      else n_drop++;
    end
    @(negedge clk);
    cpu_we = 0;
  endtask

  function automatic logic [31:0] fb_addr(int x, int y);
    return 32'h8000_0000 + 32'(y * 4096 + x * 4);
  endfunction

  task automatic load_status(output logic r24, output logic r4);
    @(negedge clk);
    cpu_addr = 32'h8040_0064; cpu_re = 1; cpu_we = 0;
    @(negedge clk);
    cpu_re = 0;
    r24 = rdata24[0];
    r4  = r24;
    checks++;
    if (rdata24[31:1] != 0) begin failures++; $display("status word"); end
  endtask

  // Draw a line with the engine. If cpu_noise is set, the CPU stores
  // pixels in the bottom row on every other cycle while the line is drawn.
  task automatic draw(int x0, int y0, int x1, int y1, logic [31:0] color,
                      bit cpu_noise, int trig_reg);
    int px[$], py[$];
    logic r24, r4;
    int polls, nx;
    line_pixels(x0, y0, x1, y1, px, py);
    if (iabs(y1 - y0) > iabs(x1 - x0)) n_steep++;
    if ((iabs(y1 - y0) > iabs(x1 - x0)) ? (y0 > y1) : (x0 > x1)) n_reverse++;
    store(32'h8040_0060, color);
    // plain writes for three coordinates, trigger write for the fourth
    for (int r = 0; r < 4; r++) begin
      int v;
      v = (r == 0) ? x0 : (r == 1) ? y0 : (r == 2) ? x1 : y1;
      if (r != trig_reg) begin
        store(32'h8040_0040 + 32'(4 * r), 32'(v));
        n_plain++;
      end
    end
    load_status(r24, r4);
    checks++;
    if (!r24) begin failures++; $display("plain register write started the engine"); end
    begin
      int v;
      v = (trig_reg == 0) ? x0 : (trig_reg == 1) ? y0 : (trig_reg == 2) ? x1 : y1;
      store(32'h8040_0050 + 32'(4 * trig_reg), 32'(v));
      n_trig++;
    end
    polls = 0; nx = 0;
    do begin
      if (cpu_noise) begin
        store(fb_addr(nx % H, V - 1), 32'h00c0ffee ^ 32'(nx * 7));
        nx++;
      end
      load_status(r24, r4);
      if (!r24) n_busy_read++;
      polls++;
    end while (!r24 && polls < 5000);
    for (int i = 0; i < px.size(); i++)
      if (px[i] < H && py[i] < V) ref_img[py[i]][px[i]] = color;
  endtask

  // ------------------------------------------------------------- frame
  task automatic check_frame();
    int x, y, bad, t0, t1;
    logic [23:0] e24;
    bad = 0;
    do begin @(posedge clk); #1; end while (!fs24);
    t0 = $time / 10;
    x = 0; y = 0;
    while (y < V) begin
      checks++;
      e24 = expected(ref_img[y][x]);
      if (de24 !== 1'b1 || vd24 !== e24) begin
        failures++;
        if (bad++ < 10) $display("%s: pixel (%0d,%0d) = %h de=%b, expected %h", NAME, x, y, vd24, de24, e24);
      end
      x++;
      if (x == H) begin
        x = 0; y++;
        if (y < V) do begin @(posedge clk); #1; end while (!de24);
      end else begin
        @(posedge clk); #1;
      end
    end
    do begin @(posedge clk); #1; end while (!fs24);
    t1 = $time / 10;
    checks++;
    if (t1 - t0 != (H + HF + HS + HB) * (V + VF + VS + VB)) begin
      failures++; $display("frame period %0d cycles", t1 - t0);
    end
  endtask

  initial begin
    foreach (ref_pal[i]) ref_pal[i] = '0;
    repeat (4) @(negedge clk);
    rst = 0;

    for (int i = 0; i < 16; i++)
      store(32'h8040_0000 + 32'(4 * i), 32'($urandom));

    for (int y = 0; y < V; y++)
      for (int x = 0; x < H; x++) begin
        @(negedge clk);
        cpu_addr = fb_addr(x, y); cpu_wdata = 32'h0020_4a63; cpu_we = 1;
        ref_img[y][x] = 32'h0020_4a63;
      end
    @(negedge clk);
    cpu_we = 0;

    store(fb_addr(0, 0), 32'h00ff_f801);
    store(fb_addr(H - 1, V - 1), 32'h0000_07e2);
    store(fb_addr(5, V), 32'h0000_00ff);            // row without memory

    draw(0, 0, H - 1, V - 1, 32'h00ff_ffff, 0, 3);
    draw(1, 1, 11, 5, 32'h00ff_a0f4, 0, 2);
    draw(H - 20, V - 30, 10, 20, 32'h0011_2235, 1, 0);
    draw(H - 100, 10, H - 120, V - 8, 32'h0044_5566, 0, 1);
    draw(100, V - 28, H - 24, V - 28, 32'h0077_8899, 1, 3);

    check_frame();

    checks++; if (n_stall == 0)     begin failures++; $display("%s: no engine stall", NAME); end
    checks++; if (n_busy_read == 0) begin failures++; $display("%s: busy status never read", NAME); end
    checks++; if (n_drop == 0)      begin failures++; $display("%s: no dropped store", NAME); end
    checks++; if (n_steep == 0)     begin failures++; $display("%s: no steep line", NAME); end
    checks++; if (n_reverse == 0)   begin failures++; $display("%s: no reversed line", NAME); end
    $display("%s: %0d x %0d, %0d bits/pixel: stalls=%0d triggers=%0d busy_reads=%0d",
             NAME, H, V, PIX_W, n_stall, n_trig, n_busy_read);
    done = 1;
  end

endmodule

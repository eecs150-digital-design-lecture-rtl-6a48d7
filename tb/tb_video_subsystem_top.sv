// tb_video_subsystem_top: end-to-end test of the video subsystem at a
// reduced screen (32 x 24 pixels, short blanking).
//
// Three copies of the subsystem share one CPU bus: a full-colour one
// (24-bit pixels), a 5-6-5 one (16-bit pixels widened to 24 bits) and a
// colour-map one (4-bit pixels looked up in the 16-entry palette). The CPU program, played by the testbench, clears the screen with
// stores, sets single pixels (one of them outside the visible area), loads
// the palette, and draws lines with the line engine: plain register writes
// followed by a trigger write, ready polled through the status register,
// lines in every direction, shallow and steep. During one long line the CPU
// keeps storing pixels, so the engine must stall. A reference image built
// from the stores and a software Bresenham model is then compared with a
// whole frame captured from each copy's video output. The engine's rate of
// one pixel per cycle is checked on an undisturbed line, and every mechanism
// (stall, trigger, non-trigger write, busy status, dropped store, steep and
// reversed line, palette lookup) must have happened at least once.
`timescale 1ns/1ps
module tb_video_subsystem_top;
  import line_ref_pkg::*;

  localparam int H = 32, V = 24;
  localparam int HF = 2, HS = 4, HB = 2, VF = 1, VS = 2, VB = 1;

  logic        clk = 0, rst = 1;
  logic [31:0] cpu_addr = '0, cpu_wdata = '0;
  logic        cpu_we = 0, cpu_re = 0;
  logic [31:0] rdata24, rdata4, rdata16;
  logic [23:0] vd24, vd4, vd16;
  logic        de24, de4, hs24, hs4, vs24, vs4, fs24, fs4, rdy24, rdy4, st24, st4;
  logic        de16, hs16, vs16, fs16, rdy16, st16;

  logic [31:0] ref_img [V][H];
  logic [23:0] ref_pal [16];
  int          checks = 0, failures = 0;
  int          n_stall = 0, n_trig = 0, n_plain = 0, n_busy_read = 0, n_drop = 0;
  int          n_steep = 0, n_reverse = 0, n_palette = 0;

  always #5 clk = ~clk;

  video_subsystem_top #(
    .H_ACTIVE(H), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
    .V_ACTIVE(V), .V_FP(VF), .V_SYNC(VS), .V_BP(VB), .PIX_W(24)
  ) u24 (
    .clk, .rst, .cpu_addr, .cpu_wdata, .cpu_we, .cpu_re, .cpu_rdata(rdata24),
    .vid_data(vd24), .vid_de(de24), .vid_hsync_n(hs24), .vid_vsync_n(vs24),
    .frame_start(fs24), .le_ready(rdy24), .le_stall(st24)
  );

  video_subsystem_top #(
    .H_ACTIVE(H), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
    .V_ACTIVE(V), .V_FP(VF), .V_SYNC(VS), .V_BP(VB), .PIX_W(4)
  ) u4 (
    .clk, .rst, .cpu_addr, .cpu_wdata, .cpu_we, .cpu_re, .cpu_rdata(rdata4),
    .vid_data(vd4), .vid_de(de4), .vid_hsync_n(hs4), .vid_vsync_n(vs4),
    .frame_start(fs4), .le_ready(rdy4), .le_stall(st4)
  );

  video_subsystem_top #(
    .H_ACTIVE(H), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
    .V_ACTIVE(V), .V_FP(VF), .V_SYNC(VS), .V_BP(VB), .PIX_W(16)
  ) u16 (
    .clk, .rst, .cpu_addr, .cpu_wdata, .cpu_we, .cpu_re, .cpu_rdata(rdata16),
    .vid_data(vd16), .vid_de(de16), .vid_hsync_n(hs16), .vid_vsync_n(vs16),
    .frame_start(fs16), .le_ready(rdy16), .le_stall(st16)
  );

  always @(posedge clk) if (st24) n_stall++;

  // 5-6-5 to 8-8-8 by value: 5-bit fields scaled by 33/4 and the 6-bit
  // field by 65/16, rounded down, so that full scale maps to 255
  function automatic logic [23:0] widen565(logic [15:0] p);
    int r, g, b;
    r = int'(p[15:11]); g = int'(p[10:5]); b = int'(p[4:0]);
    r = (r * 33) / 4;
    g = (g * 65) / 16;
    b = (b * 33) / 4;
    return {8'(r), 8'(g), 8'(b)};
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- CPU
  task automatic store(logic [31:0] a, logic [31:0] d);
    int x, y;
    @(negedge clk);
    cpu_addr = a; cpu_wdata = d; cpu_we = 1; cpu_re = 0;
    if (a[31:22] == 10'h200) begin
      y = int'(a[21:12]); x = int'(a[11:2]);
      if (x < H && y < V) ref_img[y][x] = d;
      else n_drop++;
    end
    if (a[31:6] == 26'h201_0000) ref_pal[a[5:2]] = d[23:0];
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
    r4  = rdata4[0];
    checks++;
    if (rdata24[31:1] != 0 || r24 != r4) begin failures++; $display("status word"); end
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
        store(fb_addr(nx % H, V - 1), 32'h00c0ffee ^ 32'(nx));
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
    int x, y;
    logic [23:0] e24, e4, e16;
    do begin @(posedge clk); #1; end while (!fs24);
    x = 0; y = 0;
    while (y < V) begin
      checks++;
      if (de24 !== 1'b1 || de4 !== 1'b1 || de16 !== 1'b1) begin
        failures++; $display("data enable low at (%0d,%0d)", x, y);
      end
      e24 = ref_img[y][x][23:0];
      e4  = ref_pal[ref_img[y][x][3:0]];
      e16 = widen565(ref_img[y][x][15:0]);
      if (vd16 !== e16) begin
        failures++; $display("5-6-5 pixel (%0d,%0d) = %h, expected %h", x, y, vd16, e16);
      end
      if (vd24 !== e24) begin
        failures++; $display("24-bit pixel (%0d,%0d) = %h, expected %h", x, y, vd24, e24);
      end
      if (vd4 !== e4) begin
        failures++; $display("palette pixel (%0d,%0d) = %h, expected %h", x, y, vd4, e4);
      end
      n_palette++;
      x++;
      if (x == H) begin
        x = 0; y++;
        if (y < V) do begin @(posedge clk); #1; end while (!de24);
        else break;
      end else begin
        @(posedge clk); #1;
      end
    end
  endtask

  initial begin
    logic r24, r4;
    int t0, t1, n;
    int px[$], py[$];
    foreach (ref_pal[i]) ref_pal[i] = '0;
    repeat (4) @(negedge clk);
    rst = 0;

    // palette: 16 distinct colours
    for (int i = 0; i < 16; i++)
      store(32'h8040_0000 + 32'(4 * i), 32'(24'h10_0000 * i + 24'h00_0101 * (15 - i) + 24'h7));

    // clear the screen
    for (int y = 0; y < V; y++)
      for (int x = 0; x < H; x++)
        store(fb_addr(x, y), 32'h0000_8412);

    // single pixels, and stores outside the visible area
    store(fb_addr(0, 0), 32'h00ff_0003);
    store(fb_addr(H - 1, V - 2), 32'h0000_ff04);
    store(fb_addr(3, V), 32'h0000_0005);
    store(fb_addr(H, 2), 32'h0000_0006);

    // one-pixel-per-cycle check on an undisturbed horizontal line
    line_pixels(2, 5, 29, 5, px, py);
    store(32'h8040_0060, 32'h0000_0009);
    store(32'h8040_0040, 2); store(32'h8040_0044, 5); store(32'h8040_0048, 29);
    @(negedge clk);
    cpu_addr = 32'h8040_005C; cpu_wdata = 5; cpu_we = 1;
    @(posedge clk);
    t0 = $time / 10;
    #1;
    @(negedge clk);
    cpu_we = 0;
    @(posedge clk iff rdy24);
    t1 = $time / 10;
    n = px.size();
    checks++;
    if (t1 - t0 != n + 2) begin
      failures++; $display("engine took %0d cycles for %0d pixels, expected %0d", t1 - t0, n, n + 2);
    end
    foreach (px[i]) ref_img[py[i]][px[i]] = 32'h9;
    n_trig++;

    // the worked example, lines in all octants, with CPU stores during one
    draw(1, 1, 11, 5, 32'h0012_f3ea, 0, 3);
    draw(30, 2, 0, 20, 32'h0034_07eb, 1, 0);    // long, reversed, CPU busy
    draw(4, 22, 9, 0, 32'h0056_a85c, 0, 1);     // steep, upwards
    draw(20, 0, 24, 22, 32'h0078_ffed, 0, 2);   // steep, downwards
    draw(31, 22, 0, 22, 32'h0000_000e, 1, 3);   // horizontal, reversed, CPU busy
    draw(7, 7, 7, 7, 32'h0000_000f, 0, 2);      // single point
    draw(40, 3, 10, 3, 32'h0000_0001, 0, 0);    // partly off screen

    check_frame();

    // mechanisms that must have happened
    checks++; if (n_stall == 0)     begin failures++; $display("no engine stall"); end
    checks++; if (n_trig < 8)       begin failures++; $display("too few triggers"); end
    checks++; if (n_plain == 0)     begin failures++; $display("no plain register write"); end
    checks++; if (n_busy_read == 0) begin failures++; $display("busy status never read"); end
    checks++; if (n_drop == 0)      begin failures++; $display("no dropped store"); end
    checks++; if (n_steep == 0)     begin failures++; $display("no steep line"); end
    checks++; if (n_reverse == 0)   begin failures++; $display("no reversed line"); end
    checks++; if (n_palette == 0)   begin failures++; $display("no palette lookup"); end
    $display("stalls=%0d triggers=%0d plain=%0d busy_reads=%0d dropped=%0d steep=%0d reversed=%0d lookups=%0d",
             n_stall, n_trig, n_plain, n_busy_read, n_drop, n_steep, n_reverse, n_palette);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_video_subsystem_full: end-to-end test of the video subsystem at its
// full size (1024 x 768 pixels, 24 bits per pixel, standard 1024x768 frame
// timing), with every parameter at its default.
//
// The testbench plays the CPU: it clears the whole screen with one store
// per cycle (786,432 stores) and reports how many cycles that took, sets a
// few pixels (and stores into mapped rows that have no memory behind them),
// and draws lines with the line engine: the full screen diagonal, the
// worked example from (1,1) to (11,5), steep and reversed lines, and a long
// line during which the CPU keeps storing pixels so that the engine stalls.
// A complete video frame is then captured from the video output and every
// visible pixel is compared with a reference image built from the stores
// and a software Bresenham model. The frame period is checked too.
`timescale 1ns/1ps
module tb_video_subsystem_full;
  import line_ref_pkg::*;

  localparam int H = 1024, V = 768;
  localparam int H_TOTAL = 1344, V_TOTAL = 806;

  logic        clk = 0, rst = 1;
  logic [31:0] cpu_addr = '0, cpu_wdata = '0;
  logic        cpu_we = 0, cpu_re = 0;
  logic [31:0] rdata24;
  logic [23:0] vd24;
  logic        de24, hs24, vs24, fs24, rdy24, st24;

  logic [31:0] ref_img [V][H];
  int          checks = 0, failures = 0;
  int          n_stall = 0, n_trig = 0, n_plain = 0, n_busy_read = 0, n_drop = 0;
  int          n_steep = 0, n_reverse = 0;

  always #5 clk = ~clk;

  video_subsystem_top u24 (
    .clk, .rst, .cpu_addr, .cpu_wdata, .cpu_we, .cpu_re, .cpu_rdata(rdata24),
    .vid_data(vd24), .vid_de(de24), .vid_hsync_n(hs24), .vid_vsync_n(vs24),
    .frame_start(fs24), .le_ready(rdy24), .le_stall(st24)
  );

  always @(posedge clk) if (st24) n_stall++;

  initial begin
    repeat (8000000) @(posedge clk);
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
    int x, y, bad, t0, t1;
    logic [23:0] e24;
    bad = 0;
    do begin @(posedge clk); #1; end while (!fs24);
    t0 = $time / 10;
    x = 0; y = 0;
    while (y < V) begin
      checks++;
      e24 = ref_img[y][x][23:0];
      if (de24 !== 1'b1 || vd24 !== e24) begin
        failures++;
        if (bad++ < 10) $display("pixel (%0d,%0d) = %h de=%b, expected %h", x, y, vd24, de24, e24);
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
    if (t1 - t0 != H_TOTAL * V_TOTAL) begin
      failures++; $display("frame period %0d cycles", t1 - t0);
    end
  endtask

  initial begin
    int t0, t1;
    repeat (4) @(negedge clk);
    rst = 0;

    // clear the screen: one store per cycle, every pixel
    t0 = $time / 10;
    for (int y = 0; y < V; y++)
      for (int x = 0; x < H; x++) begin
        @(negedge clk);
        cpu_addr = fb_addr(x, y); cpu_wdata = 32'h0020_4060; cpu_we = 1;
        ref_img[y][x] = 32'h0020_4060;
      end
    @(negedge clk);
    cpu_we = 0;
    t1 = $time / 10;
    $display("clear: %0d pixels stored in %0d cycles", H * V, t1 - t0 - 1);

    store(fb_addr(0, 0), 32'h00ff_0000);
    store(fb_addr(H - 1, V - 1), 32'h0000_ff00);
    store(fb_addr(5, V), 32'h0000_00ff);            // row 768: no memory
    store(32'h803F_FFFC, 32'h0000_00ff);            // row 1023: no memory

    draw(0, 0, H - 1, V - 1, 32'h00ff_ffff, 0, 3);  // screen diagonal
    draw(1, 1, 11, 5, 32'h00ff_00ff, 0, 2);          // worked example
    draw(600, 700, 10, 20, 32'h0011_2233, 1, 0);     // reversed, CPU busy
    draw(900, 10, 880, 760, 32'h0044_5566, 0, 1);    // steep
    draw(100, 740, 1000, 740, 32'h0077_8899, 1, 3);  // horizontal, CPU busy

    check_frame();

    checks++; if (n_stall == 0)     begin failures++; $display("no engine stall"); end
    checks++; if (n_trig < 5)       begin failures++; $display("too few triggers"); end
    checks++; if (n_plain == 0)     begin failures++; $display("no plain register write"); end
    checks++; if (n_busy_read == 0) begin failures++; $display("busy status never read"); end
    checks++; if (n_drop == 0)      begin failures++; $display("no dropped store"); end
    checks++; if (n_steep == 0)     begin failures++; $display("no steep line"); end
    checks++; if (n_reverse == 0)   begin failures++; $display("no reversed line"); end
    $display("stalls=%0d triggers=%0d plain=%0d busy_reads=%0d dropped=%0d steep=%0d reversed=%0d",
             n_stall, n_trig, n_plain, n_busy_read, n_drop, n_steep, n_reverse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

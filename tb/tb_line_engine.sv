// tb_line_engine: self-checking test of the Bresenham line engine.
//
// Loads end points through the register interface (plain writes for three
// coordinates, a trigger write for the last), lets the engine draw, and
// compares every granted pixel, in order, with a software Bresenham model
// written from the integer algorithm (any quadrant, any slope). The three
// worked examples of the algorithm are also checked against their pixel
// lists written out by hand. The grant is withheld at random to model CPU
// writes; the number of busy cycles must be deltax + 2 + stalled cycles
// (one setup cycle, one cycle per pixel). A trigger while busy must not
// restart the line, and a colour written during a line must not change it.
`timescale 1ns/1ps
module tb_line_engine;
  import video_pkg::*;

  logic        clk = 0, rst = 1;
  logic        reg_we = 0, reg_trig = 0, color_we = 0;
  le_reg_e     reg_sel = REG_X0;
  logic [31:0] wdata = '0;
  logic        ready, px_valid, px_grant;
  coord_t      px_x, px_y;
  logic [23:0] px_color;
  int          checks = 0, failures = 0;
  int unsigned stall_pct = 0;
  logic        grant_rand;

  always #5 clk = ~clk;

  line_engine #(.PIX_W(24)) dut (
    .clk, .rst, .reg_we, .reg_sel, .reg_trig, .color_we, .wdata, .ready,
    .px_valid, .px_grant, .px_x, .px_y, .px_color
  );

  assign px_grant = px_valid && grant_rand;

  int grants = 0;
  always @(posedge clk) if (px_grant) grants++;

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // reference model: integer Bresenham for any quadrant and slope
  // ------------------------------------------------------------------
  int exp_x[$], exp_y[$];

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic void model(int x0, int y0, int x1, int y1);
    int t, dx, dy, e, ys, y;
    bit steep;
    exp_x.delete();
    exp_y.delete();
    steep = iabs(y1 - y0) > iabs(x1 - x0);
    if (steep) begin
      t = x0; x0 = y0; y0 = t;
      t = x1; x1 = y1; y1 = t;
    end
    if (x0 > x1) begin
      t = x0; x0 = x1; x1 = t;
      t = y0; y0 = y1; y1 = t;
    end
    dx = x1 - x0;
    dy = iabs(y1 - y0);
    e  = dx / 2;
    ys = (y0 < y1) ? 1 : -1;
    y  = y0;
    for (int x = x0; x <= x1; x++) begin
      if (steep) begin exp_x.push_back(y); exp_y.push_back(x); end
      else       begin exp_x.push_back(x); exp_y.push_back(y); end
      e = e - dy;
      if (e < 0) begin
        y = y + ys;
        e = e + dx;
      end
    end
  endfunction

  // ------------------------------------------------------------------
  // bus helpers (drive on the falling edge)
  // ------------------------------------------------------------------
  task automatic wr_reg(le_reg_e sel, bit trig, int unsigned v);
    @(negedge clk);
    reg_we = 1; reg_sel = sel; reg_trig = trig; wdata = v;
    @(negedge clk);
    reg_we = 0; reg_trig = 0;
  endtask

  task automatic wr_color(int unsigned v);
    @(negedge clk);
    color_we = 1; wdata = v;
    @(negedge clk);
    color_we = 0;
  endtask

  // draw one line and check it; returns the pixels seen
  int got_x[$], got_y[$];

  task automatic draw_check(int x0, int y0, int x1, int y1, int unsigned color,
                            bit check_model);
    int busy, stalls, n;
    bit mismatch;
    model(x0, y0, x1, y1);
    got_x.delete(); got_y.delete();
    wr_color(color);
    wr_reg(REG_X0, 0, x0);
    wr_reg(REG_Y0, 0, y0);
    wr_reg(REG_X1, 0, x1);
    // trigger on the y1 register
    @(negedge clk);
    reg_we = 1; reg_sel = REG_Y1; reg_trig = 1; wdata = y1;
    @(negedge clk);
    reg_we = 0; reg_trig = 0;
    busy = 0; stalls = 0;
    while (!ready) begin
      grant_rand = ($urandom_range(99) >= stall_pct);
      #1;
      if (px_valid && !px_grant) stalls++;
      if (px_grant) begin
        got_x.push_back(px_x); got_y.push_back(px_y);
        if (px_color !== color[23:0]) begin
          failures++;
          $display("colour %h expected %h", px_color, color[23:0]);
        end
      end
      busy++;
      @(negedge clk);
      if (busy > 10000) break;
    end
    grant_rand = 1;
    n = exp_x.size();
    checks++;
    if (busy != n + 1 + stalls) begin
      failures++;
      $display("line (%0d,%0d)-(%0d,%0d): busy %0d cycles, expected %0d",
               x0, y0, x1, y1, busy, n + 1 + stalls);
    end
    if (check_model) begin
      checks++;
      mismatch = (got_x.size() != n);
      for (int i = 0; i < n && !mismatch; i++)
        if (got_x[i] != exp_x[i] || got_y[i] != exp_y[i]) mismatch = 1;
      if (mismatch) begin
        failures++;
        $display("line (%0d,%0d)-(%0d,%0d): pixel list differs from model",
                 x0, y0, x1, y1);
      end
    end
  endtask

  task automatic expect_list(string name, int xs[], int ys[]);
    bit bad;
    checks++;
    bad = (got_x.size() != xs.size());
    for (int i = 0; i < xs.size() && !bad; i++)
      if (got_x[i] != xs[i] || got_y[i] != ys[i]) bad = 1;
    if (bad) begin
      failures++;
      $display("%s: pixels differ from the worked example", name);
      foreach (got_x[i]) $display("  got (%0d,%0d)", got_x[i], got_y[i]);
    end
  endtask

  initial begin
    int x0, y0, x1, y1;
    grant_rand = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    checks++;
    if (!ready || px_valid) begin failures++; $display("not idle after reset"); end

    // worked examples (pixel lists from the example grids)
    draw_check(1, 1, 11, 5, 32'h00ff00ff, 1);
    expect_list("(1,1)-(11,5)",
                '{1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11},
                '{1, 1, 2, 2, 3, 3, 3, 4, 4, 5, 5});
    draw_check(1, 1, 10, 2, 32'h0000ff, 1);
    expect_list("(1,1)-(10,2)",
                '{1, 2, 3, 4, 5, 6, 7, 8, 9, 10},
                '{1, 1, 1, 1, 1, 2, 2, 2, 2, 2});
    draw_check(1, 1, 6, 6, 32'h123456, 1);
    expect_list("(1,1)-(6,6)", '{1, 2, 3, 4, 5, 6}, '{1, 2, 3, 4, 5, 6});
    // same line drawn backwards and steep/negative variants
    draw_check(11, 5, 1, 1, 32'h1, 1);
    draw_check(5, 11, 1, 1, 32'h2, 1);
    draw_check(3, 20, 9, 2, 32'h3, 1);
    draw_check(7, 7, 7, 7, 32'h4, 1);
    draw_check(0, 0, 2047, 2047, 32'h5, 1);
    draw_check(2047, 0, 0, 3, 32'h6, 1);

    // random lines, with random stalls
    stall_pct = 30;
    for (int i = 0; i < 300; i++) begin
      int lim;
      lim = (i < 200) ? 64 : 2048;
      x0 = $urandom_range(lim - 1); y0 = $urandom_range(lim - 1);
      x1 = $urandom_range(lim - 1); y1 = $urandom_range(lim - 1);
      draw_check(x0, y0, x1, y1, $urandom, 1);
    end
    stall_pct = 0;

    // trigger while busy is ignored; colour write during a line is not used
    begin
      int cnt;
      wr_color(32'haa);
      wr_reg(REG_X0, 0, 0);
      grants = 0;
      wr_reg(REG_X0, 0, 0); wr_reg(REG_Y0, 0, 0); wr_reg(REG_X1, 0, 40);
      wr_reg(REG_Y1, 1, 0);                  // 41-pixel horizontal line
      wr_color(32'hbb);                       // during the line
      wr_reg(REG_X1, 1, 5);                   // trigger while busy
      while (!ready) begin
        #1;
        if (px_grant && px_color != 24'haa) begin
          failures++; $display("colour changed mid-line");
        end
        @(negedge clk);
      end
      cnt = grants;
      checks++;
      // the line that was started draws all its 41 pixels, once
      if (cnt != 41) begin failures++; $display("busy trigger: %0d pixels counted", cnt); end
      repeat (3) @(negedge clk);
      checks++;
      if (!ready) begin failures++; $display("engine restarted by a busy trigger"); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

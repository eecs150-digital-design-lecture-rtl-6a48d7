// line_engine: hardware Bresenham line drawer, one pixel per cycle.
//
// The CPU loads the end points (x0,y0) and (x1,y1) and a colour into the
// engine's registers. A write to one of the four "trigger" end-point
// addresses stores its value like the plain one and also starts the engine.
// The engine then runs the integer Bresenham algorithm in its general form
// (any quadrant, any slope): lines steeper than 45 degrees are drawn with X
// and Y exchanged, end points are ordered so the major axis counts up, and
// the minor coordinate moves by +1 or -1 each time the error term goes
// negative. No multiply or divide is used: error starts at deltax/2, loses
// deltay per pixel and gains deltax whenever the minor coordinate steps.
//
// Interface
//   reg_we/reg_sel/reg_trig/wdata : end-point register write (sel = x0,y0,x1,y1)
//   color_we/wdata                : 32-bit colour register write
//   ready                         : 1 while idle (the read-only status bit)
//   px_valid/px_x/px_y/px_color   : pixel write request towards the shared
//                                   framebuffer write port
//   px_grant                      : the request was accepted this cycle; when
//                                   low (the CPU is writing) the engine stalls
//
// Timing: a trigger write in cycle t moves the engine to SETUP in t+1, where
// the swaps, deltas and initial error are registered; the first pixel is
// requested in t+2 and then one pixel per granted cycle, deltax+1 pixels in
// all (deltax along the major axis). ready returns high in the cycle after
// the last pixel is granted. A trigger that arrives while the engine is busy
// updates the register but does not restart the line; end points and colour
// are copied at SETUP, so register writes during a line do not disturb it.
//
// Follows the document: register map and 11-bit coordinates, algorithm,
// one-pixel-per-cycle goal, stalling while the CPU writes. Own choices: the
// single SETUP cycle, the ignored trigger while busy, and the colour being
// truncated to the framebuffer's pixel width.
module line_engine
  import video_pkg::*;
#(
  parameter int unsigned PIX_W = 24
) (
  input  logic             clk,
  input  logic             rst,
  // register writes from the processor-side decoder
  input  logic             reg_we,
  input  le_reg_e          reg_sel,
  input  logic             reg_trig,
  input  logic             color_we,
  input  logic [31:0]      wdata,
  output logic             ready,
  // pixel write request
  output logic             px_valid,
  input  logic             px_grant,
  output coord_t           px_x,
  output coord_t           px_y,
  output logic [PIX_W-1:0] px_color
);

  localparam int unsigned ERR_W = COORD_W + 2;
  typedef logic signed [ERR_W-1:0] err_t;

  // programmer-visible registers
  coord_t      r_x0, r_y0, r_x1, r_y1;
  logic [31:0] r_color;

  le_state_e   state;

  // drawing state: (a, b) is (major, minor) coordinate
  coord_t            a, b, a_end;
  err_t              err, deltax, deltay;
  logic              steep, ystep_neg;
  logic [PIX_W-1:0]  draw_color;

  // ---------------------------------------------------------------------
  // Register file
  // ---------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      r_x0    <= '0;
      r_y0    <= '0;
      r_x1    <= '0;
      r_y1    <= '0;
      r_color <= '0;
    end else begin
      if (reg_we) begin
        unique case (reg_sel)
          REG_X0: r_x0 <= wdata[COORD_W-1:0];
          REG_Y0: r_y0 <= wdata[COORD_W-1:0];
          REG_X1: r_x1 <= wdata[COORD_W-1:0];
          REG_Y1: r_y1 <= wdata[COORD_W-1:0];
        endcase
      end
      if (color_we) r_color <= wdata;
    end
  end

  // ---------------------------------------------------------------------
  // Setup arithmetic (combinational, registered in the SETUP cycle)
  // ---------------------------------------------------------------------
  err_t   dx_s, dy_s, dx_abs, dy_abs;
  logic   s_steep, s_swap;
  coord_t p0a, p0b, p1a, p1b;   // end points in (major, minor) order
  coord_t sa0, sb0, sa1, sb1;   // after ordering along the major axis

  always_comb begin
    dx_s    = err_t'(r_x1) - err_t'(r_x0);
    dy_s    = err_t'(r_y1) - err_t'(r_y0);
    dx_abs  = (dx_s < 0) ? -dx_s : dx_s;
    dy_abs  = (dy_s < 0) ? -dy_s : dy_s;
    s_steep = dy_abs > dx_abs;
    p0a     = s_steep ? r_y0 : r_x0;
    p0b     = s_steep ? r_x0 : r_y0;
    p1a     = s_steep ? r_y1 : r_x1;
    p1b     = s_steep ? r_x1 : r_y1;
    s_swap  = p0a > p1a;
    sa0     = s_swap ? p1a : p0a;
    sb0     = s_swap ? p1b : p0b;
    sa1     = s_swap ? p0a : p1a;
    sb1     = s_swap ? p0b : p1b;
  end

  // ---------------------------------------------------------------------
  // Draw step (combinational)
  // ---------------------------------------------------------------------
  err_t   err_dec, err_step;
  coord_t b_step;
  logic   last_px;

  always_comb begin
    err_dec  = err - deltay;
    err_step = err_dec;
    b_step   = b;
    if (err_dec < 0) begin
      b_step   = ystep_neg ? b - 1'b1 : b + 1'b1;
      err_step = err_dec + deltax;
    end
    last_px = (a == a_end);
  end

  // ---------------------------------------------------------------------
  // Control
  // ---------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= LE_IDLE;
      a          <= '0;
      b          <= '0;
      a_end      <= '0;
      err        <= '0;
      deltax     <= '0;
      deltay     <= '0;
      steep      <= 1'b0;
      ystep_neg  <= 1'b0;
      draw_color <= '0;
    end else begin
      unique case (state)
        LE_IDLE: begin
          if (reg_we && reg_trig) state <= LE_SETUP;
        end
        LE_SETUP: begin
          steep      <= s_steep;
          a          <= sa0;
          b          <= sb0;
          a_end      <= sa1;
          deltax     <= err_t'(sa1) - err_t'(sa0);
          deltay     <= (sb1 >= sb0) ? err_t'(sb1) - err_t'(sb0)
                                     : err_t'(sb0) - err_t'(sb1);
          err        <= (err_t'(sa1) - err_t'(sa0)) >>> 1;
          ystep_neg  <= !(sb0 < sb1);
          draw_color <= r_color[PIX_W-1:0];
          state      <= LE_DRAW;
        end
        LE_DRAW: begin
          if (px_grant) begin
            if (last_px) begin
              state <= LE_IDLE;
            end else begin
              a   <= a + 1'b1;
              b   <= b_step;
              err <= err_step;
            end
          end
        end
        default: state <= LE_IDLE;
      endcase
    end
  end

  assign ready    = (state == LE_IDLE);
  assign px_valid = (state == LE_DRAW);
  assign px_x     = steep ? b : a;
  assign px_y     = steep ? a : b;
  assign px_color = draw_color;

  // A grant is only meaningful against a pending request.
  a_grant_needs_valid: assert property (@(posedge clk) disable iff (rst)
    px_grant |-> px_valid);

endmodule

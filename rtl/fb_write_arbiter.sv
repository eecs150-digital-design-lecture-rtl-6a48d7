// fb_write_arbiter: owner selection for the framebuffer's single write port.
//
// Two masters write pixels: the CPU (stores into the framebuffer window) and
// the line engine. The framebuffer has one write port, so the CPU always wins
// and the line engine's request is held (stalled) in any cycle in which the
// CPU stores. The choice is made combinationally in the same cycle; the CPU
// is never held off, so it needs no back-pressure signal.
//
// Interface
//   cpu_we/cpu_x/cpu_y/cpu_data : CPU pixel write (always accepted)
//   le_valid/le_x/le_y/le_data  : line-engine pixel request
//   le_grant                    : line-engine request accepted this cycle
//   fb_we/fb_x/fb_y/fb_data     : the framebuffer write port
//   le_stall                    : line engine wanted the port but lost it
//
// The fixed CPU priority is the document's rule; the single-cycle
// combinational grant is this design's choice.
module fb_write_arbiter
  import video_pkg::*;
#(
  parameter int unsigned PIX_W = 24
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             cpu_we,
  input  coord_t           cpu_x,
  input  coord_t           cpu_y,
  input  logic [PIX_W-1:0] cpu_data,
  input  logic             le_valid,
  input  coord_t           le_x,
  input  coord_t           le_y,
  input  logic [PIX_W-1:0] le_data,
  output logic             le_grant,
  output logic             le_stall,
  output logic             fb_we,
  output coord_t           fb_x,
  output coord_t           fb_y,
  output logic [PIX_W-1:0] fb_data
);

  always_comb begin
    le_grant = le_valid && !cpu_we;
    le_stall = le_valid &&  cpu_we;
    fb_we    = cpu_we || le_valid;
    if (cpu_we) begin
      fb_x    = cpu_x;
      fb_y    = cpu_y;
      fb_data = cpu_data;
    end else begin
      fb_x    = le_x;
      fb_y    = le_y;
      fb_data = le_data;
    end
  end

  // The two masters never own the port in the same cycle.
  a_one_owner: assert property (@(posedge clk) disable iff (rst)
    !(cpu_we && le_grant));

endmodule

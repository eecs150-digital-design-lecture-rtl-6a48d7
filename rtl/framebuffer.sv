// framebuffer: dual-ported pixel memory, one write port and one read port.
//
// Holds H_ACTIVE x V_ACTIVE pixels of PIX_W bits. Pixels are addressed by
// independent X (pixel in row) and Y (row) coordinates, as the processor's
// address map lays every row out on a 4 KB boundary ({Y[9:0], X[9:0]} word
// address). The write port is shared by the CPU and the line engine through
// fb_write_arbiter; the read port belongs to the video interface. Writes
// outside the visible area (X >= H_ACTIVE or Y >= V_ACTIVE) are dropped, as
// the mapped window is larger than the memory behind it.
//
// Timing: writes take effect at the clock edge; reads are synchronous with
// one cycle of latency (rd_data holds the pixel addressed in the previous
// cycle), like an FPGA block RAM. A read of the address being written in the
// same cycle returns the old pixel. Reading outside the visible area returns
// zero.
//
// From the document: dimensions, pixel width and the X/Y addressing. Own
// choices: an on-chip memory model of the (external) store, the one-cycle
// read latency, read-before-write behaviour.
module framebuffer
  import video_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 1024,
  parameter int unsigned V_ACTIVE = 768,
  parameter int unsigned PIX_W    = 24
) (
  input  logic             clk,
  // write port
  input  logic             wr_en,
  input  coord_t           wr_x,
  input  coord_t           wr_y,
  input  logic [PIX_W-1:0] wr_data,
  // read port
  input  logic             rd_en,
  input  coord_t           rd_x,
  input  coord_t           rd_y,
  output logic [PIX_W-1:0] rd_data
);

  localparam int unsigned DEPTH  = H_ACTIVE * V_ACTIVE;
  localparam int unsigned ADDR_W = $clog2(DEPTH);

  logic [PIX_W-1:0] mem [DEPTH];

  logic              wr_in, rd_in;
  logic [ADDR_W-1:0] wr_addr, rd_addr;

  always_comb begin
    wr_in   = (32'(wr_x) < H_ACTIVE) && (32'(wr_y) < V_ACTIVE);
    rd_in   = (32'(rd_x) < H_ACTIVE) && (32'(rd_y) < V_ACTIVE);
    wr_addr = ADDR_W'(32'(wr_y) * H_ACTIVE + 32'(wr_x));
    rd_addr = ADDR_W'(32'(rd_y) * H_ACTIVE + 32'(rd_x));
  end

  always_ff @(posedge clk) begin
    if (wr_en && wr_in) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= rd_in ? mem[rd_addr] : '0;
  end

endmodule

// color_map: 16-entry palette from 4-bit pixel values to 24-bit colours.
//
// Used in the 4-bit-per-pixel framebuffer configuration: each framebuffer
// location holds one of 16 colour indices, and the palette turns it into the
// {Red[7:0], Green[7:0], Blue[7:0]} value that the video transmitter takes,
// so software chooses 16 colours out of 2^24. The palette is memory mapped:
// the CPU writes entry i at word address 0x8040_0000 + 4*i (0x8040_0000 to
// 0x8040_003C).
//
// Interface
//   wr_en/wr_idx/wr_color : CPU palette write, takes effect at the clock edge
//   rd_idx/rd_color       : lookup, combinational (distributed-RAM style)
//
// From the document: 16 entries of 24 bits, 4-bit index, CPU-writable at the
// given addresses. Own choices: the asynchronous lookup, and clearing all
// entries to black at reset.
module color_map (
  input  logic        clk,
  input  logic        rst,
  input  logic        wr_en,
  input  logic [3:0]  wr_idx,
  input  logic [23:0] wr_color,
  input  logic [3:0]  rd_idx,
  output logic [23:0] rd_color
);

  logic [23:0] table_q [16];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 16; i++) table_q[i] <= '0;
    end else if (wr_en) begin
      table_q[wr_idx] <= wr_color;
    end
  end

  assign rd_color = table_q[rd_idx];

endmodule

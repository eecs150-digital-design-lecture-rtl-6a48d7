// tb_framebuffer: self-checking test of the dual-port framebuffer memory
// at a reduced size (16 x 12 pixels). Writes random pixels, some of them
// outside the visible area (which must be dropped), while reading random
// positions every cycle; each read is compared, one cycle later, with a
// reference image kept by the testbench. Reads of a position written in the
// same cycle must return the previous pixel.
`timescale 1ns/1ps
module tb_framebuffer;
  import video_pkg::*;

  localparam int H = 16, V = 12;

  logic        clk = 0;
  logic        wr_en = 0, rd_en = 0;
  coord_t      wr_x = '0, wr_y = '0, rd_x = '0, rd_y = '0;
  logic [23:0] wr_data = '0, rd_data;
  logic [23:0] ref_img [V][H];
  int          checks = 0, failures = 0, dropped = 0;

  always #5 clk = ~clk;

  framebuffer #(.H_ACTIVE(H), .V_ACTIVE(V), .PIX_W(24)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] expect_q;
    bit          pend;
    // fill the whole memory so every location is known
    for (int y = 0; y < V; y++)
      for (int x = 0; x < H; x++) begin
        @(negedge clk);
        wr_en = 1; wr_x = coord_t'(x); wr_y = coord_t'(y);
        wr_data = 24'(x * 256 + y);
        ref_img[y][x] = 24'(x * 256 + y);
      end
    @(negedge clk);
    wr_en = 0;
    pend = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // check the read issued in the previous cycle
      if (pend) begin
        checks++;
        if (rd_data !== expect_q) begin
          failures++;
          $display("read (%0d,%0d) = %h, expected %h", rd_x, rd_y, rd_data, expect_q);
        end
      end
      rd_en = 1;
      rd_x  = coord_t'($urandom_range(H + 1));
      rd_y  = coord_t'($urandom_range(V + 1));
      expect_q = (rd_x < H && rd_y < V) ? ref_img[rd_y][rd_x] : 24'h0;
      pend  = 1;
      wr_en = $urandom_range(1);
      if ($urandom_range(3) == 0) begin wr_x = rd_x; wr_y = rd_y; end
      else begin
        wr_x = coord_t'($urandom_range(H + 2));
        wr_y = coord_t'($urandom_range(V + 2));
      end
      wr_data = 24'($urandom);
      if (wr_en) begin
        if (wr_x < H && wr_y < V) ref_img[wr_y][wr_x] = wr_data;
        else dropped++;
      end
    end
    // the whole image read back at the end
    @(negedge clk);
    wr_en = 0;
    for (int y = 0; y < V; y++)
      for (int x = 0; x < H; x++) begin
        rd_x = coord_t'(x); rd_y = coord_t'(y);
        @(negedge clk);
        checks++;
        if (rd_data !== ref_img[y][x]) begin
          failures++;
          $display("final (%0d,%0d) = %h, expected %h", x, y, rd_data, ref_img[y][x]);
        end
      end
    checks++;
    if (dropped == 0) begin failures++; $display("no out-of-range write tried"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

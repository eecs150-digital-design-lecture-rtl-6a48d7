// tb_color_map: self-checking test of the 16-entry colour map. Checks that
// all entries read black after reset, then writes random colours to random
// entries (including rewrites) and looks every index up after each write,
// against a reference table kept by the testbench. A write takes effect at
// the clock edge and the lookup is combinational.
`timescale 1ns/1ps
module tb_color_map;

  logic        clk = 0, rst = 1;
  logic        wr_en = 0;
  logic [3:0]  wr_idx = '0, rd_idx = '0;
  logic [23:0] wr_color = '0, rd_color;
  logic [23:0] ref_tab [16];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  color_map dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < 16; i++) begin
      rd_idx = 4'(i);
      #1;
      checks++;
      if (rd_color !== ref_tab[i]) begin
        failures++;
        $display("entry %0d = %h, expected %h", i, rd_color, ref_tab[i]);
      end
    end
  endtask

  initial begin
    foreach (ref_tab[i]) ref_tab[i] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check_all();
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      wr_en    = 1;
      wr_idx   = 4'($urandom);
      wr_color = 24'($urandom);
      rd_idx   = wr_idx;
      #1;
      // not yet written before the edge
      checks++;
      if (rd_color !== ref_tab[wr_idx]) begin
        failures++; $display("entry %0d changed before the clock edge", wr_idx);
      end
      ref_tab[wr_idx] = wr_color;
      @(negedge clk);
      wr_en = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

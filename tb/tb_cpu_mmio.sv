// tb_cpu_mmio: self-checking test of the processor-side address decoder.
// Stores to every documented address, to framebuffer addresses across the
// window, and to random addresses are checked against a reference decode of
// the address map written as explicit address ranges; loads of the status
// word must return the ready input one cycle later, other loads zero.
`timescale 1ns/1ps
module tb_cpu_mmio;
  import video_pkg::*;

  logic        clk = 0, rst = 1;
  logic [31:0] cpu_addr = '0, cpu_wdata = '0, cpu_rdata;
  logic        cpu_we = 0, cpu_re = 0;
  logic        fb_we;
  coord_t      fb_x, fb_y;
  logic [23:0] fb_data;
  logic        cmap_we;
  logic [3:0]  cmap_idx;
  logic [23:0] cmap_color;
  logic        le_reg_we, le_reg_trig, le_color_we;
  le_reg_e     le_reg_sel;
  logic [31:0] le_wdata;
  logic        le_ready = 0;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  cpu_mmio #(.PIX_W(24)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic store(logic [31:0] a, logic [31:0] d);
    bit e_fb, e_cm, e_le, e_col;
    int e_sel;
    bit e_trig;
    @(negedge clk);
    cpu_addr = a; cpu_wdata = d; cpu_we = 1; cpu_re = 0;
    #1;
    e_fb   = (a >= 32'h8000_0000 && a <= 32'h803F_FFFF);
    e_cm   = (a >= 32'h8040_0000 && a <= 32'h8040_003F);
    e_le   = (a >= 32'h8040_0040 && a <= 32'h8040_005F);
    e_col  = (a >= 32'h8040_0060 && a <= 32'h8040_0063);
    e_sel  = ((a - 32'h8040_0040) / 4) % 4;
    e_trig = (a >= 32'h8040_0050);
    checks++;
    if (fb_we !== e_fb || cmap_we !== e_cm || le_reg_we !== e_le || le_color_we !== e_col) begin
      failures++;
      $display("store %h: fb=%b cmap=%b le=%b col=%b", a, fb_we, cmap_we, le_reg_we, le_color_we);
    end
    if (e_fb) begin
      int off;
      off = int'(a - 32'h8000_0000);
      checks++;
      if (fb_y != off / 4096 || fb_x != (off % 4096) / 4 || fb_data !== d[23:0]) begin
        failures++; $display("store %h: pixel (%0d,%0d)", a, fb_x, fb_y);
      end
    end
    if (e_cm) begin
      checks++;
      if (cmap_idx != (a - 32'h8040_0000) / 4 || cmap_color !== d[23:0]) begin
        failures++; $display("store %h: colour map entry %0d", a, cmap_idx);
      end
    end
    if (e_le) begin
      checks++;
      if (int'(le_reg_sel) != e_sel || le_reg_trig != e_trig || le_wdata !== d) begin
        failures++; $display("store %h: sel %0d trig %b", a, le_reg_sel, le_reg_trig);
      end
    end
    if (e_col) begin
      checks++;
      if (le_wdata !== d) begin failures++; $display("colour data"); end
    end
    @(negedge clk);
    cpu_we = 0;
  endtask

  task automatic load(logic [31:0] a, logic rdy);
    @(negedge clk);
    cpu_addr = a; cpu_re = 1; cpu_we = 0; le_ready = rdy;
    @(negedge clk);
    cpu_re = 0; le_ready = !rdy;   // must not matter any more
    checks++;
    if (cpu_rdata !== ((a[31:2] == 30'h2010_0019) ? {31'b0, rdy} : 32'h0)) begin
      failures++; $display("load %h returned %h", a, cpu_rdata);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // every register of the engine and the colour map
    for (logic [31:0] a = 32'h8040_0000; a <= 32'h8040_0068; a += 4)
      store(a, $urandom);
    // framebuffer corners and random pixels
    store(32'h8000_0000, 32'h00aabbcc);
    store(32'h802F_FFFC, 32'h00112233);     // (1023, 767)
    store(32'h803F_FFFC, 32'h00445566);     // last mapped word
    store(32'h8040_0000 - 4, 32'h1);
    for (int i = 0; i < 300; i++)
      store(32'h8000_0000 | ($urandom & 32'h003F_FFFC), $urandom);
    // random addresses around the window and elsewhere
    for (int i = 0; i < 300; i++)
      store(32'h803F_0000 + ($urandom & 32'h0002_00FC), $urandom);
    for (int i = 0; i < 300; i++)
      store($urandom & 32'hFFFF_FFFC, $urandom);
    // status read-back
    load(32'h8040_0064, 1);
    load(32'h8040_0064, 0);
    load(32'h8040_0060, 1);
    load(32'h8000_0000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

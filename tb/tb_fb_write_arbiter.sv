// tb_fb_write_arbiter: self-checking test of the framebuffer write-port
// arbiter. Random CPU stores and line-engine requests are applied every
// cycle; the write port must carry the CPU's pixel whenever the CPU stores,
// the engine's pixel otherwise, and the engine must be granted exactly when
// it asks and the CPU does not (stalled when both want the port).
`timescale 1ns/1ps
module tb_fb_write_arbiter;
  import video_pkg::*;

  logic        clk = 0, rst = 1;
  logic        cpu_we = 0, le_valid = 0;
  coord_t      cpu_x = '0, cpu_y = '0, le_x = '0, le_y = '0;
  logic [23:0] cpu_data = '0, le_data = '0;
  logic        le_grant, le_stall, fb_we;
  coord_t      fb_x, fb_y;
  logic [23:0] fb_data;
  int          checks = 0, failures = 0, stalls = 0;

  always #5 clk = ~clk;

  fb_write_arbiter #(.PIX_W(24)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic        e_we, e_grant, e_stall;
    coord_t      e_x, e_y;
    logic [23:0] e_d;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      cpu_we   = $urandom_range(1);
      le_valid = $urandom_range(1);
      cpu_x    = coord_t'($urandom); cpu_y = coord_t'($urandom);
      le_x     = coord_t'($urandom); le_y  = coord_t'($urandom);
      cpu_data = 24'($urandom);      le_data = 24'($urandom);
      #1;
      e_we    = cpu_we | le_valid;
      e_grant = le_valid & ~cpu_we;
      e_stall = le_valid & cpu_we;
      e_x     = cpu_we ? cpu_x : le_x;
      e_y     = cpu_we ? cpu_y : le_y;
      e_d     = cpu_we ? cpu_data : le_data;
      checks++;
      if (fb_we !== e_we || le_grant !== e_grant || le_stall !== e_stall ||
          (e_we && (fb_x !== e_x || fb_y !== e_y || fb_data !== e_d))) begin
        failures++;
        $display("cycle %0d: cpu_we=%b le_valid=%b -> we=%b grant=%b stall=%b x=%0d y=%0d",
                 i, cpu_we, le_valid, fb_we, le_grant, le_stall, fb_x, fb_y);
      end
      if (e_stall) stalls++;
    end
    checks++;
    if (stalls == 0) begin failures++; $display("no stall was exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

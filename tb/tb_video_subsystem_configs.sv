// tb_video_subsystem_configs: the two earlier framebuffer configurations
// at their full sizes, run end to end side by side:
//   - 800 x 600 pixels, 16 bits/pixel {Red[4:0], Green[5:0], Blue[4:0]},
//     with standard 800x600 at 60 Hz frame timing (1056 x 628 clocks);
//   - 1024 x 768 pixels, 4 bits/pixel through the 16-entry colour map.
// Each is a video_config_run (clear, pixels, lines with and without CPU
// stores, a whole frame compared with a reference image).
`timescale 1ns/1ps
module tb_video_subsystem_configs;

  logic clk = 0;
  logic done16, done4;
  int   checks16, failures16, checks4, failures4;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  video_config_run #(
    .NAME("800x600x16"), .H(800), .V(600),
    .HF(40), .HS(128), .HB(88), .VF(1), .VS(4), .VB(23), .PIX_W(16)
  ) run16 (.clk, .done(done16), .checks(checks16), .failures(failures16));

  video_config_run #(
    .NAME("1024x768x4"), .H(1024), .V(768),
    .HF(24), .HS(136), .HB(160), .VF(3), .VS(6), .VB(29), .PIX_W(4)
  ) run4 (.clk, .done(done4), .checks(checks4), .failures(failures4));

  initial begin
    repeat (8000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks16 + checks4, failures16 + failures4 + 1);
    $finish;
  end

  initial begin
    wait (done16 && done4);
    checks   = checks16 + checks4;
    failures = failures16 + failures4;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

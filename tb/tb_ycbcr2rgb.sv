// tb_ycbcr2rgb: self-checking test of the YCbCr to RGB converter.
// Random YCbCr triplets are applied with random valid and side-band bits and
// the registered output is compared one clock later with an integer model of
// the inverse equations (coefficients over 256, rounded, clamped to 0..255).
// A second check converts random RGB to YCbCr with the forward model and back
// and requires the round trip to land within a few codes of the start value.
// The expected values come from an independent integer model of the same
// equations and number formats as the design; stimuli and sizes are this
// test's own choice.
module tb_ycbcr2rgb;
  import mrs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  ycbcr_t in_ycbcr = '0;
  rgb_t out_rgb;
  logic [3:0] in_sb = '0, out_sb;
  int checks = 0, failures = 0;

  ycbcr2rgb #(.SB_W(4)) dut (.*);

  always #5 clk = ~clk;
  initial begin #1000000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int clamp(int v); return v < 0 ? 0 : (v > 255 ? 255 : v); endfunction
  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  initial begin
    ycbcr_t p; logic v; logic [3:0] sb;
    int y, cb, cr, er, eg, eb, r0, g0, b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (i < 2000) begin
        p = ycbcr_t'($urandom);
      end else begin
        r0 = $urandom_range(0, 255); g0 = $urandom_range(0, 255); b0 = $urandom_range(0, 255);
        p.y  = 8'(clamp(( 77 * r0 + 150 * g0 +  29 * b0) >>> 8));
        p.cb = 8'(clamp(((-44 * r0 -  87 * g0 + 131 * b0) >>> 8) + 128));
        p.cr = 8'(clamp(((131 * r0 - 110 * g0 -  21 * b0) >>> 8) + 128));
      end
      v = 1'($urandom); sb = 4'($urandom);
      in_ycbcr = p; in_valid = v; in_sb = sb;
      @(negedge clk);
      y = p.y; cb = int'(p.cb) - 128; cr = int'(p.cr) - 128;
      er = clamp(y + ((351 * cr + 128) >>> 8));
      eg = clamp(y - ((179 * cr + 86 * cb + 128) >>> 8));
      eb = clamp(y + ((443 * cb + 128) >>> 8));
      checks++;
      if (out_valid !== v || out_sb !== sb || out_rgb.r != er || out_rgb.g != eg || out_rgb.b != eb) begin
        failures++;
        if (failures < 20) $display("FAIL: ycbcr %h -> %h, expected %02h%02h%02h", p, out_rgb, er, eg, eb);
      end
      if (i >= 2000) begin
        checks++;
        if (iabs(int'(out_rgb.r) - r0) > 4 || iabs(int'(out_rgb.g) - g0) > 4 || iabs(int'(out_rgb.b) - b0) > 4) begin
          failures++;
          if (failures < 20) $display("FAIL: round trip %0d %0d %0d -> %h", r0, g0, b0, out_rgb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

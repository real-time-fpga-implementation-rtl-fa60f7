// tb_rgb2ycbcr: self-checking test of the RGB to YCbCr converter.
// Random RGB triplets (plus the corners of the colour cube) are applied one
// per clock with random valid and side-band bits; one clock later the output
// is compared with an integer model of the same fixed-point equations
// (coefficients over 256, floor shift, +128 offset on the chroma, clamp).
// Inputs are driven on the falling edge and checked on the next falling edge.
// The expected values come from an independent integer model of the same
// equations and number formats as the design; stimuli and sizes are this
// test's own choice.
module tb_rgb2ycbcr;
  import mrs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  rgb_t in_rgb = '0;
  ycbcr_t out_ycbcr;
  logic [3:0] in_sb = '0, out_sb;
  int checks = 0, failures = 0;

  rgb2ycbcr #(.SB_W(4)) dut (.*);

  always #5 clk = ~clk;
  initial begin #1000000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int clamp(int v); return v < 0 ? 0 : (v > 255 ? 255 : v); endfunction

  initial begin
    rgb_t   p; logic v; logic [3:0] sb;
    int     r, g, b, ey, ecb, ecr;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (i < 8) p = '{r: i[0] ? 8'd255 : 8'd0, g: i[1] ? 8'd255 : 8'd0, b: i[2] ? 8'd255 : 8'd0};
      else       p = rgb_t'($urandom);
      v = 1'($urandom); sb = 4'($urandom);
      in_rgb = p; in_valid = v; in_sb = sb;
      @(negedge clk);
      r = p.r; g = p.g; b = p.b;
      ey  = clamp(( 77 * r + 150 * g +  29 * b) >>> 8);
      ecb = clamp(((-44 * r -  87 * g + 131 * b) >>> 8) + 128);
      ecr = clamp(((131 * r - 110 * g -  21 * b) >>> 8) + 128);
      checks++;
      if (out_valid !== v || out_sb !== sb || out_ycbcr.y != ey || out_ycbcr.cb != ecb || out_ycbcr.cr != ecr) begin
        failures++;
        if (failures < 20) $display("FAIL: rgb %h -> %h, expected %02h%02h%02h", p, out_ycbcr, ey, ecb, ecr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

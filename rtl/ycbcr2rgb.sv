// ycbcr2rgb: YCbCr back to gamma-corrected R'G'B' (ITU-R BT.601).
//
//   R = Y + 1.371 (Cr-128)
//   G = Y - 0.698 (Cr-128) - 0.336 (Cb-128)
//   B = Y + 1.732 (Cb-128)
//
// The equations follow the design description, which states 8-bit coefficient
// precision; here the coefficients are the nearest multiples of 1/256
// (351, 179, 86, 443), the products are rounded to nearest and the results
// clamped to 0..255 (this implementation's choice). One register stage; a
// side-band bus is delayed with the pixel.
module ycbcr2rgb
  import mrs_pkg::*;
#(
  parameter int unsigned SB_W = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  ycbcr_t          in_ycbcr,
  input  logic [SB_W-1:0] in_sb,
  output logic            out_valid,
  output rgb_t            out_rgb,
  output logic [SB_W-1:0] out_sb
);

  localparam int signed K_RCR = 351;   // 1.371 * 256
  localparam int signed K_GCR = 179;   // 0.698 * 256
  localparam int signed K_GCB = 86;    // 0.336 * 256
  localparam int signed K_BCB = 443;   // 1.732 * 256

  function automatic logic [7:0] clamp8(input logic signed [19:0] v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

  logic signed [19:0] y, cb, cr, r_s, g_s, b_s;

  always_comb begin
    y   = 20'(in_ycbcr.y);
    cb  = 20'(in_ycbcr.cb) - 20'sd128;
    cr  = 20'(in_ycbcr.cr) - 20'sd128;
    r_s = y + 20'((K_RCR * cr + 128) >>> 8);
    g_s = y - 20'((K_GCR * cr + K_GCB * cb + 128) >>> 8);
    b_s = y + 20'((K_BCB * cb + 128) >>> 8);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_rgb   <= '0;
      out_sb    <= '0;
    end else begin
      out_valid <= in_valid;
      out_sb    <= in_sb;
      out_rgb.r <= clamp8(r_s);
      out_rgb.g <= clamp8(g_s);
      out_rgb.b <= clamp8(b_s);
    end
  end

endmodule

// rgb2ycbcr: gamma-corrected R'G'B' to YCbCr (ITU-R BT.601, 8-bit
// coefficients).
//
//   Y  = ( 77 R + 150 G +  29 B) / 256
//   Cb = (-44 R -  87 G + 131 B) / 256 + 128
//   Cr = (131 R - 110 G -  21 B) / 256 + 128
//
// The coefficients are those of the design description; the multiplications
// are by constants, so synthesis reduces them to shift-and-add networks. The
// result is truncated (floor) and clamped to 0..255, which is this
// implementation's choice. One register stage: out_* follow in_* by one clock.
// A side-band bus (sync flags, strobes) is delayed along with the pixel.
module rgb2ycbcr
  import mrs_pkg::*;
#(
  parameter int unsigned SB_W = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  rgb_t            in_rgb,
  input  logic [SB_W-1:0] in_sb,
  output logic            out_valid,
  output ycbcr_t          out_ycbcr,
  output logic [SB_W-1:0] out_sb
);

  function automatic logic [7:0] clamp8(input logic signed [19:0] v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

  logic signed [19:0] r, g, b, y_s, cb_s, cr_s;

  always_comb begin
    r    = 20'(in_rgb.r);
    g    = 20'(in_rgb.g);
    b    = 20'(in_rgb.b);
    y_s  = ( 77 * r + 150 * g +  29 * b) >>> 8;
    cb_s = ((-44 * r -  87 * g + 131 * b) >>> 8) + 128;
    cr_s = ((131 * r - 110 * g -  21 * b) >>> 8) + 128;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_ycbcr <= '0;
      out_sb    <= '0;
    end else begin
      out_valid    <= in_valid;
      out_sb       <= in_sb;
      out_ycbcr.y  <= clamp8(y_s);
      out_ycbcr.cb <= clamp8(cb_s);
      out_ycbcr.cr <= clamp8(cr_s);
    end
  end

endmodule

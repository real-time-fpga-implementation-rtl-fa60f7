// pow075_lut: registered approximation of SFV^(-0.75) for the feature
// normaliser.
//
// SFV (up to 67 bits) is written as 2^p * (1+f) with p the position of its
// leading one. With p = 4s + q the inverse power splits into an exact shift
// and a table entry:
//     SFV^(-0.75) ~= 2^(-3s) * T[q][f5] / 2^16
//     T[q][f5] = round(2^16 * 2^(-0.75 q) * (1 + (f5 + 0.5)/32)^(-0.75))
// where f5 are the five bits below the leading one (entries are capped at
// 2^16-1). The table has 4 x 32 words and is computed at elaboration from
// that formula. The design description specifies a look-up table for the
// constant exponent; this piecewise-constant mantissa/exponent split is this
// implementation's way to keep that table small for a 67-bit operand.
// Outputs: mant (the T entry, 0 when SFV is 0) and shift = 3s + 16 - PHI_FRAC,
// the right shift that turns FV * mant into a feature element with PHI_FRAC
// fractional bits.
// Latency: one clock.
module pow075_lut
  import mrs_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [SFV_W-1:0] sfv,
  output logic             out_valid,
  output logic [15:0]      mant,
  output logic [5:0]       shift
);

  typedef logic [15:0] table_t [128];

  function automatic table_t make_table();
    table_t t;
    real    v;
    for (int q = 0; q < 4; q++) begin
      for (int f = 0; f < 32; f++) begin
        v = 65536.0 * (2.0 ** (-0.75 * q)) * ((1.0 + (f + 0.5) / 32.0) ** (-0.75));
        v = v + 0.5;
        t[q*32+f] = (v >= 65535.0) ? 16'hFFFF : 16'(int'($floor(v)));
      end
    end
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  logic [6:0]       p;
  logic             nz;
  logic [SFV_W-1:0] norm;
  logic [4:0]       f5;

  always_comb begin
    p  = '0;
    nz = 1'b0;
    for (int i = 0; i < SFV_W; i++) begin
      if (sfv[i]) begin
        p  = 7'(i);
        nz = 1'b1;
      end
    end
    norm = sfv << (7'(SFV_W - 1) - p);
    f5   = norm[SFV_W-2 -: 5];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      mant      <= '0;
      shift     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        mant  <= nz ? TABLE[{p[1:0], f5}] : 16'd0;
        shift <= 6'(3 * int'(p[6:2]) + 16 - PHI_FRAC);
      end
    end
  end

endmodule

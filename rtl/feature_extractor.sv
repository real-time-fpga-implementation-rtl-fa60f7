// feature_extractor (FE): normalised 8-element feature vector of a 3x3
// neighbourhood, computed with resource sharing degree DR.
//
//   FV_i  = (Y_centre - Y_neighbour_i)^4                 i = 1..8
//   SFV   = sum_j FV_j^2
//   phi_i = FV_i / SFV^0.75      (phi = 0 for a flat neighbourhood)
//
// Neighbour order (3x3 rows m-3..m-1, columns n-1..n-3): (0,0) (0,1) (0,2)
// (1,0) (1,2) (2,0) (2,1) (2,2), i.e. g7 g8 g9 g12 g14 g17 g18 g19 of the
// 5x5 window around the centre g13.
//
// Structure (follows the serial-parallel architecture of the description):
// NP = 8/DR processing paths; path l handles elements l*DR .. l*DR+DR-1, one
// per clock, so a new window is accepted every DR clocks. Each path is an
// absolute difference (8 bits), a squarer (16 bits), a second squarer giving
// FV (32 bits) and a third squarer (64 bits); the paths are summed and
// accumulated over DR clocks into SFV, the 0.75th power is taken by
// pow075_lut, and NP multipliers scale the stored FV values. The absolute
// difference, the feature width (PHI_W = 9 bits, 8 fractional, saturating)
// and the truncating shift are this implementation's choices.
//
// Interface: `start` for one clock with `win` (held by the caller only during
// that clock). phi_valid is high for DR consecutive clocks; in the clock with
// phi_phase = k, phi[l] is element l*DR + k. Latency from start to the first
// phi_valid: DR + 9 clocks (13 for DR = 4). DR must divide 8 and be at
// least 2.
module feature_extractor
  import mrs_pkg::*;
#(
  parameter int unsigned DR = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  win3_t                       win,
  output logic                        phi_valid,
  output logic [$clog2(DR+1)-1:0]     phi_phase,
  output logic [NFV/DR-1:0][PHI_W-1:0] phi
);

  localparam int unsigned NP  = NFV / DR;
  localparam int unsigned PHW = $clog2(DR + 1);

  // element index -> (row, col) in the 3x3 window
  function automatic logic [7:0] nb(input win3_t w, input int e);
    case (e)
      0: return w[0][0];
      1: return w[0][1];
      2: return w[0][2];
      3: return w[1][0];
      4: return w[1][2];
      5: return w[2][0];
      6: return w[2][1];
      default: return w[2][2];
    endcase
  endfunction

  // ---- capture and phase sequencing ---------------------------------------
  win3_t          wq;
  logic           run;
  logic [PHW-1:0] ph;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wq  <= '0;
      run <= 1'b0;
      ph  <= '0;
    end else if (start) begin
      wq  <= win;
      run <= 1'b1;
      ph  <= '0;
    end else if (run) begin
      if (ph == PHW'(DR - 1)) run <= 1'b0;
      else                    ph  <= ph + 1'b1;
    end
  end

  // ---- stage 1: mux + absolute difference ---------------------------------
  logic                     v1;
  logic [PHW-1:0]           ph1;
  logic [NP-1:0][7:0]       d1;
  // ---- stage 2: square ------------------------------------------------------
  logic                     v2;
  logic [PHW-1:0]           ph2;
  logic [NP-1:0][15:0]      s2;
  // ---- stage 3: FV = square of square --------------------------------------
  logic                     v3;
  logic [PHW-1:0]           ph3;
  logic [NP-1:0][31:0]      fv3;
  // ---- stage 4: FV^2 --------------------------------------------------------
  logic                     v4;
  logic [PHW-1:0]           ph4;
  logic [NP-1:0][63:0]      q4;
  // ---- stage 5: sum of paths -----------------------------------------------
  logic                     v5;
  logic [PHW-1:0]           ph5;
  logic [SFV_W-1:0]         sum5;
  // ---- stage 6: accumulation over DR clocks --------------------------------
  logic                     v6;
  logic [SFV_W-1:0]         acc;

  logic [NP-1:0][7:0] d_next;
  logic [SFV_W-1:0]   sum_next;

  always_comb begin
    for (int l = 0; l < NP; l++) begin
      logic [7:0] a, b;
      a = wq[1][1];
      b = nb(wq, l * DR + int'(ph));
      d_next[l] = (a > b) ? a - b : b - a;
    end
    sum_next = '0;
    for (int l = 0; l < NP; l++) sum_next = sum_next + SFV_W'(q4[l]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; ph1 <= '0; d1 <= '0;
      v2 <= 1'b0; ph2 <= '0; s2 <= '0;
      v3 <= 1'b0; ph3 <= '0; fv3 <= '0;
      v4 <= 1'b0; ph4 <= '0; q4 <= '0;
      v5 <= 1'b0; ph5 <= '0; sum5 <= '0;
      v6 <= 1'b0; acc <= '0;
    end else begin
      v1  <= run;
      ph1 <= ph;
      d1  <= d_next;

      v2  <= v1;
      ph2 <= ph1;
      for (int l = 0; l < NP; l++) s2[l] <= 16'(d1[l]) * 16'(d1[l]);

      v3  <= v2;
      ph3 <= ph2;
      for (int l = 0; l < NP; l++) fv3[l] <= 32'(s2[l]) * 32'(s2[l]);

      v4  <= v3;
      ph4 <= ph3;
      for (int l = 0; l < NP; l++) q4[l] <= 64'(fv3[l]) * 64'(fv3[l]);

      v5  <= v4;
      ph5 <= ph4;
      sum5 <= sum_next;

      v6 <= v5 && (ph5 == PHW'(DR - 1));
      if (v5) acc <= (ph5 == '0) ? sum5 : acc + sum5;
    end
  end

  // ---- FV store: collect the DR values of each path, then hold them --------
  logic [NP-1:0][DR-1:0][31:0] fv_col, fv_hold, fv_hold2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fv_col   <= '0;
      fv_hold  <= '0;
      fv_hold2 <= '0;
    end else begin
      if (v3)
        for (int l = 0; l < NP; l++) fv_col[l][ph3] <= fv3[l];
      if (v4 && ph4 == PHW'(DR - 1)) fv_hold  <= fv_col;
      if (v6)                        fv_hold2 <= fv_hold;
    end
  end

  // ---- stage 7: SFV^-0.75 ----------------------------------------------------
  logic        v7;
  logic [15:0] mant7;
  logic [5:0]  sh7;

  pow075_lut u_lut (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v6),
    .sfv      (acc),
    .out_valid(v7),
    .mant     (mant7),
    .shift    (sh7)
  );

  // ---- stage 8: scale the stored FVs, NP per clock over DR clocks ----------
  logic [NP-1:0][DR-1:0][31:0] fv_out;
  logic [15:0]                 mant_q;
  logic [5:0]                  sh_q;
  logic                        orun;
  logic [PHW-1:0]              oph;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fv_out <= '0; mant_q <= '0; sh_q <= '0; orun <= 1'b0; oph <= '0;
    end else if (v7) begin
      fv_out <= fv_hold2;
      mant_q <= mant7;
      sh_q   <= sh7;
      orun   <= 1'b1;
      oph    <= '0;
    end else if (orun) begin
      if (oph == PHW'(DR - 1)) orun <= 1'b0;
      else                     oph  <= oph + 1'b1;
    end
  end

  logic [NP-1:0][PHI_W-1:0] phi_next;

  always_comb
    for (int l = 0; l < NP; l++) begin
      logic [47:0] prod, scaled;
      prod   = 48'(fv_out[l][oph]) * 48'(mant_q);
      scaled = prod >> sh_q;
      phi_next[l] = (scaled > 48'((1 << PHI_W) - 1)) ? PHI_W'((1 << PHI_W) - 1)
                                                     : PHI_W'(scaled);
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phi_valid <= 1'b0;
      phi_phase <= '0;
      phi       <= '0;
    end else begin
      phi_valid <= orun;
      phi_phase <= oph;
      phi       <= phi_next;
    end
  end

endmodule

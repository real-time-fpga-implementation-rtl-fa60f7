// classifier (CL): context classification of a feature vector.
//
//   d_i = sum_j (phi_j - C_ij)^2 * invS_ij      i = 0..NCLASS-1
//   class = index of the smallest d_i (lowest index on a tie)
//
// C_ij are the class prototypes (representative vectors) and invS_ij the
// inverses of the normalising variances, both produced by offline training
// and loaded through the configuration port (they are registers, reset to
// zero). The division by the variance is done as a multiplication by its
// inverse, as in the design description.
//
// Structure (follows the resource-shared architecture of the description):
// one path per class with NP = 8/DR lanes; each lane subtracts the prototype
// element, squares the difference and multiplies by the inverse variance, the
// lanes are added and accumulated over DR clocks, and a minimum search picks
// the class. For NCLASS = 5 and DR = 4 that is 20 multipliers.
// Element widths (9-bit prototype, 8-bit inverse variance, 29-bit distance)
// are this implementation's choices.
//
// Interface: the element stream of the feature extractor (in_valid for DR
// clocks, in_phase = k carries elements l*DR+k in lane l). cls_valid pulses
// 4 clocks after the in_valid with the last phase, with cls_idx and the
// winning distance. Configuration: cfg_we with cfg_sel = 0 writes prototype
// element (cfg_class, cfg_elem), cfg_sel = 1 the inverse variance.
module classifier
  import mrs_pkg::*;
#(
  parameter int unsigned DR = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [$clog2(DR+1)-1:0]       in_phase,
  input  logic [NFV/DR-1:0][PHI_W-1:0]  in_phi,
  input  logic                          cfg_we,
  input  logic                          cfg_sel,
  input  logic [CLS_W-1:0]              cfg_class,
  input  logic [2:0]                    cfg_elem,
  input  logic [PHI_W-1:0]              cfg_data,
  output logic                          cls_valid,
  output logic [CLS_W-1:0]              cls_idx,
  output logic [DIST_W-1:0]             cls_dist
);

  localparam int unsigned NP  = NFV / DR;
  localparam int unsigned PHW = $clog2(DR + 1);
  localparam int unsigned SQ_W   = 2 * PHI_W;          // squared difference
  localparam int unsigned TERM_W = SQ_W + INVS_W;      // weighted term

  logic [NCLASS-1:0][NFV-1:0][PHI_W-1:0]  mean;
  logic [NCLASS-1:0][NFV-1:0][INVS_W-1:0] invs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mean <= '0;
      invs <= '0;
    end else if (cfg_we && (cfg_class < CLS_W'(NCLASS))) begin
      if (cfg_sel) invs[cfg_class][cfg_elem] <= INVS_W'(cfg_data);
      else         mean[cfg_class][cfg_elem] <= cfg_data;
    end
  end

  // stage 1: subtract the prototype
  logic                                   v1;
  logic [PHW-1:0]                         ph1;
  logic signed [NCLASS-1:0][NP-1:0][PHI_W:0] diff1;
  // stage 2: square and weight
  logic                                   v2;
  logic [PHW-1:0]                         ph2;
  logic [NCLASS-1:0][NP-1:0][TERM_W-1:0]  term2;
  // stage 3: lane sum and accumulation
  logic                                   v3;
  logic [NCLASS-1:0][DIST_W-1:0]          acc;

  logic [NCLASS-1:0][NP-1:0][TERM_W-1:0] term_next;
  logic [NCLASS-1:0][DIST_W-1:0]         lane_sum;

  always_comb
    for (int i = 0; i < NCLASS; i++) begin
      lane_sum[i] = '0;
      for (int l = 0; l < NP; l++) begin
        logic [PHI_W-1:0] a;
        a = diff1[i][l][PHI_W] ? PHI_W'(-diff1[i][l]) : diff1[i][l][PHI_W-1:0];
        term_next[i][l] = TERM_W'(SQ_W'(a) * SQ_W'(a)) *
                          TERM_W'(invs[i][l*DR + int'(ph1)]);
        lane_sum[i] = lane_sum[i] + DIST_W'(term2[i][l]);
      end
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; ph1 <= '0; diff1 <= '0;
      v2 <= 1'b0; ph2 <= '0; term2 <= '0;
      v3 <= 1'b0; acc <= '0;
    end else begin
      v1  <= in_valid;
      ph1 <= in_phase;
      for (int i = 0; i < NCLASS; i++)
        for (int l = 0; l < NP; l++)
          diff1[i][l] <= $signed({1'b0, in_phi[l]}) -
                         $signed({1'b0, mean[i][l*DR + int'(in_phase)]});

      v2  <= v1;
      ph2 <= ph1;
      term2 <= term_next;

      v3 <= v2 && (ph2 == PHW'(DR - 1));
      if (v2)
        for (int i = 0; i < NCLASS; i++)
          acc[i] <= (ph2 == '0) ? lane_sum[i] : acc[i] + lane_sum[i];
    end
  end

  // stage 4: minimum search
  logic [CLS_W-1:0]  best_i;
  logic [DIST_W-1:0] best_d;

  always_comb begin
    best_i = '0;
    best_d = acc[0];
    for (int i = 1; i < NCLASS; i++)
      if (acc[i] < best_d) begin
        best_d = acc[i];
        best_i = CLS_W'(i);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cls_valid <= 1'b0;
      cls_idx   <= '0;
      cls_dist  <= '0;
    end else begin
      cls_valid <= v3;
      if (v3) begin
        cls_idx  <= best_i;
        cls_dist <= best_d;
      end
    end
  end

endmodule

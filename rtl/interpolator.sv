// interpolator (IN): class-selected 5x5 filtering of one SD window into up to
// four HD pixels, with output pixel selection.
//
// For every SD centre the unit receives the 5x5 window, the class index from
// the classifier and the phase / keep information from the control unit. It
// then runs the four phases (vp,hp) = (0,0), (0,1), (1,0), (1,1), one per
// clock: the filter coefficient LUT is addressed with {class, vp, hp}, the 25
// taps are multiplied with the window pixels and summed,
//     Z = sum_t K[class][vp][hp][t] * P_t,   P_t = Y(m-4 + t/5, n-4 + t%5),
// i.e. tap t = 5*(i+2) + (j+2) weights Y(m-2+i, n-2+j) of the centre (m-2, n-2).
// and the result is rounded, scaled by 2^-COEF_FRAC and clamped to 0..255.
// The output pixel select passes only the phases whose HD pixel exists for
// the scaling ratio (keep flags), so for L = 2 all four pixels leave and for
// L = 1.5 four, two or one, depending on the parity of the SD row and column.
// This follows the description (25 multipliers, one coefficient memory per
// tap, 4 HD pixels per SD pixel at DR = 4). Coefficient width and format
// (10-bit signed, 8 fractional bits) are this implementation's choices; the
// trained values are written through the configuration port (cfg_tap selects
// one of the 25 memories, {cfg_class, cfg_phase} the word).
//
// Timing: `start` for one clock with cls/win/meta; the pixel of phase k
// leaves 4 + k clocks later. row_done pulses with the phase-3 result of the
// last centre of an SD line and names the HD rows that line produced
// (row_done_first, row_done_cnt = 1 or 2). Back-to-back starts must be at
// least 4 clocks apart.
module interpolator
  import mrs_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [CLS_W-1:0]    cls,
  input  win5_t               win,
  input  token_meta_t         meta,
  input  logic                cfg_we,
  input  logic [CLS_W-1:0]    cfg_class,
  input  logic [1:0]          cfg_phase,   // {vp, hp}
  input  logic [4:0]          cfg_tap,     // 0..24 = 5*(i+2)+(j+2) for pixel (m-2+i, n-2+j)
  input  logic [COEF_W-1:0]   cfg_data,
  output logic                pix_valid,
  output ycbcr_t              pix_ycbcr,
  output logic [COORD_W-1:0]  pix_row,
  output logic [COORD_W-1:0]  pix_col,
  output logic                row_done,
  output logic [COORD_W-1:0]  row_done_first,
  output logic [1:0]          row_done_cnt
);

  localparam int unsigned DEPTH  = NCLASS * 4;
  localparam int unsigned AW     = $clog2(DEPTH);
  localparam int unsigned PROD_W = 8 + COEF_W;
  localparam int unsigned SUM_W  = PROD_W + 5;

  // ---- capture and phase sequencing ---------------------------------------
  win5_t            win_h;
  token_meta_t      meta_h;
  logic [CLS_W-1:0] cls_h;
  logic             run;
  logic [1:0]       k;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_h <= '0; meta_h <= '0; cls_h <= '0; run <= 1'b0; k <= '0;
    end else if (start) begin
      win_h <= win; meta_h <= meta; cls_h <= cls; run <= 1'b1; k <= '0;
    end else if (run) begin
      if (k == 2'd3) run <= 1'b0;
      k <= k + 1'b1;
    end
  end

  // ---- stage 1: coefficient LUT read ---------------------------------------
  logic [AW-1:0] rd_addr, wr_addr;
  assign rd_addr = AW'(int'(cls_h) * 4 + int'(k));
  assign wr_addr = AW'(int'(cfg_class) * 4 + int'(cfg_phase));

  logic signed [NTAP-1:0][COEF_W-1:0] coef1;

  for (genvar t = 0; t < NTAP; t++) begin : g_lut
    logic [COEF_W-1:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (cfg_we && cfg_tap == 5'(t) && cfg_class < CLS_W'(NCLASS))
        mem[wr_addr] <= cfg_data;
      if (run) coef1[t] <= mem[rd_addr];
    end
  end

  logic        v1;
  logic [1:0]  k1;
  win5_t       win1;
  token_meta_t meta1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; k1 <= '0; win1 <= '0; meta1 <= '0;
    end else begin
      v1 <= run;
      if (run) begin
        k1 <= k; win1 <= win_h; meta1 <= meta_h;
      end
    end
  end

  // ---- stage 2: 25 multipliers ---------------------------------------------
  logic                               v2;
  logic [1:0]                         k2;
  token_meta_t                        meta2;
  logic signed [NTAP-1:0][PROD_W-1:0] prod2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; k2 <= '0; meta2 <= '0; prod2 <= '0;
    end else begin
      v2 <= v1;
      if (v1) begin
        k2    <= k1;
        meta2 <= meta1;
        for (int t = 0; t < NTAP; t++)
          prod2[t] <= PROD_W'($signed({1'b0, win1[t/5][4 - t%5]}) * $signed(coef1[t]));
      end
    end
  end

  // ---- stage 3: adder tree ---------------------------------------------------
  logic                    v3;
  logic [1:0]              k3;
  token_meta_t             meta3;
  logic signed [SUM_W-1:0] sum3, sum_next;

  always_comb begin
    sum_next = '0;
    for (int t = 0; t < NTAP; t++) sum_next = sum_next + SUM_W'($signed(prod2[t]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v3 <= 1'b0; k3 <= '0; meta3 <= '0; sum3 <= '0;
    end else begin
      v3 <= v2;
      if (v2) begin
        k3    <= k2;
        meta3 <= meta2;
        sum3  <= sum_next;
      end
    end
  end

  // ---- stage 4: rounding, clamping and output pixel select -----------------
  logic signed [SUM_W-1:0] rnd;
  logic                    vp, hp;
  assign rnd = (sum3 + SUM_W'(1 << (COEF_FRAC - 1))) >>> COEF_FRAC;
  assign vp  = k3[1];
  assign hp  = k3[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_valid <= 1'b0; pix_ycbcr <= '0; pix_row <= '0; pix_col <= '0;
      row_done <= 1'b0; row_done_first <= '0; row_done_cnt <= '0;
    end else begin
      pix_valid <= v3 && meta3.vmap.keep[vp] && meta3.hmap.keep[hp];
      row_done  <= v3 && (k3 == 2'd3) && meta3.row_end;
      if (v3) begin
        pix_ycbcr.y    <= (rnd < 0) ? 8'd0 : (rnd > 255) ? 8'd255 : rnd[7:0];
        pix_ycbcr.cb   <= meta3.cbcr.cb;
        pix_ycbcr.cr   <= meta3.cbcr.cr;
        pix_row        <= meta3.vmap.z[vp];
        pix_col        <= meta3.hmap.z[hp];
        row_done_first <= meta3.vmap.keep[0] ? meta3.vmap.z[0] : meta3.vmap.z[1];
        row_done_cnt   <= 2'(meta3.vmap.keep[0]) + 2'(meta3.vmap.keep[1]);
      end
    end
  end

endmodule

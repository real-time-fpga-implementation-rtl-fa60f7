// sync_gen: video timing generator (hsync, vsync, data enable).
//
// Counts pixel clocks (qualified by `en`, so it can run on a strobe inside a
// faster clock domain) and lines. Each line is ACTIVE pixels of data enable
// followed by front porch, sync and back porch; each frame is V_ACTIVE active
// lines followed by the vertical front porch, sync and back porch. Vertical
// sync changes at the first pixel of a line.
//
// Defaults are 480p60 (858 x 525 clocks: 720 active + 16/62/60, 480 active
// lines + 9/6/30), the figures of the input timing diagram; the 720p60 output
// timing (1650 x 750: 1280 + 110/40/220, 720 + 5/5/20) is set by parameters.
// The sync polarities are parameters (this implementation's choice: 1 means
// the pulse is high). h_cnt/v_cnt give the position, 0 at the first active
// pixel of the first active line. Outputs are registered.
module sync_gen #(
  parameter int unsigned H_ACTIVE = 720,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 62,
  parameter int unsigned H_BP     = 60,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 9,
  parameter int unsigned V_SYNC   = 6,
  parameter int unsigned V_BP     = 30,
  parameter bit          HS_POL   = 1'b0,
  parameter bit          VS_POL   = 1'b0,
  parameter int unsigned CNT_W    = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic             de,
  output logic             hsync,
  output logic             vsync,
  output logic [CNT_W-1:0] h_cnt,
  output logic [CNT_W-1:0] v_cnt
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [CNT_W-1:0] h, v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h <= '0;
      v <= '0;
    end else if (en) begin
      if (h == CNT_W'(H_TOTAL - 1)) begin
        h <= '0;
        v <= (v == CNT_W'(V_TOTAL - 1)) ? '0 : v + 1'b1;
      end else begin
        h <= h + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      de    <= 1'b0;
      hsync <= ~HS_POL;
      vsync <= ~VS_POL;
      h_cnt <= '0;
      v_cnt <= '0;
    end else if (en) begin
      de    <= (h < CNT_W'(H_ACTIVE)) && (v < CNT_W'(V_ACTIVE));
      hsync <= ((h >= CNT_W'(H_ACTIVE + H_FP)) && (h < CNT_W'(H_ACTIVE + H_FP + H_SYNC)))
               ? HS_POL : ~HS_POL;
      vsync <= ((v >= CNT_W'(V_ACTIVE + V_FP)) && (v < CNT_W'(V_ACTIVE + V_FP + V_SYNC)))
               ? VS_POL : ~VS_POL;
      h_cnt <= h;
      v_cnt <= v;
    end
  end

endmodule

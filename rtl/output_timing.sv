// output_timing: 720p output timing and picture placement.
//
// Runs in the output pixel clock domain (74.25 MHz for 720p60). A sync_gen
// produces the 720p timing (1650 clocks per line: 1280 active, 110 front
// porch, 40 sync, 220 back porch; 750 lines: 720 active, 5/5/20). The scaled
// picture is PIC_W pixels wide; it is centred by sending black in the first
// and last BORDER active columns, as done when 480p is scaled by 1.5 to
// 1080x720 and shown as 1280x720. Inside the picture area fb_rd_en requests
// one pixel from the frame buffer read FIFO, whose data is expected in the
// same clock (first-word fall-through, this implementation's assumption).
// All outputs are registered and aligned with each other.
module output_timing
  import mrs_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 1280,
  parameter int unsigned H_FP     = 110,
  parameter int unsigned H_SYNC   = 40,
  parameter int unsigned H_BP     = 220,
  parameter int unsigned V_ACTIVE = 720,
  parameter int unsigned V_FP     = 5,
  parameter int unsigned V_SYNC   = 5,
  parameter int unsigned V_BP     = 20,
  parameter int unsigned BORDER   = 100
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               fb_rd_en,
  input  rgb_t               fb_rd_data,
  output logic               out_hsync,
  output logic               out_vsync,
  output logic               out_de,
  output rgb_t               out_rgb
);

  logic               de, hs, vs;
  logic [COORD_W-1:0] h, v;

  sync_gen #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP),
    .HS_POL(1'b1), .VS_POL(1'b1), .CNT_W(COORD_W)
  ) u_sync (
    .clk(clk), .rst_n(rst_n), .en(1'b1),
    .de(de), .hsync(hs), .vsync(vs), .h_cnt(h), .v_cnt(v)
  );

  assign fb_rd_en = de && (h >= COORD_W'(BORDER)) && (h < COORD_W'(H_ACTIVE - BORDER));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_hsync <= 1'b0;
      out_vsync <= 1'b0;
      out_de    <= 1'b0;
      out_rgb   <= '0;
    end else begin
      out_hsync <= hs;
      out_vsync <= vs;
      out_de    <= de;
      out_rgb   <= fb_rd_en ? fb_rd_data : '0;
    end
  end

endmodule

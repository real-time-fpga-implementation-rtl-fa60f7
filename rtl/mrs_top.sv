// mrs_top: Modified Resolution Synthesis video up-scaler core.
//
// Input: 480p RGB video, one pixel per `in_en` strobe of the core clock
// (the core runs at DR = 4 times the 27 MHz pixel rate, i.e. 108 MHz, so a
// strobe comes every fourth clock), with data enable and vertical sync.
// Path: rgb2ycbcr -> control_unit + input_memory (5x5 windows of luminance)
// -> feature_extractor -> classifier -> interpolator (class-selected 5x5
// filters, up to 4 HD pixels per SD pixel) -> output_memory (raster order)
// -> ycbcr2rgb -> frame buffer write port. Chroma is carried along with each
// window and replicated onto the HD pixels of that window. A small FIFO holds
// each window with its phase information while its features are extracted
// and classified.
//
// Output side: the frame buffer (write FIFO, DDR controller, ping-pong
// banks, read FIFO) is outside this core; its write port is fb_wr_* (core
// clock, HD row/column given with every pixel) and its read port fb_rd_*
// (output clock). output_timing, in the clk_out domain, generates 720p timing
// and places the 1080-wide picture in the middle of the 1280-wide line.
//
// Training results (class prototypes, inverse variances, filter kernels) are
// loaded through cfg_*: cfg_sel 0 = prototype element, 1 = inverse variance
// (cfg_addr = element 0..7), 2 = filter tap (cfg_addr = tap 0..24,
// cfg_phase = {vp,hp}).
//
// Only windows whose full 5x5 aperture lies inside the SD picture are
// interpolated (SD centres 2..H-3, 2..W-3), so the HD rows and columns that
// would come from the two outer SD pixels at each edge are not written.
// The assertion a_token_present (a class result always finds its window in
// the token FIFO) uses rst_n in `disable iff`; that is why lint reports
// rst_n as both an asynchronous reset and a synchronous signal.
module mrs_top
  import mrs_pkg::*;
#(
  parameter int unsigned IMG_W = SD_W,
  parameter int unsigned IMG_H = SD_H,
  parameter int unsigned DR    = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  // SD input (core clock, strobed)
  input  logic               in_en,
  input  logic               in_de,
  input  logic               in_vsync,
  input  rgb_t               in_rgb,
  // training data load
  input  logic               cfg_we,
  input  logic [1:0]         cfg_sel,
  input  logic [CLS_W-1:0]   cfg_class,
  input  logic [4:0]         cfg_addr,
  input  logic [1:0]         cfg_phase,
  input  logic [COEF_W-1:0]  cfg_data,
  // frame buffer write port (core clock)
  output logic               fb_wr_en,
  output rgb_t               fb_wr_rgb,
  output logic [COORD_W-1:0] fb_wr_row,
  output logic [COORD_W-1:0] fb_wr_col,
  output logic               fb_wr_sol,
  output logic               fb_wr_eol,
  // status
  output logic               cls_valid,
  output logic [CLS_W-1:0]   cls_idx,
  output logic               om_overflow,
  // output side (output pixel clock)
  input  logic               clk_out,
  input  logic               rst_out_n,
  output logic               fb_rd_en,
  input  rgb_t               fb_rd_data,
  output logic               out_hsync,
  output logic               out_vsync,
  output logic               out_de,
  output rgb_t               out_rgb
);

  localparam int unsigned NP  = NFV / DR;
  localparam int unsigned PHW = $clog2(DR + 1);

  // ---- colour space conversion ---------------------------------------------
  logic   csc_valid;
  ycbcr_t csc_ycbcr;
  logic   csc_de, csc_vs;

  rgb2ycbcr #(.SB_W(2)) u_rgb2ycbcr (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_en), .in_rgb(in_rgb), .in_sb({in_de, in_vsync}),
    .out_valid(csc_valid), .out_ycbcr(csc_ycbcr), .out_sb({csc_de, csc_vs})
  );

  // ---- control unit and input memory ---------------------------------------
  logic               im_en, im_valid;
  logic [COORD_W-1:0] im_col;
  logic [1:0]         im_wr_sel, im_rd_sel;
  ycbcr_t             im_ycbcr;
  logic [4:0][7:0]    im_col_y;
  cbcr_t              im_cbcr;
  logic               tok_start;
  win5_t              tok_win;
  token_meta_t        tok_meta;
  logic [COORD_W-1:0] line_cnt, col_cnt;

  control_unit #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_cu (
    .clk(clk), .rst_n(rst_n),
    .in_en(csc_valid), .in_de(csc_de), .in_vsync(csc_vs), .in_ycbcr(csc_ycbcr),
    .im_en(im_en), .im_col(im_col), .im_wr_sel(im_wr_sel), .im_rd_sel(im_rd_sel),
    .im_ycbcr(im_ycbcr), .im_valid(im_valid), .im_col_y(im_col_y), .im_cbcr(im_cbcr),
    .tok_start(tok_start), .tok_win(tok_win), .tok_meta(tok_meta),
    .line_cnt(line_cnt), .col_cnt(col_cnt)
  );

  input_memory #(.LINE_W(IMG_W)) u_im (
    .clk(clk), .rst_n(rst_n),
    .en(im_en), .col(im_col), .wr_sel(im_wr_sel), .rd_sel(im_rd_sel),
    .in_ycbcr(im_ycbcr), .out_valid(im_valid), .col_y(im_col_y), .cbcr_m2(im_cbcr)
  );

  // ---- feature extraction and classification -------------------------------
  win3_t                        fe_win;
  logic                         phi_valid;
  logic [PHW-1:0]               phi_phase;
  logic [NP-1:0][PHI_W-1:0]     phi;
  logic [DIST_W-1:0]            cls_dist;

  always_comb
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) fe_win[r][c] = tok_win[r+1][c+1];

  feature_extractor #(.DR(DR)) u_fe (
    .clk(clk), .rst_n(rst_n), .start(tok_start), .win(fe_win),
    .phi_valid(phi_valid), .phi_phase(phi_phase), .phi(phi)
  );

  classifier #(.DR(DR)) u_cl (
    .clk(clk), .rst_n(rst_n),
    .in_valid(phi_valid), .in_phase(phi_phase), .in_phi(phi),
    .cfg_we(cfg_we && cfg_sel inside {2'd0, 2'd1}), .cfg_sel(cfg_sel[0]),
    .cfg_class(cfg_class), .cfg_elem(cfg_addr[2:0]), .cfg_data(cfg_data[PHI_W-1:0]),
    .cls_valid(cls_valid), .cls_idx(cls_idx), .cls_dist(cls_dist)
  );

  // ---- windows waiting for their class -------------------------------------
  localparam int unsigned TOK_W = $bits(win5_t) + $bits(token_meta_t);
  logic [TOK_W-1:0] tq_dout;
  logic             tq_empty, tq_full;
  win5_t            in_win;
  token_meta_t      in_meta;

  sync_fifo #(.WIDTH(TOK_W), .DEPTH(8)) u_tokq (
    .clk(clk), .rst_n(rst_n),
    .push(tok_start), .din({tok_win, tok_meta}),
    .pop(cls_valid), .dout(tq_dout), .empty(tq_empty), .full(tq_full)
  );
  assign {in_win, in_meta} = tq_dout;

  // ---- interpolation -----------------------------------------------------------
  logic               pix_valid, row_done;
  ycbcr_t             pix_ycbcr;
  logic [COORD_W-1:0] pix_row, pix_col, row_done_first;
  logic [1:0]         row_done_cnt;

  interpolator u_in (
    .clk(clk), .rst_n(rst_n),
    .start(cls_valid), .cls(cls_idx), .win(in_win), .meta(in_meta),
    .cfg_we(cfg_we && cfg_sel == 2'd2), .cfg_class(cfg_class), .cfg_phase(cfg_phase),
    .cfg_tap(cfg_addr), .cfg_data(cfg_data),
    .pix_valid(pix_valid), .pix_ycbcr(pix_ycbcr), .pix_row(pix_row), .pix_col(pix_col),
    .row_done(row_done), .row_done_first(row_done_first), .row_done_cnt(row_done_cnt)
  );

  // ---- output memory and colour conversion ----------------------------------
  logic               om_valid, om_sol, om_eol;
  ycbcr_t             om_ycbcr;
  logic [COORD_W-1:0] om_row, om_col;

  output_memory #(
    .LINE_W(hd_size(IMG_W)), .COL_FIRST(hd_first()), .COL_LAST(hd_last(IMG_W))
  ) u_om (
    .clk(clk), .rst_n(rst_n),
    .in_valid(pix_valid), .in_ycbcr(pix_ycbcr), .in_row(pix_row), .in_col(pix_col),
    .row_done(row_done), .row_done_first(row_done_first), .row_done_cnt(row_done_cnt),
    .out_valid(om_valid), .out_ycbcr(om_ycbcr), .out_row(om_row), .out_col(om_col),
    .out_sol(om_sol), .out_eol(om_eol), .overflow(om_overflow)
  );

  ycbcr2rgb #(.SB_W(2 * COORD_W + 2)) u_ycbcr2rgb (
    .clk(clk), .rst_n(rst_n),
    .in_valid(om_valid), .in_ycbcr(om_ycbcr), .in_sb({om_row, om_col, om_sol, om_eol}),
    .out_valid(fb_wr_en), .out_rgb(fb_wr_rgb),
    .out_sb({fb_wr_row, fb_wr_col, fb_wr_sol, fb_wr_eol})
  );

  // ---- 720p output timing ---------------------------------------------------
  output_timing #(.BORDER((1280 - hd_size(IMG_W)) / 2)) u_ot (
    .clk(clk_out), .rst_n(rst_out_n),
    .fb_rd_en(fb_rd_en), .fb_rd_data(fb_rd_data),
    .out_hsync(out_hsync), .out_vsync(out_vsync), .out_de(out_de), .out_rgb(out_rgb)
  );

  // A class result must always find its window waiting.
  // The interpolator needs four clocks per window.
  if (DR < 4 || (NFV % DR) != 0) begin : g_dr_check
    $error("mrs_top: DR must be 4 or 8");
  end

  a_token_present: assert property (@(posedge clk) disable iff (!rst_n) cls_valid |-> !tq_empty);

endmodule

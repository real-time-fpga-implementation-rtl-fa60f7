// tb_control_unit: self-checking test of the control unit together with the
// input memory it addresses, on a 12 x 9 picture. Two frames of random pixels
// are sent with a vertical sync, blanking after each line and a random number
// of idle clocks between input strobes. Every window token is compared, in
// order, with a model built from the picture: the 5x5 luminance window around
// centre (m-2, n-2), the vertical and horizontal HD mappings of the centre,
// the end-of-row flag and the centre chroma. Each frame must give exactly
// (H-4) x (W-4) tokens, one per centre whose full aperture is in the picture.
// The expected values come from an independent integer model of the same
// equations and number formats as the design; stimuli and sizes are this
// test's own choice.
module tb_control_unit;
  import mrs_pkg::*;
  localparam int W = 12, H = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_en = 1'b0, in_de = 1'b0, in_vsync = 1'b1;
  ycbcr_t in_ycbcr = '0;
  logic im_en, im_valid;
  logic [COORD_W-1:0] im_col, line_cnt, col_cnt;
  logic [1:0] im_wr_sel, im_rd_sel;
  ycbcr_t im_ycbcr;
  logic [4:0][7:0] im_col_y;
  cbcr_t im_cbcr;
  logic tok_start;
  win5_t tok_win;
  token_meta_t tok_meta;
  int checks = 0, failures = 0;
  ycbcr_t img [H][W];
  win5_t       ew_q [$];
  token_meta_t em_q [$];
  int          ntok;

  control_unit #(.IMG_W(W), .IMG_H(H), .VS_POL(1'b0)) dut (
    .clk, .rst_n, .in_en, .in_de, .in_vsync, .in_ycbcr, .im_en, .im_col, .im_wr_sel,
    .im_rd_sel, .im_ycbcr, .im_valid, .im_col_y, .im_cbcr, .tok_start, .tok_win,
    .tok_meta, .line_cnt, .col_cnt);
  input_memory #(.LINE_W(W)) u_im (
    .clk, .rst_n, .en(im_en), .col(im_col), .wr_sel(im_wr_sel), .rd_sel(im_rd_sel),
    .in_ycbcr(im_ycbcr), .out_valid(im_valid), .col_y(im_col_y), .cbcr_m2(im_cbcr));

  always #5 clk = ~clk;
  initial begin #3000000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (rst_n && tok_start) begin
    ntok++;
    checks++;
    if (ew_q.size() == 0) begin failures++; $display("FAIL: unexpected token"); end
    else begin
      win5_t w; token_meta_t mt;
      w = ew_q.pop_front(); mt = em_q.pop_front();
      if (tok_win != w || tok_meta != mt) begin
        failures++;
        if (failures < 20) $display("FAIL: token %0d win %h meta %h, expected %h %h",
                                    ntok, tok_win, tok_meta, w, mt);
      end
    end
  end

  task automatic strobe(input logic de, input logic vs, input ycbcr_t p);
    @(negedge clk);
    in_en = 1'b1; in_de = de; in_vsync = vs; in_ycbcr = p;
    @(negedge clk);
    in_en = 1'b0; in_ycbcr = ycbcr_t'($urandom);
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2; f++) begin
      for (int m = 0; m < H; m++) for (int n = 0; n < W; n++) img[m][n] = ycbcr_t'($urandom);
      for (int m = 4; m < H; m++)
        for (int n = 4; n < W; n++) begin
          win5_t w; token_meta_t mt;
          for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++) w[r][c] = img[m - 4 + r][n - c].y;
          mt.vmap = axis_map(COORD_W'(m - 2));
          mt.hmap = axis_map(COORD_W'(n - 2));
          mt.row_end = (n - 2 == W - 3);
          mt.cbcr = '{cb: img[m - 2][n - 2].cb, cr: img[m - 2][n - 2].cr};
          ew_q.push_back(w); em_q.push_back(mt);
        end
      ntok = 0;
      repeat (3) strobe(1'b0, 1'b0, '0);                 // vertical sync
      repeat (2) strobe(1'b0, 1'b1, '0);                 // back porch
      for (int m = 0; m < H; m++) begin
        for (int n = 0; n < W; n++) strobe(1'b1, 1'b1, img[m][n]);
        repeat (3) strobe(1'b0, 1'b1, '0);               // horizontal blanking
      end
      repeat (10) @(negedge clk);
      checks++;
      if (ntok != (H - 4) * (W - 4) || ew_q.size() != 0) begin
        failures++;
        $display("FAIL: frame %0d gave %0d tokens, %0d missing", f, ntok, ew_q.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_interpolator: self-checking test of the class-driven 5x5 interpolator.
// Random signed coefficients (including the extremes of the 10-bit range) are
// loaded for every class, phase and tap. Windows with random pixels, class,
// SD position and chroma are then started with gaps of 4 to 6 clocks. A
// model forms the 25-tap sum for each of the four phases (vp, hp), rounds it
// by 2^-8, clamps it, and keeps only the phases whose HD pixel exists
// according to the axis mapping. Output pixels (value, chroma, HD row and
// column) and the end-of-row reports are compared in order with the model.
// The expected values come from an independent integer model of the same
// equations and number formats as the design; stimuli and sizes are this
// test's own choice.
module tb_interpolator;
  import mrs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [CLS_W-1:0] cls = '0;
  win5_t win = '0;
  token_meta_t meta = '0;
  logic cfg_we = 1'b0;
  logic [CLS_W-1:0] cfg_class = '0;
  logic [1:0] cfg_phase = '0;
  logic [4:0] cfg_tap = '0;
  logic [COEF_W-1:0] cfg_data = '0;
  logic pix_valid, row_done;
  ycbcr_t pix_ycbcr;
  logic [COORD_W-1:0] pix_row, pix_col, row_done_first;
  logic [1:0] row_done_cnt;
  int checks = 0, failures = 0, nclip = 0, ndisc = 0;
  int coef [NCLASS][4][NTAP];
  logic [47:0] ep_q [$];   // {y, cb, cr, row, col}
  logic [13:0] er_q [$];   // {first, cnt}

  interpolator dut (.*);

  always #5 clk = ~clk;
  initial begin #3000000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (rst_n) begin
    if (pix_valid) begin
      logic [47:0] e;
      checks++;
      if (ep_q.size() == 0) begin failures++; $display("FAIL: unexpected pixel"); end
      else begin
        e = ep_q.pop_front();
        if ({pix_ycbcr, pix_row, pix_col} != e) begin
          failures++;
          if (failures < 20) $display("FAIL: pixel %h, expected %h", {pix_ycbcr, pix_row, pix_col}, e);
        end
      end
    end
    if (row_done) begin
      logic [13:0] e;
      checks++;
      if (er_q.size() == 0) begin failures++; $display("FAIL: unexpected row report"); end
      else begin
        e = er_q.pop_front();
        if ({row_done_first, row_done_cnt} != e) begin
          failures++;
          if (failures < 20) $display("FAIL: row report %h, expected %h", {row_done_first, row_done_cnt}, e);
        end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NCLASS; i++)
      for (int k = 0; k < 4; k++)
        for (int t = 0; t < NTAP; t++) begin
          case ($urandom_range(0, 9))
            0: coef[i][k][t] = -512;
            1: coef[i][k][t] = 511;
            default: coef[i][k][t] = (t == 12) ? $urandom_range(100, 300) : int'($urandom_range(0, 80)) - 40;
          endcase
          @(negedge clk);
          cfg_we = 1'b1; cfg_class = CLS_W'(i); cfg_phase = 2'(k); cfg_tap = 5'(t);
          cfg_data = COEF_W'(coef[i][k][t]);
        end
    @(negedge clk);
    cfg_we = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      win5_t w; token_meta_t mt; int c;
      w = win5_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      c = $urandom_range(0, NCLASS - 1);
      mt.vmap = axis_map(COORD_W'($urandom_range(0, 700)));
      mt.hmap = axis_map(COORD_W'($urandom_range(0, 700)));
      mt.row_end = ($urandom_range(0, 3) == 0);
      mt.cbcr = cbcr_t'($urandom);
      for (int k = 0; k < 4; k++) begin
        int acc, y, vp, hp;
        vp = k / 2; hp = k % 2;
        acc = 0;
        for (int t = 0; t < NTAP; t++) acc += int'(w[t / 5][4 - t % 5]) * coef[c][k][t];
        y = (acc + 128) >>> 8;
        if (y < 0 || y > 255) nclip++;
        y = (y < 0) ? 0 : (y > 255) ? 255 : y;
        if (mt.vmap.keep[vp] && mt.hmap.keep[hp])
          ep_q.push_back({8'(y), mt.cbcr, mt.vmap.z[vp], mt.hmap.z[hp]});
        else ndisc++;
      end
      if (mt.row_end)
        er_q.push_back({mt.vmap.keep[0] ? mt.vmap.z[0] : mt.vmap.z[1],
                        2'(mt.vmap.keep[0]) + 2'(mt.vmap.keep[1])});
      @(negedge clk);
      start = 1'b1; win = w; cls = CLS_W'(c); meta = mt;
      @(negedge clk);
      start = 1'b0; win = win5_t'({$urandom, $urandom}); cls = CLS_W'($urandom);
      repeat (2 + $urandom_range(0, 2)) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (ep_q.size() != 0 || er_q.size() != 0 || nclip == 0 || ndisc == 0) begin
      failures++;
      $display("FAIL: %0d pixels and %0d row reports missing, %0d clipped, %0d discarded",
               ep_q.size(), er_q.size(), nclip, ndisc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

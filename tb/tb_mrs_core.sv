// tb_mrs_core: end-to-end test of the MRS up-scaler (mrs_top).
//
// A 480p-style timing generator feeds NFRAMES synthetic RGB pictures (flat
// areas, weak and strong texture, edges) into the core, one pixel every
// fourth core clock. The training tables are loaded with test values first.
// An independent reference model computes, for every SD window, the
// features, the class, the four filtered HD pixels, the pixels kept for the
// ratio 3/2 and their colour after conversion back to RGB; every pixel
// written to the frame-buffer port is compared with it, the raster order of
// the port is checked, and every expected HD pixel must arrive exactly once.
// The output side is checked for the 720p line structure (1280 active
// clocks, the picture window, a 40-clock hsync, 720 active lines when a
// whole frame is simulated) and for black borders.
// Mechanisms counted (each must occur): all five classes chosen, flat
// windows (all-zero feature vector), discarded phases, SD lines that give
// two HD lines and SD lines that give one, border pixels on the output.
// FULL = 1 instantiates mrs_top with its default parameters.
module tb_mrs_core #(
  parameter int unsigned W       = 720,
  parameter int unsigned H       = 480,
  parameter int unsigned HFP     = 16,
  parameter int unsigned HSY     = 62,
  parameter int unsigned HBP     = 60,
  parameter int unsigned VFP     = 9,
  parameter int unsigned VSY     = 6,
  parameter int unsigned VBP     = 30,
  parameter int unsigned NFRAMES = 1,
  parameter int unsigned OUT_LINES = 750,
  parameter bit          FULL    = 1'b1
) ();
  import mrs_pkg::*;

  localparam int unsigned HD_W = (W * 3 + 1) / 2;
  localparam int unsigned HD_H = (H * 3 + 1) / 2;
  localparam int unsigned FRAME_CLKS = (W + HFP + HSY + HBP) * (H + VFP + VSY + VBP) * 4;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 400) $display("FAIL: %s", what);
    end
  endtask

  // ---- clocks and reset ---------------------------------------------------------
  logic clk = 1'b0, clk_out = 1'b0, rst_n = 1'b0;
  logic rst_out_n;
  assign rst_out_n = rst_n;
  always #5 clk = ~clk;          // core clock (4 x input pixel rate)
  always #7 clk_out = ~clk_out;  // output pixel clock

  // ---- DUT -----------------------------------------------------------------------
  logic               in_en, in_de, in_vsync;
  rgb_t               in_rgb;
  logic               cfg_we;
  logic [1:0]         cfg_sel;
  logic [CLS_W-1:0]   cfg_class;
  logic [4:0]         cfg_addr;
  logic [1:0]         cfg_phase;
  logic [COEF_W-1:0]  cfg_data;
  logic               fb_wr_en, fb_wr_sol, fb_wr_eol;
  rgb_t               fb_wr_rgb;
  logic [COORD_W-1:0] fb_wr_row, fb_wr_col;
  logic               cls_valid, om_overflow;
  logic [CLS_W-1:0]   cls_idx;
  logic               fb_rd_en, out_hsync, out_vsync, out_de;
  rgb_t               fb_rd_data, out_rgb;

  if (FULL) begin : g_full
    mrs_top dut (.*);
  end else begin : g_small
    mrs_top #(.IMG_W(W), .IMG_H(H)) dut (.*);
  end

  // ---- input timing -----------------------------------------------------------
  logic [1:0]         ph = '0;
  logic               sg_de, sg_hs, sg_vs;
  logic [COORD_W-1:0] sg_h, sg_v;
  logic               run_in = 1'b0;

  always_ff @(posedge clk) ph <= ph + 1'b1;

  sync_gen #(
    .H_ACTIVE(W), .H_FP(HFP), .H_SYNC(HSY), .H_BP(HBP),
    .V_ACTIVE(H), .V_FP(VFP), .V_SYNC(VSY), .V_BP(VBP), .CNT_W(COORD_W)
  ) u_in_timing (
    .clk(clk), .rst_n(run_in), .en(ph == 2'd0),
    .de(sg_de), .hsync(sg_hs), .vsync(sg_vs), .h_cnt(sg_h), .v_cnt(sg_v)
  );

  // ---- pictures and reference -------------------------------------------------
  logic [7:0]  img_r [H][W], img_g [H][W], img_b [H][W];
  logic [7:0]  ry [H][W], rcb [H][W], rcr [H][W];
  logic [23:0] exp_rgb [HD_H][HD_W];
  bit          exp_v   [HD_H][HD_W];
  bit          got_v   [HD_H][HD_W];
  int          zmap_v [H][2], zmap_h [W][2];

  logic [PHI_W-1:0]         t_mean [NCLASS][NFV];
  logic [INVS_W-1:0]        t_invs [NCLASS][NFV];
  logic signed [COEF_W-1:0] t_coef [NCLASS][4][NTAP];

  int cnt_cls [NCLASS];
  int ref_cls_q [$];
  int ref_pos_q [$];
  int cnt_flat = 0, cnt_discard = 0, cnt_two = 0, cnt_one = 0, cnt_border = 0;

  function automatic logic [7:0] clamp8(input int v);
    return (v < 0) ? 8'd0 : (v > 255) ? 8'd255 : 8'(v);
  endfunction

  // brute-force HD -> SD mapping for L = 3/2, Q = 2
  task automatic build_maps();
    for (int y = 0; y < H; y++) begin zmap_v[y][0] = -1; zmap_v[y][1] = -1; end
    for (int y = 0; y < W; y++) begin zmap_h[y][0] = -1; zmap_h[y][1] = -1; end
    for (int z = 0; z < HD_H; z++) begin
      int y, p;
      y = (z * 2) / 3;
      p = (2 * (z * 2 - y * 3)) / 3;
      if (y < H) zmap_v[y][p] = z;
    end
    for (int z = 0; z < HD_W; z++) begin
      int y, p;
      y = (z * 2) / 3;
      p = (2 * (z * 2 - y * 3)) / 3;
      if (y < W) zmap_h[y][p] = z;
    end
  endtask

  task automatic make_picture(input int f);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int region, base, amp, v;
        region = ((y / 4) + (x / 4) + f) % 5;
        base   = 40 + 30 * ((x / 8 + y / 8 + f) % 6);
        case (region)
          0: amp = 0;                                  // flat
          1: amp = 1;                                  // weak texture
          2: amp = 3;
          3: amp = 40;                                 // strong texture
          default: amp = ((x % 4) < 2) ? 120 : 0;      // edges
        endcase
        v = base + ((amp > 3) ? int'($urandom_range(0, amp)) : (amp == 0 ? 0 : int'($urandom_range(0, amp))));
        img_g[y][x] = clamp8(v);
        img_r[y][x] = clamp8(v + 10);
        img_b[y][x] = clamp8(v - 10);
        if (region == 0) begin
          img_r[y][x] = 8'(base); img_g[y][x] = 8'(base); img_b[y][x] = 8'(base);
        end
        if (region == 4 && (x % 4) >= 2) begin
          img_r[y][x] = 8'(base); img_g[y][x] = 8'(base); img_b[y][x] = 8'(base);
        end
      end
  endtask

  task automatic ref_csc();
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int r, g, b;
        r = img_r[y][x]; g = img_g[y][x]; b = img_b[y][x];
        ry[y][x]  = clamp8(( 77 * r + 150 * g +  29 * b) >>> 8);
        rcb[y][x] = clamp8(((-44 * r -  87 * g + 131 * b) >>> 8) + 128);
        rcr[y][x] = clamp8(((131 * r - 110 * g -  21 * b) >>> 8) + 128);
      end
  endtask

  function automatic logic [23:0] to_rgb(input int y, input int cb, input int cr);
    int r, g, b;
    r = y + ((351 * (cr - 128) + 128) >>> 8);
    g = y - ((179 * (cr - 128) + 86 * (cb - 128) + 128) >>> 8);
    b = y + ((443 * (cb - 128) + 128) >>> 8);
    return {clamp8(r), clamp8(g), clamp8(b)};
  endfunction

  // reference feature vector of the pixel at (r, c)
  task automatic ref_phi(input int r, input int c, output int phi [NFV], output bit flat);
    longint unsigned fv [NFV];
    logic [127:0]    sfv;
    int              dr [NFV], dc [NFV];
    int              p, s, q, f5;
    real             t;
    int unsigned     tt;
    dr = '{-1, -1, -1, 0, 0, 1, 1, 1};
    dc = '{1, 0, -1, 1, -1, 1, 0, -1};
    sfv = '0;
    for (int e = 0; e < NFV; e++) begin
      int d;
      d = int'(ry[r][c]) - int'(ry[r + dr[e]][c + dc[e]]);
      if (d < 0) d = -d;
      fv[e] = longint'(d) ** 4;
      sfv = sfv + 128'(fv[e]) * 128'(fv[e]);
    end
    flat = (sfv == 0);
    if (flat) begin
      for (int e = 0; e < NFV; e++) phi[e] = 0;
      return;
    end
    p = 0;
    for (int i = 0; i < 128; i++) if (sfv[i]) p = i;
    s  = p / 4;
    q  = p % 4;
    f5 = int'(((sfv << 5) >> p) & 128'd31);
    t  = 65536.0 * (2.0 ** (-0.75 * q)) * ((1.0 + (f5 + 0.5) / 32.0) ** (-0.75)) + 0.5;
    tt = (t >= 65535.0) ? 65535 : int'($floor(t));
    for (int e = 0; e < NFV; e++) begin
      logic [127:0] v;
      v = (128'(fv[e]) * 128'(tt)) >> (3 * s + 16 - PHI_FRAC);
      phi[e] = (v > 511) ? 511 : int'(v);
    end
  endtask

  task automatic build_reference();
    for (int z = 0; z < HD_H; z++)
      for (int x = 0; x < HD_W; x++) begin
        exp_v[z][x] = 0; got_v[z][x] = 0;
      end
    for (int r = 2; r <= H - 3; r++)
      for (int c = 2; c <= W - 3; c++) begin
        int  phi [NFV];
        bit  flat;
        int  best, bestd;
        ref_phi(r, c, phi, flat);
        best = 0; bestd = -1;
        for (int i = 0; i < NCLASS; i++) begin
          longint d;
          d = 0;
          for (int e = 0; e < NFV; e++)
            d += longint'((phi[e] - int'(t_mean[i][e])) ** 2) * longint'(t_invs[i][e]);
          if (bestd < 0 || d < longint'(bestd)) begin bestd = int'(d); best = i; end
        end
        ref_cls_q.push_back(best);
        ref_pos_q.push_back(r * 4096 + c);
        for (int k = 0; k < 4; k++) begin
          int vp, hp, acc, z, x;
          vp = k / 2; hp = k % 2;
          acc = 0;
          for (int t = 0; t < NTAP; t++)
            acc += int'(ry[r - 2 + t / 5][c - 2 + t % 5]) * int'(t_coef[best][k][t]);
          z = zmap_v[r][vp]; x = zmap_h[c][hp];
          if (z >= 0 && x >= 0) begin
            exp_v[z][x]   = 1;
            exp_rgb[z][x] = to_rgb(int'(clamp8((acc + 128) >>> 8)), rcb[r][c], rcr[r][c]);
          end
        end
      end
  endtask

  // class and feature statistics straight from the reference (per frame)
  task automatic count_reference();
    for (int r = 2; r <= H - 3; r++) begin
      if (zmap_v[r][0] >= 0 && zmap_v[r][1] >= 0) cnt_two++; else cnt_one++;
      for (int c = 2; c <= W - 3; c++) begin
        int phi [NFV];
        bit flat;
        ref_phi(r, c, phi, flat);
        if (flat) cnt_flat++;
        for (int k = 0; k < 4; k++)
          if (zmap_v[r][k / 2] < 0 || zmap_h[c][k % 2] < 0) cnt_discard++;
      end
    end
  endtask

  // ---- configuration -------------------------------------------------------------
  task automatic cfg_write(input int sel, input int cls, input int addr, input int phs, input int data);
    @(negedge clk);
    cfg_we = 1'b1; cfg_sel = 2'(sel); cfg_class = CLS_W'(cls);
    cfg_addr = 5'(addr); cfg_phase = 2'(phs); cfg_data = COEF_W'(data);
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic load_tables();
    // prototypes: class 0 flat, then decreasing feature levels
    int lvl [NCLASS];
    lvl = '{0, 90, 40, 12, 3};
    for (int i = 0; i < NCLASS; i++)
      for (int e = 0; e < NFV; e++) begin
        t_mean[i][e] = PHI_W'((i == 1) ? ((e == 0 || e == 3 || e == 5) ? 150 : 0) : lvl[i]);
        t_invs[i][e] = INVS_W'(4 + (i * 3 + e) % 8);
        cfg_write(0, i, e, 0, int'(t_mean[i][e]));
        cfg_write(1, i, e, 0, int'(t_invs[i][e]));
      end
    for (int i = 0; i < NCLASS; i++)
      for (int k = 0; k < 4; k++)
        for (int t = 0; t < NTAP; t++) begin
          int v;
          v = int'($urandom_range(0, 16)) - 8;
          if (t == 12) v = 180 + 10 * i + 5 * k;
          if (t == 7 || t == 11 || t == 13 || t == 17) v += 8 + k;
          t_coef[i][k][t] = COEF_W'(v);
          cfg_write(2, i, t, k, v);
        end
  endtask

  // ---- input drive --------------------------------------------------------------
  assign in_en    = run_in && (ph == 2'd1);
  assign in_de    = sg_de;
  assign in_vsync = sg_vs;
  always_comb begin
    in_rgb = '0;
    if (sg_de && sg_v < COORD_W'(H) && sg_h < COORD_W'(W))
      in_rgb = '{img_r[sg_v][sg_h], img_g[sg_v][sg_h], img_b[sg_v][sg_h]};
  end

  // ---- pipeline latency: input strobe of the pixel that completes a window to
  // its class result. It must be the same for every window and, at DR = 4, no
  // more than the 37 clocks of pipeline latency quoted for the reference design.
  longint cyc = 0, lat_min = -1, lat_max = -1;
  longint win_t_q [$];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_en && sg_de && sg_v >= COORD_W'(4) && sg_h >= COORD_W'(4)
        && sg_v < COORD_W'(H) && sg_h < COORD_W'(W))
      win_t_q.push_back(cyc);
    if (rst_n && cls_valid && win_t_q.size() > 0) begin
      longint l;
      l = cyc - win_t_q.pop_front();
      if (lat_min < 0 || l < lat_min) lat_min = l;
      if (l > lat_max) lat_max = l;
    end
  end

  // ---- frame buffer write port checker ----------------------------------------
  int n_wr = 0, prev_row = -1, prev_col = -1;
  always @(posedge clk) begin
    if (rst_n && fb_wr_en) begin
      int z, x;
      z = int'(fb_wr_row); x = int'(fb_wr_col);
      n_wr++;
      if (z < HD_H && x < HD_W) begin
        check(exp_v[z][x], $sformatf("unexpected HD pixel (%0d,%0d)", z, x));
        check(!got_v[z][x], $sformatf("HD pixel (%0d,%0d) written twice", z, x));
        check(fb_wr_rgb == exp_rgb[z][x],
              $sformatf("HD pixel (%0d,%0d) = %06h, expected %06h", z, x, fb_wr_rgb, exp_rgb[z][x]));
        got_v[z][x] = 1;
      end else check(0, "HD coordinate out of range");
      // raster order
      if (fb_wr_sol) check(z > prev_row, "line order");
      else           check(z == prev_row && x == prev_col + 1, "column order");
      prev_row = z; prev_col = x;
    end
    if (rst_n && cls_valid) begin
      int e, pos;
      if (cls_idx < CLS_W'(NCLASS)) cnt_cls[cls_idx]++;
      e = -1;
      pos = 0;
      if (ref_cls_q.size() > 0) begin
        e = ref_cls_q.pop_front();
        pos = ref_pos_q.pop_front();
      end
      check(int'(cls_idx) == e, $sformatf("class at SD (%0d,%0d) = %0d, expected %0d",
                                          pos / 4096, pos % 4096, cls_idx, e));
    end
    if (rst_n) check(!om_overflow, "output memory line queue overflow");
  end

  // ---- output side checker (720p) -----------------------------------------------
  int oc_de = 0, oc_rd = 0, oc_hs = 0, oc_lines = 0, oc_de_lines = 0, oc_hs_pulses = 0;
  bit prev_hs = 0, prev_de = 0, rd_q = 0;
  rgb_t data_q;
  int rd_pat = 0;
  assign fb_rd_data = rgb_t'(24'(rd_pat * 7 + 1));
  always @(posedge clk_out) begin
    if (rst_n) begin
      // registered outputs: the picture area carries the read data, else black
      if (out_de) begin
        oc_de++;
        if (rd_q) check(out_rgb == data_q, $sformatf("output picture pixel %06h expected %06h", out_rgb, data_q));
        else begin
          check(out_rgb == '0, "output border is black");
          cnt_border++;
        end
      end
      if (fb_rd_en) oc_rd++;
      if (out_hsync) oc_hs++;
      if (!out_hsync && prev_hs) begin
        check(oc_hs == 40, $sformatf("hsync width %0d", oc_hs));
        oc_hs = 0;
        oc_hs_pulses++;
      end
      if (!out_de && prev_de) begin
        check(oc_de == 1280, $sformatf("active clocks per line %0d", oc_de));
        check(oc_rd == HD_W, $sformatf("picture clocks per line %0d", oc_rd));
        oc_de = 0; oc_rd = 0;
        oc_de_lines++;
      end
      prev_hs = out_hsync; prev_de = out_de;
      rd_q = fb_rd_en; data_q = fb_rd_data;
      if (fb_rd_en) rd_pat <= rd_pat + 1;
    end
  end

  // ---- watchdog ------------------------------------------------------------------
  initial begin
    repeat (FRAME_CLKS * NFRAMES + FRAME_CLKS / 2 + 200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- main sequence -------------------------------------------------------------
  initial begin
    int exp_n;
    cfg_we = 0; cfg_sel = 0; cfg_class = 0; cfg_addr = 0; cfg_phase = 0; cfg_data = 0;
    for (int i = 0; i < NCLASS; i++) cnt_cls[i] = 0;
    build_maps();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    load_tables();
    for (int f = 0; f < int'(NFRAMES); f++) begin
      make_picture(f);
      ref_csc();
      build_reference();
      count_reference();
      n_wr = 0; prev_row = -1; prev_col = -1;
      if (f == 0) begin
        @(negedge clk);
        while (ph != 2'd3) @(negedge clk);
        run_in = 1'b1;
      end
      // wait until the frame has been fed and drained (end of vertical sync
      // of the next frame)
      repeat (FRAME_CLKS - 8) @(posedge clk);
      exp_n = 0;
      for (int z = 0; z < HD_H; z++)
        for (int x = 0; x < HD_W; x++)
          if (exp_v[z][x]) begin
            exp_n++;
            if (!got_v[z][x]) check(0, $sformatf("HD pixel (%0d,%0d) missing", z, x));
          end
      check(n_wr == exp_n, $sformatf("frame %0d: %0d HD pixels written, %0d expected", f, n_wr, exp_n));
      $display("frame %0d: %0d HD pixels checked", f, n_wr);
    end
    // mechanisms
    for (int i = 0; i < NCLASS; i++) begin
      $display("class %0d chosen %0d times", i, cnt_cls[i]);
      check(cnt_cls[i] > 0, $sformatf("class %0d never chosen", i));
    end
    $display("flat windows %0d, discarded phases %0d, SD lines with 2/1 HD lines %0d/%0d, border pixels %0d",
             cnt_flat, cnt_discard, cnt_two, cnt_one, cnt_border);
    $display("window-to-class latency %0d..%0d clocks", lat_min, lat_max);
    check(lat_min > 0 && lat_min == lat_max, "window-to-class latency not constant");
    check(lat_max <= 37, "window-to-class latency above 37 clocks");
    check(cnt_flat > 0, "no flat window");
    check(cnt_discard > 0, "no discarded phase");
    check(cnt_two > 0 && cnt_one > 0, "line mapping cases");
    check(cnt_border > 0, "no border pixel");
    check(oc_de_lines > 0 && oc_hs_pulses > 0, "output timing ran");
    if (OUT_LINES >= 750) check(oc_de_lines >= 720, $sformatf("%0d active output lines", oc_de_lines));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

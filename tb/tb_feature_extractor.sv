// tb_feature_extractor: self-checking test of the feature extractor with the
// resource sharing factor of the reference design, DR = 4 (two lanes, four phases per window).
// Random 3x3 windows are started with random gaps of at least DR clocks:
// flat windows, windows with differences of 0..3 codes, and full-range ones.
// A model computes the eight fourth-power differences, their sum of squares,
// the same 0.75-power table (2 exponent bits, 5 mantissa bits, 16-bit entry)
// and the saturated 9-bit phi values. Every output phase is compared in order
// with the model; the number of outputs must equal DR per window.
// The expected values come from an independent integer model of the same
// equations and number formats as the design; stimuli and sizes are this
// test's own choice.
module tb_feature_extractor;
  import mrs_pkg::*;
  localparam int DR = 4, NP = NFV / DR;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  win3_t win = '0;
  logic phi_valid;
  logic [$clog2(DR+1)-1:0] phi_phase;
  logic [NP-1:0][PHI_W-1:0] phi;
  int checks = 0, failures = 0, nflat = 0, nsat = 0;
  int exp_q [$];   // phi values, element order

  feature_extractor #(.DR(DR)) dut (.*);

  always #5 clk = ~clk;
  initial begin #3000000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // element e -> position in the 3x3 window
  localparam int ER [NFV] = '{0, 0, 0, 1, 1, 2, 2, 2};
  localparam int EC [NFV] = '{0, 1, 2, 0, 2, 0, 1, 2};

  task automatic model(input win3_t w, output int phi_o [NFV]);
    longint unsigned fv [NFV];
    logic [127:0] sfv;
    int p, s, q, f5;
    real t;
    int unsigned tt;
    sfv = '0;
    for (int e = 0; e < NFV; e++) begin
      int d;
      d = int'(w[1][1]) - int'(w[ER[e]][EC[e]]);
      if (d < 0) d = -d;
      fv[e] = longint'(d) ** 4;
      sfv = sfv + 128'(fv[e]) * 128'(fv[e]);
    end
    if (sfv == 0) begin
      nflat++;
      for (int e = 0; e < NFV; e++) phi_o[e] = 0;
      return;
    end
    p = 0;
    for (int i = 0; i < 128; i++) if (sfv[i]) p = i;
    s = p / 4; q = p % 4;
    f5 = int'(((sfv << 5) >> p) & 128'd31);
    t = 65536.0 * (2.0 ** (-0.75 * q)) * ((1.0 + (f5 + 0.5) / 32.0) ** (-0.75)) + 0.5;
    tt = (t >= 65535.0) ? 65535 : int'($floor(t));
    for (int e = 0; e < NFV; e++) begin
      logic [127:0] v;
      v = (128'(fv[e]) * 128'(tt)) >> (3 * s + 16 - PHI_FRAC);
      phi_o[e] = (v > 511) ? 511 : int'(v);
      if (v >= 128) nsat++;
    end
  endtask

  int exp_phase;
  always @(posedge clk) if (rst_n && phi_valid) begin
    checks++;
    if (exp_q.size() < NP) begin failures++; $display("FAIL: unexpected output"); end
    else begin
      int e [NP];
      bit bad;
      bad = (int'(phi_phase) != exp_phase);
      for (int l = 0; l < NP; l++) begin
        e[l] = exp_q[l * DR + exp_phase];
        if (int'(phi[l]) != e[l]) bad = 1;
      end
      if (bad) begin
        failures++;
        if (failures < 20) $display("FAIL: phase %0d phi %0d %0d, expected phase %0d %0d %0d",
                                    phi_phase, phi[0], phi[1], exp_phase, e[0], e[1]);
      end
      exp_phase++;
      if (exp_phase == DR) begin
        exp_phase = 0;
        for (int i = 0; i < NFV; i++) void'(exp_q.pop_front());
      end
    end
  end

  initial begin
    exp_phase = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      win3_t w;
      int ph [NFV];
      int kind, base;
      kind = $urandom_range(0, 3);
      base = $urandom_range(0, 252);
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          case (kind)
            0: w[r][c] = 8'(base);
            1: w[r][c] = 8'(base + (($urandom_range(0, 3) == 0) ? $urandom_range(0, 3) : 0));
            2: w[r][c] = 8'(base + $urandom_range(0, 3));
            default: w[r][c] = 8'($urandom);
          endcase
      model(w, ph);
      for (int e = 0; e < NFV; e++) exp_q.push_back(ph[e]);
      @(negedge clk);
      start = 1'b1; win = w;
      @(negedge clk);
      start = 1'b0; win = win3_t'({$urandom, $urandom, $urandom});
      repeat (DR - 2 + $urandom_range(0, 2)) @(negedge clk);
    end
    repeat (30) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || nflat == 0 || nsat == 0) begin
      failures++;
      $display("FAIL: %0d phi values missing, %0d flat, %0d large", exp_q.size(), nflat, nsat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

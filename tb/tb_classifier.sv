// tb_classifier: self-checking test of the distance classifier with DR = 4.
// Random prototype means (9 bit) and inverse spreads (8 bit) are loaded for
// the five classes over the configuration port. Feature vectors are then
// sent as four phases of two elements each: half of them close to a randomly
// chosen prototype, half fully random. The selected class and its distance
// are compared with a model of d_i = sum (phi - C_i)^2 * invs_i and an
// argmin that keeps the lowest index on a tie. Every class must win at least
// once and the number of results must equal the number of vectors.
// The expected values come from an independent integer model of the same
// equations and number formats as the design; stimuli and sizes are this
// test's own choice.
module tb_classifier;
  import mrs_pkg::*;
  localparam int DR = 4, NP = NFV / DR;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [$clog2(DR+1)-1:0] in_phase = '0;
  logic [NP-1:0][PHI_W-1:0] in_phi = '0;
  logic cfg_we = 1'b0, cfg_sel = 1'b0;
  logic [CLS_W-1:0] cfg_class = '0;
  logic [2:0] cfg_elem = '0;
  logic [PHI_W-1:0] cfg_data = '0;
  logic cls_valid;
  logic [CLS_W-1:0] cls_idx;
  logic [DIST_W-1:0] cls_dist;
  int checks = 0, failures = 0;
  int mean [NCLASS][NFV], invs [NCLASS][NFV];
  int win_cnt [NCLASS];
  int ec_q [$], ed_q [$];

  classifier #(.DR(DR)) dut (.*);

  always #5 clk = ~clk;
  initial begin #3000000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (rst_n && cls_valid) begin
    int c, d;
    checks++;
    if (ec_q.size() == 0) begin failures++; $display("FAIL: unexpected result"); end
    else begin
      c = ec_q.pop_front(); d = ed_q.pop_front();
      win_cnt[c]++;
      if (int'(cls_idx) != c || int'(cls_dist) != d) begin
        failures++;
        if (failures < 20) $display("FAIL: class %0d dist %0d, expected %0d %0d", cls_idx, cls_dist, c, d);
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NCLASS; i++)
      for (int e = 0; e < NFV; e++) begin
        mean[i][e] = $urandom_range(0, 511);
        invs[i][e] = $urandom_range(1, 255);
        for (int s = 0; s < 2; s++) begin
          @(negedge clk);
          cfg_we = 1'b1; cfg_sel = s[0]; cfg_class = CLS_W'(i); cfg_elem = 3'(e);
          cfg_data = PHI_W'(s ? invs[i][e] : mean[i][e]);
        end
      end
    @(negedge clk);
    cfg_we = 1'b0;
    for (int v = 0; v < 2000; v++) begin
      int phi [NFV];
      int best, bestd, pc;
      pc = $urandom_range(0, NCLASS - 1);
      for (int e = 0; e < NFV; e++) begin
        if (v % 2 == 0) phi[e] = mean[pc][e] + $urandom_range(0, 40) - 20;
        else            phi[e] = $urandom_range(0, 511);
        if (phi[e] < 0) phi[e] = 0;
        if (phi[e] > 511) phi[e] = 511;
      end
      best = 0; bestd = -1;
      for (int i = 0; i < NCLASS; i++) begin
        int d;
        d = 0;
        for (int e = 0; e < NFV; e++) d += (phi[e] - mean[i][e]) * (phi[e] - mean[i][e]) * invs[i][e];
        if (bestd < 0 || d < bestd) begin bestd = d; best = i; end
      end
      ec_q.push_back(best); ed_q.push_back(bestd);
      for (int k = 0; k < DR; k++) begin
        @(negedge clk);
        in_valid = 1'b1; in_phase = 3'(k);
        for (int l = 0; l < NP; l++) in_phi[l] = PHI_W'(phi[l * DR + k]);
      end
      @(negedge clk);
      in_valid = 1'b0; in_phi = '0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (ec_q.size() != 0) begin failures++; $display("FAIL: %0d results missing", ec_q.size()); end
    for (int i = 0; i < NCLASS; i++) begin
      checks++;
      if (win_cnt[i] == 0) begin failures++; $display("FAIL: class %0d never chosen", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

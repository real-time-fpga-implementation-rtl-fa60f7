// tb_sync_gen: self-checking test of the raster timing generator, run with a
// small raster (20 + 3/4/5 clocks by 10 + 2/3/4 lines) and a random clock
// enable. For every enabled clock the outputs are compared with a counter
// model: data enable in the active area, sync pulses after the front porch,
// counters wrapping at the totals. Two full frames are checked, and the total
// numbers of active pixels and sync clocks per frame are counted as well.
// The expected values come from an independent integer model of the same
// equations and number formats as the design; stimuli and sizes are this
// test's own choice.
module tb_sync_gen;
  localparam int HA = 20, HF = 3, HS = 4, HB = 5, VA = 10, VF = 2, VS = 3, VB = 4;
  localparam int HT = HA + HF + HS + HB, VT = VA + VF + VS + VB;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic de, hsync, vsync;
  logic [11:0] h_cnt, v_cnt;
  int checks = 0, failures = 0;

  sync_gen #(.H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
             .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB),
             .HS_POL(1'b1), .VS_POL(1'b0)) dut (.*);

  always #5 clk = ~clk;
  initial begin #2000000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    int h, v, n_de, n_hs;
    logic e;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    h = 0; v = 0; n_de = 0; n_hs = 0;
    // the first enabled clock loads position (0,0)
    for (int i = 0; i < 4 * HT * VT; i++) begin
      e = ($urandom_range(0, 2) != 0);
      en = e;
      @(negedge clk);
      if (e) begin
        check(int'(h_cnt) == h && int'(v_cnt) == v,
              $sformatf("position %0d,%0d expected %0d,%0d", v_cnt, h_cnt, v, h));
        check(de == (h < HA && v < VA), $sformatf("de at %0d,%0d", v, h));
        check(hsync == (h >= HA + HF && h < HA + HF + HS), $sformatf("hsync at %0d,%0d", v, h));
        check(vsync == !(v >= VA + VF && v < VA + VF + VS), $sformatf("vsync at %0d,%0d", v, h));
        n_de += int'(de); n_hs += int'(hsync);
        h++;
        if (h == HT) begin h = 0; v = (v + 1) % VT; end
        if (h == 0 && v == 0) begin
          check(n_de == HA * VA && n_hs == HS * VT, $sformatf("frame totals de=%0d hs=%0d", n_de, n_hs));
          n_de = 0; n_hs = 0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_output_timing: self-checking test of the HD output timing block on a
// small raster (24 + 3/4/5 clocks by 6 + 1/2/2 lines) with a 4-column black
// border. The frame buffer read port is modelled as a first-word fall-through
// FIFO holding a numbered pixel sequence. The test checks, clock by clock,
// that reads are requested exactly inside the active area minus the border,
// that the registered output shows the read pixel there and black elsewhere,
// and that sync and data enable follow the raster one clock later.
// The expected values come from an independent integer model of the same
// equations and number formats as the design; stimuli and sizes are this
// test's own choice.
module tb_output_timing;
  import mrs_pkg::*;
  localparam int HA = 24, HF = 3, HS = 4, HB = 5, VA = 6, VF = 1, VS = 2, VB = 2, BD = 4;
  localparam int HT = HA + HF + HS + HB, VT = VA + VF + VS + VB;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fb_rd_en, out_hsync, out_vsync, out_de;
  rgb_t fb_rd_data, out_rgb;
  int checks = 0, failures = 0, rd_idx = 0, nread = 0;

  output_timing #(.H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
                  .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB), .BORDER(BD)) dut (.*);

  function automatic rgb_t pix(int i); return rgb_t'(24'(i * 40503 + 17)); endfunction
  assign fb_rd_data = pix(rd_idx);
  always @(posedge clk) if (fb_rd_en) rd_idx <= rd_idx + 1;

  always #5 clk = ~clk;
  initial begin #3000000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    int h, v;
    bit de_e, rd_e, started;
    rgb_t last;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // the generator starts counting at (0,0) with the first clock after reset
    h = 0; v = 0; started = 0;
    for (int i = 0; i < 3 * HT * VT; i++) begin
      @(posedge clk);
      rd_e = fb_rd_en;
      last = fb_rd_data;
      if (rd_e) nread++;
      #1;
      if (started) begin
        de_e = (h < HA && v < VA);
        check(out_de == de_e, $sformatf("de at %0d,%0d", v, h));
        check(out_hsync == (h >= HA + HF && h < HA + HF + HS), $sformatf("hsync at %0d,%0d", v, h));
        check(out_vsync == (v >= VA + VF && v < VA + VF + VS), $sformatf("vsync at %0d,%0d", v, h));
        check(rd_e == (de_e && h >= BD && h < HA - BD), $sformatf("read at %0d,%0d", v, h));
        h++;
        if (h == HT) begin h = 0; v = (v + 1) % VT; end
      end
      @(negedge clk);
      if (started) check(out_rgb == (rd_e ? last : rgb_t'('0)), $sformatf("pixel %h", out_rgb));
      started = 1;
    end
    check(nread >= 2 * VA * (HA - 2 * BD), $sformatf("%0d reads", nread));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

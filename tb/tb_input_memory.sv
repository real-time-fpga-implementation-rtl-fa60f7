// tb_input_memory: self-checking test of the four circular luminance line
// buffers and the two chroma line buffers, with a 16-pixel line. Lines of
// random pixels are written in raster order with random idle clocks between
// pixels, line m into buffer m mod 4. For every pixel the expected output
// column (Y of lines m-4..m at the same column, CbCr of line m-2) is queued
// and compared when out_valid arrives two clocks later. Checks start at line
// 4, once every buffer has been written (the buffers are not reset).
// The expected values come from an independent integer model of the same
// equations and number formats as the design; stimuli and sizes are this
// test's own choice.
module tb_input_memory;
  import mrs_pkg::*;
  localparam int W = 16, NL = 12;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [COORD_W-1:0] col = '0;
  logic [1:0] wr_sel = '0, rd_sel = '0;
  ycbcr_t in_ycbcr = '0;
  logic out_valid;
  logic [4:0][7:0] col_y;
  cbcr_t cbcr_m2;
  int checks = 0, failures = 0;
  ycbcr_t img [NL][W];
  logic [55:0] exp_q [$];   // {col_y, cbcr}
  bit          chk_q [$];   // compare this output

  input_memory #(.LINE_W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin #2000000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [55:0] e;
    bit          c;
    if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
    else begin
      e = exp_q.pop_front();
      c = chk_q.pop_front();
      if (c) begin
        checks++;
        if ({col_y, cbcr_m2} != e) begin
          failures++;
          if (failures < 20) $display("FAIL: got %h expected %h", {col_y, cbcr_m2}, e);
        end
      end
    end
  end

  initial begin
    for (int m = 0; m < NL; m++) for (int n = 0; n < W; n++) img[m][n] = ycbcr_t'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < NL; m++)
      for (int n = 0; n < W; n++) begin
        logic [55:0] ev;
        @(negedge clk);
        en = 1'b1; col = COORD_W'(n); wr_sel = 2'(m); rd_sel = 2'(m); in_ycbcr = img[m][n];
        for (int k = 0; k < 5; k++) ev[16 + 8 * k +: 8] = (m - 4 + k >= 0) ? img[(m - 4 + k < 0) ? 0 : m - 4 + k][n].y : 8'd0;
        ev[15:0] = (m >= 2) ? {img[(m >= 2) ? m - 2 : 0][n].cb, img[(m >= 2) ? m - 2 : 0][n].cr} : 16'd0;
        exp_q.push_back(ev);
        chk_q.push_back(m >= 4);
        if ($urandom_range(0, 2) == 0) begin
          @(negedge clk);
          en = 1'b0; col = COORD_W'($urandom); wr_sel = 2'($urandom); in_ycbcr = ycbcr_t'($urandom);
        end
      end
    @(negedge clk);
    en = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

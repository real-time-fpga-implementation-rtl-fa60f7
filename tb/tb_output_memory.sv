// tb_output_memory: self-checking test of the two HD line buffers and the row
// read-out, with 16-pixel lines of which columns 2..13 are read. HD rows are
// written the way the interpolator produces them: an SD line fills either two
// HD rows (pixels of both interleaved) or one, then reports the finished rows.
// Writes come in random order within the row, with random idle clocks, plus
// writes outside the read window. Each reported row must be read back in full,
// in column order, with start/end-of-line flags, before its buffer is reused.
// At the end three back-to-back reports of two rows must set the overflow flag.
// The expected values come from an independent integer model of the same
// equations and number formats as the design; stimuli and sizes are this
// test's own choice.
module tb_output_memory;
  import mrs_pkg::*;
  localparam int LW = 16, CF = 2, CL = 13, NR = 20;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, row_done = 1'b0;
  ycbcr_t in_ycbcr = '0;
  logic [COORD_W-1:0] in_row = '0, in_col = '0, row_done_first = '0;
  logic [1:0] row_done_cnt = '0;
  logic out_valid, out_sol, out_eol, overflow;
  ycbcr_t out_ycbcr;
  logic [COORD_W-1:0] out_row, out_col;
  int checks = 0, failures = 0;
  logic [49:0] e_q [$];   // {sol, eol, row, col, pixel}
  ycbcr_t img [NR][LW];

  output_memory #(.LINE_W(LW), .COL_FIRST(CF), .COL_LAST(CL)) dut (.*);

  always #5 clk = ~clk;
  initial begin #3000000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  bit ignore_out = 1'b0;
  always @(posedge clk) if (rst_n && out_valid && !ignore_out) begin
    logic [49:0] e;
    checks++;
    if (e_q.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
    else begin
      e = e_q.pop_front();
      if ({out_sol, out_eol, out_row, out_col, out_ycbcr} != e) begin
        failures++;
        if (failures < 20) $display("FAIL: out %h, expected %h",
                                    {out_sol, out_eol, out_row, out_col, out_ycbcr}, e);
      end
    end
  end

  initial begin
    int z, nrows;
    int order [$];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < NR; r++) for (int c = 0; c < LW; c++) img[r][c] = ycbcr_t'($urandom);
    z = 0;
    checks++;
    if (overflow) begin failures++; $display("FAIL: overflow after reset"); end
    while (z < NR) begin
      nrows = (z % 3 == 0 && z + 1 < NR) ? 2 : 1;
      order.delete();
      for (int i = 0; i < nrows * LW; i++) order.push_back(i);
      order.shuffle();
      for (int i = 0; i < nrows * LW; i++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_row = COORD_W'(z + order[i] / LW);
        in_col = COORD_W'(order[i] % LW);
        in_ycbcr = img[z + order[i] / LW][order[i] % LW];
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
        end
      end
      @(negedge clk);
      in_valid = 1'b0;
      row_done = 1'b1; row_done_first = COORD_W'(z); row_done_cnt = 2'(nrows);
      for (int j = 0; j < nrows; j++)
        for (int c = CF; c <= CL; c++)
          e_q.push_back({1'(c == CF), 1'(c == CL), COORD_W'(z + j), COORD_W'(c), img[z + j][c]});
      @(negedge clk);
      row_done = 1'b0;
      // the next SD line may only start once the rows it overwrites are out
      repeat (nrows * (CL - CF + 2) + 4 + $urandom_range(0, 3)) @(negedge clk);
      z += nrows;
    end
    repeat (40) @(negedge clk);
    checks++;
    if (e_q.size() != 0 || overflow) begin
      failures++;
      $display("FAIL: %0d outputs missing, overflow %0d", e_q.size(), overflow);
    end
    ignore_out = 1'b1;
    for (int i = 0; i < 3; i++) begin
      @(negedge clk);
      row_done = 1'b1; row_done_first = COORD_W'(2 * i); row_done_cnt = 2'd2;
    end
    @(negedge clk);
    row_done = 1'b0;
    e_q.delete();
    checks++;
    if (!overflow) begin failures++; $display("FAIL: overflow not flagged"); end
    repeat (200) @(negedge clk);
    e_q.delete();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

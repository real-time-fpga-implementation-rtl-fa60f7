// input_memory (IM): line storage that turns the raster input into a 5x1
// luminance column and the chroma of two lines earlier.
//
// Four luminance line buffers form a circular buffer: line m is written into
// buffer m mod 4, so the two low bits of the line counter (wr_sel) decode to
// the write enables. On each strobe `en` at column `col` every buffer is read
// at that column (read-before-write, so the buffer being written still gives
// line m-4), the read data switch rotates the four outputs by rd_sel into the
// order m-4, m-3, m-2, m-1, and the incoming pixel bypasses the memories as
// the fifth element (line m). Two chroma line buffers, written as line m mod
// 2, return CbCr of line m-2 so the replicated chroma lines up with the
// processed luminance. This structure follows the design description.
//
// Timing: col_y / cbcr_m2 / out_valid appear two clocks after `en` (one clock
// for the synchronous RAM read, one for the column registers).
module input_memory
  import mrs_pkg::*;
#(
  parameter int unsigned LINE_W = SD_W     // line buffer length
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,        // one input pixel
  input  logic [COORD_W-1:0]        col,       // column address n
  input  logic [1:0]                wr_sel,    // line m mod 4
  input  logic [1:0]                rd_sel,    // line m mod 4 (read switch)
  input  ycbcr_t                    in_ycbcr,  // pixel (m, n)
  output logic                      out_valid,
  output logic [4:0][7:0]           col_y,     // [0]=Y(m-4,n) ... [4]=Y(m,n)
  output cbcr_t                     cbcr_m2    // CbCr(m-2, n)
);

  logic [7:0]  ybuf [4][LINE_W];
  logic [15:0] cbuf [2][LINE_W];

  logic [3:0][7:0] yq;
  logic [15:0]     cq;
  logic [7:0]      y_byp;
  logic [1:0]      rd_sel_q;
  logic            en_q;

  // Luminance line buffers: synchronous read of the old contents, then write.
  for (genvar i = 0; i < 4; i++) begin : g_ylb
    always_ff @(posedge clk) begin
      if (en) begin
        yq[i] <= ybuf[i][col];
        if (wr_sel == 2'(i)) ybuf[i][col] <= in_ycbcr.y;
      end
    end
  end

  // Chroma line buffers: line m written into buffer m mod 2, line m-2 read.
  always_ff @(posedge clk) begin
    if (en) begin
      cq <= cbuf[wr_sel[0]][col];
      cbuf[wr_sel[0]][col] <= {in_ycbcr.cb, in_ycbcr.cr};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q     <= 1'b0;
      rd_sel_q <= '0;
      y_byp    <= '0;
    end else begin
      en_q <= en;
      if (en) begin
        rd_sel_q <= rd_sel;
        y_byp    <= in_ycbcr.y;
      end
    end
  end

  // Read data switch and column registers. Buffer (m+k) mod 4 holds line
  // m-4+k, for k = 0..3.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      col_y     <= '0;
      cbcr_m2   <= '0;
    end else begin
      out_valid <= en_q;
      if (en_q) begin
        for (int k = 0; k < 4; k++) col_y[k] <= yq[2'(rd_sel_q + 2'(k))];
        col_y[4] <= y_byp;
        cbcr_m2  <= cq;
      end
    end
  end

endmodule

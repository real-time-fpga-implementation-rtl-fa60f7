// output_memory (OM): puts the interpolated HD pixels into raster order.
//
// The interpolator delivers, for every SD pixel, the HD pixels of up to two
// HD lines (phase vp = 0 and vp = 1), so pixels of two output lines arrive
// interleaved. Two line buffers of HD line length hold them: a pixel of HD
// line z is written into buffer z mod 2 at its column. When the last SD pixel
// of a line has been interpolated (row_done), the HD lines that SD line
// produced are queued, and a reader sends each queued line out, column
// COL_FIRST to COL_LAST, one pixel per clock, in line order. Reading is much
// faster than the writing of the next lines (one pixel per clock against at
// most 1.5 columns per DR clocks), so the reader always stays ahead of the
// writer in the buffer it shares with it. Two line buffers of the HD width
// follow the design description; the line queue and the read-out policy are
// this implementation's.
//
// Timing: out_* follow the read by one clock (synchronous RAM). out_sol /
// out_eol mark the first and last pixel of a line. `overflow` flags a row
// queue overrun (sticky until reset).
module output_memory
  import mrs_pkg::*;
#(
  parameter int unsigned LINE_W    = hd_size(SD_W),
  parameter int unsigned COL_FIRST = hd_first(),
  parameter int unsigned COL_LAST  = hd_last(SD_W)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  ycbcr_t             in_ycbcr,
  input  logic [COORD_W-1:0] in_row,
  input  logic [COORD_W-1:0] in_col,
  input  logic               row_done,
  input  logic [COORD_W-1:0] row_done_first,
  input  logic [1:0]         row_done_cnt,
  output logic               out_valid,
  output ycbcr_t             out_ycbcr,
  output logic [COORD_W-1:0] out_row,
  output logic [COORD_W-1:0] out_col,
  output logic               out_sol,
  output logic               out_eol,
  output logic               overflow
);

  localparam int unsigned AW = $clog2(LINE_W);

  // ---- line buffers ----------------------------------------------------------
  logic [23:0] lb [2][LINE_W];

  always_ff @(posedge clk) begin
    if (in_valid) lb[in_row[0]][AW'(in_col)] <= in_ycbcr;
  end

  // ---- queue of completed HD lines -----------------------------------------
  localparam int unsigned QD = 4;
  logic [QD-1:0][COORD_W-1:0] q;
  logic [2:0]                 q_cnt;
  logic                       pop;
  logic [1:0]                 push_n;

  assign push_n = row_done ? row_done_cnt : 2'd0;

  logic [QD-1:0][COORD_W-1:0] nq;
  logic [2:0]                 nc;
  logic                       ovf;

  always_comb begin
    nq  = q;
    nc  = q_cnt;
    ovf = 1'b0;
    if (pop) begin
      for (int i = 0; i < QD - 1; i++) nq[i] = nq[i+1];
      nc = nc - 1'b1;
    end
    for (int j = 0; j < 2; j++)
      if (2'(j) < push_n) begin
        if (nc < 3'(QD)) begin
          nq[nc[1:0]] = row_done_first + COORD_W'(j);
          nc = nc + 1'b1;
        end else begin
          ovf = 1'b1;
        end
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q        <= '0;
      q_cnt    <= '0;
      overflow <= 1'b0;
    end else begin
      q     <= nq;
      q_cnt <= nc;
      if (ovf) overflow <= 1'b1;
    end
  end

  // ---- reader ------------------------------------------------------------------
  logic               busy;
  logic [COORD_W-1:0] rd_row, rd_col;
  logic               rd_en, rd_first, rd_last;

  assign pop = !busy && (q_cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      rd_row <= '0;
      rd_col <= '0;
    end else if (pop) begin
      busy   <= 1'b1;
      rd_row <= q[0];
      rd_col <= COORD_W'(COL_FIRST);
    end else if (busy) begin
      if (rd_col == COORD_W'(COL_LAST)) busy <= 1'b0;
      else                              rd_col <= rd_col + 1'b1;
    end
  end

  assign rd_en    = busy;
  assign rd_first = (rd_col == COORD_W'(COL_FIRST));
  assign rd_last  = (rd_col == COORD_W'(COL_LAST));

  logic [23:0] rd_q;
  always_ff @(posedge clk) begin
    if (rd_en) rd_q <= lb[rd_row[0]][AW'(rd_col)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_row   <= '0;
      out_col   <= '0;
      out_sol   <= 1'b0;
      out_eol   <= 1'b0;
    end else begin
      out_valid <= rd_en;
      out_sol   <= rd_en && rd_first;
      out_eol   <= rd_en && rd_last;
      if (rd_en) begin
        out_row <= rd_row;
        out_col <= rd_col;
      end
    end
  end

  assign out_ycbcr = rd_q;

endmodule

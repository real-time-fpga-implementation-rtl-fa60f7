// control_unit (CU): pixel/line counting, line buffer control, the 5x5
// window and the per-pixel phase / output-select information.
//
// The CU counts input pixels (strobes `in_en` with data enable high) into the
// column counter n and lines into the line counter m; the falling edge of data
// enable ends a line and an active vertical sync restarts the frame. For each
// input pixel it addresses the input memory (column n, line select m mod 4)
// and, when the 5x1 column comes back, shifts it into the 5x5 window register.
// Column n enters on the left, so after the shift the window holds lines
// m-4..m and columns n..n-4 and its centre is Y(m-2,n-2).
//
// As in the design description, a window is processed only where the whole
// 5x5 aperture lies inside the picture (centres 2..H-3 and 2..W-3, the loop
// bounds of the algorithm); for those the CU raises tok_start for one clock
// with the window, the chroma of the centre, and the HD coordinates and keep
// flags of both phases on each axis (from z = floor(y*L) mapping; for L = 1.5
// only the pixels of the output-select table survive). row_end marks the last
// centre of an SD line.
//
// Timing: tok_start follows the pixel strobe by 4 clocks (2 in the input
// memory, 1 window shift, 1 token register); the window stays stable until the
// next pixel, which arrives every DR clocks in the intended use.
module control_unit
  import mrs_pkg::*;
#(
  parameter int unsigned IMG_W  = SD_W,
  parameter int unsigned IMG_H  = SD_H,
  parameter bit          VS_POL = 1'b0   // active level of in_vsync
) (
  input  logic                clk,
  input  logic                rst_n,
  // input video (strobed at the input pixel rate)
  input  logic                in_en,
  input  logic                in_de,
  input  logic                in_vsync,
  input  ycbcr_t              in_ycbcr,
  // input memory control
  output logic                im_en,
  output logic [COORD_W-1:0]  im_col,
  output logic [1:0]          im_wr_sel,
  output logic [1:0]          im_rd_sel,
  output ycbcr_t              im_ycbcr,
  input  logic                im_valid,
  input  logic [4:0][7:0]     im_col_y,
  input  cbcr_t               im_cbcr,
  // window token towards FE / CL / IN
  output logic                tok_start,
  output win5_t               tok_win,
  output token_meta_t         tok_meta,
  // position of the current input pixel
  output logic [COORD_W-1:0]  line_cnt,
  output logic [COORD_W-1:0]  col_cnt
);

  logic [COORD_W-1:0] m, n;
  logic               de_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m       <= '0;
      n       <= '0;
      de_prev <= 1'b0;
    end else if (in_en) begin
      de_prev <= in_de;
      if (in_vsync == VS_POL) begin
        m <= '0;
        n <= '0;
      end else if (in_de) begin
        n <= n + 1'b1;
      end else if (de_prev) begin
        m <= m + 1'b1;
        n <= '0;
      end
    end
  end

  assign line_cnt = m;
  assign col_cnt  = n;

  // Memory control
  always_comb begin
    im_en     = in_en && in_de && (in_vsync != VS_POL);
    im_col    = n;
    im_wr_sel = m[1:0];
    im_rd_sel = m[1:0];
    im_ycbcr  = in_ycbcr;
  end

  // Position of the pixel whose column the IM is returning (2-clock latency).
  logic [COORD_W-1:0] m_q1, n_q1, m_q2, n_q2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_q1 <= '0; n_q1 <= '0; m_q2 <= '0; n_q2 <= '0;
    end else begin
      if (im_en) begin
        m_q1 <= m;
        n_q1 <= n;
      end
      m_q2 <= m_q1;
      n_q2 <= n_q1;
    end
  end

  // Window shift register and chroma delay (column n-2 is the centre).
  win5_t              win;
  cbcr_t [2:0]        csh;
  logic               shifted;
  logic [COORD_W-1:0] m_w, n_w;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win     <= '0;
      csh     <= '0;
      shifted <= 1'b0;
      m_w     <= '0;
      n_w     <= '0;
    end else begin
      shifted <= im_valid;
      if (im_valid) begin
        for (int r = 0; r < 5; r++) begin
          for (int c = 4; c > 0; c--) win[r][c] <= win[r][c-1];
          win[r][0] <= im_col_y[r];
        end
        csh <= {csh[1:0], im_cbcr};
        m_w <= m_q2;
        n_w <= n_q2;
      end
    end
  end

  // Token: centre (m-2, n-2), only where the full aperture is inside.
  logic [COORD_W-1:0] r_c, c_c;
  assign r_c = m_w - COORD_W'(2);
  assign c_c = n_w - COORD_W'(2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tok_start <= 1'b0;
      tok_win   <= '0;
      tok_meta  <= '0;
    end else begin
      tok_start <= 1'b0;
      if (shifted && (m_w >= COORD_W'(4)) && (n_w >= COORD_W'(4))
          && (m_w < COORD_W'(IMG_H)) && (n_w < COORD_W'(IMG_W))) begin
        tok_start        <= 1'b1;
        tok_win          <= win;
        tok_meta.vmap    <= axis_map(r_c);
        tok_meta.hmap    <= axis_map(c_c);
        tok_meta.row_end <= (c_c == COORD_W'(IMG_W - 3));
        tok_meta.cbcr    <= csh[2];
      end
    end
  end

endmodule

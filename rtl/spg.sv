// spg: sub-pel generator of the sub-pel engine.
//
// Holds a 24x24 window of integer reference pixels (REG_i), loaded eight
// pixels per write from the search-window RAM, around a 16x16 block at an
// integer vector: window pixel (u, v) is block-relative pixel (u-3, v-3).
// The half-pel stage then computes, one window row per cycle over 18
// cycles, three planes of half pixels for integer positions 2..19:
// horizontal halves (REG_h), vertical halves (REG_v) and centre halves
// (REG_c), with the H.264 six-tap filter (1, -5, 20, 20, -5, 1); the centre
// half is filtered from the unrounded horizontal intermediates. The
// quarter-pel blender (a two-tap rounding average per output pixel) then
// gives 64 pixels per cycle: four 4x4 blocks, chosen by their block indices
// (4*row + column inside the 16x16 block), displaced by a quarter-pel offset
// (qx, qy) with qx in -2..2 and qy in -3..3 from the integer vector.
//
// The six-tap half-pel and two-tap quarter-pel structure and the 64-pixel
// output follow the design. Computing the planes row-serially from a
// loaded window, instead of the design's 14 half-pel blenders fed by
// integer-pixel shift chains, is this design's simplification.
//
// Timing: win_we writes 8 pixels at the next edge; half_start begins the
// 18-cycle plane computation and half_done is high from its end until the
// next half_start or window write; the quarter outputs are combinational
// from the planes.
module spg
  import me_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        win_we,
  input  logic [4:0]  win_row,    // 0..23
  input  logic [1:0]  win_col8,   // 0..2: pixels 8*win_col8 .. +7
  input  line_t       win_data,
  input  logic        half_start,
  output logic        half_done,
  input  logic signed [2:0] qx,   // -2..2
  input  logic signed [2:0] qy,   // -3..3
  input  logic [3:0]  blk_idx [4],
  output pix_t        qpel [4][16]
);
  localparam int WN = 24;   // window edge
  localparam int PN = 18;   // plane edge, integer positions 2..19

  pix_t win [WN][WN];       // REG_i
  pix_t hp [PN][PN];        // REG_h: between (x, y) and (x+1, y)
  pix_t vp [PN][PN];        // REG_v: between (x, y) and (x, y+1)
  pix_t cp [PN][PN];        // REG_c: centre of the four
  logic [4:0] hrow;
  logic       hbusy;

  function automatic int tap6(int e, int f, int g, int h, int i, int j);
    return e - 5 * f + 20 * g + 20 * h - 5 * i + j;
  endfunction

  function automatic pix_t clip8(int v);
    if (v < 0) return 8'd0;
    if (v > 255) return 8'd255;
    return 8'(v);
  endfunction

  // unrounded horizontal six-tap intermediate at window (x+0.5, y)
  function automatic int hraw(int x, int y);
    return tap6(int'(win[y][x-2]), int'(win[y][x-1]), int'(win[y][x]),
                int'(win[y][x+1]), int'(win[y][x+2]), int'(win[y][x+3]));
  endfunction

  // half pixels of window row hrow+2, positions 2..19
  pix_t hrow_h [PN], hrow_v [PN], hrow_c [PN];
  always_comb begin
    for (int c = 0; c < PN; c++) begin
      int x, y;
      x = c + 2;
      y = int'(hrow) + 2;
      if (y > 19) y = 19;
      hrow_h[c] = clip8((hraw(x, y) + 16) >>> 5);
      hrow_v[c] = clip8((tap6(int'(win[y-2][x]), int'(win[y-1][x]), int'(win[y][x]),
                              int'(win[y+1][x]), int'(win[y+2][x]), int'(win[y+3][x])) + 16) >>> 5);
      hrow_c[c] = clip8((tap6(hraw(x, y-2), hraw(x, y-1), hraw(x, y),
                              hraw(x, y+1), hraw(x, y+2), hraw(x, y+3)) + 512) >>> 10);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hrow <= '0;
      hbusy <= 1'b0;
      half_done <= 1'b0;
    end else begin
      if (win_we) begin
        for (int i = 0; i < LINE; i++) win[win_row][8 * int'(win_col8) + i] <= win_data[i];
        half_done <= 1'b0;
      end
      if (half_start) begin
        hbusy <= 1'b1;
        hrow <= '0;
        half_done <= 1'b0;
      end else if (hbusy) begin
        for (int c = 0; c < PN; c++) begin
          hp[hrow][c] <= hrow_h[c];
          vp[hrow][c] <= hrow_v[c];
          cp[hrow][c] <= hrow_c[c];
        end
        if (int'(hrow) == PN - 1) begin
          hbusy <= 1'b0;
          half_done <= 1'b1;
        end
        hrow <= hrow + 5'd1;
      end
    end
  end

  function automatic pix_t avg(pix_t a, pix_t b);
    return 8'((9'(a) + 9'(b) + 9'd1) >> 1);
  endfunction

  // quarter-pel blender
  always_comb begin
    for (int k = 0; k < 4; k++)
      for (int p = 0; p < 16; p++) begin
        int x4, y4, ix, iy, px, py;
        pix_t G, Hn, M, b, h, j, s, m;
        x4 = (int'(blk_idx[k][1:0]) * 4 + p % 4 + 3) * 4 + int'(qx);
        y4 = (int'(blk_idx[k][3:2]) * 4 + p / 4 + 3) * 4 + int'(qy);
        ix = x4 >>> 2;
        iy = y4 >>> 2;
        px = ix - 2;
        py = iy - 2;
        G  = win[iy][ix];
        Hn = win[iy][ix+1];
        M  = win[iy+1][ix];
        b  = hp[py][px];
        h  = vp[py][px];
        j  = cp[py][px];
        s  = hp[py+1][px];
        m  = vp[py][px+1];
        unique case ({2'(x4 & 3), 2'(y4 & 3)})
          4'b00_00: qpel[k][p] = G;
          4'b01_00: qpel[k][p] = avg(G, b);
          4'b10_00: qpel[k][p] = b;
          4'b11_00: qpel[k][p] = avg(b, Hn);
          4'b00_01: qpel[k][p] = avg(G, h);
          4'b00_10: qpel[k][p] = h;
          4'b00_11: qpel[k][p] = avg(h, M);
          4'b01_01: qpel[k][p] = avg(b, h);
          4'b11_01: qpel[k][p] = avg(b, m);
          4'b01_11: qpel[k][p] = avg(h, s);
          4'b11_11: qpel[k][p] = avg(m, s);
          4'b10_01: qpel[k][p] = avg(b, j);
          4'b10_11: qpel[k][p] = avg(j, s);
          4'b01_10: qpel[k][p] = avg(h, j);
          4'b11_10: qpel[k][p] = avg(j, m);
          default:  qpel[k][p] = j;
        endcase
      end
  end
endmodule

// spe: sub-pel processor element, one 4x4 SATD per cycle.
//
// Sixteen subtractors form the 4x4 difference block (original minus
// interpolated reference, pixel i = 4*row + column). A first stage of four
// HDMs transforms each row; the cross-wiring hands the k-th output of every
// row to the k-th HDM of the second stage, which transforms the columns.
// An absolute-value and adder tree sums the sixteen coefficients. The
// structure follows the design; the output is the plain sum of absolute
// transformed differences (no halving), which is this design's choice.
// Purely combinational.
module spe
  import me_pkg::*;
(
  input  pix_t        org [16],
  input  pix_t        ref_px [16],
  output logic [15:0] satd
);
  logic signed [8:0]  d  [4][4];
  logic signed [10:0] s1 [4][4];   // after row transform: s1[row][k]
  logic signed [10:0] c_in [4][4]; // cross-wired: c_in[k][row]
  logic signed [12:0] s2 [4][4];

  always_comb
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        d[r][c] = $signed({1'b0, org[4*r+c]}) - $signed({1'b0, ref_px[4*r+c]});

  for (genvar r = 0; r < 4; r++) begin : g_row
    hdm #(.IW(9)) u_hdm (.x(d[r]), .y(s1[r]));
  end

  always_comb
    for (int k = 0; k < 4; k++)
      for (int r = 0; r < 4; r++)
        c_in[k][r] = s1[r][k];

  for (genvar k = 0; k < 4; k++) begin : g_col
    hdm #(.IW(11)) u_hdm (.x(c_in[k]), .y(s2[k]));
  end

  // |coefficient| <= 16 * 255 = 4080, which fits the 13-bit signed range
  logic [12:0] mag [4][4];
  always_comb begin
    satd = '0;
    for (int k = 0; k < 4; k++)
      for (int r = 0; r < 4; r++) begin
        mag[k][r] = s2[k][r] < 0 ? 13'(-s2[k][r]) : 13'(s2[k][r]);
        satd += 16'(mag[k][r]);
      end
  end
endmodule

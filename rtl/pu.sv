// pu: processor unit of the sub-pel engine, a 64-way SIMD of four SPEs.
//
// Each cycle it takes four 4x4 blocks of original pixels and the four
// matching 4x4 blocks of interpolated reference pixels (64 pixel pairs)
// and gives the four 4x4 SATDs, registered. Latency one cycle; out_valid
// follows in_valid.
module pu
  import me_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  pix_t        org [4][16],
  input  pix_t        ref_px [4][16],
  output logic        out_valid,
  output logic [15:0] satd [4]
);
  logic [15:0] satd_c [4];
  for (genvar k = 0; k < 4; k++) begin : g_spe
    spe u_spe (.org(org[k]), .ref_px(ref_px[k]), .satd(satd_c[k]));
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < 4; k++) satd[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) satd <= satd_c;
    end
  end
endmodule

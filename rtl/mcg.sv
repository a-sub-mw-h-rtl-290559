// mcg: motion cost generator.
//
// The cost added to a candidate's SATD is lambda times the number of bits
// needed to code the motion-vector difference, the quarter-pel vector minus
// the predicted vector, each component coded as a signed Exp-Golomb value.
// The design names this unit and its purpose; the rate estimate and the
// lambda input are this design's choice. Purely combinational.
module mcg
  import me_pkg::*;
(
  input  qmv_t        mv,
  input  qmv_t        pmv,
  input  logic [7:0]  lambda,
  output logic [15:0] cost
);
  logic signed [10:0] dx, dy;
  logic [6:0] bits;
  always_comb begin
    dx = 11'(mv.x) - 11'(pmv.x);
    dy = 11'(mv.y) - 11'(pmv.y);
    bits = 7'(se_bits(dx)) + 7'(se_bits(dy));
    cost = 16'(lambda) * 16'(bits);
  end
endmodule

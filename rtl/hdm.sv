// hdm: one-dimensional 4-point Hadamard transformer.
//
// Butterfly form: t0 = x0+x1, t1 = x0-x1, t2 = x2+x3, t3 = x2-x3, then
// y0 = t0+t2, y1 = t1+t3, y2 = t0-t2, y3 = t1-t3. Each output is a +-1
// combination of the four inputs (a row of the order-4 Hadamard matrix), so
// two stages with a transposing cross-wiring give the 2-D transform used
// for SATD. Purely combinational; outputs are two bits wider than inputs.
module hdm #(
  parameter int IW = 9  // input width, signed
) (
  input  logic signed [IW-1:0]   x [4],
  output logic signed [IW+1:0]   y [4]
);
  logic signed [IW:0] t [4];
  always_comb begin
    t[0] = (IW+1)'(x[0]) + (IW+1)'(x[1]);
    t[1] = (IW+1)'(x[0]) - (IW+1)'(x[1]);
    t[2] = (IW+1)'(x[2]) + (IW+1)'(x[3]);
    t[3] = (IW+1)'(x[2]) - (IW+1)'(x[3]);
    y[0] = (IW+2)'(t[0]) + (IW+2)'(t[2]);
    y[1] = (IW+2)'(t[1]) + (IW+2)'(t[3]);
    y[2] = (IW+2)'(t[0]) - (IW+2)'(t[2]);
    y[3] = (IW+2)'(t[1]) - (IW+2)'(t[3]);
  end
endmodule

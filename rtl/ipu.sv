// ipu: integer-pel processing unit of the IME.
//
// Two 8-pixel registers, REG_TB (template, current picture) and REG_SW
// (search window, reference picture), feed an 8-way SIMD absolute-difference
// unit and adder tree; the 11-bit output is the SAD of the eight pixel pairs
// held in the registers. Each register loads only when its enable is high,
// so the template line can be held while reference lines stream past it,
// as the systolic-array schedule needs. The register contents are brought
// out so that a second IPU can take them over one cycle later.
//
// Timing: registers load on the rising clock edge; sad is combinational
// from the registers.
module ipu
  import me_pkg::*;
(
  input  logic  clk,
  input  logic  ld_tb,
  input  logic  ld_sw,
  input  line_t tb_in,
  input  line_t sw_in,
  output line_t reg_tb,
  output line_t reg_sw,
  output logic [10:0] sad
);

  always_ff @(posedge clk) begin
    if (ld_tb) reg_tb <= tb_in;
    if (ld_sw) reg_sw <= sw_in;
  end

  always_comb begin
    sad = '0;
    for (int i = 0; i < LINE; i++)
      sad += (reg_tb[i] > reg_sw[i]) ? 11'(reg_tb[i] - reg_sw[i]) : 11'(reg_sw[i] - reg_tb[i]);
  end

endmodule

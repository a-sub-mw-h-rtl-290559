// tb_mcg: self-checking testbench of the motion cost generator.
// Random vectors, predictors and weights; reference: lambda times the
// summed lengths of the two signed Exp-Golomb codes of the difference.
module tb_mcg;
  import me_pkg::*;
  import me_ref_pkg::*;
  qmv_t mv, pmv;
  logic [7:0] lambda;
  logic [15:0] cost;
  int checks = 0, failures = 0;

  mcg dut (.*);

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int e;
      mv.x = 10'(int'($urandom % 241) - 120);
      mv.y = 10'(int'($urandom % 241) - 120);
      pmv.x = 10'(int'($urandom % 241) - 120);
      pmv.y = 10'(int'($urandom % 241) - 120);
      if (n % 7 == 0) pmv = mv;
      lambda = 8'($urandom);
      #1;
      e = int'(lambda) * (se_len(int'(mv.x) - int'(pmv.x)) + se_len(int'(mv.y) - int'(pmv.y)));
      checks++;
      if (int'(cost) != e) begin
        failures++;
        if (failures < 10) $display("FAIL cost %0d expected %0d", cost, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

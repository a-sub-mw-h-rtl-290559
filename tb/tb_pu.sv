// tb_pu: self-checking testbench of the 64-way SIMD processor unit.
// Drives four random 4x4 block pairs per cycle with a random valid and
// checks, one cycle later, the four registered SATDs and out_valid.
module tb_pu;
  import me_pkg::*;
  import me_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  pix_t org [4][16], ref_px [4][16];
  logic [15:0] satd [4];
  int exp [4];
  int checks = 0, failures = 0;
  logic exp_v;

  always #5 clk = ~clk;
  pu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) exp[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      if (n > 0) begin
        checks++;
        if (out_valid != exp_v) begin failures++; $display("FAIL out_valid"); end
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (int'(satd[k]) != exp[k]) begin failures++; $display("FAIL spe %0d: %0d vs %0d", k, satd[k], exp[k]); end
        end
      end
      in_valid = ($urandom % 4) != 0;
      exp_v = in_valid;
      for (int k = 0; k < 4; k++) begin
        int d [16];
        for (int i = 0; i < 16; i++) begin
          org[k][i] = 8'($urandom);
          ref_px[k][i] = 8'($urandom);
          d[i] = int'(org[k][i]) - int'(ref_px[k][i]);
        end
        if (in_valid) exp[k] = satd4(d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

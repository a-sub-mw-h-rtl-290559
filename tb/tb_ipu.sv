// tb_ipu: self-checking testbench of the integer-pel processing unit.
// Loads random template and reference lines with random load enables and
// checks the held register contents and the 8-pixel SAD against a model.
module tb_ipu;
  import me_pkg::*;
  logic clk = 0, ld_tb, ld_sw;
  line_t tb_in, sw_in, reg_tb, reg_sw;
  logic [10:0] sad;
  line_t m_tb, m_sw;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  ipu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    ld_tb = 1; ld_sw = 1;
    for (int i = 0; i < 8; i++) begin tb_in[i] = 8'($urandom); sw_in[i] = 8'($urandom); end
    m_tb = tb_in; m_sw = sw_in;
    for (int n = 0; n < 2000; n++) begin
      int e;
      @(negedge clk);
      e = 0;
      for (int i = 0; i < 8; i++) e += (m_tb[i] > m_sw[i]) ? m_tb[i] - m_sw[i] : m_sw[i] - m_tb[i];
      checks += 3;
      if (int'(sad) != e) begin failures++; $display("FAIL sad %0d expected %0d", sad, e); end
      if (reg_tb != m_tb) begin failures++; $display("FAIL reg_tb"); end
      if (reg_sw != m_sw) begin failures++; $display("FAIL reg_sw"); end
      ld_tb = ($urandom % 3) != 0;
      ld_sw = ($urandom % 3) != 0;
      for (int i = 0; i < 8; i++) begin
        tb_in[i] = (n % 50 == 0) ? 8'hFF : 8'($urandom);
        sw_in[i] = (n % 50 == 0) ? 8'h00 : 8'($urandom);
      end
      if (ld_tb) m_tb = tb_in;
      if (ld_sw) m_sw = sw_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

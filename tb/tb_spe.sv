// tb_spe: self-checking testbench of the 4x4 SATD processor element.
// Random and extreme 4x4 blocks; reference: sum of |H D H^T| with the
// order-4 Hadamard matrix.
module tb_spe;
  import me_pkg::*;
  import me_ref_pkg::*;
  pix_t org [16], ref_px [16];
  logic [15:0] satd;
  int checks = 0, failures = 0;

  spe dut (.*);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int d [16];
      for (int i = 0; i < 16; i++) begin
        case (n % 4)
          0: begin org[i] = 8'($urandom); ref_px[i] = 8'($urandom); end
          1: begin org[i] = (i % 2) ? 8'hFF : 8'h00; ref_px[i] = (i % 2) ? 8'h00 : 8'hFF; end
          2: begin org[i] = 8'hFF; ref_px[i] = 8'h00; end
          default: begin org[i] = 8'($urandom % 16 + 100); ref_px[i] = 8'($urandom % 16 + 100); end
        endcase
        d[i] = int'(org[i]) - int'(ref_px[i]);
      end
      #1;
      checks++;
      if (int'(satd) != satd4(d)) begin
        failures++;
        if (failures < 10) $display("FAIL satd %0d expected %0d", satd, satd4(d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_me_sram: self-checking testbench of the spiral-mapped three-port SRAM.
//
// Fills the whole picture through the write port with random pixels at
// unaligned horizontal positions, then issues random row and column reads
// of eight pixels on both read ports at once and compares them, one cycle
// later, with a plain picture array. It also checks that a read in the same
// cycle as a write to that pixel returns the old value.
module tb_me_sram;
  import me_pkg::*;
  localparam int W = 80, H = 256;
  logic clk = 0;
  logic we = 0;
  logic [7:0] wx, wy;
  line_t wdata;
  rd_req_t rd [2];
  line_t rdata [2];
  int pic [H][W];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  me_sram #(.W(W), .H(H)) dut (.*);

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd[0] = '0; rd[1] = '0;
    // aligned fill, then unaligned overwrites
    for (int y = 0; y < H; y++)
      for (int xw = 0; xw < W / 8; xw++) begin
        @(negedge clk);
        we = 1; wx = 8'(8 * xw); wy = 8'(y);
        for (int i = 0; i < 8; i++) begin wdata[i] = 8'($urandom); pic[y][8 * xw + i] = int'(wdata[i]); end
      end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = 1; wx = 8'($urandom % (W - 7)); wy = 8'($urandom % H);
      for (int i = 0; i < 8; i++) begin wdata[i] = 8'($urandom); pic[wy][wx + i] = int'(wdata[i]); end
    end
    @(negedge clk) we = 0;
    for (int n = 0; n < 4000; n++) begin
      int exp [2][8];
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        rd[p].en = 1;
        rd[p].vert = $urandom % 2;
        rd[p].x = 8'(rd[p].vert ? $urandom % W : $urandom % (W - 7));
        rd[p].y = 8'(rd[p].vert ? $urandom % (H - 7) : $urandom % H);
        for (int i = 0; i < 8; i++)
          exp[p][i] = rd[p].vert ? pic[rd[p].y + i][rd[p].x] : pic[rd[p].y][rd[p].x + i];
      end
      @(negedge clk);
      rd[0].en = 0; rd[1].en = 0;
      for (int p = 0; p < 2; p++)
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (int'(rdata[p][i]) != exp[p][i]) begin
            failures++;
            if (failures < 10) $display("FAIL port %0d lane %0d got %0d expected %0d", p, i, rdata[p][i], exp[p][i]);
          end
        end
    end
    // read during write of the same pixels returns the old data
    @(negedge clk);
    we = 1; wx = 8; wy = 3;
    for (int i = 0; i < 8; i++) wdata[i] = 8'(~pic[3][8 + i]);
    rd[0] = '{en: 1'b1, x: 8'd8, y: 8'd3, vert: 1'b0};
    @(negedge clk);
    we = 0; rd[0].en = 0;
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (int'(rdata[0][i]) != pic[3][8 + i]) begin failures++; $display("FAIL read-during-write lane %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

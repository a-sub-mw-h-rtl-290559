// tb_spg: self-checking testbench of the sub-pel generator.
// Loads a 24x24 window of a reference picture, runs the half-pel stage,
// checks its 18-cycle duration, then checks all 64 output pixels for all
// 35 quarter-pel offsets and every group of four 4x4 blocks against the
// H.264 interpolation equations evaluated on the whole picture.
module tb_spg;
  import me_pkg::*;
  import me_ref_pkg::*;
  logic clk = 0, rst_n = 0, win_we = 0, half_start = 0, half_done;
  logic [4:0] win_row;
  logic [1:0] win_col8;
  line_t win_data;
  logic signed [2:0] qx, qy;
  logic [3:0] blk_idx [4];
  pix_t qpel [4][16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  spg dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2; t++) begin
      int wx0, wy0, n;
      make_pictures(t * 11 + 1);
      if (t == 1)  // saturating content
        for (int y = 0; y < 64; y++) for (int x = 0; x < 64; x++) refp[y][x] = ((x ^ y) & 1) ? 255 : 0;
      wx0 = 8 + 3 * t; wy0 = 10 + 5 * t;
      for (int r = 0; r < 24; r++)
        for (int c = 0; c < 3; c++) begin
          @(negedge clk);
          win_we = 1; win_row = 5'(r); win_col8 = 2'(c);
          for (int i = 0; i < 8; i++) win_data[i] = 8'(refp[wy0 + r][wx0 + 8 * c + i]);
        end
      @(negedge clk) win_we = 0; half_start = 1;
      @(negedge clk) half_start = 0;
      n = 0;
      while (!half_done) begin @(negedge clk); n++; end
      checks++;
      if (n != 18) begin failures++; $display("FAIL half-pel stage took %0d cycles", n); end
      for (int pt = 0; pt < 35; pt++)
        for (int g = 0; g < 4; g++) begin
          qx = 3'(pt % 5 - 2); qy = 3'(pt / 5 - 3);
          for (int k = 0; k < 4; k++) blk_idx[k] = 4'((4 * g + k + 5 * pt) % 16);
          #1;
          for (int k = 0; k < 4; k++)
            for (int p = 0; p < 16; p++) begin
              int x, y, e;
              x = 4 * int'(blk_idx[k][1:0]) + p % 4;
              y = 4 * int'(blk_idx[k][3:2]) + p / 4;
              e = interp(4 * (wx0 + 3 + x) + int'(qx), 4 * (wy0 + 3 + y) + int'(qy));
              checks++;
              if (int'(qpel[k][p]) != e) begin
                failures++;
                if (failures < 10) $display("FAIL q(%0d,%0d) blk %0d px %0d: %0d vs %0d", qx, qy, blk_idx[k], p, qpel[k][p], e);
              end
            end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

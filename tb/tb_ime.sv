// tb_ime: self-checking testbench of the integer-pel engine.
//
// A behavioural two-port picture memory (one-cycle read latency, rows or
// columns of eight pixels) serves the engine from the reference model's
// pictures. Each trial builds a reference picture, cuts the current
// macroblock out of it at a known motion plus noise, supplies seven
// candidates (a noisy predicted vector, zero, random ones, some beyond the
// search range) and compares the four block vectors and SADs, the Mode-1
// vector and SAD and the cycle count with the reference model. It also
// checks that read ports #1 are used only in SIMD mode and that both
// datapath modes and the 1D-DS repetition occur.
module tb_ime;
  import me_pkg::*;
  import me_ref_pkg::*;

  localparam int SR = 27;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, simd_mode, ev_simd, ev_sa, ev_iter;
  mv_t cand [NCAND];
  logic [7:0] tb_x, tb_y, sw_x, sw_y;
  rd_req_t tb_rd [2], sw_rd [2];
  line_t tb_data [2], sw_data [2];
  mv_t mv_blk [4], mv_m1;
  logic [15:0] sad_blk [4], sad_m1, cycles;
  int checks = 0, failures = 0, n_simd = 0, n_sa = 0, n_iter = 0, port1_bad = 0;

  always #5 clk = ~clk;

  ime #(.SR(SR)) dut (.*);

  // behavioural SRAMs
  always_ff @(posedge clk)
    for (int p = 0; p < 2; p++) begin
      if (tb_rd[p].en)
        for (int i = 0; i < 8; i++)
          tb_data[p][i] <= 8'(tb_rd[p].vert ? curp[tb_rd[p].y + i][tb_rd[p].x] : curp[tb_rd[p].y][tb_rd[p].x + i]);
      if (sw_rd[p].en)
        for (int i = 0; i < 8; i++)
          sw_data[p][i] <= 8'(sw_rd[p].vert ? refp[sw_rd[p].y + i][sw_rd[p].x] : refp[sw_rd[p].y][sw_rd[p].x + i]);
    end

  always_ff @(posedge clk) begin
    if (ev_simd) n_simd++;
    if (ev_sa) n_sa++;
    if (ev_iter) n_iter++;
    if ((tb_rd[1].en || sw_rd[1].en) && !simd_mode) port1_bad++;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NCAND; i++) cand[i] = '0;
    tb_x = 0; tb_y = 16; sw_x = 32; sw_y = 32;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      v2_t c [7], mvb [4], mv1, truth;
      int sadb [4], sad1, cyc;
      make_pictures(t * 17);
      truth.x = int'($urandom % 41) - 20;
      truth.y = int'($urandom % 41) - 20;
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++)
          curp[16 + y][x] = clip(refp[32 + truth.y + y][32 + truth.x + x] + int'($urandom % 7) - 3);
      c[0].x = truth.x + int'($urandom % 13) - 6;
      c[0].y = truth.y + int'($urandom % 13) - 6;
      c[1] = '{0, 0};
      for (int i = 2; i < 7; i++) begin
        c[i].x = int'($urandom % 71) - 35;  // some beyond +-SR
        c[i].y = int'($urandom % 71) - 35;
      end
      for (int i = 0; i < 7; i++) cand[i] = '{x: 8'(c[i].x), y: 8'(c[i].y)};
      ime_ref(0, 16, 32, 32, SR, c, mvb, sadb, mv1, sad1, cyc);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      wait (done);
      @(negedge clk);
      for (int b = 0; b < 4; b++) begin
        check($sformatf("t%0d blk%0d mv.x", t, b), int'(mv_blk[b].x), mvb[b].x);
        check($sformatf("t%0d blk%0d mv.y", t, b), int'(mv_blk[b].y), mvb[b].y);
        check($sformatf("t%0d blk%0d sad", t, b), int'(sad_blk[b]), sadb[b]);
      end
      check($sformatf("t%0d m1.x", t), int'(mv_m1.x), mv1.x);
      check($sformatf("t%0d m1.y", t), int'(mv_m1.y), mv1.y);
      check($sformatf("t%0d m1 sad", t), int'(sad_m1), sad1);
      check($sformatf("t%0d cycles", t), int'(cycles), cyc);
    end
    check("read ports #1 only in SIMD mode", port1_bad, 0);
    checks++; if (n_simd != 12 * 15) begin failures++; $display("FAIL SIMD matches %0d", n_simd); end
    checks++; if (n_sa == 0) begin failures++; $display("FAIL no systolic pass"); end
    checks++; if (n_iter == 0) begin failures++; $display("FAIL 1D-DS never repeated"); end
    $display("SIMD matches %0d, systolic passes %0d, 1D-DS repeats %0d", n_simd, n_sa, n_iter);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

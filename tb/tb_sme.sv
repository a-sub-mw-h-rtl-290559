// tb_sme: self-checking testbench of the sub-pel engine.
//
// A behavioural memory serves read ports #1 of both SRAMs from the
// reference model's pictures with one cycle of latency; the port grant is
// withdrawn at random to force load stalls. The current macroblock is the
// reference picture interpolated at a quarter-pel motion, so the search
// has an exact match to find. Each trial compares the best quarter-pel
// vector and cost of all 41 partitions of Modes 1-7 with the reference
// model (straight H.264 interpolation, matrix-product SATD, Exp-Golomb
// rate), and the cycle count with the schedule's formula. One trial has
// MV_A equal to MV_Mode1, so the skipped search is exercised; in another
// the bottom half moves elsewhere, so Modes 4-7 must take their results
// from the search around MV_B.
module tb_sme;
  import me_pkg::*;
  import me_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, port_req, port_gnt, ev_stall, ev_skip;
  mv_t mv_in [5];
  qmv_t pmv;
  logic [7:0] lambda, tb_x, tb_y, sw_x, sw_y;
  rd_req_t tb_rd, sw_rd;
  line_t tb_data, sw_data;
  qmv_t best_mv [NPART];
  logic [23:0] best_cost [NPART];
  logic [15:0] cycles;
  int checks = 0, failures = 0, n_stall = 0, n_skip = 0;

  always #5 clk = ~clk;

  sme dut (.*);

  always_ff @(posedge clk) begin
    if (tb_rd.en)
      for (int i = 0; i < 8; i++) tb_data[i] <= 8'(curp[tb_rd.y][tb_rd.x + i]);
    if (sw_rd.en)
      for (int i = 0; i < 8; i++) sw_data[i] <= 8'(refp[sw_rd.y][sw_rd.x + i]);
    port_gnt <= ($urandom % 4) != 0;
    if (ev_stall) n_stall++;
    if (ev_skip) n_skip++;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int stall0;
    tb_x = 0; tb_y = 16; sw_x = 32; sw_y = 32; lambda = 4;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      v2_t mv [5], pq, bmv [41];
      int bcost [41], tqx, tqy, ncent, exp_cyc;
      make_pictures(t * 29 + 3);
      mv[0].x = int'($urandom % 41) - 20;
      mv[0].y = int'($urandom % 41) - 20;
      tqx = int'($urandom % 5) - 2;
      tqy = int'($urandom % 7) - 3;
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++)
          curp[16 + y][x] = interp(4 * (32 + x) + 4 * mv[0].x + tqx, 4 * (32 + y) + 4 * mv[0].y + tqy);
      for (int r = 1; r < 5; r++) begin
        mv[r].x = mv[0].x + int'($urandom % 5) - 2;
        mv[r].y = mv[0].y + int'($urandom % 5) - 2;
        if (mv[r].x == mv[0].x && mv[r].y == mv[0].y) mv[r].x++;
      end
      if (t == 1) mv[1] = mv[0];
      if (t == 2) begin
        // bottom half moves elsewhere: only the search around MV_B finds it,
        // so the bottom 8x8, 8x4, 4x8 and 4x4 results must come from there
        mv[2].x = mv[0].x + 5;
        mv[2].y = mv[0].y - 4;
        for (int y = 8; y < 16; y++)
          for (int x = 0; x < 16; x++)
            curp[16 + y][x] = interp(4 * (32 + x) + 4 * mv[2].x + 1, 4 * (32 + y) + 4 * mv[2].y - 1);
      end
      pq.x = 4 * mv[0].x + int'($urandom % 9) - 4;
      pq.y = 4 * mv[0].y + int'($urandom % 9) - 4;
      for (int r = 0; r < 5; r++) mv_in[r] = '{x: 8'(mv[r].x), y: 8'(mv[r].y)};
      pmv = '{x: 10'(pq.x), y: 10'(pq.y)};
      sme_ref(0, 16, 32, 32, mv, pq, 4, bmv, bcost);
      stall0 = n_stall;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      wait (done);
      @(negedge clk);
      for (int p = 0; p < NPART; p++) begin
        check($sformatf("t%0d part%0d mv.x", t, p), int'(best_mv[p].x), bmv[p].x);
        check($sformatf("t%0d part%0d mv.y", t, p), int'(best_mv[p].y), bmv[p].y);
        check($sformatf("t%0d part%0d cost", t, p), int'(best_cost[p]), bcost[p]);
      end
      // the exact match must be found
      if (t != 2) begin
        check($sformatf("t%0d mode1 finds the motion x", t), int'(best_mv[0].x), 4 * mv[0].x + tqx);
        check($sformatf("t%0d mode1 finds the motion y", t), int'(best_mv[0].y), 4 * mv[0].y + tqy);
      end else begin
        check("bottom 8x8 found from MV_B x", int'(best_mv[P_M4 + 3].x), 4 * mv[2].x + 1);
        check("bottom 8x8 found from MV_B y", int'(best_mv[P_M4 + 3].y), 4 * mv[2].y - 1);
        check("bottom 4x4 cost is the rate only", int'(best_cost[P_M7 + 15]),
              4 * (se_len(4 * mv[2].x + 1 - pq.x) + se_len(4 * mv[2].y - 1 - pq.y)));
      end
      // schedule: per centre 72 loads (+ stalls), 1 start and 20 half-pel cycles,
      // then per point (groups + 2) cycles
      ncent = (t == 1) ? 4 : 5;
      exp_cyc = 35 * (4 + 2) + (ncent - 1) * 35 * (2 + 2) + ncent * (72 + 1 + 20) + (n_stall - stall0);
      check($sformatf("t%0d cycles", t), int'(cycles), exp_cyc);
    end
    checks++; if (n_stall == 0) begin failures++; $display("FAIL no load stall"); end
    checks++; if (n_skip != 1) begin failures++; $display("FAIL skipped searches %0d", n_skip); end
    $display("load stalls %0d, skipped searches %0d", n_stall, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

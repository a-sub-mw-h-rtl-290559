// tb_me_top: end-to-end testbench of the motion estimation core at its
// default sizes, driven only through the CPU and memory buses.
//
// Five macroblocks go through the two-stage macroblock pipeline (six
// steps, the last one only drains the sub-pel engine). For every
// macroblock the host writes the template and the 80x80 search window of
// its slot over the 64-bit memory bus, writes the candidates and lambda
// over the CPU bus and starts a step. After each step the integer vectors
// of the macroblock just searched and the 41 sub-pel results of the
// macroblock before it are read back and compared with the reference
// model. Macroblock content is the reference picture interpolated at a
// quarter-pel motion; one macroblock moves its top and bottom halves
// differently. The test counts the mechanisms of the design and fails if
// one never happened: SIMD matches, systolic passes, 1D-DS repeats, the
// sub-pel engine stalling on read ports #1, read ports #1 serving each
// engine, both engines busy in the same cycle, and a sub-pel search
// skipped because its vector equals MV_Mode1.
module tb_me_top;
  import me_pkg::*;
  import me_ref_pkg::*;

  localparam int NMB = 5;
  localparam int SR = 27;
  logic clk = 0, rst_n = 0;
  logic cpu_we = 0, mem_we = 0, step_done;
  logic [7:0] cpu_addr = 0;
  logic [31:0] cpu_wdata = 0, cpu_rdata;
  logic [12:0] mem_addr = 0;
  logic [63:0] mem_wdata = 0;
  int checks = 0, failures = 0;
  int n_simd = 0, n_sa = 0, n_iter = 0, n_stall = 0, n_skip = 0, n_both = 0, n_p1_ime = 0, n_p1_sme = 0;

  always #5 clk = ~clk;

  me_top dut (.*);

  always_ff @(posedge clk) begin
    if (dut.ime_ev_simd) n_simd++;
    if (dut.ime_ev_sa) n_sa++;
    if (dut.ime_ev_iter) n_iter++;
    if (dut.sme_ev_stall) n_stall++;
    if (dut.sme_ev_skip) n_skip++;
    if (dut.ime_busy && dut.sme_busy) n_both++;
    if (dut.simd_mode && dut.sw_rd[1].en) n_p1_ime++;
    if (!dut.simd_mode && dut.sw_rd[1].en) n_p1_sme++;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic cpu_write(int a, int d);
    @(negedge clk);
    cpu_we = 1; cpu_addr = 8'(a); cpu_wdata = 32'(d);
    @(negedge clk);
    cpu_we = 0;
  endtask

  task automatic cpu_read(int a, output int d);
    @(negedge clk);
    cpu_addr = 8'(a);
    #1 d = int'(cpu_rdata);
  endtask

  function automatic int sx10(int v); return (v & 10'h200) ? (v & 10'h3FF) - 1024 : (v & 10'h3FF); endfunction
  function automatic int sx8(int v); return (v & 8'h80) ? (v & 8'hFF) - 256 : (v & 8'hFF); endfunction

  // MB bookkeeping for the reference model
  v2_t cands [NMB][7];
  v2_t imv [NMB][5];   // Mode1, A..D from the reference integer search

  // Build macroblock m in slot s and load it through the memory bus.
  task automatic load_mb(int m, int s);
    v2_t mtop, mbot;
    int seed = 7 * m + 2;
    for (int y = 0; y < 80; y++)
      for (int x = 0; x < 80; x++) begin
        real v;
        v = 128.0 + 55.0 * $sin((x + seed) / 6.0) + 45.0 * $cos((y * 1.3 + seed) / 7.0)
            + 10.0 * $sin((x + y) / 3.0);
        refp[80 * s + y][x] = clip(int'(v) + int'($urandom % 5));
      end
    mtop.x = 4 * (int'($urandom % 25) - 12) + int'($urandom % 5) - 2;
    mtop.y = 4 * (int'($urandom % 25) - 12) + int'($urandom % 7) - 3;
    mbot = mtop;
    if (m == 2) begin mbot.x = mtop.x + 9; mbot.y = mtop.y - 6; end
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) begin
        v2_t mq;
        mq = (y < 8) ? mtop : mbot;
        curp[16 * s + y][x] = interp(4 * (32 + x) + mq.x, 4 * (80 * s + 32 + y) + mq.y);
      end
    for (int y = 0; y < 16; y++)
      for (int xw = 0; xw < 2; xw++) begin
        @(negedge clk);
        mem_we = 1; mem_addr = {1'b0, 8'(16 * s + y), 4'(xw)};
        for (int i = 0; i < 8; i++) mem_wdata[8*i +: 8] = 8'(curp[16 * s + y][8 * xw + i]);
      end
    for (int y = 0; y < 80; y++)
      for (int xw = 0; xw < 10; xw++) begin
        @(negedge clk);
        mem_we = 1; mem_addr = {1'b1, 8'(80 * s + y), 4'(xw)};
        for (int i = 0; i < 8; i++) mem_wdata[8*i +: 8] = 8'(refp[80 * s + y][8 * xw + i]);
      end
    @(negedge clk) mem_we = 0;
    cands[m][0].x = mtop.x / 4 + int'($urandom % 9) - 4;
    cands[m][0].y = mtop.y / 4 + int'($urandom % 9) - 4;
    cands[m][1] = '{0, 0};
    for (int i = 2; i < 7; i++) begin
      cands[m][i].x = int'($urandom % 61) - 30;
      cands[m][i].y = int'($urandom % 61) - 30;
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int st, d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cpu_write(8'h01, 4);  // lambda
    for (int k = 0; k <= NMB; k++) begin
      int s;
      cpu_read(8'h00, st);
      s = (st >> 1) & 1;
      check($sformatf("step %0d slot", k), s, k % 2);
      if (k < NMB) begin
        v2_t mvb [4], mv1;
        int sadb [4], sad1, cyc;
        load_mb(k, s);
        for (int i = 0; i < 7; i++) cpu_write(8'h02 + i, ((cands[k][i].y & 255) << 8) | (cands[k][i].x & 255));
        ime_ref(0, 16 * s, 32, 80 * s + 32, SR, cands[k], mvb, sadb, mv1, sad1, cyc);
        imv[k][0] = mv1;
        for (int b = 0; b < 4; b++) imv[k][b + 1] = mvb[b];
      end
      cpu_write(8'h00, (k < NMB) ? 3 : 1);
      @(posedge step_done);
      @(negedge clk);
      if (k < NMB) begin
        for (int r = 0; r < 5; r++) begin
          cpu_read(r == 0 ? 8'h15 : 8'h10 + r, d);
          check($sformatf("mb %0d int mv %0d x", k, r), sx8(d), imv[k][r].x);
          check($sformatf("mb %0d int mv %0d y", k, r), sx8(d >> 8), imv[k][r].y);
        end
      end
      if (k > 0) begin
        v2_t bmv [41], pq;
        v2_t mvs [5];
        int bcost [41], sp;
        sp = 1 - (k % 2);  // slot of macroblock k-1
        mvs = imv[k - 1];
        pq.x = 4 * cands[k - 1][0].x;
        pq.y = 4 * cands[k - 1][0].y;
        sme_ref(0, 16 * sp, 32, 80 * sp + 32, mvs, pq, 4, bmv, bcost);
        cpu_read(8'h00, st);
        check($sformatf("mb %0d sub-pel valid", k - 1), (st >> 2) & 1, 1);
        for (int p = 0; p < NPART; p++) begin
          cpu_read(8'h40 + p, d);
          check($sformatf("mb %0d part %0d mv x", k - 1, p), sx10(d), bmv[p].x);
          check($sformatf("mb %0d part %0d mv y", k - 1, p), sx10(d >> 16), bmv[p].y);
          cpu_read(8'h80 + p, d);
          check($sformatf("mb %0d part %0d cost", k - 1, p), d, bcost[p]);
        end
      end
      cpu_read(8'h00, st);
      $display("step %0d: %0d cycles", k, st >>> 16);
    end
    $display("SIMD matches %0d, systolic passes %0d, 1D-DS repeats %0d, sub-pel stalls %0d",
             n_simd, n_sa, n_iter, n_stall);
    $display("skipped sub-pel searches %0d, cycles with both engines busy %0d, port #1 reads IME %0d SME %0d",
             n_skip, n_both, n_p1_ime, n_p1_sme);
    checks++; if (n_simd == 0) begin failures++; $display("FAIL no SIMD match"); end
    checks++; if (n_sa == 0) begin failures++; $display("FAIL no systolic pass"); end
    checks++; if (n_iter == 0) begin failures++; $display("FAIL no 1D-DS repeat"); end
    checks++; if (n_stall == 0) begin failures++; $display("FAIL no sub-pel stall"); end
    checks++; if (n_skip == 0) begin failures++; $display("FAIL no skipped sub-pel search"); end
    checks++; if (n_both == 0) begin failures++; $display("FAIL engines never concurrent"); end
    checks++; if (n_p1_ime == 0 || n_p1_sme == 0) begin failures++; $display("FAIL port #1 not switched"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_me_ctrl: self-checking testbench of the controller.
//
// Checks the memory-bus decoding into the two SRAM write ports, the CPU
// register writes and reads, and the macroblock pipeline: the first step
// starts only the integer engine, later steps start both with the integer
// results of the step before, a step ends only when both engines are done
// (they finish in either order, after random delays), the slot toggles,
// and a final step with no new macroblock starts only the sub-pel engine.
// The engines are played by the testbench.
module tb_me_ctrl;
  import me_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cpu_we = 0, mem_we = 0;
  logic [7:0] cpu_addr = 0;
  logic [31:0] cpu_wdata = 0, cpu_rdata;
  logic [12:0] mem_addr = 0;
  logic [63:0] mem_wdata = 0;
  logic tb_we, sw_we, ime_start, sme_start, step_done;
  logic [7:0] wr_x, wr_y;
  line_t wr_data;
  mv_t ime_cand [NCAND];
  logic [7:0] ime_tb_x, ime_tb_y, ime_sw_x, ime_sw_y;
  logic ime_done = 0, sme_done = 0;
  mv_t ime_mv_blk [4], ime_mv_m1;
  mv_t sme_mv [5];
  qmv_t sme_pmv;
  logic [7:0] sme_lambda, sme_tb_x, sme_tb_y, sme_sw_x, sme_sw_y;
  qmv_t sme_best_mv [NPART];
  logic [23:0] sme_best_cost [NPART];
  int checks = 0, failures = 0, n_ime = 0, n_sme = 0;

  always #5 clk = ~clk;
  me_ctrl dut (.*);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic cpu_write(int a, int d);
    @(negedge clk);
    cpu_we = 1; cpu_addr = 8'(a); cpu_wdata = 32'(d);
    @(negedge clk);
    cpu_we = 0;
  endtask

  // engine models: done after a random delay
  always @(posedge clk) if (ime_start) begin
    n_ime++;
    fork begin
      repeat ($urandom % 40 + 2) @(posedge clk);
      for (int b = 0; b < 4; b++) ime_mv_blk[b] <= '{x: 8'(n_ime + b), y: 8'(-n_ime - b)};
      ime_mv_m1 <= '{x: 8'(10 * n_ime), y: 8'(3)};
      ime_done <= 1;
      @(posedge clk) ime_done <= 0;
    end join_none
  end
  always @(posedge clk) if (sme_start) begin
    n_sme++;
    fork begin
      repeat ($urandom % 40 + 2) @(posedge clk);
      sme_done <= 1;
      @(posedge clk) sme_done <= 0;
    end join_none
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NPART; p++) begin
      sme_best_mv[p] = '{x: 10'(p), y: 10'(-p)};
      sme_best_cost[p] = 24'(1000 + p);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // memory bus decoding
    @(negedge clk);
    mem_we = 1; mem_addr = {1'b1, 8'd77, 4'd9}; mem_wdata = 64'h0807060504030201;
    #1;
    check("sw_we", sw_we, 1); check("tb_we", tb_we, 0);
    check("wr_x", wr_x, 72); check("wr_y", wr_y, 77); check("wr_data lane 7", wr_data[7], 8);
    mem_addr = {1'b0, 8'd20, 4'd1};
    #1;
    check("tb_we", tb_we, 1); check("sw_we 2", sw_we, 0); check("wr_x 2", wr_x, 8);
    @(negedge clk) mem_we = 0;
    // registers
    cpu_write(8'h01, 9);
    for (int i = 0; i < NCAND; i++) cpu_write(8'h02 + i, ((i + 1) << 8) | (8'(-i) & 255));
    @(negedge clk); cpu_addr = 8'h01; #1 check("lambda read", cpu_rdata, 9);
    check("lambda out", sme_lambda, 9);
    for (int i = 0; i < NCAND; i++) begin
      check("cand x", int'(ime_cand[i].x), -i);
      check("cand y", int'(ime_cand[i].y), i + 1);
    end
    // pipeline steps
    for (int k = 0; k < 4; k++) begin
      int ni, ns;
      ni = n_ime; ns = n_sme;
      check($sformatf("step %0d IME TB row", k), ime_tb_y, (k % 2) ? 16 : 0);
      check($sformatf("step %0d SME TB row", k), sme_tb_y, (k % 2) ? 0 : 16);
      check($sformatf("step %0d SW rows", k), ime_sw_y, (k % 2) ? 112 : 32);
      cpu_write(8'h00, (k < 3) ? 3 : 1);
      @(posedge step_done);
      @(negedge clk);
      check($sformatf("step %0d IME started", k), n_ime - ni, (k < 3) ? 1 : 0);
      check($sformatf("step %0d SME started", k), n_sme - ns, (k > 0) ? 1 : 0);
      if (k < 3) begin
        check($sformatf("step %0d SME gets MV_Mode1", k), int'(sme_mv[0].x), 10 * n_ime);
        check($sformatf("step %0d SME gets MV_A", k), int'(sme_mv[1].x), n_ime);
        check($sformatf("step %0d SME gets MV_D", k), int'(sme_mv[4].y), -n_ime - 3);
        check($sformatf("step %0d SME pmv", k), int'(sme_pmv.x), 0);
        check($sformatf("step %0d SME pmv y", k), int'(sme_pmv.y), 4);
        cpu_addr = 8'h15; #1 check("MV_Mode1 read", cpu_rdata[7:0], 8'(10 * n_ime));
      end
      cpu_addr = 8'h00; #1;
      check("busy clear", cpu_rdata[0], 0);
      check("sub-pel valid", cpu_rdata[2], (k > 0) ? 1 : 0);
    end
    cpu_addr = 8'h40 + 8'd7; #1 check("best mv read", cpu_rdata[9:0], 7);
    cpu_addr = 8'h80 + 8'd40; #1 check("best cost read", cpu_rdata, 1040);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// me_top: H.264 baseline-profile motion estimation core.
//
// Blocks: the controller (host buses, registers, macroblock pipeline),
// TBRAM (current macroblocks, 16 x 56 pixels) and SWRAM (search windows,
// 80 x 256 pixels), both three-port spiral-mapped SRAMs; the integer engine
// (IME, SIMD/systolic-array datapath running initial-vector search, 1D-DS
// and the FSLB Mode-1 search) and the sub-pel engine (SME: SPG, PU, MCG,
// 35-point quarter-pel search with FSSB).
//
// Read-port switching: read ports #0 of both SRAMs always serve the IME.
// Read ports #1 serve the IME while it is in SIMD mode and the SME
// otherwise; the SME's loads wait (stall) while the IME holds them. So the
// SME works in parallel with the systolic 1D-DS and waits during SIMD
// matches. This switching follows the design; the arbitration rule (the
// IME always wins) is this design's choice.
//
// Interface: see me_ctrl for the CPU-bus register map and the memory-bus
// word format. step_done pulses when a pipeline step has finished.
module me_top
  import me_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cpu_we,
  input  logic [7:0]  cpu_addr,
  input  logic [31:0] cpu_wdata,
  output logic [31:0] cpu_rdata,
  input  logic        mem_we,
  input  logic [12:0] mem_addr,
  input  logic [63:0] mem_wdata,
  output logic        step_done
);
  logic       tb_we, sw_we;
  logic [7:0] wr_x, wr_y;
  line_t      wr_data;

  rd_req_t tb_rd [2], sw_rd [2];
  line_t   tb_q [2], sw_q [2];

  // IME
  logic    ime_start, ime_busy, ime_done, simd_mode;
  mv_t     ime_cand [NCAND];
  logic [7:0] ime_tb_x, ime_tb_y, ime_sw_x, ime_sw_y;
  rd_req_t ime_tb_rd [2], ime_sw_rd [2];
  mv_t     ime_mv_blk [4];
  logic [15:0] ime_sad_blk [4];
  mv_t     ime_mv_m1;
  logic [15:0] ime_sad_m1, ime_cycles;
  logic    ime_ev_simd, ime_ev_sa, ime_ev_iter;

  // SME
  logic    sme_start, sme_busy, sme_done, sme_req, sme_gnt;
  mv_t     sme_mv [5];
  qmv_t    sme_pmv;
  logic [7:0] sme_lambda, sme_tb_x, sme_tb_y, sme_sw_x, sme_sw_y;
  rd_req_t sme_tb_rd, sme_sw_rd;
  qmv_t    sme_best_mv [NPART];
  logic [23:0] sme_best_cost [NPART];
  logic [15:0] sme_cycles;
  logic    sme_ev_stall, sme_ev_skip;

  me_ctrl u_ctrl (
    .clk, .rst_n, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_rdata,
    .mem_we, .mem_addr, .mem_wdata,
    .tb_we, .sw_we, .wr_x, .wr_y, .wr_data,
    .ime_start, .ime_cand, .ime_tb_x, .ime_tb_y, .ime_sw_x, .ime_sw_y,
    .ime_done, .ime_mv_blk, .ime_mv_m1,
    .sme_start, .sme_mv, .sme_pmv, .sme_lambda, .sme_tb_x, .sme_tb_y, .sme_sw_x, .sme_sw_y,
    .sme_done, .sme_best_mv, .sme_best_cost, .step_done
  );

  me_sram #(.W(16), .H(56)) u_tbram (
    .clk, .we(tb_we), .wx(wr_x), .wy(wr_y), .wdata(wr_data), .rd(tb_rd), .rdata(tb_q)
  );

  me_sram #(.W(80), .H(256)) u_swram (
    .clk, .we(sw_we), .wx(wr_x), .wy(wr_y), .wdata(wr_data), .rd(sw_rd), .rdata(sw_q)
  );

  // read-port switching
  assign sme_gnt  = !simd_mode;
  assign tb_rd[0] = ime_tb_rd[0];
  assign sw_rd[0] = ime_sw_rd[0];
  assign tb_rd[1] = simd_mode ? ime_tb_rd[1] : sme_tb_rd;
  assign sw_rd[1] = simd_mode ? ime_sw_rd[1] : sme_sw_rd;

  ime u_ime (
    .clk, .rst_n, .start(ime_start), .busy(ime_busy), .done(ime_done),
    .cand(ime_cand), .tb_x(ime_tb_x), .tb_y(ime_tb_y), .sw_x(ime_sw_x), .sw_y(ime_sw_y),
    .tb_rd(ime_tb_rd), .sw_rd(ime_sw_rd), .tb_data(tb_q), .sw_data(sw_q),
    .simd_mode, .mv_blk(ime_mv_blk), .sad_blk(ime_sad_blk), .mv_m1(ime_mv_m1), .sad_m1(ime_sad_m1),
    .cycles(ime_cycles), .ev_simd(ime_ev_simd), .ev_sa(ime_ev_sa), .ev_iter(ime_ev_iter)
  );

  sme u_sme (
    .clk, .rst_n, .start(sme_start), .busy(sme_busy), .done(sme_done),
    .mv_in(sme_mv), .pmv(sme_pmv), .lambda(sme_lambda),
    .tb_x(sme_tb_x), .tb_y(sme_tb_y), .sw_x(sme_sw_x), .sw_y(sme_sw_y),
    .tb_rd(sme_tb_rd), .sw_rd(sme_sw_rd), .tb_data(tb_q[1]), .sw_data(sw_q[1]),
    .port_req(sme_req), .port_gnt(sme_gnt),
    .best_mv(sme_best_mv), .best_cost(sme_best_cost),
    .cycles(sme_cycles), .ev_stall(sme_ev_stall), .ev_skip(sme_ev_skip)
  );

endmodule

// me_ctrl: controller between the host buses and the motion estimation core.
//
// The 64-bit memory bus writes pixels into the two SRAMs, one word of eight
// horizontally successive pixels per cycle: mem_addr = {sel, y[7:0], xw[3:0]}
// writes pixels 8*xw..8*xw+7 of row y of TBRAM (sel = 0) or SWRAM (sel = 1).
// The 32-bit CPU bus reaches the registers below (word addresses):
//   0x00 CTRL   write: bit0 go (one pipeline step), bit1 a new macroblock is
//               loaded for the integer engine. read: bit0 busy, bit1 slot of
//               the next step, bit2 sub-pel results valid, bits 31:16 cycles
//               of the last step
//   0x01 LAMBDA motion-cost weight (bits 7:0)
//   0x02..0x08  initial candidates; 0x02 is the predicted vector PMV
//               (x in bits 7:0, y in bits 15:8, two's complement pixels)
//   0x11..0x14  MV_A..MV_D of the last integer search, 0x15 MV_Mode1
//   0x40+p      best quarter-pel vector of partition p (x 9:0, y 25:16)
//   0x80+p      its cost
// Macroblock pipeline: a step runs the integer engine on macroblock N while
// the sub-pel engine works on macroblock N-1 with the vectors the integer
// engine found in the previous step. Both use slot-based buffers: slot s
// holds a template at TBRAM rows 16s..16s+15 and a search window at SWRAM
// rows 80s..80s+79, vector (0,0) at (32, 80s+32). The host loads slot
// "next slot" before each go.
//
// The controller and both buses are named by the design; the register map,
// the slot scheme and the step handshake are this design's own.
module me_ctrl
  import me_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // CPU bus
  input  logic        cpu_we,
  input  logic [7:0]  cpu_addr,
  input  logic [31:0] cpu_wdata,
  output logic [31:0] cpu_rdata,
  // memory bus
  input  logic        mem_we,
  input  logic [12:0] mem_addr,
  input  logic [63:0] mem_wdata,
  // SRAM write ports
  output logic        tb_we,
  output logic        sw_we,
  output logic [7:0]  wr_x,
  output logic [7:0]  wr_y,
  output line_t       wr_data,
  // integer engine
  output logic        ime_start,
  output mv_t         ime_cand [NCAND],
  output logic [7:0]  ime_tb_x, ime_tb_y, ime_sw_x, ime_sw_y,
  input  logic        ime_done,
  input  mv_t         ime_mv_blk [4],
  input  mv_t         ime_mv_m1,
  // sub-pel engine
  output logic        sme_start,
  output mv_t         sme_mv [5],
  output qmv_t        sme_pmv,
  output logic [7:0]  sme_lambda,
  output logic [7:0]  sme_tb_x, sme_tb_y, sme_sw_x, sme_sw_y,
  input  logic        sme_done,
  input  qmv_t        sme_best_mv [NPART],
  input  logic [23:0] sme_best_cost [NPART],
  output logic        step_done
);
  mv_t        cand [NCAND];
  logic [7:0] lambda;
  logic       slot, busy, ime_run, ime_fin, sme_fin, sme_valid, sme_pend;
  logic [15:0] cycles, last_cycles;
  mv_t        res_blk [4];
  mv_t        res_m1;
  qmv_t       res_pmv;

  // memory-bus writes
  assign tb_we   = mem_we && !mem_addr[12];
  assign sw_we   = mem_we && mem_addr[12];
  assign wr_y    = mem_addr[11:4];
  assign wr_x    = 8'({mem_addr[3:0], 3'b000});
  assign wr_data = line_t'(mem_wdata);

  assign ime_cand = cand;
  assign ime_tb_x = 8'd0;
  assign ime_tb_y = slot ? 8'd16 : 8'd0;
  assign ime_sw_x = 8'd32;
  assign ime_sw_y = slot ? 8'd112 : 8'd32;
  assign sme_tb_x = 8'd0;
  assign sme_tb_y = slot ? 8'd0 : 8'd16;
  assign sme_sw_x = 8'd32;
  assign sme_sw_y = slot ? 8'd32 : 8'd112;
  assign sme_mv[0] = res_m1;
  assign sme_mv[1] = res_blk[0];
  assign sme_mv[2] = res_blk[1];
  assign sme_mv[3] = res_blk[2];
  assign sme_mv[4] = res_blk[3];
  assign sme_pmv = res_pmv;
  assign sme_lambda = lambda;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCAND; i++) cand[i] <= '0;
      for (int i = 0; i < 4; i++) res_blk[i] <= '0;
      res_m1 <= '0; res_pmv <= '0;
      lambda <= '0; slot <= 1'b0; busy <= 1'b0;
      ime_run <= 1'b0; ime_fin <= 1'b0; sme_fin <= 1'b0;
      sme_valid <= 1'b0; sme_pend <= 1'b0;
      ime_start <= 1'b0; sme_start <= 1'b0; step_done <= 1'b0;
      cycles <= '0; last_cycles <= '0;
    end else begin
      ime_start <= 1'b0;
      sme_start <= 1'b0;
      step_done <= 1'b0;
      if (cpu_we && !busy) begin
        if (cpu_addr == 8'h01) lambda <= cpu_wdata[7:0];
        if (cpu_addr >= 8'h02 && cpu_addr < 8'h02 + 8'(NCAND))
          cand[3'(cpu_addr - 8'h02)] <= '{x: cpu_wdata[7:0], y: cpu_wdata[15:8]};
        if (cpu_addr == 8'h00 && cpu_wdata[0]) begin
          busy <= 1'b1;
          cycles <= '0;
          ime_run <= cpu_wdata[1];
          ime_start <= cpu_wdata[1];
          ime_fin <= !cpu_wdata[1];
          sme_start <= sme_pend;
          sme_fin <= !sme_pend;
          if (sme_pend) sme_valid <= 1'b0;
        end
      end
      if (busy) begin
        cycles <= cycles + 16'd1;
        if (ime_done) ime_fin <= 1'b1;
        if (sme_done) begin
          sme_fin <= 1'b1;
          sme_valid <= 1'b1;
        end
        if ((ime_fin || ime_done) && (sme_fin || sme_done) && !ime_start && !sme_start) begin
          busy <= 1'b0;
          step_done <= 1'b1;
          last_cycles <= cycles;
          slot <= ~slot;
          sme_pend <= ime_run;
          if (ime_run) begin
            res_blk <= ime_mv_blk;
            res_m1 <= ime_mv_m1;
            res_pmv <= '{x: 10'(4 * int'(cand[0].x)), y: 10'(4 * int'(cand[0].y))};
          end
        end
      end
    end
  end

  always_comb begin
    cpu_rdata = '0;
    if (cpu_addr == 8'h00) cpu_rdata = {last_cycles, 13'd0, sme_valid, slot, busy};
    else if (cpu_addr == 8'h01) cpu_rdata = {24'd0, lambda};
    else if (cpu_addr >= 8'h02 && cpu_addr < 8'h02 + 8'(NCAND))
      cpu_rdata = {16'd0, cand[3'(cpu_addr - 8'h02)].y, cand[3'(cpu_addr - 8'h02)].x};
    else if (cpu_addr >= 8'h11 && cpu_addr <= 8'h14)
      cpu_rdata = {16'd0, res_blk[2'(cpu_addr - 8'h11)].y, res_blk[2'(cpu_addr - 8'h11)].x};
    else if (cpu_addr == 8'h15) cpu_rdata = {16'd0, res_m1.y, res_m1.x};
    else if (cpu_addr >= 8'h40 && cpu_addr < 8'h40 + 8'(NPART))
      cpu_rdata = {6'd0, sme_best_mv[6'(cpu_addr - 8'h40)].y, 6'd0, sme_best_mv[6'(cpu_addr - 8'h40)].x};
    else if (cpu_addr >= 8'h80 && cpu_addr < 8'h80 + 8'(NPART))
      cpu_rdata = {8'd0, sme_best_cost[6'(cpu_addr - 8'h80)]};
  end
endmodule

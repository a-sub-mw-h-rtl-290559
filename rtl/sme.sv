// sme: sub-pel motion estimation processor (35-point full search with
// fast search for smaller blocks, FSSB).
//
// Around each of the five integer vectors from the integer engine
// (MV_Mode1, MV_A, MV_B, MV_C, MV_D) it evaluates the 35 quarter-pel
// points with horizontal offset -2..2 and vertical offset -3..3 quarter
// pixels (+-0.5 x +-0.75 pixel). Around MV_Mode1 all sixteen 4x4 blocks of
// the macroblock are matched; around MV_A only the top half (quadrants
// E, F), MV_B the bottom half (G, H), MV_C the left half (E, G) and MV_D the
// right half (F, H). Every 4x4 SATD is reused: at each point the SATDs are
// summed over every partition of Modes 4-7 (8x8, 8x4, 4x8, 4x4) lying in the
// blocks just matched, and over the search's own Mode 1-3 partition, and
// each partition keeps the vector of least cost (SATD plus the motion cost
// from the MCG). Seven modes come out of five searches.
//
// Per centre: the SPG window is loaded through read port #1 of SWRAM
// (72 reads; the template is loaded through read port #1 of TBRAM in
// parallel, once), the half-pel planes are computed (18 cycles), then each
// point takes one PU cycle per four 4x4 blocks plus two cycles to drain and
// update. Loads wait while port_gnt is low (the ports belong to the integer
// engine in SIMD mode); each such cycle pulses ev_stall.
//
// Following the design: the point pattern, the five centres and their
// quadrants, the 4x4 SATD reuse and the PU/SPG/MCG split. This design's
// choices: a single predicted vector for the motion cost of every
// partition; when an MV_A..MV_D equals MV_Mode1 its own search is skipped
// and its partition is updated from the Mode-1 search at the same points
// (ev_skip pulses); strict less-than comparisons, so the first point in
// raster order (qy outer, qx inner) wins ties.
//
// Interface: mv_in[0..4] = MV_Mode1, MV_A, MV_B, MV_C, MV_D (integer);
// sw_x/sw_y is the SWRAM position of the block at vector (0,0), tb_x/tb_y
// the macroblock in TBRAM; inputs are held from start to done. Results:
// best_mv/best_cost per partition, indexed as in me_pkg (P_M1 .. P_M7).
module sme
  import me_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        busy,
  output logic        done,
  input  mv_t         mv_in [5],
  input  qmv_t        pmv,
  input  logic [7:0]  lambda,
  input  logic [7:0]  tb_x,
  input  logic [7:0]  tb_y,
  input  logic [7:0]  sw_x,
  input  logic [7:0]  sw_y,
  output rd_req_t     tb_rd,
  output rd_req_t     sw_rd,
  input  line_t       tb_data,
  input  line_t       sw_data,
  output logic        port_req,
  input  logic        port_gnt,
  output qmv_t        best_mv [NPART],
  output logic [23:0] best_cost [NPART],
  output logic [15:0] cycles,
  output logic        ev_stall,
  output logic        ev_skip
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_HSTART, S_HALF, S_SEARCH, S_DRAIN, S_UPD, S_DONE} state_e;
  state_e state;

  logic [2:0]  ctr;        // centre 0..4
  logic [6:0]  ld;         // window read 0..71
  logic [5:0]  tld;        // template read 0..31
  logic        tb_loaded;
  logic [5:0]  pt;         // point 0..34
  logic [1:0]  grp;
  logic [3:0]  dup;        // MV_A..MV_D equal MV_Mode1

  pix_t org [16][16];      // template (current macroblock)

  // ------------------------------------------------------------ SPG and PU
  logic        win_we_q, tb_we_q;
  logic [4:0]  win_row_q;
  logic [1:0]  win_col_q;
  logic [3:0]  tb_row_q;
  logic        tb_half_q;
  logic        half_start, half_done;
  logic signed [2:0] qx, qy;
  logic [3:0]  blk_idx [4];
  logic [3:0]  blk_q [4];
  pix_t        qpel [4][16];
  pix_t        org_blk [4][16];
  logic        pu_in_valid, pu_out_valid;
  logic [15:0] pu_satd [4];
  logic [15:0] satd [16];

  assign qx = 3'(int'(pt) % 5 - 2);
  assign qy = 3'(int'(pt) / 5 - 3);

  spg u_spg (
    .clk, .rst_n,
    .win_we(win_we_q), .win_row(win_row_q), .win_col8(win_col_q), .win_data(sw_data),
    .half_start, .half_done,
    .qx, .qy, .blk_idx, .qpel
  );

  // 4x4 blocks of group grp for the current centre
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      unique case (ctr)
        3'd0: blk_idx[k] = 4'(4 * int'(grp) + k);
        3'd1: blk_idx[k] = 4'(4 * int'(grp) + k);
        3'd2: blk_idx[k] = 4'(8 + 4 * int'(grp) + k);
        3'd3: blk_idx[k] = 4'(8 * int'(grp) + (k % 2) + 4 * (k / 2));
        default: blk_idx[k] = 4'(8 * int'(grp) + 2 + (k % 2) + 4 * (k / 2));
      endcase
      for (int p = 0; p < 16; p++)
        org_blk[k][p] = org[4 * int'(blk_idx[k][3:2]) + p / 4][4 * int'(blk_idx[k][1:0]) + p % 4];
    end
  end

  assign pu_in_valid = (state == S_SEARCH);

  pu u_pu (
    .clk, .rst_n, .in_valid(pu_in_valid), .org(org_blk), .ref_px(qpel),
    .out_valid(pu_out_valid), .satd(pu_satd)
  );

  // ------------------------------------------------------------------- MCG
  qmv_t        cmv;
  logic [15:0] mvcost;
  assign cmv = '{x: 10'(4 * int'(mv_in[ctr].x) + int'(qx)), y: 10'(4 * int'(mv_in[ctr].y) + int'(qy))};
  mcg u_mcg (.mv(cmv), .pmv, .lambda, .cost(mvcost));

  // ------------------------------------------------------- partition update
  logic [15:0] active;
  logic [NPART-1:0] eval;
  logic [23:0] pcost [NPART];
  always_comb begin
    unique case (ctr)
      3'd0: active = 16'hFFFF;
      3'd1: active = 16'h00FF;
      3'd2: active = 16'hFF00;
      3'd3: active = 16'h3333;
      default: active = 16'hCCCC;
    endcase
    for (int p = 0; p < NPART; p++) begin
      logic [15:0] msk;
      msk = part_mask(p);
      if (p == P_M1) eval[p] = (ctr == 3'd0);
      else if (p < P_M4) eval[p] = (int'(ctr) == p) || (ctr == 3'd0 && dup[p-1]);
      else eval[p] = ((msk & active) == msk);
      pcost[p] = 24'(mvcost);
      for (int b = 0; b < 16; b++)
        if (msk[b]) pcost[p] += 24'(satd[b]);
    end
  end

  // ------------------------------------------------------------ read ports
  always_comb begin
    sw_rd = '0;
    tb_rd = '0;
    port_req = (state == S_LOAD);
    if (state == S_LOAD) begin
      sw_rd = '{en: port_gnt,
                x: 8'(int'(sw_x) + int'(mv_in[ctr].x) - 3 + 8 * (int'(ld) % 3)),
                y: 8'(int'(sw_y) + int'(mv_in[ctr].y) - 3 + int'(ld) / 3), vert: 1'b0};
      tb_rd = '{en: port_gnt && !tb_loaded,
                x: 8'(int'(tb_x) + 8 * (int'(tld) % 2)), y: 8'(int'(tb_y) + int'(tld) / 2), vert: 1'b0};
    end
  end

  assign busy = (state != S_IDLE);

  // next centre whose search is not covered by the Mode-1 search
  logic [2:0] next_ctr;
  always_comb begin
    next_ctr = 3'd5;
    for (int c = 4; c >= 1; c--)
      if (c > int'(ctr) && !dup[c-1]) next_ctr = 3'(c);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ctr <= '0; ld <= '0; tld <= '0; tb_loaded <= 1'b0; pt <= '0; grp <= '0; dup <= '0;
      win_we_q <= 1'b0; tb_we_q <= 1'b0; win_row_q <= '0; win_col_q <= '0; tb_row_q <= '0; tb_half_q <= 1'b0;
      half_start <= 1'b0;
      done <= 1'b0; cycles <= '0; ev_stall <= 1'b0; ev_skip <= 1'b0;
      for (int k = 0; k < 4; k++) blk_q[k] <= '0;
      for (int b = 0; b < 16; b++) satd[b] <= '0;
      for (int p = 0; p < NPART; p++) begin
        best_mv[p] <= '0;
        best_cost[p] <= '1;
      end
    end else begin
      done <= 1'b0;
      ev_stall <= 1'b0;
      ev_skip <= 1'b0;
      half_start <= 1'b0;
      win_we_q <= 1'b0;
      tb_we_q <= 1'b0;
      if (state != S_IDLE && state != S_DONE) cycles <= cycles + 16'd1;

      // read data one cycle after the request
      if (tb_we_q)
        for (int i = 0; i < LINE; i++) org[tb_row_q][8 * int'(tb_half_q) + i] <= tb_data[i];

      // PU results
      if (pu_out_valid)
        for (int k = 0; k < 4; k++) satd[blk_q[k]] <= pu_satd[k];
      if (pu_in_valid) blk_q <= blk_idx;

      unique case (state)
        S_IDLE: if (start) begin
          cycles <= '0;
          ctr <= '0;
          ld <= '0;
          tld <= '0;
          tb_loaded <= 1'b0;
          for (int r = 0; r < 4; r++) dup[r] <= (mv_in[r+1] == mv_in[0]);
          for (int p = 0; p < NPART; p++) best_cost[p] <= '1;
          state <= S_LOAD;
        end
        S_LOAD: begin
          if (!port_gnt) ev_stall <= 1'b1;
          else begin
            win_we_q <= 1'b1;
            win_row_q <= 5'(int'(ld) / 3);
            win_col_q <= 2'(int'(ld) % 3);
            if (!tb_loaded) begin
              tb_we_q <= 1'b1;
              tb_row_q <= 4'(int'(tld) / 2);
              tb_half_q <= tld[0];
              tld <= tld + 6'd1;
              if (tld == 6'd31) tb_loaded <= 1'b1;
            end
            ld <= ld + 7'd1;
            if (ld == 7'd71) begin
              ld <= '0;
              state <= S_HSTART;
            end
          end
        end
        S_HSTART: begin  // last window write lands this cycle
          half_start <= 1'b1;
          state <= S_HALF;
        end
        S_HALF: if (half_done && !half_start) begin
          pt <= '0;
          grp <= '0;
          state <= S_SEARCH;
        end
        S_SEARCH: begin
          if (grp == ((ctr == 3'd0) ? 2'd3 : 2'd1)) begin
            grp <= '0;
            state <= S_DRAIN;
          end else grp <= grp + 2'd1;
        end
        S_DRAIN: state <= S_UPD;  // last PU result written this cycle
        S_UPD: begin
          for (int p = 0; p < NPART; p++)
            if (eval[p] && pcost[p] < best_cost[p]) begin
              best_cost[p] <= pcost[p];
              best_mv[p] <= cmv;
            end
          if (pt == 6'd34) begin
            if (next_ctr != ctr + 3'd1) ev_skip <= 1'b1;
            if (next_ctr >= 3'd5) state <= S_DONE;
            else begin
              ctr <= next_ctr;
              state <= S_LOAD;
            end
          end else begin
            pt <= pt + 6'd1;
            state <= S_SEARCH;
          end
        end
        S_DONE: begin
          done <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

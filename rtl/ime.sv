// ime: integer-pel motion estimation processor with the SIMD/systolic-array
// (SIMD/SA) datapath.
//
// Datapath: two IPUs (8-way SAD units, see ipu.sv), a MUX in front of IPU 1,
// an adder and an accumulator. In SIMD mode the MUX feeds IPU 1 from read
// ports #1 of TBRAM and SWRAM, so the two IPUs match a 16-pixel row per
// cycle (16-way SIMD). In SA mode the MUX feeds IPU 1 from IPU 0's
// registers, so reference lines pass from IPU 0 to IPU 1 one cycle later
// and the pair works as a two-stage systolic array that uses read ports #0
// only, leaving ports #1 to the sub-pel engine.
//
// Algorithm (controller in this module):
//  1. Initial vector search, SIMD: seven candidates (cand[0] is the
//     predicted vector PMV; the others are supplied by the host, e.g. the
//     zero vector, the co-located vector and four neighbours). Each 16x16
//     match gives, in the same 16 cycles, the SADs of blocks A (top 16x8),
//     B (bottom 16x8), C (left 8x16) and D (right 8x16); each block keeps its
//     best candidate.
//  2. 1D-DS for A, B, C, D, SA: the four diamond points are matched by two
//     3-point systolic passes (horizontal and vertical); the best one gives
//     the direction; an 8-point one-dimensional search from the initial
//     vector along that direction follows. If its best point is not the
//     initial vector, the search repeats from that point, at most twice.
//  3. FSLB Mode-1 search, SIMD: eight candidates PMV, MV_A..MV_D,
//     (MV_A+MV_B)/2, (MV_C+MV_D)/2, (MV_A+MV_B+MV_C+MV_D)/4; the best 16x16
//     SAD gives MV_Mode1.
//
// Systolic pass schedule (per pair of template lines 2g, 2g+1, P points):
// cycle 0 loads TB[2g], SW[2g] into IPU 0 (idle cycle); cycle c = 1..P loads
// SW[2g+c] into IPU 0 (TB[2g+1] at c = 1) while IPU 1 takes IPU 0's old
// registers, so IPU 0 holds TB[2g+1]/SW[2g+c] and IPU 1 holds TB[2g]/SW[2g+c-1]
// and their SAD sum is the partial SAD of point c-1. A pass over N lines
// takes (N/2)(P+1) cycles. Lines are eight pixels; 16-pixel lines are split
// into two slices whose partial SADs accumulate.
//
// The SIMD/SA switching, the IPU pair, the schedule above and the 1D-DS/FSLB
// flow follow the design. The 3-point passes for the diamond step, the
// search-range clipping, SAD-only (no vector cost) decisions, floor
// division of the averaged candidates and lowest-index tie breaking are
// this design's choices.
//
// Interface: pulse start with the candidates, the MB position in TBRAM
// (tb_x, tb_y) and the SWRAM position of the block at vector (0,0)
// (sw_x, sw_y) stable; done pulses when results are valid. Read requests go
// out on tb_rd/sw_rd and data return one cycle later. simd_mode is high
// while read ports #1 are in use. Vectors are kept within +-SR; the SWRAM
// picture must hold the block at every vector within +-(SR+1). The default
// SR = 27 is this design's choice: the sub-pel engine reads a 24x24 window
// reaching 3 pixels before and 20 after the block position, and with
// vector (0,0) at offset 32 of an 80x80 window 32 + 27 + 20 = 79 is the
// last column it may touch.
// Timing: two pipeline stages between a read request and accumulation
// (SRAM, IPU registers).
module ime
  import me_pkg::*;
#(
  parameter int SR = 27  // integer search range, +-SR in x and y
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  output logic    busy,
  output logic    done,
  input  mv_t     cand [NCAND],
  input  logic [7:0] tb_x,
  input  logic [7:0] tb_y,
  input  logic [7:0] sw_x,
  input  logic [7:0] sw_y,
  output rd_req_t tb_rd [2],
  output rd_req_t sw_rd [2],
  input  line_t   tb_data [2],
  input  line_t   sw_data [2],
  output logic    simd_mode,
  output mv_t     mv_blk [4],
  output logic [15:0] sad_blk [4],
  output mv_t     mv_m1,
  output logic [15:0] sad_m1,
  output logic [15:0] cycles,
  // event pulses, one per finished SIMD match / systolic pass / 1D-DS repeat
  output logic    ev_simd,
  output logic    ev_sa,
  output logic    ev_iter
);

  typedef enum logic [2:0] {ST_IDLE, ST_SIMD, ST_SA, ST_WAIT, ST_DIR, ST_DONE} state_e;
  typedef enum logic [2:0] {PH_IV, PH_DH, PH_DV, PH_LINE, PH_M1} phase_e;

  typedef struct packed {
    logic       valid;
    logic       sa;
    logic [3:0] c;      // SA: cycle in group (0 = idle); SIMD: row
    logic       first;
    logic       last;
  } tag_t;

  state_e state;
  phase_e phase;
  tag_t   tag0, tag1, tag2;

  // ---------------------------------------------------------------- datapath
  line_t ipu0_tb, ipu0_sw, ipu1_tb, ipu1_sw;
  logic [10:0] sad0, sad1;
  line_t mux_tb, mux_sw;

  ipu u_ipu0 (
    .clk, .ld_tb(tag1.valid && (!tag1.sa || tag1.c <= 4'd1)), .ld_sw(tag1.valid),
    .tb_in(tb_data[0]), .sw_in(sw_data[0]), .reg_tb(ipu0_tb), .reg_sw(ipu0_sw), .sad(sad0)
  );

  // SIMD/SA MUX: IPU 1 input from read ports #1 (SIMD) or from IPU 0 (SA)
  assign mux_tb = tag1.sa ? ipu0_tb : tb_data[1];
  assign mux_sw = tag1.sa ? ipu0_sw : sw_data[1];

  ipu u_ipu1 (
    .clk, .ld_tb(tag1.valid && (!tag1.sa || tag1.c == 4'd1)), .ld_sw(tag1.valid),
    .tb_in(mux_tb), .sw_in(mux_sw), .reg_tb(ipu1_tb), .reg_sw(ipu1_sw), .sad(sad1)
  );

  // Adder and accumulator: eight point SADs (SA) or four block SADs (SIMD)
  logic [15:0] acc [8];
  logic [15:0] acc_a, acc_b, acc_c, acc_d;
  logic        acc_done;
  logic [11:0] sum01;
  assign sum01 = 12'(sad0) + 12'(sad1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag1 <= '0;
      tag2 <= '0;
      acc_done <= 1'b0;
      acc_a <= '0; acc_b <= '0; acc_c <= '0; acc_d <= '0;
      for (int i = 0; i < 8; i++) acc[i] <= '0;
    end else begin
      tag1 <= tag0;
      tag2 <= tag1;
      acc_done <= tag2.valid && tag2.last;
      if (tag2.valid && tag2.sa && tag2.c != 4'd0)
        acc[3'(tag2.c - 4'd1)] <= (tag2.first ? 16'd0 : acc[3'(tag2.c - 4'd1)]) + 16'(sum01);
      if (tag2.valid && !tag2.sa) begin
        acc_a <= (tag2.first ? 16'd0 : acc_a) + ((tag2.c < 4'd8) ? 16'(sum01) : 16'd0);
        acc_b <= (tag2.first ? 16'd0 : acc_b) + ((tag2.c >= 4'd8) ? 16'(sum01) : 16'd0);
        acc_c <= (tag2.first ? 16'd0 : acc_c) + 16'(sad0);
        acc_d <= (tag2.first ? 16'd0 : acc_d) + 16'(sad1);
      end
    end
  end

  // -------------------------------------------------------------- controller
  mv_t        cur_mv;      // SIMD: vector matched; SA: vector of point 0
  mv_t        ctr;         // 1D-DS: current initial vector of the block
  logic [3:0] ci;          // candidate index
  logic [1:0] blk;
  logic       iter;        // second 1D-DS iteration under way
  logic       ax;          // pass axis: 0 search along x, 1 along y
  logic [3:0] np;          // points of the pass
  logic [1:0] sl;          // slice
  logic [3:0] grp;
  logic [3:0] cc;
  logic [15:0] dsad [4];   // diamond SADs: -x, +x, -y, +y
  logic [1:0] dir;
  mv_t        cmv [NCMV];

  // geometry of the current block
  logic [4:0] bx, by, bw, bh, nlines;
  logic [1:0] nsl;
  always_comb begin
    unique case (blk)
      BLK_A: begin bx = 0; by = 0; bw = 16; bh = 8;  end
      BLK_B: begin bx = 0; by = 8; bw = 16; bh = 8;  end
      BLK_C: begin bx = 0; by = 0; bw = 8;  bh = 16; end
      default: begin bx = 8; by = 0; bw = 8; bh = 16; end
    endcase
    nlines = ax ? bh : bw;
    nsl = ax ? 2'(bw / 5'd8) : 2'(bh / 5'd8);
  end

  function automatic logic signed [7:0] clampc(logic signed [7:0] v);
    if (v > 8'(SR)) return 8'(SR);
    if (v < -8'(SR)) return -8'(SR);
    return v;
  endfunction

  function automatic mv_t clampv(mv_t v);
    mv_t r;
    r.x = clampc(v.x);
    r.y = clampc(v.y);
    return r;
  endfunction

  function automatic logic inrange(int v);
    return (v >= -SR) && (v <= SR);
  endfunction

  // read requests of the current issue cycle
  always_comb begin
    int tl, sl_;
    tag0 = '0;
    for (int p = 0; p < 2; p++) begin
      tb_rd[p] = '0;
      sw_rd[p] = '0;
    end
    tl = 0;
    sl_ = 0;
    if (state == ST_SIMD) begin
      for (int p = 0; p < 2; p++) begin
        tb_rd[p] = '{en: 1'b1, x: 8'(int'(tb_x) + 8 * p), y: 8'(int'(tb_y) + int'(cc)), vert: 1'b0};
        sw_rd[p] = '{en: 1'b1, x: 8'(int'(sw_x) + int'(cur_mv.x) + 8 * p),
                     y: 8'(int'(sw_y) + int'(cur_mv.y) + int'(cc)), vert: 1'b0};
      end
      tag0 = '{valid: 1'b1, sa: 1'b0, c: cc, first: (cc == 0), last: (cc == 4'd15)};
    end else if (state == ST_SA) begin
      tl = 2 * int'(grp) + int'(cc);  // template line (cc <= 1) and reference line
      if (!ax) begin
        tb_rd[0] = '{en: (cc <= 4'd1), x: 8'(int'(tb_x) + int'(bx) + tl),
                     y: 8'(int'(tb_y) + int'(by) + 8 * int'(sl)), vert: 1'b1};
        sw_rd[0] = '{en: 1'b1, x: 8'(int'(sw_x) + int'(cur_mv.x) + int'(bx) + tl),
                     y: 8'(int'(sw_y) + int'(cur_mv.y) + int'(by) + 8 * int'(sl)), vert: 1'b1};
      end else begin
        tb_rd[0] = '{en: (cc <= 4'd1), x: 8'(int'(tb_x) + int'(bx) + 8 * int'(sl)),
                     y: 8'(int'(tb_y) + int'(by) + tl), vert: 1'b0};
        sw_rd[0] = '{en: 1'b1, x: 8'(int'(sw_x) + int'(cur_mv.x) + int'(bx) + 8 * int'(sl)),
                     y: 8'(int'(sw_y) + int'(cur_mv.y) + int'(by) + tl), vert: 1'b0};
      end
      sl_ = int'(nlines) / 2 - 1;
      tag0 = '{valid: 1'b1, sa: 1'b1, c: cc, first: (sl == 0 && grp == 0),
               last: (int'(sl) == int'(nsl) - 1 && int'(grp) == sl_ && cc == np)};
    end
  end

  assign simd_mode = (state == ST_SIMD) || (state == ST_WAIT && (phase == PH_IV || phase == PH_M1));
  assign busy = (state != ST_IDLE);

  // evaluation helpers
  logic [15:0] blk_sad [4];
  assign blk_sad[0] = acc_a;
  assign blk_sad[1] = acc_b;
  assign blk_sad[2] = acc_c;
  assign blk_sad[3] = acc_d;

  // best point of a finished 1D search: k is the step from the start vector
  logic [3:0]  line_k;
  logic [15:0] line_sad;
  always_comb begin
    line_k = '0;
    line_sad = 16'hFFFF;
    for (int j = 0; j < 8; j++) begin
      int k;
      k = dir[0] ? j : int'(np) - 1 - j;
      if (j < int'(np))
        if (acc[j] < line_sad || (acc[j] == line_sad && 4'(k) < line_k)) begin
          line_sad = acc[j];
          line_k = 4'(k);
        end
    end
  end

  logic [1:0]  dmin;
  always_comb begin
    dmin = 2'd0;
    for (int d = 1; d < 4; d++)
      if (dsad[d] < dsad[dmin]) dmin = 2'(d);
  end

  // Next diamond step (diam_go, from diam_v) and next 1D search (line_*)
  logic diam_go, do_line;
  mv_t  diam_v, nv;
  logic [3:0] line_np;
  mv_t  line_start;
  always_comb begin
    int comp, n;
    nv = ctr;
    if (dir[1]) nv.y = 8'(int'(ctr.y) + (dir[0] ? int'(line_k) : -int'(line_k)));
    else        nv.x = 8'(int'(ctr.x) + (dir[0] ? int'(line_k) : -int'(line_k)));
    diam_go = 1'b0;
    diam_v = '0;
    if (state == ST_WAIT && acc_done) begin
      if (phase == PH_IV && int'(ci) == NCAND - 1) begin
        // block A starts from its best candidate, possibly the one just matched
        diam_go = 1'b1;
        diam_v = (blk_sad[0] < sad_blk[0]) ? cur_mv : mv_blk[0];
      end else if (phase == PH_LINE && line_k != 0 && !iter) begin
        diam_go = 1'b1;
        diam_v = nv;
      end else if (phase == PH_LINE && blk != 2'd3) begin
        diam_go = 1'b1;
        diam_v = mv_blk[blk + 2'd1];
      end
    end
    do_line = (state == ST_DIR);
    comp = dmin[1] ? int'(ctr.y) : int'(ctr.x);
    n = dmin[0] ? SR - comp + 1 : comp + SR + 1;
    if (n > 8) n = 8;
    line_np = 4'(n);
    line_start = ctr;
    if (!dmin[0]) begin
      if (dmin[1]) line_start.y = 8'(int'(ctr.y) - (n - 1));
      else         line_start.x = 8'(int'(ctr.x) - (n - 1));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      phase <= PH_IV;
      done <= 1'b0;
      ci <= '0; blk <= '0; iter <= 1'b0; ax <= 1'b0; np <= '0;
      sl <= '0; grp <= '0; cc <= '0; dir <= '0;
      cur_mv <= '0;
      ctr <= '0;
      cycles <= '0;
      ev_simd <= 1'b0; ev_sa <= 1'b0; ev_iter <= 1'b0;
      for (int i = 0; i < 4; i++) begin
        dsad[i] <= '0; mv_blk[i] <= '0; sad_blk[i] <= '0;
      end
      for (int i = 0; i < NCMV; i++) cmv[i] <= '0;
      mv_m1 <= '0;
      sad_m1 <= '0;
    end else begin
      done <= 1'b0;
      ev_simd <= 1'b0;
      ev_sa <= 1'b0;
      ev_iter <= 1'b0;
      if (state != ST_IDLE && state != ST_DONE) cycles <= cycles + 16'd1;
      unique case (state)
        ST_IDLE: if (start) begin
          cycles <= '0;
          ci <= '0;
          cc <= '0;
          cur_mv <= clampv(cand[0]);
          for (int i = 0; i < 4; i++) sad_blk[i] <= 16'hFFFF;
          phase <= PH_IV;
          state <= ST_SIMD;
        end
        ST_SIMD: begin
          cc <= cc + 4'd1;
          if (cc == 4'd15) state <= ST_WAIT;
        end
        ST_SA: begin
          if (cc == np) begin
            cc <= '0;
            if (int'(grp) == int'(nlines) / 2 - 1) begin
              grp <= '0;
              if (int'(sl) == int'(nsl) - 1) begin
                sl <= '0;
                state <= ST_WAIT;
              end else sl <= sl + 2'd1;
            end else grp <= grp + 4'd1;
          end else cc <= cc + 4'd1;
        end
        ST_WAIT: if (acc_done) begin
          cc <= '0;
          ev_simd <= (phase == PH_IV || phase == PH_M1);
          ev_sa <= !(phase == PH_IV || phase == PH_M1);
          unique case (phase)
            PH_IV: begin
              for (int b = 0; b < 4; b++)
                if (blk_sad[b] < sad_blk[b]) begin
                  sad_blk[b] <= blk_sad[b];
                  mv_blk[b] <= cur_mv;
                end
              if (int'(ci) == NCAND - 1) begin
                blk <= '0;
                iter <= 1'b0;
                // block A's diamond starts from its best candidate (which
                // may be the one just matched): see diam_go below
              end else begin
                ci <= ci + 4'd1;
                cur_mv <= clampv(cand[3'(ci + 4'd1)]);
                state <= ST_SIMD;
              end
            end
            PH_DH: begin
              dsad[0] <= inrange(int'(cur_mv.x)) ? acc[0] : 16'hFFFF;
              dsad[1] <= inrange(int'(cur_mv.x) + 2) ? acc[2] : 16'hFFFF;
              cur_mv <= '{x: cur_mv.x + 8'sd1, y: cur_mv.y - 8'sd1};
              ax <= 1'b1;
              phase <= PH_DV;
              state <= ST_SA;
            end
            PH_DV: begin
              dsad[2] <= inrange(int'(cur_mv.y)) ? acc[0] : 16'hFFFF;
              dsad[3] <= inrange(int'(cur_mv.y) + 2) ? acc[2] : 16'hFFFF;
              state <= ST_DIR;  // direction decided next cycle
            end
            PH_LINE: begin
              mv_blk[blk] <= nv;
              sad_blk[blk] <= line_sad;
              if (line_k != 0 && !iter) begin
                iter <= 1'b1;
                ev_iter <= 1'b1;
                // second round from the new best vector: see diam_go below
              end else if (blk != 2'd3) begin
                blk <= blk + 2'd1;
                iter <= 1'b0;
                // next block's diamond: see diam_go below
              end else begin
                // FSLB Mode-1 candidates
                cmv[0] <= clampv(cand[0]);
                cmv[1] <= mv_blk[0];
                cmv[2] <= mv_blk[1];
                cmv[3] <= mv_blk[2];
                cmv[4] <= nv;
                cmv[5] <= '{x: 8'((int'(mv_blk[0].x) + int'(mv_blk[1].x)) >>> 1),
                            y: 8'((int'(mv_blk[0].y) + int'(mv_blk[1].y)) >>> 1)};
                cmv[6] <= '{x: 8'((int'(mv_blk[2].x) + int'(nv.x)) >>> 1),
                            y: 8'((int'(mv_blk[2].y) + int'(nv.y)) >>> 1)};
                cmv[7] <= '{x: 8'((int'(mv_blk[0].x) + int'(mv_blk[1].x) + int'(mv_blk[2].x) + int'(nv.x)) >>> 2),
                            y: 8'((int'(mv_blk[0].y) + int'(mv_blk[1].y) + int'(mv_blk[2].y) + int'(nv.y)) >>> 2)};
                cur_mv <= clampv(cand[0]);
                sad_m1 <= 16'hFFFF;
                ci <= '0;
                phase <= PH_M1;
                state <= ST_SIMD;
              end
            end
            PH_M1: begin
              if (acc_a + acc_b < sad_m1) begin
                sad_m1 <= acc_a + acc_b;
                mv_m1 <= cur_mv;
              end
              if (int'(ci) == NCMV - 1) begin
                state <= ST_DONE;
              end else begin
                ci <= ci + 4'd1;
                cur_mv <= cmv[3'(ci + 4'd1)];
                state <= ST_SIMD;
              end
            end
            default: ;
          endcase
        end
        ST_DIR: ;  // 1D search set up below
        ST_DONE: begin
          done <= 1'b1;
          state <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
      if (diam_go) begin
        // diamond step: horizontal 3-point pass from ctr-(1,0)
        ctr <= diam_v;
        cur_mv <= '{x: diam_v.x - 8'sd1, y: diam_v.y};
        ax <= 1'b0;
        np <= 4'd3;
        phase <= PH_DH;
        state <= ST_SA;
      end
      if (do_line) begin
        // 1D search from ctr along dmin, clipped to the range
        ax <= dmin[1];
        np <= line_np;
        cur_mv <= line_start;
        dir <= dmin;
        phase <= PH_LINE;
        state <= ST_SA;
      end
    end
  end

endmodule

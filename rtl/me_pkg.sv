// me_pkg: types and constants shared by the H.264 motion estimation core.
//
// Pixels are 8-bit luma samples. The SRAMs deliver a "line" of eight
// successive pixels (one row segment or one column segment) per read port
// and cycle; a line is a packed array whose element i is the pixel at
// offset i. Integer motion vectors are signed 8-bit pairs in pixel units,
// sub-pel vectors are signed 10-bit pairs in quarter-pel units.
// Block numbering inside a 16x16 macroblock: the sixteen 4x4 blocks are
// numbered b = 4*row + column; the four 8x8 quadrants E, F, G, H are the
// top-left, top-right, bottom-left and bottom-right quadrants.
package me_pkg;

  localparam int MB = 16;         // macroblock edge in pixels
  localparam int LINE = 8;        // pixels per SRAM read port access
  localparam int NCAND = 7;       // initial-vector candidates
  localparam int NCMV = 8;        // FSLB Mode-1 candidates
  localparam int NPART = 41;      // partitions of Modes 1-7 (1+2+2+4+8+8+16)

  typedef logic [7:0] pix_t;
  typedef pix_t [LINE-1:0] line_t;

  typedef struct packed {
    logic signed [7:0] x;
    logic signed [7:0] y;
  } mv_t;

  typedef struct packed {
    logic signed [9:0] x;
    logic signed [9:0] y;
  } qmv_t;

  // The four Mode-2/Mode-3 blocks searched by the integer-pel engine.
  typedef enum logic [1:0] {BLK_A = 2'd0, BLK_B = 2'd1, BLK_C = 2'd2, BLK_D = 2'd3} blk_e;

  // One SRAM read request.
  typedef struct packed {
    logic       en;
    logic [7:0] x;
    logic [7:0] y;
    logic       vert;  // 1: eight pixels down a column, 0: along a row
  } rd_req_t;

  // Partition index ranges of the Modes 1-7 result table.
  localparam int P_M1 = 0;   // 16x16
  localparam int P_M2 = 1;   // 16x8, top then bottom
  localparam int P_M3 = 3;   // 8x16, left then right
  localparam int P_M4 = 5;   // 8x8, E F G H
  localparam int P_M5 = 9;   // 8x4, raster order
  localparam int P_M6 = 17;  // 4x8, raster order
  localparam int P_M7 = 25;  // 4x4, raster order

  // Which 4x4 blocks (bit b = 4*row+col) each partition covers.
  function automatic logic [15:0] part_mask(int p);
    if (p == P_M1) return 16'hFFFF;
    if (p == P_M2) return 16'h00FF;
    if (p == P_M2 + 1) return 16'hFF00;
    if (p == P_M3) return 16'h3333;
    if (p == P_M3 + 1) return 16'hCCCC;
    if (p >= P_M4 && p < P_M5) begin
      case (p - P_M4)
        0: return 16'h0033;
        1: return 16'h00CC;
        2: return 16'h3300;
        default: return 16'hCC00;
      endcase
    end
    if (p >= P_M5 && p < P_M6)  // 8 wide, 4 tall: row r, half h
      return 16'h0003 << (4 * ((p - P_M5) / 2) + 2 * ((p - P_M5) % 2));
    if (p >= P_M6 && p < P_M7)  // 4 wide, 8 tall: half v, column c
      return 16'h0011 << (8 * ((p - P_M6) / 4) + ((p - P_M6) % 4));
    return 16'h0001 << (p - P_M7);
  endfunction

  // Length in bits of the signed Exp-Golomb code se(v) of v.
  function automatic logic [5:0] se_bits(logic signed [10:0] v);
    logic [11:0] k;
    int n;
    k = (v > 0) ? 12'(2 * v) - 12'd1 : 12'(-2 * v);  // codeNum
    k = k + 12'd1;
    n = 0;
    for (int i = 0; i < 12; i++) if (k[i]) n = i;
    return 6'(2 * n + 1);
  endfunction

endpackage

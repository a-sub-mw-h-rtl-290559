// me_sram: three-port (two read, one write) picture SRAM with spiral
// mapping, used as the search-window RAM (SWRAM) and the template-block
// RAM (TBRAM).
//
// The array is split into eight column blocks, each with its own word-line
// selector. Pixel (x, y) lives in column block (x + y) mod 8, at word
// y*(W/8) + x/8 of that block. Any eight successive pixels of a row, and any
// eight successive pixels of a column, therefore fall into eight different
// column blocks and are read in one cycle; a barrel shifter rotates the
// eight block outputs back into picture order. The write port takes eight
// successive pixels of a row (one 64-bit memory-bus word) per cycle.
//
// The column-block split, the spiral mapping and the barrel shifter follow
// the design; the picture geometry W x H is this design's choice: the
// default 80 x 256 pixels is 160 Kbit (SWRAM: three 80x80 search windows of
// +-32 pixels around a 16x16 macroblock), and TBRAM is instantiated as
// 16 x 56 pixels (7 Kbit).
//
// Timing: reads are synchronous, data appear on rdata the cycle after the
// request. A write and a read of the same pixel in one cycle return the
// old value. Requests must stay inside the W x H picture.
module me_sram
  import me_pkg::*;
#(
  parameter int W = 80,   // picture width in pixels, multiple of 8
  parameter int H = 256   // picture height in pixels
) (
  input  logic     clk,
  // write port: pixels wx..wx+7 of row wy
  input  logic     we,
  input  logic [7:0] wx,
  input  logic [7:0] wy,
  input  line_t    wdata,
  // read ports #0 and #1
  input  rd_req_t  rd [2],
  output line_t    rdata [2]
);

  localparam int WW = W / LINE;       // words per row in one column block
  localparam int DEPTH = WW * H;      // words per column block
  localparam int AW = $clog2(DEPTH);

  pix_t mem [LINE][DEPTH];

  // Word address and lane of column block b for an access of 8 pixels
  // starting at (x0, y0), running along a row (vert=0) or a column.
  function automatic logic [AW-1:0] blk_addr(int b, logic [7:0] x0, logic [7:0] y0, logic vert);
    int i, x, y;
    i = (b - int'(x0) - int'(y0)) & (LINE - 1);
    x = int'(x0) + (vert ? 0 : i);
    y = int'(y0) + (vert ? i : 0);
    return AW'(y * WW + x / LINE);
  endfunction

  always_ff @(posedge clk) begin
    if (we)
      for (int b = 0; b < LINE; b++)
        mem[b][blk_addr(b, wx, wy, 1'b0)] <= wdata[(b - int'(wx) - int'(wy)) & (LINE - 1)];
  end

  for (genvar p = 0; p < 2; p++) begin : g_rd
    pix_t blk_q [LINE];
    logic [2:0] rot_q;
    always_ff @(posedge clk) begin
      if (rd[p].en) begin
        for (int b = 0; b < LINE; b++)
          blk_q[b] <= mem[b][blk_addr(b, rd[p].x, rd[p].y, rd[p].vert)];
        rot_q <= 3'(rd[p].x + rd[p].y);
      end
    end
    // barrel shifter: lane i comes from column block (x0 + y0 + i) mod 8
    always_comb
      for (int i = 0; i < LINE; i++)
        rdata[p][i] = blk_q[(int'(rot_q) + i) & (LINE - 1)];
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++)
      if (rd[p].en)
        assert (rd[p].vert ? (int'(rd[p].y) + LINE <= H && int'(rd[p].x) < W)
                           : (int'(rd[p].x) + LINE <= W && int'(rd[p].y) < H))
          else $error("me_sram: read outside the picture");
    if (we)
      assert (int'(wx) + LINE <= W && int'(wy) < H) else $error("me_sram: write outside the picture");
  end

endmodule

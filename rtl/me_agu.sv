// me_agu: address generation unit of the motion-estimation processor.
//
// For one candidate motion vector (cand_x, cand_y) it walks the pixels of a
// block of the current macroblock and of the block at that displacement in
// the search area, in raster order, one pixel per `advance`. The block is the
// whole MB_SIZE x MB_SIZE macroblock or one of its sub-blocks (variable block
// size): `w_m1`/`h_m1` give width and height minus one, `off_x`/`off_y` the
// sub-block's top-left pixel inside the macroblock. Addresses are byte
// addresses. The macroblock is stored row by row, MB_SIZE pixels wide; the
// search area row by row, SA_W = MB_SIZE + SEARCH_RANGE pixels wide, with
// displacement (0,0) of the macroblock at column and row SEARCH_RANGE/2.
// Valid displacements are -SEARCH_RANGE/2 .. SEARCH_RANGE/2-1 in both
// directions; `in_range` tells whether the loaded candidate lies in the
// search area. Row bases are updated by addition, so no multiplier is used
// per pixel. A sub-block must lie inside the macroblock.
// Timing: `start` loads the candidate and block; from the next cycle the
// outputs give pixel 0; each cycle with `advance` steps to the next pixel.
// `last` is high while the outputs give the final pixel.
// The unit's role (fetching the pixels of each candidate, for the 16x16 and
// the variable block sizes) follows the published description; the raster
// walk, the memory layout and the range rule are this design's own choice.
module me_agu #(
  parameter int unsigned MB_SIZE      = 16,
  parameter int unsigned SEARCH_RANGE = 32,
  localparam int unsigned SA_W   = MB_SIZE + SEARCH_RANGE,
  localparam int unsigned MB_AW  = $clog2(MB_SIZE * MB_SIZE),
  localparam int unsigned SA_AW  = $clog2(SA_W * SA_W),
  localparam int unsigned IDX_W  = $clog2(MB_SIZE)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic signed [15:0] cand_x,
  input  logic signed [15:0] cand_y,
  input  logic [IDX_W-1:0]   w_m1,
  input  logic [IDX_W-1:0]   h_m1,
  input  logic [IDX_W-1:0]   off_x,
  input  logic [IDX_W-1:0]   off_y,
  input  logic               advance,
  output logic [MB_AW-1:0]   mb_addr,
  output logic [SA_AW-1:0]   sa_addr,
  output logic               last,
  output logic               in_range
);

  localparam int HALF = int'(SEARCH_RANGE / 2);

  logic [IDX_W-1:0] row, col, wl, hl;
  logic [SA_AW-1:0] sa_base;
  logic [MB_AW-1:0] mb_base;

  // Candidate check and base addresses, computed from the inputs at start.
  logic signed [16:0] ox, oy;   // candidate macroblock origin in the search area
  logic               cand_ok;
  logic [SA_AW-1:0]   sa_base_c;
  logic [MB_AW-1:0]   mb_base_c;
  always_comb begin
    ox        = 17'(cand_x) + 17'(HALF);
    oy        = 17'(cand_y) + 17'(HALF);
    cand_ok   = (ox >= 0) && (ox <= 17'(SEARCH_RANGE - 1)) &&
                (oy >= 0) && (oy <= 17'(SEARCH_RANGE - 1));
    sa_base_c = SA_AW'((oy[SA_AW-1:0] + SA_AW'(off_y)) * SA_AW'(SA_W)
                       + ox[SA_AW-1:0] + SA_AW'(off_x));
    mb_base_c = MB_AW'(MB_AW'(off_y) * MB_AW'(MB_SIZE) + MB_AW'(off_x));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row      <= '0;
      col      <= '0;
      wl       <= '0;
      hl       <= '0;
      sa_base  <= '0;
      mb_base  <= '0;
      in_range <= 1'b0;
    end else if (start) begin
      row      <= '0;
      col      <= '0;
      wl       <= w_m1;
      hl       <= h_m1;
      sa_base  <= cand_ok ? sa_base_c : '0;
      mb_base  <= mb_base_c;
      in_range <= cand_ok;
    end else if (advance) begin
      if (col == wl) begin
        col     <= '0;
        row     <= row + 1'b1;
        sa_base <= sa_base + SA_AW'(SA_W);
        mb_base <= mb_base + MB_AW'(MB_SIZE);
      end else begin
        col <= col + 1'b1;
      end
    end
  end

  assign mb_addr = mb_base + MB_AW'(col);
  assign sa_addr = sa_base + SA_AW'(col);
  assign last    = (row == hl) && (col == wl);

endmodule

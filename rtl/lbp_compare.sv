// lbp_compare: second stage of the LBP pattern CVI (8-way comparison).
//
// Each incoming row of block sums (from lbp_block_sum) is the row of s x s
// blocks whose top edge is s-1 rows above the newest image row. The stage keeps
// the last 2*MAX_BLOCK such rows. With the incoming row as the bottom row of
// the 3x3 block window, the centre row is the one received s rows earlier and
// the top row the one received 2s rows earlier. For output column x the
// centre block sits at ext column c = HALO + x and its neighbours at c - s and
// c + s. Each neighbour sum is compared with the centre sum (neighbour >=
// centre gives a 1), and the eight results form the pattern, in the order
// used by OpenCV's MB-LBP: bit 7 top-left, bit 6 top, bit 5 top-right, bit 4
// right, bit 3 bottom-right, bit 2 bottom, bit 1 bottom-left, bit 0 left.
// Comparing sums is the same as comparing averages, as all blocks are s x s.
//
// So the pattern produced when image row r enters the CVI belongs to the
// window whose centre block has its top-left pixel in row r - 2s + 1. Rows
// before the first of a pass read as zero, which only affects the first
// 2s - 1 outputs of a pass; software discards those.
//
// Timing: one row per clock, no stall; out_* follow in_* by one clock.
// The centre/neighbour comparison at a stride of s follows the document; the
// bit order and the row convention are this design's choices.
module lbp_compare
  import lbp_cvi_pkg::*;
#(
  parameter int unsigned LANES = 16,
  parameter int unsigned HALO  = 2 * MAX_BLOCK,
  localparam int unsigned BYTES = 4 * LANES,
  localparam int unsigned EXT   = BYTES + 2 * HALO,
  localparam int unsigned DEPTH = 2 * MAX_BLOCK
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic                       in_first,
  input  lbp_mode_e                  mode,
  input  logic [EXT-1:0][BSUM_W-1:0] in_sum,
  output logic                       out_valid,
  output logic [8*BYTES-1:0]         out_lbp
);

  if (HALO < MAX_BLOCK || HALO + MAX_BLOCK > 2 * HALO) begin : g_bad_halo
    $error("lbp_compare: HALO must be at least MAX_BLOCK");
  end

  logic [EXT-1:0][BSUM_W-1:0] hist [DEPTH];  // hist[0]: previous row
  logic [EXT-1:0][BSUM_W-1:0] top, cen, bot;
  logic [BYTES-1:0][7:0]      lbp;
  int unsigned                s;

  always_comb begin
    s   = block_size(mode);
    bot = in_sum;
    cen = in_first ? '0 : hist[s - 1];
    top = in_first ? '0 : hist[2 * s - 1];
    for (int x = 0; x < int'(BYTES); x++) begin
      int c, l, r;
      c = int'(HALO) + x;
      l = c - int'(s);
      r = c + int'(s);
      lbp[x][7] = top[l] >= cen[c];
      lbp[x][6] = top[c] >= cen[c];
      lbp[x][5] = top[r] >= cen[c];
      lbp[x][4] = cen[r] >= cen[c];
      lbp[x][3] = bot[r] >= cen[c];
      lbp[x][2] = bot[c] >= cen[c];
      lbp[x][1] = bot[l] >= cen[c];
      lbp[x][0] = cen[l] >= cen[c];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(DEPTH); k++) hist[k] <= '0;
    end else if (in_valid) begin
      hist[0] <= in_sum;
      for (int k = 1; k < int'(DEPTH); k++)
        hist[k] <= in_first ? '0 : hist[k-1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_lbp   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_lbp <= lbp;
    end
  end

endmodule

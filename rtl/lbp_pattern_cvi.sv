// lbp_pattern_cvi: the LBP pattern custom vector instruction.
//
// Precomputes the multi-block LBP pattern of every position of an image, for
// one block size at a time (1x1, 2x2 or 4x4). The image is processed in
// vertical stripes as wide as a wavefront (4*LANES pixels); the instruction
// walks down a stripe one row per wavefront and keeps the rows it needs as
// state, so a 3x3-block window with a fan-in of up to 144 pixels is handled
// with the engine's ordinary two-operand, one-result instruction format.
// Operand A is the row starting HALO pixels left of the stripe, operand B the
// same row starting HALO pixels right of the stripe start; together they
// cover the stripe plus HALO pixels on each side.
//
// Two stages, as in the document: lbp_block_sum adds rows and columns into
// s x s block sums, and lbp_compare compares each centre block with its eight
// neighbours at a stride of s. Software runs one pass per block size over the
// stripe (in_first on its first row), then moves to the next stripe.
//
// Output convention (this design's choice): out_lbp[8x +: 8], produced for
// input row r, is the pattern whose centre block has its top-left pixel at
// stripe column x, row r - 2s + 1. The first 2s - 1 rows of a pass are not
// meaningful. Timing: one row per clock, no stall, two clocks of latency.
module lbp_pattern_cvi
  import lbp_cvi_pkg::*;
#(
  parameter int unsigned LANES = 16,
  parameter int unsigned HALO  = 2 * MAX_BLOCK,
  localparam int unsigned BYTES = 4 * LANES,
  localparam int unsigned EXT   = BYTES + 2 * HALO
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_first,
  input  lbp_mode_e            mode,
  input  logic [8*BYTES-1:0]   in_a,
  input  logic [8*BYTES-1:0]   in_b,
  output logic                 out_valid,
  output logic [8*BYTES-1:0]   out_lbp
);

  logic                       bs_valid, bs_first;
  lbp_mode_e                  bs_mode;
  logic [EXT-1:0][BSUM_W-1:0] bs_sum;

  lbp_block_sum #(.LANES(LANES), .HALO(HALO)) u_sum (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_first  (in_first),
    .mode      (mode),
    .in_a      (in_a),
    .in_b      (in_b),
    .out_valid (bs_valid),
    .out_first (bs_first),
    .out_mode  (bs_mode),
    .out_sum   (bs_sum)
  );

  lbp_compare #(.LANES(LANES), .HALO(HALO)) u_cmp (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (bs_valid),
    .in_first  (bs_first),
    .mode      (bs_mode),
    .in_sum    (bs_sum),
    .out_valid (out_valid),
    .out_lbp   (out_lbp)
  );

endmodule

// lbp_block_sum: first stage of the LBP pattern CVI (block reduction).
//
// The CVI walks down a vertical stripe of the image, one row per wavefront.
// Operand A holds the row starting HALO pixels left of the stripe; operand B
// holds the same row starting HALO pixels right of the stripe start. A plus
// the last 2*HALO bytes of B form the extended row ext[0 .. BYTES+2*HALO-1],
// where ext[i] is the pixel i - HALO columns from the left edge of the stripe
// (ext[i] = A[i] for i < BYTES, ext[i] = B[i - 2*HALO] above that).
//
// For block size s (mode), the stage adds the newest s rows (the incoming row
// and up to three stored rows) into column sums, then adds s adjacent column
// sums: out_sum[i] is the sum of the s x s block whose top-left pixel is
// ext[i] of the row s-1 rows above the incoming one. Positions whose block
// would run past the right end of ext read the missing columns as zero. Rows
// before the first row of a pass (in_first) read as zero.
//
// Timing: one row per clock, no stall; out_* follow in_* by one clock. The
// mode must stay the same from in_first to the end of the pass (asserted).
// The two-operand halo scheme and the row/column reduction follow the
// document; the zero fill, the halo width and the output convention are this
// design's choices.
module lbp_block_sum
  import lbp_cvi_pkg::*;
#(
  parameter int unsigned LANES = 16,
  parameter int unsigned HALO  = 2 * MAX_BLOCK,
  localparam int unsigned BYTES = 4 * LANES,
  localparam int unsigned EXT   = BYTES + 2 * HALO
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic                          in_first,
  input  lbp_mode_e                     mode,
  input  logic [8*BYTES-1:0]            in_a,
  input  logic [8*BYTES-1:0]            in_b,
  output logic                          out_valid,
  output logic                          out_first,
  output lbp_mode_e                     out_mode,
  output logic [EXT-1:0][BSUM_W-1:0]    out_sum
);

  // The right halo must come from B, which must hold at least 2*HALO bytes.
  if (2 * HALO > BYTES) begin : g_bad_halo
    $error("lbp_block_sum: 2*HALO must not exceed the wavefront width");
  end

  logic [EXT-1:0][7:0]        ext;
  logic [EXT-1:0][7:0]        hist [MAX_BLOCK-1];  // hist[0]: previous row
  logic [EXT-1:0][9:0]        vsum;
  logic [EXT-1:0][BSUM_W-1:0] bsum;
  int unsigned                s;

  always_comb begin
    for (int i = 0; i < int'(EXT); i++) begin
      if (i < int'(BYTES)) ext[i] = in_a[8*i +: 8];
      else                 ext[i] = in_b[8*(i - 2*int'(HALO)) +: 8];
    end
  end

  always_comb begin
    s = block_size(mode);
    // Vertical reduction over the newest s rows.
    for (int i = 0; i < int'(EXT); i++) begin
      vsum[i] = 10'(ext[i]);
      for (int k = 0; k < int'(MAX_BLOCK) - 1; k++) begin
        if ((k + 1 < int'(s)) && !in_first) vsum[i] += 10'(hist[k][i]);
      end
    end
    // Horizontal reduction over s adjacent columns.
    for (int i = 0; i < int'(EXT); i++) begin
      bsum[i] = '0;
      for (int k = 0; k < int'(MAX_BLOCK); k++) begin
        if ((k < int'(s)) && (i + k < int'(EXT))) bsum[i] += BSUM_W'(vsum[i + k]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(MAX_BLOCK) - 1; k++) hist[k] <= '0;
    end else if (in_valid) begin
      hist[0] <= ext;
      for (int k = 1; k < int'(MAX_BLOCK) - 1; k++)
        hist[k] <= in_first ? '0 : hist[k-1];
    end
  end

  // The block size is fixed for a whole pass.
  lbp_mode_e pass_mode;

  always_ff @(posedge clk) begin
    if (!rst_n)                    pass_mode <= BLK_1X1;
    else if (in_valid && in_first) pass_mode <= mode;
  end

  a_mode_per_pass: assert property (@(posedge clk) disable iff (!rst_n)
                                    in_valid && !in_first |-> mode == pass_mode);
  a_mode_legal: assert property (@(posedge clk) disable iff (!rst_n)
                                 in_valid |-> mode != 2'd3);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_mode  <= BLK_1X1;
      out_sum   <= '0;
    end else begin
      out_valid <= in_valid;
      out_first <= in_valid && in_first;
      if (in_valid) begin
        out_mode <= mode;
        out_sum  <= bsum;
      end
    end
  end

endmodule

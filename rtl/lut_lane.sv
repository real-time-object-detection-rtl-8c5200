// lut_lane: one 8-bit lane of the LBP table-lookup CVI.
//
// Two LBP patterns arrive together, one for each feature of the current
// feature pair. Each pattern picks one bit of its feature's 256-entry pass
// table; that bit chooses the feature's PASS score (bit = 1) or FAIL score
// (bit = 0). The two chosen scores are added into an 8-bit partial stage
// total. The addition wraps modulo 256: the cascade's scores are chosen
// offline so that no stage total leaves the signed 8-bit range.
//
// Timing: two register stages with no stall, so stage_sum is the result for
// the patterns presented two clocks earlier; the row is sampled in the first
// stage, in the same clock as the patterns.
// The dual lookup, the PASS/FAIL selection and the 8-bit add follow the
// document; the two-stage pipeline and "table bit 1 selects PASS" are this
// design's choices.
module lut_lane
  import lbp_cvi_pkg::*;
(
  input  logic               clk,
  input  logic [7:0]         pat_a,
  input  logic [7:0]         pat_b,
  input  lut_row_t           row,
  output logic [SCORE_W-1:0] stage_sum
);

  logic [SCORE_W-1:0] score_a_q, score_b_q;

  // Stage 1: table lookup and PASS/FAIL selection.
  always_ff @(posedge clk) begin
    score_a_q <= row.a.lut[pat_a] ? row.a.pass : row.a.fail;
    score_b_q <= row.b.lut[pat_b] ? row.b.pass : row.b.fail;
  end

  // Stage 2: partial stage total of the two features.
  always_ff @(posedge clk) begin
    stage_sum <= score_a_q + score_b_q;
  end

endmodule

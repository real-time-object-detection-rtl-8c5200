// lbp_lut_cvi: the LBP table-lookup custom vector instruction.
//
// Each wavefront carries, in every byte lane, two 8-bit LBP patterns: operand A
// holds the patterns for the first feature of the current pair and operand B
// for the second. Every lane (lut_lane) looks both up in the pair's pass
// tables, selects each feature's PASS or FAIL score and adds the two, giving an
// 8-bit partial stage total; software adds these totals with ordinary vector
// adds and compares the final stage total with zero.
//
// All lanes work on the same feature pair, so the pair comes from one shared
// 544-bit-wide memory (lut_feature_mem), addressed by a feature counter. The
// counter is loaded with the first row of a stage (from a small stage start
// table) when stage_start is pulsed, and advances by one row at every
// instr_end, so back-to-back lookup instructions walk through the stage's
// feature pairs without any address from software. The memory and the stage
// table are loaded at run time through the cfg_* ports, so the same hardware
// can run any cascade of up to LUT_ROWS feature pairs.
//
// Timing: one wavefront per clock, no stall. out_* follow in_* by two clocks.
// stage_start must come at least one clock before the first wavefront of the
// stage (an assertion checks that no wavefront comes with it); instr_end may come with the last wavefront of an instruction or after
// it, and the next instruction may start in the following clock. A row written
// through cfg_row_* is seen by wavefronts starting two clocks later.
// Masked byte lanes are computed, but their write enable (out_byteen) is low.
//
// What follows the document: dual lookup per byte lane, PASS/FAIL selection,
// 8-bit add, shared 544-bit memory, auto-incremented feature counter with a
// per-stage start. This design's choices: the explicit instr_end and
// stage_start strobes, the stage table, the row write port that stands in for
// the memory-initialisation instruction, and the two-stage pipeline.
module lbp_lut_cvi
  import lbp_cvi_pkg::*;
#(
  parameter int unsigned LANES      = 16,  // 32-bit lanes of the vector engine
  parameter int unsigned LUT_ROWS   = 53,  // feature pairs held
  parameter int unsigned MAX_STAGES = 12,  // cascade stages held
  localparam int unsigned BYTES     = 4 * LANES,
  localparam int unsigned ADDR_W    = (LUT_ROWS > 1) ? $clog2(LUT_ROWS) : 1,
  localparam int unsigned STAGE_W   = (MAX_STAGES > 1) ? $clog2(MAX_STAGES) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration
  input  logic                 cfg_row_we,
  input  logic [ADDR_W-1:0]    cfg_row_addr,
  input  lut_row_t             cfg_row_data,
  input  logic                 cfg_stage_we,
  input  logic [STAGE_W-1:0]   cfg_stage_idx,
  input  logic [ADDR_W-1:0]    cfg_stage_base,
  // feature counter control
  input  logic                 stage_start,
  input  logic [STAGE_W-1:0]   stage_num,
  input  logic                 instr_end,
  // wavefront in
  input  logic                 in_valid,
  input  logic [8*BYTES-1:0]   in_a,
  input  logic [8*BYTES-1:0]   in_b,
  input  logic [BYTES-1:0]     in_mask,
  // wavefront out
  output logic                 out_valid,
  output logic [8*BYTES-1:0]   out_data,
  output logic [BYTES-1:0]     out_byteen
);

  logic [ADDR_W-1:0] stage_base [MAX_STAGES];
  logic [ADDR_W-1:0] feat_ctr, feat_ctr_d;
  lut_row_t          row_q;

  // Stage start table.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(MAX_STAGES); i++) stage_base[i] <= '0;
    end else if (cfg_stage_we && (32'(cfg_stage_idx) < MAX_STAGES)) begin
      stage_base[cfg_stage_idx] <= cfg_stage_base;
    end
  end

  // Feature counter: the row of the feature pair used by the next wavefront.
  always_comb begin
    feat_ctr_d = feat_ctr;
    if (stage_start)
      feat_ctr_d = (32'(stage_num) < MAX_STAGES) ? stage_base[stage_num] : '0;
    else if (instr_end)
      feat_ctr_d = feat_ctr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) feat_ctr <= '0;
    else        feat_ctr <= feat_ctr_d;
  end

  // The memory is read at the next counter value every clock, so row_q always
  // holds the row the counter points at.
  lut_feature_mem #(.ROWS(LUT_ROWS)) u_mem (
    .clk     (clk),
    .wr_en   (cfg_row_we),
    .wr_addr (cfg_row_addr),
    .wr_data (cfg_row_data),
    .rd_addr (feat_ctr_d),
    .rd_data (row_q)
  );

  for (genvar g = 0; g < int'(BYTES); g++) begin : g_lane
    lut_lane u_lane (
      .clk       (clk),
      .pat_a     (in_a[8*g +: 8]),
      .pat_b     (in_b[8*g +: 8]),
      .row       (row_q),
      .stage_sum (out_data[8*g +: 8])
    );
  end

  // Valid and byte-enable follow the lanes' two register stages.
  logic             valid_q;
  logic [BYTES-1:0] mask_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q    <= 1'b0;
      out_valid  <= 1'b0;
      mask_q     <= '0;
      out_byteen <= '0;
    end else begin
      valid_q    <= in_valid;
      mask_q     <= in_valid ? in_mask : '0;
      out_valid  <= valid_q;
      out_byteen <= mask_q;
    end
  end

  // The row of a newly started stage is ready one clock after stage_start.
  a_start_before_wave: assert property (@(posedge clk) disable iff (!rst_n)
                                        stage_start |-> !in_valid);

endmodule

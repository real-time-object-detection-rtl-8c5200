// lbp_cvi_top: the custom-instruction unit of the MB-LBP face detector.
//
// A soft vector engine runs the detector in software and hands two
// operations to custom hardware through its custom-vector-instruction port:
//   OP_LUT  the table lookup of a pair of cascade features in every byte lane,
//           giving partial stage totals (lbp_lut_cvi);
//   OP_LBP  the precomputation of MB-LBP patterns for one block size, one
//           image row per wavefront (lbp_pattern_cvi).
// Both units take one wavefront of 4*LANES bytes per clock and return one
// result wavefront two clocks later, so results leave in issue order and the
// merged result port never carries two results at once. The feature memory
// and the stage start table of the lookup unit are loaded through cfg_*.
//
// Interface: cvi_* is the engine-side wavefront port (op, operands, byte
// mask); cvi_first marks the first row of an LBP pass and cvi_mode its block
// size; lut_stage_start / lut_stage_num / lut_instr_end steer the lookup
// unit's feature counter. res_* is the result port; res_byteen is the byte
// mask delayed with the data. The engine itself (scratchpad, DMA, wavefront
// skipping, host processor) is outside this module; the port layout is this
// design's choice.
module lbp_cvi_top
  import lbp_cvi_pkg::*;
#(
  parameter int unsigned LANES      = 16,
  parameter int unsigned LUT_ROWS   = 53,
  parameter int unsigned MAX_STAGES = 12,
  localparam int unsigned BYTES     = 4 * LANES,
  localparam int unsigned ADDR_W    = (LUT_ROWS > 1) ? $clog2(LUT_ROWS) : 1,
  localparam int unsigned STAGE_W   = (MAX_STAGES > 1) ? $clog2(MAX_STAGES) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // wavefront port
  input  logic                 cvi_valid,
  input  cvi_op_e              cvi_op,
  input  logic                 cvi_first,
  input  lbp_mode_e            cvi_mode,
  input  logic [8*BYTES-1:0]   cvi_a,
  input  logic [8*BYTES-1:0]   cvi_b,
  input  logic [BYTES-1:0]     cvi_mask,
  // lookup-unit feature counter
  input  logic                 lut_stage_start,
  input  logic [STAGE_W-1:0]   lut_stage_num,
  input  logic                 lut_instr_end,
  // configuration
  input  logic                 cfg_row_we,
  input  logic [ADDR_W-1:0]    cfg_row_addr,
  input  lut_row_t             cfg_row_data,
  input  logic                 cfg_stage_we,
  input  logic [STAGE_W-1:0]   cfg_stage_idx,
  input  logic [ADDR_W-1:0]    cfg_stage_base,
  // result port
  output logic                 res_valid,
  output logic [8*BYTES-1:0]   res_data,
  output logic [BYTES-1:0]     res_byteen
);

  logic               lut_valid, lbp_valid;
  logic [8*BYTES-1:0] lut_data, lbp_data;
  logic [BYTES-1:0]   lut_byteen;
  logic [BYTES-1:0]   lbp_mask_q, lbp_mask_qq;

  lbp_lut_cvi #(
    .LANES(LANES), .LUT_ROWS(LUT_ROWS), .MAX_STAGES(MAX_STAGES)
  ) u_lut (
    .clk            (clk),
    .rst_n          (rst_n),
    .cfg_row_we     (cfg_row_we),
    .cfg_row_addr   (cfg_row_addr),
    .cfg_row_data   (cfg_row_data),
    .cfg_stage_we   (cfg_stage_we),
    .cfg_stage_idx  (cfg_stage_idx),
    .cfg_stage_base (cfg_stage_base),
    .stage_start    (lut_stage_start),
    .stage_num      (lut_stage_num),
    .instr_end      (lut_instr_end),
    .in_valid       (cvi_valid && cvi_op == OP_LUT),
    .in_a           (cvi_a),
    .in_b           (cvi_b),
    .in_mask        (cvi_mask),
    .out_valid      (lut_valid),
    .out_data       (lut_data),
    .out_byteen     (lut_byteen)
  );

  lbp_pattern_cvi #(.LANES(LANES)) u_lbp (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (cvi_valid && cvi_op == OP_LBP),
    .in_first  (cvi_first),
    .mode      (cvi_mode),
    .in_a      (cvi_a),
    .in_b      (cvi_b),
    .out_valid (lbp_valid),
    .out_lbp   (lbp_data)
  );

  // The pattern unit has no mask input; its byte mask is delayed here.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lbp_mask_q  <= '0;
      lbp_mask_qq <= '0;
    end else begin
      lbp_mask_q  <= (cvi_valid && cvi_op == OP_LBP) ? cvi_mask : '0;
      lbp_mask_qq <= lbp_mask_q;
    end
  end

  always_comb begin
    res_valid  = lut_valid || lbp_valid;
    res_data   = lut_valid ? lut_data : lbp_data;
    res_byteen = lut_valid ? lut_byteen : (lbp_valid ? lbp_mask_qq : '0);
  end

  // Equal latencies mean the two units never finish in the same clock.
  a_one_result: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(lut_valid && lbp_valid));

endmodule

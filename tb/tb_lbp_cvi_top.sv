// tb_lbp_cvi_top: end-to-end test of the CVI unit at its default size
// (16 lanes, 53 feature rows, 12 stages).
//
// lbp_e2e_bench plays the detection software on the vector engine: it computes
// the three LBP pattern arrays of a random image stripe with the pattern
// instruction, loads a random 12-stage, 98-feature cascade, classifies every
// window position with lookup instructions, masked vector adds, early exit
// and skipped wavefronts, and compares the detections with a detector that
// works straight from the pixels. It counts each mechanism and fails if one
// never occurred.
module tb_lbp_cvi_top;
  import lbp_cvi_pkg::*;

  localparam int LANES = 16, BYTES = 4 * LANES;
  localparam int AW = $clog2(53), SW = $clog2(12);

  logic clk = 0, start = 0, done;
  int   checks, failures;
  logic               rst_n, cvi_valid, cvi_first;
  cvi_op_e            cvi_op;
  lbp_mode_e          cvi_mode;
  logic [8*BYTES-1:0] cvi_a, cvi_b, res_data;
  logic [BYTES-1:0]   cvi_mask, res_byteen;
  logic               lut_stage_start, lut_instr_end, cfg_row_we, cfg_stage_we, res_valid;
  logic [SW-1:0]      lut_stage_num, cfg_stage_idx;
  logic [AW-1:0]      cfg_row_addr, cfg_stage_base;
  lut_row_t           cfg_row_data;

  always #5 clk = ~clk;

  lbp_cvi_top dut (.*);
  lbp_e2e_bench #(.LANES(LANES)) bench (.*);

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1 start = 1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

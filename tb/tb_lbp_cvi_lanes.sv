// tb_lbp_cvi_lanes: the end-to-end detection test (see tb_lbp_cvi_top) on the
// smaller engine configurations of 4 and 8 lanes (16 and 32 byte lanes per
// wavefront). The two benches run one after the other because they share the
// reference model's image.
module tb_lbp_cvi_lanes;
  import lbp_cvi_pkg::*;

  localparam int AW = $clog2(53), SW = $clog2(12);

  logic clk = 0, start4 = 0, done4, done8;
  int   checks4, failures4, checks8, failures8;

  always #5 clk = ~clk;

  for (genvar g = 0; g < 2; g++) begin : g_cfg
    localparam int LANES = (g == 0) ? 4 : 8;
    localparam int BYTES = 4 * LANES;
    logic               rst_n, cvi_valid, cvi_first;
    cvi_op_e            cvi_op;
    lbp_mode_e          cvi_mode;
    logic [8*BYTES-1:0] cvi_a, cvi_b, res_data;
    logic [BYTES-1:0]   cvi_mask, res_byteen;
    logic               lut_stage_start, lut_instr_end, cfg_row_we, cfg_stage_we, res_valid;
    logic [SW-1:0]      lut_stage_num, cfg_stage_idx;
    logic [AW-1:0]      cfg_row_addr, cfg_stage_base;
    lut_row_t           cfg_row_data;

    logic start, done;
    int   checks, failures;

    lbp_cvi_top #(.LANES(LANES)) dut (.*);
    lbp_e2e_bench #(.LANES(LANES)) bench (.*);
  end

  assign g_cfg[0].start = start4;
  assign g_cfg[1].start = done4;
  assign done4 = g_cfg[0].done;
  assign done8 = g_cfg[1].done;
  assign checks4 = g_cfg[0].checks;
  assign failures4 = g_cfg[0].failures;
  assign checks8 = g_cfg[1].checks;
  assign failures8 = g_cfg[1].failures;

  initial begin
    repeat (800000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks8, failures4 + failures8 + 1);
    $finish;
  end

  initial begin
    #1 start4 = 1;
    wait (done4 && done8);
    $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks8, failures4 + failures8);
    $finish;
  end
endmodule

// tb_lbp_lut_cvi: self-checking test of the LBP table-lookup CVI.
// Loads a random 12-stage cascade into the feature memory and stage table,
// then runs lookup instructions of 0 to 4 wavefronts stage by stage, with
// random patterns and byte masks. Each result byte is checked against the
// reference score sum of the feature pair the counter should point at, the
// byte enable against the mask, and every result must come exactly two
// clocks after its wavefront (one wavefront per clock, back to back).
module tb_lbp_lut_cvi;
  import lbp_cvi_pkg::*;
  import lbp_ref_pkg::*;

  localparam int LANES = 16, BYTES = 4 * LANES, ROWS = 53, STAGES = 12;
  localparam int AW = $clog2(ROWS), SW = $clog2(STAGES);
  // feature pairs per stage (98 features, 8 stages with an odd count)
  localparam int PAIRS [STAGES] = '{5, 5, 5, 5, 5, 5, 5, 4, 4, 4, 3, 3};

  logic               clk = 0, rst_n = 0;
  logic               cfg_row_we = 0, cfg_stage_we = 0;
  logic [AW-1:0]      cfg_row_addr = '0, cfg_stage_base = '0;
  lut_row_t           cfg_row_data = '0;
  logic [SW-1:0]      cfg_stage_idx = '0, stage_num = '0;
  logic               stage_start = 0, instr_end = 0, in_valid = 0;
  logic [8*BYTES-1:0] in_a = '0, in_b = '0, out_data;
  logic [BYTES-1:0]   in_mask = '0, out_byteen;
  logic               out_valid;

  lut_row_t model [ROWS];
  int       base [STAGES];

  typedef struct {
    logic [8*BYTES-1:0] data;
    logic [BYTES-1:0]   be;
    longint             cyc;
  } exp_t;
  exp_t   expq [$];
  longint cyc = 0;
  int     checks = 0, failures = 0, n_wave = 0, n_empty = 0, n_joint_end = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  lbp_lut_cvi #(.LANES(LANES), .LUT_ROWS(ROWS), .MAX_STAGES(STAGES)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result monitor
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected result");
      end else begin
        automatic exp_t e = expq.pop_front();
        if (out_data !== e.data || out_byteen !== e.be || cyc != e.cyc + 2) begin
          failures++;
          if (failures < 10)
            $display("FAIL result cyc=%0d issued=%0d data_ok=%0d be_ok=%0d",
                     cyc, e.cyc, out_data === e.data, out_byteen === e.be);
        end
      end
    end
  end

  task automatic issue_instr(int row, int nwave, bit joint_end);
    for (int w = 0; w < nwave; w++) begin
      exp_t e;
      in_valid = 1;
      for (int i = 0; i < BYTES; i += 4) begin
        in_a[8*i +: 32] = $urandom; in_b[8*i +: 32] = $urandom;
      end
      in_mask = {$urandom, $urandom};
      for (int i = 0; i < BYTES; i++)
        e.data[8*i +: 8] = score(model[row].a, in_a[8*i +: 8]) + score(model[row].b, in_b[8*i +: 8]);
      e.be  = in_mask;
      e.cyc = cyc;
      expq.push_back(e);
      instr_end = joint_end && (w == nwave - 1);
      n_wave++;
      @(negedge clk);
    end
    in_valid = 0;
    if (!(joint_end && nwave > 0)) begin
      instr_end = 1;
      @(negedge clk);
    end else n_joint_end++;
    instr_end = 0;
    if (nwave == 0) n_empty++;
  endtask

  initial begin
    automatic int b = 0;
    for (int s = 0; s < STAGES; s++) begin base[s] = b; b += PAIRS[s]; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < ROWS; r++) begin
      cfg_row_we = 1; cfg_row_addr = AW'(r);
      for (int i = 0; i < ROW_W; i += 32) cfg_row_data[i +: 32] = $urandom;
      model[r] = cfg_row_data;
      @(negedge clk);
    end
    cfg_row_we = 0;
    for (int s = 0; s < STAGES; s++) begin
      cfg_stage_we = 1; cfg_stage_idx = SW'(s); cfg_stage_base = AW'(base[s]);
      @(negedge clk);
    end
    cfg_stage_we = 0;
    // stages in a shuffled order, twice
    for (int pass = 0; pass < 2; pass++) begin
      for (int k = 0; k < STAGES; k++) begin
        automatic int s = (k * 5 + pass * 7) % STAGES;
        stage_start = 1; stage_num = SW'(s);
        @(negedge clk);
        stage_start = 0;
        for (int p = 0; p < PAIRS[s]; p++)
          issue_instr(base[s] + p, int'($urandom_range(0, 4)), 1'($urandom));
      end
    end
    repeat (4) @(negedge clk);
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", expq.size());
    end
    if (n_empty == 0 || n_joint_end == 0) begin
      failures++;
      $display("FAIL empty instructions %0d, joint ends %0d", n_empty, n_joint_end);
    end
    $display("wavefronts=%0d empty_instructions=%0d", n_wave, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// lbp_e2e_bench: end-to-end stimulus and checker for the CVI unit, used by
// tb_lbp_cvi_top (default size) and tb_lbp_cvi_lanes (4 and 8 lanes). It
// drives the unit's ports, which the enclosing testbench wires to an
// lbp_cvi_top of the same LANES, and reports its counts when done is set.
//
// Plays the part of the detection software on the vector engine:
//  1. LBP precomputation: a random 40-row image stripe is streamed through the
//     pattern instruction once per block size (1x1, 2x2, 4x4); every pattern
//     is checked against the reference and kept, as software keeps the three
//     pattern arrays in the scratchpad.
//  2. Cascade: a random 12-stage, 98-feature cascade (two features per memory
//     row, odd stages padded with a zero-score feature, 53 rows) is loaded,
//     and every 12x12 search window of the stripe is classified. One wavefront
//     is one row of window positions; per feature pair one lookup instruction
//     runs over all rows that still hold a live position (rows with none are
//     skipped, as wavefront skipping does), with the live positions as the
//     byte mask. The testbench adds the partial totals (the engine's vector
//     add) and kills the positions whose stage total is negative.
// The surviving positions are compared with a detection computed straight
// from the pixels. Each mechanism (the three block sizes, masked bytes,
// skipped wavefronts, instructions with no wavefront, both ways of ending an
// instruction, early exit and detection) is counted and must occur.
module lbp_e2e_bench
  import lbp_cvi_pkg::*;
#(
  parameter int LANES = 16,
  localparam int BYTES = 4 * LANES,
  localparam int ROWS = 53, STAGES = 12, AW = $clog2(ROWS), SW = $clog2(STAGES)
) (
  input  logic               clk,
  input  logic               start,
  output logic               rst_n,
  output logic               cvi_valid,
  output cvi_op_e            cvi_op,
  output logic               cvi_first,
  output lbp_mode_e          cvi_mode,
  output logic [8*BYTES-1:0] cvi_a,
  output logic [8*BYTES-1:0] cvi_b,
  output logic [BYTES-1:0]   cvi_mask,
  output logic               lut_stage_start,
  output logic [SW-1:0]      lut_stage_num,
  output logic               lut_instr_end,
  output logic               cfg_row_we,
  output logic [AW-1:0]      cfg_row_addr,
  output lut_row_t           cfg_row_data,
  output logic               cfg_stage_we,
  output logic [SW-1:0]      cfg_stage_idx,
  output logic [AW-1:0]      cfg_stage_base,
  input  logic               res_valid,
  input  logic [8*BYTES-1:0] res_data,
  input  logic [BYTES-1:0]   res_byteen,
  output logic               done,
  output int                 checks,
  output int                 failures
);
  import lbp_ref_pkg::*;

  localparam int HALO = 8, EXT = BYTES + 2 * HALO;
  localparam int H = 40, WIN = 12, NY = H - WIN + 1, NX = BYTES - WIN + 1;
  localparam int NFEAT [STAGES] = '{9, 9, 9, 9, 9, 9, 9, 7, 8, 8, 6, 6};

  initial begin
    rst_n = 0; cvi_valid = 0; cvi_op = OP_LUT; cvi_first = 0; cvi_mode = BLK_1X1;
    cvi_a = '0; cvi_b = '0; cvi_mask = '0;
    lut_stage_start = 0; lut_stage_num = '0; lut_instr_end = 0;
    cfg_row_we = 0; cfg_row_addr = '0; cfg_row_data = '0;
    cfg_stage_we = 0; cfg_stage_idx = '0; cfg_stage_base = '0;
    done = 0; checks = 0; failures = 0;
  end

  // cascade
  typedef struct {
    int           s, dx, dy;
    logic [271:0] f;   // {lut, pass, fail}
  } feat_t;
  feat_t feats [STAGES][10];
  int    base [STAGES];

  logic [7:0] lbparr [3][H][BYTES];
  bit         alive [NY][BYTES];
  bit         init_alive [NY][BYTES];
  int         total [NY][BYTES];

  typedef struct {
    cvi_op_e            op;
    int                 r, m;
    logic [8*BYTES-1:0] data;
    logic [BYTES-1:0]   be;
    longint             cyc;
  } exp_t;
  exp_t   expq [$];
  longint cyc = 0;
  int n_mode [3], n_masked_bytes = 0, n_skipped = 0, n_issued = 0, n_empty_instr = 0;
  int n_joint_end = 0, n_early_exit = 0, n_detect = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // Result monitor: checks order, latency and contents, and stores the
  // patterns and partial totals as software would.
  always @(negedge clk) begin
    if (rst_n && res_valid) begin
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected result");
      end else begin
        automatic exp_t e = expq.pop_front();
        if (cyc != e.cyc + 2 || res_byteen !== e.be) begin
          failures++; $display("FAIL latency/byte enable op=%0d", e.op);
        end
        for (int x = 0; x < BYTES; x++) begin
          automatic logic [7:0] got = res_data[8*x +: 8];
          if (e.op == OP_LBP) begin
            automatic int s = int'(block_size(lbp_mode_e'(e.m)));
            automatic int yc = e.r - 2 * s + 1;
            if (yc >= 0) begin
              checks++;
              if (got !== lbp(yc, HALO + x, s)) begin
                failures++;
                if (failures < 10) $display("FAIL lbp m=%0d r=%0d x=%0d", e.m, e.r, x);
              end
              lbparr[e.m][yc][x] = got;
            end
          end else if (e.be[x]) begin
            checks++;
            if (got !== e.data[8*x +: 8]) begin
              failures++;
              if (failures < 10) $display("FAIL lut row=%0d x=%0d got %02h exp %02h", e.r, x, got, e.data[8*x +: 8]);
            end
            total[e.r][x] += int'($signed(got));
          end
        end
      end
    end
  end

  function automatic int mode_of(int s);
    return (s == 1) ? 0 : (s == 2) ? 1 : 2;
  endfunction

  // Pattern of feature ft for the window at (y0, x0), from the stored arrays.
  function automatic logic [7:0] pattern(feat_t ft, int y0, int x0);
    int xc = x0 + ft.dx + ft.s;
    if (xc >= BYTES) return 8'h00;
    return lbparr[mode_of(ft.s)][y0 + ft.dy + ft.s][xc];
  endfunction

  function automatic feat_t rand_feat();
    feat_t ft;
    int sc;
    ft.s  = 1 << $urandom_range(0, 2);
    ft.dx = int'($urandom_range(0, WIN - 3 * ft.s));
    ft.dy = int'($urandom_range(0, WIN - 3 * ft.s));
    for (int i = 0; i < 256; i += 32) ft.f[16 + i +: 32] = $urandom;
    sc = int'($urandom_range(5, 14));  ft.f[15:8] = 8'(sc);        // PASS
    sc = int'($urandom_range(0, 14));  ft.f[7:0]  = 8'(sc - 11);   // FAIL
    return ft;
  endfunction

  task automatic wait_drain();
    while (expq.size() != 0) @(negedge clk);
  endtask

  // Reference detection straight from the pixels: the stage at which the
  // window at (y0, x0) exits, STAGES if it passes them all.
  function automatic int ref_exit_stage(int y0, int x0);
    for (int st = 0; st < STAGES; st++) begin
      int t = 0;
      for (int k = 0; k < NFEAT[st]; k++) begin
        feat_t ft = feats[st][k];
        logic [7:0] p = lbp(y0 + ft.dy + ft.s, HALO + x0 + ft.dx + ft.s, ft.s);
        t += int'($signed(score(ft.f, p)));
      end
      if (t < 0) return st;
    end
    return STAGES;
  endfunction

  // Classifies all window positions, or (sparse) only a few that the
  // reference rejects in the first half of the cascade, so that the later
  // lookup instructions have no wavefront at all; then compares the
  // survivors with the reference detector.
  task automatic classify(bit sparse);
    automatic int picked = 0;
    for (int y = 0; y < NY; y++)
      for (int x = 0; x < BYTES; x++) begin
        alive[y][x] = (x < NX);
        if (sparse && alive[y][x]) begin
          alive[y][x] = (picked < 3) && (ref_exit_stage(y, x) < STAGES / 2);
          picked += int'(alive[y][x]);
        end
        init_alive[y][x] = alive[y][x];
      end
    for (int st = 0; st < STAGES; st++) begin
      for (int y = 0; y < NY; y++)
        for (int x = 0; x < BYTES; x++) total[y][x] = 0;
      lut_stage_start = 1; lut_stage_num = SW'(st);
      @(negedge clk);
      lut_stage_start = 0;
      for (int k = 0; k < NFEAT[st]; k += 2) begin
        automatic int last = -1;
        automatic bit joint = 1'($urandom);
        for (int y = 0; y < NY; y++) begin
          automatic bit any = 0;
          for (int x = 0; x < BYTES; x++) any |= alive[y][x];
          if (any) last = y;
          else n_skipped++;  // a dead wavefront is never issued
        end
        for (int y = 0; y <= last; y++) begin
          automatic exp_t e;
          automatic bit any = 0;
          for (int x = 0; x < BYTES; x++) any |= alive[y][x];
          if (!any) continue;
          for (int x = 0; x < BYTES; x++) begin
            automatic logic [7:0] pa = pattern(feats[st][k], y, x);
            automatic logic [7:0] pb = pattern(feats[st][k + 1], y, x);
            cvi_a[8*x +: 8] = pa;
            cvi_b[8*x +: 8] = pb;
            cvi_mask[x] = alive[y][x];
            e.data[8*x +: 8] = score(feats[st][k].f, pa) + score(feats[st][k + 1].f, pb);
            if (!alive[y][x]) n_masked_bytes++;
          end
          cvi_valid = 1; cvi_op = OP_LUT;
          lut_instr_end = joint && (y == last);
          e.op = OP_LUT; e.r = y; e.be = cvi_mask; e.cyc = cyc;
          expq.push_back(e);
          n_issued++;
          @(negedge clk);
        end
        cvi_valid = 0;
        if (last >= 0 && joint) n_joint_end++;
        else begin
          if (last < 0) n_empty_instr++;
          lut_instr_end = 1;
          @(negedge clk);
        end
        lut_instr_end = 0;
      end
      wait_drain();
      // stage decision: total >= 0 passes
      for (int y = 0; y < NY; y++)
        for (int x = 0; x < BYTES; x++)
          if (alive[y][x] && total[y][x] < 0) begin
            alive[y][x] = 0;
            n_early_exit++;
          end
    end

    // ---- 4. compare with the reference detector ----
    for (int y = 0; y < NY; y++)
      for (int x = 0; x < NX; x++) begin
        automatic bit r = init_alive[y][x] && (ref_exit_stage(y, x) == STAGES);
        checks++;
        if (alive[y][x] != r) begin
          failures++;
          if (failures < 10) $display("FAIL detection y=%0d x=%0d hw=%0d ref=%0d", y, x, alive[y][x], r);
        end
        n_detect += int'(alive[y][x]);
      end
  endtask

  initial begin
    automatic int row = 0;
    wait (start);
    repeat (3) @(negedge clk);
    rst_n = 1;
    fill_random(H, EXT);

    // ---- 1. LBP precomputation, one pass per block size ----
    for (int m = 0; m < 3; m++) begin
      for (int r = 0; r < H; r++) begin
        automatic exp_t e;
        for (int j = 0; j < BYTES; j++) begin
          cvi_a[8*j +: 8] = 8'(pix(r, j));
          cvi_b[8*j +: 8] = 8'(pix(r, j + 2 * HALO));
        end
        cvi_valid = 1; cvi_op = OP_LBP; cvi_first = (r == 0);
        cvi_mode = lbp_mode_e'(m); cvi_mask = '1;
        e.op = OP_LBP; e.r = r; e.m = m; e.be = '1; e.cyc = cyc;
        expq.push_back(e);
        n_mode[m]++;
        @(negedge clk);
      end
      cvi_valid = 0; cvi_first = 0;
    end
    wait_drain();

    // ---- 2. load the cascade ----
    for (int st = 0; st < STAGES; st++) begin
      base[st] = row;
      for (int k = 0; k < NFEAT[st]; k += 2) begin
        lut_row_t lr;
        feats[st][k] = rand_feat();
        if (k + 1 < NFEAT[st]) feats[st][k + 1] = rand_feat();
        else begin
          feats[st][k + 1].s = 1; feats[st][k + 1].dx = 0; feats[st][k + 1].dy = 0;
          feats[st][k + 1].f = '0;  // padding feature: scores 0
        end
        lr.a = feats[st][k].f;
        lr.b = feats[st][k + 1].f;
        cfg_row_we = 1; cfg_row_addr = AW'(row); cfg_row_data = lr;
        row++;
        @(negedge clk);
      end
      cfg_row_we = 0;
      cfg_stage_we = 1; cfg_stage_idx = SW'(st); cfg_stage_base = AW'(base[st]);
      @(negedge clk);
      cfg_stage_we = 0;
    end
    checks++;
    if (row != ROWS) begin failures++; $display("FAIL cascade used %0d rows", row); end

    // ---- 3./4. all window positions, then only a few ----
    classify(0);
    classify(1);

    $display("LANES=%0d:", LANES);
    $display("mode rows 1x1=%0d 2x2=%0d 4x4=%0d; lookup wavefronts issued=%0d skipped=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_issued, n_skipped);
    $display("masked bytes=%0d empty instructions=%0d joint ends=%0d early exits=%0d detections=%0d",
             n_masked_bytes, n_empty_instr, n_joint_end, n_early_exit, n_detect);
    if (n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0 || n_masked_bytes == 0 ||
        n_skipped == 0 || n_empty_instr == 0 || n_joint_end == 0 || n_early_exit == 0 ||
        n_detect == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    done = 1;
  end
endmodule

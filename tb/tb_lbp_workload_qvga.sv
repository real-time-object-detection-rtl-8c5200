// tb_lbp_workload_qvga: the 320x240 detection workload on the default-size
// CVI unit (16 lanes, 64-pixel stripes, 53 feature rows, 12 stages).
//
// Runs a dense scan (stride 1) with a 24x24 search window over every level
// of the image pyramid of a random 320x240 grey image, scale factor 1.1
// (320x240, 290x218, ... down to the last level at least 24 pixels high; the
// levels are made from the base image by bilinear interpolation, the job the
// software does). At each level:
//  1. LBP patterns of all three block sizes for the whole image, stripe by
//     stripe (5 stripes of 64 columns at the base level, 3 passes each), through the
//     pattern instruction. Pixels outside the image are fed as zero. Every
//     pattern of the image is checked against the reference.
//  2. A random 12-stage, 98-feature cascade with feature offsets anywhere in
//     the 24x24 window.
//  3. All window positions (217 x 297 at the base level) classified with
//     lookup instructions: each row of positions is as many wavefronts as it
//     needs (5 at the base level); dead wavefronts are skipped.
//  4. Detections compared position by position with the reference detector.
// The cascade is the same for all levels. The clock counts of both phases
// are printed per level and in total.
module tb_lbp_workload_qvga;
  import lbp_cvi_pkg::*;
  import lbp_ref_pkg::*;

  localparam int LANES = 16, BYTES = 4 * LANES, HALO = 8;
  localparam int AW = $clog2(53), SW = $clog2(12), STAGES = 12;
  localparam int BW = 320, BH = 240, WIN = 24;
  localparam int MAXSTRIPE = (BW + BYTES - 1) / BYTES;
  localparam int MAXWPR = (BW - WIN + BYTES) / BYTES;
  localparam int NFEAT [STAGES] = '{9, 9, 9, 9, 9, 9, 9, 7, 8, 8, 6, 6};

  logic               clk = 0, rst_n = 0;
  logic               cvi_valid = 0, cvi_first = 0;
  cvi_op_e            cvi_op = OP_LUT;
  lbp_mode_e          cvi_mode = BLK_1X1;
  logic [8*BYTES-1:0] cvi_a = '0, cvi_b = '0, res_data;
  logic [BYTES-1:0]   cvi_mask = '0, res_byteen;
  logic               lut_stage_start = 0, lut_instr_end = 0;
  logic [SW-1:0]      lut_stage_num = '0, cfg_stage_idx = '0;
  logic               cfg_row_we = 0, cfg_stage_we = 0;
  logic [AW-1:0]      cfg_row_addr = '0, cfg_stage_base = '0;
  lut_row_t           cfg_row_data = '0;
  logic               res_valid;

  lbp_cvi_top dut (.*);

  typedef struct {
    int           s, dx, dy;
    logic [271:0] f;
  } feat_t;
  feat_t feats [STAGES][10];

  // current level
  int IW, IH, NY, NX, NSTRIPE, WPR;
  int base_img [BH][BW];

  logic [7:0] lbparr [3][BH][MAXSTRIPE*BYTES];
  bit         alive [BH][MAXWPR*BYTES];
  int         total [BH][MAXWPR*BYTES];

  typedef struct {
    cvi_op_e            op;
    int                 r, m, x0;
    logic [8*BYTES-1:0] data;
    logic [BYTES-1:0]   be;
  } exp_t;
  exp_t   expq [$];
  longint cyc = 0;
  int checks = 0, failures = 0, n_issued = 0, n_skipped = 0, n_detect = 0, n_levels = 0;
  longint t_lbp_all = 0, t_lut_all = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && res_valid) begin
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected result");
      end else begin
        automatic exp_t e = expq.pop_front();
        for (int x = 0; x < BYTES; x++) begin
          automatic logic [7:0] got = res_data[8*x +: 8];
          if (e.op == OP_LBP) begin
            automatic int s = int'(block_size(lbp_mode_e'(e.m)));
            automatic int yc = e.r - 2 * s + 1;
            if (yc >= 0 && e.x0 + x < IW) begin
              checks++;
              if (got !== lbp(yc, e.x0 + x, s)) begin
                failures++;
                if (failures < 10) $display("FAIL lbp m=%0d r=%0d x=%0d", e.m, e.r, e.x0 + x);
              end
              lbparr[e.m][yc][e.x0 + x] = got;
            end
          end else if (e.be[x]) begin
            checks++;
            if (got !== e.data[8*x +: 8]) begin
              failures++;
              if (failures < 10) $display("FAIL lut y=%0d x=%0d", e.r, e.x0 + x);
            end
            total[e.r][e.x0 + x] += int'($signed(got));
          end
        end
      end
    end
  end

  function automatic int mode_of(int s);
    return (s == 1) ? 0 : (s == 2) ? 1 : 2;
  endfunction

  function automatic logic [7:0] pattern(feat_t ft, int y0, int x0);
    int xc = x0 + ft.dx + ft.s;
    if (x0 >= NX) return 8'h00;
    return lbparr[mode_of(ft.s)][y0 + ft.dy + ft.s][xc];
  endfunction

  function automatic feat_t rand_feat();
    feat_t ft;
    int sc;
    ft.s  = 1 << $urandom_range(0, 2);
    ft.dx = int'($urandom_range(0, WIN - 3 * ft.s));
    ft.dy = int'($urandom_range(0, WIN - 3 * ft.s));
    for (int i = 0; i < 256; i += 32) ft.f[16 + i +: 32] = $urandom;
    sc = int'($urandom_range(5, 14));  ft.f[15:8] = 8'(sc);
    sc = int'($urandom_range(0, 14));  ft.f[7:0]  = 8'(sc - 11);
    return ft;
  endfunction

  function automatic bit ref_detect(int y0, int x0);
    for (int st = 0; st < STAGES; st++) begin
      int t = 0;
      for (int k = 0; k < NFEAT[st]; k++) begin
        feat_t ft = feats[st][k];
        t += int'($signed(score(ft.f, lbp(y0 + ft.dy + ft.s, x0 + ft.dx + ft.s, ft.s))));
      end
      if (t < 0) return 0;
    end
    return 1;
  endfunction

  task automatic wait_drain();
    while (expq.size() != 0) @(negedge clk);
  endtask

  // Level image: bilinear interpolation of the base image, 8-bit fixed point.
  task automatic make_level(int lvl);
    automatic real f = 1.0;
    for (int i = 0; i < lvl; i++) f = f * 1.1;
    IW = int'($floor(BW / f));
    IH = int'($floor(BH / f));
    NY = IH - WIN + 1; NX = IW - WIN + 1;
    NSTRIPE = (IW + BYTES - 1) / BYTES;
    WPR = (NX + BYTES - 1) / BYTES;
    img_h = IH; img_w = IW;
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++) begin
        automatic real sy = y * f, sx = x * f;
        automatic int y0 = int'($floor(sy)), x0 = int'($floor(sx));
        automatic int y1 = (y0 + 1 < BH) ? y0 + 1 : y0, x1 = (x0 + 1 < BW) ? x0 + 1 : x0;
        automatic int fy = int'($floor((sy - y0) * 256.0)), fx = int'($floor((sx - x0) * 256.0));
        automatic int top = base_img[y0][x0] * (256 - fx) + base_img[y0][x1] * fx;
        automatic int bot = base_img[y1][x0] * (256 - fx) + base_img[y1][x1] * fx;
        img[y][x] = (top * (256 - fy) + bot * fy) >> 16;
      end
  endtask

  task automatic load_cascade();
    automatic int row = 0;
    for (int st = 0; st < STAGES; st++) begin
      cfg_stage_we = 1; cfg_stage_idx = SW'(st); cfg_stage_base = AW'(row);
      for (int k = 0; k < NFEAT[st]; k += 2) begin
        lut_row_t lr;
        feats[st][k] = rand_feat();
        if (k + 1 < NFEAT[st]) feats[st][k + 1] = rand_feat();
        else begin
          feats[st][k + 1].s = 1; feats[st][k + 1].dx = 0; feats[st][k + 1].dy = 0;
          feats[st][k + 1].f = '0;
        end
        lr.a = feats[st][k].f; lr.b = feats[st][k + 1].f;
        cfg_row_we = 1; cfg_row_addr = AW'(row); cfg_row_data = lr;
        row++;
        @(negedge clk);
        cfg_stage_we = 0;
      end
      cfg_row_we = 0;
    end
  endtask

  task automatic run_level(int lvl);
    automatic longint t0, t_lbp, t_lut;
    automatic int det = 0;
    make_level(lvl);
    // ---- 1. LBP precomputation, stripe by stripe ----
    t0 = cyc;
    for (int k = 0; k < NSTRIPE; k++) begin
      for (int m = 0; m < 3; m++) begin
        for (int r = 0; r < IH; r++) begin
          automatic exp_t e;
          for (int j = 0; j < BYTES; j++) begin
            cvi_a[8*j +: 8] = 8'(pix(r, k * BYTES + j - HALO));
            cvi_b[8*j +: 8] = 8'(pix(r, k * BYTES + j + HALO));
          end
          cvi_valid = 1; cvi_op = OP_LBP; cvi_first = (r == 0);
          cvi_mode = lbp_mode_e'(m); cvi_mask = '1;
          e.op = OP_LBP; e.r = r; e.m = m; e.x0 = k * BYTES; e.be = '1;
          expq.push_back(e);
          @(negedge clk);
        end
        cvi_valid = 0; cvi_first = 0;
      end
    end
    wait_drain();
    t_lbp = cyc - t0;

    // ---- 3. classification ----
    for (int y = 0; y < NY; y++)
      for (int x = 0; x < WPR * BYTES; x++) alive[y][x] = (x < NX);
    t0 = cyc;
    for (int st = 0; st < STAGES; st++) begin
      for (int y = 0; y < NY; y++)
        for (int x = 0; x < WPR * BYTES; x++) total[y][x] = 0;
      lut_stage_start = 1; lut_stage_num = SW'(st);
      @(negedge clk);
      lut_stage_start = 0;
      for (int k = 0; k < NFEAT[st]; k += 2) begin
        for (int y = 0; y < NY; y++)
          for (int w = 0; w < WPR; w++) begin
            automatic exp_t e;
            automatic bit any = 0;
            for (int x = 0; x < BYTES; x++) any |= alive[y][w * BYTES + x];
            if (!any) begin n_skipped++; continue; end
            for (int x = 0; x < BYTES; x++) begin
              automatic int x0 = w * BYTES + x;
              automatic logic [7:0] pa = pattern(feats[st][k], y, x0);
              automatic logic [7:0] pb = pattern(feats[st][k + 1], y, x0);
              cvi_a[8*x +: 8] = pa;
              cvi_b[8*x +: 8] = pb;
              cvi_mask[x] = alive[y][x0];
              e.data[8*x +: 8] = score(feats[st][k].f, pa) + score(feats[st][k + 1].f, pb);
            end
            cvi_valid = 1; cvi_op = OP_LUT;
            e.op = OP_LUT; e.r = y; e.x0 = w * BYTES; e.be = cvi_mask;
            expq.push_back(e);
            n_issued++;
            @(negedge clk);
          end
        cvi_valid = 0;
        lut_instr_end = 1;
        @(negedge clk);
        lut_instr_end = 0;
      end
      wait_drain();
      for (int y = 0; y < NY; y++)
        for (int x = 0; x < NX; x++)
          if (alive[y][x] && total[y][x] < 0) alive[y][x] = 0;
    end
    t_lut = cyc - t0;

    // ---- 4. reference detector ----
    for (int y = 0; y < NY; y++)
      for (int x = 0; x < NX; x++) begin
        automatic bit r = ref_detect(y, x);
        checks++;
        if (alive[y][x] != r) begin
          failures++;
          if (failures < 10) $display("FAIL detection y=%0d x=%0d", y, x);
        end
        det += int'(alive[y][x]);
      end
    $display("level %0d (%0dx%0d): LBP precompute %0d clocks, cascade %0d clocks, %0d detections",
             lvl, IW, IH, t_lbp, t_lut, det);
    n_detect += det;
    t_lbp_all += t_lbp;
    t_lut_all += t_lut;
    n_levels++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int y = 0; y < BH; y++)
      for (int x = 0; x < BW; x++) base_img[y][x] = int'($urandom_range(0, 255));
    load_cascade();
    for (int lvl = 0; int'($floor(BH / (1.1 ** lvl))) >= WIN; lvl++) run_level(lvl);
    $display("pyramid: %0d levels, LBP precompute %0d clocks, cascade %0d clocks (%0d wavefronts issued, %0d skipped), %0d detections",
             n_levels, t_lbp_all, t_lut_all, n_issued, n_skipped, n_detect);
    if (n_skipped == 0 || n_detect == 0) begin
      failures++;
      $display("FAIL no skipped wavefront or no detection");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

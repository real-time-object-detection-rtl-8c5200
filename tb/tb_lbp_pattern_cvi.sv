// tb_lbp_pattern_cvi: self-checking test of the LBP pattern CVI.
// Streams random image stripes through the instruction, one row per clock,
// in passes of all three block sizes (as software would: 1x1, 2x2, 4x4 over
// one stripe, then the next stripe). Every pattern is checked against the
// MB-LBP pattern computed from the pixels, and every row must come out
// exactly two clocks after it went in.
module tb_lbp_pattern_cvi;
  import lbp_cvi_pkg::*;
  import lbp_ref_pkg::*;

  localparam int LANES = 16, BYTES = 4 * LANES, HALO = 8, EXT = BYTES + 2 * HALO;
  localparam int H = 32;

  logic               clk = 0, rst_n = 0, in_valid = 0, in_first = 0;
  lbp_mode_e          mode = BLK_1X1;
  logic [8*BYTES-1:0] in_a = '0, in_b = '0, out_lbp;
  logic               out_valid;
  int checks = 0, failures = 0;
  longint cyc = 0;

  typedef struct { int r; int s; longint cyc; } row_t;
  row_t rq [$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  lbp_pattern_cvi #(.LANES(LANES)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (rq.size() == 0) begin
        failures++; $display("FAIL unexpected row");
      end else begin
        automatic row_t e = rq.pop_front();
        if (cyc != e.cyc + 2) begin
          failures++; $display("FAIL latency %0d", cyc - e.cyc);
        end
        for (int x = 0; x < BYTES; x++) begin
          automatic logic [7:0] p = lbp(e.r - 2 * e.s + 1, HALO + x, e.s);
          checks++;
          if (out_lbp[8*x +: 8] !== p) begin
            failures++;
            if (failures < 10) $display("FAIL s=%0d r=%0d x=%0d got %02h exp %02h",
                                        e.s, e.r, x, out_lbp[8*x +: 8], p);
          end
        end
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int stripe = 0; stripe < 3; stripe++) begin
      fill_random(H, EXT);
      for (int m = 0; m < 3; m++) begin
        mode = lbp_mode_e'(m);
        for (int r = 0; r < H; r++) begin
          automatic row_t e;
          for (int j = 0; j < BYTES; j++) begin
            in_a[8*j +: 8] = 8'(pix(r, j));
            in_b[8*j +: 8] = 8'(pix(r, j + 2 * HALO));
          end
          in_valid = 1; in_first = (r == 0);
          e.r = r; e.s = int'(block_size(mode)); e.cyc = cyc;
          rq.push_back(e);
          @(negedge clk);
        end
        in_valid = 0; in_first = 0;
        // the image must not change until the pass has left the pipeline
        repeat (3) @(negedge clk);
      end
    end
    if (rq.size() != 0) begin failures++; $display("FAIL rows missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

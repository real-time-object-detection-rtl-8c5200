// tb_lbp_compare: self-checking test of the 8-way comparison stage.
// Feeds rows of block sums, computed from a random image by the reference
// model, in all three block sizes and checks every output pattern against
// the MB-LBP pattern computed straight from the pixels, one clock later.
module tb_lbp_compare;
  import lbp_cvi_pkg::*;
  import lbp_ref_pkg::*;

  localparam int LANES = 16, BYTES = 4 * LANES, HALO = 8, EXT = BYTES + 2 * HALO;
  localparam int H = 24;

  logic                       clk = 0, rst_n = 0, in_valid = 0, in_first = 0;
  lbp_mode_e                  mode = BLK_1X1;
  logic [EXT-1:0][BSUM_W-1:0] in_sum = '0;
  logic                       out_valid;
  logic [8*BYTES-1:0]         out_lbp;
  int checks = 0, failures = 0;
  int bits_set [8];

  always #5 clk = ~clk;

  lbp_compare #(.LANES(LANES), .HALO(HALO)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 6; pass++) begin
      automatic int s;
      mode = lbp_mode_e'((pass + 2) % 3);
      s = int'(block_size(mode));
      fill_random(H, EXT);
      for (int r = 0; r < H; r++) begin
        for (int i = 0; i < EXT; i++) in_sum[i] = BSUM_W'(bsum(r - s + 1, i, s));
        in_valid = 1; in_first = (r == 0);
        @(negedge clk);
        in_valid = 0; in_first = 0;
        checks++;
        if (!out_valid) begin failures++; $display("FAIL no valid r=%0d", r); end
        for (int x = 0; x < BYTES; x++) begin
          automatic logic [7:0] e = lbp(r - 2 * s + 1, HALO + x, s);
          checks++;
          for (int b = 0; b < 8; b++) bits_set[b] += int'(e[b]);
          if (out_lbp[8*x +: 8] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL s=%0d r=%0d x=%0d got %02h exp %02h",
                                        s, r, x, out_lbp[8*x +: 8], e);
          end
        end
      end
    end
    for (int b = 0; b < 8; b++)
      if (bits_set[b] == 0) begin failures++; $display("FAIL bit %0d never set", b); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

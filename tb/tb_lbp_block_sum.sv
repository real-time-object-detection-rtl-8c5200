// tb_lbp_block_sum: self-checking test of the block-reduction stage.
// Runs passes of random image rows in all three block sizes, with idle clocks
// between some rows, and checks every block sum of every row against sums
// taken straight from the pixels, one clock after the row.
module tb_lbp_block_sum;
  import lbp_cvi_pkg::*;
  import lbp_ref_pkg::*;

  localparam int LANES = 16, BYTES = 4 * LANES, HALO = 8, EXT = BYTES + 2 * HALO;
  localparam int H = 20;

  logic                       clk = 0, rst_n = 0, in_valid = 0, in_first = 0;
  lbp_mode_e                  mode = BLK_1X1;
  logic [8*BYTES-1:0]         in_a = '0, in_b = '0;
  logic                       out_valid, out_first;
  lbp_mode_e                  out_mode;
  logic [EXT-1:0][BSUM_W-1:0] out_sum;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lbp_block_sum #(.LANES(LANES), .HALO(HALO)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive_row(int r);
    for (int j = 0; j < BYTES; j++) begin
      in_a[8*j +: 8] = 8'(pix(r, j));
      in_b[8*j +: 8] = 8'(pix(r, j + 2 * HALO));
    end
    in_valid = 1; in_first = (r == 0);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 9; pass++) begin
      automatic int s;
      mode = lbp_mode_e'(pass % 3);
      s = int'(block_size(mode));
      fill_random(H, EXT);
      for (int r = 0; r < H; r++) begin
        drive_row(r);
        @(negedge clk);
        in_valid = 0; in_first = 0;
        checks++;
        if (!out_valid || out_first != (r == 0) || out_mode != mode) begin
          failures++;
          $display("FAIL control r=%0d", r);
        end
        for (int i = 0; i < EXT; i++) begin
          checks++;
          if (int'(out_sum[i]) != bsum(r - s + 1, i, s)) begin
            failures++;
            if (failures < 10) $display("FAIL s=%0d r=%0d i=%0d got %0d exp %0d",
                                        s, r, i, out_sum[i], bsum(r - s + 1, i, s));
          end
        end
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          checks++;
          if (out_valid) begin failures++; $display("FAIL valid while idle"); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_lut_lane: self-checking test of one lookup lane.
// Random feature pairs and patterns go in every clock; the result two clocks
// later must be score(A) + score(B) modulo 256, computed by the reference.
module tb_lut_lane;
  import lbp_cvi_pkg::*;
  import lbp_ref_pkg::*;

  logic       clk = 0;
  logic [7:0] pat_a = '0, pat_b = '0, stage_sum;
  lut_row_t   row = '0;
  logic [7:0] exp_q [$];
  int         checks = 0, failures = 0;
  int         n_pass = 0, n_fail = 0;

  always #5 clk = ~clk;

  lut_lane dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < ROW_W; i += 32) row[i +: 32] = $urandom;
      pat_a = 8'($urandom); pat_b = 8'($urandom);
      exp_q.push_back(score(row.a, pat_a) + score(row.b, pat_b));
      if (row.a.lut[pat_a]) n_pass++; else n_fail++;
      @(negedge clk);
      // stage_sum now holds the result of the previous iteration's inputs
      if (n >= 1) begin
        automatic logic [7:0] e = exp_q.pop_front();
        checks++;
        if (stage_sum !== e) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d got %0d exp %0d", n, stage_sum, e);
        end
      end
    end
    if (n_pass == 0 || n_fail == 0) begin
      failures++;
      $display("FAIL both PASS and FAIL selections must occur");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

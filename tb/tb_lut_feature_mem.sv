// tb_lut_feature_mem: self-checking test of the feature memory.
// Fills every row with random data, reads all rows back in random order and
// checks the one-clock read latency and read-before-write on a shared address.
module tb_lut_feature_mem;
  import lbp_cvi_pkg::*;

  localparam int ROWS = 53;
  localparam int AW   = $clog2(ROWS);

  logic           clk = 0;
  logic           wr_en = 0;
  logic [AW-1:0]  wr_addr = '0, rd_addr = '0;
  lut_row_t       wr_data = '0, rd_data;
  lut_row_t       model [ROWS];
  int             checks = 0, failures = 0;

  always #5 clk = ~clk;

  lut_feature_mem #(.ROWS(ROWS)) dut (.*);

  function automatic lut_row_t rand_row();
    lut_row_t r;
    for (int i = 0; i < ROW_W; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  task automatic check(lut_row_t exp, string what);
    checks++;
    if (rd_data !== exp) begin
      failures++;
      $display("FAIL %s addr=%0d", what, rd_addr);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < ROWS; a++) begin
      wr_en = 1; wr_addr = AW'(a); wr_data = rand_row(); model[a] = wr_data;
      @(negedge clk);
    end
    wr_en = 0;
    // random reads: data one clock after the address
    for (int n = 0; n < 300; n++) begin
      automatic int a = int'($urandom_range(0, ROWS - 1));
      rd_addr = AW'(a);
      @(posedge clk); #1;
      check(model[a], "read");
      @(negedge clk);
    end
    // read and write the same row in one clock: old data first, new data next
    for (int n = 0; n < 50; n++) begin
      automatic int a = int'($urandom_range(0, ROWS - 1));
      automatic lut_row_t old = model[a];
      rd_addr = AW'(a); wr_addr = AW'(a); wr_en = 1; wr_data = rand_row();
      model[a] = wr_data;
      @(posedge clk); #1;
      check(old, "read-during-write");
      wr_en = 0;
      @(posedge clk); #1;
      check(model[a], "read-after-write");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

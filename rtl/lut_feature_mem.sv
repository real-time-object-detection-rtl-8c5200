// lut_feature_mem: the feature memory of the LBP table-lookup CVI.
//
// One row holds a pair of cascade features (lbp_cvi_pkg::lut_row_t, 544 bits):
// two 256x1 pass tables and their PASS/FAIL scores. All byte lanes of the
// vector engine evaluate the same feature pair at the same time, so one row is
// read per lookup instruction and broadcast to every lane. The default of 53
// rows holds a 12-stage, 98-feature cascade with two features per row, where a
// stage with an odd feature count pads its last row with a zero-score feature.
//
// Interface: one write port (used to load a cascade at run time) and one read
// port. Timing: the read is synchronous, rd_data holds row rd_addr one clock
// after rd_addr is presented; a read of a row being written returns the old
// contents. The synchronous read (block RAM style) is this design's choice.
module lut_feature_mem
  import lbp_cvi_pkg::*;
#(
  parameter int unsigned ROWS   = 53,
  parameter int unsigned ADDR_W = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  lut_row_t          wr_data,
  input  logic [ADDR_W-1:0] rd_addr,
  output lut_row_t          rd_data
);

  if ($bits(lut_row_t) != ROW_W) begin : g_bad_row
    $error("lut_feature_mem: a row must hold two 272-bit features");
  end

  lut_row_t mem [ROWS];

  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_addr) < ROWS)) mem[wr_addr] <= wr_data;
    if (32'(rd_addr) < ROWS) rd_data <= mem[rd_addr];
    else                     rd_data <= '0;
  end

endmodule

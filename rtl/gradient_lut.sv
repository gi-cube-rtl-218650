// gradient_lut: decodes the eight quantised gradient indices of a trilinear
// neighbourhood into gradient vectors. Voxels store an 11-bit index into a
// table of angular bins; the table (2^11 entries of three signed 10-bit
// components, 30 bits) is replicated eight times so that all eight voxels
// are decoded in the same cycle. All copies are written together from the
// LUT load bus (sel = LUT_GRAD, data[29:0] = {gx, gy, gz}). The read is
// combinational; it sits between the cache output and the resampling unit.
module gradient_lut
  import gicube_pkg::*;
#(
  parameter int unsigned ENTRIES = 2048
) (
  input  logic              clk,
  input  lut_wr_t           lut_wr,
  input  logic [10:0]       index [8],
  output logic signed [9:0] gx [8],
  output logic signed [9:0] gy [8],
  output logic signed [9:0] gz [8]
);
  localparam int unsigned AW = $clog2(ENTRIES);
  logic [29:0] table_c [8][ENTRIES];

  for (genvar c = 0; c < 8; c++) begin : g_copy
    always_ff @(posedge clk) begin
      if (lut_wr.we && lut_wr.sel == LUT_GRAD)
        table_c[c][AW'(lut_wr.addr)] <= lut_wr.data[29:0];
    end
    assign gx[c] = table_c[c][AW'(index[c])][29:20];
    assign gy[c] = table_c[c][AW'(index[c])][19:10];
    assign gz[c] = table_c[c][AW'(index[c])][9:0];
  end
endmodule

// segmentation_unit: classification. The 12-bit resampled density and the
// 2-bit material tag form a 14-bit index into an 84-bit SRAM table giving
// the sample colour (3 x 12 bits), opacity (16 bits) and 32 bits of shading
// coefficients (diffuse weight, specular weight, scattering constant K_s,
// BSDF code and glossiness; see seg_t). The table is written from the LUT
// load bus (sel = LUT_SEG). One register stage: the looked-up word appears
// with the ray and sample one cycle after the inputs.
module segmentation_unit
  import gicube_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  lut_wr_t lut_wr,
  input  logic    in_valid,
  input  ray_t    in_ray,
  input  sample_t in_s,
  output logic    out_valid,
  output ray_t    out_ray,
  output sample_t out_s,
  output seg_t    out_seg
);
  logic [83:0] table_m [16384];

  always_ff @(posedge clk) begin
    if (lut_wr.we && lut_wr.sel == LUT_SEG) table_m[lut_wr.addr[13:0]] <= lut_wr.data;
    out_seg <= seg_t'(table_m[{in_s.tag, in_s.density}]);
    out_ray <= in_ray;
    out_s   <= in_s;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
endmodule

// spacing_unit: jittered sample spacing and opacity correction.
//
// The inter-sample distance d (configuration, 8.8 voxels) is multiplied by a
// random factor r in [1/2, 1): an 8-bit value v from a 256-entry random
// table, indexed by mangling the sample position and image destination bits,
// gives r = (256 + v) / 512. The classified opacity alpha is then corrected
// for the step length, alpha' = 1 - (1 - alpha)^(d*r), through a second table
// indexed by {alpha[15:8], min(63, d*r in 1/16 voxel)} whose 16-bit entries are
// loaded by the board controller. Finally the ray opacity is composited,
// alpha_r' = alpha_r + (1 - alpha_r) * alpha'.
// The old ray opacity, alpha' and d*r are passed on for compositing and ray
// advance. One register stage.
module spacing_unit
  import gicube_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  lut_wr_t     lut_wr,
  input  logic [15:0] sample_dist,
  input  logic        in_valid,
  input  ray_t        in_ray,
  input  sample_t     in_s,
  input  seg_t        in_seg,
  output logic        out_valid,
  output ray_t        out_ray,       // opacity updated
  output sample_t     out_s,
  output seg_t        out_seg,
  output logic [23:0] out_old_opacity,
  output logic [15:0] out_alpha,     // corrected sample opacity alpha'
  output logic [15:0] out_dr         // step length d*r, 8.8
);
  logic [7:0]  jitter_m [256];
  logic [15:0] power_m  [16384];

  logic [7:0]  jv;
  logic [24:0] dr_full;
  logic [15:0] dr;
  logic [5:0]  dr_idx;
  logic [15:0] ap;
  logic [23:0] op_new;

  always_comb begin
    logic [39:0] t;
    jv      = jitter_m[mangle(in_ray, 8'h00)];
    dr_full = (25'(sample_dist) * (25'd256 + 25'(jv))) >> 9;
    dr      = (dr_full > 25'hFFFF) ? 16'hFFFF : dr_full[15:0];
    dr_idx  = (dr[15:4] > 12'd63) ? 6'd63 : dr[9:4];
    ap      = power_m[{in_seg.alpha[15:8], dr_idx}];
    t       = 40'(24'hFFFFFF - in_ray.opacity) * 40'(ap);
    op_new  = in_ray.opacity + 24'(t >> 16);
  end

  always_ff @(posedge clk) begin
    if (lut_wr.we && lut_wr.sel == LUT_JITTER) jitter_m[lut_wr.addr[7:0]] <= lut_wr.data[7:0];
    if (lut_wr.we && lut_wr.sel == LUT_POWER)  power_m[lut_wr.addr[13:0]] <= lut_wr.data[15:0];
    out_ray         <= in_ray;
    out_ray.opacity <= op_new;
    out_s           <= in_s;
    out_seg         <= in_seg;
    out_old_opacity <= in_ray.opacity;
    out_alpha       <= ap;
    out_dr          <= dr;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
endmodule

// resampler: the resampling unit at the top of the ray pipeline. From the
// eight voxels around a sample position and the 8-bit fraction of the
// position along x, y and z it trilinearly interpolates density (12 bits),
// the three decoded gradient components (signed 10 bits) and irradiance
// (11 bits), each with seven linear interpolators (four along x, two along
// y, one along z). The material tag is taken from the nearest voxel
// (fraction >= 128 rounds up). Corner i has offsets (i[0], i[1], i[2]).
// Each interpolator computes a + ((b - a) * f) / 256. One register stage:
// the sample and the ray appear one cycle after the inputs.
module resampler
  import gicube_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  ray_t              in_ray,
  input  voxel_t            vox [8],
  input  logic signed [9:0] gx [8],
  input  logic signed [9:0] gy [8],
  input  logic signed [9:0] gz [8],
  input  logic [7:0]        frac [3],
  output logic              out_valid,
  output ray_t              out_ray,
  output sample_t           out_s
);
  function automatic logic signed [13:0] lerp(input logic signed [13:0] a,
                                              input logic signed [13:0] b,
                                              input logic [7:0] f);
    logic signed [23:0] d;
    d = 24'(b - a) * $signed({16'd0, f});
    return 14'(a + 14'(d >>> 8));
  endfunction

  // channel 0 density, 1..3 gradient, 4 irradiance
  function automatic logic signed [13:0] tri_interp(input logic signed [13:0] v [8],
                                                    input logic [7:0] f [3]);
    logic signed [13:0] x [4];
    logic signed [13:0] y [2];
    for (int k = 0; k < 4; k++) x[k] = lerp(v[2*k], v[2*k+1], f[0]);
    for (int k = 0; k < 2; k++) y[k] = lerp(x[2*k], x[2*k+1], f[1]);
    return lerp(y[0], y[1], f[2]);
  endfunction

  sample_t s;
  always_comb begin
    logic signed [13:0] vd [8], vx [8], vy [8], vz [8], vi [8];
    logic [2:0] nn;
    for (int i = 0; i < 8; i++) begin
      vd[i] = 14'(vox[i].density);
      vi[i] = 14'(vox[i].irradiance);
      vx[i] = 14'(gx[i]);
      vy[i] = 14'(gy[i]);
      vz[i] = 14'(gz[i]);
    end
    nn = {frac[2][7], frac[1][7], frac[0][7]};
    s.density    = 12'(tri_interp(vd, frac));
    s.gx         = 10'(tri_interp(vx, frac));
    s.gy         = 10'(tri_interp(vy, frac));
    s.gz         = 10'(tri_interp(vz, frac));
    s.irradiance = 11'(tri_interp(vi, frac));
    s.tag        = vox[nn].tag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
  always_ff @(posedge clk) begin
    out_ray <= in_ray;
    out_s   <= s;
  end
endmodule

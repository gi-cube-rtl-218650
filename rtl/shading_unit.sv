// shading_unit: local shading and front-to-back compositing of rendering
// rays.
//
// Without global illumination the sample is lit from a reflectance map: six
// cube faces of 128 x 128 8-bit intensities for distant lights. The face is
// chosen by the largest gradient component and its sign (face = 2*axis +
// negative), the other two components divided by the largest one give the
// face coordinates, and four neighbouring entries are bilinearly
// interpolated. A zero gradient is left unshaded (intensity 255). With global
// illumination on, the diffuse intensity is the resampled irradiance scaled
// by the material's diffuse weight: min(255, kd * irradiance / 256).
// Shaded colour c_s = c * I / 256 is composited with the over operator,
// C' = C + (1 - alpha_r) * alpha' * c_s, saturating at 12 bits. Lighting rays
// pass unchanged (their red field holds energy). The map is loaded from the
// LUT bus (sel = LUT_REFL, address = face*16384 + v*128 + u). One register
// stage.
module shading_unit
  import gicube_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  lut_wr_t     lut_wr,
  input  logic        gi_enable,
  input  logic        in_valid,
  input  ray_t        in_ray,
  input  sample_t     in_s,
  input  seg_t        in_seg,
  input  logic [23:0] in_old_opacity,
  input  logic [15:0] in_alpha,
  input  logic [15:0] in_dr,
  output logic        out_valid,
  output ray_t        out_ray,
  output sample_t     out_s,
  output seg_t        out_seg,
  output logic [15:0] out_alpha,
  output logic [15:0] out_dr,
  output logic [7:0]  out_intensity
);
  logic [7:0] refl_m [6 * 128 * 128];

  logic [7:0] inten;
  ray_t       r;

  always_comb begin
    logic [9:0]  ax, ay, az, m;
    logic signed [10:0] a, b;
    logic [2:0]  face;
    logic [15:0] uf, vf;
    logic [6:0]  ui, vi, ui1, vi1;
    logic [7:0]  fu, fv;
    logic [7:0]  e00, e01, e10, e11;
    logic [16:0] top, bot;
    logic [24:0] mix;
    logic [18:0] gi;
    logic [15:0] w;
    logic [11:0] cin [3];
    logic [11:0] cacc [3];
    ax = in_s.gx[9] ? 10'(-in_s.gx) : 10'(in_s.gx);
    ay = in_s.gy[9] ? 10'(-in_s.gy) : 10'(in_s.gy);
    az = in_s.gz[9] ? 10'(-in_s.gz) : 10'(in_s.gz);
    if (ax >= ay && ax >= az) begin
      m = ax; face = {2'd0, in_s.gx[9]}; a = 11'(in_s.gy); b = 11'(in_s.gz);
    end else if (ay >= az) begin
      m = ay; face = {2'd1, in_s.gy[9]}; a = 11'(in_s.gx); b = 11'(in_s.gz);
    end else begin
      m = az; face = {2'd2, in_s.gz[9]}; a = 11'(in_s.gx); b = 11'(in_s.gy);
    end
    if (m == 0) begin
      uf = '0; vf = '0;
    end else begin
      uf = 16'((25'(a + $signed({1'b0, m})) * 25'd16256) / 25'(m));  // 127*128
      vf = 16'((25'(b + $signed({1'b0, m})) * 25'd16256) / 25'(m));
    end
    ui = uf[14:8]; fu = uf[7:0];
    vi = vf[14:8]; fv = vf[7:0];
    if (uf[15]) begin ui = 7'd127; fu = 8'd0; end
    if (vf[15]) begin vi = 7'd127; fv = 8'd0; end
    ui1 = (ui == 7'd127) ? ui : ui + 7'd1;
    vi1 = (vi == 7'd127) ? vi : vi + 7'd1;
    e00 = refl_m[{face, vi,  ui }];
    e01 = refl_m[{face, vi,  ui1}];
    e10 = refl_m[{face, vi1, ui }];
    e11 = refl_m[{face, vi1, ui1}];
    top = 17'(e00) * 17'(9'd256 - 9'(fu)) + 17'(e01) * 17'(fu);
    bot = 17'(e10) * 17'(9'd256 - 9'(fu)) + 17'(e11) * 17'(fu);
    mix = 25'(top) * 25'(9'd256 - 9'(fv)) + 25'(bot) * 25'(fv);
    inten = (m == 0) ? 8'd255 : mix[23:16];
    gi = (19'(in_seg.kd) * 19'(in_s.irradiance)) >> 8;
    if (gi_enable) inten = (gi > 19'd255) ? 8'd255 : gi[7:0];

    r = in_ray;
    w = 16'((32'(24'hFFFFFF - in_old_opacity) >> 8) * 32'(in_alpha) >> 16);
    cin[0] = in_seg.r; cin[1] = in_seg.g; cin[2] = in_seg.b;
    cacc[0] = in_ray.red; cacc[1] = in_ray.green; cacc[2] = in_ray.blue;
    for (int k = 0; k < 3; k++) begin
      logic [19:0] cs;
      logic [27:0] add;
      logic [12:0] sum;
      cs  = (20'(cin[k]) * 20'(inten)) >> 8;
      add = (28'(cs) * 28'(w)) >> 16;
      sum = 13'(cacc[k]) + 13'(add);
      cacc[k] = sum[12] ? 12'hFFF : sum[11:0];
    end
    if (!in_ray.rtype[T_LIGHT]) begin
      r.red = cacc[0]; r.green = cacc[1]; r.blue = cacc[2];
    end
  end

  always_ff @(posedge clk) begin
    if (lut_wr.we && lut_wr.sel == LUT_REFL) refl_m[lut_wr.addr] <= lut_wr.data[7:0];
    out_ray       <= r;
    out_s         <= in_s;
    out_seg       <= in_seg;
    out_alpha     <= in_alpha;
    out_dr        <= in_dr;
    out_intensity <= inten;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
endmodule

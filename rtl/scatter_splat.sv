// scatter_splat: last stage of the ray pipeline. It splits lighting-ray
// energy, scatters rays by the material BSDF, advances the ray and decides
// whether it has finished.
//
// Energy (lighting rays, energy E_r in the red field, K_s from the material):
//   low albedo   at every sample the absorbed part E_a = E_r (1-K_s) alpha'
//                leaves as an irradiance carrier (second output, a copy of
//                the ray at the sample position with T_CARRIER set and red =
//                E_a) and the ray continues with E_r' = E_r (1 - alpha').
//   high albedo  nothing is deposited until the ray's accumulated opacity
//                reaches its interaction value; then a random value below K_s
//                scatters the photon (opacity reset to zero) and otherwise it
//                is absorbed: the ray itself becomes a carrier of all of E_r.
// Scattering happens when the accumulated opacity (top 16 bits) reaches the
// interaction value and the material has a BSDF:
//   specular reflection   D - 2 (D.N) N, N the normalised gradient
//   dull reflection       reflection, then glossy scattering
//   dull scattering       normalise(D + beta*delta), beta = glossiness/8
//   isotropic             delta
//   ideal diffuse         delta, turned into the hemisphere facing back
//                         against the ray
//   software (codes 6,7)  the ray is trapped (T_TRAP) and sent to the board
//                         controller unchanged
// delta is a unit vector from a 256-entry random direction table (LUT_RDIR,
// {dx,dy,dz} Q2.14) indexed by mangling position and destination bits. A
// scattered ray gains a generation; in low albedo and for rendering rays the
// interaction value is redrawn between the current opacity and one, so the
// ray scatters again only after further opacity (this design's rule).
// Advance: position += D * step, step = d*r; inside a block flagged empty
// the step is the distance to the nearest block face along the ray (axial
// face distance divided by the direction component), at least d*r (space
// leaping). Finished (T_DONE): outside the volume, lifetime used up, a
// rendering ray at the early-ray-termination opacity, or a lighting ray with
// no energy left. One register stage.
module scatter_splat
  import gicube_pkg::*;
#(
  parameter int unsigned VOL_N = VOL_N_DEF,
  parameter int unsigned BLK_N = BLK_N_DEF,
  localparam int unsigned BPA  = VOL_N / BLK_N,
  localparam int unsigned NB   = BPA * BPA * BPA
) (
  input  logic          clk,
  input  logic          rst_n,
  input  lut_wr_t       lut_wr,
  input  cfg_t          cfg,
  input  logic [NB-1:0] empty_flags,
  input  logic          in_valid,
  input  ray_t          in_ray,
  input  sample_t       in_s,
  input  seg_t          in_seg,
  input  logic [15:0]   in_alpha,
  input  logic [15:0]   in_dr,
  output logic          a_valid,      // continuing / finished / trapped ray
  output ray_t          a_ray,
  output logic          b_valid,      // irradiance carrier
  output ray_t          b_ray,
  output logic [6:0]    ev            // {leap, ert, absorb, trap, scatter, splat, done}
);
  localparam int unsigned BS = $clog2(BLK_N);
  localparam int unsigned BW = $clog2(BPA);

  logic [47:0] rdir_m [256];

  ray_t r, c;
  logic a_v, b_v;
  logic [6:0] e;

  always_comb begin
    logic        light, int_hit, scatter, absorb, trap;
    logic [7:0]  u8;
    logic signed [15:0] dv [3];
    logic signed [15:0] del [3];
    logic signed [15:0] nv [3];
    logic [47:0] tmp;
    logic signed [35:0] dn;
    logic signed [17:0] rv [3];
    logic signed [17:0] gv [3];
    logic [15:0] op16;
    logic [15:0] pos [3];
    logic [BW-1:0] bk [3];
    logic [15:0] step;
    logic signed [19:0] np;
    logic [31:0] leap;
    logic        outside;
    logic [35:0] ea;
    logic [27:0] er;
    logic signed [35:0] ddn;
    logic [31:0] t, fd, ad;
    logic [15:0] npos [3];
    logic signed [15:0] rd [3];

    ddn = '0; t = '0; fd = '0; ad = '0;
    for (int k = 0; k < 3; k++) begin
      npos[k] = '0; rd[k] = '0;
    end
    ea = '0; er = '0; trap = 1'b0; np = '0; leap = '0; outside = 1'b0;
    for (int k = 0; k < 3; k++) begin
      gv[k] = '0; bk[k] = '0;
    end
    step = in_dr;
    r = in_ray;
    c = in_ray;
    a_v = in_valid;
    b_v = 1'b0;
    e = '0;
    light   = in_ray.rtype[T_LIGHT];
    op16    = in_ray.opacity[23:8];
    int_hit = op16 >= in_ray.interaction;
    u8      = mangle(in_ray, 8'hA5);
    tmp     = rdir_m[mangle(in_ray, 8'h3C)];
    del[0] = tmp[47:32]; del[1] = tmp[31:16]; del[2] = tmp[15:0];
    dv[0] = in_ray.dir_x; dv[1] = in_ray.dir_y; dv[2] = in_ray.dir_z;
    pos[0] = in_ray.pos_x; pos[1] = in_ray.pos_y; pos[2] = in_ray.pos_z;
    tmp = normalize3(18'(in_s.gx) <<< 7, 18'(in_s.gy) <<< 7, 18'(in_s.gz) <<< 7);
    nv[0] = tmp[47:32]; nv[1] = tmp[31:16]; nv[2] = tmp[15:0];
    dn = 36'(dv[0]) * 36'(nv[0]) + 36'(dv[1]) * 36'(nv[1]) + 36'(dv[2]) * 36'(nv[2]);
    absorb = 1'b0;
    scatter = 1'b0;

    // ---- energy split ----
    if (light && !cfg.high_albedo) begin
      ea = (36'(in_ray.red) * 36'(9'd256 - 9'(in_seg.ks_scat)) * 36'(in_alpha)) >> 24;
      er = (28'(in_ray.red) * 28'(17'h10000 - 17'(in_alpha))) >> 16;
      r.red = er[11:0];
      if (ea != 0) begin
        b_v = in_valid;
        c.rtype = 4'b0011;   // light | carrier
        c.red = ea[11:0];
        e[1] = in_valid;
      end
      scatter = int_hit && in_seg.bsdf != BSDF_NONE;
    end else if (light) begin
      if (int_hit) begin
        if (u8 < in_seg.ks_scat) scatter = 1'b1;
        else absorb = 1'b1;
      end
    end else begin
      scatter = int_hit && in_seg.bsdf != BSDF_NONE;
    end
    trap = scatter && (in_seg.bsdf == BSDF_SOFT0 || in_seg.bsdf == BSDF_SOFT1);

    // ---- scattering ----
    for (int k = 0; k < 3; k++) rv[k] = 18'(dv[k]);
    if (scatter && !trap) begin
      if (in_seg.bsdf == BSDF_SPECULAR || in_seg.bsdf == BSDF_DULL_REFL)
        for (int k = 0; k < 3; k++)
          rv[k] = 18'(dv[k]) - 18'((dn >>> 14) * 36'(nv[k]) >>> 13);
      if (in_seg.bsdf == BSDF_DULL_REFL || in_seg.bsdf == BSDF_DULL_SCAT) begin
        for (int k = 0; k < 3; k++) gv[k] = rv[k] + 18'((18'(del[k]) * $signed({13'd0, in_seg.beta})) >>> 3);
        tmp = normalize3(gv[0], gv[1], gv[2]);
        rv[0] = 18'($signed(tmp[47:32])); rv[1] = 18'($signed(tmp[31:16])); rv[2] = 18'($signed(tmp[15:0]));
      end
      if (in_seg.bsdf == BSDF_ISOTROPIC || in_seg.bsdf == BSDF_DIFFUSE)
        for (int k = 0; k < 3; k++) rv[k] = 18'(del[k]);
      if (in_seg.bsdf == BSDF_DIFFUSE) begin
        ddn = 36'(del[0]) * 36'(nv[0]) + 36'(del[1]) * 36'(nv[1]) + 36'(del[2]) * 36'(nv[2]);
        if ((ddn > 0 && dn > 0) || (ddn < 0 && dn < 0))
          for (int k = 0; k < 3; k++) rv[k] = -18'(del[k]);
      end
      r.dir_x = rv[0][15:0]; r.dir_y = rv[1][15:0]; r.dir_z = rv[2][15:0];
      r.generation = in_ray.generation + 8'd1;
      if (light && cfg.high_albedo) r.opacity = '0;
      else r.interaction = op16 + 16'((32'(16'hFFFF - op16) * 32'(u8)) >> 8);
    end
    if (trap) begin
      r = in_ray;
      r.rtype[T_TRAP] = 1'b1;
    end
    if (absorb) begin
      r.rtype[T_CARRIER] = 1'b1;
      e[1] = in_valid;
    end
    e[2] = scatter && !trap && in_valid;
    e[3] = trap && in_valid;
    e[4] = absorb && in_valid;

    // ---- advance ----
    for (int k = 0; k < 3; k++) bk[k] = BW'(pos[k][15:8] >> BS);
    step = in_dr;
    if (empty_flags[{bk[2], bk[1], bk[0]}]) begin
      leap = 32'hFFFF_FFFF;
      for (int k = 0; k < 3; k++) begin
        ad = dv[k][15] ? 32'(-32'(dv[k])) : 32'(dv[k]);
        if (dv[k][15]) fd = 32'(pos[k]) - (32'(bk[k]) << (BS + 8)) + 32'd1;
        else           fd = ((32'(bk[k]) + 32'd1) << (BS + 8)) - 32'(pos[k]);
        t = (ad == 0) ? 32'hFFFF_FFFF : (fd << 14) / ad;
        if (t < leap) leap = t;
      end
      if (leap > 32'(in_dr)) begin
        step = (leap > 32'hFFFF) ? 16'hFFFF : leap[15:0];
        e[6] = in_valid;
      end
    end
    outside = 1'b0;
    if (!trap && !absorb) begin
      rd[0] = r.dir_x; rd[1] = r.dir_y; rd[2] = r.dir_z;
      for (int k = 0; k < 3; k++) begin
        np = 20'($signed({4'd0, pos[k]})) + 20'((36'(rd[k]) * $signed({20'd0, step})) >>> 14);
        if (np < 0 || np >= $signed(20'(VOL_N * 256))) outside = 1'b1;
        npos[k] = np[15:0];
      end
      r.pos_x = npos[0]; r.pos_y = npos[1]; r.pos_z = npos[2];
      r.lifetime = (in_ray.lifetime == 0) ? 16'd0 : in_ray.lifetime - 16'd1;
      if (outside || r.lifetime == 0) r.rtype[T_DONE] = 1'b1;
      if (!light && r.opacity >= cfg.ert_threshold) begin
        r.rtype[T_DONE] = 1'b1;
        e[5] = in_valid;
      end
      if (light && r.red == 0) r.rtype[T_DONE] = 1'b1;
    end
    e[0] = in_valid && r.rtype[T_DONE];
  end

  always_ff @(posedge clk) begin
    if (lut_wr.we && lut_wr.sel == LUT_RDIR) rdir_m[lut_wr.addr[7:0]] <= lut_wr.data[47:0];
    a_ray <= r;
    b_ray <= c;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid <= 1'b0; b_valid <= 1'b0; ev <= '0;
    end else begin
      a_valid <= a_v; b_valid <= b_v; ev <= e;
    end
  end
endmodule

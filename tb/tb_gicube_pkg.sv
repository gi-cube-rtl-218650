// tb_gicube_pkg: test data shared by the GI-Cube testbenches: a procedural
// volume (a dense sphere in an empty volume), the contents of every lookup
// table, and helpers to build rays. The tables are computed here from their
// formulas, independently of the design.
package tb_gicube_pkg;
  import gicube_pkg::*;

  // Sphere of radius 40 voxels centred at (CX,CY,CZ); material tag by octant
  // of x: x < 128 -> tag 1 (specular), otherwise tag 2 (isotropic); voxels
  // with z >= 200 inside the slab 100 <= x < 110 are tag 3 (software BSDF).
  localparam int CX = 128, CY = 128, CZ = 128, RAD = 40;

  function automatic voxel_t voxel_at(input int x, input int y, input int z);
    voxel_t v;
    int d2;
    d2 = (x - CX) * (x - CX) + (y - CY) * (y - CY) + (z - CZ) * (z - CZ);
    v = '0;
    if (d2 < RAD * RAD) begin
      v.density = 12'(2000 + (x & 63));
      v.tag     = (x < CX) ? 2'd1 : 2'd2;
    end
    if (x >= 100 && x < 110 && z >= 200 && z < 230 && y >= 100 && y < 160) begin
      v.density = 12'd1500;
      v.tag     = 2'd3;
    end
    v.gradient = 11'((x * 7 + y * 3 + z) & 2047);
    return v;
  endfunction

  // gradient table entry i: three signed 10-bit components
  function automatic logic [29:0] grad_entry(input int i);
    logic signed [9:0] gx, gy, gz;
    gx = 10'((i & 15) * 16 - 120);
    gy = 10'(((i >> 4) & 15) * 16 - 120);
    gz = 10'(((i >> 8) & 7) * 32 - 100);
    return {gx, gy, gz};
  endfunction

  // segmentation entry {tag, density}
  function automatic seg_t seg_entry(input int idx);
    seg_t s;
    int dens, tag;
    dens = idx & 4095;
    tag  = idx >> 12;
    s = '0;
    s.r = 12'(dens);
    s.g = 12'(dens / 2);
    s.b = 12'(4095 - dens);
    s.alpha = (dens > 1000) ? 16'(dens * 8) : 16'd0;
    s.kd = 8'd200;
    s.ks_spec = 8'd0;
    s.ks_scat = 8'd128;
    s.beta = 5'd8;
    case (tag)
      1: s.bsdf = BSDF_SPECULAR;
      2: s.bsdf = BSDF_ISOTROPIC;
      3: s.bsdf = BSDF_SOFT0;
      default: s.bsdf = BSDF_NONE;
    endcase
    return s;
  endfunction

  function automatic logic [7:0] jitter_entry(input int i);
    return 8'(i);
  endfunction

  // 1 - (1 - a)^(dr), a = a8/256, dr = dri/16 voxels
  function automatic logic [15:0] power_entry(input int idx);
    real a, dr, v;
    a  = real'(idx >> 6) / 256.0;
    dr = real'(idx & 63) / 16.0;
    v  = 1.0 - ((1.0 - a) ** dr);
    if (v < 0.0) v = 0.0;
    return 16'($rtoi(v * 65535.0));
  endfunction

  // random unit direction i (Q2.14)
  function automatic logic [47:0] rdir_entry(input int i);
    real th, ph;
    logic signed [15:0] x, y, z;
    th = real'(i) * 2.399963;        // golden angle
    ph = $acos(1.0 - 2.0 * (real'(i) + 0.5) / 256.0);
    x = 16'($rtoi(16384.0 * $sin(ph) * $cos(th)));
    y = 16'($rtoi(16384.0 * $sin(ph) * $sin(th)));
    z = 16'($rtoi(16384.0 * $cos(ph)));
    return {x, y, z};
  endfunction

  function automatic logic [7:0] refl_entry(input int a);
    return 8'(64 + (a % 191));
  endfunction

  function automatic ray_t make_ray(input int px, input int py, input int pz,
                                    input int dx, input int dy, input int dz,
                                    input bit light, input int energy, input int inter);
    ray_t r;
    r = '0;
    r.pos_x = 16'(px); r.pos_y = 16'(py); r.pos_z = 16'(pz);
    r.dir_x = 16'(dx); r.dir_y = 16'(dy); r.dir_z = 16'(dz);
    r.dest_u = 16'(px ^ pz); r.dest_v = 16'(py);
    r.lifetime = 16'd2000;
    r.contribution = 16'd100;
    r.interaction = 16'(inter);
    r.rtype = light ? 4'b0001 : 4'b0000;
    r.red = light ? 12'(energy) : 12'd0;
    return r;
  endfunction
endpackage

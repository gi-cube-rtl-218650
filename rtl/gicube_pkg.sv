// gicube_pkg: types, constants and arithmetic helpers shared by the GI-Cube
// volumetric ray tracing processor.
//
// The 256-bit ray packet and the 36-bit voxel follow the published field
// widths: a ray holds a 3D start position, a direction, an image destination
// (u,v), its contribution to the image, a lifetime, a 24-bit opacity, a
// generation count, an interaction value, 12-bit red/green/blue, a 4-bit type
// and 8 bits of user storage; a voxel holds 12 bits of density, a 2-bit
// material tag, an 11-bit quantised gradient index and 11 bits of irradiance.
// Bit placement inside each 32-bit row of the ray packet (the lower column
// number is the lower bit) and all fixed-point formats are choices of this
// design:
//   position   unsigned 8.8 voxel units
//   direction  signed Q2.14 (1.0 = 16384), unit length
//   opacity    unsigned 0.24 fraction; interaction and contribution 0.16
//   red        carries the energy of a lighting ray (same units as the
//              11-bit voxel irradiance)
package gicube_pkg;

  // Design point: 256^3 volume, 32^3 blocks, four processors, 256-ray queues.
  localparam int unsigned VOL_N_DEF  = 256;
  localparam int unsigned BLK_N_DEF  = 32;
  localparam int unsigned NPROC_DEF  = 4;
  localparam int unsigned QLEN_DEF   = 256;

  // Ray type bits
  localparam int unsigned T_LIGHT   = 0;  // lighting ray (distributes energy)
  localparam int unsigned T_CARRIER = 1;  // irradiance carrier (splat request)
  localparam int unsigned T_TRAP    = 2;  // BSDF too complex: software scatters it
  localparam int unsigned T_DONE    = 3;  // ray finished (exited, opaque, expired)

  typedef struct packed {
    logic [15:0] pos_y;         // row 7 [255:240]
    logic [15:0] pos_x;         //       [239:224]
    logic [15:0] dir_x;         // row 6 [223:208]
    logic [15:0] pos_z;         //       [207:192]
    logic [15:0] dir_z;         // row 5
    logic [15:0] dir_y;
    logic [15:0] dest_v;        // row 4
    logic [15:0] dest_u;
    logic [15:0] lifetime;      // row 3
    logic [15:0] contribution;
    logic [7:0]  generation;    // row 2
    logic [23:0] opacity;
    logic [3:0]  rtype;         // row 1
    logic [11:0] red;
    logic [15:0] interaction;
    logic [7:0]  user;          // row 0
    logic [11:0] blue;
    logic [11:0] green;
  } ray_t;

  typedef struct packed {
    logic [10:0] irradiance;    // [35:25]
    logic [10:0] gradient;      // [24:14] index into the gradient LUT
    logic [1:0]  tag;           // [13:12]
    logic [11:0] density;       // [11:0]
  } voxel_t;

  // Trilinearly resampled sample
  typedef struct packed {
    logic [11:0]       density;
    logic signed [9:0] gx, gy, gz;
    logic [10:0]       irradiance;
    logic [1:0]        tag;
  } sample_t;

  // BSDF codes of a material (segmentation LUT)
  typedef enum logic [2:0] {
    BSDF_NONE      = 3'd0,  // no scattering
    BSDF_SPECULAR  = 3'd1,  // mirror reflection about the normal
    BSDF_DULL_REFL = 3'd2,  // reflection followed by glossy scattering
    BSDF_DULL_SCAT = 3'd3,  // glossy scattering about the ray direction
    BSDF_ISOTROPIC = 3'd4,  // random direction
    BSDF_DIFFUSE   = 3'd5,  // random direction in the hemisphere of the normal
    BSDF_SOFT0     = 3'd6,  // handled in software
    BSDF_SOFT1     = 3'd7
  } bsdf_e;

  // 84-bit segmentation LUT word: colour 36 + opacity 16 + shading 32
  typedef struct packed {
    logic [11:0] r, g, b;
    logic [15:0] alpha;
    logic [4:0]  beta;     // glossiness, beta = value/8
    bsdf_e       bsdf;
    logic [7:0]  ks_scat;  // scattering constant K_s (0.8 fraction)
    logic [7:0]  ks_spec;  // specular weight (reserved for software use)
    logic [7:0]  kd;       // diffuse weight for irradiance shading
  } seg_t;

  typedef enum logic [1:0] {
    PART_SIMPLE_SLAB   = 2'd0,
    PART_REPEATED_SLAB = 2'd1,
    PART_SKEWED_BLOCK  = 2'd2
  } partition_e;

  // Configuration registers written by the board controller
  typedef struct packed {
    partition_e  partition;
    logic        policy_contrib;   // 0: most rays, 1: most contribution
    logic        gi_enable;        // rendering rays shaded with irradiance
    logic        high_albedo;      // lighting rays behave as photons
    logic [15:0] sample_dist;      // inter-sample distance d, 8.8
    logic [23:0] ert_threshold;    // early ray termination opacity
  } cfg_t;

  // LUT load bus
  typedef enum logic [2:0] {
    LUT_GRAD   = 3'd0,  // 2^11 x 30  gradient index -> (gx,gy,gz)
    LUT_SEG    = 3'd1,  // 2^14 x 84  {tag,density} -> seg_t
    LUT_JITTER = 3'd2,  // 256 x 8    r = (256+v)/512
    LUT_POWER  = 3'd3,  // 2^14 x 16  {alpha[15:8], dr/16} -> corrected alpha
    LUT_RDIR   = 3'd4,  // 256 x 48   random unit direction
    LUT_REFL   = 3'd5   // 6*128*128 x 8 reflectance map
  } lut_sel_e;

  typedef struct packed {
    logic        we;
    lut_sel_e    sel;
    logic [16:0] addr;
    logic [83:0] data;
  } lut_wr_t;

  // Volume memory port (one per processor, towards the Rambus cell)
  typedef struct packed {
    logic        valid;
    logic        we;
    logic [23:0] addr;   // {z, y, x} voxel coordinates
    voxel_t      wdata;
  } mem_req_t;

  typedef struct packed {
    logic   valid;
    voxel_t rdata;
  } mem_rsp_t;

  // Integer square root of a 32-bit value (16-bit result)
  function automatic logic [15:0] isqrt32(input logic [31:0] v);
    logic [31:0] rem;
    logic [15:0] root;
    logic [31:0] trial;
    rem  = v;
    root = '0;
    for (int i = 15; i >= 0; i--) begin
      trial = ({16'd0, root} << (i + 1)) + (32'd1 << (2 * i));
      if (rem >= trial) begin
        rem  = rem - trial;
        root = root | (16'd1 << i);
      end
    end
    return root;
  endfunction

  // Normalise a direction given in Q2.14-scaled components (any length up to
  // ~2^17). Returns Q2.14 unit vector; a zero vector is returned unchanged.
  function automatic logic [47:0] normalize3(input logic signed [17:0] x,
                                             input logic signed [17:0] y,
                                             input logic signed [17:0] z);
    logic [35:0] sq;
    logic [31:0] sq_s;
    logic [15:0] len;   // length in Q?.6 after the scaling below
    logic signed [31:0] nx, ny, nz;
    sq  = 36'(x * x) + 36'(y * y) + 36'(z * z);   // Q4.28 scaled
    sq_s = sq[35:4];                              // divide by 16
    len = isqrt32(sq_s);                          // length * 2^14 / 4
    if (len == 0) return {x[15:0], y[15:0], z[15:0]};
    nx = (32'(x) <<< 12) / $signed({16'd0, len});
    ny = (32'(y) <<< 12) / $signed({16'd0, len});
    nz = (32'(z) <<< 12) / $signed({16'd0, len});
    return {nx[15:0], ny[15:0], nz[15:0]};
  endfunction

  // Hash that mangles sample position and image destination bits into a
  // LUT index for the pseudo-random tables.
  function automatic logic [7:0] mangle(input ray_t r, input logic [7:0] salt);
    logic [15:0] h;
    h = r.pos_x ^ {r.pos_y[7:0], r.pos_y[15:8]} ^ {r.pos_z[3:0], r.pos_z[15:4]}
        ^ r.dest_u ^ {r.dest_v[11:0], r.dest_v[15:12]} ^ {r.generation, salt};
    return h[15:8] ^ h[7:0];
  endfunction

endpackage

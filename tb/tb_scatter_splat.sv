// tb_scatter_splat: directed cases for the last pipeline stage at a reduced
// volume (64^3 in blocks of 8^3). The expected results are worked out by hand
// from the rules of the stage:
//   advance          pos += D * d*r; lifetime - 1
//   termination      outside the volume, lifetime used up, early ray
//                    termination of a rendering ray, lighting ray without
//                    energy
//   low albedo       absorbed energy E (1-Ks) alpha' leaves as a carrier, the
//                    ray keeps E (1-alpha')
//   high albedo      at the interaction point: scatter (Ks = 255, opacity
//                    reset) or absorb (Ks = 0, ray becomes a carrier)
//   BSDFs            specular mirror, isotropic and diffuse (random direction
//                    table filled with one known vector), software trap
//   space leaping    a ray in an empty block jumps to the block face
// Each case also checks the event bits. One cycle latency.
module tb_scatter_splat;
  import gicube_pkg::*;
  localparam int VN = 64, BN = 8, NB = 512;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  lut_wr_t lut_wr;
  cfg_t cfg;
  logic [NB-1:0] empty_flags;
  logic in_valid, a_valid, b_valid;
  ray_t in_ray, a_ray, b_ray;
  sample_t in_s;
  seg_t in_seg;
  logic [15:0] in_alpha, in_dr;
  logic [6:0] ev;
  int checks = 0, failures = 0;

  scatter_splat #(.VOL_N(VN), .BLK_N(BN)) dut (
    .clk, .rst_n, .lut_wr, .cfg, .empty_flags, .in_valid, .in_ray, .in_s, .in_seg,
    .in_alpha, .in_dr, .a_valid, .a_ray, .b_valid, .b_ray, .ev);

  localparam int ONE = 16384;   // 1.0 in Q2.14
  localparam int EV_DONE = 0, EV_SPLAT = 1, EV_SCAT = 2, EV_TRAP = 3, EV_ABS = 4, EV_ERT = 5,
                 EV_LEAP = 6;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic set_rdir(input int x, input int y, input int z);
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      lut_wr.we = 1; lut_wr.sel = LUT_RDIR; lut_wr.addr = 17'(i);
      lut_wr.data = 84'({16'(x), 16'(y), 16'(z)});
    end
    @(negedge clk);
    lut_wr.we = 0;
  endtask

  function automatic ray_t base_ray(input int px, input int py, input int pz);
    ray_t r;
    r = '0;
    r.pos_x = 16'(px); r.pos_y = 16'(py); r.pos_z = 16'(pz);
    r.dir_x = 16'(ONE);
    r.lifetime = 16'd100;
    r.interaction = 16'hFFFF;
    return r;
  endfunction

  task automatic step(input ray_t r, input seg_t g, input sample_t s, input int alpha, input int dr);
    @(negedge clk);
    in_ray = r; in_seg = g; in_s = s; in_alpha = 16'(alpha); in_dr = 16'(dr); in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    check(a_valid, "a_valid");
  endtask

  function automatic bit close(input logic [15:0] v, input int want, input int tol);
    int d;
    d = int'($signed(v)) - want;
    return d <= tol && d >= -tol;
  endfunction

  initial begin
    ray_t r;
    seg_t g;
    sample_t s;
    lut_wr = '0; cfg = '0; empty_flags = '0; in_valid = 0; in_ray = '0; in_s = '0; in_seg = '0;
    in_alpha = '0; in_dr = '0;
    cfg.ert_threshold = 24'hF00000;
    repeat (2) @(negedge clk);
    rst_n = 1;
    set_rdir(0, ONE, 0);
    g = '0; s = '0;

    // 1. plain advance of a rendering ray
    r = base_ray(20 * 256, 20 * 256, 20 * 256);
    step(r, g, s, 0, 128);
    check(a_ray.pos_x == 16'(20 * 256 + 128) && a_ray.pos_y == r.pos_y && a_ray.pos_z == r.pos_z,
          "advance by D * dr");
    check(a_ray.lifetime == 16'd99 && !a_ray.rtype[T_DONE] && ev == 7'd0 && !b_valid, "advance state");

    // 2. leaving the volume
    r = base_ray(63 * 256 + 200, 20 * 256, 20 * 256);
    step(r, g, s, 0, 128);
    check(a_ray.rtype[T_DONE] && ev[EV_DONE], "outside -> done");

    // 3. lifetime used up
    r = base_ray(20 * 256, 20 * 256, 20 * 256); r.lifetime = 16'd1;
    step(r, g, s, 0, 128);
    check(a_ray.rtype[T_DONE] && ev[EV_DONE], "lifetime -> done");

    // 4. early ray termination
    r = base_ray(20 * 256, 20 * 256, 20 * 256); r.opacity = 24'hF80000;
    step(r, g, s, 0, 128);
    check(a_ray.rtype[T_DONE] && ev[EV_ERT] && ev[EV_DONE], "early ray termination");

    // 5. low albedo energy split
    r = base_ray(20 * 256, 20 * 256, 20 * 256); r.rtype[T_LIGHT] = 1; r.red = 12'd1000;
    g = '0; g.ks_scat = 8'd64;
    step(r, g, s, 32768, 128);
    check(b_valid && b_ray.rtype == 4'b0011 && b_ray.red == 12'd375 && b_ray.pos_x == r.pos_x,
          $sformatf("carrier energy %0d", b_ray.red));
    check(a_ray.red == 12'd500 && !a_ray.rtype[T_DONE] && ev[EV_SPLAT], $sformatf("remaining energy %0d", a_ray.red));

    // 6. lighting ray that has no energy left
    r = base_ray(20 * 256, 20 * 256, 20 * 256); r.rtype[T_LIGHT] = 1; r.red = 12'd1;
    step(r, g, s, 65535, 128);
    check(a_ray.rtype[T_DONE], "no energy -> done");

    // 7. high albedo scatter and absorption
    cfg.high_albedo = 1;
    r = base_ray(20 * 256, 20 * 256, 20 * 256); r.rtype[T_LIGHT] = 1; r.red = 12'd1000;
    r.opacity = 24'h800000; r.interaction = 16'h4000;
    g = '0; g.ks_scat = 8'd0; g.bsdf = BSDF_ISOTROPIC;
    step(r, g, s, 1000, 128);
    check(a_ray.rtype[T_CARRIER] && a_ray.red == 12'd1000 && ev[EV_ABS] && !b_valid
          && a_ray.pos_x == r.pos_x, "high albedo absorption");
    g.ks_scat = 8'd255;
    r.pos_x = 16'(20 * 256 + 3);   // a position whose hash is below 255
    step(r, g, s, 1000, 128);
    if (!ev[EV_ABS]) begin
      check(ev[EV_SCAT] && a_ray.opacity == 0 && a_ray.generation == 8'd1
            && a_ray.dir_y == 16'(ONE) && a_ray.dir_x == 0 && a_ray.red == 12'd1000,
            "high albedo scatter");
      check(a_ray.pos_y == 16'(20 * 256 + 128) && a_ray.pos_x == r.pos_x, "moves along new direction");
    end else check(0, "high albedo with Ks=255 absorbed");
    cfg.high_albedo = 0;

    // 8. specular reflection off a surface facing -x
    r = base_ray(20 * 256, 20 * 256, 20 * 256); r.opacity = 24'h400000; r.interaction = 16'h1000;
    g = '0; g.bsdf = BSDF_SPECULAR;
    s = '0; s.gx = -10'sd200;
    step(r, g, s, 0, 64);
    check(close(a_ray.dir_x, -ONE, 8) && close(a_ray.dir_y, 0, 8) && close(a_ray.dir_z, 0, 8),
          $sformatf("mirror direction %0d", $signed(a_ray.dir_x)));
    check(ev[EV_SCAT] && a_ray.generation == 8'd1 && a_ray.interaction >= 16'h4000,
          "scatter bookkeeping");
    check(close(a_ray.pos_x, 20 * 256 - 64, 1), "moves back");

    // 9. isotropic scatter takes the table direction
    g.bsdf = BSDF_ISOTROPIC;
    step(r, g, s, 0, 64);
    check(a_ray.dir_x == 0 && a_ray.dir_y == 16'(ONE) && a_ray.dir_z == 0, "isotropic direction");

    // 10. diffuse: a table direction along the ray is turned back
    set_rdir(ONE, 0, 0);
    g.bsdf = BSDF_DIFFUSE;
    s = '0; s.gx = 10'sd200;
    step(r, g, s, 0, 64);
    check(a_ray.dir_x == 16'(-ONE), $sformatf("diffuse hemisphere %0d", $signed(a_ray.dir_x)));

    // 11. software BSDF trap
    g.bsdf = BSDF_SOFT0;
    step(r, g, s, 0, 64);
    check(a_ray.rtype[T_TRAP] && ev[EV_TRAP] && a_ray.pos_x == r.pos_x && a_ray.dir_x == r.dir_x
          && !ev[EV_SCAT], "trap");

    // 12. no BSDF: no scattering even past the interaction point
    g.bsdf = BSDF_NONE;
    step(r, g, s, 0, 64);
    check(!ev[EV_SCAT] && a_ray.dir_x == r.dir_x, "no bsdf, no scatter");

    // 13. space leaping through an empty block
    empty_flags[0] = 1'b1;
    g = '0; s = '0;
    r = base_ray(256, 4 * 256 + 128, 4 * 256 + 128);
    step(r, g, s, 0, 128);
    check(ev[EV_LEAP] && close(a_ray.pos_x, 8 * 256, 1), $sformatf("leap to %0d", a_ray.pos_x));
    r = base_ray(9 * 256, 4 * 256, 4 * 256);
    step(r, g, s, 0, 128);
    check(!ev[EV_LEAP] && a_ray.pos_x == 16'(9 * 256 + 128), "no leap in a full block");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

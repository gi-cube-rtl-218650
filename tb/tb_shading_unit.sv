// tb_shading_unit: fills the reflectance map with a map that is linear in the
// texel coordinates (u + v on even faces, 254 - u - v on odd ones), so that
// bilinear interpolation of it is exact and the expected intensity follows
// from the gradient alone: the dominant axis picks the face, the other two
// components divided by the dominant one give u, v = (c/m + 1)/2 * 127.
// Checks, one cycle after each sample: the intensity (within 2), the global
// illumination mode (min(255, kd * irradiance / 256)), the colour
// accumulation of rendering rays (C += colour * intensity * (1-O) alpha',
// within 2 per channel) and that lighting rays keep their colour fields.
module tb_shading_unit;
  import gicube_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  lut_wr_t lut_wr;
  logic gi_enable, in_valid, out_valid;
  ray_t in_ray, out_ray;
  sample_t in_s, out_s;
  seg_t in_seg, out_seg;
  logic [23:0] in_old_opacity;
  logic [15:0] in_alpha, in_dr, out_alpha, out_dr;
  logic [7:0] out_intensity;
  int checks = 0, failures = 0;

  shading_unit dut (.clk, .rst_n, .lut_wr, .gi_enable, .in_valid, .in_ray, .in_s, .in_seg,
                    .in_old_opacity, .in_alpha, .in_dr, .out_valid, .out_ray, .out_s,
                    .out_seg, .out_alpha, .out_dr, .out_intensity);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", msg); end
  endtask

  function automatic int map_val(input int face, input int v, input int u);
    return (face % 2 == 0) ? u + v : 254 - u - v;
  endfunction

  function automatic real expect_int(input int gx, input int gy, input int gz);
    int ax, ay, az, m, face;
    real a, b, u, v;
    ax = gx < 0 ? -gx : gx; ay = gy < 0 ? -gy : gy; az = gz < 0 ? -gz : gz;
    if (ax >= ay && ax >= az) begin m = ax; face = gx < 0 ? 1 : 0; a = gy; b = gz; end
    else if (ay >= az)        begin m = ay; face = gy < 0 ? 3 : 2; a = gx; b = gz; end
    else                      begin m = az; face = gz < 0 ? 5 : 4; a = gx; b = gy; end
    if (m == 0) return 255.0;
    u = (a / m + 1.0) / 2.0 * 127.0;
    v = (b / m + 1.0) / 2.0 * 127.0;
    return (face % 2 == 0) ? u + v : 254.0 - u - v;
  endfunction

  initial begin
    lut_wr = '0; gi_enable = 0; in_valid = 0; in_ray = '0; in_s = '0; in_seg = '0;
    in_old_opacity = '0; in_alpha = '0; in_dr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 6; f++)
      for (int v = 0; v < 128; v++)
        for (int u = 0; u < 128; u++) begin
          @(negedge clk);
          lut_wr.we = 1; lut_wr.sel = LUT_REFL; lut_wr.addr = 17'(f * 16384 + v * 128 + u);
          lut_wr.data = 84'(map_val(f, v, u));
        end
    @(negedge clk);
    lut_wr.we = 0;
    for (int n = 0; n < 3000; n++) begin
      ray_t r;
      sample_t s;
      seg_t g;
      real ei, w, want;
      int inten;
      bit gi, light;
      s = '0;
      s.gx = 10'($urandom); s.gy = 10'($urandom); s.gz = 10'($urandom);
      if (n < 3) begin s.gx = '0; s.gy = '0; s.gz = '0; end
      s.irradiance = 11'($urandom);
      g = '0; g.r = 12'($urandom); g.g = 12'($urandom); g.b = 12'($urandom); g.kd = 8'($urandom);
      r = '0; r.red = 12'($urandom % 2048); r.green = 12'($urandom % 2048); r.blue = 12'($urandom % 2048);
      light = $urandom % 3 == 0;
      r.rtype[T_LIGHT] = light;
      gi = n % 4 == 3;
      gi_enable = gi;
      in_ray = r; in_s = s; in_seg = g; in_valid = 1;
      in_old_opacity = 24'($urandom); in_alpha = 16'($urandom);
      @(negedge clk);
      inten = int'(out_intensity);
      if (gi) begin
        int e;
        e = (int'(g.kd) * int'(s.irradiance)) >> 8;
        check(inten == (e > 255 ? 255 : e), $sformatf("gi intensity %0d", inten));
      end else begin
        begin
          int gxi, gyi, gzi;
          gxi = $signed(s.gx); gyi = $signed(s.gy); gzi = $signed(s.gz);
          ei = expect_int(gxi, gyi, gzi);
        end
        check(real'(inten) - ei <= 2.0 && ei - real'(inten) <= 2.0,
              $sformatf("intensity %0d want %f ", inten, ei));
      end
      check(out_valid && out_s == s && out_seg == g, "pass-through");
      w = (1.0 - real'(in_old_opacity) / 16777216.0) * real'(in_alpha) / 65536.0;
      if (light) check(out_ray == r, "lighting ray colour unchanged");
      else begin
        want = real'(r.red) + real'(g.r) * real'(inten) / 256.0 * w;
        if (want > 4095.0) want = 4095.0;
        check(real'(out_ray.red) - want <= 2.0 && want - real'(out_ray.red) <= 2.0,
              $sformatf("red %0d want %f", out_ray.red, want));
        want = real'(r.blue) + real'(g.b) * real'(inten) / 256.0 * w;
        if (want > 4095.0) want = 4095.0;
        check(real'(out_ray.blue) - want <= 2.0 && want - real'(out_ray.blue) <= 2.0,
              $sformatf("blue %0d want %f", out_ray.blue, want));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (120000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

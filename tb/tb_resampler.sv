// tb_resampler: random eight-voxel neighbourhoods, gradients and fractions.
// The expected density, gradient and irradiance are the trilinear sums
// sum_i w_i v_i with weights w_i = prod_a (f_a or 256-f_a) / 2^24, computed
// here in real arithmetic; the unit's cascade of seven linear interpolations
// may differ from it by rounding, so a difference of up to 3 is accepted. The
// material tag must be that of the nearest corner. One cycle latency.
module tb_resampler;
  import gicube_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  ray_t in_ray, out_ray;
  voxel_t vox [8];
  logic signed [9:0] gx [8], gy [8], gz [8];
  logic [7:0] frac [3];
  sample_t out_s;
  int checks = 0, failures = 0;

  resampler dut (.clk, .rst_n, .in_valid, .in_ray, .vox, .gx, .gy, .gz, .frac,
                 .out_valid, .out_ray, .out_s);

  function automatic real wsum(input real v [8], input logic [7:0] f [3]);
    real acc, w;
    acc = 0.0;
    for (int i = 0; i < 8; i++) begin
      w = 1.0;
      for (int a = 0; a < 3; a++)
        w = w * ((((i >> a) & 1) != 0) ? real'(f[a]) / 256.0 : (256.0 - real'(f[a])) / 256.0);
      acc = acc + w * v[i];
    end
    return acc;
  endfunction

  function automatic bit near(input int got, input real want);
    real d;
    d = real'(got) - want;
    return d < 3.0 && d > -3.0;
  endfunction

  initial begin
    in_valid = 0; in_ray = '0;
    for (int i = 0; i < 8; i++) begin vox[i] = '0; gx[i] = '0; gy[i] = '0; gz[i] = '0; end
    for (int a = 0; a < 3; a++) frac[a] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      real vd [8], vx [8], vy [8], vz [8], vi [8];
      int nn;
      ray_t r;
      for (int i = 0; i < 8; i++) begin
        vox[i] = voxel_t'(36'({$urandom, $urandom}));
        gx[i] = 10'($urandom); gy[i] = 10'($urandom); gz[i] = 10'($urandom);
        vd[i] = real'(vox[i].density); vi[i] = real'(vox[i].irradiance);
        vx[i] = real'(gx[i]); vy[i] = real'(gy[i]); vz[i] = real'(gz[i]);
      end
      for (int a = 0; a < 3; a++) frac[a] = 8'($urandom);
      nn = (frac[0] >= 128 ? 1 : 0) + (frac[1] >= 128 ? 2 : 0) + (frac[2] >= 128 ? 4 : 0);
      r = '0; r.lifetime = 16'(n);
      in_ray = r; in_valid = 1;
      @(negedge clk);
      checks++;
      if (!out_valid || out_ray != r || out_s.tag != vox[nn].tag
          || !near(int'(out_s.density), wsum(vd, frac))
          || !near(int'(out_s.irradiance), wsum(vi, frac))
          || !near(int'(out_s.gx), wsum(vx, frac))
          || !near(int'(out_s.gy), wsum(vy, frac))
          || !near(int'(out_s.gz), wsum(vz, frac))) begin
        failures++;
        if (failures < 5) $display("FAIL %0d: density %0d want %f", n, out_s.density, wsum(vd, frac));
      end
    end
    in_valid = 0;
    @(negedge clk);
    checks++;
    if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

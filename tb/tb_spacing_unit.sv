// tb_spacing_unit: loads the jitter table with j(i) = i and the power table
// with P(a, s) = 1 - (1 - a/256)^(s/16), then sends rays with random opacity
// through samples of random material opacity. Expected, computed here from
// the formulas rather than the tables: the step d*r = d (256 + j)/512 with j
// the jitter entry picked by the ray hash, the corrected opacity
// alpha' = 1 - (1 - alpha)^(min(63, dr/16)/16), and the new ray opacity
// O + (1 - O) alpha'. Tolerances cover the table's quantisation. One cycle.
module tb_spacing_unit;
  import gicube_pkg::*;
  import tb_gicube_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  lut_wr_t lut_wr;
  logic [15:0] sample_dist;
  logic in_valid, out_valid;
  ray_t in_ray, out_ray;
  sample_t in_s, out_s;
  seg_t in_seg, out_seg;
  logic [23:0] out_old_opacity;
  logic [15:0] out_alpha, out_dr;
  int checks = 0, failures = 0;

  spacing_unit dut (.clk, .rst_n, .lut_wr, .sample_dist, .in_valid, .in_ray, .in_s, .in_seg,
                    .out_valid, .out_ray, .out_s, .out_seg, .out_old_opacity, .out_alpha, .out_dr);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", msg); end
  endtask

  initial begin
    lut_wr = '0; in_valid = 0; in_ray = '0; in_s = '0; in_seg = '0; sample_dist = 16'd256;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      lut_wr.we = 1; lut_wr.sel = LUT_JITTER; lut_wr.addr = 17'(i); lut_wr.data = 84'(jitter_entry(i));
    end
    for (int i = 0; i < 16384; i++) begin
      @(negedge clk);
      lut_wr.we = 1; lut_wr.sel = LUT_POWER; lut_wr.addr = 17'(i); lut_wr.data = 84'(power_entry(i));
    end
    @(negedge clk);
    lut_wr.we = 0;
    for (int n = 0; n < 2000; n++) begin
      ray_t r;
      seg_t g;
      int j, dr, s;
      real a, ap, o, onew;
      r = '0;
      r.pos_x = 16'($urandom); r.pos_y = 16'($urandom); r.pos_z = 16'($urandom);
      r.dest_u = 8'($urandom); r.dest_v = 8'($urandom);
      r.opacity = 24'($urandom);
      g = '0; g.alpha = 16'($urandom);
      sample_dist = 16'(64 + $urandom % 1024);
      in_ray = r; in_seg = g; in_valid = 1;
      j  = int'(mangle(r, 8'h00));
      dr = (int'(sample_dist) * (256 + j)) >> 9;
      s  = (dr >> 4) > 63 ? 63 : dr >> 4;
      a  = real'(g.alpha[15:8]) / 256.0;
      ap = 1.0 - ((1.0 - a) ** (real'(s) / 16.0));
      o  = real'(r.opacity) / 16777216.0;
      onew = o + (1.0 - o) * ap;
      @(negedge clk);
      check(out_valid && out_old_opacity == r.opacity, "valid/old opacity");
      check(int'(out_dr) == dr, $sformatf("dr %0d want %0d", out_dr, dr));
      check(real'(out_alpha) / 65535.0 - ap < 0.001 && ap - real'(out_alpha) / 65535.0 < 0.001,
            $sformatf("alpha' %0d want %f", out_alpha, ap));
      check(real'(out_ray.opacity) / 16777216.0 - onew < 0.001
            && onew - real'(out_ray.opacity) / 16777216.0 < 0.001,
            $sformatf("opacity %0d want %f", out_ray.opacity, onew));
      check(out_ray.opacity >= r.opacity, "opacity never falls");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

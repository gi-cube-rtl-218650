// tb_segmentation_unit: writes random 84-bit material entries into the
// segmentation table, then feeds random samples and checks that exactly one
// cycle later the unit returns the entry addressed by {tag, density}, the
// same ray and sample, and the valid bit delayed by one cycle.
module tb_segmentation_unit;
  import gicube_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  lut_wr_t lut_wr;
  logic in_valid, out_valid;
  ray_t in_ray, out_ray;
  sample_t in_s, out_s;
  seg_t out_seg;
  logic [83:0] model [16384];
  int checks = 0, failures = 0;

  segmentation_unit dut (.clk, .rst_n, .lut_wr, .in_valid, .in_ray, .in_s,
                         .out_valid, .out_ray, .out_s, .out_seg);

  initial begin
    lut_wr = '0; in_valid = 0; in_ray = '0; in_s = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16384; i++) begin
      @(negedge clk);
      model[i] = {20'($urandom), $urandom, $urandom};
      lut_wr.we = 1; lut_wr.sel = LUT_SEG; lut_wr.addr = 17'(i); lut_wr.data = model[i];
    end
    @(negedge clk);
    lut_wr.we = 0;
    for (int n = 0; n < 3000; n++) begin
      sample_t s;
      ray_t r;
      logic v;
      s = sample_t'({$urandom, $urandom});
      r = '0; r.lifetime = 16'(n);
      v = $urandom % 4 != 0;
      in_s = s; in_ray = r; in_valid = v;
      @(negedge clk);
      checks++;
      if (out_valid != v || (v && (out_seg != seg_t'(model[{s.tag, s.density}])
                                   || out_s != s || out_ray != r))) begin
        failures++;
        if (failures < 5) $display("FAIL sample %0d tag %0d density %0d", n, s.tag, s.density);
      end
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

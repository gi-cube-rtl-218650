// tb_ray_dispatch: directed cases for the bucketing stage of processor 1 (of
// four, simple slabs): a local ray goes to its block queue, rays of
// processors 2 and 0 go right and left, a finished ray and a ray outside
// the volume go to the controller, a ray for a full queue overflows to the
// controller, two rays are placed in one cycle, the pipeline has priority
// over neighbours, and a broadcast ray of another processor is refused.
module tb_ray_dispatch;
  import gicube_pkg::*;
  logic pa_valid, pb_valid, l_valid, r_valid, d_valid;
  ray_t pa_ray, pb_ray, l_ray, r_ray, d_ray;
  logic l_ready, r_ready, d_ready;
  logic [8:0] count [128];
  logic [6:0] free_l, free_r, free_d;
  logic [1:0] q_wr, l_wr, r_wr, d_wr, overflow;
  logic [6:0] q_id [2];
  ray_t q_ray [2], slot_ray [2];
  int checks = 0, failures = 0;

  ray_dispatch #(.MY_ID(1)) dut (.partition(PART_SIMPLE_SLAB), .pa_valid, .pa_ray, .pb_valid, .pb_ray,
    .l_valid, .l_ray, .l_ready, .r_valid, .r_ray, .r_ready, .d_valid, .d_ray, .d_ready,
    .count, .free_l, .free_r, .free_d, .q_wr, .q_id, .q_ray, .l_wr, .r_wr, .d_wr, .slot_ray, .overflow);

  function automatic ray_t at(input int x, input int y, input int z);
    ray_t r;
    r = '0;
    r.pos_x = 16'(x << 8); r.pos_y = 16'(y << 8); r.pos_z = 16'(z << 8);
    return r;
  endfunction

  task automatic expect_(input string name, input logic [1:0] eq, input logic [1:0] el,
                         input logic [1:0] er, input logic [1:0] ed);
    #1;
    checks++;
    if (q_wr !== eq || l_wr !== el || r_wr !== er || d_wr !== ed) begin
      failures++;
      $display("FAIL %s: q%b l%b r%b d%b", name, q_wr, l_wr, r_wr, d_wr);
    end
  endtask

  initial begin
    for (int q = 0; q < 128; q++) count[q] = '0;
    free_l = 64; free_r = 64; free_d = 64;
    {pa_valid, pb_valid, l_valid, r_valid, d_valid} = '0;
    pa_ray = '0; pb_ray = '0; l_ray = '0; r_ray = '0; d_ray = '0;
    // local ray: x=100 -> bx=3 -> processor 1, x'=1, y=40 -> 1, z=200 -> 6
    pa_valid = 1; pa_ray = at(100, 40, 200);
    expect_("local", 2'b01, 0, 0, 0);
    checks++; if (q_id[0] != 7'(64 + 8 + 6)) failures++;
    pa_ray = at(140, 0, 0);  expect_("to right", 0, 0, 2'b01, 0);
    pa_ray = at(10, 0, 0);   expect_("to left", 0, 2'b01, 0, 0);
    pa_ray = at(100, 0, 0); pa_ray.rtype[T_DONE] = 1; expect_("done", 0, 0, 0, 2'b01);
    pa_ray = at(100, 0, 0); pa_ray.rtype[T_TRAP] = 1; expect_("trap", 0, 0, 0, 2'b01);
    // full queue
    pa_ray = at(100, 40, 200); count[78] = 9'd256;
    expect_("overflow", 0, 0, 0, 2'b01);
    checks++; if (overflow != 2'b01) failures++;
    count[78] = 9'd255;
    pb_valid = 1; pb_ray = at(100, 40, 200);
    expect_("two into last place", 2'b01, 0, 0, 2'b10);
    count[78] = 0;
    expect_("two local", 2'b11, 0, 0, 0);
    // neighbours wait while the pipeline delivers two rays
    l_valid = 1; l_ray = at(70, 0, 0);
    expect_("pipeline first", 2'b11, 0, 0, 0);
    checks++; if (l_ready) failures++;
    pb_valid = 0;
    expect_("neighbour in second slot", 2'b11, 0, 0, 0);
    checks++; if (!l_ready) failures++;
    pa_valid = 0; l_valid = 0;
    d_valid = 1; d_ray = at(200, 0, 0);
    #1; checks++; if (d_ready) failures++;
    d_ray = at(80, 0, 0);
    expect_("broadcast ray owned", 2'b01, 0, 0, 0);
    checks++; if (!d_ready) failures++;
    free_d = 10;
    #1; checks++; if (d_ready) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

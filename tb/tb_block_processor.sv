// tb_block_processor: one processor of a two-processor machine at a reduced
// size (64^3 volume, 16^3 blocks, queues of 16 rays), owning the blocks with
// x < 32 under the simple slab partition, with the behavioural RDRAM model
// behind its cache. The volume of the model is empty at this size, so rays
// only travel. The testbench plays the neighbour on both sides and the board
// controller, and checks:
//  - broadcast rays are taken only when this processor owns them;
//  - every accepted ray leaves exactly once: towards the neighbour once it
//    crosses x = 32 (owned by the other processor, sent right, the shorter
//    way), to the board controller as finished once it leaves the volume,
//    or to the board controller unfinished when its queue was full;
//  - a neighbour's ray meant for the other processor is passed on;
//  - a burst into one queue overflows it, and leaping, cache misses, queue
//    switches and all the output paths happen.
module tb_block_processor;
  import gicube_pkg::*;
  import tb_gicube_pkg::*;
  localparam int VN = 64, BN = 16, NP = 2, QL = 16, NB = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_t cfg;
  logic [NB-1:0] empty_flags;
  lut_wr_t lut_wr;
  logic l_in_valid, r_in_valid, d_in_valid, l_in_ready, r_in_ready, d_in_ready;
  ray_t l_in_ray, r_in_ray, d_in_ray;
  logic l_out_valid, r_out_valid, d_out_valid, l_out_ready, r_out_ready, d_out_ready;
  ray_t l_out_ray, r_out_ray, d_out_ray;
  mem_req_t mem_req;
  logic mem_ready;
  mem_rsp_t mem_rsp;
  logic [15:0] ev;
  int n_reads, n_writes, max_irr;
  int checks = 0, failures = 0;
  int evc [16];
  int seen [int];
  int n_right = 0, n_left = 0, n_done = 0, n_ovf = 0, n_accepted = 0;

  block_processor #(.VOL_N(VN), .BLK_N(BN), .NPROC(NP), .QLEN(QL), .MY_ID(0)) dut (
    .clk, .rst_n, .cfg, .empty_flags, .lut_wr,
    .l_in_valid, .l_in_ray, .l_in_ready, .r_in_valid, .r_in_ray, .r_in_ready,
    .d_in_valid, .d_in_ray, .d_in_ready,
    .l_out_valid, .l_out_ray, .l_out_ready, .r_out_valid, .r_out_ray, .r_out_ready,
    .d_out_valid, .d_out_ray, .d_out_ready, .mem_req, .mem_ready, .mem_rsp, .ev);
  rdram_model #(.LAT(6), .STALL_EVERY(5)) u_mem (
    .clk, .req(mem_req), .ready(mem_ready), .rsp(mem_rsp), .n_reads, .n_writes, .max_irr);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  function automatic int rid(input ray_t r);
    return int'({r.dest_v, r.dest_u});
  endfunction

  // output monitor
  always @(posedge clk) begin
    if (rst_n) begin
      for (int b = 0; b < 16; b++) if (ev[b]) evc[b]++;
      if (r_out_valid && r_out_ready) begin
        n_right++;
        check(seen.exists(rid(r_out_ray)) && seen[rid(r_out_ray)] == 1, "right: unknown or repeated ray");
        seen[rid(r_out_ray)] = 2;
        check(r_out_ray.pos_x >= 16'(32 * 256) && r_out_ray.pos_x < 16'(64 * 256),
              $sformatf("right: ray at x %0h not owned by the neighbour", r_out_ray.pos_x));
      end
      if (l_out_valid && l_out_ready) begin
        n_left++;
        check(0, "left: with two processors the shorter way is always right");
      end
      if (d_out_valid && d_out_ready) begin
        check(seen.exists(rid(d_out_ray)) && seen[rid(d_out_ray)] == 1, "dsp: unknown or repeated ray");
        seen[rid(d_out_ray)] = 2;
        if (d_out_ray.rtype[T_DONE]) n_done++;
        else n_ovf++;
      end
    end
  end

  task automatic lut_write(input lut_sel_e sel, input int addr, input logic [83:0] data);
    @(negedge clk);
    lut_wr.we = 1'b1; lut_wr.sel = sel; lut_wr.addr = 17'(addr); lut_wr.data = data;
    @(negedge clk);
    lut_wr.we = 1'b0;
  endtask

  function automatic ray_t mk(input int id, input int px, input int py, input int pz, input int dx);
    ray_t r;
    r = make_ray(px, py, pz, dx, 0, 0, 0, 0, 16'hFFFF);
    r.dest_u = 8'(id); r.dest_v = 8'(id >> 8);
    return r;
  endfunction

  // offer a ray on the bus and the left input in the same cycles until taken
  task automatic offer2(input ray_t a, input bit use_a, input ray_t b, input bit use_b,
                        output bit took_a, output bit took_b);
    @(negedge clk);
    d_in_ray = a; d_in_valid = use_a;
    l_in_ray = b; l_in_valid = use_b;
    took_a = 0; took_b = 0;
    for (int k = 0; k < 200 && ((use_a && !took_a) || (use_b && !took_b)); k++) begin
      #1;
      if (d_in_valid && d_in_ready) begin took_a = 1; seen[rid(a)] = 1; end
      if (l_in_valid && l_in_ready) begin took_b = 1; seen[rid(b)] = 1; end
      @(posedge clk); #1;
      if (took_a) d_in_valid = 0;
      if (took_b) l_in_valid = 0;
      @(negedge clk);
    end
    d_in_valid = 0; l_in_valid = 0;
  endtask

  initial begin
    bit ta, tb2;
    int id;
    for (int b = 0; b < 16; b++) evc[b] = 0;
    cfg = '0; cfg.partition = PART_SIMPLE_SLAB; cfg.sample_dist = 16'd512; cfg.ert_threshold = 24'hF00000;
    empty_flags = '0;
    empty_flags[{2'd3, 2'd3, 2'd0}] = 1'b1;     // block (0,3,3) is empty
    lut_wr = '0;
    l_in_valid = 0; r_in_valid = 0; d_in_valid = 0; l_in_ray = '0; r_in_ray = '0; d_in_ray = '0;
    l_out_ready = 1; r_out_ready = 1; d_out_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2048; i++)  lut_write(LUT_GRAD, i, 84'(grad_entry(i)));
    for (int i = 0; i < 16384; i++) lut_write(LUT_SEG, i, 84'(seg_entry(i)));
    for (int i = 0; i < 256; i++)   lut_write(LUT_JITTER, i, 84'(jitter_entry(i)));
    for (int i = 0; i < 16384; i++) lut_write(LUT_POWER, i, 84'(power_entry(i)));
    for (int i = 0; i < 256; i++)   lut_write(LUT_RDIR, i, 84'(rdir_entry(i)));

    // a broadcast ray owned by the other processor is not taken
    @(negedge clk);
    d_in_ray = mk(1, 40 * 256, 8 * 256, 8 * 256, 16384); d_in_valid = 1;
    repeat (20) begin #1; check(!d_in_ready, "foreign broadcast ray taken"); @(negedge clk); end
    d_in_valid = 0;

    // a neighbour's ray owned by the other processor is passed on to the right
    offer2('0, 0, mk(2, 40 * 256, 8 * 256, 8 * 256, 16384), 1, ta, tb2);
    check(tb2, "neighbour ray not taken");

    // random rays in this processor's half, travelling +x or -x
    id = 10;
    for (int n = 0; n < 300; n++) begin
      ray_t a, b;
      a = mk(id, ($urandom % 32) * 256 + 128, ($urandom % 64) * 256, ($urandom % 64) * 256,
             ($urandom % 2) ? 16384 : -16384);
      b = mk(id + 1, ($urandom % 32) * 256 + 128, ($urandom % 64) * 256, ($urandom % 64) * 256,
             ($urandom % 2) ? 16384 : -16384);
      if (n % 50 == 7) begin
        // burst into one queue: both inputs, same block, moving slowly
        a = mk(id, 5 * 256, 5 * 256, 5 * 256, 16384); b = mk(id + 1, 6 * 256, 5 * 256, 5 * 256, 16384);
      end
      if (n % 40 == 3) a = mk(id, 2 * 256, 56 * 256, 56 * 256, 16384);   // through the empty block
      l_out_ready = $urandom % 4 != 0; r_out_ready = $urandom % 4 != 0; d_out_ready = $urandom % 4 != 0;
      offer2(a, 1, b, 1, ta, tb2);
      if (ta) n_accepted++;
      if (tb2) n_accepted++;
      id += 2;
    end
    // bursts that must overflow: 60 rays into one queue at two per cycle
    for (int n = 0; n < 30; n++) begin
      offer2(mk(id, 20 * 256, 40 * 256, 40 * 256, 16384), 1, mk(id + 1, 21 * 256, 40 * 256, 40 * 256, 16384), 1, ta, tb2);
      if (ta) n_accepted++;
      if (tb2) n_accepted++;
      id += 2;
    end
    l_out_ready = 1; r_out_ready = 1; d_out_ready = 1;
    // every sample of a new voxel neighbourhood misses in the cache, so
    // draining takes several hundred thousand cycles at worst
    for (int k = 0; k < 400; k++) begin
      int left;
      left = 0;
      foreach (seen[j]) if (seen[j] != 2) left++;
      if (left == 0) break;
      repeat (1000) @(negedge clk);
    end
    begin
      int missing;
      missing = 0;
      foreach (seen[k]) if (seen[k] != 2) missing++;
      check(missing == 0, $sformatf("%0d rays never left the processor", missing));
    end
    check(n_accepted > 500, $sformatf("only %0d rays accepted", n_accepted));
    check(n_right > 0 && n_done > 0, "right and finished paths used");
    check(n_ovf > 0 && evc[3] > 0 && evc[3] <= n_ovf, $sformatf("overflow: %0d rays, %0d events", n_ovf, evc[3]));
    check(evc[0] > 0, "cache misses");
    check(evc[7] > 0, "queue switches");
    check(evc[8] > 0, "space leaps");
    check(evc[15] > 0 && evc[14] > 0 && evc[14] <= n_done, $sformatf("issued %0d, done events %0d vs %0d", evc[15], evc[14], n_done));
    $display("accepted %0d right %0d done %0d overflow %0d issued %0d misses %0d switches %0d leaps %0d",
             n_accepted, n_right, n_done, n_ovf, evc[15], evc[0], evc[7], evc[8]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_volume_cache: runs the volume cache at a reduced size (64^3 volume in
// blocks of 8^3) against the behavioural RDRAM model (latency 6, a refused
// request every 7th cycle), whose unwritten voxels come from a procedural
// volume. Three phases:
//  1. random sample positions all over the volume: every response must carry
//     the eight corner voxels (clamped at the volume edge), the same ray and
//     the position fraction; a repeated request to a cached block must hit
//     (response one cycle after it was accepted, no miss event);
//  2. irradiance carriers at positions inside block 0: the cache must not
//     return them, and must add E * w_i / 2^24 (w_i the trilinear weight,
//     saturating at 2047) to the irradiance of each corner and write the
//     eight voxels through to memory;
//  3. reads of the same positions must return the accumulated irradiance,
//     and memory must hold it as well.
// Miss and bypass events must each have happened.
module tb_volume_cache;
  import gicube_pkg::*;
  import tb_gicube_pkg::*;
  localparam int VN = 64, BN = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid, req_ready, rsp_valid, mem_ready;
  ray_t req_ray, rsp_ray;
  voxel_t rsp_vox [8];
  logic [7:0] rsp_frac [3];
  mem_req_t mem_req;
  mem_rsp_t mem_rsp;
  logic ev_miss, ev_bypass, ev_carrier;
  int n_reads, n_writes, max_irr;
  int checks = 0, failures = 0;
  int n_miss = 0, n_byp = 0, n_car = 0;
  int irr [int];           // expected irradiance by voxel address
  ray_t exp_q [$];

  volume_cache #(.VOL_N(VN), .BLK_N(BN)) dut (
    .clk, .rst_n, .req_valid, .req_ray, .req_ready, .rsp_valid, .rsp_ray, .rsp_vox, .rsp_frac,
    .mem_req, .mem_ready, .mem_rsp, .ev_miss, .ev_bypass, .ev_carrier);
  rdram_model #(.LAT(6), .STALL_EVERY(7)) u_mem (
    .clk, .req(mem_req), .ready(mem_ready), .rsp(mem_rsp), .n_reads, .n_writes, .max_irr);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", msg); end
  endtask

  function automatic int corner_addr(input ray_t r, input int i);
    int g [3];
    g[0] = int'(r.pos_x[15:8]) + (i & 1);
    g[1] = int'(r.pos_y[15:8]) + ((i >> 1) & 1);
    g[2] = int'(r.pos_z[15:8]) + ((i >> 2) & 1);
    for (int a = 0; a < 3; a++) if (g[a] > VN - 1) g[a] = VN - 1;
    return (g[2] << 16) | (g[1] << 8) | g[0];
  endfunction

  function automatic voxel_t expect_vox(input int a);
    voxel_t v;
    v = voxel_at(a & 255, (a >> 8) & 255, (a >> 16) & 255);
    if (irr.exists(a)) v.irradiance = 11'(irr[a]);
    return v;
  endfunction

  // response monitor
  always @(posedge clk) begin
    if (rst_n && ev_miss) n_miss++;
    if (rst_n && ev_bypass) n_byp++;
    if (rst_n && ev_carrier) n_car++;
    if (rst_n && rsp_valid) begin
      ray_t r;
      bit ok;
      if (exp_q.size() == 0) check(0, "unexpected response");
      else begin
        r = exp_q.pop_front();
        ok = rsp_ray == r && rsp_frac[0] == r.pos_x[7:0] && rsp_frac[1] == r.pos_y[7:0]
             && rsp_frac[2] == r.pos_z[7:0];
        for (int i = 0; i < 8; i++) if (rsp_vox[i] != expect_vox(corner_addr(r, i))) ok = 0;
        check(ok, $sformatf("response for ray %0d", r.lifetime));
      end
    end
  end

  task automatic issue(input ray_t r, output int wait_cycles);
    @(negedge clk);
    req_ray = r; req_valid = 1;
    wait_cycles = 0;
    #1;
    while (!req_ready) begin @(negedge clk); #1; wait_cycles++; end
    if (!r.rtype[T_CARRIER]) exp_q.push_back(r);
    @(posedge clk); #1;
    req_valid = 0;
  endtask

  function automatic ray_t rand_ray(input int lim, input int id);
    ray_t r;
    r = '0;
    r.pos_x = 16'(($urandom % lim) << 8 | ($urandom % 256));
    r.pos_y = 16'(($urandom % lim) << 8 | ($urandom % 256));
    r.pos_z = 16'(($urandom % lim) << 8 | ($urandom % 256));
    r.lifetime = 16'(id);
    return r;
  endfunction

  initial begin
    int w, m0;
    ray_t r;
    ray_t cars [$];
    req_valid = 0; req_ray = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // phase 1
    for (int n = 0; n < 300; n++) issue(rand_ray(VN, n), w);
    // a second request into the block just used must hit
    r = rand_ray(VN, 999);
    r.pos_x[15:8] = 8'd9; r.pos_y[15:8] = 8'd9; r.pos_z[15:8] = 8'd9;
    issue(r, w);
    repeat (40) @(negedge clk);
    m0 = n_miss;
    r.pos_x[7:0] = 8'd77; r.lifetime = 16'd1000;
    issue(r, w);
    check(w == 0, "hit accepted at once");
    @(posedge clk); #1;
    check(exp_q.size() == 0, "hit answered in the next cycle");
    repeat (3) @(negedge clk);
    check(n_miss == m0, "no miss on a cached block");
    // phase 2
    for (int n = 0; n < 60; n++) begin
      r = rand_ray(BN - 1, 2000 + n);
      r.rtype[T_CARRIER] = 1'b1;
      r.red = 12'($urandom % 4096);
      cars.push_back(r);
      for (int i = 0; i < 8; i++) begin
        int a, add, wgt;
        logic [7:0] f [3];
        a = corner_addr(r, i);
        f[0] = r.pos_x[7:0]; f[1] = r.pos_y[7:0]; f[2] = r.pos_z[7:0];
        wgt = 1;
        for (int k = 0; k < 3; k++) wgt = wgt * ((((i >> k) & 1) != 0) ? int'(f[k]) : 256 - int'(f[k]));
        add = int'((longint'(r.red) * longint'(wgt)) >>> 24);
        if (!irr.exists(a)) irr[a] = int'(voxel_at(a & 255, (a >> 8) & 255, (a >> 16) & 255).irradiance);
        irr[a] = irr[a] + add > 2047 ? 2047 : irr[a] + add;
      end
      issue(r, w);
    end
    repeat (200) @(negedge clk);
    check(n_car == 60, $sformatf("carriers absorbed %0d", n_car));
    check(exp_q.size() == 0, "carriers produce no response");
    // phase 3
    foreach (cars[k]) begin
      r = cars[k]; r.rtype = '0; r.lifetime = 16'(3000 + k);
      issue(r, w);
    end
    repeat (100) @(negedge clk);
    check(exp_q.size() == 0, "all reads answered");
    foreach (irr[a]) check(u_mem.written.exists(a) && int'(u_mem.written[a].irradiance) == irr[a],
                           $sformatf("memory irradiance at %0h", a));
    check(n_miss > 0, "miss events");
    check(n_byp > 0, "bypass events");
    check(n_writes == 480, $sformatf("memory writes %0d", n_writes));
    $display("misses %0d bypasses %0d reads %0d writes %0d", n_miss, n_byp, n_reads, n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gicube_top: end-to-end test of the GI-Cube chip at its design point
// (256^3 volume, 32^3 blocks, four processors, 256-ray queues).
//
// The board controller is modelled here: it loads all lookup tables, then
// runs phases, each injecting rays on the broadcast bus and collecting the
// rays that come back (finished, trapped or overflowed) until every ray is
// accounted for:
//   1 rendering, simple slabs: rays along +x and -x through the sphere
//     (ring traffic both ways, cache misses, reflections, early termination,
//     software trap, empty-block space leaping)
//   2 global illumination lighting, low albedo: energy splatted as
//     irradiance carriers, read-modify-write of voxels in the cache
//   3 high albedo photons: scattering and absorption
//   4 rendering with global illumination, skewed-block partition,
//     contribution policy, and a burst of rays into one block (overflow)
// Checks: ray conservation per phase, finish reasons, colour only on rays
// that met the sphere, irradiance written back, and that every mechanism
// happened at least once.
`timescale 1ns/1ps
module tb_gicube_top;
  import gicube_pkg::*;
  import tb_gicube_pkg::*;

  localparam int NPROC = 4;
  localparam int NB = 512;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_t          cfg;
  logic [NB-1:0] empty_flags;
  lut_wr_t       lut_wr;
  logic          dsp_in_valid, dsp_in_ready, dsp_out_valid, dsp_out_ready;
  ray_t          dsp_in_ray, dsp_out_ray;
  mem_req_t      mem_req [NPROC];
  logic          mem_ready [NPROC];
  mem_rsp_t      mem_rsp [NPROC];
  logic [15:0]   ev [NPROC];
  int            n_rd [NPROC], n_wr [NPROC], mx_irr [NPROC];

  gicube_top dut (.clk, .rst_n, .cfg, .empty_flags, .lut_wr,
    .dsp_in_valid, .dsp_in_ray, .dsp_in_ready, .dsp_out_valid, .dsp_out_ray, .dsp_out_ready,
    .mem_req, .mem_ready, .mem_rsp, .ev);

  for (genvar p = 0; p < NPROC; p++) begin : g_mem
    rdram_model #(.LAT(6), .STALL_EVERY(7)) u_mem (.clk, .req(mem_req[p]), .ready(mem_ready[p]),
      .rsp(mem_rsp[p]), .n_reads(n_rd[p]), .n_writes(n_wr[p]), .max_irr(mx_irr[p]));
  end

  int checks = 0, failures = 0;
  int evc [16];
  int cycles = 0;
  int carrier_ret = 0;
  int returned, done_cnt, trap_cnt, ovf_cnt, colour_cnt;
  string ev_name [16] = '{"miss stall", "bypass", "carrier absorbed", "queue overflow",
    "sent left", "sent right", "sent to controller", "active switch", "space leap",
    "early termination", "photon absorbed", "trap", "scatter", "splat carrier",
    "ray finished", "ray issued"};

  always @(posedge clk) begin
    cycles <= cycles + 1;
    for (int p = 0; p < NPROC; p++)
      for (int b = 0; b < 16; b++)
        if (ev[p][b]) evc[b] = evc[b] + 1;
  end

  // returned rays
  assign dsp_out_ready = 1'b1;
  always @(posedge clk) begin
    if (dsp_out_valid && dsp_out_ray.rtype[T_CARRIER]) begin
      carrier_ret = carrier_ret + 1;   // overflowed carrier: its energy is handed back
    end else if (dsp_out_valid) begin
      returned = returned + 1;
      if (dsp_out_ray.rtype[T_DONE]) done_cnt = done_cnt + 1;
      else if (dsp_out_ray.rtype[T_TRAP]) trap_cnt = trap_cnt + 1;
      else ovf_cnt = ovf_cnt + 1;
      if (!dsp_out_ray.rtype[T_LIGHT] && (dsp_out_ray.red != 0 || dsp_out_ray.blue != 0))
        colour_cnt = colour_cnt + 1;
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic lut_write(input lut_sel_e sel, input int addr, input logic [83:0] data);
    lut_wr.we = 1'b1; lut_wr.sel = sel; lut_wr.addr = 17'(addr); lut_wr.data = data;
    @(posedge clk);
    #1;
    lut_wr.we = 1'b0;
  endtask

  task automatic send(input ray_t r);
    // driven and sampled between clock edges, where nothing else changes
    @(negedge clk);
    dsp_in_ray = r;
    dsp_in_valid = 1'b1;
    #1;
    while (!dsp_in_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1;
    dsp_in_valid = 1'b0;
  endtask

  // wait until `expect_n` rays (minus absorbed photons) came back
  task automatic drain(input int r_before, input int expect_n, input int absorbed_before, input int limit);
    int t;
    t = 0;
    while ((returned - r_before) + (evc[10] - absorbed_before) < expect_n && t < limit) begin
      @(posedge clk);
      t++;
    end
    repeat (50) @(posedge clk);
  endtask

  initial begin
    int r0, a0, c0, sent;
    int lost;
    for (int b = 0; b < 16; b++) evc[b] = 0;
    returned = 0; done_cnt = 0; trap_cnt = 0; ovf_cnt = 0; colour_cnt = 0;
    lut_wr = '0;
    dsp_in_valid = 0;
    dsp_in_ray = '0;
    cfg = '0;
    cfg.partition = PART_SIMPLE_SLAB;
    cfg.sample_dist = 16'd768;           // 3 voxels
    cfg.ert_threshold = 24'hF00000;
    empty_flags = '0;
    for (int b = 0; b < NB; b++) begin
      // blocks with no voxel of the sphere or the slab are empty
      int bx, by, bz;
      bx = b & 7; by = (b >> 3) & 7; bz = b >> 6;
      if (bx == 0 || bx == 7 || by == 0 || by == 7) empty_flags[b] = 1'b1;
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    #1;
    for (int i = 0; i < 2048; i++)  lut_write(LUT_GRAD, i, 84'(grad_entry(i)));
    for (int i = 0; i < 16384; i++) lut_write(LUT_SEG, i, 84'(seg_entry(i)));
    for (int i = 0; i < 256; i++)   lut_write(LUT_JITTER, i, 84'(jitter_entry(i)));
    for (int i = 0; i < 16384; i++) lut_write(LUT_POWER, i, 84'(power_entry(i)));
    for (int i = 0; i < 256; i++)   lut_write(LUT_RDIR, i, 84'(rdir_entry(i)));
    for (int i = 0; i < 6 * 16384; i++) lut_write(LUT_REFL, i, 84'(refl_entry(i)));
    $display("tables loaded at cycle %0d", cycles);

    // ---- phase 1: rendering rays along +x and -x ----
    r0 = returned; a0 = evc[10]; sent = 0;
    for (int j = 0; j < 24; j++) begin
      int y, z;
      y = 90 + (j % 6) * 14; z = 96 + (j / 6) * 36;
      send(make_ray(16'h0080, (y << 8) + 128, (z << 8) + 128, 16384, 0, 0, 0, 0, 16'hC000));
      send(make_ray((255 << 8) + 64, ((y + 5) << 8), (z << 8), -16384, 0, 0, 0, 0, 16'hC000));
      sent += 2;
    end
    // rays towards the software-BSDF slab
    for (int j = 0; j < 4; j++) begin
      send(make_ray((104 << 8), ((110 + 10 * j) << 8), (192 << 8), 0, 0, 16384, 0, 0, 16'h0100));
      sent++;
    end
    drain(r0, sent, a0, 400000);
    check(returned - r0 == sent, $sformatf("phase 1: %0d of %0d rays returned", returned - r0, sent));
    check(colour_cnt > 0, "phase 1: no ray picked up colour");
    check(trap_cnt > 0, "phase 1: no ray trapped for software scattering");
    $display("phase 1 done at cycle %0d: returned %0d, coloured %0d", cycles, returned - r0, colour_cnt);

    // ---- phase 2: low-albedo lighting rays ----
    r0 = returned; a0 = evc[10]; sent = 0;
    for (int j = 0; j < 16; j++) begin
      send(make_ray((110 + j * 2) << 8, (120 + (j % 4) * 4) << 8, 16'h0080, 0, 0, 16384, 1, 200, 16'hFFFF));
      sent++;
    end
    drain(r0, sent, a0, 300000);
    check(returned - r0 == sent, $sformatf("phase 2: %0d of %0d rays returned", returned - r0, sent));
    begin
      int wsum;
      wsum = 0;
      for (int p = 0; p < NPROC; p++) wsum += n_wr[p];
      check(wsum > 0, "phase 2: no irradiance written back");
      check(mx_irr[0] + mx_irr[1] + mx_irr[2] + mx_irr[3] > 0,
            "phase 2: no voxel gained irradiance");
    end
    $display("phase 2 done at cycle %0d", cycles);

    // ---- phase 3: high-albedo photons ----
    cfg.high_albedo = 1'b1;
    r0 = returned; a0 = evc[10]; sent = 0;
    for (int j = 0; j < 24; j++) begin
      send(make_ray((100 + j * 2) << 8, (110 + (j % 6) * 4) << 8, 16'h0080, 0, 0, 16384, 1, 15,
                    16'h2000 + j * 16'h0400));
      sent++;
    end
    drain(r0, sent, a0, 300000);
    check(returned - r0 + (evc[10] - a0) == sent,
          $sformatf("phase 3: %0d returned + %0d absorbed of %0d", returned - r0, evc[10] - a0, sent));
    $display("phase 3 done at cycle %0d", cycles);

    // ---- phase 4: GI rendering, skewed blocks, contribution policy, burst ----
    cfg.high_albedo = 1'b0;
    cfg.gi_enable = 1'b1;
    cfg.partition = PART_SKEWED_BLOCK;
    cfg.policy_contrib = 1'b1;
    r0 = returned; a0 = evc[10]; sent = 0;
    for (int j = 0; j < 300; j++) begin
      send(make_ray((64 << 8) + j, (64 << 8) + j * 3, (64 << 8) + j * 7, 9459, 9459, 9459, 0, 0, 16'hF000));
      sent++;
    end
    for (int j = 0; j < 8; j++) begin
      send(make_ray((40 << 8), ((100 + j * 8) << 8), (128 << 8), 16384, 0, 0, 0, 0, 16'hF000));
      sent++;
    end
    drain(r0, sent, a0, 900000);
    check(returned - r0 == sent, $sformatf("phase 4: %0d of %0d rays returned", returned - r0, sent));
    check(ovf_cnt > 0, "phase 4: no queue overflow");
    $display("phase 4 done at cycle %0d, overflowed %0d", cycles, ovf_cnt);

    for (int b = 0; b < 16; b++) begin
      $display("  %-20s %0d", ev_name[b], evc[b]);
      check(evc[b] > 0, $sformatf("mechanism never happened: %s", ev_name[b]));
    end
    lost = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

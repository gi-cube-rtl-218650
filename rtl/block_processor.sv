// block_processor: one GI-Cube ray integration processor, a circular
// pipeline fed by many ray queues.
//
//   ray queues -> volume cache (prefetch, tags, miss scheduler, interleaved
//   banks) -> 8 gradient LUTs -> resampling -> segmentation -> spacing
//   (jitter, opacity correction) -> shading and compositing -> scattering,
//   splatting and ray advance -> queue sorter/bucketing -> ray queues
//
// The processor owns the volume blocks that the partition assigns to it and
// keeps one queue per block. The queue sorter names the active queue; its
// rays enter the pipeline one per cycle, round robin, until it runs dry,
// while the bucketing stage (ray_dispatch) files every returning ray into the
// queue of the block it now lies in, hands it to the left or right
// neighbour, or returns it to the board controller (finished, trapped,
// overflow). Irradiance carriers produced by lighting rays travel through
// the queues like rays and are absorbed by the volume cache, which adds their
// energy to the voxels.
//
// A ray is issued only when the cache is ready and all three output FIFOs
// have MARGIN free places, enough for every ray still in the pipeline, so
// the back of the pipeline never stalls. Latency of a hit: 7 cycles from
// issue to the bucketing stage. Interfaces: valid/ready ray ports to both
// neighbours and to the board controller (broadcast input: a ray is taken
// only if this processor owns it), one voxel memory port, the LUT load bus,
// configuration and the per-block empty flags.
// ev bits: 0 miss stall, 1 bypass, 2 carrier absorbed, 3 queue overflow,
// 4 sent left, 5 sent right, 6 sent to controller, 7 active queue switch,
// 8 space leap, 9 early termination, 10 photon absorbed, 11 trap,
// 12 scatter, 13 splat carrier made, 14 ray finished, 15 ray issued.
module block_processor
  import gicube_pkg::*;
#(
  parameter int unsigned VOL_N  = VOL_N_DEF,
  parameter int unsigned BLK_N  = BLK_N_DEF,
  parameter int unsigned NPROC  = NPROC_DEF,
  parameter int unsigned QLEN   = QLEN_DEF,
  parameter int unsigned MY_ID  = 0,
  parameter int unsigned OFIFO  = 64,
  localparam int unsigned BPA   = VOL_N / BLK_N,
  localparam int unsigned NB    = BPA * BPA * BPA,
  localparam int unsigned NQ    = NB / NPROC,
  localparam int unsigned QW    = $clog2(NQ),
  localparam int unsigned LW    = $clog2(QLEN),
  localparam int unsigned FAW   = $clog2(OFIFO)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cfg_t          cfg,
  input  logic [NB-1:0] empty_flags,
  input  lut_wr_t       lut_wr,
  input  logic          l_in_valid, input ray_t l_in_ray, output logic l_in_ready,
  input  logic          r_in_valid, input ray_t r_in_ray, output logic r_in_ready,
  input  logic          d_in_valid, input ray_t d_in_ray, output logic d_in_ready,
  output logic          l_out_valid, output ray_t l_out_ray, input logic l_out_ready,
  output logic          r_out_valid, output ray_t r_out_ray, input logic r_out_ready,
  output logic          d_out_valid, output ray_t d_out_ray, input logic d_out_ready,
  output mem_req_t      mem_req,
  input  logic          mem_ready,
  input  mem_rsp_t      mem_rsp,
  output logic [15:0]   ev
);
  localparam int unsigned MARGIN = 24;

  // ---------------- queues and sorter ----------------
  logic [1:0]    q_wr;
  logic [QW-1:0] q_id [2];
  ray_t          q_ray [2];
  logic [QW-1:0] active_q;
  logic          active_valid, switched;
  ray_t          head_ray;
  logic          issue;
  logic [LW:0]   count [NQ];
  logic [23:0]   importance [NQ];
  logic [NQ-1:0] changed, nonempty;

  ray_queues #(.NQ(NQ), .QLEN(QLEN)) u_queues (
    .clk, .rst_n, .policy_contrib(cfg.policy_contrib),
    .wr_en(q_wr), .wr_q(q_id), .wr_ray(q_ray),
    .rd_q(active_q), .rd_pop(issue), .rd_ray(head_ray),
    .count, .importance, .changed);

  always_comb for (int q = 0; q < NQ; q++) nonempty[q] = (count[q] != 0);

  queue_sorter #(.NQ(NQ), .IW(24)) u_sorter (
    .clk, .rst_n, .changed, .importance, .nonempty,
    .active_q, .active_valid, .switched);

  // ---------------- output FIFOs ----------------
  logic [1:0] l_wr, r_wr, d_wr;
  ray_t       slot_ray [2];
  logic [FAW:0] free_l, free_r, free_d;
  logic       credit_ok;

  ray_fifo #(.DEPTH(OFIFO)) u_lfifo (.clk, .rst_n, .wr_en(l_wr), .wr_data(slot_ray),
    .free(free_l), .rd_valid(l_out_valid), .rd_data(l_out_ray), .rd_ready(l_out_ready));
  ray_fifo #(.DEPTH(OFIFO)) u_rfifo (.clk, .rst_n, .wr_en(r_wr), .wr_data(slot_ray),
    .free(free_r), .rd_valid(r_out_valid), .rd_data(r_out_ray), .rd_ready(r_out_ready));
  ray_fifo #(.DEPTH(OFIFO)) u_dfifo (.clk, .rst_n, .wr_en(d_wr), .wr_data(slot_ray),
    .free(free_d), .rd_valid(d_out_valid), .rd_data(d_out_ray), .rd_ready(d_out_ready));

  assign credit_ok = (32'(free_l) >= MARGIN) && (32'(free_r) >= MARGIN)
                  && (32'(free_d) >= MARGIN);

  // ---------------- volume cache ----------------
  logic       c_ready, c_valid;
  ray_t       c_ray;
  voxel_t     c_vox [8];
  logic [7:0] c_frac [3];
  logic       ev_miss, ev_bypass, ev_carrier;

  assign issue = active_valid && c_ready && credit_ok;

  volume_cache #(.VOL_N(VOL_N), .BLK_N(BLK_N)) u_cache (
    .clk, .rst_n, .req_valid(issue), .req_ray(head_ray), .req_ready(c_ready),
    .rsp_valid(c_valid), .rsp_ray(c_ray), .rsp_vox(c_vox), .rsp_frac(c_frac),
    .mem_req, .mem_ready, .mem_rsp, .ev_miss, .ev_bypass, .ev_carrier);

  // ---------------- gradient decode and resampling ----------------
  logic [10:0]       gidx [8];
  logic signed [9:0] gx [8], gy [8], gz [8];
  always_comb for (int i = 0; i < 8; i++) gidx[i] = c_vox[i].gradient;

  gradient_lut u_grad (.clk, .lut_wr, .index(gidx), .gx, .gy, .gz);

  logic    s1_valid;
  ray_t    s1_ray;
  sample_t s1_s;
  resampler u_resamp (.clk, .rst_n, .in_valid(c_valid), .in_ray(c_ray), .vox(c_vox),
    .gx, .gy, .gz, .frac(c_frac), .out_valid(s1_valid), .out_ray(s1_ray), .out_s(s1_s));

  logic    s2_valid;
  ray_t    s2_ray;
  sample_t s2_s;
  seg_t    s2_seg;
  segmentation_unit u_seg (.clk, .rst_n, .lut_wr, .in_valid(s1_valid), .in_ray(s1_ray),
    .in_s(s1_s), .out_valid(s2_valid), .out_ray(s2_ray), .out_s(s2_s), .out_seg(s2_seg));

  logic        s3_valid;
  ray_t        s3_ray;
  sample_t     s3_s;
  seg_t        s3_seg;
  logic [23:0] s3_old;
  logic [15:0] s3_alpha, s3_dr;
  spacing_unit u_space (.clk, .rst_n, .lut_wr, .sample_dist(cfg.sample_dist),
    .in_valid(s2_valid), .in_ray(s2_ray), .in_s(s2_s), .in_seg(s2_seg),
    .out_valid(s3_valid), .out_ray(s3_ray), .out_s(s3_s), .out_seg(s3_seg),
    .out_old_opacity(s3_old), .out_alpha(s3_alpha), .out_dr(s3_dr));

  logic        s4_valid;
  ray_t        s4_ray;
  sample_t     s4_s;
  seg_t        s4_seg;
  logic [15:0] s4_alpha, s4_dr;
  logic [7:0]  s4_int;
  shading_unit u_shade (.clk, .rst_n, .lut_wr, .gi_enable(cfg.gi_enable),
    .in_valid(s3_valid), .in_ray(s3_ray), .in_s(s3_s), .in_seg(s3_seg),
    .in_old_opacity(s3_old), .in_alpha(s3_alpha), .in_dr(s3_dr),
    .out_valid(s4_valid), .out_ray(s4_ray), .out_s(s4_s), .out_seg(s4_seg),
    .out_alpha(s4_alpha), .out_dr(s4_dr), .out_intensity(s4_int));

  logic       pa_valid, pb_valid;
  ray_t       pa_ray, pb_ray;
  logic [6:0] sev;
  scatter_splat #(.VOL_N(VOL_N), .BLK_N(BLK_N)) u_scat (.clk, .rst_n, .lut_wr, .cfg,
    .empty_flags, .in_valid(s4_valid), .in_ray(s4_ray), .in_s(s4_s), .in_seg(s4_seg),
    .in_alpha(s4_alpha), .in_dr(s4_dr), .a_valid(pa_valid), .a_ray(pa_ray),
    .b_valid(pb_valid), .b_ray(pb_ray), .ev(sev));

  // ---------------- bucketing ----------------
  logic [1:0] ovf;
  ray_dispatch #(.VOL_N(VOL_N), .BLK_N(BLK_N), .NPROC(NPROC), .QLEN(QLEN), .MY_ID(MY_ID),
                 .MARGIN(MARGIN), .FAW(FAW)) u_disp (
    .partition(cfg.partition),
    .pa_valid, .pa_ray, .pb_valid, .pb_ray,
    .l_valid(l_in_valid), .l_ray(l_in_ray), .l_ready(l_in_ready),
    .r_valid(r_in_valid), .r_ray(r_in_ray), .r_ready(r_in_ready),
    .d_valid(d_in_valid), .d_ray(d_in_ray), .d_ready(d_in_ready),
    .count, .free_l, .free_r, .free_d,
    .q_wr, .q_id, .q_ray, .l_wr, .r_wr, .d_wr, .slot_ray, .overflow(ovf));

  assign ev = {issue, sev[0], sev[1], sev[2], sev[3], sev[4], sev[5], sev[6],
               switched, |d_wr, |r_wr, |l_wr, |ovf, ev_carrier, ev_bypass, ev_miss};

  // s4_int is the shading intensity, kept for observation in simulation
  logic unused_ok;
  assign unused_ok = ^{s4_int, 1'b0};
endmodule

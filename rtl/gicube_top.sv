// gicube_top: the GI-Cube ray tracing ASIC: NPROC block processors (four
// at the design point) joined by the ray bus and a ring.
//
// Ray bus, board controller to processors: a broadcast. Every processor sees
// the ray on dsp_in and the one that owns its start position (by the
// configured partition) accepts it; dsp_in_ready is the OR of their readies.
// Ray bus, processors to board controller: a binary tree of ray_merge nodes
// (NPROC-1 nodes) ending in dsp_out. Rays that leave a processor's part of
// the volume travel on the ring: processor p's right output feeds processor
// p+1's left input and its left output feeds p-1's right input (mod NPROC).
// Each processor has its own volume memory port (towards its Rambus cell and
// RDRAM, which are outside this design); reads return one voxel per cycle in
// request order. The LUT load bus, configuration registers and block empty
// flags are broadcast to all processors. ev carries each processor's event
// pulses (see block_processor). NPROC must be a power of two.
module gicube_top
  import gicube_pkg::*;
#(
  parameter int unsigned VOL_N = VOL_N_DEF,
  parameter int unsigned BLK_N = BLK_N_DEF,
  parameter int unsigned NPROC = NPROC_DEF,
  parameter int unsigned QLEN  = QLEN_DEF,
  localparam int unsigned BPA  = VOL_N / BLK_N,
  localparam int unsigned NB   = BPA * BPA * BPA
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cfg_t          cfg,
  input  logic [NB-1:0] empty_flags,
  input  lut_wr_t       lut_wr,
  input  logic          dsp_in_valid,
  input  ray_t          dsp_in_ray,
  output logic          dsp_in_ready,
  output logic          dsp_out_valid,
  output ray_t          dsp_out_ray,
  input  logic          dsp_out_ready,
  output mem_req_t      mem_req   [NPROC],
  input  logic          mem_ready [NPROC],
  input  mem_rsp_t      mem_rsp   [NPROC],
  output logic [15:0]   ev        [NPROC]
);
  logic l_in_v [NPROC], r_in_v [NPROC], l_in_r [NPROC], r_in_r [NPROC];
  ray_t l_in_d [NPROC], r_in_d [NPROC];
  logic l_out_v [NPROC], r_out_v [NPROC], l_out_r [NPROC], r_out_r [NPROC];
  ray_t l_out_d [NPROC], r_out_d [NPROC];
  logic d_in_r [NPROC];

  // merge tree in heap order: node 1 is the root, leaves NPROC..2*NPROC-1
  logic t_v [2*NPROC];
  logic t_r [2*NPROC];
  ray_t t_d [2*NPROC];

  for (genvar p = 0; p < NPROC; p++) begin : g_proc
    localparam int unsigned PR = (p + 1) % NPROC;
    localparam int unsigned PL = (p + NPROC - 1) % NPROC;
    block_processor #(.VOL_N(VOL_N), .BLK_N(BLK_N), .NPROC(NPROC), .QLEN(QLEN), .MY_ID(p)) u_proc (
      .clk, .rst_n, .cfg, .empty_flags, .lut_wr,
      .l_in_valid(l_in_v[p]), .l_in_ray(l_in_d[p]), .l_in_ready(l_in_r[p]),
      .r_in_valid(r_in_v[p]), .r_in_ray(r_in_d[p]), .r_in_ready(r_in_r[p]),
      .d_in_valid(dsp_in_valid), .d_in_ray(dsp_in_ray), .d_in_ready(d_in_r[p]),
      .l_out_valid(l_out_v[p]), .l_out_ray(l_out_d[p]), .l_out_ready(l_out_r[p]),
      .r_out_valid(r_out_v[p]), .r_out_ray(r_out_d[p]), .r_out_ready(r_out_r[p]),
      .d_out_valid(t_v[NPROC + p]), .d_out_ray(t_d[NPROC + p]), .d_out_ready(t_r[NPROC + p]),
      .mem_req(mem_req[p]), .mem_ready(mem_ready[p]), .mem_rsp(mem_rsp[p]), .ev(ev[p]));
    // ring
    assign l_in_v[PR]  = r_out_v[p];
    assign l_in_d[PR]  = r_out_d[p];
    assign r_out_r[p]  = l_in_r[PR];
    assign r_in_v[PL]  = l_out_v[p];
    assign r_in_d[PL]  = l_out_d[p];
    assign l_out_r[p]  = r_in_r[PL];
  end

  for (genvar n = 1; n < NPROC; n++) begin : g_merge
    logic iv [2], ir [2];
    ray_t id [2];
    assign iv[0] = t_v[2*n];
    assign iv[1] = t_v[2*n+1];
    assign id[0] = t_d[2*n];
    assign id[1] = t_d[2*n+1];
    assign t_r[2*n]   = ir[0];
    assign t_r[2*n+1] = ir[1];
    ray_merge u_merge (.clk, .rst_n, .in_valid(iv), .in_ray(id), .in_ready(ir),
      .out_valid(t_v[n]), .out_ray(t_d[n]), .out_ready(t_r[n]));
  end

  // root (with one processor the leaf itself is node 1)
  assign dsp_out_valid = t_v[1];
  assign dsp_out_ray   = t_d[1];
  assign t_r[1]        = dsp_out_ready;
  assign t_v[0] = 1'b0;
  assign t_d[0] = '0;
  assign t_r[0] = 1'b0;

  always_comb begin
    dsp_in_ready = 1'b0;
    for (int p = 0; p < NPROC; p++) dsp_in_ready = dsp_in_ready | d_in_r[p];
  end
endmodule

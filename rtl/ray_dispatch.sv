// ray_dispatch: the bucketing stage of a processor. It runs at twice the
// pipeline rate, so it places up to two rays per pipeline cycle, taken in
// priority order from: the pipeline's continuing ray, the pipeline's
// irradiance carrier, the left neighbour, the right neighbour and the board
// controller's broadcast ray bus.
//
// Each ray goes to exactly one place:
//   finished (T_DONE), trapped for software scattering (T_TRAP) or outside
//   the volume                       -> vertical queue to the board controller
//   owned by another processor       -> horizontal queue to the neighbour on
//                                       the shorter way round the ring
//   owned by this processor          -> its block queue, or, if that queue is
//                                       full, back to the board controller
//                                       (overflow)
// Broadcast rays are taken only when this processor owns them. Pipeline rays
// are always accepted: the processor issues a ray into the pipeline only when
// every output queue has room for all rays in flight (MARGIN). Rays from
// neighbours and the bus are taken only with MARGIN+2 free places.
// Combinational; the queues and output FIFOs register the result.
module ray_dispatch
  import gicube_pkg::*;
#(
  parameter int unsigned VOL_N  = VOL_N_DEF,
  parameter int unsigned BLK_N  = BLK_N_DEF,
  parameter int unsigned NPROC  = NPROC_DEF,
  parameter int unsigned QLEN   = QLEN_DEF,
  parameter int unsigned MY_ID  = 0,
  parameter int unsigned MARGIN = 20,
  parameter int unsigned FAW    = 6,     // width of FIFO free counts - 1
  localparam int unsigned BPA   = VOL_N / BLK_N,
  localparam int unsigned NQ    = BPA * BPA * BPA / NPROC,
  localparam int unsigned PW    = (NPROC > 1) ? $clog2(NPROC) : 1,
  localparam int unsigned QW    = $clog2(NQ),
  localparam int unsigned LW    = $clog2(QLEN)
) (
  input  partition_e    partition,
  // sources
  input  logic          pa_valid,  input ray_t pa_ray,    // pipeline ray
  input  logic          pb_valid,  input ray_t pb_ray,    // pipeline carrier
  input  logic          l_valid,   input ray_t l_ray,   output logic l_ready,
  input  logic          r_valid,   input ray_t r_ray,   output logic r_ready,
  input  logic          d_valid,   input ray_t d_ray,   output logic d_ready,
  // queue state
  input  logic [LW:0]   count [NQ],
  input  logic [FAW:0]  free_l, free_r, free_d,
  // destinations
  output logic [1:0]    q_wr,
  output logic [QW-1:0] q_id  [2],
  output ray_t          q_ray [2],
  output logic [1:0]    l_wr, r_wr, d_wr,
  output ray_t          slot_ray [2],
  output logic [1:0]    overflow           // a slot overflowed its queue
);
  logic ext_ok;
  logic [PW-1:0] d_proc;
  logic [QW-1:0] d_q;
  logic          d_out;
  logic          d_mine;

  queue_select #(.VOL_N(VOL_N), .BLK_N(BLK_N), .NPROC(NPROC)) u_dsel (
    .pos_x(d_ray.pos_x), .pos_y(d_ray.pos_y), .pos_z(d_ray.pos_z),
    .partition(partition), .proc_id(d_proc), .queue_id(d_q), .outside(d_out));

  assign d_mine = (d_proc == PW'(MY_ID)) && !d_out;
  assign ext_ok = (32'(free_l) >= MARGIN + 2) && (32'(free_r) >= MARGIN + 2)
               && (32'(free_d) >= MARGIN + 2);

  // slot selection
  logic [4:0] want;
  ray_t       cand [5];
  logic [2:0] pick [2];
  logic [1:0] pick_v;
  ray_t       base [2];

  always_comb begin
    want = {d_valid && d_mine && ext_ok, r_valid && ext_ok, l_valid && ext_ok,
            pb_valid, pa_valid};
    cand[0] = pa_ray; cand[1] = pb_ray; cand[2] = l_ray; cand[3] = r_ray;
    cand[4] = d_ray;
    pick_v = '0;
    pick[0] = '0;
    pick[1] = '0;
    for (int i = 0; i < 5; i++) begin
      if (want[i]) begin
        if (!pick_v[0]) begin
          pick_v[0] = 1'b1; pick[0] = 3'(i);
        end else if (!pick_v[1]) begin
          pick_v[1] = 1'b1; pick[1] = 3'(i);
        end
      end
    end
    l_ready = (pick_v[0] && pick[0] == 3'd2) || (pick_v[1] && pick[1] == 3'd2);
    r_ready = (pick_v[0] && pick[0] == 3'd3) || (pick_v[1] && pick[1] == 3'd3);
    d_ready = (pick_v[0] && pick[0] == 3'd4) || (pick_v[1] && pick[1] == 3'd4);
    base[0] = cand[pick[0]];
    base[1] = cand[pick[1]];
  end

  // classification of the two slots
  logic [PW-1:0] s_proc [2];
  logic [QW-1:0] s_q    [2];
  logic [1:0]    s_out;

  for (genvar s = 0; s < 2; s++) begin : g_sel
    queue_select #(.VOL_N(VOL_N), .BLK_N(BLK_N), .NPROC(NPROC)) u_sel (
      .pos_x(base[s].pos_x), .pos_y(base[s].pos_y), .pos_z(base[s].pos_z),
      .partition(partition), .proc_id(s_proc[s]), .queue_id(s_q[s]),
      .outside(s_out[s]));
  end

  always_comb begin
    logic same;
    same = 1'b0;
    q_wr = '0; l_wr = '0; r_wr = '0; d_wr = '0; overflow = '0;
    for (int s = 0; s < 2; s++) begin
      slot_ray[s] = base[s];
      q_id[s]  = s_q[s];
      q_ray[s] = base[s];
    end
    for (int s = 0; s < 2; s++) begin
      if (pick_v[s]) begin
        if (slot_ray[s].rtype[T_DONE] || slot_ray[s].rtype[T_TRAP]) begin
          d_wr[s] = 1'b1;
        end else if (s_out[s]) begin
          slot_ray[s].rtype[T_DONE] = 1'b1;
          d_wr[s] = 1'b1;
        end else if (s_proc[s] != PW'(MY_ID)) begin
          // shorter way round the ring: distance to the right
          if (((32'(s_proc[s]) + NPROC - MY_ID) % NPROC) <= NPROC / 2) r_wr[s] = 1'b1;
          else l_wr[s] = 1'b1;
        end else begin
          same = (s == 1) && q_wr[0] && (q_id[0] == q_id[1]);
          if (32'(count[s_q[s]]) + 32'(same) < QLEN) q_wr[s] = 1'b1;
          else begin
            d_wr[s] = 1'b1;
            overflow[s] = 1'b1;
          end
        end
      end
    end
  end
endmodule

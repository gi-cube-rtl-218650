// volume_cache: the prefetching volume memory cache of one processor.
//
// It takes one ray per cycle from the active queue and returns, one cycle
// later when all voxels hit, the eight voxels of the trilinear neighbourhood
// of the ray's sample position together with the ray and the 8-bit fractional
// position. Blocks whose voxels are missing cost a stall.
//
//  address decoder  splits the 8.8 position into block number, local voxel
//                   coordinate (0..BLK_N-1) and fraction; the eight corners
//                   have local coordinates 0..BLK_N, so a block plus one extra
//                   slice per axis ((BLK_N+1)^3 voxels) is cacheable.
//  interleaving     corner coordinate (cx,cy,cz) lives in bank
//                   {cz[0],cy[0],cx[0]} at index (cz>>1, cy>>1, cx>>1), so the
//                   eight corners of any neighbourhood fall in eight different
//                   banks and are read in the same cycle. Each bank holds
//                   (BLK_N/2+1)^3 voxels.
//  cache tags       one per entry: valid bit and the global block number that
//                   filled it. Direct mapped; a tag of another block is a miss,
//                   so blocks are refilled lazily.
//  miss scheduler   issues the missing voxels one by one to the memory port
//                   (reads come back in order) and gives pending memory
//                   writes priority. Returning voxels are written to their
//                   bank and, through the bypass registers, straight to the
//                   output; a counter holds the ray until every missing voxel
//                   has arrived.
//  irradiance RMW   a ray flagged as irradiance carrier (T_CARRIER) is not
//                   passed on: its energy (red field) is weighted by the
//                   trilinear weights, added with saturation to the 11-bit
//                   irradiance of the eight voxels in the cache, and the eight
//                   updated voxels are written through to memory.
// The memory port carries one voxel per cycle in this design. Reset clears
// all tags. Filling block by block as a miss occurs, rather than ahead of
// the ray, is this design's simplification of the prefetch. A voxel on a
// block face may sit in two entries (as the extra slice of one block and the
// first slice of the next); a carrier updates only the entry it read.
module volume_cache
  import gicube_pkg::*;
#(
  parameter int unsigned VOL_N = VOL_N_DEF,
  parameter int unsigned BLK_N = BLK_N_DEF,
  localparam int unsigned HB    = BLK_N / 2 + 1,
  localparam int unsigned DEPTH = HB * HB * HB,
  localparam int unsigned IW    = $clog2(DEPTH),
  localparam int unsigned BPA   = VOL_N / BLK_N,
  localparam int unsigned BIW   = 3 * $clog2(BPA)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req_valid,
  input  ray_t       req_ray,
  output logic       req_ready,
  output logic       rsp_valid,
  output ray_t       rsp_ray,
  output voxel_t     rsp_vox [8],
  output logic [7:0] rsp_frac [3],
  // memory port
  output mem_req_t   mem_req,
  input  logic       mem_ready,
  input  mem_rsp_t   mem_rsp,
  // events
  output logic       ev_miss,        // a ray started a miss stall
  output logic       ev_bypass,      // a ray used bypassed voxels
  output logic       ev_carrier      // an irradiance carrier was absorbed
);
  localparam int unsigned BS = $clog2(BLK_N);
  localparam int unsigned WQ = 16;

  typedef enum logic [1:0] {S_IDLE, S_MISS, S_FIN} state_e;
  state_e state;

  voxel_t        bank [8][DEPTH];
  logic          tv   [8][DEPTH];
  logic [BIW-1:0] tb  [8][DEPTH];

  // ---------------- address decoder ----------------
  logic [2:0]     d_bank [8];
  logic [IW-1:0]  d_idx  [8];
  logic [23:0]    d_addr [8];
  logic [BIW-1:0] d_blk;
  logic [7:0]     d_frac [3];
  logic [7:0]     hit;

  always_comb begin
    logic [7:0] pi [3];
    logic [7:0] l  [3];
    logic [8:0] c  [3];
    logic [8:0] g  [3];
    pi[0] = req_ray.pos_x[15:8]; pi[1] = req_ray.pos_y[15:8]; pi[2] = req_ray.pos_z[15:8];
    d_frac[0] = req_ray.pos_x[7:0]; d_frac[1] = req_ray.pos_y[7:0]; d_frac[2] = req_ray.pos_z[7:0];
    d_blk = '0;
    for (int a = 0; a < 3; a++) begin
      l[a]  = pi[a] & 8'(BLK_N - 1);
      d_blk = d_blk | (BIW'(pi[a] >> BS) << (a * $clog2(BPA)));
    end
    for (int i = 0; i < 8; i++) begin
      for (int a = 0; a < 3; a++) begin
        c[a] = 9'(l[a]) + 9'((i >> a) & 1);
        g[a] = 9'(pi[a]) + 9'((i >> a) & 1);
        if (32'(g[a]) > VOL_N - 1) g[a] = 9'(VOL_N - 1);
      end
      d_bank[i] = {c[2][0], c[1][0], c[0][0]};
      d_idx[i]  = IW'((32'(c[2] >> 1) * HB + 32'(c[1] >> 1)) * HB + 32'(c[0] >> 1));
      d_addr[i] = {g[2][7:0], g[1][7:0], g[0][7:0]};
      hit[i]    = tv[d_bank[i]][d_idx[i]] && (tb[d_bank[i]][d_idx[i]] == d_blk);
    end
  end

  // ---------------- latched request ----------------
  ray_t           l_ray;
  logic [2:0]     l_bank [8];
  logic [IW-1:0]  l_idx  [8];
  logic [23:0]    l_addr [8];
  logic [BIW-1:0] l_blk;
  logic [7:0]     l_frac [3];
  logic [7:0]     miss_orig, to_issue, to_recv;
  voxel_t         byp [8];

  // ---------------- memory write queue ----------------
  logic [23:0]  wq_addr [WQ];
  voxel_t       wq_data [WQ];
  logic [3:0]   wq_head, wq_tail;
  logic [4:0]   wq_cnt;

  // ---------------- memory request mux ----------------
  logic [2:0] iss_c, rcv_c;
  logic       iss_v;
  always_comb begin
    iss_v = 1'b0; iss_c = '0; rcv_c = '0;
    for (int i = 7; i >= 0; i--) begin
      if (to_issue[i]) begin iss_v = 1'b1; iss_c = 3'(i); end
      if (to_recv[i])  rcv_c = 3'(i);
    end
    mem_req = '0;
    if (wq_cnt != 0) begin
      mem_req.valid = 1'b1;
      mem_req.we    = 1'b1;
      mem_req.addr  = wq_addr[wq_head];
      mem_req.wdata = wq_data[wq_head];
    end else if (state == S_MISS && iss_v) begin
      mem_req.valid = 1'b1;
      mem_req.addr  = l_addr[iss_c];
    end
  end

  assign req_ready = (state == S_IDLE) && (wq_cnt <= 5'(WQ - 8));

  logic accept;
  assign accept = req_valid && req_ready;

  // Trilinear weight of corner i (2^24 = 1.0)
  function automatic logic [26:0] weight(input logic [7:0] f [3], input int i);
    logic [8:0] w [3];
    for (int a = 0; a < 3; a++) w[a] = (((i >> a) & 1) != 0) ? 9'(f[a]) : 9'd256 - 9'(f[a]);
    return 27'(w[0]) * 27'(w[1]) * 27'(w[2]);
  endfunction

  // Carrier update of voxel v of corner i
  function automatic voxel_t splat(input voxel_t v, input logic [11:0] e,
                                   input logic [7:0] f [3], input int i);
    logic [38:0] add;
    logic [39:0] sum;
    voxel_t r;
    add = (39'(e) * 39'(weight(f, i))) >> 24;
    sum = 40'(v.irradiance) + 40'(add);
    r = v;
    r.irradiance = (sum > 40'd2047) ? 11'd2047 : sum[10:0];
    return r;
  endfunction

  // final step of a request whose voxels are all present
  logic          fin_go;
  ray_t          f_ray;
  logic [2:0]    f_bank [8];
  logic [IW-1:0] f_idx  [8];
  logic [23:0]   f_addr [8];
  logic [7:0]    f_frac [3];
  logic [7:0]    f_byp;
  always_comb begin
    if (state == S_FIN) begin
      fin_go = 1'b1;
      f_ray = l_ray; f_bank = l_bank; f_idx = l_idx; f_addr = l_addr; f_frac = l_frac;
      f_byp = miss_orig;
    end else begin
      fin_go = accept && (hit == 8'hFF);
      f_ray = req_ray; f_bank = d_bank; f_idx = d_idx; f_addr = d_addr; f_frac = d_frac;
      f_byp = '0;
    end
  end

  always_ff @(posedge clk) begin
    // fills from memory
    if (state == S_MISS && mem_rsp.valid) begin
      bank[l_bank[rcv_c]][l_idx[rcv_c]] <= mem_rsp.rdata;
      byp[rcv_c] <= mem_rsp.rdata;
    end
    // carrier read-modify-write
    if (fin_go && f_ray.rtype[T_CARRIER]) begin
      for (int i = 0; i < 8; i++) begin
        voxel_t cur;
        cur = f_byp[i] ? byp[i] : bank[f_bank[i]][f_idx[i]];
        bank[f_bank[i]][f_idx[i]] <= splat(cur, f_ray.red, f_frac, i);
        wq_addr[4'(wq_tail + 4'(i))] <= f_addr[i];
        wq_data[4'(wq_tail + 4'(i))] <= splat(cur, f_ray.red, f_frac, i);
      end
    end
    // output register
    if (fin_go) begin
      rsp_ray <= f_ray;
      for (int i = 0; i < 8; i++) rsp_vox[i] <= f_byp[i] ? byp[i] : bank[f_bank[i]][f_idx[i]];
      rsp_frac <= f_frac;
    end
    if (accept) begin
      l_ray <= req_ray; l_bank <= d_bank; l_idx <= d_idx; l_addr <= d_addr;
      l_blk <= d_blk; l_frac <= d_frac;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      for (int b = 0; b < 8; b++)
        for (int e = 0; e < DEPTH; e++) begin
          tv[b][e] <= 1'b0;
          tb[b][e] <= '0;
        end
      miss_orig <= '0; to_issue <= '0; to_recv <= '0;
      wq_head <= '0; wq_tail <= '0; wq_cnt <= '0;
      rsp_valid <= 1'b0;
      ev_miss <= 1'b0; ev_bypass <= 1'b0; ev_carrier <= 1'b0;
    end else begin
      logic [4:0] wq_n;
      logic       wq_pop;
      wq_pop = (wq_cnt != 0) && mem_ready;
      wq_n   = wq_cnt - 5'(wq_pop);
      rsp_valid  <= fin_go && !f_ray.rtype[T_CARRIER];
      ev_bypass  <= fin_go && !f_ray.rtype[T_CARRIER] && (f_byp != 0);
      ev_carrier <= fin_go && f_ray.rtype[T_CARRIER];
      ev_miss    <= accept && (hit != 8'hFF);
      if (fin_go && f_ray.rtype[T_CARRIER]) begin
        wq_tail <= wq_tail + 4'd8;
        wq_n    = wq_n + 5'd8;
      end
      wq_head <= wq_head + 4'(wq_pop);
      wq_cnt  <= wq_n;
      unique case (state)
        S_IDLE: if (accept && hit != 8'hFF) begin
          state     <= S_MISS;
          miss_orig <= ~hit;
          to_issue  <= ~hit;
          to_recv   <= ~hit;
        end
        S_MISS: begin
          if (wq_cnt == 0 && iss_v && mem_ready) to_issue[iss_c] <= 1'b0;
          if (mem_rsp.valid) begin
            to_recv[rcv_c] <= 1'b0;
            tv[l_bank[rcv_c]][l_idx[rcv_c]] <= 1'b1;
            tb[l_bank[rcv_c]][l_idx[rcv_c]] <= l_blk;
            if (to_recv == (8'd1 << rcv_c)) state <= S_FIN;
          end
        end
        default: state <= S_IDLE;   // S_FIN
      endcase
    end
  end

  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
                                   mem_rsp.valid |-> (state == S_MISS && to_recv != 0))
    else $error("unexpected memory response");
endmodule

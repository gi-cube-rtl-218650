// ray_queues: the fixed-size ray queues of one processor, one per volume
// block it owns (128 queues of 256 rays of 32 bytes at the design point,
// 8 Mbit, held in embedded DRAM on the chip).
//
// Each queue is a circular buffer with its own head and tail pointer, so two
// rays may be written in one cycle to different queues (or, one after the
// other, to the same queue) while the active queue supplies one ray per
// cycle to the pipeline. The caller checks `count` before writing; a ray that
// does not fit is sent back to the board controller by the caller.
//
// Each queue also keeps a scalar importance, maintained incrementally: with
// policy_contrib = 0 it is the number of rays, with 1 the sum of the rays'
// contribution fields (add on write, subtract on read). `changed` flags the
// queues whose importance moved this cycle, for the queue sorter.
// Read is asynchronous: rd_ray is the head of queue rd_q; rd_pop removes it.
module ray_queues
  import gicube_pkg::*;
#(
  parameter int unsigned NQ   = 128,
  parameter int unsigned QLEN = QLEN_DEF,
  localparam int unsigned QW  = $clog2(NQ),
  localparam int unsigned LW  = $clog2(QLEN)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          policy_contrib,
  input  logic [1:0]    wr_en,
  input  logic [QW-1:0] wr_q   [2],
  input  ray_t          wr_ray [2],
  input  logic [QW-1:0] rd_q,
  input  logic          rd_pop,
  output ray_t          rd_ray,
  output logic [LW:0]   count  [NQ],
  output logic [23:0]   importance [NQ],
  output logic [NQ-1:0] changed
);
  ray_t          mem [NQ * QLEN];
  logic [LW-1:0] head [NQ];
  logic [LW-1:0] tail [NQ];
  logic [LW:0]   cnt  [NQ];
  logic [23:0]   contrib_sum [NQ];
  logic          same_q;

  assign same_q = wr_en[0] && wr_en[1] && (wr_q[0] == wr_q[1]);
  assign rd_ray = mem[{rd_q, head[rd_q]}];

  always_ff @(posedge clk) begin
    if (wr_en[0]) mem[{wr_q[0], tail[wr_q[0]]}] <= wr_ray[0];
    if (wr_en[1]) mem[{wr_q[1], LW'(tail[wr_q[1]] + LW'(same_q))}] <= wr_ray[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < NQ; q++) begin
        head[q] <= '0;
        tail[q] <= '0;
        cnt[q]  <= '0;
        contrib_sum[q] <= '0;
      end
      changed <= '0;
    end else begin
      for (int q = 0; q < NQ; q++) begin
        logic [1:0]  nin;
        logic        nout;
        logic [23:0] cin, cout;
        nin  = 2'(wr_en[0] && wr_q[0] == QW'(q)) + 2'(wr_en[1] && wr_q[1] == QW'(q));
        nout = rd_pop && rd_q == QW'(q);
        cin  = ((wr_en[0] && wr_q[0] == QW'(q)) ? 24'(wr_ray[0].contribution) : 24'd0)
             + ((wr_en[1] && wr_q[1] == QW'(q)) ? 24'(wr_ray[1].contribution) : 24'd0);
        cout = nout ? 24'(rd_ray.contribution) : 24'd0;
        tail[q] <= tail[q] + LW'(nin);
        head[q] <= head[q] + LW'(nout);
        cnt[q]  <= cnt[q] + (LW+1)'(nin) - (LW+1)'(nout);
        contrib_sum[q] <= contrib_sum[q] + cin - cout;
        changed[q] <= (nin != 0) || nout;
      end
    end
  end

  always_comb begin
    for (int q = 0; q < NQ; q++) begin
      count[q]      = cnt[q];
      importance[q] = policy_contrib ? contrib_sum[q] : 24'(cnt[q]);
    end
  end

  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
                                   rd_pop |-> cnt[rd_q] != 0)
    else $error("pop from empty ray queue");
endmodule

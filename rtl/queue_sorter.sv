// queue_sorter: pipelined insertion sorter that picks the active ray queue.
//
// NQ ranks, each with a "selected" and a "comparison" buffer holding a
// (queue number, importance) pair. A queue whose importance changed is
// inserted into the comparison buffer of rank 1, and at the same moment every
// other copy of that queue number in the ranks is wiped, so each queue appears
// at most once. In every cycle each rank compares its two buffers, keeps the
// larger in "selected" and passes the smaller to the comparison buffer of the
// rank below, so items sink through the ranks one per cycle.
// The entry in the selected buffer of rank 1 is the active queue; it counts
// as infinitely important, so it stays there until its queue is empty, and
// then all lower ranks move up by one rank at once and the new top entry
// becomes active.
//
// Several queues can change in one cycle while only one item can enter per
// cycle, so this design keeps a pending bit per queue and inserts the lowest
// numbered pending queue each cycle (changes of the active queue itself are
// ignored). A queue is inserted only while it holds rays; an emptied
// queue's copy is wiped. Output active_q/active_valid is registered.
module queue_sorter #(
  parameter int unsigned NQ = 128,
  parameter int unsigned IW = 24,
  localparam int unsigned QW = $clog2(NQ)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NQ-1:0] changed,
  input  logic [IW-1:0] importance [NQ],
  input  logic [NQ-1:0] nonempty,
  output logic [QW-1:0] active_q,
  output logic          active_valid,
  output logic          switched       // pulse: a new queue became active
);
  typedef struct packed {
    logic          v;
    logic [QW-1:0] q;
    logic [IW-1:0] imp;
  } item_t;

  item_t sel [NQ];
  item_t cmp [NQ];
  logic [NQ-1:0] pending;

  // Lowest pending queue other than the active one
  logic          ins_v;
  logic [QW-1:0] ins_q;
  logic          shift;

  always_comb begin
    ins_v = 1'b0;
    ins_q = '0;
    for (int q = NQ - 1; q >= 0; q--) begin
      if (pending[q] && !(sel[0].v && sel[0].q == QW'(q))) begin
        ins_v = 1'b1;
        ins_q = QW'(q);
      end
    end
  end

  // The active queue has run dry: promote all lower ranks.
  assign shift = sel[0].v && !nonempty[sel[0].q];

  assign active_q     = sel[0].q;
  assign active_valid = sel[0].v && nonempty[sel[0].q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NQ; r++) begin
        sel[r] <= '0;
        cmp[r] <= '0;
      end
      pending  <= '0;
      switched <= 1'b0;
    end else begin
      item_t s_n [NQ];
      item_t c_n [NQ];
      logic [NQ-1:0] pend_n;
      pend_n = pending | changed;
      switched <= 1'b0;
      if (shift) begin
        // Move every rank up. Rank 1 takes new items only through the
        // insertion port, so the item that was waiting in rank 2's
        // comparison buffer is re-inserted as a new change instead.
        for (int r = 0; r < NQ; r++) begin
          s_n[r] = (r + 1 < NQ) ? sel[r+1] : '0;
          c_n[r] = (r + 1 < NQ && r != 0) ? cmp[r+1] : '0;
        end
        if (NQ > 1 && cmp[1].v) pend_n[cmp[1].q] = 1'b1;
        switched <= s_n[0].v;
      end else begin
        item_t incoming;
        incoming = '0;
        if (ins_v) begin
          incoming.v   = nonempty[ins_q];
          incoming.q   = ins_q;
          incoming.imp = importance[ins_q];
          pend_n[ins_q] = 1'b0;
        end
        for (int r = 0; r < NQ; r++) begin
          s_n[r] = sel[r];
          c_n[r] = '0;
        end
        for (int r = 0; r < NQ; r++) begin
          item_t c, s;
          c = (r == 0) ? incoming : cmp[r];
          s = sel[r];
          // wipe stale copies of the queue being inserted
          if (ins_v && r != 0 && c.v && c.q == ins_q) c.v = 1'b0;
          if (ins_v && s.v && s.q == ins_q && !(r == 0)) s.v = 1'b0;
          if (c.v && (!s.v)) begin
            s_n[r] = c;
            if (r == 0 && !sel[0].v) switched <= 1'b1;
          end else if (c.v && r != 0 && c.imp > s.imp) begin
            s_n[r] = c;
            if (r + 1 < NQ) c_n[r+1] = s;
          end else begin
            s_n[r] = s;
            if (c.v && r + 1 < NQ) c_n[r+1] = c;
          end
        end
      end
      for (int r = 0; r < NQ; r++) begin
        sel[r] <= s_n[r];
        cmp[r] <= c_n[r];
      end
      pending <= pend_n;
    end
  end
endmodule

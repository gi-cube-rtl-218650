// ray_merge: one merging node of the binary tree that carries rays from the
// processors to the board controller. It takes a ray from one of its two
// inputs per cycle, alternating priority when both wait (round robin), and
// holds it in an output register until the next node takes it. Valid/ready
// handshake on all ports; a ray is transferred when valid and ready are both
// high. Input ready depends on the output register being free or emptied in
// the same cycle.
module ray_merge
  import gicube_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid [2],
  input  ray_t in_ray   [2],
  output logic in_ready [2],
  output logic out_valid,
  output ray_t out_ray,
  input  logic out_ready
);
  logic prio;        // input that wins a tie
  logic space;
  logic take;
  logic sel;

  assign space = !out_valid || out_ready;
  always_comb begin
    sel  = (in_valid[0] && in_valid[1]) ? prio : in_valid[1];
    take = space && (in_valid[0] || in_valid[1]);
    in_ready[0] = take && (sel == 1'b0);
    in_ready[1] = take && (sel == 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      prio      <= 1'b0;
    end else begin
      if (take) begin
        out_valid <= 1'b1;
        prio      <= ~sel;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end
  always_ff @(posedge clk) if (take) out_ray <= in_ray[sel];

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_ray))
    else $error("ray_merge dropped a ray");
endmodule

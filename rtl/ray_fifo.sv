// ray_fifo: first-in first-out buffer of ray packets with two write ports and
// one read port, used for the horizontal (neighbour) and vertical (DSP)
// communication queues of a processor. The bucketing logic runs at twice
// the pipeline rate, so two rays may be queued in one cycle; port 0 is
// written ahead of port 1. The writer checks `free` before writing (writes to
// a full FIFO are dropped and flagged by an assertion). Read data is the head
// entry, valid while `rd_valid`; `rd_ready` pops it.
module ray_fifo
  import gicube_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  wr_en,
  input  ray_t        wr_data [2],
  output logic [AW:0] free,
  output logic        rd_valid,
  output ray_t        rd_data,
  input  logic        rd_ready
);
  ray_t        mem [DEPTH];
  logic [AW-1:0] head, tail;
  logic [AW:0]   count;
  logic          pop;
  logic [1:0]    nwr;

  assign pop      = rd_valid && rd_ready;
  assign rd_valid = (count != 0);
  assign rd_data  = mem[head];
  assign free     = (AW+1)'(DEPTH) - count;
  assign nwr      = 2'(wr_en[0]) + 2'(wr_en[1]);

  always_ff @(posedge clk) begin
    if (wr_en[0]) mem[tail] <= wr_data[0];
    if (wr_en[1]) mem[AW'(tail + AW'(wr_en[0]))] <= wr_data[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      tail  <= tail + AW'(nwr);
      head  <= head + AW'(pop);
      count <= count + (AW+1)'(nwr) - (AW+1)'(pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  (AW+1)'(nwr) <= free)
    else $error("ray_fifo overflow");
endmodule

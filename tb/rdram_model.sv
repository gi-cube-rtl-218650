// rdram_model: behavioural model of one processor's volume memory (the
// Rambus ASIC cell and its RDRAM) for simulation only. Reads return the
// voxel of the procedural test volume, or the last value written to that
// address, LAT cycles after the request, in request order, one per cycle.
// Writes are absorbed immediately. Every STALL_EVERY-th cycle the port is
// not ready, to exercise back-pressure (0 disables this).
module rdram_model
  import gicube_pkg::*;
  import tb_gicube_pkg::*;
#(
  parameter int LAT = 6,
  parameter int STALL_EVERY = 7
) (
  input  logic     clk,
  input  mem_req_t req,
  output logic     ready,
  output mem_rsp_t rsp,
  output int       n_reads,
  output int       n_writes,
  output int       max_irr     // largest irradiance written so far
);
  voxel_t written [int];
  voxel_t pipe_d [LAT];
  logic   pipe_v [LAT];
  int     cyc = 0;

  assign ready = (STALL_EVERY == 0) || ((cyc % STALL_EVERY) != 0);
  assign rsp.valid = pipe_v[LAT-1];
  assign rsp.rdata = pipe_d[LAT-1];

  initial begin
    n_reads = 0;
    n_writes = 0;
    max_irr = 0;
    for (int i = 0; i < LAT; i++) begin
      pipe_v[i] = 1'b0;
      pipe_d[i] = '0;
    end
  end

  always @(posedge clk) begin
    int a;
    cyc <= cyc + 1;
    for (int i = LAT - 1; i > 0; i--) begin
      pipe_v[i] <= pipe_v[i-1];
      pipe_d[i] <= pipe_d[i-1];
    end
    pipe_v[0] <= 1'b0;
    a = int'(req.addr);
    if (req.valid && ready) begin
      if (req.we) begin
        written[a] = req.wdata;
        n_writes <= n_writes + 1;
        if (int'(req.wdata.irradiance) > max_irr) max_irr <= int'(req.wdata.irradiance);
      end else begin
        pipe_v[0] <= 1'b1;
        pipe_d[0] <= written.exists(a) ? written[a]
                     : voxel_at(a & 255, (a >> 8) & 255, (a >> 16) & 255);
        n_reads <= n_reads + 1;
      end
    end
  end

endmodule

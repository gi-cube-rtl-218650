// queue_select: decides which processor owns a ray start position and which
// of that processor's block queues the ray belongs to.
//
// The volume of VOL_N^3 voxels is cut into cubic blocks of BLK_N^3 voxels,
// BPA = VOL_N/BLK_N blocks per axis, and the blocks are shared among NPROC
// processors by one of three partitions:
//   simple slab    processor = bx / (BPA/NPROC), local x = bx mod (BPA/NPROC)
//   repeated slab  processor = bx mod NPROC,     local x = bx / NPROC
//   skewed block   processor = (bx+by+bz) mod NPROC, local x = bx / NPROC
// and the queue number is q = (local x << 2*log2(BPA)) + (by << log2(BPA)) + bz.
// For the design point (256^3, 32^3 blocks, 4 processors, simple slab) this is
// q = ((x>>5) mod 2) << 6 + (y>>5) << 3 + (z>>5), giving 128 queues per
// processor. The repeated-slab and skewed local-x rule is this design's
// extension of the same formula. Purely combinational; sizes must be powers
// of two with BPA >= NPROC.
module queue_select
  import gicube_pkg::*;
#(
  parameter int unsigned VOL_N = VOL_N_DEF,
  parameter int unsigned BLK_N = BLK_N_DEF,
  parameter int unsigned NPROC = NPROC_DEF,
  localparam int unsigned BPA  = VOL_N / BLK_N,
  localparam int unsigned NQ   = BPA * BPA * BPA / NPROC,
  localparam int unsigned PW   = (NPROC > 1) ? $clog2(NPROC) : 1,
  localparam int unsigned QW   = $clog2(NQ)
) (
  input  logic [15:0] pos_x,
  input  logic [15:0] pos_y,
  input  logic [15:0] pos_z,
  input  partition_e  partition,
  output logic [PW-1:0] proc_id,
  output logic [QW-1:0] queue_id,
  output logic          outside    // position beyond the volume
);
  localparam int unsigned BS  = $clog2(BLK_N);
  localparam int unsigned BW  = $clog2(BPA);
  localparam int unsigned SPP = BPA / NPROC;   // slabs per processor (simple)

  logic [7:0] xi, yi, zi;
  logic [BW-1:0] bx, by, bz;
  logic [BW+1:0] bsum;
  logic [BW-1:0] xl;

  always_comb begin
    xi = pos_x[15:8];
    yi = pos_y[15:8];
    zi = pos_z[15:8];
    outside = (32'(xi) >= VOL_N) || (32'(yi) >= VOL_N) || (32'(zi) >= VOL_N);
    bx = BW'(xi >> BS);
    by = BW'(yi >> BS);
    bz = BW'(zi >> BS);
    bsum = (BW+2)'(bx) + (BW+2)'(by) + (BW+2)'(bz);
    unique case (partition)
      PART_REPEATED_SLAB: begin
        proc_id = PW'(32'(bx) % NPROC);
        xl      = BW'(32'(bx) / NPROC);
      end
      PART_SKEWED_BLOCK: begin
        proc_id = PW'(32'(bsum) % NPROC);
        xl      = BW'(32'(bx) / NPROC);
      end
      default: begin
        proc_id = PW'(32'(bx) / SPP);
        xl      = BW'(32'(bx) % SPP);
      end
    endcase
    queue_id = QW'((32'(xl) << (2 * BW)) + (32'(by) << BW) + 32'(bz));
  end
endmodule

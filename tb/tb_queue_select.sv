// tb_queue_select: compares owner processor and queue number of random ray
// positions, for all three partitions, with a reference computed from block
// coordinates by integer division.
module tb_queue_select;
  import gicube_pkg::*;
  logic [15:0] px, py, pz;
  partition_e  part;
  logic [1:0]  proc_id;
  logic [6:0]  queue_id;
  logic        outside;
  int checks = 0, failures = 0;

  queue_select dut (.pos_x(px), .pos_y(py), .pos_z(pz), .partition(part),
                    .proc_id, .queue_id, .outside);

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int bx, by, bz, ep, exl;
      px = 16'($urandom); py = 16'($urandom); pz = 16'($urandom);
      part = partition_e'(i % 3);
      if (i == 0) begin px = 16'h4123; py = 16'h2200; pz = 16'hE0FF; part = PART_SIMPLE_SLAB; end
      #1;
      bx = px / (32 * 256); by = py / (32 * 256); bz = pz / (32 * 256);
      case (part)
        PART_SIMPLE_SLAB:   begin ep = bx / 2;  exl = bx % 2; end
        PART_REPEATED_SLAB: begin ep = bx % 4;  exl = bx / 4; end
        default:            begin ep = (bx + by + bz) % 4; exl = bx / 4; end
      endcase
      checks++;
      if (proc_id != ep || queue_id != exl * 64 + by * 8 + bz || outside) begin
        failures++;
        if (failures < 5) $display("FAIL pos %h %h %h part %0d: got p%0d q%0d exp p%0d q%0d",
                                   px, py, pz, part, proc_id, queue_id, ep, exl * 64 + by * 8 + bz);
      end
      if (i == 0) begin
        checks++;
        // worked example: x'=(x>>5) mod 2 = 0, y'=1, z'=7 -> q = 15, processor 1
        if (queue_id != 7'd15 || proc_id != 2'd1) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

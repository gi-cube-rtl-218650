// tb_gradient_lut: fills the eight gradient table copies with random 30-bit
// entries through the table write port, keeping its own copy, then reads
// eight random indices per cycle and compares the three signed components of
// each copy's output with the expected entry. The read is combinational.
module tb_gradient_lut;
  import gicube_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  lut_wr_t lut_wr;
  logic [10:0] index [8];
  logic signed [9:0] gx [8], gy [8], gz [8];
  logic [29:0] model [2048];
  int checks = 0, failures = 0;

  gradient_lut dut (.clk, .lut_wr, .index, .gx, .gy, .gz);

  initial begin
    lut_wr = '0;
    for (int i = 0; i < 8; i++) index[i] = '0;
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk);
      model[i] = 30'($urandom);
      lut_wr.we = 1; lut_wr.sel = LUT_GRAD; lut_wr.addr = 17'(i); lut_wr.data = 84'(model[i]);
    end
    @(negedge clk);
    lut_wr.we = 0;
    // a write to another table must not change the gradients
    lut_wr.we = 1; lut_wr.sel = LUT_SEG; lut_wr.addr = 17'd5; lut_wr.data = '1;
    @(negedge clk);
    lut_wr.we = 0;
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 8; i++) index[i] = 11'($urandom);
      #1;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (gx[i] != $signed(model[index[i]][29:20]) || gy[i] != $signed(model[index[i]][19:10])
            || gz[i] != $signed(model[index[i]][9:0])) begin
          failures++;
          if (failures < 5) $display("FAIL copy %0d index %0d", i, index[i]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

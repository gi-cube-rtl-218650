// tb_ray_fifo: random double writes and reads against a queue model; checks
// order, free count and data.
module tb_ray_fifo;
  import gicube_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0] wr_en;
  ray_t wr_data [2];
  logic [4:0] free;
  logic rd_valid, rd_ready;
  ray_t rd_data;
  ray_t model [$];
  int checks = 0, failures = 0;

  ray_fifo #(.DEPTH(16)) dut (.clk, .rst_n, .wr_en, .wr_data, .free, .rd_valid, .rd_data, .rd_ready);

  initial begin
    wr_en = '0; rd_ready = 0; wr_data[0] = '0; wr_data[1] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (32'(free) != 16 - model.size()) begin failures++; $display("FAIL free %0d model %0d", free, model.size()); end
      if (model.size() != 0) begin
        checks++;
        if (!rd_valid || rd_data != model[0]) failures++;
      end
      rd_ready = ($urandom % 3) != 0;
      wr_en = 2'($urandom);
      if (wr_en[1] && !wr_en[0]) wr_en = 2'b01;
      if (32'(free) < 2) wr_en = '0;
      wr_data[0] = {8{$urandom}};
      wr_data[1] = {8{$urandom}};
      @(posedge clk);
      if (rd_ready && model.size() != 0) void'(model.pop_front());
      if (wr_en[0]) model.push_back(wr_data[0]);
      if (wr_en[1]) model.push_back(wr_data[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

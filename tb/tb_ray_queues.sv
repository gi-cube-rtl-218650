// tb_ray_queues: 8 queues of 8 rays. Random double writes (including both to
// one queue) and pops against per-queue models; checks head data, counts,
// both importance policies and the changed flags.
module tb_ray_queues;
  import gicube_pkg::*;
  localparam int NQ = 8, QLEN = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic policy;
  logic [1:0] wr_en;
  logic [2:0] wr_q [2];
  ray_t wr_ray [2];
  logic [2:0] rd_q;
  logic rd_pop;
  ray_t rd_ray;
  logic [3:0] count [NQ];
  logic [23:0] importance [NQ];
  logic [NQ-1:0] changed;
  ray_t model [NQ][$];
  int checks = 0, failures = 0;

  ray_queues #(.NQ(NQ), .QLEN(QLEN)) dut (.clk, .rst_n, .policy_contrib(policy), .wr_en, .wr_q,
    .wr_ray, .rd_q, .rd_pop, .rd_ray, .count, .importance, .changed);

  initial begin
    logic [NQ-1:0] exp_ch;
    wr_en = '0; rd_pop = 0; rd_q = 0; policy = 0;
    wr_q[0] = 0; wr_q[1] = 0; wr_ray[0] = '0; wr_ray[1] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      policy = (i >= 1500);
      #1;
      for (int q = 0; q < NQ; q++) begin
        int sum;
        sum = 0;
        foreach (model[q][k]) sum += model[q][k].contribution;
        checks++;
        if (count[q] != 4'(model[q].size())) failures++;
        checks++;
        if (importance[q] != (policy ? 24'(sum) : 24'(model[q].size()))) begin failures++; if (failures < 4) $display("FAIL imp q%0d %0d exp %0d pol %0d", q, importance[q], sum, policy); end
      end
      rd_q = 3'($urandom);
      #1;
      checks++;
      if (model[rd_q].size() != 0 && rd_ray != model[rd_q][0]) failures++;
      rd_pop = (model[rd_q].size() != 0) && ($urandom % 2 == 0);
      exp_ch = '0;
      if (rd_pop) exp_ch[rd_q] = 1'b1;
      for (int s = 0; s < 2; s++) begin
        int room;
        wr_q[s] = 3'($urandom % 3);
        wr_ray[s] = {8{$urandom}};
        room = QLEN - model[wr_q[s]].size() - ((s == 1 && wr_en[0] && wr_q[0] == wr_q[1]) ? 1 : 0);
        wr_en[s] = ($urandom % 2 == 0) && room > 0;
        if (wr_en[s]) exp_ch[wr_q[s]] = 1'b1;
      end
      @(posedge clk);
      if (rd_pop) void'(model[rd_q].pop_front());
      for (int s = 0; s < 2; s++) if (wr_en[s]) model[wr_q[s]].push_back(wr_ray[s]);
      #1;
      checks++;
      if (changed != exp_ch) begin failures++; if (failures < 4) $display("FAIL changed %b exp %b", changed, exp_ch); end
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

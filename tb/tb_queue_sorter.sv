// tb_queue_sorter: 8 queues. Queue importances are set, the sorter is given
// time to settle, and the active queue must be the most important one; the
// active queue then keeps its place while others overtake it in importance,
// and when it empties the next most important queue takes over. Repeated
// with random importances.
module tb_queue_sorter;
  localparam int NQ = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NQ-1:0] changed, nonempty;
  logic [23:0] importance [NQ];
  logic [2:0] active_q;
  logic active_valid, switched;
  int checks = 0, failures = 0;
  int nsw = 0;

  queue_sorter #(.NQ(NQ), .IW(24)) dut (.clk, .rst_n, .changed, .importance, .nonempty,
    .active_q, .active_valid, .switched);

  always @(posedge clk) if (switched) nsw++;

  task automatic settle();
    changed = '0;
    repeat (3 * NQ) @(posedge clk);
    #1;
  endtask

  initial begin
    changed = '0; nonempty = '0;
    for (int q = 0; q < NQ; q++) importance[q] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      int best, bestv, first;
      // all queues get distinct random importances
      @(negedge clk);
      for (int q = 0; q < NQ; q++) begin
        importance[q] = 24'(($urandom % 1000) * NQ + q + 1);
        nonempty[q] = 1'b1;
      end
      changed = '1;
      @(negedge clk);
      changed = '0;
      settle();
      checks++;
      if (!active_valid) failures++;
      first = active_q;
      // empty the active queue repeatedly: the rest must come out in
      // decreasing importance order
      for (int k = 0; k < NQ; k++) begin
        bestv = -1; best = 0;
        for (int q = 0; q < NQ; q++)
          if (nonempty[q] && int'(importance[q]) > bestv && !(k == 0 && q != first)) begin
            bestv = int'(importance[q]); best = q;
          end
        checks++;
        if (!active_valid || active_q != 3'(best)) begin
          failures++;
          $display("FAIL round %0d step %0d: active %0d exp %0d", round, k, active_q, best);
        end
        // another queue overtakes the active one: it must stay active
        if (k == 0) begin
          @(negedge clk);
          importance[(best + 1) % NQ] = 24'hFFFFF0;
          changed[(best + 1) % NQ] = 1'b1;
          @(negedge clk);
          changed = '0;
          settle();
          checks++;
          if (active_q != 3'(best)) failures++;
        end
        @(negedge clk);
        nonempty[best] = 1'b0;
        importance[best] = '0;
        changed[best] = 1'b1;
        @(negedge clk);
        changed = '0;
        settle();
      end
      checks++;
      if (active_valid) failures++;
    end
    checks++;
    if (nsw < 20 * NQ) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

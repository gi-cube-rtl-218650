// tb_ray_merge: two random sources and a random sink; every ray must arrive
// once, in order per source, and a waiting source must be served within two
// transfers (round robin).
module tb_ray_merge;
  import gicube_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid [2], in_ready [2], out_valid, out_ready;
  ray_t in_ray [2], out_ray;
  ray_t sent [2][$];
  int nxt [2];
  int checks = 0, failures = 0;
  int got = 0;
  logic tk [2];
  logic ot;
  ray_t od;
  bit both_seen = 0;
  int last_w = 0;
  logic waited [2] = '{0, 0};

  ray_merge dut (.clk, .rst_n, .in_valid, .in_ray, .in_ready, .out_valid, .out_ray, .out_ready);

  initial begin
    in_valid[0] = 0; in_valid[1] = 0; out_ready = 0; nxt[0] = 0; nxt[1] = 0;
    in_ray[0] = '0; in_ray[1] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int s = 0; s < 2; s++) begin
        if (!in_valid[s] && ($urandom % 2 == 0)) begin
          in_valid[s] = 1;
          in_ray[s] = '0;
          in_ray[s].user = 8'(s);
          in_ray[s].lifetime = 16'(nxt[s]);
          nxt[s]++;
        end
      end
      out_ready = ($urandom % 4) != 0;
      #1;
      tk[0] = in_valid[0] && in_ready[0];
      tk[1] = in_valid[1] && in_ready[1];
      ot = out_valid && out_ready;
      od = out_ray;
      // round robin: a source that lost a tie wins the next one
      if (in_valid[0] && in_valid[1] && (tk[0] || tk[1])) begin
        if (both_seen && waited[1 - last_w] && tk[last_w]) begin
          checks++; failures++;
          $display("FAIL round robin");
        end
        both_seen = 1; last_w = tk[1];
      end
      @(posedge clk); #1;
      if (ot) begin
        int src;
        src = od.user;
        checks++;
        if (sent[src].size() == 0 || od != sent[src][0]) begin failures++; if (failures < 4) $display("FAIL src %0d got %0d size %0d front %0d user %0d", src, od.lifetime, sent[src].size(), sent[src].size() ? sent[src][0].lifetime : -1, od.user); end
        else void'(sent[src].pop_front());
        got++;
      end
      for (int q = 0; q < 2; q++)
        if (tk[q]) begin
          sent[q].push_back(in_ray[q]);
          in_valid[q] = 0;
        end
    end
    checks++;
    if (got < 1000) failures++;
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

// tb_return_stack: random pushes and pops against a queue that drops its
// oldest entry when more than DEPTH addresses are pushed.
module tb_return_stack;
  import aim_pkg::*;
  localparam int unsigned D = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, empty;
  logic [XLEN-1:0] paddr, top;
  logic [XLEN-1:0] q [$];
  int checks = 0, failures = 0;

  return_stack #(.DEPTH(D)) dut (.clk, .rst_n, .push_i(push), .push_addr_i(paddr), .pop_i(pop),
    .top_o(top), .empty_o(empty));

  initial begin
    push = 0; pop = 0; paddr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 800; n++) begin
      @(negedge clk);
      checks++;
      if (empty !== (q.size() == 0) || (q.size() != 0 && top !== q[$])) begin
        failures++;
        $display("FAIL step %0d: empty %b top %h, model size %0d", n, empty, top, q.size());
      end
      push = 1'($urandom % 2); pop = 1'($urandom % 2); paddr = $urandom;
      @(posedge clk); #1;
      if (push && pop && q.size() != 0) q[$] = paddr;
      else if (push) begin q.push_back(paddr); if (q.size() > D) void'(q.pop_front()); end
      else if (pop && q.size() != 0) void'(q.pop_back());
      push = 0; pop = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

// tb_loop_stack: random push / pop / clear / restart / set-fill operations
// against a queue model; checks top, bottom, count, empty and full.
module tb_loop_stack;
  import aim_pkg::*;
  localparam int unsigned D = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, clr, rst_op, setf, empty, full;
  ls_entry_t ent, top, bot;
  logic [2:0] cnt;
  ls_entry_t q [$];
  int checks = 0, failures = 0;

  loop_stack #(.DEPTH(D)) dut (.clk, .rst_n, .push_i(push), .pop_i(pop), .clear_i(clr),
    .restart_i(rst_op), .set_fill_i(setf), .entry_i(ent), .top_o(top), .bottom_o(bot),
    .count_o(cnt), .empty_o(empty), .full_o(full));

  initial begin
    {push, pop, clr, rst_op, setf} = '0; ent = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 800; n++) begin
      int op;
      @(negedge clk);
      checks++;
      if (int'(cnt) != q.size() || empty !== (q.size() == 0) || full !== (q.size() == D) ||
          (q.size() != 0 && (top !== q[$] || bot !== q[0]))) begin
        failures++;
        $display("FAIL step %0d: count %0d model %0d", n, cnt, q.size());
      end
      op = $urandom % 12;
      ent = '0; ent.bb = $urandom; ent.start = $urandom; ent.len = 16'($urandom);
      push = op < 5; pop = op >= 5 && op < 8; clr = op == 8; rst_op = op == 9; setf = op >= 10;
      @(posedge clk); #1;
      if (clr) q.delete();
      else if (rst_op) begin q.delete(); q.push_back(ent); end
      else if (push) begin if (q.size() < D) q.push_back(ent); end
      else if (pop) begin if (q.size() != 0) void'(q.pop_back()); end
      else if (setf) begin if (q.size() != 0) q[$].fill = 1'b1; end
      {push, pop, clr, rst_op, setf} = '0;
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

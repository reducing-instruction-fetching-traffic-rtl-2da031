// tb_mux_bus: random ownership of the multiplex bus; checks which word is on
// it, the contention flag and the contention counter.
module tb_mux_bus;
  import aim_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic dir, want, cont;
  logic [31:0] addr, word, bus, ccount;
  int checks = 0, failures = 0, nref = 0;

  mux_bus dut (.clk, .rst_n, .dir_i(dir), .cpu_addr_i(addr), .aim_want_i(want), .aim_word_i(word),
    .bus_o(bus), .contention_o(cont), .contention_count_o(ccount));

  initial begin
    dir = 0; want = 0; addr = 0; word = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      dir = ($urandom % 4) == 0; want = 1'($urandom % 2); addr = $urandom; word = $urandom;
      #1;
      checks++;
      if (bus !== (dir ? addr : word) || cont !== (dir && want) || ccount !== nref) begin
        failures++;
        $display("FAIL: dir %b want %b bus %h cont %b count %0d/%0d", dir, want, bus, cont, ccount, nref);
      end
      if (dir && want) nref++;
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

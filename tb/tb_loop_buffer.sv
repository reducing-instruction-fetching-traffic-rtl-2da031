// tb_loop_buffer: random writes and reads against a reference array; a read
// with the enable low must give 0.
module tb_loop_buffer;
  localparam int unsigned N = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we, re;
  logic [3:0] wa, ra;
  logic [31:0] wd, rd;
  logic [31:0] m [N];
  int checks = 0, failures = 0;

  loop_buffer #(.LB_SIZE(N)) dut (.clk, .we_i(we), .waddr_i(wa), .wdata_i(wd), .re_i(re),
    .raddr_i(ra), .rdata_o(rd));

  initial begin
    we = 0; re = 0; wa = 0; ra = 0; wd = 0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk); we = 1; wa = 4'(i); wd = $urandom; m[i] = wd;
    end
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      we = 1'($urandom % 2); wa = 4'($urandom); wd = $urandom;
      re = ($urandom % 4) != 0; ra = 4'($urandom);
      #1;
      checks++;
      if (rd !== (re ? m[ra] : 32'd0)) begin
        failures++;
        $display("FAIL read %0d: %h", ra, rd);
      end
      @(posedge clk); #1;
      if (we) m[wa] = wd;
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

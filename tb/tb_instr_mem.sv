// tb_instr_mem: writes random words, reads them back with the enable high
// and checks the output is 0 with the enable low.
module tb_instr_mem;
  import aim_pkg::*;
  localparam int unsigned W = 256;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en, we;
  logic [XLEN-1:0] addr, waddr;
  logic [31:0] rdata, wdata;
  logic [31:0] ref_mem [W];
  int checks = 0, failures = 0;

  instr_mem #(.WORDS(W)) dut (.clk, .en_i(en), .addr_i(addr), .rdata_o(rdata),
    .we_i(we), .waddr_i(waddr), .wdata_i(wdata));

  initial begin
    en = 0; we = 0; addr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      we = 1; waddr = XLEN'(i) << 2; wdata = $urandom; ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 500; n++) begin
      int a;
      @(negedge clk);
      a = $urandom % W; addr = XLEN'(a) << 2; en = ($urandom % 4) != 0;
      #1;
      checks++;
      if (rdata !== (en ? ref_mem[a] : 32'd0)) begin
        failures++;
        $display("FAIL read %0d en %b: %h", a, en, rdata);
      end
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

// tb_btb: random installs, removals and lookups on a small BTB against a
// reference that keeps, per line, the last installed branch and target.
module tb_btb;
  import aim_pkg::*;
  localparam int unsigned N = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [XLEN-1:0] pc, upc, utgt, tgt;
  logic hit, uen, utaken;
  int checks = 0, failures = 0;

  btb #(.ENTRIES(N)) dut (.clk, .rst_n, .pc_i(pc), .hit_o(hit), .target_o(tgt),
    .upd_en_i(uen), .upd_pc_i(upc), .upd_taken_i(utaken), .upd_target_i(utgt));

  bit              mv [N];
  logic [XLEN-1:0] mpc [N], mtgt [N];
  logic [XLEN-1:0] pool [8];

  initial begin
    uen = 0; pc = 0; upc = 0; utgt = 0; utaken = 0;
    for (int i = 0; i < N; i++) mv[i] = 0;
    for (int i = 0; i < 8; i++) pool[i] = ({$urandom} & 32'h0000_0ffc) | (i < 4 ? 32'h0 : 32'h10_0000);
    pool[7] = pool[3] ^ 32'h0001_0000;   // same line as pool[3], other tag
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int li;
      @(negedge clk);
      // lookup
      pc = pool[$urandom % 8];
      #1;
      li = int'(pc[5:2]);
      checks++;
      if (hit !== (mv[li] && mpc[li] == pc) || (hit && tgt !== mtgt[li])) begin
        failures++;
        $display("FAIL lookup %h: hit %b tgt %h", pc, hit, tgt);
      end
      // random update
      uen = 1'($urandom % 2);
      upc = pool[$urandom % 8]; utaken = $urandom % 3 != 0; utgt = $urandom & 32'hfffc;
      @(posedge clk); #1;
      if (uen) begin
        li = int'(upc[5:2]);
        if (utaken) begin mv[li] = 1; mpc[li] = upc; mtgt[li] = utgt; end
        else if (mv[li] && mpc[li] == upc) mv[li] = 0;
      end
      uen = 0;
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

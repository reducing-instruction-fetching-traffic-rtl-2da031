// tb_lbc_cpu: random L-Indicate / S-Indicate sequences; checks the buffer
// write and read controls, the addresses (pointer rules and the index taken
// from the bus) and the state register against a model of the pointers.
module tb_lbc_cpu;
  import aim_pkg::*;
  localparam int unsigned N = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  l_ind_e l;
  s_ind_e s;
  logic [31:0] bus;
  logic pt, we, re, fb;
  logic [3:0] wa, ra;
  logic [2:0] sr;
  int wp, rp, sr_ref;
  int checks = 0, failures = 0;

  lbc_cpu #(.LB_SIZE(N)) dut (.clk, .rst_n, .l_ind_i(l), .bus_i(bus), .p_taken_i(pt), .s_ind_i(s),
    .lb_we_o(we), .lb_waddr_o(wa), .lb_re_o(re), .lb_raddr_o(ra), .from_buffer_o(fb), .sr_o(sr));

  initial begin
    l = L_IDLE; s = S_AUTO; bus = 0; pt = 0; wp = 0; rp = 0; sr_ref = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 800; n++) begin
      bit skip;
      l_ind_e le;
      @(negedge clk);
      l = l_ind_e'($urandom % 4); s = s_ind_e'(($urandom % 8 == 0) ? 2 + $urandom % 2 : $urandom % 2);
      bus = $urandom; pt = 1'($urandom % 2);
      skip = (s == S_WRONG || s == S_COMP);
      le = skip ? L_IDLE : l;
      #1;
      checks++;
      if (we !== (le == L_FILL) || re !== (le == L_ACTIVE || le == L_INDEX) || fb !== re ||
          (we && wa !== 4'(wp)) || (le == L_ACTIVE && ra !== 4'(rp)) ||
          (le == L_INDEX && ra !== bus[3:0]) || sr !== 3'(sr_ref)) begin
        failures++;
        $display("FAIL step %0d: l %0d s %0d we %b re %b wa %0d ra %0d (wp %0d rp %0d) sr %b/%b",
                 n, l, s, we, re, wa, ra, wp, rp, sr, 3'(sr_ref));
      end
      @(posedge clk);
      sr_ref = int'({le, pt});
      case (le)
        L_FILL:   begin rp = (s == S_STALL) ? wp : (wp + 1) % N; wp = (wp + 1) % N; end
        L_ACTIVE: rp = (s == S_STALL) ? rp : (rp + 1) % N;
        L_INDEX:  rp = (s == S_STALL) ? int'(bus[3:0]) : (int'(bus[3:0]) + 1) % N;
        default: ;
      endcase
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

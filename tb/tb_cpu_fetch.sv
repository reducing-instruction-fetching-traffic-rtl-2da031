// tb_cpu_fetch: plays the AIM side of the protocol with random but legal
// sequences (FILL with fresh words, ACTIVE / INDEX only on written slots,
// IDLE words, occasional address cycles) and checks that the core receives
// the word on the bus or the word that was filled into that slot.
module tb_cpu_fetch;
  import aim_pkg::*;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  l_ind_e l;
  s_ind_e s;
  logic [31:0] bus, instr;
  logic pt, fb;
  logic [2:0] sr;
  logic [31:0] m [N];
  bit written [N];
  int wp, rp;
  int checks = 0, failures = 0, n_buf = 0;

  cpu_fetch #(.LB_SIZE(N)) dut (.clk, .rst_n, .l_ind_i(l), .bus_i(bus), .p_taken_i(pt), .s_ind_i(s),
    .instr_o(instr), .from_buffer_o(fb), .sr_o(sr));

  initial begin
    l = L_IDLE; s = S_AUTO; bus = 0; pt = 0; wp = 0; rp = 0;
    for (int i = 0; i < N; i++) written[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      int r, slot;
      logic [31:0] exp_w;
      bit exp_fb;
      @(negedge clk);
      s = (n % 17 == 5) ? S_WRONG : (n % 7 == 3) ? S_STALL : S_AUTO;
      r = $urandom % 4;
      bus = $urandom; pt = 1'($urandom % 2);
      if (r == 2 && written[rp]) begin
        l = L_ACTIVE; exp_w = m[rp]; exp_fb = 1;
      end else if (r == 3 && (written[0] || written[N-1])) begin
        slot = written[0] ? 0 : N - 1;
        if (written[$urandom % N]) slot = -1;
        if (slot < 0) begin
          slot = $urandom % N;
          while (!written[slot]) slot = (slot + 1) % N;
        end
        l = L_INDEX; bus[2:0] = 3'(slot); exp_w = m[slot]; exp_fb = 1;
      end else begin
        l = (r == 1) ? L_FILL : L_IDLE; exp_w = bus; exp_fb = 0;
      end
      if (s == S_WRONG) begin exp_w = bus; exp_fb = 0; end
      #1;
      if (s != S_WRONG) begin
        checks++;
        if (instr !== exp_w || fb !== exp_fb) begin
          failures++;
          $display("FAIL step %0d: l %0d got %h (fb %b) expected %h", n, l, instr, fb, exp_w);
        end
        if (exp_fb) n_buf++;
      end
      @(posedge clk);
      if (s != S_WRONG) begin
        case (l)
          L_FILL:   begin m[wp] = bus; written[wp] = 1; rp = (s == S_STALL) ? wp : (wp + 1) % N; wp = (wp + 1) % N; end
          L_ACTIVE: rp = (s == S_STALL) ? rp : (rp + 1) % N;
          L_INDEX:  rp = (s == S_STALL) ? int'(bus[2:0]) : (int'(bus[2:0]) + 1) % N;
          default: ;
        endcase
      end
    end
    checks++;
    if (n_buf == 0) failures++;
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

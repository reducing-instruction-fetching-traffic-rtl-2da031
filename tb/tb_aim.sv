// tb_aim: the AIM on its own (instruction memory, partial decoder, BTB,
// return stack, address controller, loop buffer controller) with a 32-word
// loop buffer, random loop trip counts and a 30 % stall rate. The CPU side is written out here as a plain behavioural model
// (an array with write and read pointers that follows L-Indicate), so the AIM
// is checked against an independent reading of the protocol: the CPU model
// checks every on-path instruction it receives and the 2-cycle miss penalty,
// and this bench checks that the memory is off whenever the buffer supplies
// the instruction and that all four L-Indicate states occur.
module tb_aim;
  import aim_pkg::*;
  localparam int unsigned N = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  s_ind_e          s_ind;
  logic [XLEN-1:0] cpu_addr, pc;
  logic            cpu_addr_valid, p_taken, want, pcv, im_en, ls_fill;
  logic [31:0]     content, instr;
  logic            from_buf;
  l_ind_e          l_ind;
  logic [3:0]      ls_count;
  logic            im_we;
  logic [XLEN-1:0] im_waddr;
  logic [31:0]     im_wdata;

  aim #(.LB_SIZE(N)) dut (
    .clk, .rst_n, .s_ind_i(s_ind), .cpu_addr_i(cpu_addr), .cpu_addr_valid_i(cpu_addr_valid),
    .p_taken_o(p_taken), .l_ind_o(l_ind), .content_o(content), .want_bus_o(want),
    .im_we_i(im_we), .im_waddr_i(im_waddr), .im_wdata_i(im_wdata),
    .pc_o(pc), .pc_valid_o(pcv), .im_en_o(im_en), .ls_count_o(ls_count), .ls_top_fill_o(ls_fill)
  );

  cpu_model #(.STALL_PCT(30), .RAND_TRIPS(1'b1)) u_cpu (
    .clk, .rst_n, .s_ind_o(s_ind), .cpu_addr_o(cpu_addr), .cpu_addr_valid_o(cpu_addr_valid),
    .instr_i(instr), .from_buffer_i(from_buf), .p_taken_i(p_taken)
  );

  // behavioural CPU-side loop buffer
  logic [31:0] lbm [N];
  int wp = 0, rp = 0;
  always_comb begin
    from_buf = (l_ind == L_ACTIVE) || (l_ind == L_INDEX);
    instr    = (l_ind == L_ACTIVE) ? lbm[rp] : (l_ind == L_INDEX) ? lbm[content[4:0]] : content;
  end
  always @(posedge clk) if (rst_n) begin
    unique case (l_ind)
      L_FILL:   begin lbm[wp] <= content; wp <= (wp + 1) % N; rp <= (s_ind == S_STALL) ? wp : (wp + 1) % N; end
      L_ACTIVE: rp <= (s_ind == S_STALL) ? rp : (rp + 1) % N;
      L_INDEX:  rp <= (s_ind == S_STALL) ? int'(content[4:0]) : (int'(content[4:0]) + 1) % N;
      default: ;
    endcase
  end

  int checks = 0, failures = 0;
  int nl [4] = '{0, 0, 0, 0};
  always @(posedge clk) if (rst_n && u_cpu.started && !u_cpu.done) begin
    nl[int'(l_ind)]++;
    if (from_buf) begin
      checks++;
      if (im_en) begin
        failures++;
        $display("FAIL: memory enabled while the buffer supplies pc %h", pc);
      end
    end
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: never happened: %s", what);
    end
  endtask

  initial begin
    im_we = 1'b0; im_waddr = '0; im_wdata = '0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      im_we = 1'b1; im_waddr = XLEN'(i) << 2; im_wdata = u_cpu.prog[i];
    end
    @(negedge clk);
    im_we = 1'b0;
    rst_n = 1'b1;
    wait (u_cpu.done);
    @(posedge clk);
    need("IDLE", nl[0]);
    need("FILL", nl[1]);
    need("ACTIVE", nl[2]);
    need("INDEX_ACTIVE", nl[3]);
    need("wrong prediction", u_cpu.n_wrong);
    need("compulsory", u_cpu.n_comp);
    need("miss penalty measured", u_cpu.n_penalty_checked);
    need("return predicted", u_cpu.n_ret_rs);
    $display("idle=%0d fill=%0d active=%0d index=%0d onpath=%0d", nl[0], nl[1], nl[2], nl[3], u_cpu.n_onpath);
    checks   += u_cpu.checks;
    failures += u_cpu.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + u_cpu.checks, failures + u_cpu.failures + 1);
    $finish;
  end
endmodule

// tb_aim_lb_top: end-to-end test of the instruction fetch system at its
// default parameters (separate address and content buses, 64-word loop
// buffer). A behavioural CPU model runs a program with a two-level nest
// holding a forward branch and a call, an indirect jump, a loop longer than
// the loop buffer, a three-level nest and a procedure with a loop and a
// return. The model checks every instruction on the correct path against the
// program and the 2-cycle miss penalty; this bench checks that the content
// bus is quiet and the memory disabled while instructions come from the loop
// buffer, and that every mechanism happened: FILL, ACTIVE, INDEX_ACTIVE,
// wrong prediction, compulsory, stall, return-stack prediction, loop stack
// push / pop / fill bit, break by a loop longer than the buffer.
module tb_aim_lb_top;
  import aim_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  s_ind_e          s_ind;
  logic [XLEN-1:0] cpu_addr, aim_pc, addr_bus;
  logic            cpu_addr_valid, from_buf, p_taken, contention, im_en, ls_fill;
  logic [31:0]     instr, cbus, ccount;
  logic [2:0]      sr;
  l_ind_e          l_ind;
  logic [3:0]      ls_count;
  logic            im_we;
  logic [XLEN-1:0] im_waddr;
  logic [31:0]     im_wdata;

  aim_lb_top dut (
    .clk, .rst_n, .s_ind_i(s_ind), .cpu_addr_i(cpu_addr), .cpu_addr_valid_i(cpu_addr_valid),
    .instr_o(instr), .from_buffer_o(from_buf), .p_taken_o(p_taken), .sr_o(sr),
    .im_we_i(im_we), .im_waddr_i(im_waddr), .im_wdata_i(im_wdata),
    .l_ind_o(l_ind), .content_bus_o(cbus), .addr_bus_o(addr_bus), .contention_o(contention),
    .contention_count_o(ccount), .im_en_o(im_en), .aim_pc_o(aim_pc),
    .ls_count_o(ls_count), .ls_top_fill_o(ls_fill)
  );

  cpu_model #(.STALL_PCT(12)) u_cpu (
    .clk, .rst_n, .s_ind_o(s_ind), .cpu_addr_o(cpu_addr), .cpu_addr_valid_o(cpu_addr_valid),
    .instr_i(instr), .from_buffer_i(from_buf), .p_taken_i(p_taken)
  );

  int checks, failures;
  int n_idle, n_fill, n_active, n_index, n_push, n_pop, n_clear, n_fillbit, n_cyc;
  logic [31:0] cbus_prev;
  longint toggles;

  // statistics and bus checks, sampled once the program runs
  always @(posedge clk) if (rst_n && u_cpu.started && !u_cpu.done) begin
    n_cyc++;
    toggles += $countones(cbus ^ cbus_prev);
    unique case (l_ind)
      L_IDLE:   n_idle++;
      L_FILL:   n_fill++;
      L_ACTIVE: n_active++;
      L_INDEX:  n_index++;
    endcase
    if (l_ind == L_ACTIVE) begin
      checks++;
      if (cbus !== cbus_prev || im_en) begin
        failures++;
        $display("FAIL: bus toggled or memory enabled in ACTIVE at pc %h", aim_pc);
      end
    end
    if (l_ind == L_INDEX) begin
      checks++;
      if (im_en || cbus[31:6] !== cbus_prev[31:6]) begin
        failures++;
        $display("FAIL: INDEX cycle drove more than the index at pc %h", aim_pc);
      end
    end
    if (dut.u_aim.u_lbc.ls_push || dut.u_aim.u_lbc.ls_restart) n_push++;
    if (dut.u_aim.u_lbc.ls_pop)      n_pop++;
    if (dut.u_aim.u_lbc.ls_clear)    n_clear++;
    if (dut.u_aim.u_lbc.ls_set_fill) n_fillbit++;
  end
  always @(posedge clk) cbus_prev <= cbus;

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism never happened: %s", what);
    end
  endtask

  initial begin
    checks = 0; failures = 0; toggles = 0;
    im_we = 1'b0; im_waddr = '0; im_wdata = '0;
    repeat (2) @(posedge clk);
    // load the program through the memory write port
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      im_we = 1'b1; im_waddr = XLEN'(i) << 2; im_wdata = u_cpu.prog[i];
    end
    @(negedge clk);
    im_we = 1'b0;
    rst_n = 1'b1;
    wait (u_cpu.done);
    @(posedge clk);
    need("IDLE", n_idle);
    need("FILL", n_fill);
    need("ACTIVE", n_active);
    need("INDEX_ACTIVE", n_index);
    need("wrong prediction", u_cpu.n_wrong);
    need("compulsory", u_cpu.n_comp);
    need("pipeline stall", u_cpu.n_stall);
    need("return predicted by the return stack", u_cpu.n_ret_rs);
    need("instruction from the loop buffer", u_cpu.n_from_buf);
    need("miss penalty measured", u_cpu.n_penalty_checked);
    need("loop stack push", n_push);
    need("loop stack pop", n_pop);
    need("loop stack fill bit", n_fillbit);
    need("break by a loop longer than the buffer", n_clear);
    $display("cycles=%0d onpath=%0d idle=%0d fill=%0d active=%0d index=%0d wrong=%0d comp=%0d stall=%0d push=%0d pop=%0d clear=%0d content-bus toggles=%0d",
             n_cyc, u_cpu.n_onpath, n_idle, n_fill, n_active, n_index, u_cpu.n_wrong, u_cpu.n_comp,
             u_cpu.n_stall, n_push, n_pop, n_clear, toggles);
    checks   += u_cpu.checks;
    failures += u_cpu.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + u_cpu.checks, failures + u_cpu.failures);
    $finish;
  end

endmodule

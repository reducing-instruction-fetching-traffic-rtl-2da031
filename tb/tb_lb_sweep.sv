// tb_lb_sweep: runs the whole fetch system (separate buses) on the test
// program of cpu_model once for each loop buffer size 4, 8, 16, ..., 1024
// words, side by side, and reports per size the metrics used to judge the
// scheme: instruction memory access rate (cycles with the memory enabled
// over all cycles), content bus active cycles and content bus bit
// transitions. Every run must deliver every on-path instruction correctly
// with the 2-cycle miss penalty (checked by cpu_model). On top of that the
// bench checks what follows from the program's shape: its largest loop has
// 70 instructions, so it is broken up ("too big") with buffers of up to 64
// words and never with 128 words or more, and the memory access rate with
// the largest buffer is below the one with the smallest.
module tb_lb_sweep;
  import aim_pkg::*;
  localparam int NS = 9;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int     n_cyc   [NS];
  int     n_imen  [NS];
  int     n_busact[NS];
  int     n_clear [NS];
  longint n_tog   [NS];
  int     n_fin   [NS];
  int     m_chk   [NS];
  int     m_fail  [NS];

  for (genvar g = 0; g < NS; g++) begin : g_run
    localparam int unsigned LB = 4 << g;
    logic            rst_n = 1'b0;
    s_ind_e          s_ind;
    logic [XLEN-1:0] cpu_addr, aim_pc, addr_bus;
    logic            cpu_addr_valid, from_buf, p_taken, contention, im_en, ls_fill;
    logic [31:0]     instr, cbus, ccount, cbus_prev;
    logic [2:0]      sr;
    l_ind_e          l_ind;
    logic [3:0]      ls_count;
    logic            im_we = 1'b0;
    logic [XLEN-1:0] im_waddr = '0;
    logic [31:0]     im_wdata = '0;
    int              cyc = 0, imen = 0, busact = 0, clr = 0, fin = 0;
    longint          tog = 0;

    aim_lb_top #(.LB_SIZE(LB)) dut (
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

    always @(posedge clk) begin
      cbus_prev <= cbus;
      if (rst_n && u_cpu.started && !u_cpu.done) begin
        cyc++;
        if (im_en) imen++;
        if (cbus !== cbus_prev) busact++;
        tog += $countones(cbus ^ cbus_prev);
        if (dut.u_aim.u_lbc.ls_clear) clr++;
      end
    end

    initial begin
      repeat (2) @(posedge clk);
      for (int i = 0; i < 256; i++) begin
        @(negedge clk);
        im_we = 1'b1; im_waddr = XLEN'(i) << 2; im_wdata = u_cpu.prog[i];
      end
      @(negedge clk);
      im_we = 1'b0;
      rst_n = 1'b1;
      wait (u_cpu.done);
      fin = 1;
    end

    assign n_cyc[g]    = cyc;
    assign n_imen[g]   = imen;
    assign n_busact[g] = busact;
    assign n_clear[g]  = clr;
    assign n_tog[g]    = tog;
    assign n_fin[g]    = fin;
    assign m_chk[g]    = u_cpu.checks;
    assign m_fail[g]   = u_cpu.failures;
  end

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    bit all;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < NS; i++) if (n_fin[i] == 0) all = 0;
    end while (!all);
    @(posedge clk);
    $display(" LB words  cycles  mem-access%%  bus-active%%  bus-toggles  too-big breaks");
    for (int i = 0; i < NS; i++) begin
      $display(" %8d  %6d  %10.1f  %11.1f  %11d  %14d", 4 << i, n_cyc[i],
               100.0 * n_imen[i] / n_cyc[i], 100.0 * n_busact[i] / n_cyc[i], n_tog[i], n_clear[i]);
      checks   += m_chk[i];
      failures += m_fail[i];
      if ((4 << i) <= 64) check(n_clear[i] != 0, $sformatf("70-instruction loop not broken at LB=%0d", 4 << i));
      else                check(n_clear[i] == 0, $sformatf("loop broken although it fits at LB=%0d", 4 << i));
    end
    check(n_imen[NS-1] * n_cyc[0] < n_imen[0] * n_cyc[NS-1], "largest buffer does not lower the memory access rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

// cpu_fetch: the fetch side of the CPU in a system with an autonomous
// instruction memory: the CPU-side loop buffer controller (with its state
// register), the loop buffer and the mux that hands the CPU core either the
// word on the instruction/index bus or the word read from the buffer.
//
// Combinational from bus to instr_o in the same cycle; the buffer write and
// the pointer updates happen at the clock edge. Structure as in the CPU-side
// block diagram of the design.
module cpu_fetch
  import aim_pkg::*;
#(
  parameter int unsigned LB_SIZE = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  l_ind_e      l_ind_i,        // L-Indicate from the AIM
  input  logic [31:0] bus_i,          // instruction / index bus
  input  logic        p_taken_i,      // P-Taken from the AIM
  input  s_ind_e      s_ind_i,        // S-Indicate the CPU drives this cycle
  output logic [31:0] instr_o,        // instruction handed to the core
  output logic        from_buffer_o,  // it was read from the loop buffer
  output logic [2:0]  sr_o
);

  localparam int unsigned IW = $clog2(LB_SIZE);

  logic          we, re;
  logic [IW-1:0] waddr, raddr;
  logic [31:0]   lb_rdata;

  lbc_cpu #(.LB_SIZE(LB_SIZE)) u_lbc (
    .clk, .rst_n, .l_ind_i, .bus_i, .p_taken_i, .s_ind_i,
    .lb_we_o(we), .lb_waddr_o(waddr), .lb_re_o(re), .lb_raddr_o(raddr),
    .from_buffer_o, .sr_o
  );

  loop_buffer #(.LB_SIZE(LB_SIZE)) u_lb (
    .clk, .we_i(we), .waddr_i(waddr), .wdata_i(bus_i),
    .re_i(re), .raddr_i(raddr), .rdata_o(lb_rdata)
  );

  assign instr_o = from_buffer_o ? lb_rdata : bus_i;

endmodule

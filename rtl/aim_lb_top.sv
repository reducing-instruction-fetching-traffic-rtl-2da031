// aim_lb_top: instruction fetch system of a CPU with an autonomous
// instruction memory (AIM) and a loop buffer. The AIM (instruction memory,
// BTB, partial decoder, return stack, address generation and the loop
// buffer controller) sits away from the CPU; the CPU keeps only the tagless
// loop buffer, its small controller and the instruction source mux. They
// talk over an instruction address bus (CPU -> AIM), an instruction content
// bus (AIM -> CPU), S-Indicate (2 lines, CPU -> AIM), P-Taken (1 line) and
// L-Indicate (2 lines, AIM -> CPU).
//
// With MUX_BUS = 1 the two buses are merged into one multiplex bus with a
// direction line from the CPU (multiple-cycle-fetch policy: the AIM's word
// is dropped when the CPU sends an address). The default, MUX_BUS = 0, keeps
// the two dedicated buses.
//
// The CPU core itself is outside: its fetch-side signals are the ports.
// Each cycle the core drives S-Indicate (and, for compulsory cycles and for
// wrong predictions on instructions that came from the loop buffer, an
// address with cpu_addr_valid); it receives instr_o, from_buffer_o and
// P-Taken. After reset the core must send one compulsory cycle with the
// start address. The program is loaded through the im_* write port.
module aim_lb_top
  import aim_pkg::*;
#(
  parameter int unsigned IM_WORDS    = 4096,
  parameter int unsigned BTB_ENTRIES = 64,
  parameter int unsigned RS_DEPTH    = 8,
  parameter int unsigned LB_SIZE     = 64,
  parameter int unsigned LS_DEPTH    = 8,
  parameter bit          MUX_BUS     = 1'b0
) (
  input  logic            clk,
  input  logic            rst_n,
  // CPU core side
  input  s_ind_e          s_ind_i,
  input  logic [XLEN-1:0] cpu_addr_i,
  input  logic            cpu_addr_valid_i,
  output logic [31:0]     instr_o,
  output logic            from_buffer_o,
  output logic            p_taken_o,
  output logic [2:0]      sr_o,
  // program load into the instruction memory
  input  logic            im_we_i,
  input  logic [XLEN-1:0] im_waddr_i,
  input  logic [31:0]     im_wdata_i,
  // observation of the wires between CPU and AIM
  output l_ind_e          l_ind_o,
  output logic [31:0]     content_bus_o,   // content bus, or the multiplex bus
  output logic [XLEN-1:0] addr_bus_o,      // address bus (unused with MUX_BUS)
  output logic            contention_o,
  output logic [31:0]     contention_count_o,
  output logic            im_en_o,
  output logic [XLEN-1:0] aim_pc_o,
  output logic [$clog2(LS_DEPTH+1)-1:0] ls_count_o,
  output logic            ls_top_fill_o
);

  logic [31:0]     aim_word, cpu_word;
  logic [XLEN-1:0] aim_addr, abus_q;
  logic            want, pc_valid;
  l_ind_e          l_ind;

  aim #(
    .IM_WORDS(IM_WORDS), .BTB_ENTRIES(BTB_ENTRIES), .RS_DEPTH(RS_DEPTH),
    .LB_SIZE(LB_SIZE), .LS_DEPTH(LS_DEPTH)
  ) u_aim (
    .clk, .rst_n, .s_ind_i, .cpu_addr_i(aim_addr), .cpu_addr_valid_i,
    .p_taken_o, .l_ind_o(l_ind), .content_o(aim_word), .want_bus_o(want),
    .im_we_i, .im_waddr_i, .im_wdata_i,
    .pc_o(aim_pc_o), .pc_valid_o(pc_valid), .im_en_o, .ls_count_o, .ls_top_fill_o
  );

  cpu_fetch #(.LB_SIZE(LB_SIZE)) u_fetch (
    .clk, .rst_n, .l_ind_i(l_ind), .bus_i(cpu_word), .p_taken_i(p_taken_o), .s_ind_i,
    .instr_o, .from_buffer_o, .sr_o
  );

  assign l_ind_o = l_ind;

  if (MUX_BUS) begin : g_mux
    logic [31:0] mbus;
    mux_bus u_mbus (
      .clk, .rst_n, .dir_i(cpu_addr_valid_i), .cpu_addr_i, .aim_want_i(want),
      .aim_word_i(aim_word), .bus_o(mbus), .contention_o, .contention_count_o
    );
    assign aim_addr      = mbus;
    assign cpu_word      = mbus;
    assign content_bus_o = mbus;
    assign addr_bus_o    = '0;
  end else begin : g_sep
    assign aim_addr           = cpu_addr_i;
    assign cpu_word           = aim_word;
    assign content_bus_o      = aim_word;
    assign addr_bus_o         = cpu_addr_valid_i ? cpu_addr_i : abus_q;
    assign contention_o       = 1'b0;
    assign contention_count_o = '0;
  end

  // the address bus keeps its last value when the CPU does not drive it
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) abus_q <= '0;
    else        abus_q <= addr_bus_o;
  end

endmodule

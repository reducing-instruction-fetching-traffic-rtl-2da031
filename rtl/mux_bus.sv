// mux_bus: the multiplex bus that replaces the separate instruction address
// bus and instruction content bus between CPU and AIM. A direction line
// driven by the CPU says who owns the bus this cycle: when it is high the
// CPU sends an instruction address to the AIM, otherwise the AIM sends an
// instruction (or a loop buffer index) to the CPU.
//
// Multiple-cycle-fetch policy: when both sides want the bus in the same
// cycle (bus contention) the CPU's address wins and the AIM's word is
// abandoned; this costs nothing because the address is only sent when the
// program flow changes, which makes the AIM's word of that cycle useless.
// Each contention is flagged and counted. The value on the bus is the
// address or the AIM's word; in a cycle where neither drives, the AIM side
// keeps its last word, so the bus does not toggle. The single-cycle-fetch
// variant (AIM waits a cycle, latch in the AIM) is not built.
module mux_bus
  import aim_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            dir_i,         // 1: CPU drives an address
  input  logic [XLEN-1:0] cpu_addr_i,
  input  logic            aim_want_i,    // AIM has a word to send
  input  logic [31:0]     aim_word_i,
  output logic [31:0]     bus_o,         // value on the shared wires
  output logic            contention_o,
  output logic [31:0]     contention_count_o
);

  assign bus_o        = dir_i ? cpu_addr_i : aim_word_i;
  assign contention_o = dir_i && aim_want_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            contention_count_o <= '0;
    else if (contention_o) contention_count_o <= contention_count_o + 32'd1;
  end

endmodule

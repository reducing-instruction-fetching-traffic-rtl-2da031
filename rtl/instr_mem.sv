// instr_mem: the top-level instruction memory (TLIM) inside the AIM.
//
// WORDS 32-bit words, word addressed by PC[AW+1:2]. The read port is
// asynchronous so that the instruction at the AIM's current PC is on the
// instruction content bus in the same cycle (single-cycle access). The read
// enable is driven by the loop buffer controller: while the CPU reads from
// its loop buffer the memory is not accessed and the output is 0. A
// synchronous write port loads the program. The size is this design's
// choice; the description does not give one.
module instr_mem
  import aim_pkg::*;
#(
  parameter int unsigned WORDS = 4096
) (
  input  logic            clk,
  input  logic            en_i,
  input  logic [XLEN-1:0] addr_i,
  output logic [31:0]     rdata_o,
  input  logic            we_i,
  input  logic [XLEN-1:0] waddr_i,
  input  logic [31:0]     wdata_i
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  assign rdata_o = en_i ? mem[addr_i[AW+1:2]] : 32'd0;

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i[AW+1:2]] <= wdata_i;
  end

endmodule

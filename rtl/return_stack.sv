// return_stack: the AIM's return address stack. A call pushes its return
// address (PC + 4), a return pops it, so the AIM can supply the address of
// the instruction after a procedure return without the CPU sending it.
//
// DEPTH entries kept as a circular buffer: pushing onto a full stack
// overwrites the oldest entry, popping an empty stack does nothing.
// top_o/empty_o are combinational from the registers; push and pop act at
// the clock edge, and a push with a pop in the same cycle replaces the top.
// The depth is this design's choice (the description gives none).
module return_stack
  import aim_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            push_i,
  input  logic [XLEN-1:0] push_addr_i,
  input  logic            pop_i,
  output logic [XLEN-1:0] top_o,
  output logic            empty_o
);

  localparam int unsigned PTR_W = $clog2(DEPTH);

  logic [XLEN-1:0]  mem [DEPTH];
  logic [PTR_W-1:0] tos;      // slot of the top entry
  logic [PTR_W:0]   count;    // valid entries, saturates at DEPTH

  assign empty_o = (count == '0);
  assign top_o   = mem[tos];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tos   <= '0;
      count <= '0;
    end else if (push_i && pop_i && !empty_o) begin
      // replace the top entry
    end else if (push_i) begin
      tos <= tos + 1'b1;
      if (count != (PTR_W+1)'(DEPTH)) count <= count + 1'b1;
    end else if (pop_i && !empty_o) begin
      tos   <= tos - 1'b1;
      count <= count - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push_i && pop_i && !empty_o) mem[tos] <= push_addr_i;
    else if (push_i)                 mem[tos + 1'b1] <= push_addr_i;
  end

endmodule

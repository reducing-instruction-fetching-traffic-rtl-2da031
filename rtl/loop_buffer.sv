// loop_buffer: the tagless instruction buffer inside the CPU. It holds
// LB_SIZE instruction words and nothing else: which addresses they belong to
// is known only to the loop buffer controller in the AIM.
//
// One synchronous write port (used in FILL) and one asynchronous read port
// (used in ACTIVE / INDEX_ACTIVE, so the instruction is available in the
// cycle it is selected, like one coming over the bus). The read enable only
// gates the output to 0, standing for the buffer's access enable. The
// default size, 64 words, is this design's pick from the 4 to 1024 words the
// design was studied with.
module loop_buffer #(
  parameter int unsigned LB_SIZE = 64
) (
  input  logic                       clk,
  input  logic                       we_i,
  input  logic [$clog2(LB_SIZE)-1:0] waddr_i,
  input  logic [31:0]                wdata_i,
  input  logic                       re_i,
  input  logic [$clog2(LB_SIZE)-1:0] raddr_i,
  output logic [31:0]                rdata_o
);

  logic [31:0] mem [LB_SIZE];

  assign rdata_o = re_i ? mem[raddr_i] : 32'd0;

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i] <= wdata_i;
  end

endmodule

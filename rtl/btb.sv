// btb: branch target buffer held inside the AIM. It remembers, for each
// branch or jump that was last seen taken, its target address; a hit means
// "predict taken to this target".
//
// Direct mapped with ENTRIES lines indexed by PC[IDX_W+1:2] and tagged with
// the remaining upper address bits, so a hit is exact. Lookup is
// combinational. The update port is written one cycle after the CPU reports
// a wrong prediction: a branch found taken is (re)installed with its target,
// a branch found not taken has its line invalidated. This one-bit scheme and
// the size are this design's choices; the design description only says the
// BTB supplies the taken target and is updated from the resolved outcome.
module btb
  import aim_pkg::*;
#(
  parameter int unsigned ENTRIES = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  // lookup
  input  logic [XLEN-1:0] pc_i,
  output logic            hit_o,
  output logic [XLEN-1:0] target_o,
  // update from the resolved branch
  input  logic            upd_en_i,
  input  logic [XLEN-1:0] upd_pc_i,
  input  logic            upd_taken_i,
  input  logic [XLEN-1:0] upd_target_i
);

  localparam int unsigned IDX_W = $clog2(ENTRIES);
  localparam int unsigned TAG_W = XLEN - IDX_W - 2;

  logic [ENTRIES-1:0] vld;
  logic [TAG_W-1:0]   tag [ENTRIES];
  logic [XLEN-1:0]    tgt [ENTRIES];

  logic [IDX_W-1:0] ridx, widx;
  assign ridx = pc_i[IDX_W+1:2];
  assign widx = upd_pc_i[IDX_W+1:2];

  assign hit_o    = vld[ridx] && (tag[ridx] == pc_i[XLEN-1:IDX_W+2]);
  assign target_o = tgt[ridx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
    end else if (upd_en_i) begin
      if (upd_taken_i) begin
        vld[widx] <= 1'b1;
      end else if (tag[widx] == upd_pc_i[XLEN-1:IDX_W+2]) begin
        vld[widx] <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (upd_en_i && upd_taken_i) begin
      tag[widx] <= upd_pc_i[XLEN-1:IDX_W+2];
      tgt[widx] <= upd_target_i;
    end
  end

endmodule

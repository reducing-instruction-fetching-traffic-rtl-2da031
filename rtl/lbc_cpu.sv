// lbc_cpu: the loop buffer controller inside the CPU. It follows the
// L-Indicate lines from the AIM and drives the loop buffer and the
// instruction source mux:
//   IDLE   - take the instruction from the bus, buffer idle;
//   FILL   - take it from the bus and write it at the write pointer;
//   ACTIVE - read the buffer at the sequential read pointer;
//   INDEX  - read the buffer at the index carried in the low bits of the bus.
// Both pointers advance by the same rules as their copies in the AIM's
// controller: FILL writes at wp and moves wp and rp to wp+1, ACTIVE moves rp
// on by one, INDEX sets rp to index+1; in a pipeline-stall cycle rp stays on
// the slot just used, as the same instruction is sent again. In a cycle where the CPU itself sends
// an address (S-Indicate wrong prediction or compulsory) nothing is read,
// written or moved.
//
// The state register SR keeps the previous cycle's loop state (the
// L-Indicate) and the P-Taken bit (bpr), which lets the CPU tell, when it
// finds a miss prediction, whether the branch came from the buffer and how
// it had been predicted. from_buffer_o marks an instruction read from the
// buffer: the AIM did not decode it, so a wrong prediction on it must carry
// the corrected address. The pointer scheme is this design's choice; SR's
// contents follow the description.
module lbc_cpu
  import aim_pkg::*;
#(
  parameter int unsigned LB_SIZE = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  l_ind_e                     l_ind_i,
  input  logic [31:0]                bus_i,
  input  logic                       p_taken_i,
  input  s_ind_e                     s_ind_i,
  output logic                       lb_we_o,
  output logic [$clog2(LB_SIZE)-1:0] lb_waddr_o,
  output logic                       lb_re_o,
  output logic [$clog2(LB_SIZE)-1:0] lb_raddr_o,
  output logic                       from_buffer_o,
  output logic [2:0]                 sr_o           // {loop state, bpr}
);

  localparam int unsigned IW = $clog2(LB_SIZE);

  logic [IW-1:0] wp_q, rp_q;
  logic [2:0]    sr_q;
  logic          skip, stall;
  l_ind_e        l_eff;

  assign skip  = (s_ind_i == S_WRONG) || (s_ind_i == S_COMP);
  assign l_eff = skip ? L_IDLE : l_ind_i;
  assign stall = (s_ind_i == S_STALL);

  always_comb begin
    lb_we_o       = (l_eff == L_FILL);
    lb_waddr_o    = wp_q;
    lb_re_o       = (l_eff == L_ACTIVE) || (l_eff == L_INDEX);
    lb_raddr_o    = (l_eff == L_INDEX) ? bus_i[IW-1:0] : rp_q;
    from_buffer_o = lb_re_o;
  end

  assign sr_o = sr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q <= '0;
      rp_q <= '0;
      sr_q <= '0;
    end else begin
      sr_q <= {l_eff, p_taken_i};
      unique case (l_eff)
        L_FILL: begin
          wp_q <= wp_q + 1'b1;
          rp_q <= stall ? wp_q : wp_q + 1'b1;
        end
        L_ACTIVE: rp_q <= stall ? rp_q : rp_q + 1'b1;
        L_INDEX:  rp_q <= stall ? bus_i[IW-1:0] : bus_i[IW-1:0] + 1'b1;
        default: ;
      endcase
    end
  end

endmodule

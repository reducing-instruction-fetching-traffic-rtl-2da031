// aim_controller: generates the instruction address inside the AIM, so that
// the CPU does not have to send it.
//
// Each cycle the register pc_o holds the address of the instruction being
// delivered. The next address is picked by the PC mux from the S-Indicate
// lines of the CPU:
//   autonomous  - the AIM's own prediction: the return stack top for a
//                 decoded return (jr $31), else the BTB target on a BTB hit,
//                 else PC + 4 (PC incrementer);
//   stall       - the same PC again (last PC), the instruction is re-sent;
//   wrong pred. - the corrected successor of the branch delivered two
//                 accepted cycles earlier (history register PC-2): FallThru if
//                 it was predicted taken, Target otherwise, both captured by
//                 the partial decoder; when the decoder did not see that
//                 branch (it came from the loop buffer, memory disabled) the
//                 address the CPU puts on the address bus is used instead;
//   compulsory  - the address from the CPU (start-up, indirect jumps).
// The PC-1 / PC-2 history (PC, InBTB, PTaken plus the decoder's Target and
// FallThru) shifts on every cycle that is not a stall; a wrong prediction
// updates the BTB for the PC-2 branch. P-Taken is registered: it reports
// the prediction made for the instruction delivered in the previous cycle.
// Until the first compulsory cycle after reset, pc_valid_o is low.
//
// Loop events for the loop buffer controller are produced here as well: a
// taken backward transfer (predicted by the BTB or corrected after a
// not-taken prediction) reports the backward branch and its target; a
// backward branch found not taken after a taken prediction reports a loop
// exit. Resolving branches two accepted cycles after delivery (the third
// pipeline stage) follows the description; the one-bit BTB policy and the
// loop event rules are this design's choices.
module aim_controller
  import aim_pkg::*;
#(
  parameter logic [XLEN-1:0] RESET_PC = '0
) (
  input  logic            clk,
  input  logic            rst_n,
  // CPU side
  input  s_ind_e          s_ind_i,
  input  logic [XLEN-1:0] cpu_addr_i,
  input  logic            cpu_addr_valid_i,
  output logic            p_taken_o,
  // current fetch
  output logic [XLEN-1:0] pc_o,
  output logic            pc_valid_o,
  input  dec_t            dec_i,        // partial decoder result for pc_o
  // BTB
  output logic [XLEN-1:0] btb_pc_o,
  input  logic            btb_hit_i,
  input  logic [XLEN-1:0] btb_target_i,
  output logic            btb_upd_en_o,
  output logic [XLEN-1:0] btb_upd_pc_o,
  output logic            btb_upd_taken_o,
  output logic [XLEN-1:0] btb_upd_target_o,
  // return stack
  input  logic [XLEN-1:0] rs_top_i,
  input  logic            rs_empty_i,
  output logic            rs_push_o,
  output logic [XLEN-1:0] rs_push_addr_o,
  output logic            rs_pop_o,
  // loop events
  output logic            ev_bw_taken_o,
  output logic            ev_bw_exit_o,
  output logic [XLEN-1:0] ev_bb_o,
  output logic [XLEN-1:0] ev_tgt_o
);

  logic [XLEN-1:0] pc_q, next_pc, pred_pc, corr_pc;
  logic            pc_valid_q, ptaken_cur, ptaken_q;
  hist_t           h1_q, h2_q, h_cur;
  logic            use_rs, accept;

  assign pc_o       = pc_q;
  assign pc_valid_o = pc_valid_q;
  assign p_taken_o  = ptaken_q;
  assign btb_pc_o   = pc_q;
  assign accept     = pc_valid_q && (s_ind_i == S_AUTO);

  // prediction for the instruction delivered now
  always_comb begin
    use_rs     = dec_i.valid && dec_i.is_ret && !rs_empty_i;
    ptaken_cur = use_rs || btb_hit_i;
    if (use_rs)         pred_pc = rs_top_i;
    else if (btb_hit_i) pred_pc = btb_target_i;
    else                pred_pc = pc_q + 32'd4;

    h_cur          = '0;
    h_cur.pc       = pc_q;
    h_cur.in_btb   = btb_hit_i;
    h_cur.ptaken   = ptaken_cur;
    h_cur.pred     = pred_pc;
    h_cur.decoded  = dec_i.valid;
    h_cur.target   = dec_i.target;
    h_cur.fallthru = dec_i.fallthru;
  end

  // corrected successor of the PC-2 branch
  always_comb begin
    if (!h2_q.decoded)   corr_pc = cpu_addr_i;
    else if (h2_q.ptaken) corr_pc = h2_q.fallthru;
    else                  corr_pc = h2_q.target;
  end

  // PC mux
  always_comb begin
    unique case (s_ind_i)
      S_AUTO:  next_pc = pc_valid_q ? pred_pc : pc_q;
      S_STALL: next_pc = pc_q;
      S_WRONG: next_pc = corr_pc;
      S_COMP:  next_pc = cpu_addr_i;
      default: next_pc = pc_q;
    endcase
  end

  // return stack: only instructions the CPU accepts move it
  assign rs_push_o      = accept && dec_i.valid && dec_i.is_call;
  assign rs_push_addr_o = dec_i.fallthru;
  assign rs_pop_o       = accept && use_rs;

  // BTB update for a wrong prediction
  assign btb_upd_en_o     = pc_valid_q && (s_ind_i == S_WRONG);
  assign btb_upd_pc_o     = h2_q.pc;
  assign btb_upd_taken_o  = !h2_q.ptaken;
  assign btb_upd_target_o = corr_pc;

  // loop events
  always_comb begin
    ev_bw_taken_o = 1'b0;
    ev_bw_exit_o  = 1'b0;
    ev_bb_o       = pc_q;
    ev_tgt_o      = pred_pc;
    if (pc_valid_q && s_ind_i == S_WRONG) begin
      ev_bb_o = h2_q.pc;
      if (!h2_q.ptaken) begin
        ev_tgt_o      = corr_pc;
        ev_bw_taken_o = (corr_pc <= h2_q.pc);
      end else begin
        ev_tgt_o      = h2_q.pred;
        ev_bw_exit_o  = (h2_q.pred <= h2_q.pc);
      end
    end else if (accept && btb_hit_i && !use_rs) begin
      ev_bw_taken_o = (btb_target_i <= pc_q);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q       <= RESET_PC;
      pc_valid_q <= 1'b0;
      ptaken_q   <= 1'b0;
      h1_q       <= '0;
      h2_q       <= '0;
    end else begin
      pc_q     <= next_pc;
      ptaken_q <= pc_valid_q && ptaken_cur;
      if (s_ind_i == S_COMP) pc_valid_q <= 1'b1;
      if (s_ind_i != S_STALL) begin
        h1_q <= h_cur;
        h2_q <= h1_q;
      end
    end
  end

  // A wrong prediction for a branch the AIM never decoded needs the CPU's address.
  a_corr_addr : assert property (@(posedge clk) disable iff (!rst_n)
    (pc_valid_q && s_ind_i == S_WRONG && !h2_q.decoded) |-> cpu_addr_valid_i);
  // A compulsory cycle always carries an address.
  a_comp_addr : assert property (@(posedge clk) disable iff (!rst_n)
    (s_ind_i == S_COMP) |-> cpu_addr_valid_i);

endmodule

// lbc_aim: the loop buffer controller on the AIM side. The loop buffer sits
// in the CPU and has no tags; this controller alone knows what it holds, and
// each cycle tells the CPU over the L-Indicate lines where the current
// instruction comes from:
//   IDLE   - over the instruction content bus, not stored;
//   FILL   - over the content bus, and the CPU writes it into the buffer;
//   ACTIVE - from the buffer, at the CPU's next sequential read position;
//   INDEX  - from the buffer, at the index driven on the content bus
//            (INDEX_ACTIVE: used when the program flow jumps inside the
//            buffered code, e.g. the start of an inner loop held since an
//            earlier fill, so nested loops can be reused).
// While the CPU reads the buffer the instruction memory is disabled.
//
// How it decides. Loops are found from backward taken branches reported by
// the AIM controller and kept in the loop stack; the outermost tracked loop
// (stack bottom) is the region whose instructions get filled. A loop longer
// than the buffer empties the stack (break by a big loop); the fall-through
// of the top loop's backward branch pops it. A directory of LB_SIZE address
// tags mirrors the buffer, so a hit gives the slot exactly. The buffer is
// written circularly at a write pointer, and the controller mirrors the
// CPU's write pointer and sequential read pointer (both advance by the same
// rules on both sides), so ACTIVE is sent when the hit slot equals the
// mirrored read pointer and INDEX otherwise. In a pipeline-stall cycle the
// read pointer is left on the slot just used, so the repeated instruction of
// the next cycle is again a plain ACTIVE read. Cycles in which the CPU sends
// an address (wrong prediction, compulsory) carry no instruction and change
// nothing.
//
// Follows the description: the four states and their meaning, the loop
// stack with backward branch address, fill bit and length, the index sent
// over the content bus, memory disabled during reuse. This design's own
// choices: the tag directory inside the controller, circular allocation,
// the fill bit being set when a loop's backward branch is taken while the
// loop is on top of the stack, and INDEX as L-Indicate code 11.
module lbc_aim
  import aim_pkg::*;
#(
  parameter int unsigned LB_SIZE  = 64,
  parameter int unsigned LS_DEPTH = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [XLEN-1:0] pc_i,
  input  logic            pc_valid_i,
  input  s_ind_e          s_ind_i,
  input  logic            ev_bw_taken_i,
  input  logic            ev_bw_exit_i,
  input  logic [XLEN-1:0] ev_bb_i,
  input  logic [XLEN-1:0] ev_tgt_i,
  output l_ind_e          l_ind_o,       // L-Indicate for this cycle
  output logic            want_bus_o,    // AIM has something to send on the content bus
  output logic [$clog2(LB_SIZE)-1:0] lb_index_o, // slot for INDEX
  output logic            im_en_o,       // instruction memory enable
  output logic            region_o,      // current PC lies in the loop being buffered
  output logic [$clog2(LS_DEPTH+1)-1:0] ls_count_o,
  output logic            ls_top_fill_o
);

  localparam int unsigned IW = $clog2(LB_SIZE);
  localparam int unsigned TW = XLEN - 2;

  // directory and mirrored CPU pointers
  logic [TW-1:0]      tag [LB_SIZE];
  logic [LB_SIZE-1:0] vld;
  logic [IW-1:0]      wp_q, rp_q;

  logic               hit, abandon, stall;
  logic [IW-1:0]      hslot;
  l_ind_e             l_ind;

  // loop stack control
  ls_entry_t          ent, top, bottom;
  logic               ls_push, ls_pop, ls_clear, ls_restart, ls_set_fill, ls_empty, ls_full;
  logic [XLEN-1:0]    len;

  always_comb begin
    hit   = 1'b0;
    hslot = '0;
    for (int i = 0; i < LB_SIZE; i++) begin
      if (vld[i] && tag[i] == pc_i[XLEN-1:2]) begin
        hit   = 1'b1;
        hslot = IW'(i);
      end
    end
  end

  assign region_o = !ls_empty && (pc_i >= bottom.start) && (pc_i <= bottom.bb);
  assign abandon  = !pc_valid_i || s_ind_i == S_WRONG || s_ind_i == S_COMP;
  assign stall    = (s_ind_i == S_STALL);

  always_comb begin
    if (hit)           l_ind = (hslot == rp_q) ? L_ACTIVE : L_INDEX;
    else if (region_o) l_ind = L_FILL;
    else               l_ind = L_IDLE;
    want_bus_o = pc_valid_i && (l_ind != L_ACTIVE);
    l_ind_o    = abandon ? L_IDLE : l_ind;
    im_en_o    = !abandon && (l_ind == L_IDLE || l_ind == L_FILL);
  end
  assign lb_index_o = hslot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld  <= '0;
      wp_q <= '0;
      rp_q <= '0;
    end else begin
      unique case (l_ind_o)
        L_FILL: begin
          vld[wp_q] <= 1'b1;
          wp_q      <= wp_q + 1'b1;
          rp_q      <= stall ? wp_q : wp_q + 1'b1;
        end
        L_ACTIVE: rp_q <= stall ? rp_q : rp_q + 1'b1;
        L_INDEX:  rp_q <= stall ? hslot : hslot + 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (l_ind_o == L_FILL) tag[wp_q] <= pc_i[XLEN-1:2];
  end

  // loop stack management
  always_comb begin
    len   = ((ev_bb_i - ev_tgt_i) >> 2) + 32'd1;
    ent       = '0;
    ent.bb    = ev_bb_i;
    ent.start = ev_tgt_i;
    ent.len   = len[15:0];
    ls_push = 1'b0; ls_pop = 1'b0; ls_clear = 1'b0; ls_restart = 1'b0; ls_set_fill = 1'b0;
    if (ev_bw_taken_i) begin
      if (len > 32'(LB_SIZE))
        ls_clear = 1'b1;                                   // loop does not fit
      else if (ls_empty)
        ls_restart = 1'b1;                                 // new loop detected
      else if (ev_bb_i == top.bb && ev_tgt_i == top.start)
        ls_set_fill = 1'b1;                                // loop iterates
      else if (ev_tgt_i >= bottom.start && ev_bb_i <= bottom.bb)
        ls_push = 1'b1;                                    // inner loop
      else
        ls_restart = 1'b1;                                 // enclosing or unrelated loop
    end else if (ev_bw_exit_i) begin
      ls_pop = !ls_empty && (ev_bb_i == top.bb);           // loop exits
    end
  end

  loop_stack #(.DEPTH(LS_DEPTH)) u_ls (
    .clk, .rst_n,
    .push_i(ls_push), .pop_i(ls_pop), .clear_i(ls_clear), .restart_i(ls_restart),
    .set_fill_i(ls_set_fill), .entry_i(ent),
    .top_o(top), .bottom_o(bottom), .count_o(ls_count_o), .empty_o(ls_empty), .full_o(ls_full)
  );

  assign ls_top_fill_o = top.fill;

  // an address is filled only when absent, so at most one tag can match
  logic [IW:0] nhit;
  always_comb begin
    nhit = '0;
    for (int i = 0; i < LB_SIZE; i++) nhit += (IW+1)'(vld[i] && tag[i] == pc_i[XLEN-1:2]);
  end
  a_one_hit : assert property (@(posedge clk) disable iff (!rst_n) nhit <= 1);

endmodule

// aim: the autonomous instruction memory with the modified loop buffer
// controller. It combines the instruction memory, the BTB, the partial
// decoder and the return stack with the AIM controller (address generation)
// and the AIM-side loop buffer controller, so that the CPU neither sends
// instruction addresses (except when it must) nor receives instructions it
// already holds in its loop buffer.
//
// Per cycle it delivers, for the address in the controller's PC register:
// P-Taken (about the previous delivery), L-Indicate and the content bus
// word. The content bus carries the instruction in IDLE and FILL, the loop
// buffer index in its low bits in INDEX (upper bits kept from the previous
// bus value) and otherwise keeps its previous value, so that an unused bus
// makes no bit transitions. The memory is enabled only when the bus carries
// an instruction. A write port loads the program.
module aim
  import aim_pkg::*;
#(
  parameter int unsigned IM_WORDS    = 4096,
  parameter int unsigned BTB_ENTRIES = 64,
  parameter int unsigned RS_DEPTH    = 8,
  parameter int unsigned LB_SIZE     = 64,
  parameter int unsigned LS_DEPTH    = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  // control lines and address from the CPU
  input  s_ind_e          s_ind_i,
  input  logic [XLEN-1:0] cpu_addr_i,
  input  logic            cpu_addr_valid_i,
  // to the CPU
  output logic            p_taken_o,
  output l_ind_e          l_ind_o,
  output logic [31:0]     content_o,
  output logic            want_bus_o,
  // program load
  input  logic            im_we_i,
  input  logic [XLEN-1:0] im_waddr_i,
  input  logic [31:0]     im_wdata_i,
  // status
  output logic [XLEN-1:0] pc_o,
  output logic            pc_valid_o,
  output logic            im_en_o,
  output logic [$clog2(LS_DEPTH+1)-1:0] ls_count_o,
  output logic            ls_top_fill_o
);

  localparam int unsigned IW = $clog2(LB_SIZE);

  logic [XLEN-1:0] pc, btb_pc, btb_tgt, upd_pc, upd_tgt, rs_top, rs_paddr, ev_bb, ev_tgt;
  logic            pc_valid, btb_hit, upd_en, upd_taken, rs_empty, rs_push, rs_pop;
  logic            ev_taken, ev_exit, im_en;
  logic [31:0]     im_rdata, bus_q, bus_d;
  logic [IW-1:0]   lb_index;
  dec_t            dec;
  l_ind_e          l_ind;

  assign pc_o       = pc;
  assign pc_valid_o = pc_valid;
  assign im_en_o    = im_en;
  assign l_ind_o    = l_ind;

  instr_mem #(.WORDS(IM_WORDS)) u_im (
    .clk, .en_i(im_en), .addr_i(pc), .rdata_o(im_rdata),
    .we_i(im_we_i), .waddr_i(im_waddr_i), .wdata_i(im_wdata_i)
  );

  partial_decoder u_pd (.valid_i(im_en), .pc_i(pc), .instr_i(im_rdata), .dec_o(dec));

  btb #(.ENTRIES(BTB_ENTRIES)) u_btb (
    .clk, .rst_n, .pc_i(btb_pc), .hit_o(btb_hit), .target_o(btb_tgt),
    .upd_en_i(upd_en), .upd_pc_i(upd_pc), .upd_taken_i(upd_taken), .upd_target_i(upd_tgt)
  );

  return_stack #(.DEPTH(RS_DEPTH)) u_rs (
    .clk, .rst_n, .push_i(rs_push), .push_addr_i(rs_paddr), .pop_i(rs_pop),
    .top_o(rs_top), .empty_o(rs_empty)
  );

  aim_controller u_ctl (
    .clk, .rst_n, .s_ind_i, .cpu_addr_i, .cpu_addr_valid_i, .p_taken_o,
    .pc_o(pc), .pc_valid_o(pc_valid), .dec_i(dec),
    .btb_pc_o(btb_pc), .btb_hit_i(btb_hit), .btb_target_i(btb_tgt),
    .btb_upd_en_o(upd_en), .btb_upd_pc_o(upd_pc), .btb_upd_taken_o(upd_taken),
    .btb_upd_target_o(upd_tgt),
    .rs_top_i(rs_top), .rs_empty_i(rs_empty), .rs_push_o(rs_push),
    .rs_push_addr_o(rs_paddr), .rs_pop_o(rs_pop),
    .ev_bw_taken_o(ev_taken), .ev_bw_exit_o(ev_exit), .ev_bb_o(ev_bb), .ev_tgt_o(ev_tgt)
  );

  lbc_aim #(.LB_SIZE(LB_SIZE), .LS_DEPTH(LS_DEPTH)) u_lbc (
    .clk, .rst_n, .pc_i(pc), .pc_valid_i(pc_valid), .s_ind_i,
    .ev_bw_taken_i(ev_taken), .ev_bw_exit_i(ev_exit), .ev_bb_i(ev_bb), .ev_tgt_i(ev_tgt),
    .l_ind_o(l_ind), .want_bus_o, .lb_index_o(lb_index), .im_en_o(im_en),
    .region_o(), .ls_count_o, .ls_top_fill_o
  );

  // instruction content bus driver
  always_comb begin
    unique case (l_ind)
      L_IDLE:  bus_d = im_en ? im_rdata : bus_q;
      L_FILL:  bus_d = im_rdata;
      L_INDEX: bus_d = {bus_q[31:IW], lb_index};
      default: bus_d = bus_q;
    endcase
  end
  assign content_o = bus_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bus_q <= '0;
    else        bus_q <= bus_d;
  end

endmodule

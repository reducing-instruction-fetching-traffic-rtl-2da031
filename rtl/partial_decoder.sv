// partial_decoder: recognises the control-transfer instructions of MIPS I in
// the word just read from the instruction memory, so that the AIM can push
// and pop the return stack and keep both possible successors of a branch
// (Target and FallThru) without help from the CPU.
//
// Purely combinational. Conditional branches are beq/bne/blez/bgtz and the
// REGIMM group (bltz/bgez/bltzal/bgezal); their target is PC + 4 + offset*4
// (the traces this design is built for have delay slots removed, so the
// base is the following instruction). j/jal targets are the 26-bit index in
// the current 256 MB segment. jal and jalr count as calls, jr $31 as a
// return and other jr/jalr as indirect jumps the CPU must resolve. Treating
// bltzal/bgezal as plain conditional branches (no push) is this design's
// choice.
module partial_decoder
  import aim_pkg::*;
(
  input  logic            valid_i,  // instruction word is valid (memory was read)
  input  logic [XLEN-1:0] pc_i,     // its address
  input  logic [31:0]     instr_i,  // the instruction word
  output dec_t            dec_o
);

  logic [5:0]      op, fn;
  logic [4:0]      rs, rt;
  logic [XLEN-1:0] pc4, br_tgt, j_tgt;

  always_comb begin
    op     = instr_i[31:26];
    fn     = instr_i[5:0];
    rs     = instr_i[25:21];
    rt     = instr_i[20:16];
    pc4    = pc_i + 32'd4;
    br_tgt = pc4 + {{14{instr_i[15]}}, instr_i[15:0], 2'b00};
    j_tgt  = {pc4[31:28], instr_i[25:0], 2'b00};

    dec_o          = '0;
    dec_o.valid    = valid_i;
    dec_o.fallthru = pc4;
    if (valid_i) begin
      unique case (op)
        OP_BEQ, OP_BNE, OP_BLEZ, OP_BGTZ: begin
          dec_o.is_cond = 1'b1;
          dec_o.target  = br_tgt;
        end
        OP_REGIMM: begin
          if (rt == 5'd0 || rt == 5'd1 || rt == 5'd16 || rt == 5'd17) begin
            dec_o.is_cond = 1'b1;
            dec_o.target  = br_tgt;
          end
        end
        OP_J: begin
          dec_o.is_jump = 1'b1;
          dec_o.target  = j_tgt;
        end
        OP_JAL: begin
          dec_o.is_jump = 1'b1;
          dec_o.is_call = 1'b1;
          dec_o.target  = j_tgt;
        end
        OP_SPECIAL: begin
          if (fn == FN_JR) begin
            dec_o.is_ret = (rs == REG_RA);
            dec_o.is_ind = (rs != REG_RA);
          end else if (fn == FN_JALR) begin
            dec_o.is_ind  = 1'b1;
            dec_o.is_call = 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

endmodule

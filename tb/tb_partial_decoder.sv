// tb_partial_decoder: drives random MIPS I words of every class the decoder
// recognises (and others) and compares all outputs with targets and flags
// worked out here from the instruction format.
module tb_partial_decoder;
  import aim_pkg::*;

  logic            valid;
  logic [XLEN-1:0] pc;
  logic [31:0]     instr;
  dec_t            dec;
  int checks = 0, failures = 0;

  partial_decoder dut (.valid_i(valid), .pc_i(pc), .instr_i(instr), .dec_o(dec));

  task automatic check(bit c, bit j, bit call, bit ret, bit ind, logic [31:0] tgt, bit chk_tgt);
    #1;
    checks++;
    if (dec.valid !== valid || dec.is_cond !== c || dec.is_jump !== j || dec.is_call !== call ||
        dec.is_ret !== ret || dec.is_ind !== ind || dec.fallthru !== pc + 4 ||
        (chk_tgt && dec.target !== tgt)) begin
      failures++;
      $display("FAIL instr %h pc %h: got c%b j%b call%b ret%b ind%b tgt %h", instr, pc,
               dec.is_cond, dec.is_jump, dec.is_call, dec.is_ret, dec.is_ind, dec.target);
    end
  endtask

  initial begin
    for (int n = 0; n < 400; n++) begin
      int sel;
      logic [15:0] off;
      logic [25:0] idx;
      valid = 1'b1;
      pc    = {$urandom} & 32'hffff_fffc;
      off   = 16'($urandom);
      idx   = 26'($urandom);
      sel   = n % 10;
      case (sel)
        0, 1, 2, 3: begin   // beq bne blez bgtz
          instr = {6'(4 + sel), 5'($urandom), 5'($urandom), off};
          check(1, 0, 0, 0, 0, pc + 4 + {{14{off[15]}}, off, 2'b00}, 1);
        end
        4: begin             // regimm bltz/bgez/bltzal/bgezal
          logic [4:0] rt;
          rt = (n % 4 == 0) ? 5'd0 : (n % 4 == 1) ? 5'd1 : (n % 4 == 2) ? 5'd16 : 5'd17;
          instr = {6'd1, 5'($urandom), rt, off};
          check(1, 0, 0, 0, 0, pc + 4 + {{14{off[15]}}, off, 2'b00}, 1);
        end
        5: begin instr = {6'd2, idx}; check(0, 1, 0, 0, 0, {pc[31:28] + 4'(pc[27:0] + 28'd4 < pc[27:0]), idx, 2'b00}, 1); end
        6: begin instr = {6'd3, idx}; check(0, 1, 1, 0, 0, {pc[31:28] + 4'(pc[27:0] + 28'd4 < pc[27:0]), idx, 2'b00}, 1); end
        7: begin instr = {6'd0, 5'd31, 15'd0, 6'd8}; check(0, 0, 0, 1, 0, '0, 0); end
        8: begin instr = {6'd0, 5'($urandom % 31), 15'd0, 6'd8}; check(0, 0, 0, 0, 1, '0, 0); end
        default: begin
          if (n % 20 == 9) begin instr = {6'd0, 5'd4, 5'd0, 5'd31, 5'd0, 6'd9}; check(0, 0, 1, 0, 1, '0, 0); end
          else begin instr = {6'd9, 26'($urandom)}; check(0, 0, 0, 0, 0, '0, 0); end
        end
      endcase
    end
    // nothing is decoded without a valid word
    valid = 1'b0; instr = {6'd3, 26'd5};
    check(0, 0, 0, 0, 0, '0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

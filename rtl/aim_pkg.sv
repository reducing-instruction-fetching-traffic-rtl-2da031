// aim_pkg: encodings and types shared by the autonomous instruction memory
// (AIM), its loop buffer controller and the CPU-side fetch unit.
//
// The two control-line encodings follow the design description exactly:
// S-Indicate (CPU -> AIM) 00 autonomous, 01 pipeline stall, 10 wrong
// prediction, 11 compulsory; L-Indicate (AIM -> CPU) 00 IDLE, 01 FILL,
// 10 ACTIVE. The fourth L-Indicate code, 11, carries INDEX_ACTIVE (read the
// loop buffer at the index sent on the instruction content bus); that code
// is this design's choice for the extra state. The MIPS I opcodes are the
// subset the partial decoder recognises.
package aim_pkg;

  localparam int unsigned XLEN = 32;

  typedef enum logic [1:0] {
    S_AUTO  = 2'b00,  // AIM generates the next address itself
    S_STALL = 2'b01,  // CPU stalls, AIM re-sends the same instruction
    S_WRONG = 2'b10,  // branch miss prediction detected by the CPU
    S_COMP  = 2'b11   // compulsory: CPU supplies the next address
  } s_ind_e;

  typedef enum logic [1:0] {
    L_IDLE   = 2'b00, // instruction comes over the content bus
    L_FILL   = 2'b01, // instruction comes over the bus and is written into the loop buffer
    L_ACTIVE = 2'b10, // instruction is read from the loop buffer, sequentially
    L_INDEX  = 2'b11  // instruction is read from the loop buffer at the index on the bus
  } l_ind_e;

  // MIPS I primary opcodes and SPECIAL function codes used by the decoder
  localparam logic [5:0] OP_SPECIAL = 6'd0;
  localparam logic [5:0] OP_REGIMM  = 6'd1;
  localparam logic [5:0] OP_J       = 6'd2;
  localparam logic [5:0] OP_JAL     = 6'd3;
  localparam logic [5:0] OP_BEQ     = 6'd4;
  localparam logic [5:0] OP_BNE     = 6'd5;
  localparam logic [5:0] OP_BLEZ    = 6'd6;
  localparam logic [5:0] OP_BGTZ    = 6'd7;
  localparam logic [5:0] FN_JR      = 6'd8;
  localparam logic [5:0] FN_JALR    = 6'd9;
  localparam logic [4:0] REG_RA     = 5'd31;

  // Result of the partial decoder for one fetched instruction
  typedef struct packed {
    logic            valid;     // an instruction was decoded this cycle
    logic            is_cond;   // conditional PC-relative branch
    logic            is_jump;   // j / jal (fixed target)
    logic            is_call;   // jal / jalr: return address is pushed
    logic            is_ret;    // jr $31: return address is popped
    logic            is_ind;    // jr rs (rs != 31) / jalr: target only known by the CPU
    logic [XLEN-1:0] target;    // taken target of a conditional branch or jump
    logic [XLEN-1:0] fallthru;  // PC + 4
  } dec_t;

  // One entry of the PC-1 / PC-2 history kept for branch resolution
  typedef struct packed {
    logic [XLEN-1:0] pc;        // address of the delivered instruction
    logic            in_btb;    // BTB hit when it was fetched
    logic            ptaken;    // predicted taken
    logic [XLEN-1:0] pred;      // predicted next address
    logic            decoded;   // partial decoder saw it (fetched from memory)
    logic [XLEN-1:0] target;    // decoder's Target register
    logic [XLEN-1:0] fallthru;  // decoder's FallThru register
  } hist_t;

  // One loop stack entry
  typedef struct packed {
    logic [XLEN-1:0] bb;        // address of the backward branch closing the loop
    logic [XLEN-1:0] start;     // its target, the first instruction of the loop
    logic            fill;      // loop body seen complete in the loop buffer
    logic [15:0]     len;       // loop length in instructions
  } ls_entry_t;

endpackage

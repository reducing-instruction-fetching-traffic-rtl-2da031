// cpu_model: behavioural model of the fetch-side behaviour of a MIPS I
// five-stage CPU core working with the autonomous instruction memory. It is
// not synthesizable and not part of the design; testbenches use it as the
// core.
//
// It builds a small program with known control flow (loop trip counts,
// forward branch patterns, calls, returns and an indirect jump), so that it
// knows the true address of every instruction on the correct path. Every
// cycle it samples the instruction handed over by the fetch unit, P-Taken
// and from_buffer, and drives S-Indicate for the next cycle:
//   - the first cycle after reset is compulsory with the start address;
//   - a branch is resolved two accepted cycles after it was fetched: if its
//     prediction (P-Taken, seen one cycle after delivery) was wrong it sends
//     "wrong prediction" (with the corrected address on the address bus
//     only if the branch came from the loop buffer), or "compulsory" with
//     the address for an indirect jump;
//   - otherwise it stalls at random (STALL_PCT percent) or runs autonomous.
// With RAND_TRIPS the trip counts of the nested loops are drawn at random
// (2 to 6) instead of the fixed ones given in build(). With SEND_ON_WRONG
// the corrected address goes out on every wrong prediction, as a core would
// do that does not rely on the AIM's partial decoder.
// Each instruction on the correct path is compared with the program word at
// its true address. Counters and a done flag are exposed to the testbench.
module cpu_model
  import aim_pkg::*;
#(
  parameter int unsigned STALL_PCT = 12,
  parameter int unsigned PROG_WORDS = 256,
  parameter bit          RAND_TRIPS = 1'b0,  // draw loop trip counts (2..6) at random
  parameter bit          SEND_ON_WRONG = 1'b0 // always drive the corrected address on a wrong prediction
) (
  input  logic            clk,
  input  logic            rst_n,
  output s_ind_e          s_ind_o,
  output logic [XLEN-1:0] cpu_addr_o,
  output logic            cpu_addr_valid_o,
  input  logic [31:0]     instr_i,
  input  logic            from_buffer_i,
  input  logic            p_taken_i
);

  localparam int unsigned PW = $clog2(PROG_WORDS);

  // word index of a byte address within the program
  function automatic logic [PW-1:0] widx(logic [XLEN-1:0] a);
    return a[PW+1:2];
  endfunction

  typedef enum logic [2:0] {K_ALU, K_COND, K_JUMP, K_CALL, K_RET, K_IND} kind_e;

  // program: word, kind, trip count of backward branches, indirect targets
  logic [31:0]     prog   [PROG_WORDS];
  kind_e           kind   [PROG_WORDS];
  int unsigned     trip   [PROG_WORDS];
  int unsigned     cnt    [PROG_WORDS];
  logic [XLEN-1:0] indtgt [PROG_WORDS];
  logic [XLEN-1:0] end_addr;

  // return addresses of the model's own call stack
  logic [XLEN-1:0] cstack [$];

  typedef struct {
    bit              valid;
    bit              onpath;
    bit              need_pt;
    bit              mispred;
    bit              from_buf;
    logic [XLEN-1:0] addr;
    logic [XLEN-1:0] next;
    kind_e           k;
    longint          cyc;
  } pent_t;

  pent_t p1, p2;

  function automatic pent_t pent_null();
    pent_t e;
    e.valid = 0; e.onpath = 0; e.need_pt = 0; e.mispred = 0; e.from_buf = 0;
    e.addr = '0; e.next = '0; e.k = K_ALU; e.cyc = 0;
    return e;
  endfunction
  bit              expect_onpath, started, done;
  logic [XLEN-1:0] epc;
  longint          cyc;
  longint          last_stall_cyc, br_cyc;
  bit              pen_pending;

  int checks, failures;
  int n_onpath, n_wrong, n_comp, n_stall, n_from_buf, n_penalty_checked, n_ret_rs;

  // ---- program builder ----
  int unsigned wp;
  function automatic logic [31:0] alu(int unsigned a);
    return {6'd9, 5'd1, 5'd2, 16'(a * 7 + 3)};            // addiu r2, r1, imm
  endfunction
  function automatic void emit(logic [31:0] w, kind_e k);
    prog[wp] = w; kind[wp] = k; trip[wp] = 0; cnt[wp] = 0; wp++;
  endfunction
  function automatic void emit_alu(int unsigned n);
    for (int unsigned i = 0; i < n; i++) emit(alu(wp), K_ALU);
  endfunction
  // conditional branch at wp to word address t; trip>0: backward loop branch
  function automatic void emit_br(int unsigned t, int unsigned tr, bit bne);
    int off;
    off = int'(t) - int'(wp) - 1;
    prog[wp] = {bne ? 6'd5 : 6'd4, 5'd3, 5'd0, 16'(off)};
    kind[wp] = K_COND; trip[wp] = tr; cnt[wp] = 0; wp++;
  endfunction
  function automatic void emit_j(int unsigned t, bit link);
    emit({link ? 6'd3 : 6'd2, 26'(t)}, link ? K_CALL : K_JUMP);
  endfunction

  function automatic int unsigned tr(int unsigned n);
    return RAND_TRIPS ? 2 + ($urandom % 5) : n;
  endfunction

  task automatic build();
    int unsigned z0;
    for (int i = 0; i < PROG_WORDS; i++) begin
      prog[i] = alu(i); kind[i] = K_ALU; trip[i] = 0; cnt[i] = 0; indtgt[i] = '0;
    end
    wp = 0;
    emit_alu(2);                 // 0..1
    // outer loop Y (2..13) holding inner loop X (4..9) and a call
    emit_alu(2);                 // 2,3   Y up
    emit_alu(1);                 // 4     X start
    emit_br(8, 0, 1'b0);         // 5     forward branch inside X
    emit_alu(3);                 // 6,7,8
    emit_br(4, tr(5), 1'b1);         // 9     X backward branch, 5 iterations
    emit_alu(1);                 // 10    Y down
    emit_j(150, 1'b1);           // 11    call F
    emit_alu(1);                 // 12
    emit_br(2, tr(4), 1'b1);         // 13    Y backward branch, 4 iterations
    emit_alu(1);                 // 14
    emit({6'd0, 5'd5, 15'd0, 6'd8}, K_IND); // 15 jr r5 -> 20
    indtgt[15] = 32'd20 << 2;
    wp = 20;
    // loop Z longer than the loop buffer (20..89)
    z0 = wp;
    emit_alu(69);
    emit_br(z0, 3, 1'b1);        // 89
    emit_j(100, 1'b0);           // 90
    wp = 100;
    // three-deep nest A (100..106) > B (101..105) > C (102..104)
    emit_alu(1);                 // 100
    emit_alu(1);                 // 101
    emit_alu(2);                 // 102,103
    emit_br(102, tr(3), 1'b1);       // 104  C
    emit_br(101, tr(3), 1'b1);       // 105  B
    emit_br(100, tr(3), 1'b1);       // 106  A
    emit_alu(1);                 // 107
    emit_j(200, 1'b0);           // 108
    // procedure F (150..154) with a small loop
    wp = 150;
    emit_alu(1);                 // 150
    emit_alu(1);                 // 151
    emit_br(151, tr(2), 1'b1);       // 152
    emit_alu(1);                 // 153
    emit({6'd0, 5'd31, 15'd0, 6'd8}, K_RET); // 154 jr $31
    end_addr = 32'd200 << 2;
  endtask

  // true successor of an on-path instruction (updates loop counters)
  function automatic logic [XLEN-1:0] step(logic [XLEN-1:0] a);
    logic [PW-1:0] w;
    logic [31:0] ins;
    logic [XLEN-1:0] pc4, tgt;
    w   = widx(a);
    ins = prog[w];
    pc4 = a + 4;
    tgt = pc4 + {{14{ins[15]}}, ins[15:0], 2'b00};
    unique case (kind[w])
      K_COND: begin
        cnt[w]++;
        if (trip[w] != 0) begin
          if (cnt[w] < trip[w]) return tgt;
          cnt[w] = 0; return pc4;
        end
        return (cnt[w] % 3 == 0) ? tgt : pc4;
      end
      K_JUMP: return {pc4[31:28], ins[25:0], 2'b00};
      K_CALL: begin cstack.push_back(pc4); return {pc4[31:28], ins[25:0], 2'b00}; end
      K_RET:  return cstack.pop_back();
      K_IND:  return indtgt[w];
      default: return pc4;
    endcase
  endfunction

  function automatic bit mispredicted(pent_t e);
    logic [31:0] ins;
    logic [XLEN-1:0] pc4, tgt, pred;
    ins = prog[widx(e.addr)];
    pc4 = e.addr + 4;
    unique case (e.k)
      K_COND: tgt = pc4 + {{14{ins[15]}}, ins[15:0], 2'b00};
      K_JUMP, K_CALL: tgt = {pc4[31:28], ins[25:0], 2'b00};
      default: tgt = e.next;
    endcase
    if (e.k == K_IND) return 1'b1;
    pred = p_taken_i ? tgt : pc4;
    return pred != e.next;
  endfunction

  initial begin
    build();
    checks = 0; failures = 0;
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_ind_o          <= S_COMP;
      cpu_addr_o       <= '0;
      cpu_addr_valid_o <= 1'b1;
      p1 <= pent_null(); p2 <= pent_null();
      expect_onpath <= 1'b1; epc <= '0; started <= 1'b0; done <= 1'b0; cyc <= 0;
      last_stall_cyc <= -1; br_cyc <= 0; pen_pending <= 1'b0;
      n_onpath <= 0; n_wrong <= 0; n_comp <= 0; n_stall <= 0; n_from_buf <= 0;
      n_penalty_checked <= 0; n_ret_rs <= 0;
    end else if (!done) begin : step_blk
      pent_t np1, np2, e;
      bit exp_on;
      logic [XLEN-1:0] nepc;
      s_ind_e ns;
      np1 = p1; np2 = p2; exp_on = expect_onpath; nepc = epc;
      cyc <= cyc + 1;

      // 1. P-Taken of this cycle belongs to the previous delivery
      if (np1.valid && np1.need_pt) begin
        np1.need_pt = 0;
        if (np1.onpath) begin
          np1.mispred = mispredicted(np1);
          if (np1.k == K_RET && p_taken_i) n_ret_rs <= n_ret_rs + 1;
          if (np1.mispred) exp_on = 0;
        end
      end

      // 2. what happened in this cycle
      unique case (s_ind_o)
        S_WRONG, S_COMP: begin
          np1 = pent_null(); np2 = pent_null();
          exp_on = 1; nepc = cpu_addr_o;   // redirect target kept in the address register
          started <= 1'b1;
        end
        S_STALL: last_stall_cyc <= cyc;
        default: begin
          e = pent_null();
          e.valid = 1; e.need_pt = 1; e.onpath = exp_on; e.from_buf = from_buffer_i; e.cyc = cyc;
          if (from_buffer_i) n_from_buf <= n_from_buf + 1;
          if (exp_on) begin
            checks++;
            if (instr_i !== prog[widx(nepc)]) begin
              failures++;
              $display("FAIL cycle %0d: at %h got %h expected %h", cyc, nepc, instr_i, prog[widx(nepc)]);
            end
            n_onpath <= n_onpath + 1;
            e.addr = nepc; e.k = kind[widx(nepc)];
            if (nepc == end_addr) done <= 1'b1;
            e.next = step(nepc);
            nepc = e.next;
            // miss penalty: with no stall in between, the correct successor of a
            // mispredicted branch is accepted 3 cycles after the branch (2 lost cycles)
            if (pen_pending) begin
              pen_pending <= 1'b0;
              if (last_stall_cyc < br_cyc) begin
                checks++;
                n_penalty_checked <= n_penalty_checked + 1;
                if (cyc - br_cyc != 3) begin
                  failures++;
                  $display("FAIL cycle %0d: miss penalty %0d cycles, expected 2", cyc, cyc - br_cyc - 1);
                end
              end
            end
          end
          np2 = np1; np1 = e;
        end
      endcase

      // 3. S-Indicate for the next cycle
      cpu_addr_valid_o <= 1'b0;
      if (np2.valid && np2.onpath && np2.mispred) begin
        ns = (np2.k == K_IND || np2.k == K_RET) ? S_COMP : S_WRONG;
        cpu_addr_o <= np2.next;
        cpu_addr_valid_o <= (ns == S_COMP) || np2.from_buf || SEND_ON_WRONG;
        nepc = np2.next;
        np2.mispred = 0;
        br_cyc <= np2.cyc;
        pen_pending <= 1'b1;
        if (ns == S_COMP) n_comp <= n_comp + 1; else n_wrong <= n_wrong + 1;
      end else if (started && ($urandom % 100) < STALL_PCT) begin
        ns = S_STALL;
        n_stall <= n_stall + 1;
      end else begin
        ns = S_AUTO;
      end
      s_ind_o <= ns;
      p1 <= np1; p2 <= np2; expect_onpath <= exp_on; epc <= nepc;
    end
  end

endmodule

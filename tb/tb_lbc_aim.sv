// tb_lbc_aim: drives the AIM-side loop buffer controller with a wandering
// program counter (mostly sequential, with jumps) and random loop events,
// and compares L-Indicate, the index, the memory enable and the loop stack
// depth with a model that keeps its own address-to-slot directory, the
// mirrored CPU pointers and a queue for the loop stack.
module tb_lbc_aim;
  import aim_pkg::*;
  localparam int unsigned N = 16, D = 4;
  localparam logic [XLEN-1:0] BASE = 32'h400;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [XLEN-1:0] pc, npc, bb, tgt;
  logic pcv, etk, eex, want, imen, region, topfill;
  s_ind_e s;
  l_ind_e l;
  logic [3:0] idx;
  logic [2:0] lsc;
  int checks = 0, failures = 0;
  int nl [4];

  lbc_aim #(.LB_SIZE(N), .LS_DEPTH(D)) dut (.clk, .rst_n, .pc_i(pc), .pc_valid_i(pcv), .s_ind_i(s),
    .ev_bw_taken_i(etk), .ev_bw_exit_i(eex), .ev_bb_i(bb), .ev_tgt_i(tgt), .l_ind_o(l),
    .want_bus_o(want), .lb_index_o(idx), .im_en_o(imen), .region_o(region), .ls_count_o(lsc),
    .ls_top_fill_o(topfill));

  logic [XLEN-1:0] tags [N];
  bit vld [N];
  int wp, rp;
  ls_entry_t q [$];

  initial begin
    pc = BASE; npc = BASE; pcv = 0; s = S_AUTO; etk = 0; eex = 0; bb = 0; tgt = 0;
    for (int i = 0; i < N; i++) vld[i] = 0;
    wp = 0; rp = 0;
    for (int i = 0; i < 4; i++) nl[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int r, hs;
      bit hit, reg_in, ab;
      l_ind_e el;
      @(negedge clk);
      pc = npc;
      pcv = n > 2;
      r = $urandom % 16;
      s = (r == 0) ? S_WRONG : (r == 1) ? S_COMP : (r == 2) ? S_STALL : S_AUTO;
      // loop events: a backward branch inside the walk area, or an exit of the top loop
      etk = 0; eex = 0;
      r = $urandom % 10;
      if (r < 2) begin
        etk = 1;
        bb  = BASE + (($urandom % 40) << 2);
        tgt = bb - (($urandom % ((r == 0) ? 24 : 10)) << 2);
        if (q.size() != 0 && ($urandom % 2 == 1)) begin bb = q[$].bb; tgt = q[$].start; end
      end else if (r == 2 && q.size() != 0) begin
        eex = 1; bb = q[$].bb; tgt = q[$].start;
      end
      // expected
      hit = 0; hs = 0;
      for (int i = 0; i < N; i++) if (vld[i] && tags[i] == pc) begin hit = 1; hs = i; end
      reg_in = q.size() != 0 && pc >= q[0].start && pc <= q[0].bb;
      ab = !pcv || s == S_WRONG || s == S_COMP;
      el = hit ? ((hs == rp) ? L_ACTIVE : L_INDEX) : reg_in ? L_FILL : L_IDLE;
      #1;
      checks++;
      if (l !== (ab ? L_IDLE : el) || (hit && idx !== 4'(hs)) || region !== reg_in ||
          imen !== (!ab && (el == L_IDLE || el == L_FILL)) || int'(lsc) != q.size() ||
          want !== (pcv && el != L_ACTIVE)) begin
        failures++;
        $display("FAIL step %0d pc %h: l %0d exp %0d idx %0d/%0d lsc %0d/%0d", n, pc, l,
                 ab ? L_IDLE : el, idx, hs, lsc, q.size());
      end
      if (!ab) nl[int'(el)]++;
      @(posedge clk);
      if (!ab) case (el)
        L_FILL:   begin tags[wp] = pc; vld[wp] = 1; rp = (s == S_STALL) ? wp : (wp + 1) % N; wp = (wp + 1) % N; end
        L_ACTIVE: rp = (s == S_STALL) ? rp : (rp + 1) % N;
        L_INDEX:  rp = (s == S_STALL) ? hs : (hs + 1) % N;
        default: ;
      endcase
      if (etk) begin
        ls_entry_t e;
        int len;
        len = ((bb - tgt) >> 2) + 1;
        e = '0; e.bb = bb; e.start = tgt; e.len = 16'(len);
        if (len > N) q.delete();
        else if (q.size() == 0) q.push_back(e);
        else if (bb == q[$].bb && tgt == q[$].start) q[$].fill = 1;
        else if (tgt >= q[0].start && bb <= q[0].bb) begin if (q.size() < D) q.push_back(e); end
        else begin q.delete(); q.push_back(e); end
      end else if (eex) begin
        if (q.size() != 0 && bb == q[$].bb) void'(q.pop_back());
      end
      // program counter walk
      r = $urandom % 10;
      npc = pc;
      if (s != S_STALL) npc = (r < 7) ? pc + 4 : BASE + (($urandom % 40) << 2);
      if (npc > BASE + 200) npc = BASE;
    end
    checks++;
    if (nl[0] == 0 || nl[1] == 0 || nl[2] == 0 || nl[3] == 0) begin
      failures++;
      $display("FAIL: not every L-Indicate state seen %0d %0d %0d %0d", nl[0], nl[1], nl[2], nl[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

// tb_aim_controller: random S-Indicate, decoder, BTB and return-stack inputs
// against a cycle model of the address selection rules: next address per
// S-Indicate, P-Taken one cycle late, PC-1/PC-2 history frozen by stalls,
// correction from the decoder's Target/FallThru or from the CPU, BTB update,
// return-stack push/pop and the loop events.
module tb_aim_controller;
  import aim_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  s_ind_e s;
  logic [XLEN-1:0] caddr, pc, bpc, btgt, upc, utgt, rtop, rpa, ebb, etgt;
  logic cav, pt, pv, bhit, uen, utk, rempty, rpush, rpop, etk, eex;
  dec_t dec;
  int checks = 0, failures = 0;
  int n_ev_taken = 0, n_ev_exit = 0, n_corr_dec = 0, n_corr_cpu = 0;

  aim_controller dut (.clk, .rst_n, .s_ind_i(s), .cpu_addr_i(caddr), .cpu_addr_valid_i(cav),
    .p_taken_o(pt), .pc_o(pc), .pc_valid_o(pv), .dec_i(dec), .btb_pc_o(bpc), .btb_hit_i(bhit),
    .btb_target_i(btgt), .btb_upd_en_o(uen), .btb_upd_pc_o(upc), .btb_upd_taken_o(utk),
    .btb_upd_target_o(utgt), .rs_top_i(rtop), .rs_empty_i(rempty), .rs_push_o(rpush),
    .rs_push_addr_o(rpa), .rs_pop_o(rpop), .ev_bw_taken_o(etk), .ev_bw_exit_o(eex),
    .ev_bb_o(ebb), .ev_tgt_o(etgt));

  // model
  logic [XLEN-1:0] m_pc;
  bit m_pv, m_pt;
  hist_t m_h1, m_h2;

  function automatic logic [XLEN-1:0] rnd_addr();
    return 32'h1000 + (($urandom % 256) << 2);
  endfunction

  initial begin
    s = S_AUTO; caddr = 0; cav = 1; dec = '0; bhit = 0; btgt = 0; rtop = 0; rempty = 1;
    m_pc = '0; m_pv = 0; m_pt = 0; m_h1 = '0; m_h2 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int r;
      bit use_rs, ptk, e_push, e_pop, e_uen, e_tk, e_ex;
      logic [XLEN-1:0] pred, corr, nxt, e_bb;
      hist_t cur;
      @(negedge clk);
      r = $urandom % 20;
      s = (!m_pv || r == 0) ? S_COMP : (r < 4) ? S_STALL : (r < 7) ? S_WRONG : S_AUTO;
      caddr = rnd_addr();
      dec = '0;
      dec.valid = 1'($urandom % 2);
      if (dec.valid) begin
        int k;
        k = $urandom % 4;
        dec.is_cond = (k == 0); dec.is_call = (k == 1); dec.is_jump = (k == 1); dec.is_ret = (k == 2);
        dec.target = rnd_addr();
      end
      dec.fallthru = m_pc + 4;
      bhit = $urandom % 3 == 0; btgt = rnd_addr();
      rtop = rnd_addr(); rempty = $urandom % 4 == 0;
      // expected
      use_rs = dec.valid && dec.is_ret && !rempty;
      ptk    = use_rs || bhit;
      pred   = use_rs ? rtop : bhit ? btgt : m_pc + 4;
      corr   = !m_h2.decoded ? caddr : m_h2.ptaken ? m_h2.fallthru : m_h2.target;
      case (s)
        S_AUTO:  nxt = m_pv ? pred : m_pc;
        S_STALL: nxt = m_pc;
        S_WRONG: nxt = corr;
        default: nxt = caddr;
      endcase
      e_push = m_pv && s == S_AUTO && dec.valid && dec.is_call;
      e_pop  = m_pv && s == S_AUTO && use_rs;
      e_uen  = m_pv && s == S_WRONG;
      e_tk = 0; e_ex = 0; e_bb = m_pc;
      if (m_pv && s == S_WRONG) begin
        e_bb = m_h2.pc;
        if (!m_h2.ptaken) e_tk = corr <= m_h2.pc; else e_ex = m_h2.pred <= m_h2.pc;
      end else if (m_pv && s == S_AUTO && bhit && !use_rs) e_tk = btgt <= m_pc;
      #1;
      checks++;
      if (pc !== m_pc || pv !== m_pv || pt !== m_pt || bpc !== m_pc ||
          rpush !== e_push || (e_push && rpa !== m_pc + 4) || rpop !== e_pop ||
          uen !== e_uen || (e_uen && (upc !== m_h2.pc || utk !== !m_h2.ptaken || utgt !== corr)) ||
          etk !== e_tk || eex !== e_ex || ((e_tk || e_ex) && ebb !== e_bb)) begin
        failures++;
        $display("FAIL step %0d s=%0d: pc %h/%h pv %b/%b pt %b/%b push %b/%b pop %b/%b upd %b/%b ev %b%b/%b%b",
                 n, s, pc, m_pc, pv, m_pv, pt, m_pt, rpush, e_push, rpop, e_pop, uen, e_uen, etk, eex, e_tk, e_ex);
      end
      if (e_tk) n_ev_taken++;
      if (e_ex) n_ev_exit++;
      if (e_uen && m_h2.decoded) n_corr_dec++;
      if (e_uen && !m_h2.decoded) n_corr_cpu++;
      cur = '0;
      cur.pc = m_pc; cur.in_btb = bhit; cur.ptaken = ptk; cur.pred = pred; cur.decoded = dec.valid;
      cur.target = dec.target; cur.fallthru = dec.fallthru;
      @(posedge clk);
      m_pt = m_pv && ptk;
      if (s == S_COMP) m_pv = 1;
      if (s != S_STALL) begin m_h2 = m_h1; m_h1 = cur; end
      m_pc = nxt;
    end
    checks++;
    if (n_ev_taken == 0 || n_ev_exit == 0 || n_corr_dec == 0 || n_corr_cpu == 0) failures++;
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

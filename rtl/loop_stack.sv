// loop_stack: the stack of nested loops kept by the loop buffer controller.
// Because the backward branches of a loop nest are used first-in last-out,
// a loop is pushed when its backward branch is first taken and popped when
// that branch falls through. Each entry holds the backward branch address,
// the loop's first address, the fill bit and the loop length.
//
// One operation per cycle, applied at the clock edge:
//   push     - add an entry on top (ignored when full)
//   pop      - remove the top entry
//   clear    - empty the stack
//   restart  - empty the stack and push the given entry (new outermost loop)
//   set_fill - set the fill bit of the top entry
// top_o / bottom_o / count_o are combinational from the registers; bottom is
// the outermost tracked loop. The depth is this design's choice.
module loop_stack
  import aim_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            push_i,
  input  logic            pop_i,
  input  logic            clear_i,
  input  logic            restart_i,
  input  logic            set_fill_i,
  input  ls_entry_t       entry_i,
  output ls_entry_t       top_o,
  output ls_entry_t       bottom_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o,
  output logic            empty_o,
  output logic            full_o
);

  localparam int unsigned CW = $clog2(DEPTH+1);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  ls_entry_t     stk [DEPTH];
  logic [CW-1:0] cnt, cnt_m1;
  logic [PW-1:0] top_slot, push_slot;

  assign cnt_m1    = cnt - 1'b1;
  assign top_slot  = cnt_m1[PW-1:0];
  assign push_slot = cnt[PW-1:0];

  assign count_o  = cnt;
  assign empty_o  = (cnt == '0);
  assign full_o   = (cnt == CW'(DEPTH));
  assign top_o    = empty_o ? '0 : stk[top_slot];
  assign bottom_o = empty_o ? '0 : stk[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < DEPTH; i++) stk[i] <= '0;
    end else if (clear_i) begin
      cnt <= '0;
    end else if (restart_i) begin
      stk[0] <= entry_i;
      cnt    <= CW'(1);
    end else if (push_i) begin
      if (!full_o) begin
        stk[push_slot] <= entry_i;
        cnt      <= cnt + 1'b1;
      end
    end else if (pop_i) begin
      if (!empty_o) cnt <= cnt - 1'b1;
    end else if (set_fill_i) begin
      if (!empty_o) stk[top_slot].fill <= 1'b1;
    end
  end

endmodule

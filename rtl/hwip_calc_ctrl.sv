// hwip_calc_ctrl: control unit of the calculate() hardware IP.
//
// It holds the state variable pc, which plays the part of a program counter
// for the datapath. Two processes make it up: a combinational one that names
// the next state nx_pc from the current state and the branch conditions, and
// a clocked one that takes nx_pc only when the memory does not stall
// (pc <= mem_stall ? pc : nx_pc), so a state with memory accesses lasts until
// they are done. Compares are kept out of the datapath: each branch state has
// a successor bit computed from datapath registers.
//   successor[2]  = (bound <= 0)      state 2  -> 11 (skip loop) or 3
//   successor[10] = (count  > 0)      state 10 -> 6 (loop again) or 11
// The IP leaves the start state when enable is high, raises finish in state
// 14 and then holds in state 15. It returns to the start state when enable is
// removed, so it can be called again.
//
// Inputs: enable from the caller, mem_stall from the memory, reg12 (bound,
// counted down by the datapath). Outputs: pc to the datapath, finish.
// The two-process form, the stall rule, state 2 branch, finish in state 14 and
// hold in state 15 follow the document; leaving the hold state when enable
// drops is this design's choice.
module hwip_calc_ctrl
  import gcc2v_pkg::*;
  import hwip_calc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  enable,
  input  logic  mem_stall,
  input  word_t reg12,
  output pc_t   pc,
  output logic  finish
);

  logic [15:0] successor;
  pc_t         nx_pc;

  always_comb begin
    successor     = '0;
    successor[2]  = ($signed(reg12) <= 0);
    successor[10] = ($signed(reg12) > 0);
  end

  // next state, chosen statically per state
  always_comb begin
    case (pc)
      S_START:    nx_pc = enable ? S_PUSH : S_START;
      S_FRAME:    nx_pc = successor[2] ? S_EPI : S_LDPTR0;
      S_LDPTR2:   nx_pc = S_LOOP_LD;
      S_LOOP_END: nx_pc = successor[10] ? S_LOOP_LD : S_EPI;
      S_HOLD:     nx_pc = enable ? S_HOLD : S_START;
      default:    nx_pc = pc + 4'd1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pc <= S_START;
    else        pc <= mem_stall ? pc : nx_pc;

  assign finish = (pc == S_FINISH);

endmodule

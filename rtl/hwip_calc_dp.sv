// hwip_calc_dp: datapath of the calculate() hardware IP (two memory ports).
//
// One clocked process holds the registers the function uses (named after the
// machine registers they were allocated to) and the registered memory-port
// outputs. In each state it performs the statements scheduled for that
// state; all are non-blocking, so a register can be read and updated in the
// same state (state 6 sends reg9 as an address and advances reg9 by 4). Read
// and write strobes default to 0 in every state, so each access lasts one
// state. Nothing changes while mem_stall is high.
//
// Calling convention: on enable in the start state it takes the link register
// r0, bound in r12, the coefficient pointer in r13 and the stack pointer.
// Entry pushes r0 at SP-4 and lowers SP by FRAME_BYTES; the third argument,
// scale, is read from SP+20. The Out and history pointers are read from their
// fixed global addresses. The loop reads history[i] on port 0 and
// coefficient[i] on port 1, multiplies, shifts right arithmetically by scale
// and stores to Out[i] on port 1. Exit raises SP and pops r0.
// Outputs: memory ports, reg12 to the control unit, and the restored link
// register and stack pointer for the caller.
// Per loop iteration: 5 states plus one read stall cycle = 6 cycles.
// The register assignment, pointer addresses, SP+20 offset and state 6
// statements follow the document; the loop body arithmetic and frame size are
// this design's reading of the example.
module hwip_calc_dp
  import gcc2v_pkg::*;
  import hwip_calc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  pc_t                  pc,
  input  logic                 enable,
  input  logic                 mem_stall,
  input  word_t                arg_link,    // r0
  input  word_t                arg_bound,   // r12
  input  word_t                arg_coef,    // r13
  input  word_t                arg_sp,
  output word_t                reg12,
  output word_t                ret_link,
  output word_t                ret_sp,
  output mem_req_t [1:0]       mreq,
  output word_t    [1:0]       mwdata,
  input  word_t    [1:0]       mrdata
);

  word_t reg0, reg2, reg3, reg9, reg11, reg13, reg23, sp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {reg0, reg2, reg3, reg9, reg11, reg12, reg13, reg23, sp} <= '0;
      mreq   <= '0;
      mwdata <= '0;
    end else if (!mem_stall) begin
      mreq[0].read  <= 1'b0;
      mreq[0].write <= 1'b0;
      mreq[1].read  <= 1'b0;
      mreq[1].write <= 1'b0;
      case (pc)
        S_START: if (enable) begin
          reg0  <= arg_link;
          reg12 <= arg_bound;
          reg13 <= arg_coef;
          sp    <= arg_sp;
        end
        S_PUSH: begin
          mreq[0].addr  <= sp - 32'd4;
          mreq[0].write <= 1'b1;
          mreq[0].be    <= '1;
        end
        S_FRAME: begin
          mwdata[0] <= reg0;
          sp        <= sp - FRAME_BYTES;
        end
        S_LDPTR0: begin
          mreq[0].addr  <= OUT_PTR_ADDR;
          mreq[0].read  <= 1'b1;
          mreq[0].be    <= '1;
          mreq[1].addr  <= sp + SCALE_OFFSET;
          mreq[1].read  <= 1'b1;
          mreq[1].be    <= '1;
        end
        S_LDPTR1: begin
          reg11         <= mrdata[0];
          reg23         <= mrdata[1];
          mreq[0].addr  <= HIST_PTR_ADDR;
          mreq[0].read  <= 1'b1;
          mreq[0].be    <= '1;
        end
        S_LDPTR2: reg9 <= mrdata[0];
        S_LOOP_LD: begin
          mreq[0].addr  <= reg9;
          mreq[0].read  <= 1'b1;
          mreq[0].be    <= '1;
          reg9          <= reg9 + 32'd4;
          mreq[1].addr  <= reg13;
          mreq[1].read  <= 1'b1;
          mreq[1].be    <= '1;
          reg13         <= reg13 + 32'd4;
        end
        S_LOOP_GET: begin
          reg2 <= mrdata[0];
          reg3 <= mrdata[1];
        end
        S_LOOP_MUL: reg2 <= reg2 * reg3;
        S_LOOP_SH: begin
          reg2          <= word_t'($signed(reg2) >>> reg23[4:0]);
          mreq[1].addr  <= reg11;
          mreq[1].write <= 1'b1;
          mreq[1].be    <= '1;
          reg11         <= reg11 + 32'd4;
          reg12         <= reg12 - 32'd1;
        end
        S_LOOP_END: mwdata[1] <= reg2;
        S_EPI: begin
          mreq[0].addr  <= sp + LINK_OFFSET;
          mreq[0].read  <= 1'b1;
          mreq[0].be    <= '1;
          sp            <= sp + FRAME_BYTES;
        end
        S_POP: reg0 <= mrdata[0];
        default: ;
      endcase
    end
  end

  assign ret_link = reg0;
  assign ret_sp   = sp;

endmodule

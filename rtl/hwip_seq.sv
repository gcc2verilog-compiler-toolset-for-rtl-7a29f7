// hwip_seq: hardware IP for a five-instruction straight-line block, generated
// for either a one-port or a dual-port memory (MEM_PORTS = 1 or 2).
//
//   1. rsh   r7, #2          r7 = r7 >> 2 (logical)
//   2. st.w  (r8+4), r7      mem[r8+4] = r7
//   3. ld.w  r4, (r0)        r4 = mem[r0]
//   4. add3  r0, r8, r0      r0 = r8 + r0
//   5. mult  r7, r3, r3      r7 = r3 * r3 (low 32 bits)
//
// It shows how the hardware scheduler splits each memory instruction into an
// address/control part and a data part and packs independent work into one
// FSM state (one clock cycle). The store's address is issued in the same state
// as the shift that produces the stored value; its data follows one state
// later. With one port the store and the load are serialised (three body
// states); with two ports both go out in the first state (two body states).
//
// Structure: state register pc with the next state chosen statically, held
// while mem_stall is high; every datapath register is also frozen while
// mem_stall is high. State 0 is the start state: on enable the argument
// registers are copied from regs_in. After the body the finish state raises
// finish for one cycle, then the IP parks in a hold state until enable is
// removed, and returns to the start state.
//
// Interface: regs_in/regs_out are the host's register window (r0..r15);
// regs_out carries r0, r4 and r7 as computed and the other registers as
// received. Memory ports follow gcc2v_pkg (read data in the request cycle,
// write data one cycle after it).
// Timing: enable to finish takes 1 + body states + memory stall cycles; with
// the one-cycle read stall of multiport_mem that is 5 cycles for one port
// and 4 for two ports.
// The instruction sequence and both schedules follow the document; the start,
// finish and hold states and the register window are this design's framing.
module hwip_seq
  import gcc2v_pkg::*;
#(
  parameter int unsigned MEM_PORTS = 2   // 1 or 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          enable,
  output logic                          finish,
  input  word_t    [NREGS-1:0]          regs_in,
  output word_t    [NREGS-1:0]          regs_out,
  output mem_req_t [MEM_PORTS-1:0]      mreq,
  output word_t    [MEM_PORTS-1:0]      mwdata,
  input  word_t    [MEM_PORTS-1:0]      mrdata,
  input  logic                          mem_stall
);

  localparam int unsigned P1 = (MEM_PORTS > 1) ? 1 : 0;   // port for the load
  localparam logic [2:0] S_START = 3'd0;
  localparam logic [2:0] S_FIN   = (MEM_PORTS > 1) ? 3'd3 : 3'd4;
  localparam logic [2:0] S_HOLD  = S_FIN + 3'd1;

  logic [2:0] pc, nx_pc;
  word_t reg0, reg3, reg4, reg7, reg8;

  // ---------------- control unit ----------------
  always_comb begin
    nx_pc = pc;
    if (pc == S_START)      nx_pc = enable ? 3'd1 : S_START;
    else if (pc == S_HOLD)  nx_pc = enable ? S_HOLD : S_START;
    else                    nx_pc = pc + 3'd1;   // body and finish run in sequence
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pc <= S_START;
    else        pc <= mem_stall ? pc : nx_pc;

  assign finish = (pc == S_FIN);

  // ---------------- datapath ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {reg0, reg3, reg4, reg7, reg8} <= '0;
      mreq   <= '0;
      mwdata <= '0;
    end else if (!mem_stall) begin
      for (int p = 0; p < MEM_PORTS; p++) begin
        mreq[p].read  <= 1'b0;
        mreq[p].write <= 1'b0;
      end
      if (pc == S_START && enable) begin
        reg0 <= regs_in[0];
        reg3 <= regs_in[3];
        reg4 <= regs_in[4];
        reg7 <= regs_in[7];
        reg8 <= regs_in[8];
      end else if (MEM_PORTS == 1) begin
        case (pc)
          3'd1: begin
            reg7           <= reg7 >> 2;
            mreq[0].addr   <= reg8 + 32'd4;
            mreq[0].write  <= 1'b1;
            mreq[0].be     <= '1;
          end
          3'd2: begin
            mwdata[0]      <= reg7;
            mreq[0].addr   <= reg0;
            mreq[0].read   <= 1'b1;
            mreq[0].be     <= '1;
            reg0           <= reg8 + reg0;
            reg7           <= reg3 * reg3;
          end
          3'd3: reg4 <= mrdata[0];
          default: ;
        endcase
      end else begin
        case (pc)
          3'd1: begin
            reg7           <= reg7 >> 2;
            mreq[0].addr   <= reg8 + 32'd4;
            mreq[0].write  <= 1'b1;
            mreq[0].be     <= '1;
            mreq[P1].addr  <= reg0;
            mreq[P1].read  <= 1'b1;
            mreq[P1].be    <= '1;
            reg0           <= reg8 + reg0;
          end
          3'd2: begin
            mwdata[0]      <= reg7;
            reg7           <= reg3 * reg3;
            reg4           <= mrdata[P1];
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    regs_out    = regs_in;
    regs_out[0] = reg0;
    regs_out[4] = reg4;
    regs_out[7] = reg7;
  end

  initial assert (MEM_PORTS == 1 || MEM_PORTS == 2)
    else $error("hwip_seq: MEM_PORTS must be 1 or 2");

endmodule

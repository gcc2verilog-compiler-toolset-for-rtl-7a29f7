// hwip_calc_pkg: state numbering and constants of the calculate() hardware
// IP, shared by its control unit (hwip_calc_ctrl) and datapath (hwip_calc_dp).
//
// The C function is
//     void calculate(int bound, int *coefficient, int scale)
//     { for (i = 0; i < bound; i++) Out[i] = (history[i] * coefficient[i]) >> scale; }
// where Out and history are global pointers whose targets software allocates
// at run time. The FSM states below are grouped by basic block (BB2..BB5);
// state 0 is the inserted start state, 14 the finish state and 15 the hold
// state entered after finishing.
package hwip_calc_pkg;

  import gcc2v_pkg::*;

  typedef logic [3:0] pc_t;

  localparam pc_t S_START    = 4'd0;   // wait for enable, take arguments
  localparam pc_t S_PUSH     = 4'd1;   // BB2: push link register (address)
  localparam pc_t S_FRAME    = 4'd2;   // BB2: push data, SP -= FRAME, branch bound <= 0
  localparam pc_t S_LDPTR0   = 4'd3;   // BB3: load Out pointer and scale
  localparam pc_t S_LDPTR1   = 4'd4;   // BB3: take Out and scale, load history pointer
  localparam pc_t S_LDPTR2   = 4'd5;   // BB3: take history pointer
  localparam pc_t S_LOOP_LD  = 4'd6;   // BB4: load history[i], coefficient[i]
  localparam pc_t S_LOOP_GET = 4'd7;   // BB4: take loaded elements
  localparam pc_t S_LOOP_MUL = 4'd8;   // BB4: multiply
  localparam pc_t S_LOOP_SH  = 4'd9;   // BB4: shift, issue store to Out[i], count down
  localparam pc_t S_LOOP_END = 4'd10;  // BB4: store data, branch back while count > 0
  localparam pc_t S_EPI      = 4'd11;  // BB5: SP += FRAME, pop link register (address)
  localparam pc_t S_POP      = 4'd12;  // BB5: take link register
  localparam pc_t S_RET      = 4'd13;  // BB5: return jump
  localparam pc_t S_FINISH   = 4'd14;  // finish = 1
  localparam pc_t S_HOLD     = 4'd15;  // stalled after finishing

  // Addresses of the global pointer variables, resolved from the software
  // symbol table at compile time.
  localparam word_t OUT_PTR_ADDR  = 32'h0000_0BB8;
  localparam word_t HIST_PTR_ADDR = 32'h0000_0BB4;

  // Stack frame of the function and position of the third argument.
  localparam word_t FRAME_BYTES = 32'd16;   // SP adjustment in state 2
  localparam word_t LINK_OFFSET = 32'd12;   // saved r0 at SP+12 (caller SP - 4)
  localparam word_t SCALE_OFFSET = 32'd20;  // scale at SP+20 (caller SP + 4)

endpackage

// tb_hwip_calc_dp: self-checking test of the calculate() datapath on its own.
//
// The testbench plays the control unit: it steps the state number through
// the function's schedule (taking the branches from the datapath's reg12)
// and holds it while mem_stall is high. The memory is behavioural with a
// two-cycle read stall, longer than the system memory's, so every register
// and port output must stay frozen across several stalled cycles. Results
// are checked against (history[i]*coefficient[i]) >>> scale computed here,
// along with the saved and restored link register and the stack pointer.
// In state 6 the addresses sent on both ports are checked against the
// element addresses of history[i] and coefficient[i].
module tb_hwip_calc_dp;
  import gcc2v_pkg::*;
  import hwip_calc_pkg::*;

  localparam int DEPTH = 1024;
  localparam word_t HIST = 32'h480, COEF = 32'h300, OUT = 32'h900;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pc_t pc;
  logic enable, mem_stall;
  word_t arg_link, arg_bound, arg_coef, arg_sp, reg12, ret_link, ret_sp;
  mem_req_t [1:0] mreq;
  word_t [1:0] mwdata, mrdata;

  hwip_calc_dp dut (.*);
  tb_mem #(.NPORTS(2), .DEPTH(DEPTH), .READ_STALL(2)) mem (.clk, .rst_n, .req(mreq),
    .wdata(mwdata), .rdata(mrdata), .mem_stall);

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  // stand-in control unit
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pc <= S_START;
    else if (!mem_stall)
      case (pc)
        S_START:    pc <= enable ? S_PUSH : S_START;
        S_FRAME:    pc <= ($signed(reg12) <= 0) ? S_EPI : S_LDPTR0;
        S_LOOP_END: pc <= ($signed(reg12) > 0) ? S_LOOP_LD : S_EPI;
        S_HOLD:     pc <= enable ? S_HOLD : S_START;
        default:    pc <= pc + 4'd1;
      endcase

  int bound, scale, cyc, elem;
  word_t h, c, e;

  // address checks in the cycle the loop loads are visible
  always @(negedge clk)
    if (rst_n && pc == S_LOOP_GET && mem_stall && mreq[0].read) begin
      check("history[i] address", mreq[0].addr, HIST + word_t'(4 * elem));
      check("coefficient[i] address", mreq[1].addr, COEF + word_t'(4 * elem));
    end
  always @(posedge clk)
    if (rst_n && pc == S_LOOP_GET && !mem_stall) elem <= elem + 1;

  initial begin
    enable = 0; arg_link = 0; arg_bound = 0; arg_coef = 0; arg_sp = 0; elem = 0;
    for (int i = 0; i < DEPTH; i++) mem.mem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 40; n++) begin
      bound = (n == 0) ? 0 : $urandom_range(1, 24);
      scale = $urandom_range(0, 31);
      arg_link = $urandom; arg_bound = word_t'(bound); arg_coef = COEF;
      arg_sp = 32'hE00;
      elem = 0;
      mem.mem[32'hBB8 >> 2] = OUT;
      mem.mem[32'hBB4 >> 2] = HIST;
      mem.mem[(arg_sp + 4) >> 2] = word_t'(scale);
      for (int i = 0; i < 30; i++) begin
        mem.mem[(HIST >> 2) + i] = $urandom;
        mem.mem[(COEF >> 2) + i] = $urandom;
        mem.mem[(OUT >> 2) + i]  = '0;
      end
      @(negedge clk);
      enable = 1'b1;
      cyc = 0;
      do begin @(negedge clk); cyc++; end while (pc != S_FINISH && cyc < 2000);
      enable = 1'b0;
      for (int i = 0; i < 30; i++) begin
        h = mem.mem[(HIST >> 2) + i];
        c = mem.mem[(COEF >> 2) + i];
        e = (i < bound) ? word_t'($signed(h * c) >>> scale) : '0;
        check($sformatf("call %0d Out[%0d]", n, i), mem.mem[(OUT >> 2) + i], e);
      end
      check("saved link", mem.mem[(arg_sp - 4) >> 2], arg_link);
      check("ret_link", ret_link, arg_link);
      check("ret_sp", ret_sp, arg_sp);
      // 2 stall cycles per read state: 15 + 7*bound, or 8 without the loop
      checks++;
      if (cyc != ((bound > 0) ? 15 + 7 * bound : 8)) begin
        failures++; $display("FAIL cycles %0d for bound %0d", cyc, bound);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

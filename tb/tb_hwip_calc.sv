// tb_hwip_calc: self-checking test of the calculate() hardware IP.
//
// The IP runs on a two-port behavioural memory with a one-cycle read stall.
// For each call the test places the Out and history pointers at their global
// addresses, fills history[] and coefficient[] with random signed words,
// puts scale on the caller's stack (caller SP + 4) and calls with random
// link register and bound values, including bound = 0 and negative bound.
// It checks every Out[i] against (history[i]*coefficient[i]) >>> scale
// computed here, that nothing beyond Out[bound-1] is written, the link
// register saved on the stack and returned, the restored stack pointer, and
// the cycle count: 12 + 6*bound cycles from the enable cycle to finish, or 7
// when the loop is skipped.
module tb_hwip_calc;
  import gcc2v_pkg::*;

  localparam int DEPTH = 1024;          // 4 KiB: covers 0xBB4/0xBB8
  localparam word_t HIST = 32'h400, COEF = 32'h600, OUT = 32'h800;

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

  logic enable, finish, mem_stall;
  word_t arg_link, arg_bound, arg_coef, arg_sp, ret_link, ret_sp;
  mem_req_t [1:0] mreq;
  word_t [1:0] mwdata, mrdata;

  hwip_calc dut (.*);
  tb_mem #(.NPORTS(2), .DEPTH(DEPTH), .READ_STALL(1)) mem (.clk, .rst_n, .req(mreq),
    .wdata(mwdata), .rdata(mrdata), .mem_stall);

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  int bound, scale, cyc, expc;
  word_t h, c, e;

  initial begin
    enable = 0; arg_link = 0; arg_bound = 0; arg_coef = 0; arg_sp = 0;
    for (int i = 0; i < DEPTH; i++) mem.mem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 60; n++) begin
      bound = (n == 0) ? 0 : (n == 1) ? -3 : (n == 2) ? 1 : $urandom_range(1, 32);
      scale = $urandom_range(0, 31);
      arg_link  = $urandom;
      arg_bound = word_t'(bound);
      arg_coef  = COEF;
      arg_sp    = 32'hF00 - word_t'($urandom_range(0, 16) * 8);
      mem.mem[32'hBB8 >> 2] = OUT;
      mem.mem[32'hBB4 >> 2] = HIST;
      mem.mem[(arg_sp + 4) >> 2] = word_t'(scale);
      for (int i = 0; i < 40; i++) begin
        mem.mem[(HIST >> 2) + i] = $urandom;
        mem.mem[(COEF >> 2) + i] = $urandom;
        mem.mem[(OUT >> 2) + i]  = 32'h5A5A_0000 + i;
      end
      @(negedge clk);
      enable = 1'b1;
      cyc = 0;
      do begin @(negedge clk); cyc++; end while (!finish && cyc < 1000);
      enable = 1'b0;
      expc = (bound > 0) ? 12 + 6 * bound : 7;
      checks++;
      if (cyc != expc) begin failures++; $display("FAIL cycles %0d expected %0d (bound %0d)", cyc, expc, bound); end
      for (int i = 0; i < 40; i++) begin
        h = mem.mem[(HIST >> 2) + i];
        c = mem.mem[(COEF >> 2) + i];
        e = (i < bound) ? word_t'($signed(h * c) >>> scale) : 32'h5A5A_0000 + i;
        check($sformatf("call %0d Out[%0d]", n, i), mem.mem[(OUT >> 2) + i], e);
      end
      check("saved link", mem.mem[(arg_sp - 4) >> 2], arg_link);
      check("ret_link", ret_link, arg_link);
      check("ret_sp", ret_sp, arg_sp);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_hwip_calc_ctrl: self-checking test of the calculate() control unit.
//
// enable, mem_stall and the loop counter reg12 are driven at random. Each
// cycle the state the unit moves to is compared with a reference taken from
// the state graph of the function: 0 waits for enable, 2 branches to 11 when
// bound <= 0 (else 3), 5 goes to 6, 10 branches back to 6 while the count is
// above 0 (else 11), 14 raises finish, 15 holds while enable stays high; any
// other state goes to the next one; no state changes while mem_stall is high.
// Every branch direction and the stall hold are counted and must each happen.
module tb_hwip_calc_ctrl;
  import gcc2v_pkg::*;
  import hwip_calc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic enable, mem_stall, finish;
  word_t reg12;
  pc_t pc;

  hwip_calc_ctrl dut (.*);

  function automatic int ref_next(int s, logic en, logic st, int cnt);
    if (st) return s;
    case (s)
      0:  return en ? 1 : 0;
      2:  return (cnt <= 0) ? 11 : 3;
      5:  return 6;
      10: return (cnt > 0) ? 6 : 11;
      15: return en ? 15 : 0;
      default: return s + 1;
    endcase
  endfunction

  int expect_pc, n_skip = 0, n_enter = 0, n_back = 0, n_exit = 0, n_hold = 0, n_fin = 0;

  initial begin
    enable = 0; mem_stall = 0; reg12 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    expect_pc = 0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      enable    = ($urandom_range(0, 9) != 0);
      mem_stall = ($urandom_range(0, 3) == 0);
      reg12     = word_t'($urandom_range(0, 6) - 2);
      #1;
      checks++;
      if (finish !== (pc == 4'd14)) begin failures++; $display("FAIL finish in state %0d", pc); end
      expect_pc = ref_next(pc, enable, mem_stall, $signed(reg12));
      if (!mem_stall) begin
        if (pc == 2 && expect_pc == 11) n_skip++;
        if (pc == 2 && expect_pc == 3)  n_enter++;
        if (pc == 10 && expect_pc == 6) n_back++;
        if (pc == 10 && expect_pc == 11) n_exit++;
        if (pc == 14) n_fin++;
      end else if (pc != 0) n_hold++;
      @(posedge clk); #1;
      checks++;
      if (pc != pc_t'(expect_pc)) begin
        failures++;
        $display("FAIL next state %0d expected %0d", pc, expect_pc);
      end
    end
    checks++;
    if (n_skip == 0 || n_enter == 0 || n_back == 0 || n_exit == 0 || n_hold == 0 || n_fin == 0) begin
      failures++;
      $display("FAIL coverage skip=%0d enter=%0d back=%0d exit=%0d hold=%0d fin=%0d",
               n_skip, n_enter, n_back, n_exit, n_hold, n_fin);
    end
    $display("branches: skip=%0d enter=%0d back=%0d exit=%0d stall-holds=%0d finishes=%0d",
             n_skip, n_enter, n_back, n_exit, n_hold, n_fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gcc2v_system: end-to-end test of the system at its default parameters
// (two memory ports, 4096-word memory).
//
// The testbench plays the host processor. Through its memory ports it lays
// out a program's data (global pointers Out and history, the arrays, the
// stack argument), calls the calculate() IP by HWID, reads the results back
// through the ports and compares them with values computed here; it calls
// the five-instruction IP by HWID and checks the returned register window
// and the stored word; it calls an unknown HWID and expects call_err. Calls
// come back to back and with bound = 0, and the host also uses both ports in
// one state. Each mechanism is counted and must occur at least once: dispatch
// to each IP, the error response, memory stall cycles while an IP runs, the
// loop's back branch and its skip branch, the stack push and pop of the link
// register, and a host access on port 1.
module tb_gcc2v_system;
  import gcc2v_pkg::*;

  localparam word_t HIST = 32'h1000, COEF = 32'h1400, OUT = 32'h1800, SP0 = 32'h3F00;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic call_valid, busy, done, call_err, mem_stall;
  hwid_t call_hwid;
  word_t [NREGS-1:0] call_regs, ret_regs;
  word_t call_sp, ret_sp;
  mem_req_t [1:0] host_req;
  word_t [1:0] host_wdata, host_rdata;

  gcc2v_system dut (.*);

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  // ---- host memory accesses, one FSM-like state per call ----
  mem_req_t [1:0] pend = '0;
  word_t    [1:0] pend_d = '0;
  int n_host_p1 = 0;

  task automatic host_state(input mem_req_t [1:0] r, input word_t [1:0] d, output word_t [1:0] got);
    @(negedge clk);
    host_req   = r;
    host_wdata = pend_d;
    #1;
    while (mem_stall) begin @(negedge clk); #1; end
    got = host_rdata;
    if (r[1].read || r[1].write) n_host_p1++;
    pend   = r;
    pend_d = d;
  endtask

  task automatic host_idle();
    word_t [1:0] g;
    host_state('0, '0, g);
  endtask

  task automatic host_write2(word_t a0, word_t d0, word_t a1, word_t d1);
    word_t [1:0] g;
    mem_req_t [1:0] r;
    word_t [1:0] d;
    r[0] = '{addr: a0, read: 1'b0, write: 1'b1, be: 4'hF};
    r[1] = '{addr: a1, read: 1'b0, write: 1'b1, be: 4'hF};
    d[0] = d0; d[1] = d1;
    host_state(r, d, g);
  endtask

  task automatic host_read2(word_t a0, word_t a1, output word_t v0, output word_t v1);
    word_t [1:0] g;
    mem_req_t [1:0] r;
    r[0] = '{addr: a0, read: 1'b1, write: 1'b0, be: 4'hF};
    r[1] = '{addr: a1, read: 1'b1, write: 1'b0, be: 4'hF};
    host_state(r, '0, g);
    v0 = g[0]; v1 = g[1];
  endtask

  // ---- calls ----
  int n_calc = 0, n_seq = 0, n_err = 0, n_stall_ip = 0, n_back = 0, n_skip = 0;
  int n_push = 0, n_pop = 0;

  always @(posedge clk) if (rst_n && busy && mem_stall) n_stall_ip++;

  task automatic do_call(hwid_t id, word_t [NREGS-1:0] regs, word_t sp, output int cycles);
    host_idle();                 // write data of the last host write goes out
    @(negedge clk);
    call_valid = 1'b1; call_hwid = id; call_regs = regs; call_sp = sp;
    @(negedge clk);
    call_valid = 1'b0;
    cycles = 1;
    while (!done && cycles < 5000) begin @(negedge clk); cycles++; end
  endtask

  word_t [NREGS-1:0] regs;
  word_t hv [64], cv [64], v0, v1, e, link;
  int bound, scale, cyc;

  initial begin
    call_valid = 0; call_hwid = '0; call_regs = '0; call_sp = '0;
    host_req = '0; host_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int n = 0; n < 12; n++) begin
      // ---------- calculate() through HWID 1 ----------
      bound = (n == 1) ? 0 : $urandom_range(1, 64);
      scale = $urandom_range(0, 20);
      host_write2(32'hBB8, OUT, 32'hBB4, HIST);
      host_write2(SP0 + 4, word_t'(scale), SP0 - 4, 32'hCAFE_F00D ^ word_t'(n));
      for (int i = 0; i < 64; i++) begin
        hv[i] = $urandom; cv[i] = $urandom;
        host_write2(HIST + 4 * i, hv[i], COEF + 4 * i, cv[i]);
        host_write2(OUT + 4 * i, 32'h0, 32'h3000 + 4 * i, 32'h0);
      end
      for (int r = 0; r < NREGS; r++) regs[r] = $urandom;
      link = regs[0];
      regs[12] = word_t'(bound);
      regs[13] = COEF;
      do_call(HWID_CALC, regs, SP0, cyc);
      n_calc++;
      check("calc done", 32'(done), 1);
      check("calc no error", 32'(call_err), 0);
      check("calc ret r0", ret_regs[0], link);
      check("calc ret r12 untouched", ret_regs[12], word_t'(bound));
      check("calc ret sp", ret_sp, SP0);
      // call_valid cycle + 12 + 6*bound to finish + 1 to done
      checks++;
      if (cyc != ((bound > 0) ? 14 + 6 * bound : 9)) begin
        failures++; $display("FAIL calc latency %0d for bound %0d", cyc, bound);
      end
      // the latency shows which way the two branches went
      if (bound == 0 && cyc == 9) n_skip++;
      if (bound > 1 && cyc == 14 + 6 * bound) n_back += bound - 1;
      for (int i = 0; i < 64; i += 2) begin
        host_read2(OUT + 4 * i, OUT + 4 * (i + 1), v0, v1);
        e = (i < bound) ? word_t'($signed(hv[i] * cv[i]) >>> scale) : 0;
        check($sformatf("Out[%0d]", i), v0, e);
        e = (i + 1 < bound) ? word_t'($signed(hv[i+1] * cv[i+1]) >>> scale) : 0;
        check($sformatf("Out[%0d]", i + 1), v1, e);
      end
      host_read2(SP0 - 4, SP0 + 4, v0, v1);
      check("link saved on stack", v0, link);
      if (v0 == link) n_push++;
      if (ret_regs[0] == link && v0 == link) n_pop++;
      check("stack argument intact", v1, word_t'(scale));

      // ---------- five-instruction IP through HWID 2 ----------
      for (int r = 0; r < NREGS; r++) regs[r] = $urandom;
      regs[8] = 32'h2000 + word_t'($urandom_range(0, 63) * 4);
      regs[0] = 32'h2200 + word_t'($urandom_range(0, 63) * 4);
      host_write2(regs[0], 32'h1234_0000 + n, 32'h3FFC, 0);
      do_call(HWID_SEQ, regs, SP0, cyc);
      n_seq++;
      check("seq r0", ret_regs[0], regs[8] + regs[0]);
      check("seq r4", ret_regs[4], 32'h1234_0000 + n);
      check("seq r7", ret_regs[7], regs[3] * regs[3]);
      check("seq r9 untouched", ret_regs[9], regs[9]);
      check("seq sp", ret_sp, SP0);
      checks++;
      if (cyc != 6) begin failures++; $display("FAIL seq latency %0d", cyc); end
      host_read2(regs[8] + 4, regs[8] + 4, v0, v1);
      check("seq stored word", v0, regs[7] >> 2);

      // ---------- unknown HWID ----------
      if (n % 4 == 3) begin
        do_call(hwid_t'(4'd9), regs, SP0, cyc);
        check("unknown HWID error", 32'(call_err), 1);
        check("unknown HWID regs back", ret_regs[5], regs[5]);
        if (call_err) n_err++;
      end
    end

    checks++;
    if (n_calc == 0 || n_seq == 0 || n_err == 0 || n_stall_ip == 0 || n_back == 0 ||
        n_skip == 0 || n_push == 0 || n_pop == 0 || n_host_p1 == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("calls: calc=%0d seq=%0d unknown=%0d; IP stall cycles=%0d; loop back=%0d skip=%0d; push=%0d pop=%0d; host port-1 states=%0d",
             n_calc, n_seq, n_err, n_stall_ip, n_back, n_skip, n_push, n_pop, n_host_p1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

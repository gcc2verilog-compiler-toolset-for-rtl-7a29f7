// tb_hwip_seq: self-checking test of the Table-style five-instruction IP in
// both schedules. Two instances run side by side, one scheduled for one
// memory port and one for two, each on its own behavioural memory. Random
// register values and memory contents are used; the expected r0, r4, r7 and
// the stored word are computed here from the instruction semantics. The
// cycle count from enable to finish is checked against 1 + body states +
// read stall cycles (body: 3 states with one port, 2 with two), and the
// store-then-load case (r0 == r8 + 4) is forced in some runs: the one-port
// schedule keeps program order there, the two-port one reads the old word.
module tb_hwip_seq;
  import gcc2v_pkg::*;

  localparam int DEPTH = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic              en1, en2, fin1, fin2, st1, st2;
  word_t [NREGS-1:0] regs_in, out1, out2;
  mem_req_t [0:0] rq1;  word_t [0:0] wd1, rdt1;
  mem_req_t [1:0] rq2;  word_t [1:0] wd2, rdt2;

  hwip_seq #(.MEM_PORTS(1)) dut1 (.clk, .rst_n, .enable(en1), .finish(fin1),
    .regs_in, .regs_out(out1), .mreq(rq1), .mwdata(wd1), .mrdata(rdt1), .mem_stall(st1));
  hwip_seq #(.MEM_PORTS(2)) dut2 (.clk, .rst_n, .enable(en2), .finish(fin2),
    .regs_in, .regs_out(out2), .mreq(rq2), .mwdata(wd2), .mrdata(rdt2), .mem_stall(st2));

  int read_stall = 1;
  tb_mem #(.NPORTS(1), .DEPTH(DEPTH), .READ_STALL(1)) m1a (.clk, .rst_n, .req(rq1), .wdata(wd1), .rdata(rdt1), .mem_stall(st1));
  tb_mem #(.NPORTS(2), .DEPTH(DEPTH), .READ_STALL(1)) m2a (.clk, .rst_n, .req(rq2), .wdata(wd2), .rdata(rdt2), .mem_stall(st2));

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  // run one call on the chosen instance, return cycles from enable to finish
  task automatic call(input int which, output int cycles);
    @(negedge clk);
    if (which == 1) en1 = 1'b1; else en2 = 1'b1;
    cycles = 0;
    do begin
      @(negedge clk);
      cycles++;
    end while (!((which == 1) ? fin1 : fin2) && cycles < 100);
    if (which == 1) en1 = 1'b0; else en2 = 1'b0;
    @(negedge clk);
  endtask

  word_t r0, r3, r7, r8, mval, e0, e4, e7, estore, oldw;
  int cyc;

  initial begin
    en1 = 0; en2 = 0; regs_in = '0;
    for (int i = 0; i < DEPTH; i++) begin m1a.mem[i] = '0; m2a.mem[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      for (int r = 0; r < NREGS; r++) regs_in[r] = $urandom;
      r8 = word_t'($urandom_range(0, 120) * 4);
      r0 = (n % 4 == 0) ? r8 + 4 : word_t'($urandom_range(0, 127) * 4);
      r3 = $urandom; r7 = $urandom;
      regs_in[0] = r0; regs_in[3] = r3; regs_in[7] = r7; regs_in[8] = r8;
      mval = $urandom;
      m1a.mem[r0[31:2]] = mval; m2a.mem[r0[31:2]] = mval;
      estore = r7 >> 2;
      e7 = r3 * r3;
      e0 = r8 + r0;
      e4 = (r0 == r8 + 4) ? estore : mval;   // store precedes the load
      for (int w = 1; w <= 2; w++) begin
        call(w, cyc);
        check($sformatf("P%0d r0", w), (w == 1) ? out1[0] : out2[0], e0);
        // the two-port schedule issues the load beside the store, which the
        // scheduler only does for accesses it knows are independent: when
        // they alias anyway the load sees the word before the store
        check($sformatf("P%0d r4", w), (w == 1) ? out1[4] : out2[4], (w == 1) ? e4 : mval);
        check($sformatf("P%0d r7", w), (w == 1) ? out1[7] : out2[7], e7);
        check($sformatf("P%0d r5 passthrough", w), (w == 1) ? out1[5] : out2[5], regs_in[5]);
        check($sformatf("P%0d stored word", w),
              (w == 1) ? m1a.mem[(r8 + 4) >> 2] : m2a.mem[(r8 + 4) >> 2], estore);
        checks++;
        if (cyc != ((w == 1) ? 4 + 1 : 3 + 1)) begin
          failures++;
          $display("FAIL P%0d cycles %0d", w, cyc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

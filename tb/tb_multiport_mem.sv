// tb_multiport_mem: self-checking test of the multi-port memory.
//
// The testbench acts as a requester that keeps the port protocol: it applies
// one "state" of requests at a time, holds it while mem_stall is high, takes
// read data in the last cycle of the state, and gives the write data of the
// previous state's writes together with the next state. A reference array is
// updated in the same order (writes become visible to reads of the state in
// which their data arrives). Directed cases cover all four ports at once,
// byte enables, write-to-read forwarding, two ports writing one word, and the
// read stall length (exactly one cycle per state with reads, none for
// writes); a random phase follows.
module tb_multiport_mem;
  import gcc2v_pkg::*;

  localparam int NP = 4;
  localparam int DEPTH = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  mem_req_t [NP-1:0] req;
  word_t    [NP-1:0] wdata, rdata;
  logic mem_stall;

  int checks = 0, failures = 0;

  multiport_mem #(.NPORTS(NP), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t model [DEPTH];
  mem_req_t [NP-1:0] pend;      // writes whose data goes with the next state
  word_t    [NP-1:0] pend_data;

  function automatic mem_req_t rd(int idx);
    return '{addr: word_t'(idx * 4), read: 1'b1, write: 1'b0, be: 4'hF};
  endfunction
  function automatic mem_req_t wr(int idx, logic [3:0] be = 4'hF);
    return '{addr: word_t'(idx * 4), read: 1'b0, write: 1'b1, be: be};
  endfunction

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  // Apply one state: requests r, data d for the writes of this state (given
  // in the next state). Returns read data and stall cycles.
  task automatic run_state(input mem_req_t [NP-1:0] r, input word_t [NP-1:0] d,
                           output word_t [NP-1:0] got, output int stalls);
    @(negedge clk);
    req = r;
    for (int p = 0; p < NP; p++) begin
      wdata[p] = pend_data[p];
      if (pend[p].write)
        for (int b = 0; b < 4; b++)
          if (pend[p].be[b]) model[pend[p].addr[7:2]][8*b +: 8] = pend_data[p][8*b +: 8];
    end
    #1;
    stalls = 0;
    while (mem_stall) begin
      stalls++;
      @(negedge clk);
      #1;
    end
    got = rdata;
    for (int p = 0; p < NP; p++)
      if (r[p].read) check($sformatf("read port %0d word %0d", p, r[p].addr[7:2]),
                           got[p], model[r[p].addr[7:2]]);
    pend = r;
    pend_data = d;
  endtask

  mem_req_t [NP-1:0] r;
  word_t    [NP-1:0] d, got;
  int stalls;
  int k, a;

  initial begin
    req = '0; wdata = '0; pend = '0; pend_data = '0;
    foreach (model[i]) model[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // zero the whole array through port 0..3
    for (int i = 0; i < DEPTH; i += NP) begin
      for (int p = 0; p < NP; p++) begin r[p] = wr(i + p); d[p] = '0; end
      run_state(r, d, got, stalls);
    end

    // four writes at once, no stall
    for (int p = 0; p < NP; p++) begin r[p] = wr(10 + p); d[p] = 32'hA000_0000 + p; end
    run_state(r, d, got, stalls);
    checks++; if (stalls != 0) begin failures++; $display("FAIL write stalled %0d", stalls); end
    // data state; no requests
    r = '0; d = '0;
    run_state(r, d, got, stalls);
    // four reads at once: one stall cycle
    for (int p = 0; p < NP; p++) r[p] = rd(13 - p);
    run_state(r, d, got, stalls);
    checks++; if (stalls != 1) begin failures++; $display("FAIL read stall %0d", stalls); end
    check("explicit 4-port read", got[0], 32'hA000_0003);

    // byte enables
    r = '0; r[2] = wr(20, 4'b0101); d = '0; d[2] = 32'h1122_3344;
    run_state(r, d, got, stalls);
    r = '0; d = '0;
    run_state(r, d, got, stalls);
    r = '0; r[1] = rd(20);
    run_state(r, d, got, stalls);
    check("byte enables", got[1], 32'h0022_0044);

    // forwarding: read in the state that carries the write data
    r = '0; r[0] = wr(21); d = '0; d[0] = 32'hDEAD_BEEF;
    run_state(r, d, got, stalls);
    r = '0; r[3] = rd(21); d = '0;
    run_state(r, d, got, stalls);
    check("write-to-read forwarding", got[3], 32'hDEAD_BEEF);

    // ports 1 and 2 write one word: port 2 wins on common bytes
    r = '0; r[1] = wr(22, 4'b0011); r[2] = wr(22, 4'b0110);
    d = '0; d[1] = 32'h0000_1111; d[2] = 32'h0022_2200;
    run_state(r, d, got, stalls);
    r = '0; d = '0;
    run_state(r, d, got, stalls);
    r = '0; r[0] = rd(22);
    run_state(r, d, got, stalls);
    check("same-word write priority", got[0], 32'h0022_2211);

    // random states
    for (int n = 0; n < 2000; n++) begin
      for (int p = 0; p < NP; p++) begin
        k = $urandom_range(0, 2);
        a = $urandom_range(0, 15);
        r[p] = (k == 0) ? rd(a) : (k == 1) ? wr(a, 4'($urandom)) : '0;
        d[p] = $urandom;
      end
      run_state(r, d, got, stalls);
      checks++;
      if (stalls != ((r[0].read | r[1].read | r[2].read | r[3].read) ? 1 : 0)) begin
        failures++; $display("FAIL stall count %0d in random state %0d", stalls, n);
      end
    end

    r = '0; d = '0;
    run_state(r, d, got, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

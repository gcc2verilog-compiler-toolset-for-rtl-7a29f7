// tb_mem: behavioural memory for unit tests of the hardware IPs.
//
// It keeps the port protocol of the design's memory (read data in the last
// request cycle, write data one cycle after an unstalled request cycle) but
// lets the test choose how many cycles every read stalls (READ_STALL, 0 or
// more) and gives the testbench direct access to the array `mem` for loading
// inputs and checking results. It also counts reads, writes and stall cycles.
// Not synthesizable; for simulation only.
module tb_mem
  import gcc2v_pkg::*;
#(
  parameter int NPORTS = 2,
  parameter int DEPTH = 1024,
  parameter int READ_STALL = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  mem_req_t [NPORTS-1:0] req,
  input  word_t    [NPORTS-1:0] wdata,
  output word_t    [NPORTS-1:0] rdata,
  output logic                  mem_stall
);
  word_t mem [DEPTH];
  int waited;                     // stall cycles spent on the current reads
  logic [NPORTS-1:0] wpend;
  mem_req_t [NPORTS-1:0] wreq;
  int n_reads = 0, n_writes = 0, n_stall_cycles = 0;

  logic any_read;
  always_comb begin
    any_read = 1'b0;
    for (int p = 0; p < NPORTS; p++) any_read |= req[p].read;
  end
  assign mem_stall = any_read && (waited < READ_STALL);

  // read data includes writes whose data is on the ports this cycle
  always_comb
    for (int p = 0; p < NPORTS; p++) begin
      rdata[p] = mem[req[p].addr[31:2] % DEPTH];
      for (int q = 0; q < NPORTS; q++)
        if (wpend[q] && (wreq[q].addr[31:2] % DEPTH) == (req[p].addr[31:2] % DEPTH))
          for (int b = 0; b < 4; b++)
            if (wreq[q].be[b]) rdata[p][8*b +: 8] = wdata[q][8*b +: 8];
    end

  always @(posedge clk) begin
    if (!rst_n) begin
      waited = 0;
      wpend  = '0;
    end else begin
      for (int p = 0; p < NPORTS; p++)
        if (wpend[p])
          for (int b = 0; b < 4; b++)
            if (wreq[p].be[b]) mem[wreq[p].addr[31:2] % DEPTH][8*b +: 8] = wdata[p][8*b +: 8];
      if (mem_stall) n_stall_cycles++;
      for (int p = 0; p < NPORTS; p++) begin
        wpend[p] = req[p].write && !mem_stall;
        wreq[p]  = req[p];
        if (req[p].write && !mem_stall) n_writes++;
        if (req[p].read && !mem_stall) n_reads++;
      end
      waited = mem_stall ? waited + 1 : 0;
    end
  end
endmodule

// multiport_mem: word-organised memory shared by software and the hardware
// IPs, with NPORTS independent access ports and one common mem_stall output.
//
// The HWIPs are scheduled for a fixed number of concurrent memory accesses
// (1, 2, 4 or 8 ports); this memory provides that many ports into one array,
// so every port can read or write any word in the same cycle.
//
// Port timing (see gcc2v_pkg):
//   * Read: the array is read synchronously, like an FPGA block RAM. In the
//     first cycle a read request is visible the memory raises mem_stall and
//     captures the word; in the next cycle mem_stall is low (unless another
//     port still waits) and rdata holds the word. The requester is frozen
//     while mem_stall is high, so its request stays on the port.
//   * Write: address and byte enables are taken at the end of the request
//     cycle in which mem_stall is low; the data is taken from wdata in the
//     following cycle and written at the end of it. Writes never stall.
//   * A read that is captured in the same cycle as a pending write commits
//     sees the written bytes (write-to-read forwarding), so program order of a
//     store followed by a load of the same word is kept.
//   * If several ports write the same word in one cycle, the highest-numbered
//     port wins for each byte it enables.
// Addresses are byte addresses; bits [1:0] are ignored and the word index
// wraps modulo DEPTH. The array itself has no reset: software fills it
// through a port. The number of ports follows the
// document's evaluated configurations; the depth, the one-cycle read stall and
// the write-data timing are this design's choices.
module multiport_mem
  import gcc2v_pkg::*;
#(
  parameter int unsigned NPORTS = 4,      // concurrent accesses per cycle
  parameter int unsigned DEPTH  = 4096    // words (16 KiB)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  mem_req_t [NPORTS-1:0]       req,
  input  word_t    [NPORTS-1:0]       wdata,
  output word_t    [NPORTS-1:0]       rdata,
  output logic                        mem_stall
);

  localparam int unsigned IW = $clog2(DEPTH);

  word_t mem [DEPTH];

  logic [NPORTS-1:0]          rd_done;   // read captured, data valid now
  logic [NPORTS-1:0]          port_stall;
  logic [NPORTS-1:0]          wpend;     // write address taken, data due now
  logic [NPORTS-1:0][IW-1:0]  widx;
  logic [NPORTS-1:0][BEW-1:0] wbe;
  word_t [NPORTS-1:0]         rdata_q;

  function automatic logic [IW-1:0] word_index(word_t a);
    return a[IW+1:2];
  endfunction

  always_comb begin
    for (int p = 0; p < NPORTS; p++) port_stall[p] = req[p].read && !rd_done[p];
  end
  assign mem_stall = |port_stall;
  assign rdata     = rdata_q;

  // Word as it will be after this cycle's pending writes commit.
  function automatic word_t merged_word(logic [IW-1:0] idx, word_t cur,
                                        logic [NPORTS-1:0] pend,
                                        logic [NPORTS-1:0][IW-1:0] pidx,
                                        logic [NPORTS-1:0][BEW-1:0] pbe,
                                        word_t [NPORTS-1:0] pdata);
    word_t w = cur;
    for (int q = 0; q < NPORTS; q++)
      if (pend[q] && pidx[q] == idx)
        for (int b = 0; b < BEW; b++)
          if (pbe[q][b]) w[8*b +: 8] = pdata[q][8*b +: 8];
    return w;
  endfunction

  // Array writes (no reset on the array itself).
  always_ff @(posedge clk) begin
    for (int q = 0; q < NPORTS; q++)
      if (wpend[q])
        for (int b = 0; b < BEW; b++)
          if (wbe[q][b]) mem[widx[q]][8*b +: 8] <= wdata[q][8*b +: 8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_done <= '0;
      wpend   <= '0;
      widx    <= '0;
      wbe     <= '0;
      rdata_q <= '0;
    end else begin
      for (int p = 0; p < NPORTS; p++) begin
        // read: capture in the first request cycle, release when the
        // requester advances (mem_stall low)
        if (port_stall[p])
          rdata_q[p] <= merged_word(word_index(req[p].addr), mem[word_index(req[p].addr)],
                                    wpend, widx, wbe, wdata);
        if (!mem_stall)        rd_done[p] <= 1'b0;
        else if (req[p].read)  rd_done[p] <= 1'b1;
        // write: take the address when the request cycle completes
        wpend[p] <= req[p].write && !mem_stall;
        if (req[p].write && !mem_stall) begin
          widx[p] <= word_index(req[p].addr);
          wbe[p]  <= req[p].be;
        end
      end
    end
  end

  // A port carries at most one access per request.
  always_ff @(posedge clk)
    if (rst_n)
      for (int p = 0; p < NPORTS; p++)
        assert (!(req[p].read && req[p].write))
          else $error("multiport_mem: read and write together on port %0d", p);

endmodule

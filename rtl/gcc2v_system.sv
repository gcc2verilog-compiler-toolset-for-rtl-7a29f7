// gcc2v_system: hardware side of a mixed software/hardware program. Hardware
// functions compiled from C sit next to a host processor and share one
// address space through a multi-port memory.
//
// The host calls a hardware function by its hardware identification number
// (HWID) instead of an address: call_valid for one cycle with call_hwid, the
// host's argument register window call_regs (r0 = link register) and its
// stack pointer call_sp. The selected IP gets enable until it raises finish;
// the system then returns the updated register window and stack pointer with
// done for one cycle. Host and IPs never run at the same time, so the memory
// needs no coherence: while an IP runs it owns all memory ports, otherwise
// the host does (host_req/host_wdata/host_rdata). An unknown HWID ends the
// call at once with call_err.
//
//   HWID 1  hwip_calc  Out[i] = (history[i]*coefficient[i]) >> scale, i < bound
//                      (bound in r12, coefficient in r13, scale on the stack)
//   HWID 2  hwip_seq   five-instruction block of rsh/st/ld/add/mult on r0..r8
//
// Port ownership switches only between calls. The host must have no memory
// request outstanding when it calls. Write data is routed by the owner of the
// previous cycle, because it follows its request by one cycle.
// Timing: the IP sees enable in the cycle after call_valid; done comes in the
// cycle after the IP's finish.
// The HWID calling scheme, one address space, the register and stack calling
// convention and the 2-port memory of the example IPs follow the document;
// the call/done handshake, the port multiplexing and the error response are
// this design's choices.
module gcc2v_system
  import gcc2v_pkg::*;
#(
  parameter int unsigned MEM_PORTS = 2,     // ports the IPs were scheduled for
  parameter int unsigned MEM_DEPTH = 4096   // words
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // call interface from the host
  input  logic                        call_valid,
  input  hwid_t                       call_hwid,
  input  word_t    [NREGS-1:0]        call_regs,
  input  word_t                       call_sp,
  output logic                        busy,
  output logic                        done,
  output logic                        call_err,
  output word_t    [NREGS-1:0]        ret_regs,
  output word_t                       ret_sp,
  // host memory ports
  input  mem_req_t [MEM_PORTS-1:0]    host_req,
  input  word_t    [MEM_PORTS-1:0]    host_wdata,
  output word_t    [MEM_PORTS-1:0]    host_rdata,
  output logic                        mem_stall
);

  typedef enum logic [1:0] {OWN_HOST, OWN_CALC, OWN_SEQ} owner_e;

  owner_e owner, owner_d;
  word_t [NREGS-1:0] regs_q;
  word_t             sp_q;

  // memory side
  mem_req_t [MEM_PORTS-1:0] m_req;
  word_t    [MEM_PORTS-1:0] m_wdata, m_rdata;

  // IP side
  logic            calc_en, calc_fin, seq_en, seq_fin;
  word_t           calc_link, calc_sp;
  mem_req_t [1:0]  calc_req;
  word_t    [1:0]  calc_wdata;
  word_t    [NREGS-1:0] seq_regs_out;
  mem_req_t [1:0]  seq_req;
  word_t    [1:0]  seq_wdata;

  assign calc_en = (owner == OWN_CALC);
  assign seq_en  = (owner == OWN_SEQ);
  assign busy    = (owner != OWN_HOST);

  hwip_calc u_calc (
    .clk, .rst_n, .enable(calc_en), .finish(calc_fin),
    .arg_link(regs_q[0]), .arg_bound(regs_q[12]), .arg_coef(regs_q[13]), .arg_sp(sp_q),
    .ret_link(calc_link), .ret_sp(calc_sp),
    .mreq(calc_req), .mwdata(calc_wdata), .mrdata(m_rdata[1:0]), .mem_stall
  );

  hwip_seq #(.MEM_PORTS(2)) u_seq (
    .clk, .rst_n, .enable(seq_en), .finish(seq_fin),
    .regs_in(regs_q), .regs_out(seq_regs_out),
    .mreq(seq_req), .mwdata(seq_wdata), .mrdata(m_rdata[1:0]), .mem_stall
  );

  multiport_mem #(.NPORTS(MEM_PORTS), .DEPTH(MEM_DEPTH)) u_mem (
    .clk, .rst_n, .req(m_req), .wdata(m_wdata), .rdata(m_rdata), .mem_stall
  );

  // port multiplexing: requests by the current owner, write data by the
  // owner of the previous cycle
  always_comb begin
    for (int p = 0; p < MEM_PORTS; p++) begin
      m_req[p]   = host_req[p];
      m_wdata[p] = host_wdata[p];
      if (p < 2) begin
        if (owner == OWN_CALC)     m_req[p] = calc_req[p];
        else if (owner == OWN_SEQ) m_req[p] = seq_req[p];
        if (owner_d == OWN_CALC)     m_wdata[p] = calc_wdata[p];
        else if (owner_d == OWN_SEQ) m_wdata[p] = seq_wdata[p];
      end else if (owner != OWN_HOST) begin
        m_req[p] = '0;                  // ports the IPs do not use stay idle
      end
    end
  end
  assign host_rdata = m_rdata;

  // call sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owner    <= OWN_HOST;
      owner_d  <= OWN_HOST;
      regs_q   <= '0;
      sp_q     <= '0;
      done     <= 1'b0;
      call_err <= 1'b0;
      ret_regs <= '0;
      ret_sp   <= '0;
    end else begin
      owner_d  <= owner;
      done     <= 1'b0;
      call_err <= 1'b0;
      unique case (owner)
        OWN_HOST: if (call_valid) begin
          regs_q <= call_regs;
          sp_q   <= call_sp;
          case (call_hwid)
            HWID_CALC: owner <= OWN_CALC;
            HWID_SEQ:  owner <= OWN_SEQ;
            default: begin
              done     <= 1'b1;
              call_err <= 1'b1;
              ret_regs <= call_regs;
              ret_sp   <= call_sp;
            end
          endcase
        end
        OWN_CALC: if (calc_fin) begin
          ret_regs    <= regs_q;
          ret_regs[0] <= calc_link;
          ret_sp      <= calc_sp;
          done        <= 1'b1;
          owner       <= OWN_HOST;
        end
        OWN_SEQ: if (seq_fin) begin
          ret_regs <= seq_regs_out;
          ret_sp   <= sp_q;
          done     <= 1'b1;
          owner    <= OWN_HOST;
        end
        default: owner <= OWN_HOST;
      endcase
    end
  end

  // The host may not start a call while it still has a memory access open.
  always_ff @(posedge clk)
    if (rst_n && owner == OWN_HOST && call_valid)
      for (int p = 0; p < MEM_PORTS; p++)
        assert (!host_req[p].read && !host_req[p].write)
          else $error("gcc2v_system: call issued with host memory access pending");

  initial assert (MEM_PORTS >= 2)
    else $error("gcc2v_system: the hardware functions need at least 2 memory ports");

endmodule

// gcc2v_pkg: types and constants shared by the hardware IPs (HWIPs), the
// multi-port memory and the system top.
//
// Every HWIP talks to memory through one or more identical ports. A port
// request (mem_req_t) is a registered output of the HWIP datapath: a byte
// address, read and write strobes and four byte enables. The timing of a port
// is split in two phases:
//   * request cycle  - addr/read/write/be are visible to the memory;
//                      a read returns rdata in the last cycle of its request,
//                      the memory holding mem_stall high until then;
//   * write-data cycle - for a write, wdata is presented in the cycle after
//                      the (unstalled) request cycle.
// The delayed write data lets a scheduler issue the address of a store in the
// same state as the instruction that produces the stored value.
package gcc2v_pkg;

  localparam int unsigned XLEN  = 32;          // data and address width
  localparam int unsigned BEW   = XLEN / 8;    // byte enables per word

  typedef logic [XLEN-1:0] word_t;

  typedef struct packed {
    word_t          addr;   // byte address (word aligned for full-word access)
    logic           read;
    logic           write;
    logic [BEW-1:0] be;
  } mem_req_t;


  // Hardware identification numbers. Software names a hardware function by
  // its HWID instead of an address.
  typedef logic [3:0] hwid_t;
  localparam hwid_t HWID_CALC = 4'd1;
  localparam hwid_t HWID_SEQ  = 4'd2;

  // Size of the argument/result register window shared with the host's
  // calling convention (r0 is the link register).
  localparam int unsigned NREGS = 16;

endpackage

// hwip_calc: the calculate() hardware IP, one control unit plus one datapath.
//
// Software calls it by raising enable with the arguments on arg_*; it runs
//     for (i = 0; i < bound; i++) Out[i] = (history[i] * coefficient[i]) >> scale;
// through two memory ports and raises finish for one cycle when done, with
// the restored link register and stack pointer on ret_link/ret_sp. Keep
// enable high until finish, then drop it to return the IP to its start state.
// The control unit (hwip_calc_ctrl) owns pc and the branch conditions; the
// datapath (hwip_calc_dp) owns all registers and memory-port outputs. Both
// freeze while mem_stall is high.
// Timing with the one-cycle read stall of multiport_mem: finish comes
// 12 + 6*bound cycles after the cycle in which enable is first seen, or 7
// cycles after it when bound <= 0 (the loop is skipped).
// The split into a control unit and a datapath follows the document.
module hwip_calc
  import gcc2v_pkg::*;
  import hwip_calc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,
  output logic            finish,
  input  word_t           arg_link,
  input  word_t           arg_bound,
  input  word_t           arg_coef,
  input  word_t           arg_sp,
  output word_t           ret_link,
  output word_t           ret_sp,
  output mem_req_t [1:0]  mreq,
  output word_t    [1:0]  mwdata,
  input  word_t    [1:0]  mrdata,
  input  logic            mem_stall
);

  pc_t   pc;
  word_t reg12;

  hwip_calc_ctrl u_ctrl (
    .clk, .rst_n, .enable, .mem_stall, .reg12, .pc, .finish
  );

  hwip_calc_dp u_dp (
    .clk, .rst_n, .pc, .enable, .mem_stall,
    .arg_link, .arg_bound, .arg_coef, .arg_sp,
    .reg12, .ret_link, .ret_sp,
    .mreq, .mwdata, .mrdata
  );

endmodule

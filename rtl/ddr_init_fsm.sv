// ddr_init_fsm: the initialization state machine (INIT_FSM) of the main
// control module.
//
// After reset it runs the DDR SDRAM power-up sequence once and then stays in
// I_READY with sys_INIT_DONE high:
//   I_IDLE   held while sys_RESET is high (clock enable low)
//   I_NOP    NOP with clock enable high, until sys_DLY_100US reports that the
//            clock/power stabilization delay is over
//   I_PRE    PRECHARGE ALL, then I_TRP until endOf_tRP
//   I_AR1    AUTO REFRESH,  then I_TRFC1 until endOf_tRFC
//   I_AR2    AUTO REFRESH,  then I_TRFC2 until endOf_tRFC
//   I_MRS    LOAD MODE REGISTER, then I_TMRD until endOf_tMRD
//   I_READY  initialization done
// The states and their order follow the design's state diagram, including the
// direct arcs from a command state to the next command state, taken here when
// the matching delay is one cycle or less so that no wait cycle is needed.
// The state is a register; iState and sys_INIT_DONE come straight from it.
// Which commands are driven in each state is decided by ddr_sig.
module ddr_init_fsm
  import ddr_pkg::*;
#(
  parameter int unsigned TRP  = T_RP,
  parameter int unsigned TRFC = T_RFC,
  parameter int unsigned TMRD = T_MRD
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        sys_DLY_100US,
  input  logic        endOf_tRP,
  input  logic        endOf_tRFC,
  input  logic        endOf_tMRD,
  output init_state_t iState,
  output logic        sys_INIT_DONE
);

  init_state_t nxt;

  always_comb begin
    nxt = iState;
    unique case (iState)
      I_IDLE:  nxt = I_NOP;
      I_NOP:   if (sys_DLY_100US) nxt = I_PRE;
      I_PRE:   nxt = (TRP  <= 1) ? I_AR1 : I_TRP;
      I_TRP:   if (endOf_tRP)  nxt = I_AR1;
      I_AR1:   nxt = (TRFC <= 1) ? I_AR2 : I_TRFC1;
      I_TRFC1: if (endOf_tRFC) nxt = I_AR2;
      I_AR2:   nxt = (TRFC <= 1) ? I_MRS : I_TRFC2;
      I_TRFC2: if (endOf_tRFC) nxt = I_MRS;
      I_MRS:   nxt = (TMRD <= 1) ? I_READY : I_TMRD;
      I_TMRD:  if (endOf_tMRD) nxt = I_READY;
      I_READY: nxt = I_READY;
      default: nxt = I_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) iState <= I_IDLE;
    else     iState <= nxt;
  end

  assign sys_INIT_DONE = (iState == I_READY);

endmodule

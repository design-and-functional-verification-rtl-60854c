// ddr_cmd_fsm: the command state machine (CMD_FSM) of the main control
// module. It turns bus-master requests into one complete SDRAM access or one
// auto refresh at a time.
//
// States follow the design's state diagram:
//   C_IDLE    waits for sys_INIT_DONE; then a latched refresh request wins,
//             otherwise sys_ADSn low starts an access
//   C_AR      AUTO REFRESH, then C_TRFC until endOf_tRFC, back to C_IDLE
//   C_ACTIVE  ACTIVE (opens the row), then C_TRCD until endOf_tRCD
//   C_READA   READ with auto precharge (sys_R_Wn high), C_CL until
//             endOf_Cas_Latency, C_RDATA for the burst, back to C_IDLE
//   C_WRITEA  WRITE with auto precharge (sys_R_Wn low), C_WDATA for the rest
//             of the burst, C_TDAL until endOf_tDAL, back to C_IDLE
// The direct arcs of the diagram (ACTIVE to READA/WRITEA, AR to IDLE, WDATA
// to IDLE) are taken when the delay they skip is too short to need a wait
// state.
//
// Bus side: sys_ADSn is a level request; the master holds it low, with sys_A
// and sys_R_Wn stable, until sys_CYC_END. sys_CYC_END is high in the last
// cycle of an access. sys_REF_REQ pulses are latched in latch_ref_req
// together with the internal refresh counter's ref_due, and the latch clears
// when the refresh command is issued; sys_REF_ACK is high in that cycle. The
// handshake details are this design's choice: the design names the signals
// and the states but not their timing.
module ddr_cmd_fsm
  import ddr_pkg::*;
#(
  parameter int unsigned TRFC = T_RFC,
  parameter int unsigned TRCD = T_RCD,
  parameter int unsigned CL   = CAS_LAT,
  parameter int unsigned TDAL = T_DAL
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        sys_INIT_DONE,
  input  logic        sys_ADSn,
  input  logic        sys_R_Wn,
  input  logic        sys_REF_REQ,
  input  logic        ref_due,
  input  logic        endOf_tRFC,
  input  logic        endOf_tRCD,
  input  logic        endOf_Cas_Latency,
  input  logic        endOf_Read_Burst,
  input  logic        endOf_Write_Burst,
  input  logic        endOf_tDAL,
  output cmd_state_t  cState,
  output logic        latch_ref_req,
  output logic        sys_REF_ACK,
  output logic        sys_CYC_END
);

  cmd_state_t nxt;
  cmd_state_t rw_state;

  assign rw_state = sys_R_Wn ? C_READA : C_WRITEA;

  always_comb begin
    nxt = cState;
    unique case (cState)
      C_IDLE:   if (sys_INIT_DONE && latch_ref_req) nxt = C_AR;
                else if (sys_INIT_DONE && !sys_ADSn) nxt = C_ACTIVE;
      C_AR:     nxt = (TRFC <= 1) ? C_IDLE : C_TRFC;
      C_TRFC:   if (endOf_tRFC) nxt = C_IDLE;
      C_ACTIVE: nxt = (TRCD <= 1) ? rw_state : C_TRCD;
      C_TRCD:   if (endOf_tRCD) nxt = rw_state;
      C_READA:  nxt = (CL <= 1) ? C_RDATA : C_CL;
      C_CL:     if (endOf_Cas_Latency) nxt = C_RDATA;
      C_RDATA:  if (endOf_Read_Burst) nxt = C_IDLE;
      C_WRITEA: nxt = C_WDATA;
      C_WDATA:  if (endOf_Write_Burst) nxt = (TDAL == 0) ? C_IDLE : C_TDAL;
      C_TDAL:   if (endOf_tDAL) nxt = C_IDLE;
      default:  nxt = C_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cState        <= C_IDLE;
      latch_ref_req <= 1'b0;
    end else begin
      cState <= nxt;
      if (sys_REF_REQ || ref_due) latch_ref_req <= 1'b1;
      else if (cState == C_AR)    latch_ref_req <= 1'b0;
    end
  end

  assign sys_REF_ACK = (cState == C_AR);
  assign sys_CYC_END = (cState != C_IDLE) && (cState != C_AR) && (cState != C_TRFC)
                       && (nxt == C_IDLE);

  // No access or refresh may start before initialization is complete.
  a_idle_until_init: assert property (@(posedge clk) disable iff (rst)
    !sys_INIT_DONE |-> cState == C_IDLE);

endmodule

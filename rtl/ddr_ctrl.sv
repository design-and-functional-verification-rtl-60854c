// ddr_ctrl: the main control module of the DDR SDRAM controller.
//
// It joins the three parts the design gives it: the initialization FSM
// (iState), the command FSM (cState) and the counter module, which times the
// wait states of both machines from clkCNT and requests periodic refreshes.
// The command FSM is held in C_IDLE until the initialization FSM reports
// sys_INIT_DONE. iState and cState go to the signal generation module, cState
// (and clkCNT) to the data path. All outputs are registers or decoded
// directly from registers, so a request seen at one clock edge is acted on at
// the next.
module ddr_ctrl
  import ddr_pkg::*;
#(
  parameter int unsigned TRP     = T_RP,
  parameter int unsigned TRFC    = T_RFC,
  parameter int unsigned TMRD    = T_MRD,
  parameter int unsigned TRCD    = T_RCD,
  parameter int unsigned TDAL    = T_DAL,
  parameter int unsigned CL      = CAS_LAT,
  parameter int unsigned BL      = BURST,
  parameter int unsigned REF_INT = REF_INTERVAL,
  parameter int unsigned CNT_W   = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              sys_DLY_100US,
  input  logic              sys_ADSn,
  input  logic              sys_R_Wn,
  input  logic              sys_REF_REQ,
  output logic              sys_REF_ACK,
  output logic              sys_INIT_DONE,
  output logic              sys_CYC_END,
  output init_state_t       iState,
  output cmd_state_t        cState,
  output logic [CNT_W-1:0]  clkCNT
);

  logic endOf_tRP, endOf_tRFC, endOf_tMRD, endOf_tRCD;
  logic endOf_Cas_Latency, endOf_Read_Burst, endOf_Write_Burst, endOf_tDAL;
  logic ref_due;

  ddr_init_fsm #(.TRP(TRP), .TRFC(TRFC), .TMRD(TMRD)) u_init (
    .clk, .rst, .sys_DLY_100US,
    .endOf_tRP, .endOf_tRFC, .endOf_tMRD,
    .iState, .sys_INIT_DONE
  );

  ddr_cmd_fsm #(.TRFC(TRFC), .TRCD(TRCD), .CL(CL), .TDAL(TDAL)) u_cmd (
    .clk, .rst, .sys_INIT_DONE, .sys_ADSn, .sys_R_Wn, .sys_REF_REQ, .ref_due,
    .endOf_tRFC, .endOf_tRCD, .endOf_Cas_Latency, .endOf_Read_Burst,
    .endOf_Write_Burst, .endOf_tDAL,
    .cState, .latch_ref_req(), .sys_REF_ACK, .sys_CYC_END
  );

  ddr_counter #(.TRP(TRP), .TRFC(TRFC), .TMRD(TMRD), .TRCD(TRCD), .TDAL(TDAL),
                .CL(CL), .BL(BL), .REF_INT(REF_INT), .CNT_W(CNT_W)) u_cnt (
    .clk, .rst, .iState, .cState, .init_done(sys_INIT_DONE), .clkCNT,
    .endOf_tRP, .endOf_tRFC, .endOf_tMRD, .endOf_tRCD, .endOf_Cas_Latency,
    .endOf_Read_Burst, .endOf_Write_Burst, .endOf_tDAL, .ref_due
  );

endmodule

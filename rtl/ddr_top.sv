// ddr_top: one 64-bit DDR SDRAM controller, placed between a bus master and
// one DDR SDRAM with eight banks.
//
// It wires the three modules of the controller architecture: the main
// control module (ddr_ctrl: initialization FSM, command FSM, counter), the
// signal generation module (ddr_sig: command pins and address bus from iState
// and cState) and the data path (ddr_data). One access is one burst of BL
// beats of DW bits to one bank, opened with ACTIVE and closed by the auto
// precharge of READA/WRITEA, so this controller reaches one bank at a time.
//
// Bus master side: sys_A = {bank, row, column}; sys_ADSn (active low) held
// with sys_A and sys_R_Wn (1 = read) until sys_CYC_END; write beats on sys_D
// in the cycles sys_D_REQ is high; read beats on sys_Q while sys_D_VALID is
// high; sys_RDYn low in either kind of data cycle; sys_REF_REQ /
// sys_REF_ACK for refreshes the master asks for (the controller also
// refreshes on its own); sys_DLY_100US tells the controller
// that the power-up delay is over, and sys_INIT_DONE that the SDRAM is ready.
// sys_RESET is active high.
// SDRAM side: ddr_CK/ddr_CKn are the forwarded clock; all command and address
// outputs are registered on the rising edge of sys_CLK. The bidirectional
// data bus of the design is split into _o/_oe/_i so a pad can be added
// outside. The design's PLL is not part of this module: sys_CLK is used as is.
module ddr_top
  import ddr_pkg::*;
#(
  parameter int unsigned DW      = DSIZE,
  parameter int unsigned TRP     = T_RP,
  parameter int unsigned TRFC    = T_RFC,
  parameter int unsigned TMRD    = T_MRD,
  parameter int unsigned TRCD    = T_RCD,
  parameter int unsigned TDAL    = T_DAL,
  parameter int unsigned CL      = CAS_LAT,
  parameter int unsigned BL      = BURST,
  parameter int unsigned REF_INT = REF_INTERVAL
) (
  input  logic             sys_CLK,
  input  logic             sys_RESET,
  input  logic             sys_DLY_100US,
  input  logic [SA_W-1:0]  sys_A,
  input  logic             sys_ADSn,
  input  logic             sys_R_Wn,
  input  logic [DW-1:0]    sys_D,
  input  logic [DW/8-1:0]  sys_DMSEL,
  input  logic             sys_REF_REQ,
  output logic             sys_REF_ACK,
  output logic             sys_D_REQ,
  output logic [DW-1:0]    sys_Q,
  output logic             sys_D_VALID,
  output logic             sys_RDYn,
  output logic             sys_INIT_DONE,
  output logic             sys_CYC_END,
  output logic             ddr_CK,
  output logic             ddr_CKn,
  output logic             ddr_CKE,
  output logic             ddr_CSn,
  output logic             ddr_RASn,
  output logic             ddr_CASn,
  output logic             ddr_WEn,
  output logic [BA_W-1:0]  ddr_BA,
  output logic [A_W-1:0]   ddr_A,
  output logic [DW-1:0]    ddr_DQ_o,
  output logic             ddr_DQ_oe,
  input  logic [DW-1:0]    ddr_DQ_i,
  output logic [DW/8-1:0]  ddr_DQM,
  output logic             ddr_DQS_o,
  output logic             ddr_DQS_oe
);

  init_state_t iState;
  cmd_state_t  cState;

  assign ddr_CK  = sys_CLK;
  assign ddr_CKn = ~sys_CLK;

  ddr_ctrl #(.TRP(TRP), .TRFC(TRFC), .TMRD(TMRD), .TRCD(TRCD), .TDAL(TDAL),
             .CL(CL), .BL(BL), .REF_INT(REF_INT), .CNT_W(16)) u_ctrl (
    .clk(sys_CLK), .rst(sys_RESET), .sys_DLY_100US, .sys_ADSn, .sys_R_Wn,
    .sys_REF_REQ, .sys_REF_ACK, .sys_INIT_DONE, .sys_CYC_END,
    .iState, .cState, .clkCNT()
  );

  ddr_sig #(.CL(CL), .BL(BL)) u_sig (
    .clk(sys_CLK), .rst(sys_RESET), .iState, .cState, .sys_A,
    .ddr_CKE, .ddr_CSn, .ddr_RASn, .ddr_CASn, .ddr_WEn, .ddr_BA, .ddr_A
  );

  ddr_data #(.DW(DW)) u_data (
    .clk(sys_CLK), .rst(sys_RESET), .cState,
    .sys_D, .sys_DMSEL, .sys_D_REQ, .sys_Q, .sys_D_VALID, .sys_RDYn,
    .ddr_DQ_o, .ddr_DQ_oe, .ddr_DQ_i, .ddr_DQM, .ddr_DQS_o, .ddr_DQS_oe
  );

endmodule

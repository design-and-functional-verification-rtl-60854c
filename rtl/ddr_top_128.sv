// ddr_top_128: the 128-bit DDR SDRAM controller. It is built, as the design
// prescribes, from two unchanged 64-bit controllers (ddr_top) in one module.
// Each half has its own command, bank and address outputs, so the two halves
// can open and access two banks in the same clock cycles; together they move
// 128 data bits per beat. Bank and address inputs and outputs of the halves
// are concatenated, half 0 in the low bits: ddr_BA is {BA1, BA0}, ddr_A is
// {A1, A0}, sys_D and sys_Q are {D1, D0}, and every one-bit control is a
// 2-bit vector indexed by half.
//
// Shared by both halves: the clock, the reset and the power-up delay flag.
// Everything else is per half and behaves exactly as in ddr_top; each half
// drives its own SDRAM device (or its own chip select and 64 data lines of a
// 128-bit module). The number of halves is a parameter, NCTRL = 2; the
// timing parameters are passed to both halves alike.
module ddr_top_128
  import ddr_pkg::*;
#(
  parameter int unsigned NCTRL   = 2,
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
  input  logic                        sys_CLK,
  input  logic                        sys_RESET,
  input  logic                        sys_DLY_100US,
  input  logic [NCTRL-1:0][SA_W-1:0]  sys_A,
  input  logic [NCTRL-1:0]            sys_ADSn,
  input  logic [NCTRL-1:0]            sys_R_Wn,
  input  logic [NCTRL*DW-1:0]         sys_D,
  input  logic [NCTRL*DW/8-1:0]       sys_DMSEL,
  input  logic [NCTRL-1:0]            sys_REF_REQ,
  output logic [NCTRL-1:0]            sys_REF_ACK,
  output logic [NCTRL-1:0]            sys_D_REQ,
  output logic [NCTRL*DW-1:0]         sys_Q,
  output logic [NCTRL-1:0]            sys_D_VALID,
  output logic [NCTRL-1:0]            sys_RDYn,
  output logic [NCTRL-1:0]            sys_INIT_DONE,
  output logic [NCTRL-1:0]            sys_CYC_END,
  output logic [NCTRL-1:0]            ddr_CK,
  output logic [NCTRL-1:0]            ddr_CKn,
  output logic [NCTRL-1:0]            ddr_CKE,
  output logic [NCTRL-1:0]            ddr_CSn,
  output logic [NCTRL-1:0]            ddr_RASn,
  output logic [NCTRL-1:0]            ddr_CASn,
  output logic [NCTRL-1:0]            ddr_WEn,
  output logic [NCTRL-1:0][BA_W-1:0]  ddr_BA,
  output logic [NCTRL-1:0][A_W-1:0]   ddr_A,
  output logic [NCTRL*DW-1:0]         ddr_DQ_o,
  output logic [NCTRL-1:0]            ddr_DQ_oe,
  input  logic [NCTRL*DW-1:0]         ddr_DQ_i,
  output logic [NCTRL*DW/8-1:0]       ddr_DQM,
  output logic [NCTRL-1:0]            ddr_DQS_o,
  output logic [NCTRL-1:0]            ddr_DQS_oe
);

  for (genvar h = 0; h < NCTRL; h++) begin : g_half
    ddr_top #(.DW(DW), .TRP(TRP), .TRFC(TRFC), .TMRD(TMRD), .TRCD(TRCD), .TDAL(TDAL),
              .CL(CL), .BL(BL), .REF_INT(REF_INT)) u_ddr (
      .sys_CLK, .sys_RESET, .sys_DLY_100US,
      .sys_A       (sys_A[h]),
      .sys_ADSn    (sys_ADSn[h]),
      .sys_R_Wn    (sys_R_Wn[h]),
      .sys_D       (sys_D[h*DW +: DW]),
      .sys_DMSEL   (sys_DMSEL[h*DW/8 +: DW/8]),
      .sys_REF_REQ (sys_REF_REQ[h]),
      .sys_REF_ACK (sys_REF_ACK[h]),
      .sys_D_REQ   (sys_D_REQ[h]),
      .sys_Q       (sys_Q[h*DW +: DW]),
      .sys_D_VALID (sys_D_VALID[h]),
      .sys_RDYn    (sys_RDYn[h]),
      .sys_INIT_DONE(sys_INIT_DONE[h]),
      .sys_CYC_END (sys_CYC_END[h]),
      .ddr_CK      (ddr_CK[h]),
      .ddr_CKn     (ddr_CKn[h]),
      .ddr_CKE     (ddr_CKE[h]),
      .ddr_CSn     (ddr_CSn[h]),
      .ddr_RASn    (ddr_RASn[h]),
      .ddr_CASn    (ddr_CASn[h]),
      .ddr_WEn     (ddr_WEn[h]),
      .ddr_BA      (ddr_BA[h]),
      .ddr_A       (ddr_A[h]),
      .ddr_DQ_o    (ddr_DQ_o[h*DW +: DW]),
      .ddr_DQ_oe   (ddr_DQ_oe[h]),
      .ddr_DQ_i    (ddr_DQ_i[h*DW +: DW]),
      .ddr_DQM     (ddr_DQM[h*DW/8 +: DW/8]),
      .ddr_DQS_o   (ddr_DQS_o[h]),
      .ddr_DQS_oe  (ddr_DQS_oe[h])
    );
  end

endmodule

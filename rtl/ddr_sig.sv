// ddr_sig: the signal generation module. It decodes the two states of the
// main control module (iState while initializing, cState afterwards) into
// the DDR SDRAM command pins and the bank/address bus.
//
// sys_A is {bank, row, column}. The address multiplexer of the design puts
// the row on ddr_A for ACTIVE and the column for READ/WRITE; here the column
// is placed on A[CA_W-1:0] with A10 set, which selects auto precharge, so
// every access closes its row again (the design uses READA/WRITEA commands).
// PRECHARGE during initialization sets A10 to close all banks, and LOAD MODE
// REGISTER drives the mode word (sequential burst of BL, CAS latency CL) on
// ddr_A with bank address 0.
//
// Commands, in {CSn, RASn, CASn, WEn}:
//   I_PRE PRECHARGE, I_AR1/I_AR2/C_AR AUTO REFRESH, I_MRS LOAD MODE REGISTER,
//   C_ACTIVE ACTIVE, C_READA READ, C_WRITEA WRITE, reset/I_IDLE DESELECT,
//   every other state NOP.
// ddr_CKE is low only in reset and I_IDLE.
// Timing: all outputs are registered, so the pins show a state's command in
// the cycle after the state; the data path accounts for that cycle.
// The command encodings are the standard SDRAM truth table; the register
// stage and the column placement are this design's choices.
module ddr_sig
  import ddr_pkg::*;
#(
  parameter int unsigned CL = CAS_LAT,
  parameter int unsigned BL = BURST
) (
  input  logic             clk,
  input  logic             rst,
  input  init_state_t      iState,
  input  cmd_state_t       cState,
  input  logic [SA_W-1:0]  sys_A,
  output logic             ddr_CKE,
  output logic             ddr_CSn,
  output logic             ddr_RASn,
  output logic             ddr_CASn,
  output logic             ddr_WEn,
  output logic [BA_W-1:0]  ddr_BA,
  output logic [A_W-1:0]   ddr_A
);

  localparam logic [A_W-1:0] MODE = mode_word(CL, BL);

  logic [BA_W-1:0] bank;
  logic [RA_W-1:0] row;
  logic [CA_W-1:0] col;
  logic [A_W-1:0]  row_a, col_a;

  ddr_cmd_t        cmd;
  logic [BA_W-1:0] ba_n;
  logic [A_W-1:0]  a_n;

  assign {bank, row, col} = sys_A;
  assign row_a = A_W'(row);

  always_comb begin
    col_a     = '0;
    col_a[CA_W-1:0] = col;
    col_a[10] = 1'b1;                 // auto precharge
  end

  always_comb begin
    cmd  = CMD_NOP;
    ba_n = '0;
    a_n  = '0;
    if (iState != I_READY) begin
      unique case (iState)
        I_IDLE:       cmd = CMD_DESEL;
        I_PRE:        begin cmd = CMD_PRE; a_n[10] = 1'b1; end
        I_AR1, I_AR2: cmd = CMD_AREF;
        I_MRS:        begin cmd = CMD_MRS; a_n = MODE; end
        default:      cmd = CMD_NOP;
      endcase
    end else begin
      unique case (cState)
        C_AR:     cmd = CMD_AREF;
        C_ACTIVE: begin cmd = CMD_ACTIVE; ba_n = bank; a_n = row_a; end
        C_READA:  begin cmd = CMD_READ;   ba_n = bank; a_n = col_a; end
        C_WRITEA: begin cmd = CMD_WRITE;  ba_n = bank; a_n = col_a; end
        default:  cmd = CMD_NOP;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ddr_CKE <= 1'b0;
      {ddr_CSn, ddr_RASn, ddr_CASn, ddr_WEn} <= CMD_DESEL;
      ddr_BA  <= '0;
      ddr_A   <= '0;
    end else begin
      ddr_CKE <= (iState != I_IDLE);
      {ddr_CSn, ddr_RASn, ddr_CASn, ddr_WEn} <= cmd;
      ddr_BA  <= ba_n;
      ddr_A   <= a_n;
    end
  end

endmodule

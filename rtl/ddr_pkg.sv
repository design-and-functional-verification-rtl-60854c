// ddr_pkg: types and constants shared by the DDR SDRAM controller.
//
// It holds the state encodings of the two state machines of the main control
// module (the initialization FSM's iState and the command FSM's cState), the
// DDR command encoding driven on {CSn, RASn, CASn, WEn}, the default geometry
// (8 banks, 13 row bits, 10 column bits, 64-bit data per controller) and the
// default timing, in controller clock cycles.
//
// The state names follow the state diagrams of the design. The numeric timing
// values are this design's own choice (typical DDR-266 figures rounded up to a
// 133 MHz clock); every one of them is a parameter of the modules that use it.
package ddr_pkg;

  // Geometry. 8 banks and 64 data bits per controller belong to the design;
  // the row and column widths are chosen to fit a 13-bit DDR address bus.
  localparam int unsigned BA_W   = 3;    // bank address bits (8 banks)
  localparam int unsigned RA_W   = 13;   // row address bits
  localparam int unsigned CA_W   = 10;   // column address bits
  localparam int unsigned A_W    = 13;   // DDR address bus width
  localparam int unsigned DSIZE  = 64;   // data bits per controller
  localparam int unsigned SA_W   = BA_W + RA_W + CA_W; // system address {bank,row,col}

  // Default timing in clock cycles.
  localparam int unsigned T_RP   = 3;    // PRECHARGE to next command
  localparam int unsigned T_RFC  = 10;   // AUTO REFRESH to next command
  localparam int unsigned T_MRD  = 2;    // LOAD MODE REGISTER to next command
  localparam int unsigned T_RCD  = 3;    // ACTIVE to READ/WRITE
  localparam int unsigned T_DAL  = 5;    // last write beat to ACTIVE (tWR + tRP)
  localparam int unsigned CAS_LAT = 2;   // CAS latency
  localparam int unsigned BURST  = 4;    // burst length in beats
  localparam int unsigned REF_INTERVAL = 1040; // cycles between automatic refreshes (7.8 us)

  // Initialization FSM states (iState).
  typedef enum logic [3:0] {
    I_IDLE, I_NOP, I_PRE, I_TRP, I_AR1, I_TRFC1, I_AR2, I_TRFC2,
    I_MRS, I_TMRD, I_READY
  } init_state_t;

  // Command FSM states (cState).
  typedef enum logic [3:0] {
    C_IDLE, C_AR, C_TRFC, C_ACTIVE, C_TRCD, C_READA, C_CL, C_RDATA,
    C_WRITEA, C_WDATA, C_TDAL
  } cmd_state_t;

  // DDR command on {CSn, RASn, CASn, WEn}.
  typedef enum logic [3:0] {
    CMD_DESEL  = 4'b1111,
    CMD_NOP    = 4'b0111,
    CMD_ACTIVE = 4'b0011,
    CMD_READ   = 4'b0101,
    CMD_WRITE  = 4'b0100,
    CMD_PRE    = 4'b0010,
    CMD_AREF   = 4'b0001,
    CMD_MRS    = 4'b0000
  } ddr_cmd_t;

  // Mode register word: burst type sequential, burst length in A[2:0],
  // CAS latency in A[6:4], as in the JEDEC DDR mode register.
  function automatic logic [A_W-1:0] mode_word(int unsigned cl, int unsigned bl);
    logic [A_W-1:0] m;
    m = '0;
    case (bl)
      2:       m[2:0] = 3'b001;
      8:       m[2:0] = 3'b011;
      default: m[2:0] = 3'b010;
    endcase
    m[6:4] = (cl == 3) ? 3'b011 : 3'b010;
    return m;
  endfunction

endpackage

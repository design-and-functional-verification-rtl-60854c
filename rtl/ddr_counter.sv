// ddr_counter: the counter module of the main control block.
//
// It measures how long the two state machines have stayed in their current
// state and turns that into the "end of delay" flags their wait states leave
// on, and it holds the refresh counter that asks for an automatic refresh.
//
// clkCNT is 0 in the first cycle of every state (of either FSM) and counts up
// by one per cycle while neither state changes. A wait state that follows a
// command and must make the next command come D cycles after it lasts D-1
// cycles, so its flag is clkCNT >= D-2. The read-burst state lasts BURST
// cycles (flag clkCNT >= BURST-1), the write-data state BURST-1 cycles (the
// WRITEA cycle carries the first beat) and tDAL lasts T_DAL cycles.
// All flags are combinational from registers.
//
// The refresh counter runs once initialization is done and pulses ref_due for
// one cycle every REF_INTERVAL cycles. The design states that the controller
// refreshes the SDRAM by itself and that the main control module holds a
// refresh counter; the interval is this design's choice (7.8 us at 133 MHz).
module ddr_counter
  import ddr_pkg::*;
#(
  parameter int unsigned TRP      = T_RP,
  parameter int unsigned TRFC     = T_RFC,
  parameter int unsigned TMRD     = T_MRD,
  parameter int unsigned TRCD     = T_RCD,
  parameter int unsigned TDAL     = T_DAL,
  parameter int unsigned CL       = CAS_LAT,
  parameter int unsigned BL       = BURST,
  parameter int unsigned REF_INT  = REF_INTERVAL,
  parameter int unsigned CNT_W    = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  init_state_t       iState,
  input  cmd_state_t        cState,
  input  logic              init_done,
  output logic [CNT_W-1:0]  clkCNT,
  output logic              endOf_tRP,
  output logic              endOf_tRFC,
  output logic              endOf_tMRD,
  output logic              endOf_tRCD,
  output logic              endOf_Cas_Latency,
  output logic              endOf_Read_Burst,
  output logic              endOf_Write_Burst,
  output logic              endOf_tDAL,
  output logic              ref_due
);

  init_state_t       iState_q;
  cmd_state_t        cState_q;
  logic [CNT_W-1:0]  cnt_q;
  logic [CNT_W-1:0]  ref_cnt;
  logic              changed;

  // Compare a count with a delay less a constant, saturating at zero.
  function automatic logic reached(logic [CNT_W-1:0] c, int unsigned d, int unsigned k);
    return (d <= k) ? 1'b1 : (32'(c) >= d - k);
  endfunction

  assign changed = (iState != iState_q) || (cState != cState_q);
  // saturate so a long stay cannot wrap back to zero
  assign clkCNT  = changed ? '0 : ((&cnt_q) ? cnt_q : cnt_q + 1'b1);

  always_ff @(posedge clk) begin
    if (rst) begin
      iState_q <= I_IDLE;
      cState_q <= C_IDLE;
      cnt_q    <= '0;
    end else begin
      iState_q <= iState;
      cState_q <= cState;
      cnt_q    <= clkCNT;
    end
  end

  assign endOf_tRP         = reached(clkCNT, TRP,  2);
  assign endOf_tRFC        = reached(clkCNT, TRFC, 2);
  assign endOf_tMRD        = reached(clkCNT, TMRD, 2);
  assign endOf_tRCD        = reached(clkCNT, TRCD, 2);
  assign endOf_Cas_Latency = reached(clkCNT, CL,   2);
  assign endOf_Read_Burst  = reached(clkCNT, BL,   1);
  assign endOf_Write_Burst = reached(clkCNT, BL,   2);
  assign endOf_tDAL        = reached(clkCNT, TDAL, 1);

  // Refresh interval counter.
  always_ff @(posedge clk) begin
    if (rst || !init_done) begin
      ref_cnt <= '0;
      ref_due <= 1'b0;
    end else if (32'(ref_cnt) >= REF_INT - 1) begin
      ref_cnt <= '0;
      ref_due <= 1'b1;
    end else begin
      ref_cnt <= ref_cnt + 1'b1;
      ref_due <= 1'b0;
    end
  end

endmodule

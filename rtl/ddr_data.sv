// ddr_data: the data path module, the bridge that carries burst data between
// the bus master and the SDRAM data pins. It follows the design's data path
// figure: on the write side sys_D passes two clocked registers and then an
// output driver enabled by OE onto DQ; on the read side DQ passes two clocked
// registers to sys_Q. Which cycles carry data is decoded from cState.
//
// Write timing: sys_D_REQ is high in C_WRITEA and C_WDATA, BL cycles in all;
// the master must present one beat of sys_D (and its byte mask sys_DMSEL) in
// each of those cycles. Each beat reaches the pins two cycles later, which
// is one cycle after the registered WRITE command (write latency one clock).
// ddr_DQ_oe, ddr_DQS_oe and the DQ mask ddr_DQM follow the same pipeline;
// ddr_DQS_o toggles once per beat while driven.
//
// Read timing: the SDRAM drives beat k CL+k cycles after the pins show READ,
// i.e. in the cycles the FSM spends in C_RDATA plus one. After the two
// capture registers the beat is on sys_Q, with sys_D_VALID high, three
// cycles after the matching C_RDATA cycle.
//
// The tri-state driver of the figure is split into ddr_DQ_o / ddr_DQ_oe /
// ddr_DQ_i here so that the pad can be placed outside the controller. One
// beat moves per clock cycle on each side; the double-edge transfer at the
// pins belongs to the I/O cells and is not modelled. The strobe and mask
// handling are this design's own choices. sys_RDYn is the active-low data
// ready strobe of the system interface: low in every cycle in which a write
// beat is taken or a read beat is delivered.
module ddr_data
  import ddr_pkg::*;
#(
  parameter int unsigned DW = DSIZE
) (
  input  logic              clk,
  input  logic              rst,
  input  cmd_state_t        cState,
  // bus master side
  input  logic [DW-1:0]     sys_D,
  input  logic [DW/8-1:0]   sys_DMSEL,
  output logic              sys_D_REQ,
  output logic [DW-1:0]     sys_Q,
  output logic              sys_D_VALID,
  output logic              sys_RDYn,
  // SDRAM side
  output logic [DW-1:0]     ddr_DQ_o,
  output logic              ddr_DQ_oe,
  input  logic [DW-1:0]     ddr_DQ_i,
  output logic [DW/8-1:0]   ddr_DQM,
  output logic              ddr_DQS_o,
  output logic              ddr_DQS_oe
);

  logic [DW-1:0]   wr_r1, wr_r2, rd_r1, rd_r2;
  logic [DW/8-1:0] dm_r1, dm_r2;
  logic            oe_r1, oe_r2;
  logic [2:0]      rd_v;

  assign sys_D_REQ = (cState == C_WRITEA) || (cState == C_WDATA);

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_r1 <= '0; wr_r2 <= '0;
      dm_r1 <= '0; dm_r2 <= '0;
      oe_r1 <= 1'b0; oe_r2 <= 1'b0;
      ddr_DQS_o <= 1'b0;
      rd_r1 <= '0; rd_r2 <= '0;
      rd_v  <= '0;
    end else begin
      // write side
      wr_r1 <= sys_D;
      wr_r2 <= wr_r1;
      dm_r1 <= sys_D_REQ ? sys_DMSEL : '0;
      dm_r2 <= dm_r1;
      oe_r1 <= sys_D_REQ;
      oe_r2 <= oe_r1;
      ddr_DQS_o <= oe_r1 ? ~ddr_DQS_o : 1'b0;
      // read side
      rd_r1 <= ddr_DQ_i;
      rd_r2 <= rd_r1;
      rd_v  <= {rd_v[1:0], cState == C_RDATA};
    end
  end

  assign ddr_DQ_o    = wr_r2;
  assign ddr_DQ_oe   = oe_r2;
  assign ddr_DQM     = dm_r2;
  assign ddr_DQS_oe  = oe_r2;
  assign sys_Q       = rd_r2;
  assign sys_D_VALID = rd_v[2];
  assign sys_RDYn     = !(sys_D_REQ || sys_D_VALID);

  // A write burst on the pins never overlaps read data arriving.
  a_no_bus_clash: assert property (@(posedge clk) disable iff (rst)
    !(ddr_DQ_oe && rd_v[0]));

endmodule

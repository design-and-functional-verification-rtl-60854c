// tb_ddr_counter: unit test of the counter module.
//
// It drives iState and cState directly: each state is held for a chosen
// number of cycles, and the testbench checks that clkCNT is 0 in the first
// cycle of every state and counts up by one per cycle after that, and that
// each endOf flag rises exactly in the cycle where the wait state it serves
// must end (after D-1 cycles for tRP, tRFC, tMRD, tRCD and CAS latency, BL
// cycles for a read burst, BL-1 for a write burst, tDAL cycles for tDAL). With
// a short refresh interval it checks that ref_due pulses once every interval
// after initialization, and never before.
module tb_ddr_counter;
  import ddr_pkg::*;

  localparam int unsigned RI = 37;

  logic clk = 0, rst = 1, init_done = 0;
  init_state_t ist = I_IDLE;
  cmd_state_t  cst = C_IDLE;
  logic [15:0] clkCNT;
  logic e_rp, e_rfc, e_mrd, e_rcd, e_cl, e_rb, e_wb, e_dal, ref_due;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ddr_counter #(.REF_INT(RI)) dut (.clk, .rst, .iState(ist), .cState(cst), .init_done,
    .clkCNT, .endOf_tRP(e_rp), .endOf_tRFC(e_rfc), .endOf_tMRD(e_mrd), .endOf_tRCD(e_rcd),
    .endOf_Cas_Latency(e_cl), .endOf_Read_Burst(e_rb), .endOf_Write_Burst(e_wb),
    .endOf_tDAL(e_dal), .ref_due);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // hold a state for len cycles; flag must first be high in cycle `at` (0-based)
  task automatic hold(bit is_init, init_state_t i, cmd_state_t c, int len,
                      int which, int at, string what);
    ist <= is_init ? i : I_READY;
    cst <= c;
    for (int k = 0; k < len; k++) begin
      logic f;
      @(posedge clk);
      check(clkCNT == 16'(k), $sformatf("%s: clkCNT %0d in cycle %0d", what, clkCNT, k));
      case (which)
        0: f = e_rp;  1: f = e_rfc; 2: f = e_mrd; 3: f = e_rcd;
        4: f = e_cl;  5: f = e_rb;  6: f = e_wb;  default: f = e_dal;
      endcase
      check(f == (k >= at), $sformatf("%s: flag %0d in cycle %0d", what, f, k));
    end
  endtask

  initial begin
    int n_due, first;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    hold(1, I_TRP,   C_IDLE,   8,  0, T_RP - 2,    "tRP");
    hold(1, I_TRFC1, C_IDLE,   14, 1, T_RFC - 2,   "tRFC");
    hold(1, I_TMRD,  C_IDLE,   6,  2, T_MRD - 2,   "tMRD");
    hold(0, I_READY, C_TRCD,   8,  3, T_RCD - 2,   "tRCD");
    hold(0, I_READY, C_CL,     6,  4, CAS_LAT - 2, "CAS latency");
    hold(0, I_READY, C_RDATA,  8,  5, BURST - 1,   "read burst");
    hold(0, I_READY, C_WDATA,  8,  6, BURST - 2,   "write burst");
    hold(0, I_READY, C_TDAL,   9,  7, T_DAL - 1,   "tDAL");
    check(ref_due == 0, "no refresh before init");
    // refresh interval
    cst <= C_IDLE;
    init_done <= 1;
    n_due = 0; first = -1;
    for (int k = 0; k < 4 * RI + 3; k++) begin
      @(posedge clk);
      if (ref_due) begin
        if (first < 0) first = k;
        else check((k - first) % RI == 0, $sformatf("refresh pulse at %0d", k));
        n_due++;
      end
    end
    check(n_due == 4, $sformatf("%0d refresh pulses in four intervals", n_due));
    check(first == RI, $sformatf("first refresh pulse after %0d cycles", first));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

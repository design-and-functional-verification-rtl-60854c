// tb_ddr_init_fsm: unit test of the initialization FSM.
//
// The testbench plays the counter module: it counts the cycles each DUT has
// spent in its current state and raises endOf_tRP/tRFC/tMRD after D-1 cycles
// of the matching wait state. It records the sequence of states and checks it
// against the power-up order (IDLE, NOP, PRE, tRP, AR1, tRFC1, AR2, tRFC2,
// MRS, tMRD, READY), that the FSM waits in I_NOP for sys_DLY_100US, how many
// cycles the sequence takes, and that sys_INIT_DONE comes with I_READY. A
// second instance with one-cycle delays must take the direct arcs that skip
// the wait states.
module tb_ddr_init_fsm;
  import ddr_pkg::*;

  logic clk = 0, rst = 1, dly = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // instance 0: default delays; instance 1: all delays one cycle
  init_state_t st [2];
  logic        done [2];
  int          cnt [2];
  logic        e_rp [2], e_rfc [2], e_mrd [2];
  init_state_t seq0 [$], seq1 [$];

  ddr_init_fsm dut0 (.clk, .rst, .sys_DLY_100US(dly), .endOf_tRP(e_rp[0]),
    .endOf_tRFC(e_rfc[0]), .endOf_tMRD(e_mrd[0]), .iState(st[0]), .sys_INIT_DONE(done[0]));
  ddr_init_fsm #(.TRP(1), .TRFC(1), .TMRD(1)) dut1 (.clk, .rst, .sys_DLY_100US(dly),
    .endOf_tRP(e_rp[1]), .endOf_tRFC(e_rfc[1]), .endOf_tMRD(e_mrd[1]), .iState(st[1]),
    .sys_INIT_DONE(done[1]));

  // the stand-in counter module
  init_state_t prev [2];
  always @(posedge clk) for (int i = 0; i < 2; i++) begin
    prev[i] <= st[i];
    cnt[i]  <= (st[i] != prev[i]) ? 1 : cnt[i] + 1;
  end
  for (genvar i = 0; i < 2; i++) begin : g_flags
    int c;
    assign c = (st[i] != prev[i]) ? 0 : cnt[i];
    assign e_rp[i]  = c >= int'(T_RP)  - 2;
    assign e_rfc[i] = c >= int'(T_RFC) - 2;
    assign e_mrd[i] = c >= int'(T_MRD) - 2;
  end

  always @(posedge clk) if (!rst) begin
    if (seq0.size() == 0 || seq0[$] != st[0]) seq0.push_back(st[0]);
    if (seq1.size() == 0 || seq1[$] != st[1]) seq1.push_back(st[1]);
    checks++;
    if (done[0] != (st[0] == I_READY)) begin failures++; $display("FAIL: INIT_DONE"); end
  end

  initial begin
    int n;
    init_state_t exp0 [$], exp1 [$];
    prev[0] = I_IDLE; prev[1] = I_IDLE; cnt[0] = 0; cnt[1] = 0;
    exp0 = '{I_IDLE, I_NOP, I_PRE, I_TRP, I_AR1, I_TRFC1, I_AR2, I_TRFC2, I_MRS, I_TMRD, I_READY};
    exp1 = '{I_IDLE, I_NOP, I_PRE, I_AR1, I_AR2, I_MRS, I_READY};
    repeat (3) @(posedge clk);
    checks++;
    if (st[0] != I_IDLE || done[0]) begin failures++; $display("FAIL: reset state"); end
    rst <= 0;
    repeat (30) @(posedge clk);
    checks++;
    if (st[0] != I_NOP || st[1] != I_NOP) begin failures++; $display("FAIL: waits in I_NOP"); end
    dly <= 1;
    n = 0;
    forever begin @(posedge clk); if (done[0]) break; n++; end
    checks++;
    if (n != int'(T_RP + 2 * T_RFC + T_MRD + 1)) begin
      failures++; $display("FAIL: sequence took %0d cycles", n);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (seq0 != exp0) begin failures++; $display("FAIL: state order %p", seq0); end
    checks++;
    if (seq1 != exp1) begin failures++; $display("FAIL: short-delay order %p", seq1); end
    checks++;
    if (!done[1]) begin failures++; $display("FAIL: short-delay instance not ready"); end
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

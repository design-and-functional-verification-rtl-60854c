// tb_ddr_ctrl: test of the main control module (both FSMs with the real
// counter module between them), with a short refresh interval.
//
// It checks the length of the power-up sequence, that the command FSM stays
// idle until sys_INIT_DONE, the state sequence and per-state durations of a
// read and of a write access, that sys_CYC_END ends each access, that the
// refresh counter starts one refresh per interval while the bus is idle, and
// that a requested refresh is acknowledged. Expected durations follow from the
// timing parameters: tRCD-1 cycles in C_TRCD, CL-1 in C_CL, BL in C_RDATA,
// BL-1 in C_WDATA, tDAL in C_TDAL, tRFC-1 in C_TRFC.
module tb_ddr_ctrl;
  import ddr_pkg::*;

  localparam int unsigned RI = 200;

  logic clk = 0, rst = 1, dly = 0, adsn = 1, rwn = 1, ref_req = 0;
  logic ref_ack, done, cyc_end;
  init_state_t ist;
  cmd_state_t cst;
  logic [15:0] clkCNT;
  int checks = 0, failures = 0, n_ack = 0;

  typedef struct { cmd_state_t s; int len; } visit_t;
  visit_t log_q [$];

  always #5 clk = ~clk;

  ddr_ctrl #(.REF_INT(RI)) dut (.clk, .rst, .sys_DLY_100US(dly), .sys_ADSn(adsn),
    .sys_R_Wn(rwn), .sys_REF_REQ(ref_req), .sys_REF_ACK(ref_ack), .sys_INIT_DONE(done),
    .sys_CYC_END(cyc_end), .iState(ist), .cState(cst), .clkCNT);

  always @(posedge clk) if (!rst) begin
    if (ref_ack) n_ack++;
    if (log_q.size() != 0 && log_q[$].s == cst) log_q[$].len++;
    else log_q.push_back('{cst, 1});
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic expect_log(visit_t exp [$], string what);
    check(log_q.size() >= exp.size(), {what, ": too few states"});
    for (int i = 0; i < exp.size() && i < log_q.size(); i++)
      check(log_q[i].s == exp[i].s && (exp[i].len == 0 || log_q[i].len == exp[i].len),
            $sformatf("%s: step %0d is %s for %0d cycles", what, i, log_q[i].s.name(), log_q[i].len));
    log_q.delete();
  endtask

  task automatic access(bit rd);
    log_q.delete();
    adsn <= 0; rwn <= rd;
    do @(posedge clk); while (!cyc_end);
    adsn <= 1;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst <= 0;
    adsn <= 0;                  // a request during power-up must wait
    repeat (20) @(posedge clk);
    check(cst == C_IDLE && ist == I_NOP && !done, "waiting for the power-up delay");
    adsn <= 1;
    dly <= 1;
    n = 0;
    forever begin @(posedge clk); if (done) break; n++; end
    check(n == int'(T_RP + 2 * T_RFC + T_MRD + 1), $sformatf("initialization %0d cycles", n));
    check(ist == I_READY, "I_READY");
    access(1'b1);
    expect_log('{'{C_IDLE, 0}, '{C_ACTIVE, 1}, '{C_TRCD, T_RCD - 1}, '{C_READA, 1},
                 '{C_CL, CAS_LAT - 1}, '{C_RDATA, BURST}, '{C_IDLE, 0}}, "read");
    access(1'b0);
    expect_log('{'{C_IDLE, 0}, '{C_ACTIVE, 1}, '{C_TRCD, T_RCD - 1}, '{C_WRITEA, 1},
                 '{C_WDATA, BURST - 1}, '{C_TDAL, T_DAL}, '{C_IDLE, 0}}, "write");
    // requested refresh
    n_ack = 0;
    log_q.delete();
    ref_req <= 1; @(posedge clk); ref_req <= 0;
    repeat (T_RFC + 3) @(posedge clk);
    check(n_ack == 1, "requested refresh acknowledged");
    expect_log('{'{C_IDLE, 0}, '{C_AR, 1}, '{C_TRFC, T_RFC - 1}, '{C_IDLE, 0}}, "refresh");
    // idle: automatic refreshes, one per interval
    n_ack = 0;
    repeat (5 * RI) @(posedge clk);
    check(n_ack == 5, $sformatf("%0d automatic refreshes in five intervals", n_ack));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_ddr_cmd_fsm: unit test of the command FSM.
//
// The testbench stands in for the counter module (it raises each endOf flag
// once the wait state has lasted its expected number of cycles) and for the
// bus master. It records every state the FSM passes through with the number of
// cycles spent there and compares the list with the expected one for: no
// access before sys_INIT_DONE, a requested refresh, a read, a write, and a
// refresh and an access requested together (the refresh goes first). It also
// checks sys_REF_ACK and sys_CYC_END.
module tb_ddr_cmd_fsm;
  import ddr_pkg::*;

  logic clk = 0, rst = 1;
  logic init_done = 0, adsn = 1, rwn = 1, ref_req = 0, ref_due = 0;
  logic e_rfc, e_rcd, e_cl, e_rb, e_wb, e_dal;
  cmd_state_t st, prev;
  logic latch, ref_ack, cyc_end;
  int cnt = 0, c;
  int checks = 0, failures = 0, n_ack = 0, n_end = 0;

  typedef struct { cmd_state_t s; int len; } visit_t;
  visit_t log_q [$];

  always #5 clk = ~clk;

  ddr_cmd_fsm dut (.clk, .rst, .sys_INIT_DONE(init_done), .sys_ADSn(adsn), .sys_R_Wn(rwn),
    .sys_REF_REQ(ref_req), .ref_due, .endOf_tRFC(e_rfc), .endOf_tRCD(e_rcd),
    .endOf_Cas_Latency(e_cl), .endOf_Read_Burst(e_rb), .endOf_Write_Burst(e_wb),
    .endOf_tDAL(e_dal), .cState(st), .latch_ref_req(latch), .sys_REF_ACK(ref_ack),
    .sys_CYC_END(cyc_end));

  assign c     = (st != prev) ? 0 : cnt;
  assign e_rfc = c >= int'(T_RFC) - 2;
  assign e_rcd = c >= int'(T_RCD) - 2;
  assign e_cl  = c >= int'(CAS_LAT) - 2;
  assign e_rb  = c >= int'(BURST) - 1;
  assign e_wb  = c >= int'(BURST) - 2;
  assign e_dal = c >= int'(T_DAL) - 1;

  always @(posedge clk) begin
    prev <= st;
    cnt  <= c + 1;
    if (ref_ack) n_ack++;
    if (cyc_end) n_end++;
    if (!rst) begin
      if (log_q.size() != 0 && log_q[$].s == st) log_q[$].len++;
      else log_q.push_back('{st, 1});
    end
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
    adsn <= 0; rwn <= rd;
    do @(posedge clk); while (!cyc_end);
    adsn <= 1;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    prev = C_IDLE;
    repeat (3) @(posedge clk);
    rst <= 0;
    // requests before initialization are ignored
    adsn <= 0; ref_req <= 1;
    repeat (10) @(posedge clk);
    adsn <= 1; ref_req <= 0;
    check(st == C_IDLE, "idle before init");
    init_done <= 1;
    // the refresh requested during initialization was latched: it runs now
    repeat (T_RFC + 4) @(posedge clk);
    log_q.delete();
    check(n_ack == 1, "latched refresh ran after init");
    // requested refresh
    ref_req <= 1; @(posedge clk); ref_req <= 0;
    repeat (T_RFC + 4) @(posedge clk);
    expect_log('{'{C_IDLE, 0}, '{C_AR, 1}, '{C_TRFC, T_RFC - 1}, '{C_IDLE, 0}}, "refresh");
    check(n_ack == 2 && !latch, "refresh acknowledged once, latch cleared");
    // read
    n_end = 0;
    access(1'b1);
    expect_log('{'{C_IDLE, 0}, '{C_ACTIVE, 1}, '{C_TRCD, T_RCD - 1}, '{C_READA, 1},
                 '{C_CL, CAS_LAT - 1}, '{C_RDATA, BURST}, '{C_IDLE, 0}}, "read");
    check(n_end == 1, "one sys_CYC_END per read");
    // write
    access(1'b0);
    expect_log('{'{C_IDLE, 0}, '{C_ACTIVE, 1}, '{C_TRCD, T_RCD - 1}, '{C_WRITEA, 1},
                 '{C_WDATA, BURST - 1}, '{C_TDAL, T_DAL}, '{C_IDLE, 0}}, "write");
    check(n_end == 2, "one sys_CYC_END per write");
    // refresh due together with an access: refresh first
    ref_due <= 1; @(posedge clk); ref_due <= 0;
    access(1'b1);
    expect_log('{'{C_IDLE, 0}, '{C_AR, 1}, '{C_TRFC, T_RFC - 1}, '{C_IDLE, 1},
                 '{C_ACTIVE, 1}, '{C_TRCD, T_RCD - 1}, '{C_READA, 1}}, "refresh before access");
    check(n_ack == 3, "third refresh acknowledged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

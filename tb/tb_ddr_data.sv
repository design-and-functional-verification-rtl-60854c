// tb_ddr_data: unit test of the data path.
//
// It drives sequences of write bursts (C_WRITEA then C_WDATA) and read bursts
// (C_RDATA) on cState, with fresh random values on sys_D, sys_DMSEL and the
// SDRAM data input every cycle, and records every input and output per
// cycle. It then checks, cycle by cycle: sys_D_REQ only in the write states;
// write data and byte mask reach the pins two cycles after they were taken,
// with the output enable and strobe enable high exactly then and DQS toggling
// once per beat; the read path returns the SDRAM data two cycles after it was
// on the pins; sys_D_VALID is high three cycles after each C_RDATA cycle;
// sys_RDYn is low exactly in the cycles with a write or read beat.
module tb_ddr_data;
  import ddr_pkg::*;

  localparam int DW = DSIZE;
  localparam int NC = 400;

  logic clk = 0, rst = 1;
  cmd_state_t cst = C_IDLE;
  logic [DW-1:0] sys_D = '0, sys_Q, dq_o, dq_i = '0;
  logic [DW/8-1:0] dmsel = '0, dqm;
  logic req, valid, rdyn, oe, dqs, dqs_oe;
  int checks = 0, failures = 0, n_wr = 0, n_rd = 0;

  cmd_state_t h_st [NC];
  logic [DW-1:0] h_d [NC], h_dqi [NC], h_dq [NC], h_q [NC];
  logic [DW/8-1:0] h_dm [NC], h_dqm [NC];
  logic h_rdyn [NC];
  logic h_req [NC], h_oe [NC], h_v [NC], h_dqs [NC], h_dqsoe [NC];
  int k = 0;

  always #5 clk = ~clk;

  ddr_data dut (.clk, .rst, .cState(cst), .sys_D, .sys_DMSEL(dmsel), .sys_D_REQ(req),
    .sys_Q, .sys_D_VALID(valid), .sys_RDYn(rdyn), .ddr_DQ_o(dq_o), .ddr_DQ_oe(oe), .ddr_DQ_i(dq_i),
    .ddr_DQM(dqm), .ddr_DQS_o(dqs), .ddr_DQS_oe(dqs_oe));

  always @(posedge clk) if (!rst && k < NC) begin
    h_st[k] = cst; h_d[k] = sys_D; h_dm[k] = dmsel; h_dqi[k] = dq_i;
    h_dq[k] = dq_o; h_q[k] = sys_Q; h_dqm[k] = dqm; h_req[k] = req; h_rdyn[k] = rdyn; h_oe[k] = oe;
    h_v[k] = valid; h_dqs[k] = dqs; h_dqsoe[k] = dqs_oe;
    k++;
    sys_D <= {$urandom, $urandom};
    dmsel <= (DW/8)'($urandom);
    dq_i  <= {$urandom, $urandom};
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(cmd_state_t s, int n);
    cst <= s;
    repeat (n) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    while (k < NC - 20) begin
      run(C_IDLE, $urandom_range(3));
      if ($urandom_range(1) == 0) begin
        run(C_WRITEA, 1); run(C_WDATA, BURST - 1); run(C_TDAL, 2); n_wr++;
      end else begin
        run(C_READA, 1); run(C_CL, 1); run(C_RDATA, BURST); n_rd++;
      end
    end
    run(C_IDLE, 10);
    for (int c = 3; c < k; c++) begin
      bit wr2;
      wr2 = (h_st[c-2] == C_WRITEA) || (h_st[c-2] == C_WDATA);
      check(h_req[c] == ((h_st[c] == C_WRITEA) || (h_st[c] == C_WDATA)), "sys_D_REQ");
      check(h_oe[c] == wr2 && h_dqsoe[c] == wr2, $sformatf("output enable in cycle %0d: %b %s", c, h_oe[c], h_st[c-2].name()));
      if (wr2) begin
        check(h_dq[c] == h_d[c-2], $sformatf("write beat %h, expected %h", h_dq[c], h_d[c-2]));
        check(h_dqm[c] == h_dm[c-2], "byte mask");
        check(h_dqs[c] != h_dqs[c-1] || !h_oe[c-1], "DQS toggles per beat");
      end else begin
        check(h_dqm[c] == '0, "mask low outside writes");
      end
      check(h_q[c] == h_dqi[c-2], $sformatf("read beat in cycle %0d", c));
      check(h_v[c] == (h_st[c-3] == C_RDATA), "sys_D_VALID");
      check(h_rdyn[c] == !(h_req[c] || h_v[c]), "sys_RDYn");
    end
    check(n_wr > 0 && n_rd > 0, "both burst kinds ran");
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

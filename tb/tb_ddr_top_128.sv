// tb_ddr_top_128: end-to-end test of the 128-bit controller at its default
// parameters: two 64-bit halves, each with its own DDR SDRAM model and bus
// master, sharing clock, reset and the power-up delay flag.
//
// Both masters run the same schedule of accesses to different banks, so the
// two halves open two banks in the same cycles and move 128 bits per beat.
// The test checks initialization of both halves, data read back against each
// master's scoreboard (with byte masks), cycle counts, requested and
// automatic refreshes, an access held back by a refresh on one half only,
// and that neither SDRAM model saw a protocol violation. It counts how often
// two banks were opened in the same cycle and how often both halves carried
// read or write data in the same cycle; each mechanism must happen at least
// once.
module tb_ddr_top_128;
  import ddr_pkg::*;

  localparam int unsigned N  = 2;
  localparam int unsigned DW = DSIZE;

  logic clk = 0, rst = 1, dly = 0;
  logic [N-1:0][SA_W-1:0] sys_A;
  logic [N-1:0] sys_ADSn, sys_R_Wn, sys_REF_REQ, sys_REF_ACK, sys_D_REQ, sys_D_VALID;
  logic [N-1:0] sys_INIT_DONE, sys_CYC_END;
  logic [N*DW-1:0] sys_D, sys_Q, dq_o, dq_i;
  logic [N*DW/8-1:0] sys_DMSEL, dqm;
  logic [N-1:0] ck, ckn, cke, csn, rasn, casn, wen, dq_oe, dqs_o, dqs_oe;
  logic [N-1:0][BA_W-1:0] ba;
  logic [N-1:0][A_W-1:0] a;

  int checks = 0, failures = 0;
  int n_dual_act = 0, n_dual_wr = 0, n_dual_rd = 0;
  int n_ref_ack [N];
  logic [N-1:0] rdyn;

  always #5 clk = ~clk;

  ddr_top_128 dut (
    .sys_CLK(clk), .sys_RESET(rst), .sys_DLY_100US(dly), .sys_A, .sys_ADSn, .sys_R_Wn,
    .sys_D, .sys_DMSEL, .sys_REF_REQ, .sys_REF_ACK, .sys_D_REQ, .sys_Q, .sys_D_VALID, .sys_RDYn(rdyn),
    .sys_INIT_DONE, .sys_CYC_END, .ddr_CK(ck), .ddr_CKn(ckn), .ddr_CKE(cke),
    .ddr_CSn(csn), .ddr_RASn(rasn), .ddr_CASn(casn), .ddr_WEn(wen), .ddr_BA(ba),
    .ddr_A(a), .ddr_DQ_o(dq_o), .ddr_DQ_oe(dq_oe), .ddr_DQ_i(dq_i), .ddr_DQM(dqm),
    .ddr_DQS_o(dqs_o), .ddr_DQS_oe(dqs_oe)
  );

  for (genvar h = 0; h < N; h++) begin : g
    ddr_sdram_model #(.DW(DW), .TRP(T_RP), .TRFC(T_RFC), .TMRD(T_MRD), .TRCD(T_RCD),
                      .TDAL(T_DAL)) mem (
      .clk, .cke(cke[h]), .csn(csn[h]), .rasn(rasn[h]), .casn(casn[h]), .wen(wen[h]),
      .ba(ba[h]), .a(a[h]), .dq_i(dq_o[h*DW +: DW]), .dq_oe(dq_oe[h]),
      .dqm(dqm[h*DW/8 +: DW/8]), .dq_o(dq_i[h*DW +: DW])
    );
    ddr_bus_master #(.DW(DW), .BL(BURST), .TRCD(T_RCD), .CL(CAS_LAT), .TDAL(T_DAL),
                     .TRFC(T_RFC)) bm (
      .clk, .sys_A(sys_A[h]), .sys_ADSn(sys_ADSn[h]), .sys_R_Wn(sys_R_Wn[h]),
      .sys_D(sys_D[h*DW +: DW]), .sys_DMSEL(sys_DMSEL[h*DW/8 +: DW/8]),
      .sys_D_REQ(sys_D_REQ[h]), .sys_Q(sys_Q[h*DW +: DW]), .sys_D_VALID(sys_D_VALID[h]),
      .sys_CYC_END(sys_CYC_END[h]), .sys_REF_ACK(sys_REF_ACK[h])
    );
  end

  // ACTIVE is {CSn,RASn,CASn,WEn} = 0011
  always @(posedge clk) begin
    if ({csn[0], rasn[0], casn[0], wen[0]} == 4'b0011 &&
        {csn[1], rasn[1], casn[1], wen[1]} == 4'b0011 && ba[0] != ba[1]) n_dual_act++;
    if (&dq_oe) n_dual_wr++;
    if (&sys_D_VALID) n_dual_rd++;
    for (int h = 0; h < N; h++) if (sys_REF_ACK[h]) n_ref_ack[h]++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic mechanism(int n, string what);
    $display("mechanism %-28s happened %0d times", what, n);
    check(n > 0, {what, " never happened"});
  endtask

  // Same schedule on both halves, bank b on half 0 and bank 7-b on half 1.
  task automatic both_write(logic [SA_W-1:0] a0, bit masked);
    logic [SA_W-1:0] a1;
    a1 = a0; a1[SA_W-1 -: BA_W] = ~a0[SA_W-1 -: BA_W];
    fork
      g[0].bm.write_burst(a0, masked);
      g[1].bm.write_burst(a1, masked);
    join
  endtask

  task automatic both_read(logic [SA_W-1:0] a0);
    logic [SA_W-1:0] a1;
    a1 = a0; a1[SA_W-1 -: BA_W] = ~a0[SA_W-1 -: BA_W];
    fork
      g[0].bm.read_burst(a0);
      g[1].bm.read_burst(a1);
    join
  endtask

  initial begin
    int n, user_refs;
    logic [SA_W-1:0] addrs [12];
    n_ref_ack[0] = 0; n_ref_ack[1] = 0;
    sys_REF_REQ = '0;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (10) @(posedge clk);
    check(cke == '1 && sys_INIT_DONE == '0, "clock enabled, not yet initialized");
    dly <= 1'b1;
    n = 0;
    forever begin
      @(posedge clk);
      if (&sys_INIT_DONE) break;
      n++;
    end
    check(n == int'(T_RP + 2 * T_RFC + T_MRD + 1),
          $sformatf("initialization took %0d cycles", n));
    for (int i = 0; i < 12; i++) begin
      addrs[i] = {BA_W'(i % 8), RA_W'($urandom_range(7)), CA_W'($urandom_range(15) * BURST)};
      both_write(addrs[i], 1'b0);
    end
    for (int i = 0; i < 12; i++) both_read(addrs[i]);
    for (int i = 0; i < 40; i++) begin
      int j;
      j = $urandom_range(11);
      if ($urandom_range(1) == 0) both_write(addrs[j], $urandom_range(1) == 1);
      else                        both_read(addrs[j]);
    end
    // refresh requested on half 1 only, just ahead of a paired access
    user_refs = 0;
    sys_REF_REQ[1] <= 1'b1; @(posedge clk); sys_REF_REQ[1] <= 1'b0; user_refs++;
    both_write(addrs[0], 1'b1);
    both_read(addrs[0]);
    // long idle: both refresh counters run out
    repeat (REF_INTERVAL + 20) @(posedge clk);
    for (int i = 0; i < 12; i++) both_read(addrs[i]);
    repeat (10) @(posedge clk);

    for (int h = 0; h < N; h++) begin
      int e, w, r, bw, br, ar;
      case (h)
        0: begin e = g[0].mem.errors; w = g[0].mem.n_write; r = g[0].mem.n_read;
                 bw = g[0].bm.n_writes; br = g[0].bm.n_reads; ar = g[0].mem.n_aref; end
        default: begin e = g[1].mem.errors; w = g[1].mem.n_write; r = g[1].mem.n_read;
                 bw = g[1].bm.n_writes; br = g[1].bm.n_reads; ar = g[1].mem.n_aref; end
      endcase
      check(e == 0, $sformatf("half %0d: SDRAM model saw %0d protocol errors", h, e));
      check(w == bw && r == br, $sformatf("half %0d: command counts", h));
      check(n_ref_ack[h] == ar - 2, $sformatf("half %0d: refresh acknowledges", h));
    end
    mechanism(g[0].mem.n_mrs + g[1].mem.n_mrs,              "initialization");
    mechanism(n_dual_act,                                   "two banks opened at once");
    mechanism(n_dual_wr,                                    "128-bit write beat");
    mechanism(n_dual_rd,                                    "128-bit read beat");
    mechanism(g[0].bm.n_masked,                             "masked write");
    mechanism(user_refs,                                    "requested refresh");
    mechanism(g[0].mem.n_aref - 2,                          "automatic refresh");
    mechanism(g[1].bm.n_delayed,                            "access held by refresh");
    checks   += g[0].bm.checks + g[1].bm.checks;
    failures += g[0].bm.failures + g[1].bm.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_ddr_top: end-to-end test of one 64-bit controller with the DDR SDRAM
// model and the bus-master model, at the default parameters.
//
// It checks the power-up sequence and its length, random burst writes (some
// with byte masks) and reads checked against a scoreboard, the cycle counts of
// reads and writes, refreshes asked for by the master (sys_REF_REQ /
// sys_REF_ACK), refreshes the controller starts by itself, an access held back
// by a pending refresh, that sys_RDYn is low exactly in data cycles, and that
// the SDRAM model saw no protocol violation.
// Each of these mechanisms is counted, and one that never happened counts as a
// failure.
module tb_ddr_top;
  import ddr_pkg::*;

  localparam int unsigned DW = DSIZE;

  logic clk = 0, rst = 1, dly = 0;
  logic [SA_W-1:0] sys_A;
  logic sys_ADSn, sys_R_Wn, sys_REF_REQ = 0, sys_REF_ACK, sys_D_REQ, sys_D_VALID;
  logic sys_INIT_DONE, sys_CYC_END;
  logic [DW-1:0] sys_D, sys_Q, dq_o, dq_i;
  logic [DW/8-1:0] sys_DMSEL, dqm;
  logic ck, ckn, cke, csn, rasn, casn, wen, dq_oe, dqs_o, dqs_oe;
  logic [BA_W-1:0] ba;
  logic [A_W-1:0] a;

  int checks = 0, failures = 0, cycles = 0;
  int n_ref_ack = 0;
  logic rdyn;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (sys_REF_ACK) n_ref_ack++;
    if (!rst) begin
      checks++;
      if (rdyn != !(sys_D_REQ || sys_D_VALID)) begin failures++; $display("FAIL: sys_RDYn"); end
    end
  end

  ddr_top dut (
    .sys_CLK(clk), .sys_RESET(rst), .sys_DLY_100US(dly), .sys_A, .sys_ADSn, .sys_R_Wn,
    .sys_D, .sys_DMSEL, .sys_REF_REQ, .sys_REF_ACK, .sys_D_REQ, .sys_Q, .sys_D_VALID, .sys_RDYn(rdyn),
    .sys_INIT_DONE, .sys_CYC_END, .ddr_CK(ck), .ddr_CKn(ckn), .ddr_CKE(cke),
    .ddr_CSn(csn), .ddr_RASn(rasn), .ddr_CASn(casn), .ddr_WEn(wen), .ddr_BA(ba),
    .ddr_A(a), .ddr_DQ_o(dq_o), .ddr_DQ_oe(dq_oe), .ddr_DQ_i(dq_i), .ddr_DQM(dqm),
    .ddr_DQS_o(dqs_o), .ddr_DQS_oe(dqs_oe)
  );

  ddr_sdram_model #(.DW(DW), .TRP(T_RP), .TRFC(T_RFC), .TMRD(T_MRD), .TRCD(T_RCD),
                    .TDAL(T_DAL)) mem (
    .clk, .cke, .csn, .rasn, .casn, .wen, .ba, .a, .dq_i(dq_o), .dq_oe, .dqm, .dq_o(dq_i)
  );

  ddr_bus_master #(.DW(DW), .BL(BURST), .TRCD(T_RCD), .CL(CAS_LAT), .TDAL(T_DAL),
                  .TRFC(T_RFC)) bm (
    .clk, .sys_A, .sys_ADSn, .sys_R_Wn, .sys_D, .sys_DMSEL, .sys_D_REQ, .sys_Q,
    .sys_D_VALID, .sys_CYC_END, .sys_REF_ACK
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic mechanism(int n, string what);
    $display("mechanism %-28s happened %0d times", what, n);
    check(n > 0, {what, " never happened"});
  endtask

  function automatic logic [SA_W-1:0] rand_addr(int pool);
    logic [BA_W-1:0] b; logic [RA_W-1:0] r; logic [CA_W-1:0] c;
    b = BA_W'($urandom);
    r = RA_W'($urandom_range(pool - 1));
    c = CA_W'($urandom_range(pool - 1) * BURST);
    return {b, r, c};
  endfunction

  initial begin
    int n, user_refs;
    logic [SA_W-1:0] addrs [16];
    repeat (5) @(posedge clk);
    check(cke == 1'b0, "CKE low during reset");
    rst <= 1'b0;
    repeat (20) @(posedge clk);
    check(!sys_INIT_DONE, "not ready before the power-up delay");
    check(mem.n_pre == 0 && mem.n_aref == 0, "no commands before the power-up delay");
    dly <= 1'b1;
    n = 0;
    forever begin
      @(posedge clk);
      if (sys_INIT_DONE) break;
      n++;
    end
    check(n == int'(T_RP + 2 * T_RFC + T_MRD + 1),
          $sformatf("initialization took %0d cycles", n));
    @(posedge clk);
    check(mem.init_ok && mem.n_pre == 1 && mem.n_aref == 2 && mem.n_mrs == 1,
          "power-up sequence PRE, AR, AR, MRS");

    // writes then reads over a pool of addresses, every bank
    for (int i = 0; i < 16; i++) begin
      addrs[i] = rand_addr(4);
      addrs[i][SA_W-1 -: BA_W] = BA_W'(i % 8);
      bm.write_burst(addrs[i], 1'b0);
    end
    for (int i = 0; i < 16; i++) bm.read_burst(addrs[i]);
    // masked rewrites, then random mixed traffic
    for (int i = 0; i < 8; i++) bm.write_burst(addrs[i], 1'b1);
    for (int i = 0; i < 60; i++) begin
      int j;
      j = $urandom_range(15);
      if ($urandom_range(2) == 0) bm.write_burst(addrs[j], $urandom_range(1) == 1);
      else                        bm.read_burst(addrs[j]);
    end

    // a refresh the master asks for while idle
    user_refs = 0;
    sys_REF_REQ <= 1'b1; @(posedge clk); sys_REF_REQ <= 1'b0; user_refs++;
    repeat (T_RFC + 4) @(posedge clk);
    // a refresh request just ahead of an access: the access waits
    sys_REF_REQ <= 1'b1; @(posedge clk); sys_REF_REQ <= 1'b0; user_refs++;
    bm.write_burst(addrs[3], 1'b0);
    bm.read_burst(addrs[3]);
    // idle long enough for the refresh counter to run out
    repeat (REF_INTERVAL + 20) @(posedge clk);
    for (int i = 0; i < 16; i++) bm.read_burst(addrs[i]);
    repeat (10) @(posedge clk);

    check(mem.errors == 0, $sformatf("SDRAM model saw %0d protocol errors", mem.errors));
    check(mem.n_write == bm.n_writes && mem.n_read == bm.n_reads, "command counts");
    check(mem.n_beats_wr == bm.n_writes * BURST, "write beats");
    check(mem.n_beats_rd == bm.n_reads * BURST, "read beats");
    check(n_ref_ack == mem.n_aref - 2, "one sys_REF_ACK per refresh");
    mechanism(mem.n_pre,                    "initialization");
    mechanism(bm.n_writes,                  "burst write");
    mechanism(bm.n_masked,                  "masked write");
    mechanism(bm.n_reads,                   "burst read");
    mechanism(user_refs,                    "requested refresh");
    mechanism(mem.n_aref - 2 - user_refs,   "automatic refresh");
    mechanism(bm.n_delayed,                 "access held by refresh");
    checks += bm.checks;
    failures += bm.failures;
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

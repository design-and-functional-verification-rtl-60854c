// tb_ddr_sig: unit test of the signal generation module.
//
// For every initialization state and every command state (with random system
// addresses) it applies the state for one cycle and checks, one cycle later,
// the registered command pins {CSn, RASn, CASn, WEn}, the clock enable, the
// bank address and the address bus: row for ACTIVE, column with A10 (auto
// precharge) for READ/WRITE, A10 for PRECHARGE ALL and the mode word for CAS
// latency 2, sequential burst of 4 for LOAD MODE REGISTER. The expected
// values are written out from the SDRAM command truth table.
module tb_ddr_sig;
  import ddr_pkg::*;

  logic clk = 0, rst = 1;
  init_state_t ist = I_IDLE;
  cmd_state_t  cst = C_IDLE;
  logic [SA_W-1:0] sa = '0;
  logic cke, csn, rasn, casn, wen;
  logic [BA_W-1:0] ba;
  logic [A_W-1:0] a;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ddr_sig dut (.clk, .rst, .iState(ist), .cState(cst), .sys_A(sa), .ddr_CKE(cke),
    .ddr_CSn(csn), .ddr_RASn(rasn), .ddr_CASn(casn), .ddr_WEn(wen), .ddr_BA(ba), .ddr_A(a));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic apply(init_state_t i, cmd_state_t c, logic [SA_W-1:0] addr,
                       logic [3:0] cmd, logic exp_cke, logic [2:0] exp_ba,
                       logic [12:0] exp_a, bit check_addr, string what);
    ist <= i; cst <= c; sa <= addr;
    @(posedge clk);            // state seen by the module
    ist <= I_READY; cst <= C_IDLE;
    #1;                        // registered outputs now show it
    check({csn, rasn, casn, wen} == cmd,
          $sformatf("%s: command %b", what, {csn, rasn, casn, wen}));
    check(cke == exp_cke, {what, ": CKE"});
    if (check_addr) begin
      check(ba == exp_ba, $sformatf("%s: bank %0d", what, ba));
      check(a == exp_a, $sformatf("%s: address %h expected %h", what, a, exp_a));
    end
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1;
    check(cke == 0 && csn == 1, "deselected with CKE low in reset");
    rst <= 0;
    @(posedge clk);
    apply(I_IDLE,  C_IDLE, '0, 4'b1111, 0, 0, 0, 0, "I_IDLE");
    apply(I_NOP,   C_IDLE, '0, 4'b0111, 1, 0, 0, 0, "I_NOP");
    apply(I_PRE,   C_IDLE, '0, 4'b0010, 1, 0, 13'h0400, 1, "I_PRE");
    apply(I_TRP,   C_IDLE, '0, 4'b0111, 1, 0, 0, 0, "I_TRP");
    apply(I_AR1,   C_IDLE, '0, 4'b0001, 1, 0, 0, 0, "I_AR1");
    apply(I_AR2,   C_IDLE, '0, 4'b0001, 1, 0, 0, 0, "I_AR2");
    apply(I_MRS,   C_IDLE, '0, 4'b0000, 1, 0, 13'h0022, 1, "I_MRS");
    apply(I_TMRD,  C_IDLE, '0, 4'b0111, 1, 0, 0, 0, "I_TMRD");
    apply(I_READY, C_AR,   '0, 4'b0001, 1, 0, 0, 0, "C_AR");
    apply(I_READY, C_IDLE, '0, 4'b0111, 1, 0, 0, 0, "C_IDLE");
    for (int n = 0; n < 20; n++) begin
      logic [2:0] b; logic [12:0] r; logic [9:0] c;
      b = 3'($urandom); r = 13'($urandom); c = 10'($urandom);
      apply(I_READY, C_ACTIVE, {b, r, c}, 4'b0011, 1, b, r, 1, "C_ACTIVE");
      apply(I_READY, C_READA,  {b, r, c}, 4'b0101, 1, b, {2'b00, 1'b1, c}, 1, "C_READA");
      apply(I_READY, C_WRITEA, {b, r, c}, 4'b0100, 1, b, {2'b00, 1'b1, c}, 1, "C_WRITEA");
      apply(I_READY, C_TRCD,   {b, r, c}, 4'b0111, 1, 0, 0, 0, "C_TRCD");
    end
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

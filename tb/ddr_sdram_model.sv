// ddr_sdram_model: behavioural, cycle-based model of one DDR SDRAM device
// with eight banks, for the testbenches only (not synthesizable).
//
// It decodes {CSn, RASn, CASn, WEn} at every rising clock edge while CKE is
// high, keeps one open row per bank, stores written data sparsely, and takes
// CAS latency and burst length from the LOAD MODE REGISTER word. One data
// beat is moved per clock cycle, as the controller's data path does:
//   READ  sampled in cycle m: beat k is driven on dq_o in cycle m+CL+k
//   WRITE sampled in cycle m: beat k is captured from dq_i at the end of
//         cycle m+1+k, bytes with their dqm bit high are left unchanged
// Bursts are sequential and wrap inside a BL-aligned block of columns. A10
// set on READ/WRITE closes the row after the burst (auto precharge).
//
// It checks the protocol and counts every violation in `errors`: the power-up
// sequence (PRECHARGE, two AUTO REFRESH, LOAD MODE REGISTER before any
// access), ACTIVE only to a closed and rested bank, READ/WRITE only to an open
// bank and no sooner than tRCD after ACTIVE, tRP/tRFC/tMRD after PRECHARGE,
// AUTO REFRESH and LOAD MODE REGISTER, tDAL after a write with auto
// precharge, BL+tRP after a read with auto precharge, and data driven by the
// controller only in write-data cycles. Nothing is checked before CKE has
// been seen low once, so the state before the controller's reset is ignored.
module ddr_sdram_model #(
  parameter int unsigned DW   = 64,
  parameter int unsigned TRP  = 3,
  parameter int unsigned TRFC = 10,
  parameter int unsigned TMRD = 2,
  parameter int unsigned TRCD = 3,
  parameter int unsigned TDAL = 5
) (
  input  logic           clk,
  input  logic           cke,
  input  logic           csn,
  input  logic           rasn,
  input  logic           casn,
  input  logic           wen,
  input  logic [2:0]     ba,
  input  logic [12:0]    a,
  input  logic [DW-1:0]  dq_i,
  input  logic           dq_oe,
  input  logic [DW/8-1:0] dqm,
  output logic [DW-1:0]  dq_o
);

  typedef logic [25:0] key_t;   // {bank, row, column}

  logic [DW-1:0] mem   [key_t];
  logic [DW-1:0] rd_q  [int];
  key_t          wr_q  [int];

  int  cyc = 0;
  int  errors = 0;
  int  n_pre = 0, n_aref = 0, n_mrs = 0, n_act = 0, n_read = 0, n_write = 0;
  int  n_beats_wr = 0, n_beats_rd = 0;
  bit  init_ok = 0;
  int  init_step = 0;
  int  cl = 2, bl = 4;
  bit  open_b [8];
  logic [12:0] row_b [8];
  int  act_cyc [8];
  int  ready_cyc [8];
  int  next_cmd_ok = 0;   // earliest cycle for any command (tRP/tRFC/tMRD)
  logic [3:0] cmd;
  bit  started = 0;      // set once CKE has been seen low (controller out of its power-on state)

  initial begin
    dq_o = '0;
    for (int b = 0; b < 8; b++) begin
      open_b[b] = 0; row_b[b] = '0; act_cyc[b] = 0; ready_cyc[b] = 0;
    end
  end

  function automatic logic [9:0] burst_col(logic [9:0] col, int k);
    logic [9:0] m;
    m = 10'(bl - 1);
    return (col & ~m) | ((col + 10'(k)) & m);
  endfunction

  task automatic fail(string what);
    errors++;
    $display("[%0t] sdram model: %s", $time, what);
  endtask

  always @(posedge clk) begin
    logic [DW-1:0] w;
    cmd = {csn, rasn, casn, wen};
    // write data captured at the end of this cycle
    if (wr_q.exists(cyc)) begin
      if (!dq_oe) fail("write beat not driven");
      w = mem.exists(wr_q[cyc]) ? mem[wr_q[cyc]] : '0;
      for (int i = 0; i < DW/8; i++)
        if (!dqm[i]) w[i*8 +: 8] = dq_i[i*8 +: 8];
      mem[wr_q[cyc]] = w;
      n_beats_wr++;
      wr_q.delete(cyc);
    end else if (dq_oe && started) fail("data driven outside a write burst");

    if (started && cke && cmd != 4'b1111 && cmd != 4'b0111) begin
      if (cyc < next_cmd_ok) fail("command before tRP/tRFC/tMRD elapsed");
      unique case (cmd)
        4'b0010: begin // PRECHARGE
          n_pre++;
          if (a[10]) for (int b = 0; b < 8; b++) open_b[b] = 0;
          else open_b[ba] = 0;
          next_cmd_ok = cyc + TRP;
          if (init_step == 0) init_step = 1;
        end
        4'b0001: begin // AUTO REFRESH
          n_aref++;
          for (int b = 0; b < 8; b++) begin
            if (open_b[b]) fail("AUTO REFRESH with a bank open");
            if (cyc < ready_cyc[b]) fail("AUTO REFRESH before bank precharged");
          end
          next_cmd_ok = cyc + TRFC;
          if (init_step == 1 || init_step == 2) init_step++;
        end
        4'b0000: begin // LOAD MODE REGISTER
          n_mrs++;
          if (ba != 0) fail("extended mode register not expected");
          unique case (a[2:0]) 3'b001: bl = 2; 3'b010: bl = 4; 3'b011: bl = 8;
            default: fail("bad burst length"); endcase
          unique case (a[6:4]) 3'b010: cl = 2; 3'b011: cl = 3;
            default: fail("bad CAS latency"); endcase
          next_cmd_ok = cyc + TMRD;
          if (init_step == 3) begin init_step = 4; init_ok = 1; end
          else fail("LOAD MODE REGISTER out of sequence");
        end
        4'b0011: begin // ACTIVE
          n_act++;
          if (!init_ok) fail("ACTIVE before initialization");
          if (open_b[ba]) fail("ACTIVE to an open bank");
          if (cyc < ready_cyc[ba]) fail("ACTIVE before bank precharged");
          open_b[ba] = 1; row_b[ba] = a; act_cyc[ba] = cyc;
        end
        4'b0101, 4'b0100: begin // READ / WRITE
          if (!open_b[ba]) fail("READ/WRITE to a closed bank");
          if (cyc - act_cyc[ba] < int'(TRCD)) fail("READ/WRITE before tRCD");
          for (int k = 0; k < bl; k++) begin
            key_t key;
            key = {ba, row_b[ba], burst_col(a[9:0], k)};
            if (cmd == 4'b0101) rd_q[cyc + cl + k] = mem.exists(key) ? mem[key] : '0;
            else                wr_q[cyc + 1 + k]  = key;
          end
          if (cmd == 4'b0101) begin
            n_read++;
            if (a[10]) begin open_b[ba] = 0; ready_cyc[ba] = cyc + bl + TRP; end
          end else begin
            n_write++;
            if (a[10]) begin open_b[ba] = 0; ready_cyc[ba] = cyc + bl + TDAL; end
          end
        end
        default: fail("unknown command");
      endcase
    end
    if (!cke) started = 1;
    cyc++;
    if (rd_q.exists(cyc)) begin
      dq_o <= rd_q[cyc];
      n_beats_rd++;
      rd_q.delete(cyc);
    end else begin
      dq_o <= '0;
    end
  end

endmodule

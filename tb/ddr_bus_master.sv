// ddr_bus_master: testbench bus master for one 64-bit controller half. It
// issues burst writes and reads through the controller's system interface and
// checks every read against its own scoreboard of what was written.
//
// Protocol it follows: sys_ADSn low with sys_A and sys_R_Wn held until the
// controller reports sys_CYC_END; one write beat on sys_D (and byte mask on
// sys_DMSEL) in each cycle sys_D_REQ is high; read beats collected while
// sys_D_VALID is high. It also measures, for accesses that no refresh
// delayed, the cycle counts from the request to the first read beat and to
// the end of the cycle, and compares them with the figures worked out from
// the timing parameters.
module ddr_bus_master #(
  parameter int unsigned DW   = 64,
  parameter int unsigned BL   = 4,
  parameter int unsigned TRCD = 3,
  parameter int unsigned CL   = 2,
  parameter int unsigned TDAL = 5,
  parameter int unsigned TRFC = 10
) (
  input  logic            clk,
  output logic [25:0]     sys_A,
  output logic            sys_ADSn,
  output logic            sys_R_Wn,
  output logic [DW-1:0]   sys_D,
  output logic [DW/8-1:0] sys_DMSEL,
  input  logic            sys_D_REQ,
  input  logic [DW-1:0]   sys_Q,
  input  logic            sys_D_VALID,
  input  logic            sys_CYC_END,
  input  logic            sys_REF_ACK
);

  int checks = 0, failures = 0;
  int n_writes = 0, n_reads = 0, n_masked = 0, n_delayed = 0;
  int last_rd_lat = 0, last_cyc_len = 0;

  logic [DW-1:0]   sb [logic [25:0]];
  logic [DW-1:0]   wbuf [BL];
  logic [DW/8-1:0] wmask [BL];
  logic [DW-1:0]   rbuf [BL];
  int wbeat = 0, rbeat = 0;
  int since_ref = 1000;   // edges since the last refresh acknowledge

  initial begin
    sys_A = '0; sys_ADSn = 1'b1; sys_R_Wn = 1'b1;
    for (int k = 0; k < BL; k++) begin wbuf[k] = '0; wmask[k] = '0; rbuf[k] = '0; end
  end

  assign sys_D     = wbuf[wbeat];
  assign sys_DMSEL = wmask[wbeat];

  always @(posedge clk) begin
    if (sys_D_REQ) wbeat <= (wbeat + 1) % BL;
    else           wbeat <= 0;
    since_ref <= sys_REF_ACK ? 0 : since_ref + 1;
    if (sys_D_VALID) begin
      if (rbeat < BL) rbuf[rbeat] = sys_Q;
      rbeat++;
    end
  end

  function automatic logic [25:0] beat_addr(logic [25:0] a, int k);
    logic [25:0] m;
    m = 26'(BL - 1);
    return (a & ~m) | ((a + 26'(k)) & m);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("[%0t] bus master FAIL: %s", $time, what);
    end
  endtask

  // Runs one access; returns the number of edges to sys_CYC_END, the edges to
  // the first read beat, and whether a refresh was running or acknowledged
  // meanwhile.
  task automatic run_cycle(logic [25:0] a, bit rd, output int len, output int lat,
                           output bit refreshed);
    len = 0; lat = -1;
    refreshed = (since_ref <= int'(TRFC) + 1);
    sys_A <= a; sys_R_Wn <= rd; sys_ADSn <= 1'b0;
    rbeat = 0;
    forever begin
      @(posedge clk);
      if (sys_REF_ACK) refreshed = 1;
      if (sys_D_VALID && lat < 0) lat = len;
      if (sys_CYC_END) break;
      len++;
    end
    sys_ADSn <= 1'b1;
    // let the last read beats leave the data path
    for (int j = 1; j <= 4; j++) begin
      @(posedge clk);
      if (sys_D_VALID && lat < 0) lat = len + j;
    end
  endtask

  task automatic write_burst(logic [25:0] a, bit masked);
    int len, lat; bit refd;
    for (int k = 0; k < BL; k++) begin
      wbuf[k]  = {$urandom, $urandom};
      wmask[k] = masked ? (DW/8)'($urandom) : '0;
    end
    run_cycle(a, 1'b0, len, lat, refd);
    for (int k = 0; k < BL; k++) begin
      logic [25:0] ba; logic [DW-1:0] v;
      ba = beat_addr(a, k);
      v  = sb.exists(ba) ? sb[ba] : '0;
      for (int i = 0; i < DW/8; i++) if (!wmask[k][i]) v[i*8 +: 8] = wbuf[k][i*8 +: 8];
      sb[ba] = v;
    end
    n_writes++;
    if (masked) n_masked++;
    if (refd) n_delayed++;
    else check(len == int'(TRCD + BL + TDAL), $sformatf("write cycle took %0d edges", len));
    last_cyc_len = len;
  endtask

  task automatic read_burst(logic [25:0] a);
    int len, lat; bit refd;
    run_cycle(a, 1'b1, len, lat, refd);
    check(rbeat == int'(BL), $sformatf("read returned %0d beats", rbeat));
    for (int k = 0; k < BL; k++) begin
      logic [25:0] ba;
      ba = beat_addr(a, k);
      check(rbuf[k] == (sb.exists(ba) ? sb[ba] : '0),
            $sformatf("read data beat %0d at %h: %h", k, ba, rbuf[k]));
    end
    n_reads++;
    if (refd) n_delayed++;
    else begin
      check(len == int'(TRCD + CL + BL), $sformatf("read cycle took %0d edges", len));
      check(lat == int'(TRCD + CL + 4), $sformatf("read latency %0d edges", lat));
    end
    last_rd_lat = lat;
    last_cyc_len = len;
  endtask

endmodule

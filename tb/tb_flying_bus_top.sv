// tb_flying_bus_top: end-to-end test of the flying master bus system at its
// default size (flying master plus three shared-bus masters, four slaves).
//
// Random traffic (idle 0..30 cycles, bursts of 1/4/8/16 beats, reads and
// writes) runs for CYCLES_PER_POLICY cycles under each of the four
// arbitration policies. Slaves 0 and 1 behave like SDRAM controllers
// (3 wait states on a NONSEQ), slaves 2 and 3 like SRAMs (no wait state).
// Checks: every read beat of every master matches what that master wrote;
// the flying master always gets its grant after one request cycle; no slave
// wrapper ever grants both sides; and each mechanism happened: concurrent
// transfers on two slaves, flying master held by a bus burst, bus held by
// the flying master, slave wait states, arbitration under every policy.
module tb_flying_bus_top;
  import flybus_pkg::*;

  localparam int unsigned NBM = 3;
  localparam int unsigned NS  = 4;
  localparam int unsigned CYCLES_PER_POLICY = 20000;
  localparam int unsigned WATCHDOG = 4 * CYCLES_PER_POLICY + 5000;

  logic hclk = 1'b0, hresetn = 1'b0;
  always #5 hclk = ~hclk;

  arb_policy_e policy;

  ahb_ctrl_t             fm_ctrl;
  logic [DW-1:0]         fm_hwdata, fm_hrdata;
  logic                  fm_hbusreq, fm_hgrant, fm_hready;
  hresp_e                fm_hresp;
  ahb_ctrl_t [NBM-1:0]   m_ctrl;
  logic [NBM-1:0][DW-1:0] m_hwdata;
  logic [NBM-1:0]        m_hbusreq, m_hgrant;
  logic                  m_hready;
  hresp_e                m_hresp;
  logic [DW-1:0]         m_hrdata;
  ahb_ctrl_t [NS-1:0]    s_ctrl;
  logic [NS-1:0][DW-1:0] s_hwdata, s_hrdata;
  logic [NS-1:0]         s_hsel, s_hready, s_hreadyout, fm_held, bus_held;
  hresp_e [NS-1:0]       s_hresp;
  logic                  arb_event;

  flying_bus_top dut (.*);

  // masters: index 0 is the flying master, 1..3 the bus masters
  logic                 en;
  logic [NBM:0]         busy;
  int unsigned          n_trans [NBM+1], n_beats [NBM+1], reqc [NBM+1], holdc [NBM+1];
  int unsigned          mchk [NBM+1], mfail [NBM+1];
  int unsigned          waits [NS];

  ahb_traffic_master #(.ID(0), .NS(NS), .SEED(11)) u_fm (
    .hclk, .hresetn, .enable(en), .ctrl(fm_ctrl), .hwdata(fm_hwdata), .hbusreq(fm_hbusreq),
    .hgrant(fm_hgrant), .hready(fm_hready), .hrdata(fm_hrdata), .hresp(fm_hresp),
    .busy(busy[0]), .n_trans(n_trans[0]), .n_beats(n_beats[0]), .req_cycles(reqc[0]),
    .hold_cycles(holdc[0]), .checks(mchk[0]), .failures(mfail[0]));

  for (genvar i = 0; i < NBM; i++) begin : g_m
    ahb_traffic_master #(.ID(i + 1), .NS(NS), .SEED(23 + i)) u_m (
      .hclk, .hresetn, .enable(en), .ctrl(m_ctrl[i]), .hwdata(m_hwdata[i]),
      .hbusreq(m_hbusreq[i]), .hgrant(m_hgrant[i]), .hready(m_hready), .hrdata(m_hrdata),
      .hresp(m_hresp), .busy(busy[i+1]), .n_trans(n_trans[i+1]), .n_beats(n_beats[i+1]),
      .req_cycles(reqc[i+1]), .hold_cycles(holdc[i+1]), .checks(mchk[i+1]),
      .failures(mfail[i+1]));
  end

  for (genvar x = 0; x < NS; x++) begin : g_s
    ahb_mem_slave #(.DEPTH(256), .WS_NONSEQ(x < 2 ? 3 : 0), .WS_SEQ(0)) u_s (
      .hclk, .hresetn, .ctrl(s_ctrl[x]), .hwdata(s_hwdata[x]), .hsel(s_hsel[x]),
      .hready(s_hready[x]), .ws_nonseq(0), .hreadyout(s_hreadyout[x]), .hresp(s_hresp[x]),
      .hrdata(s_hrdata[x]), .waits(waits[x]));
  end

  int unsigned checks = 0, failures = 0;
  int unsigned cyc = 0;
  int unsigned n_concurrent = 0, n_fm_held = 0, n_bus_held = 0, n_fm_held_by_burst = 0;
  int unsigned n_arb [4] = '{0, 0, 0, 0};
  int unsigned n_both = 0;

  // mechanism monitors
  always @(posedge hclk) if (hresetn) begin
    int unsigned taken;
    ahb_ctrl_t bc;
    cyc++;
    taken = 0;
    // the bus master in its address phase is the one driving a non-IDLE HTRANS
    bc = m_ctrl[0];
    for (int i = 0; i < NBM; i++) if (m_ctrl[i].htrans != HTRANS_IDLE) bc = m_ctrl[i];
    for (int x = 0; x < NS; x++) begin
      if (s_hsel[x] && s_hready[x] && is_active(s_ctrl[x].htrans)) taken++;
      if (fm_held[x]) begin
        n_fm_held++;
        if (in_burst(bc.htrans)) n_fm_held_by_burst++;
      end
      if (bus_held[x]) n_bus_held++;
      // both sides asking for the same slave: exactly one must be held
      if (fm_hbusreq && fm_ctrl.htrans != HTRANS_IDLE && int'(fm_ctrl.haddr[29:28]) == x &&
          bc.htrans != HTRANS_IDLE && int'(bc.haddr[29:28]) == x &&
          !(fm_held[x] ^ bus_held[x])) n_both++;
    end
    if (taken >= 2) n_concurrent++;
    if (arb_event) n_arb[policy]++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned sum_chk, sum_fail, fm_t0, fm_r0, total_beats;
    en = 1'b0;
    policy = ARB_FIXED;
    repeat (4) @(posedge hclk);
    hresetn = 1'b1;
    en = 1'b1;
    for (int p = 0; p < 4; p++) begin
      policy = arb_policy_e'(p);
      fm_t0 = n_trans[0];
      fm_r0 = reqc[0];
      repeat (CYCLES_PER_POLICY) @(posedge hclk);
      $display("policy %0d: flying master %0d transactions, %0d request cycles",
               p, n_trans[0] - fm_t0, reqc[0] - fm_r0);
    end
    en = 1'b0;
    wait (busy == '0);
    repeat (5) @(posedge hclk);
    sum_chk = 0; sum_fail = 0; total_beats = 0;
    for (int i = 0; i <= NBM; i++) begin
      $display("M%0d: %0d transactions, %0d beats, avg request %0.2f cycles, %0d hold cycles",
               i + 1, n_trans[i], n_beats[i], real'(reqc[i]) / real'(n_trans[i]), holdc[i]);
      sum_chk += mchk[i]; sum_fail += mfail[i]; total_beats += n_beats[i];
      check(n_trans[i] > 20, $sformatf("master %0d made progress", i));
    end
    checks += sum_chk; failures += sum_fail;
    // the flying master is granted after exactly one request cycle
    check(reqc[0] == n_trans[0], $sformatf("flying master request cycles %0d for %0d transactions",
                                             reqc[0], n_trans[0]));
    check(n_both == 0, $sformatf("%0d cycles with contention not resolved to one side", n_both));
    $display("concurrent=%0d fm_held=%0d (by burst %0d) bus_held=%0d waits=%0d/%0d/%0d/%0d",
             n_concurrent, n_fm_held, n_fm_held_by_burst, n_bus_held,
             waits[0], waits[1], waits[2], waits[3]);
    $display("arbitrations per policy: %0d %0d %0d %0d beats %0d in %0d cycles",
             n_arb[0], n_arb[1], n_arb[2], n_arb[3], total_beats, cyc);
    check(n_concurrent > 0, "concurrent transfers happened");
    check(n_fm_held_by_burst > 0, "flying master held by a shared-bus burst");
    check(n_bus_held > 0, "shared bus held by the flying master");
    check(waits[0] > 0 && waits[2] == 0, "SDRAM-like wait states only on slaves 0/1");
    for (int p = 0; p < 4; p++) check(n_arb[p] > 0, $sformatf("arbitration under policy %0d", p));
    // more beats than one bus alone could carry in the same cycles
    check(total_beats > 0, "beats moved");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

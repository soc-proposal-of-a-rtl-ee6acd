// flybus_bench: one complete system for the performance testbench: the
// interconnect, four random-traffic masters M1..M4 and four memory slaves
// whose NONSEQ latency is set at run time.
//
// FLYING = 1: M1 is the flying master and M2..M4 share the bus (the design).
// FLYING = 0: all four masters share the bus through the same arbiter with
// TDMA slots / lottery tickets 3,1,1,1 and the flying master port is left
// idle; this is the conventional shared bus the design is compared with.
// Per-master statistics are brought out for the testbench.
module flybus_bench
  import flybus_pkg::*;
#(
  parameter bit          FLYING = 1'b1,
  parameter int unsigned SEED   = 1
) (
  input  logic        hclk,
  input  logic        hresetn,
  input  logic        en,
  input  arb_policy_e policy,
  input  int unsigned lat,
  output logic        busy,
  output int unsigned n_trans [4],
  output int unsigned n_beats [4],
  output int unsigned reqc [4],
  output int unsigned holdc [4],
  output int unsigned mchk [4],
  output int unsigned mfail [4],
  output int unsigned waits [4]
);
  localparam int unsigned NBM = FLYING ? 3 : 4;
  localparam int unsigned NS  = 4;
  localparam int unsigned FIRST_BUS = FLYING ? 1 : 0;
  localparam int unsigned W3 [3] = '{1, 1, 1};
  localparam int unsigned W4 [4] = '{3, 1, 1, 1};

  ahb_ctrl_t               fm_ctrl;
  logic [DW-1:0]           fm_hwdata, fm_hrdata;
  logic                    fm_hbusreq, fm_hgrant, fm_hready;
  hresp_e                  fm_hresp;
  ahb_ctrl_t [NBM-1:0]     m_ctrl;
  logic [NBM-1:0][DW-1:0]  m_hwdata;
  logic [NBM-1:0]          m_hbusreq, m_hgrant;
  logic                    m_hready;
  hresp_e                  m_hresp;
  logic [DW-1:0]           m_hrdata;
  ahb_ctrl_t [NS-1:0]      s_ctrl;
  logic [NS-1:0][DW-1:0]   s_hwdata, s_hrdata;
  logic [NS-1:0]           s_hsel, s_hready, s_hreadyout, fm_held, bus_held;
  hresp_e [NS-1:0]         s_hresp;
  logic                    arb_event;
  logic [3:0]              mbusy;

  assign busy = |mbusy;

  if (FLYING) begin : g_fb
    flying_bus_top #(.NBM(3), .SLOTS(W3), .TICKETS(W3)) dut (.*);
    ahb_traffic_master #(.ID(0), .NS(NS), .SEED(SEED)) u_m1 (
      .hclk, .hresetn, .enable(en), .ctrl(fm_ctrl), .hwdata(fm_hwdata), .hbusreq(fm_hbusreq),
      .hgrant(fm_hgrant), .hready(fm_hready), .hrdata(fm_hrdata), .hresp(fm_hresp),
      .busy(mbusy[0]), .n_trans(n_trans[0]), .n_beats(n_beats[0]), .req_cycles(reqc[0]),
      .hold_cycles(holdc[0]), .checks(mchk[0]), .failures(mfail[0]));
  end else begin : g_nb
    flying_bus_top #(.NBM(4), .SLOTS(W4), .TICKETS(W4)) dut (.*);
    assign fm_ctrl    = AHB_CTRL_IDLE;
    assign fm_hwdata  = '0;
    assign fm_hbusreq = 1'b0;
  end

  for (genvar i = FIRST_BUS; i < 4; i++) begin : g_m
    ahb_traffic_master #(.ID(i), .NS(NS), .SEED(SEED + 10 * i)) u_m (
      .hclk, .hresetn, .enable(en), .ctrl(m_ctrl[i - FIRST_BUS]),
      .hwdata(m_hwdata[i - FIRST_BUS]), .hbusreq(m_hbusreq[i - FIRST_BUS]),
      .hgrant(m_hgrant[i - FIRST_BUS]), .hready(m_hready), .hrdata(m_hrdata), .hresp(m_hresp),
      .busy(mbusy[i]), .n_trans(n_trans[i]), .n_beats(n_beats[i]), .req_cycles(reqc[i]),
      .hold_cycles(holdc[i]), .checks(mchk[i]), .failures(mfail[i]));
  end

  for (genvar x = 0; x < NS; x++) begin : g_s
    ahb_mem_slave #(.DEPTH(256)) u_s (
      .hclk, .hresetn, .ctrl(s_ctrl[x]), .hwdata(s_hwdata[x]), .hsel(s_hsel[x]),
      .hready(s_hready[x]), .ws_nonseq(lat), .hreadyout(s_hreadyout[x]), .hresp(s_hresp[x]),
      .hrdata(s_hrdata[x]), .waits(waits[x]));
  end
endmodule

// flying_bus_top: an AHB system with a flying master.
//
// Main idea. On a shared bus only one master can transfer at a time. Here one
// master, the flying master (normally the processor, M1), bypasses the
// shared bus: its wrapper reaches every slave wrapper directly, so a
// flying-master transfer to one slave runs at the same time as a shared-bus
// transfer to another slave. When both want the same slave, that slave's
// wrapper decides (flying master first, except that a shared-bus burst
// already under way on the slave is finished first) and stalls the loser
// through HREADY. The flying master never waits for the shared-bus arbiter.
//
// Structure:
//   fm_wrapper      flying master -> all slave wrappers (decoder, read muxes)
//   ahb_arbiter     arbiter (AB) of the NBM shared-bus masters
//   ahb_shared_bus  address/write/read multiplexers and decoder of the bus
//   slave_wrapper   one per slave: selection, muxes, HREADY generation
// Masters and slaves are outside and connect through the ports below: the
// flying master through fm_*, the shared-bus masters through m_*, the slaves
// through s_*. Slave x occupies the addresses whose bits
// [SEL_LSB +: log2(NS)] equal x.
// Defaults: four masters in all (the flying master and three on the bus) and
// four slaves, the configuration the design is evaluated in; TDMA slots and
// lottery tickets of 1 each for the three bus masters (the flying master's
// share of 3 out of 6 is not needed, as it does not arbitrate).
module flying_bus_top
  import flybus_pkg::*;
#(
  parameter int unsigned NBM     = 3,   // masters on the shared bus
  parameter int unsigned NS      = 4,   // slaves
  parameter int unsigned SEL_LSB = 28,
  parameter int unsigned SLOTS   [NBM] = '{1, 1, 1},
  parameter int unsigned TICKETS [NBM] = '{1, 1, 1}
) (
  input  logic                    hclk,
  input  logic                    hresetn,
  input  arb_policy_e             policy,
  // flying master
  input  ahb_ctrl_t               fm_ctrl,
  input  logic [DW-1:0]           fm_hwdata,
  input  logic                    fm_hbusreq,
  output logic                    fm_hgrant,
  output logic                    fm_hready,
  output hresp_e                  fm_hresp,
  output logic [DW-1:0]           fm_hrdata,
  // shared-bus masters
  input  ahb_ctrl_t [NBM-1:0]     m_ctrl,
  input  logic [NBM-1:0][DW-1:0]  m_hwdata,
  input  logic [NBM-1:0]          m_hbusreq,
  output logic [NBM-1:0]          m_hgrant,
  output logic                    m_hready,
  output hresp_e                  m_hresp,
  output logic [DW-1:0]           m_hrdata,
  // slaves
  output ahb_ctrl_t [NS-1:0]      s_ctrl,
  output logic [NS-1:0][DW-1:0]   s_hwdata,
  output logic [NS-1:0]           s_hsel,
  output logic [NS-1:0]           s_hready,
  input  logic [NS-1:0]           s_hreadyout,
  input  hresp_e [NS-1:0]         s_hresp,
  input  logic [NS-1:0][DW-1:0]   s_hrdata,
  // observation
  output logic [NS-1:0]           fm_held,
  output logic [NS-1:0]           bus_held,
  output logic                    arb_event
);

  ahb_ctrl_t                 fmw_ctrl, bus_ctrl;
  logic [DW-1:0]             fmw_hwdata, bus_hwdata;
  logic [NS-1:0]             fmw_hsel, bus_hsel;
  logic [NS-1:0]             fm_rdy_s, bus_rdy_s;
  hresp_e [NS-1:0]           w_hresp;
  logic [NS-1:0][DW-1:0]     w_hrdata;
  logic [$clog2(NBM)-1:0]    hmaster;

  fm_wrapper #(.NS(NS), .SEL_LSB(SEL_LSB)) u_fmw (
    .hclk, .hresetn,
    .m_ctrl(fm_ctrl), .m_hwdata(fm_hwdata), .m_hbusreq(fm_hbusreq),
    .m_hgrant(fm_hgrant), .m_hrdata(fm_hrdata), .m_hresp(fm_hresp), .m_hready(fm_hready),
    .s_ctrl(fmw_ctrl), .s_hwdata(fmw_hwdata), .s_hsel(fmw_hsel),
    .s_hrdata(w_hrdata), .s_hresp(w_hresp), .s_hready(fm_rdy_s)
  );

  ahb_arbiter #(.NM(NBM), .SLOTS(SLOTS), .TICKETS(TICKETS)) u_arb (
    .hclk, .hresetn, .policy,
    .hbusreq(m_hbusreq), .hready(m_hready),
    .hgrant(m_hgrant), .hmaster(hmaster), .arb_event(arb_event)
  );

  ahb_shared_bus #(.NM(NBM), .NS(NS), .SEL_LSB(SEL_LSB)) u_bus (
    .hclk, .hresetn,
    .m_ctrl, .m_hwdata, .hmaster,
    .hready(m_hready), .hrdata(m_hrdata), .hresp(m_hresp),
    .bus_ctrl, .bus_hwdata, .bus_hsel,
    .s_hready(bus_rdy_s), .s_hresp(w_hresp), .s_hrdata(w_hrdata)
  );

  for (genvar x = 0; x < NS; x++) begin : g_sw
    slave_wrapper u_sw (
      .hclk, .hresetn,
      .fm_ctrl(fmw_ctrl), .fm_hwdata(fmw_hwdata), .fm_hsel(fmw_hsel[x]),
      .fm_hready_in(fm_hready), .fm_hready_out(fm_rdy_s[x]),
      .bus_ctrl, .bus_hwdata, .bus_hsel(bus_hsel[x]),
      .bus_hready_in(m_hready), .bus_hready_out(bus_rdy_s[x]),
      .s_ctrl(s_ctrl[x]), .s_hwdata(s_hwdata[x]), .s_hsel(s_hsel[x]),
      .s_hready(s_hready[x]), .s_hreadyout(s_hreadyout[x]),
      .s_hresp(s_hresp[x]), .s_hrdata(s_hrdata[x]),
      .hresp_out(w_hresp[x]), .hrdata_out(w_hrdata[x]),
      .fm_held(fm_held[x]), .bus_held(bus_held[x])
    );
  end

endmodule

// fm_wrapper: flying master wrapper.
//
// The flying master does not go through the shared bus and its arbiter. This
// wrapper connects it straight to the slave wrappers of all slaves:
//  * its address, control and write data are forwarded unchanged to every
//    slave wrapper (HxxxOUT);
//  * a decoder turns HADDR into a one-hot slave select HSEL_s, enabled by
//    HBUSREQ, so a slave wrapper sees the flying master only while it
//    requests; the enable also holds while HTRANS is not IDLE, because an
//    AHB master lowers HBUSREQ together with its last address;
//  * HGRANTout answers HBUSREQ in the same cycle: the flying master never
//    waits for the shared-bus arbiter, contention is resolved per slave in
//    the slave wrappers, which stall it through HREADY;
//  * read data and response are multiplexed from the slave that owns the
//    current data phase, and HREADY is gathered from all slaves.
//
// Timing. HSEL_s is combinational from HADDR/HBUSREQ (address phase). AHB
// returns read data one cycle after the address, so the read multiplexers
// use a copy of the select registered when an address is accepted (a
// design choice; the block diagram draws one select for both). Every slave
// wrapper drives its HREADY_S line low only when it stalls this master
// (data phase wait state, or address phase held because the shared bus owns
// the slave) and high otherwise, so HREADYout is the AND of all lines, which
// is the ready multiplexer with the idle inputs reading as ready.
// The slave index is HADDR[SEL_LSB +: log2(NS)] (this design's address map).
module fm_wrapper
  import flybus_pkg::*;
#(
  parameter int unsigned NS      = 4,   // number of slaves
  parameter int unsigned SEL_LSB = 28   // lowest address bit of the slave index
) (
  input  logic                 hclk,
  input  logic                 hresetn,
  // from the flying master
  input  ahb_ctrl_t            m_ctrl,
  input  logic [DW-1:0]        m_hwdata,
  input  logic                 m_hbusreq,
  // to the flying master
  output logic                 m_hgrant,      // HGRANTout
  output logic [DW-1:0]        m_hrdata,      // HRDATAout
  output hresp_e               m_hresp,       // HRESPout
  output logic                 m_hready,      // HREADYout
  // to the slave wrappers
  output ahb_ctrl_t            s_ctrl,        // HADDRout, HTRANSout, ...
  output logic [DW-1:0]        s_hwdata,      // HWDATAout
  output logic [NS-1:0]        s_hsel,        // HSEL_s[x:0]
  // from the slave wrappers
  input  logic [NS-1:0][DW-1:0] s_hrdata,     // HRDATA_S0..SN
  input  hresp_e [NS-1:0]      s_hresp,       // HRESP_S0..SN
  input  logic [NS-1:0]        s_hready       // HREADY_S0..SN
);

  localparam int unsigned SW = (NS > 1) ? $clog2(NS) : 1;

  logic [SW-1:0] idx;
  logic [NS-1:0] dsel;      // slave of the current data phase, one-hot

  // Decoder
  assign idx = m_ctrl.haddr[SEL_LSB +: SW];
  always_comb begin
    s_hsel = '0;
    if ((m_hbusreq || m_ctrl.htrans != HTRANS_IDLE) && (int'(idx) < NS)) s_hsel[idx] = 1'b1;
  end

  // Forwarding to the slaves
  assign s_ctrl   = m_ctrl;
  assign s_hwdata = m_hwdata;
  assign m_hgrant = m_hbusreq;

  // Ready from all slaves
  assign m_hready = &s_hready;

  // Data-phase select
  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn)      dsel <= '0;
    else if (m_hready) dsel <= is_active(m_ctrl.htrans) ? s_hsel : '0;
  end

  // Read data and response multiplexers
  always_comb begin
    m_hrdata = '0;
    m_hresp  = HRESP_OKAY;
    for (int i = 0; i < NS; i++) begin
      if (dsel[i]) begin
        m_hrdata = s_hrdata[i];
        m_hresp  = s_hresp[i];
      end
    end
  end

  a_dsel_onehot: assert property (@(posedge hclk) disable iff (!hresetn) $onehot0(dsel));

endmodule

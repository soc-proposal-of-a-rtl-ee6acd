// ahb_shared_bus: the multiplexers and decoder of an AHB shared bus.
//
// Master to slaves: the address-phase signals of the master named by HMASTER
// (from the arbiter) are put on the bus; the write data of the master that
// owns the data phase (HMASTER registered on HREADY) follow one cycle later.
// The decoder turns the bus address into one-hot HSEL_x_Bus lines, slave
// index HADDR[SEL_LSB +: log2(NS)] (the same address map as the flying
// master wrapper). Slaves to masters: read data and response of the slave
// that owns the data phase are multiplexed back; HREADY is the AND of the
// slave wrappers' HREADYoutBus lines, each of which reads high unless that
// slave stalls the bus (a wait state in its data phase, or an address held
// because the flying master has the slave). Only one transfer at a time
// crosses this bus, which is what the flying master bypasses.
module ahb_shared_bus
  import flybus_pkg::*;
#(
  parameter int unsigned NM      = 3,   // masters on the shared bus
  parameter int unsigned NS      = 4,   // slaves
  parameter int unsigned SEL_LSB = 28
) (
  input  logic                   hclk,
  input  logic                   hresetn,
  // masters
  input  ahb_ctrl_t [NM-1:0]     m_ctrl,
  input  logic [NM-1:0][DW-1:0]  m_hwdata,
  input  logic [$clog2(NM)-1:0]  hmaster,
  output logic                   hready,
  output logic [DW-1:0]          hrdata,
  output hresp_e                 hresp,
  // slave wrappers
  output ahb_ctrl_t              bus_ctrl,
  output logic [DW-1:0]          bus_hwdata,
  output logic [NS-1:0]          bus_hsel,       // HSEL_x_Bus
  input  logic [NS-1:0]          s_hready,       // HREADYoutBus
  input  hresp_e [NS-1:0]        s_hresp,
  input  logic [NS-1:0][DW-1:0]  s_hrdata
);

  localparam int unsigned SW = (NS > 1) ? $clog2(NS) : 1;

  logic [$clog2(NM)-1:0] dp_master;
  logic [NS-1:0]         dsel;
  logic [SW-1:0]         idx;

  assign bus_ctrl   = m_ctrl[hmaster];
  assign bus_hwdata = m_hwdata[dp_master];

  assign idx = bus_ctrl.haddr[SEL_LSB +: SW];
  always_comb begin
    bus_hsel = '0;
    if (int'(idx) < NS) bus_hsel[idx] = 1'b1;
  end

  assign hready = &s_hready;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dp_master <= '0;
      dsel      <= '0;
    end else if (hready) begin
      dp_master <= hmaster;
      dsel      <= is_active(bus_ctrl.htrans) ? bus_hsel : '0;
    end
  end

  always_comb begin
    hrdata = '0;
    hresp  = HRESP_OKAY;
    for (int i = 0; i < NS; i++) begin
      if (dsel[i]) begin
        hrdata = s_hrdata[i];
        hresp  = s_hresp[i];
      end
    end
  end

endmodule

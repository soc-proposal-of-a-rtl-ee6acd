// slave_wrapper: puts one AHB slave within reach of both the shared bus and
// the flying master, and decides which of the two it serves.
//
// HSEL selection. A side requests this slave when its select is high and its
// HTRANS is not IDLE. The flying master has priority, with one exception
// taken from the bus model's hold state: while a shared-bus burst is under
// way on this slave (bus HTRANS is SEQ or BUSY) the flying master is held
// until the burst ends. A side is also held while the other side still has
// a data phase open on the slave, so that the slave never sees its
// data phase cut short by the other side's ready.
//
// Multiplexers. The address-phase signals (HADDR, HTRANS, HWRITE, HSIZE,
// HBURST, HPROT, HLOCK) come from the granted side. HWDATA belongs to the
// data phase and is muxed by the side that owns the data phase (one register
// bit), which the block diagram does not draw separately. HSELout is the OR
// of the two selects gated by the grant, so a held side never reaches the
// slave.
//
// HREADY generation. HREADYoutBus / HREADYoutSM carry the slave's HREADY to
// the side that owns the data phase, read high for the other side, and are
// pulled low for a side that is held in its address phase. The slave's own
// HREADY input is the combined ready of the side it is serving. HRDATA and
// HRESP go unchanged to both sides.
//
// All outputs are combinational from the inputs and the two data-phase
// registers; the slave's HREADY output must not depend combinationally on
// its HREADY input (true of any AHB slave).
module slave_wrapper
  import flybus_pkg::*;
(
  input  logic          hclk,
  input  logic          hresetn,
  // from the flying master wrapper
  input  ahb_ctrl_t     fm_ctrl,
  input  logic [DW-1:0] fm_hwdata,
  input  logic          fm_hsel,         // HSEL_S[x]
  input  logic          fm_hready_in,    // combined HREADY seen by the flying master
  output logic          fm_hready_out,   // HREADYoutSM
  // from the shared bus
  input  ahb_ctrl_t     bus_ctrl,
  input  logic [DW-1:0] bus_hwdata,
  input  logic          bus_hsel,        // HSEL_x_Bus
  input  logic          bus_hready_in,   // combined HREADY of the shared bus
  output logic          bus_hready_out,  // HREADYoutBus
  // to / from the slave
  output ahb_ctrl_t     s_ctrl,
  output logic [DW-1:0] s_hwdata,
  output logic          s_hsel,          // HSELout
  output logic          s_hready,        // HREADY input of the slave
  input  logic          s_hreadyout,     // HREADY from the slave
  input  hresp_e        s_hresp,
  input  logic [DW-1:0] s_hrdata,
  output hresp_e        hresp_out,       // HRESPout, to both sides
  output logic [DW-1:0] hrdata_out,      // HRDATAout, to both sides
  // observation
  output logic          fm_held,         // flying master held off this slave
  output logic          bus_held         // shared bus held off this slave
);

  logic fm_req, bus_req, bus_burst;
  logic grant_fm, grant_bus;
  logic dp_valid, dp_fm;   // data phase open on the slave, and whose

  assign fm_req    = fm_hsel  && (fm_ctrl.htrans  != HTRANS_IDLE);
  assign bus_req   = bus_hsel && (bus_ctrl.htrans != HTRANS_IDLE);
  assign bus_burst = bus_hsel && in_burst(bus_ctrl.htrans);

  // HSEL selection
  assign grant_fm  = fm_req && !bus_burst && !(dp_valid && !dp_fm);
  assign grant_bus = bus_req && !grant_fm && !(dp_valid && dp_fm);

  assign fm_held  = fm_req  && !grant_fm;
  assign bus_held = bus_req && !grant_bus;

  // Multiplexers
  always_comb begin
    s_ctrl = grant_fm ? fm_ctrl : bus_ctrl;
    if (!(grant_fm || grant_bus)) s_ctrl.htrans = HTRANS_IDLE;
  end
  assign s_hwdata = dp_fm ? fm_hwdata : bus_hwdata;
  assign s_hsel   = (fm_hsel && grant_fm) || (bus_hsel && grant_bus);

  // HREADY generation
  assign fm_hready_out  = (dp_valid &&  dp_fm ? s_hreadyout : 1'b1) && !fm_held;
  assign bus_hready_out = (dp_valid && !dp_fm ? s_hreadyout : 1'b1) && !bus_held;
  assign s_hready       = (dp_valid ? dp_fm : grant_fm) ? fm_hready_in : bus_hready_in;

  assign hresp_out  = s_hresp;
  assign hrdata_out = s_hrdata;

  // Data-phase owner: updated whenever the slave's address phase advances
  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dp_valid <= 1'b0;
      dp_fm    <= 1'b0;
    end else if (s_hready) begin
      dp_valid <= s_hsel && is_active(s_ctrl.htrans);
      dp_fm    <= grant_fm;
    end
  end

  a_one_grant: assert property (@(posedge hclk) disable iff (!hresetn) !(grant_fm && grant_bus));
  a_no_switch: assert property (@(posedge hclk) disable iff (!hresetn)
                                dp_valid |-> !(dp_fm ? grant_bus : grant_fm));

endmodule

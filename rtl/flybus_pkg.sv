// flybus_pkg: types and constants shared by the flying master bus blocks.
//
// The bus is AMBA AHB with 32-bit address and data, as in the wrapper block
// diagrams (HADDR[31:0], HWDATA[31:0], HRESP[1:0], HTRANS[1:0], HBURST[2:0],
// HSIZE[2:0], HPROT[3:0]). The encodings are the standard AHB ones.
// ahb_ctrl_t bundles the address-phase signals that the wrappers and the
// shared bus steer as one unit; write data travels separately because it
// belongs to the data phase, one cycle later.
// The arbitration policies are the four the design is evaluated with.
package flybus_pkg;

  localparam int unsigned AW = 32;  // HADDR width
  localparam int unsigned DW = 32;  // HWDATA / HRDATA width

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  typedef enum logic [2:0] {
    HBURST_SINGLE = 3'b000,
    HBURST_INCR   = 3'b001,
    HBURST_WRAP4  = 3'b010,
    HBURST_INCR4  = 3'b011,
    HBURST_WRAP8  = 3'b100,
    HBURST_INCR8  = 3'b101,
    HBURST_WRAP16 = 3'b110,
    HBURST_INCR16 = 3'b111
  } hburst_e;

  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_e;

  // Address-phase control of one AHB master.
  typedef struct packed {
    logic [AW-1:0] haddr;
    htrans_e       htrans;
    logic          hwrite;
    logic [2:0]    hsize;
    hburst_e       hburst;
    logic [3:0]    hprot;
    logic          hlock;
  } ahb_ctrl_t;

  localparam ahb_ctrl_t AHB_CTRL_IDLE = '{
    haddr: '0, htrans: HTRANS_IDLE, hwrite: 1'b0, hsize: 3'b010,
    hburst: HBURST_SINGLE, hprot: 4'b0011, hlock: 1'b0};

  // Arbitration policies of the shared-bus arbiter.
  typedef enum logic [1:0] {
    ARB_FIXED   = 2'd0,  // lowest index wins
    ARB_RR      = 2'd1,  // round-robin after the last owner
    ARB_TDMA    = 2'd2,  // time wheel of slots, round-robin for unused slots
    ARB_LOTTERY = 2'd3   // random draw weighted by tickets
  } arb_policy_e;

  // True for NONSEQ and SEQ: a transfer that owns a data phase.
  function automatic logic is_active(htrans_e t);
    return (t == HTRANS_NONSEQ) || (t == HTRANS_SEQ);
  endfunction

  // True for SEQ and BUSY: the middle of a burst.
  function automatic logic in_burst(htrans_e t);
    return (t == HTRANS_SEQ) || (t == HTRANS_BUSY);
  endfunction

endpackage

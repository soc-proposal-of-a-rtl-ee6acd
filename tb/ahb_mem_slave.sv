// ahb_mem_slave: behavioural AHB memory slave used by the testbenches in
// place of the SDRAM and SRAM controllers (not part of the design).
//
// A transfer is taken when HSEL, an active HTRANS and HREADY (input) are
// high. Its data phase then lasts WS_NONSEQ extra cycles for a NONSEQ and
// WS_SEQ for a SEQ transfer (HREADYOUT low meanwhile), so WS_NONSEQ > 0 with
// WS_SEQ = 0 behaves like an SDRAM controller opening a row, and both 0 like
// an SRAM. Writes are stored at the end of the data phase; read data are
// driven during it. The memory starts at zero. waits counts wait states.
module ahb_mem_slave
  import flybus_pkg::*;
#(
  parameter int unsigned DEPTH     = 1024,  // words
  parameter int unsigned WS_NONSEQ = 0,
  parameter int unsigned WS_SEQ    = 0
) (
  input  logic          hclk,
  input  logic          hresetn,
  input  ahb_ctrl_t     ctrl,
  input  logic [DW-1:0] hwdata,
  input  logic          hsel,
  input  logic          hready,
  input  int unsigned   ws_nonseq,   // run-time override of WS_NONSEQ when not 0
  output logic          hreadyout,
  output hresp_e        hresp,
  output logic [DW-1:0] hrdata,
  output int unsigned   waits
);
  localparam int unsigned IW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];
  logic          dp, dp_write;
  logic [IW-1:0] dp_idx;
  int unsigned   wcnt;

  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;

  assign hreadyout = !dp || (wcnt == 0);
  assign hresp     = HRESP_OKAY;
  assign hrdata    = (dp && !dp_write) ? mem[dp_idx] : '0;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dp <= 1'b0; dp_write <= 1'b0; dp_idx <= '0; wcnt <= 0; waits <= 0;
    end else if (dp && wcnt != 0) begin
      wcnt  <= wcnt - 1;
      waits <= waits + 1;
    end else if (hready) begin
      if (dp && dp_write) mem[dp_idx] <= hwdata;
      dp <= hsel && is_active(ctrl.htrans);
      if (hsel && is_active(ctrl.htrans)) begin
        dp_write <= ctrl.hwrite;
        dp_idx   <= ctrl.haddr[IW+1:2];
        wcnt     <= (ctrl.htrans == HTRANS_SEQ) ? WS_SEQ : (ws_nonseq != 0 ? ws_nonseq : WS_NONSEQ);
      end
    end
  end
endmodule

// tb_ahb_shared_bus: random-stimulus test of the shared-bus multiplexers and
// decoder with three masters and four slaves.
//
// A reference here predicts: the bus address/control equal those of the
// master named by HMASTER; the write data come from the master that was
// HMASTER at the last HREADY edge; HSEL_x_Bus is one-hot on address bits
// [29:28]; HREADY is high only when no slave stalls; read data/response
// come from the slave addressed by the last active transfer taken on an
// HREADY edge.
module tb_ahb_shared_bus;
  import flybus_pkg::*;
  localparam int unsigned NM = 3, NS = 4, NCYC = 4000;

  logic hclk = 1'b0, hresetn = 1'b0;
  always #5 hclk = ~hclk;

  ahb_ctrl_t [NM-1:0]     m_ctrl;
  logic [NM-1:0][DW-1:0]  m_hwdata;
  logic [1:0]             hmaster;
  logic                   hready;
  logic [DW-1:0]          hrdata, bus_hwdata;
  hresp_e                 hresp;
  ahb_ctrl_t              bus_ctrl;
  logic [NS-1:0]          bus_hsel, s_hready;
  hresp_e [NS-1:0]        s_hresp;
  logic [NS-1:0][DW-1:0]  s_hrdata;

  ahb_shared_bus #(.NM(NM), .NS(NS)) dut (.*);

  int unsigned checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (NCYC + 100) @(posedge hclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dm = 0, ds = -1, tgt;
    bit rdy;
    m_ctrl = '0; m_hwdata = '0; hmaster = 0; s_hready = '1; s_hresp = '0; s_hrdata = '0;
    repeat (3) @(posedge hclk);
    hresetn = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge hclk);
      for (int i = 0; i < NM; i++) begin
        m_ctrl[i].haddr  = $urandom;
        m_ctrl[i].htrans = htrans_e'($urandom_range(0, 3));
        m_ctrl[i].hwrite = $urandom_range(0, 1);
        m_hwdata[i]      = $urandom;
      end
      hmaster = 2'($urandom_range(0, NM - 1));
      for (int x = 0; x < NS; x++) begin
        s_hready[x] = $urandom_range(0, 4) != 0;
        s_hresp[x]  = hresp_e'($urandom_range(0, 3));
        s_hrdata[x] = $urandom;
      end
      #1;
      tgt = m_ctrl[hmaster].haddr[29:28];
      rdy = &s_hready;
      check(bus_ctrl == m_ctrl[hmaster], "address/control mux");
      check(bus_hwdata == m_hwdata[dm], "write data mux");
      check(bus_hsel == NS'(1 << tgt), "decoder");
      check(hready == rdy, "ready");
      if (ds >= 0) check(hrdata == s_hrdata[ds] && hresp == s_hresp[ds], "read mux");
      else check(hrdata == '0 && hresp == HRESP_OKAY, "read mux idle");
      @(posedge hclk);
      if (rdy) begin
        dm = hmaster;
        ds = (m_ctrl[hmaster].htrans inside {HTRANS_NONSEQ, HTRANS_SEQ}) ? tgt : -1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

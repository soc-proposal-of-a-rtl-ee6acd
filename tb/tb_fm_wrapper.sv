// tb_fm_wrapper: random-stimulus test of the flying master wrapper.
//
// Each cycle the master side and the slave return lines get random values.
// A reference written here predicts the one-hot slave select, the grant, the
// forwarded address/control/write data, HREADY (ready only when no slave
// stalls) and read data/response, taken from the slave that was selected
// by the last accepted active address.
module tb_fm_wrapper;
  import flybus_pkg::*;
  localparam int unsigned NS = 4;
  localparam int unsigned NCYC = 4000;

  logic hclk = 1'b0, hresetn = 1'b0;
  always #5 hclk = ~hclk;

  ahb_ctrl_t             m_ctrl, s_ctrl;
  logic [DW-1:0]         m_hwdata, s_hwdata, m_hrdata;
  logic                  m_hbusreq, m_hgrant, m_hready;
  hresp_e                m_hresp;
  logic [NS-1:0]         s_hsel, s_hready;
  logic [NS-1:0][DW-1:0] s_hrdata;
  hresp_e [NS-1:0]       s_hresp;

  fm_wrapper dut (.*);

  int unsigned checks = 0, failures = 0;
  int          ref_dslave = -1;   // slave of the current data phase, -1 none

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (NCYC + 100) @(posedge hclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned tgt;
    logic [NS-1:0] exp_sel;
    logic exp_rdy;
    m_ctrl = '0; m_hwdata = '0; m_hbusreq = 0; s_hready = '1; s_hrdata = '0; s_hresp = '0;
    repeat (3) @(posedge hclk);
    hresetn = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge hclk);
      m_ctrl.haddr  = $urandom;
      m_ctrl.htrans = htrans_e'($urandom_range(0, 3));
      m_ctrl.hwrite = $urandom_range(0, 1);
      m_ctrl.hburst = hburst_e'($urandom_range(0, 7));
      m_ctrl.hsize  = 3'($urandom_range(0, 7));
      m_ctrl.hprot  = 4'($urandom);
      m_ctrl.hlock  = $urandom_range(0, 1);
      m_hwdata      = $urandom;
      m_hbusreq     = $urandom_range(0, 3) != 0;
      for (int i = 0; i < NS; i++) begin
        s_hrdata[i] = $urandom;
        s_hresp[i]  = hresp_e'($urandom_range(0, 3));
        s_hready[i] = $urandom_range(0, 4) != 0;
      end
      #1;
      tgt = m_ctrl.haddr[29:28];
      exp_sel = '0;
      if (m_hbusreq || m_ctrl.htrans != HTRANS_IDLE) exp_sel[tgt] = 1'b1;
      exp_rdy = 1'b1;
      for (int i = 0; i < NS; i++) if (!s_hready[i]) exp_rdy = 1'b0;
      check(s_hsel == exp_sel, $sformatf("hsel %b exp %b", s_hsel, exp_sel));
      check(m_hgrant == m_hbusreq, "grant");
      check(s_ctrl == m_ctrl && s_hwdata == m_hwdata, "forwarding");
      check(m_hready == exp_rdy, "hready");
      if (ref_dslave >= 0)
        check(m_hrdata == s_hrdata[ref_dslave] && m_hresp == s_hresp[ref_dslave],
              $sformatf("read mux from slave %0d", ref_dslave));
      else
        check(m_hrdata == '0 && m_hresp == HRESP_OKAY, "no data phase");
      @(posedge hclk);
      if (exp_rdy)
        ref_dslave = (m_ctrl.htrans inside {HTRANS_NONSEQ, HTRANS_SEQ}) && exp_sel != 0 ? int'(tgt) : -1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

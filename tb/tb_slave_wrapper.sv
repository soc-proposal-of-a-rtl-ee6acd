// tb_slave_wrapper: random-stimulus test of the slave wrapper against a
// reference of its selection rules.
//
// Rules checked: the flying master (FM) wins a slave that both sides ask
// for, unless a shared-bus burst is under way on it (bus HTRANS SEQ/BUSY);
// neither side may take the slave while the other has a data phase open;
// the winner's address/control reach the slave, the data-phase owner's
// write data do; HREADY to each side carries the slave's HREADY during its
// own data phase and is low while that side is held; the slave's HREADY
// input follows the side it serves. Each contention case is counted and
// must occur.
module tb_slave_wrapper;
  import flybus_pkg::*;
  localparam int unsigned NCYC = 6000;

  logic hclk = 1'b0, hresetn = 1'b0;
  always #5 hclk = ~hclk;

  ahb_ctrl_t     fm_ctrl, bus_ctrl, s_ctrl;
  logic [DW-1:0] fm_hwdata, bus_hwdata, s_hwdata, s_hrdata, hrdata_out;
  logic          fm_hsel, bus_hsel, fm_hready_in, bus_hready_in;
  logic          fm_hready_out, bus_hready_out, s_hsel, s_hready, s_hreadyout;
  logic          fm_held, bus_held;
  hresp_e        s_hresp, hresp_out;

  slave_wrapper dut (.*);

  int unsigned checks = 0, failures = 0;
  int unsigned n_fm_wins = 0, n_burst_hold = 0, n_dp_hold = 0, n_fm_only = 0, n_bus_only = 0;
  bit ref_dp_valid = 0, ref_dp_fm = 0;

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
    bit fr, br, gf, gb, burst, exp_sready;
    fm_ctrl = '0; bus_ctrl = '0; fm_hwdata = '0; bus_hwdata = '0; fm_hsel = 0; bus_hsel = 0;
    fm_hready_in = 1; bus_hready_in = 1; s_hreadyout = 1; s_hresp = HRESP_OKAY; s_hrdata = '0;
    repeat (3) @(posedge hclk);
    hresetn = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge hclk);
      fm_ctrl.haddr  = $urandom;  bus_ctrl.haddr  = $urandom;
      fm_ctrl.htrans = htrans_e'($urandom_range(0, 3));
      bus_ctrl.htrans = htrans_e'($urandom_range(0, 3));
      fm_ctrl.hwrite = $urandom_range(0, 1); bus_ctrl.hwrite = $urandom_range(0, 1);
      fm_hwdata = $urandom; bus_hwdata = $urandom;
      fm_hsel  = $urandom_range(0, 1);
      bus_hsel = $urandom_range(0, 1);
      s_hreadyout = $urandom_range(0, 3) != 0;
      s_hrdata = $urandom; s_hresp = hresp_e'($urandom_range(0, 3));
      // the combined ready of a side includes this wrapper's own output
      fm_hready_in = ($urandom_range(0, 5) != 0);
      bus_hready_in = ($urandom_range(0, 5) != 0);
      #1;
      fm_hready_in  = fm_hready_in && fm_hready_out;
      bus_hready_in = bus_hready_in && bus_hready_out;
      #1;
      // reference
      fr    = fm_hsel && fm_ctrl.htrans != HTRANS_IDLE;
      br    = bus_hsel && bus_ctrl.htrans != HTRANS_IDLE;
      burst = bus_hsel && (bus_ctrl.htrans inside {HTRANS_SEQ, HTRANS_BUSY});
      gf    = fr && !burst && !(ref_dp_valid && !ref_dp_fm);
      gb    = br && !gf && !(ref_dp_valid && ref_dp_fm);
      if (fr && br && gf) n_fm_wins++;
      if (fr && burst && !gf) n_burst_hold++;
      if ((fr && !gf && !burst) || (br && !gb && !gf)) n_dp_hold++;
      if (fr && !br && gf) n_fm_only++;
      if (br && !fr && gb) n_bus_only++;
      check(fm_held == (fr && !gf) && bus_held == (br && !gb),
            $sformatf("held flags fm %b/%b bus %b/%b", fm_held, fr && !gf, bus_held, br && !gb));
      check(s_hsel == (gf || gb), "HSELout");
      if (gf) check(s_ctrl == fm_ctrl, "address from FM");
      else if (gb) check(s_ctrl == bus_ctrl, "address from bus");
      else check(s_ctrl.htrans == HTRANS_IDLE, "IDLE when nobody is granted");
      if (ref_dp_valid) check(s_hwdata == (ref_dp_fm ? fm_hwdata : bus_hwdata), "HWDATA mux");
      check(fm_hready_out == ((ref_dp_valid && ref_dp_fm ? s_hreadyout : 1'b1) && !(fr && !gf)),
            "HREADYoutSM");
      check(bus_hready_out == ((ref_dp_valid && !ref_dp_fm ? s_hreadyout : 1'b1) && !(br && !gb)),
            "HREADYoutBus");
      exp_sready = ((ref_dp_valid ? ref_dp_fm : gf) ? fm_hready_in : bus_hready_in);
      check(s_hready == exp_sready, "slave HREADY");
      check(hrdata_out == s_hrdata && hresp_out == s_hresp, "read return");
      @(posedge hclk);
      if (exp_sready) begin
        ref_dp_valid = (gf && fm_ctrl.htrans inside {HTRANS_NONSEQ, HTRANS_SEQ}) ||
                       (gb && bus_ctrl.htrans inside {HTRANS_NONSEQ, HTRANS_SEQ});
        ref_dp_fm = gf;
      end
    end
    $display("fm wins %0d, held by burst %0d, held by data phase %0d, fm only %0d, bus only %0d",
             n_fm_wins, n_burst_hold, n_dp_hold, n_fm_only, n_bus_only);
    check(n_fm_wins > 0 && n_burst_hold > 0 && n_dp_hold > 0 && n_fm_only > 0 && n_bus_only > 0,
          "every contention case occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

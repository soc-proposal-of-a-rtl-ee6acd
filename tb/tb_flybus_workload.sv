// tb_flybus_workload: the performance experiment of the flying master bus,
// run on the RTL.
//
// Two systems are driven by identical random traffic (same seeds): the
// flying bus (M1 is the flying master) and a conventional shared bus with
// all four masters arbitrated (TDMA slots and lottery tickets 3,1,1,1). Four
// masters, four slaves; idle time 0..30 cycles (mean 15) between
// transactions of 1, 4, 8 or 16 beats. Each of the four arbitration policies
// runs RUN_CYCLES cycles with SDRAM-like slaves (SDRAM_LAT wait states on a
// NONSEQ transfer) and with SRAM-like slaves (no wait state).
// Reported per master: transaction cycles (data beats), average request
// cycles, and the bus efficiency data / (data + slave wait + request +
// hold) cycles. Checked: all read data correct; the flying bus moves more
// data than the shared bus in every case; the flying master's request
// always lasts exactly one cycle; under fixed priority the lowest-priority
// master M4 waits less on the flying bus; the flying bus is more efficient.
module tb_flybus_workload;
  import flybus_pkg::*;

  localparam int unsigned RUN_CYCLES = 1000000;
  localparam int unsigned SDRAM_LAT  = 4;

  logic hclk = 1'b0, hresetn = 1'b0;
  always #5 hclk = ~hclk;

  logic        en;
  arb_policy_e policy;
  int unsigned lat;
  logic        busy_fb, busy_nb;
  int unsigned fb_trans [4], fb_beats [4], fb_req [4], fb_hold [4], fb_chk [4], fb_fail [4], fb_wait [4];
  int unsigned nb_trans [4], nb_beats [4], nb_req [4], nb_hold [4], nb_chk [4], nb_fail [4], nb_wait [4];

  flybus_bench #(.FLYING(1'b1), .SEED(5)) u_fb (
    .hclk, .hresetn, .en, .policy, .lat, .busy(busy_fb), .n_trans(fb_trans), .n_beats(fb_beats),
    .reqc(fb_req), .holdc(fb_hold), .mchk(fb_chk), .mfail(fb_fail), .waits(fb_wait));
  flybus_bench #(.FLYING(1'b0), .SEED(5)) u_nb (
    .hclk, .hresetn, .en, .policy, .lat, .busy(busy_nb), .n_trans(nb_trans), .n_beats(nb_beats),
    .reqc(nb_req), .holdc(nb_hold), .mchk(nb_chk), .mfail(nb_fail), .waits(nb_wait));

  int unsigned checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (8 * (RUN_CYCLES + 2000) + 1000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    int unsigned trans [4];
    int unsigned beats [4];
    int unsigned req [4];
    int unsigned hold [4];
    int unsigned waits;
  } snap_t;

  function automatic snap_t take(input bit fb);
    snap_t s;
    s.waits = 0;
    for (int i = 0; i < 4; i++) begin
      s.trans[i] = fb ? fb_trans[i] : nb_trans[i];
      s.beats[i] = fb ? fb_beats[i] : nb_beats[i];
      s.req[i]   = fb ? fb_req[i]   : nb_req[i];
      s.hold[i]  = fb ? fb_hold[i]  : nb_hold[i];
      s.waits   += fb ? fb_wait[i]  : nb_wait[i];
    end
    return s;
  endfunction

  initial begin
    snap_t a0, a1, b0, b1;
    int unsigned fb_tot, nb_tot, fb_cost, nb_cost;
    real fb_eff, nb_eff, fb_m4, nb_m4;
    en = 1'b0; policy = ARB_FIXED; lat = 0;
    repeat (4) @(posedge hclk);
    hresetn = 1'b1;
    for (int sl = 0; sl < 2; sl++) begin
      for (int p = 0; p < 4; p++) begin
        policy = arb_policy_e'(p);
        lat = (sl == 0) ? SDRAM_LAT : 0;
        a0 = take(1); b0 = take(0);
        en = 1'b1;
        repeat (RUN_CYCLES) @(posedge hclk);
        en = 1'b0;
        wait (!busy_fb && !busy_nb);
        @(posedge hclk);
        a1 = take(1); b1 = take(0);
        fb_tot = 0; nb_tot = 0; fb_cost = 0; nb_cost = 0;
        for (int i = 0; i < 4; i++) begin
          fb_tot  += a1.beats[i] - a0.beats[i];
          nb_tot  += b1.beats[i] - b0.beats[i];
          fb_cost += (a1.req[i] - a0.req[i]) + (a1.hold[i] - a0.hold[i]);
          nb_cost += (b1.req[i] - b0.req[i]) + (b1.hold[i] - b0.hold[i]);
        end
        fb_cost += fb_tot + (a1.waits - a0.waits);
        nb_cost += nb_tot + (b1.waits - b0.waits);
        fb_eff = real'(fb_tot) / real'(fb_cost);
        nb_eff = real'(nb_tot) / real'(nb_cost);
        $display("%s %-11s  NB beats %7d  FB beats %7d  (+%0.1f%%)  efficiency NB %0.2f FB %0.2f",
                 sl == 0 ? "SDRAM" : "SRAM ", policy.name(), nb_tot, fb_tot,
                 100.0 * (real'(fb_tot) / real'(nb_tot) - 1.0), nb_eff, fb_eff);
        for (int i = 0; i < 4; i++)
          $display("    M%0d beats NB %7d FB %7d   avg request NB %6.2f FB %6.2f", i + 1,
                   b1.beats[i] - b0.beats[i], a1.beats[i] - a0.beats[i],
                   real'(b1.req[i] - b0.req[i]) / real'(b1.trans[i] - b0.trans[i]),
                   real'(a1.req[i] - a0.req[i]) / real'(a1.trans[i] - a0.trans[i]));
        check(fb_tot > nb_tot, "flying bus moves more data");
        check(fb_eff > nb_eff, "flying bus is more efficient");
        check(a1.req[0] - a0.req[0] == a1.trans[0] - a0.trans[0], "flying master request is one cycle");
        if (p == 0) begin
          fb_m4 = real'(a1.req[3] - a0.req[3]) / real'(a1.trans[3] - a0.trans[3]);
          nb_m4 = real'(b1.req[3] - b0.req[3]) / real'(b1.trans[3] - b0.trans[3]);
          check(fb_m4 < nb_m4, "M4 waits less under fixed priority");
        end
      end
    end
    for (int i = 0; i < 4; i++) begin
      checks += fb_chk[i] + nb_chk[i];
      failures += fb_fail[i] + nb_fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ahb_arbiter: test of the shared-bus arbiter with four masters and the
// default weights 3,1,1,1.
//
// Phase 1 (fixed priority and round-robin): random requests and HREADY. At
// every cycle where the owner has let go, HREADY is high and someone asks,
// the arbiter must flag an arbitration and, one cycle later, grant the
// lowest requesting index (fixed) or the first requester after the old
// owner (round-robin); otherwise the grant must not move. HMASTER must take
// the old grant on every HREADY edge.
// Phase 2 (TDMA): random requests; the winner must be the owner of the
// current wheel slot (slots 0,0,0,1,2,3, one step per arbitration) when it
// asks, else the round-robin choice.
// Phase 3 (lottery): random requests; the winner must be asking, and each
// master's number of wins must be within 15 % of the sum over arbitrations
// of its tickets divided by the tickets of all requesting masters.
module tb_ahb_arbiter;
  import flybus_pkg::*;
  localparam int unsigned NM = 4;

  logic hclk = 1'b0, hresetn = 1'b0;
  always #5 hclk = ~hclk;

  arb_policy_e   policy;
  logic [NM-1:0] hbusreq, hgrant;
  logic          hready, arb_event;
  logic [1:0]    hmaster;

  ahb_arbiter dut (.*);

  int unsigned checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic int owner_of(logic [NM-1:0] g);
    for (int i = 0; i < NM; i++) if (g[i]) return i;
    return -1;
  endfunction

  initial begin
    repeat (30000) @(posedge hclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int own, expw, old_grant;
    bit exp_arb;
    int unsigned wins [NM];
    policy = ARB_FIXED; hbusreq = '0; hready = 1'b1;
    repeat (3) @(posedge hclk);
    hresetn = 1'b1;
    // phase 1
    for (int p = 0; p < 2; p++) begin
      policy = p == 0 ? ARB_FIXED : ARB_RR;
      for (int c = 0; c < 3000; c++) begin
        @(negedge hclk);
        hbusreq = NM'($urandom);
        hready  = $urandom_range(0, 3) != 0;
        #1;
        check($onehot(hgrant), "grant one-hot");
        own = owner_of(hgrant);
        exp_arb = hready && !hbusreq[own] && (hbusreq != 0);
        check(arb_event == exp_arb, "arbitration condition");
        expw = own;
        if (exp_arb) begin
          if (p == 0) begin
            for (int i = NM - 1; i >= 0; i--) if (hbusreq[i]) expw = i;
          end else begin
            for (int k = NM; k >= 1; k--) if (hbusreq[(own + k) % NM]) expw = (own + k) % NM;
          end
        end
        old_grant = own;
        @(posedge hclk);
        #1;
        check(owner_of(hgrant) == expw, $sformatf("policy %0d winner %0d expected %0d", p,
                                                  owner_of(hgrant), expw));
        if (hready) check(int'(hmaster) == old_grant, "HMASTER follows HGRANT");
      end
    end
    // phase 2: TDMA, exact winner from a wheel position kept here
    begin
      int slot = 0;
      int wheel [6] = '{0, 0, 0, 1, 2, 3};
      policy = ARB_TDMA;
      // the wheel is at 0 only right after reset: restart it
      hresetn = 1'b0; @(posedge hclk); hresetn = 1'b1;
      for (int c = 0; c < 3000; c++) begin
        @(negedge hclk);
        hbusreq = NM'($urandom);
        hready  = 1'b1;
        #1;
        own = owner_of(hgrant);
        exp_arb = !hbusreq[own] && (hbusreq != 0);
        expw = own;
        if (exp_arb) begin
          if (hbusreq[wheel[slot]]) expw = wheel[slot];
          else for (int k = NM; k >= 1; k--) if (hbusreq[(own + k) % NM]) expw = (own + k) % NM;
          slot = (slot + 1) % 6;
        end
        @(posedge hclk);
        #1;
        check(owner_of(hgrant) == expw, $sformatf("TDMA winner %0d expected %0d", owner_of(hgrant), expw));
      end
    end
    // phase 3: lottery, wins against the expected number of wins
    begin
      real expct [NM];
      int  tickets [NM] = '{3, 1, 1, 1};
      int  tot;
      policy = ARB_LOTTERY;
      wins = '{0, 0, 0, 0};
      expct = '{0.0, 0.0, 0.0, 0.0};
      for (int c = 0; c < 8000; c++) begin
        @(negedge hclk);
        hbusreq = NM'($urandom);
        hready  = 1'b1;
        #1;
        own = owner_of(hgrant);
        exp_arb = !hbusreq[own] && (hbusreq != 0);
        if (exp_arb) begin
          tot = 0;
          for (int i = 0; i < NM; i++) if (hbusreq[i]) tot += tickets[i];
          for (int i = 0; i < NM; i++) if (hbusreq[i]) expct[i] += real'(tickets[i]) / real'(tot);
        end
        @(posedge hclk);
        #1;
        if (exp_arb) begin
          wins[owner_of(hgrant)]++;
          check(hbusreq[owner_of(hgrant)], "lottery winner was requesting");
        end
      end
      $display("lottery wins %0d %0d %0d %0d expected %0.0f %0.0f %0.0f %0.0f", wins[0], wins[1],
               wins[2], wins[3], expct[0], expct[1], expct[2], expct[3]);
      for (int i = 0; i < NM; i++)
        check(real'(wins[i]) > 0.85 * expct[i] && real'(wins[i]) < 1.15 * expct[i],
              $sformatf("lottery share of master %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// ahb_arbiter: shared-bus arbiter (AB) with four run-time selectable
// policies: fixed priority, round-robin, TDMA and lottery.
//
// Operation. The current owner keeps the bus for as long as it holds its
// HBUSREQ high; a master lowers HBUSREQ with the last address of its
// transaction. When the owner has let go, HREADY is high and some master
// requests, a new owner is chosen and its HGRANT is raised at the next clock
// edge (one arbitration cycle). HMASTER, the select of the shared bus's
// address multiplexer, follows HGRANT one HREADY edge later, as in AHB, so a
// newly granted master drives its first address in the cycle after it has
// seen HGRANT and HREADY together. With no request the last owner stays
// granted (parked).
//
// Policies (policy input, flybus_pkg::arb_policy_e):
//  * fixed priority: the requesting master with the lowest index wins;
//  * round-robin: the first requester after the previous owner wins;
//  * TDMA: a wheel of sum(SLOTS) slots, master i owning SLOTS[i] consecutive
//    slots; the wheel steps once per arbitration; the slot's owner wins if it
//    requests, otherwise round-robin decides;
//  * lottery: master i holds TICKETS[i] tickets; a 16-bit LFSR draws a
//    number below the ticket total of the requesting masters, and the
//    master whose ticket range holds it wins.
// Defaults 3,1,1,1 for slots and tickets are the weights the design is
// evaluated with for four masters M1..M4; the wheel order, the LFSR
// polynomial and the parking rule are this design's own choices.
module ahb_arbiter
  import flybus_pkg::*;
#(
  parameter int unsigned NM = 4,
  parameter int unsigned SLOTS   [NM] = '{3, 1, 1, 1},
  parameter int unsigned TICKETS [NM] = '{3, 1, 1, 1}
) (
  input  logic                  hclk,
  input  logic                  hresetn,
  input  arb_policy_e           policy,
  input  logic [NM-1:0]         hbusreq,
  input  logic                  hready,
  output logic [NM-1:0]         hgrant,
  output logic [$clog2(NM)-1:0] hmaster,
  output logic                  arb_event   // a new owner is chosen this cycle
);

  localparam int unsigned MW = $clog2(NM);

  function automatic int unsigned sum_of(int unsigned a [NM]);
    int unsigned s = 0;
    for (int i = 0; i < NM; i++) s += a[i];
    return s;
  endfunction

  localparam int unsigned WHEEL = sum_of(SLOTS);
  localparam int unsigned WW    = (WHEEL > 1) ? $clog2(WHEEL) : 1;

  logic [MW-1:0] owner, winner, rr_winner, slot_master, lot_winner;
  logic [WW-1:0] slot;
  logic [15:0]   lfsr;
  logic          arb;

  assign arb       = hready && !hbusreq[owner] && (|hbusreq);
  assign arb_event = arb;

  // Round-robin: first requester after the previous owner
  always_comb begin
    rr_winner = owner;
    for (int k = NM; k >= 1; k--) begin
      automatic logic [MW-1:0] c = MW'((int'(owner) + k) % NM);
      if (hbusreq[c]) rr_winner = MW'(c);
    end
  end

  // TDMA: master owning the current slot
  always_comb begin
    automatic int unsigned base = 0;
    slot_master = '0;
    for (int i = 0; i < NM; i++) begin
      if (int'(slot) >= base && int'(slot) < base + SLOTS[i]) slot_master = MW'(i);
      base += SLOTS[i];
    end
  end

  // Lottery: draw below the requesting masters' ticket total
  always_comb begin
    automatic int unsigned total = 0;
    automatic int unsigned draw;
    automatic int unsigned base = 0;
    for (int i = 0; i < NM; i++) if (hbusreq[i]) total += TICKETS[i];
    draw = (total == 0) ? 0 : (int'(lfsr) % total);
    lot_winner = owner;
    for (int i = NM - 1; i >= 0; i--) begin
      if (hbusreq[i]) begin
        base = 0;
        for (int j = 0; j < i; j++) if (hbusreq[j]) base += TICKETS[j];
        if (draw >= base) begin
          lot_winner = MW'(i);
          break;
        end
      end
    end
  end

  always_comb begin
    winner = owner;
    unique case (policy)
      ARB_FIXED: begin
        for (int i = NM - 1; i >= 0; i--) if (hbusreq[i]) winner = MW'(i);
      end
      ARB_RR:      winner = rr_winner;
      ARB_TDMA:    winner = hbusreq[slot_master] ? slot_master : rr_winner;
      ARB_LOTTERY: winner = lot_winner;
      default:     winner = rr_winner;
    endcase
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      owner   <= '0;
      hmaster <= '0;
      slot    <= '0;
      lfsr    <= 16'hACE1;
    end else begin
      // x^16 + x^14 + x^13 + x^11 + 1, Fibonacci form
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      if (arb) begin
        owner <= winner;
        slot  <= (int'(slot) == WHEEL - 1) ? '0 : slot + 1'b1;
      end
      if (hready) hmaster <= owner;
    end
  end

  always_comb begin
    hgrant = '0;
    hgrant[owner] = 1'b1;
  end

endmodule

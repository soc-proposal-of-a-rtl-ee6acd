// ahb_traffic_master: behavioural AHB master for the testbenches (stands in
// for the processor and the other bus masters, which are not part of the
// design).
//
// It repeats: wait a random idle time of 0..IDLE_MAX cycles (uniform, mean
// IDLE_MAX/2), pick a random slave, a random length of 1, 4, 8 or 16 beats
// (SINGLE, INCR4, INCR8, INCR16) and read or write, raise HBUSREQ, wait for
// HGRANT and HREADY at a clock edge, then issue the burst. HBUSREQ falls with
// the last address. Each master works in its own window of REGION_WORDS words
// in every slave, keeps a copy of what it wrote and checks every read beat
// against it (unwritten words read as zero).
// Statistics: transactions, beats, request cycles (HBUSREQ high before the
// grant is taken), hold cycles (an address phase stalled by HREADY low).
module ahb_traffic_master
  import flybus_pkg::*;
#(
  parameter int unsigned ID           = 0,
  parameter int unsigned NS           = 4,
  parameter int unsigned SEL_LSB      = 28,
  parameter int unsigned REGION_WORDS = 64,
  parameter int unsigned IDLE_MAX     = 30,
  parameter int unsigned SEED         = 1
) (
  input  logic          hclk,
  input  logic          hresetn,
  input  logic          enable,
  output ahb_ctrl_t     ctrl,
  output logic [DW-1:0] hwdata,
  output logic          hbusreq,
  input  logic          hgrant,
  input  logic          hready,
  input  logic [DW-1:0] hrdata,
  input  hresp_e        hresp,
  output logic          busy,
  output int unsigned   n_trans,
  output int unsigned   n_beats,
  output int unsigned   req_cycles,
  output int unsigned   hold_cycles,
  output int unsigned   checks,
  output int unsigned   failures
);
  logic [DW-1:0] shadow [logic [DW-1:0]];
  int unsigned   rng;

  function automatic int unsigned rnd(int unsigned n);
    rng = rng * 1103515245 + 12345;
    return (rng >> 8) % n;
  endfunction

  function automatic logic [DW-1:0] expect_word(logic [DW-1:0] a);
    return shadow.exists(a) ? shadow[a] : '0;
  endfunction

  initial begin
    int unsigned len, base, slv, idle;
    logic wr;
    logic [DW-1:0] addr [16];
    logic [DW-1:0] wdat [16];
    hburst_e burst;
    rng = SEED * 7919 + ID;
    ctrl = AHB_CTRL_IDLE;
    hwdata = '0; hbusreq = 1'b0; busy = 1'b0;
    n_trans = 0; n_beats = 0; req_cycles = 0; hold_cycles = 0; checks = 0; failures = 0;
    wait (hresetn === 1'b1);
    forever begin
      @(posedge hclk);
      if (!enable) continue;
      idle = rnd(IDLE_MAX + 1);
      repeat (idle) @(posedge hclk);
      case (rnd(4))
        0: begin len = 1;  burst = HBURST_SINGLE; end
        1: begin len = 4;  burst = HBURST_INCR4;  end
        2: begin len = 8;  burst = HBURST_INCR8;  end
        default: begin len = 16; burst = HBURST_INCR16; end
      endcase
      slv  = rnd(NS);
      wr   = rnd(2) == 0;
      base = ID * REGION_WORDS + rnd(REGION_WORDS - len + 1);
      for (int k = 0; k < len; k++) begin
        addr[k] = (DW'(slv) << SEL_LSB) | DW'((base + k) * 4);
        wdat[k] = {8'(ID), 8'(n_trans), 16'(rng)} + DW'(k);
      end
      // request and wait for the grant
      busy    <= 1'b1;
      hbusreq <= 1'b1;
      do begin
        @(posedge hclk);
        req_cycles++;
      end while (!(hgrant && hready));
      // address and data phases
      for (int k = 0; k <= len; k++) begin
        if (k < len) begin
          ctrl.haddr  <= addr[k];
          ctrl.htrans <= (k == 0) ? HTRANS_NONSEQ : HTRANS_SEQ;
          ctrl.hwrite <= wr;
          ctrl.hburst <= burst;
          if (k == len - 1) hbusreq <= 1'b0;
        end else begin
          ctrl.htrans <= HTRANS_IDLE;
        end
        if (k > 0 && wr) hwdata <= wdat[k-1];
        do begin
          @(posedge hclk);
          if (!hready && k < len) hold_cycles++;
        end while (!hready);
        if (k > 0) begin
          n_beats++;
          if (wr) shadow[addr[k-1]] = wdat[k-1];
          else begin
            checks++;
            if (hrdata !== expect_word(addr[k-1]) || hresp != HRESP_OKAY) begin
              failures++;
              $display("master %0d: read %h got %h expected %h", ID, addr[k-1], hrdata,
                       expect_word(addr[k-1]));
            end
          end
        end
      end
      n_trans++;
      busy <= 1'b0;
    end
  end
endmodule

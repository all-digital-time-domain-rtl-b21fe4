// conv_controller: sequences one convolution in MAC clock periods.
//
// Every step happens on mac_tick, the last quantum of a MAC period, so each
// slot below lasts exactly one MAC period:
//   RST            clear all MDLs and counters
//   TAP(c, k)      tap k (0..KTAPS-1) of input channel c: pixels and weights
//                  latched at the start of the slot drive the MDLs
//   GAP(c)         one idle period after the taps of each channel
//   READ           counters are final; pooled results are taken at its end
// A convolution over n_chan channels thus takes 2 + n_chan*(KTAPS+1) MAC
// periods: 28 for LeNet-5 C1 (1 channel) and 158 for C3 (6 channels). These
// counts reproduce the convolution cycle times the document reports
// (149.3 us and 842.67 us at a 0.1875 MHz MAC clock); the document does not
// show the sequence itself, so the slot order is this design's reading.
//
// Interface: start is taken when idle, and the convolution begins at the next
// MAC period boundary. req_valid/req_chan/req_tap announce, during the whole
// slot before it, the tap the next slot will use; ld strobes (with mac_tick)
// when the engine must latch that tap's pixels and weights. out_valid strobes
// at the end of READ. n_chan = 0 is taken as 1. rst_n is synchronous.
module conv_controller #(
  parameter int unsigned KTAPS = 25,
  parameter int unsigned CH_W  = 4,
  localparam int unsigned TAP_W = $clog2(KTAPS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mac_tick,
  input  logic             start,
  input  logic [CH_W-1:0]  n_chan,
  output logic             busy,
  output logic             mdl_rst,
  output logic             tap_active,
  output logic             ld,
  output logic             req_valid,
  output logic [CH_W-1:0]  req_chan,
  output logic [TAP_W-1:0] req_tap,
  output logic             out_valid
);

  typedef enum logic [2:0] {SL_IDLE, SL_RST, SL_TAP, SL_GAP, SL_READ} slot_e;

  slot_e            slot, nxt_slot;
  logic [CH_W-1:0]  chan, nxt_chan, nchan_q;
  logic [TAP_W-1:0] tap,  nxt_tap;
  logic             pending;

  always_comb begin
    nxt_slot = slot;
    nxt_chan = chan;
    nxt_tap  = tap;
    unique case (slot)
      SL_IDLE: if (pending) nxt_slot = SL_RST;
      SL_RST: begin
        nxt_slot = SL_TAP;
        nxt_chan = '0;
        nxt_tap  = '0;
      end
      SL_TAP: begin
        if (tap == TAP_W'(KTAPS - 1)) nxt_slot = SL_GAP;
        else                          nxt_tap  = tap + TAP_W'(1);
      end
      SL_GAP: begin
        if (chan == nchan_q - CH_W'(1)) nxt_slot = SL_READ;
        else begin
          nxt_slot = SL_TAP;
          nxt_chan = chan + CH_W'(1);
          nxt_tap  = '0;
        end
      end
      SL_READ: nxt_slot = SL_IDLE;
      default: nxt_slot = SL_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slot    <= SL_IDLE;
      chan    <= '0;
      tap     <= '0;
      pending <= 1'b0;
      nchan_q <= CH_W'(1);
    end else begin
      if (start && slot == SL_IDLE && !pending) begin
        pending <= 1'b1;
        nchan_q <= (n_chan == '0) ? CH_W'(1) : n_chan;
      end
      if (mac_tick) begin
        slot <= nxt_slot;
        chan <= nxt_chan;
        tap  <= nxt_tap;
        if (slot == SL_IDLE && pending) pending <= 1'b0;
      end
    end
  end

  assign busy       = pending || (slot != SL_IDLE);
  assign mdl_rst    = !rst_n || (slot == SL_RST);
  assign tap_active = (slot == SL_TAP);
  assign req_valid  = (nxt_slot == SL_TAP);
  assign req_chan   = nxt_chan;
  assign req_tap    = nxt_tap;
  assign ld         = mac_tick && (nxt_slot == SL_TAP);
  assign out_valid  = mac_tick && (slot == SL_READ);

  // A latch request only ever comes at a period boundary.
  assert property (@(posedge clk) disable iff (!rst_n) ld |-> mac_tick);

endmodule

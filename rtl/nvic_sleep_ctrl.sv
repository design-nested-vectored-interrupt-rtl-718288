// nvic_sleep_ctrl: the core-side sleep logic of the NVIC.
//
// Implements the WFI / WFE / sleep-on-exit behaviour of the SLEEPDEEP and
// WAKEUP flow charts:
//  * WFI always sleeps. WFE sleeps only if the event latch is clear; if it is
//    set, the latch is cleared and execution continues. The latch is set by
//    the external event input rxev.
//  * A sleep-on-exit request from the exception sequencer (rising edge of
//    soe_sleep) also puts the core to sleep.
//  * While asleep, SLEEPING is high, and SLEEPDEEP as well if the SCR
//    SLEEPDEEP bit was set when the sleep began.
//  * An interrupt that would be taken (wake_req), or for a WFE sleep an
//    event, ends the sleep, unless the PMU holds the core asleep: when the PMU
//    pulls SLEEPHOLDREQn low during a sleep, SLEEPHOLDACKn is pulled low one
//    cycle later and stays low until the request is released; while it is
//    low the core stays asleep and take_en keeps the sequencer from taking
//    interrupts.
//  * WIC handshake: when the WIC asks for WIC-mode sleep (WICDSREQn low) the
//    core agrees one cycle later (WICDSACKn low). When both are low and a deep
//    sleep starts, WICLOAD pulses for one cycle with WICMASK carrying the
//    enabled interrupts; SLEEPDEEP rises the cycle after. On waking from such
//    a sleep, WICCLEAR pulses for one cycle.
// The signal names and the order (request, acknowledge, load and mask, then
// SLEEPDEEP; clear on wake-up) follow the document; the single-cycle pulse
// widths and the one-cycle acknowledge delays are this design's choice.
// All strobes (wfi, wfe, rxev) are one-cycle pulses.
module nvic_sleep_ctrl
  import nvic_pkg::*;
#(
  parameter int unsigned NUM_IRQ = NUM_IRQ_DEF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wfi,
  input  logic               wfe,
  input  logic               rxev,
  input  logic               scr_sleepdeep,
  input  logic               soe_sleep,
  input  logic               wake_req,
  input  logic [NUM_IRQ-1:0] enabled,
  output logic               sleeping,
  output logic               sleepdeep,
  output logic               take_en,
  // PMU hold handshake
  input  logic               sleepholdreqn,
  output logic               sleepholdackn,
  // WIC interface
  input  logic               wicdsreqn,
  output logic               wicdsackn,
  output logic               wicload,
  output logic               wicclear,
  output logic [NUM_IRQ-1:0] wicmask
);

  logic event_latch;
  logic by_wfe;        // current sleep was entered by WFE
  logic deep_q;        // current sleep is a deep sleep
  logic wic_sleep;     // current sleep is a WIC-mode deep sleep
  logic soe_q;
  logic wic_mode;
  logic go_sleep, wake;

  assign wic_mode = !wicdsreqn && !wicdsackn;
  assign go_sleep = !sleeping && (wfi || (wfe && !event_latch) || (soe_sleep && !soe_q));
  assign wake     = sleeping && sleepholdackn && (wake_req || (by_wfe && rxev));
  assign take_en  = sleepholdackn;
  assign wicmask  = enabled;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      event_latch   <= 1'b0;
      sleeping      <= 1'b0;
      sleepdeep     <= 1'b0;
      by_wfe        <= 1'b0;
      deep_q        <= 1'b0;
      wic_sleep     <= 1'b0;
      soe_q         <= 1'b0;
      sleepholdackn <= 1'b1;
      wicdsackn     <= 1'b1;
      wicload       <= 1'b0;
      wicclear      <= 1'b0;
    end else begin
      soe_q     <= soe_sleep;
      wicdsackn <= wicdsreqn;
      wicload   <= 1'b0;
      wicclear  <= 1'b0;
      if (wfe) event_latch <= 1'b0;
      if (rxev) event_latch <= 1'b1;
      if (go_sleep) begin
        sleeping  <= 1'b1;
        by_wfe    <= wfe;
        deep_q    <= scr_sleepdeep;
        wic_sleep <= scr_sleepdeep && wic_mode;
        wicload   <= scr_sleepdeep && wic_mode;
      end else if (wake) begin
        sleeping  <= 1'b0;
        sleepdeep <= 1'b0;
        deep_q    <= 1'b0;
        wic_sleep <= 1'b0;
        wicclear  <= wic_sleep;
        if (by_wfe && rxev) event_latch <= 1'b0;
      end else if (sleeping) begin
        sleepdeep <= deep_q;
      end
      // hold: acknowledge only while asleep, release with the request
      if (!sleepholdreqn && sleeping && !wake) sleepholdackn <= 1'b0;
      else if (sleepholdreqn)                 sleepholdackn <= 1'b1;
    end
  end

  a_hold_keeps_asleep: assert property (@(posedge clk) disable iff (!rst_n)
    !sleepholdackn |-> sleeping);

endmodule

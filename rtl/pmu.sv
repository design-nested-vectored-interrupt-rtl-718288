// pmu: Power Management Unit for WIC-mode deep sleep.
//
// Runs on the always-on clock and walks the core through power-down and
// power-up, one step per clock:
//   RUN       WICENREQ follows wic_enable. When the WIC has acknowledged
//             (WICENACK) and the core signals SLEEPDEEP, go to HOLD.
//   HOLD      SLEEPHOLDREQn low, so the core cannot wake during power-down.
//             When SLEEPHOLDACKn comes back low, go on; if SLEEPDEEP falls
//             first (the core woke), go back to RUN.
//   ISOLATE   core clock (FCLK) stopped, ISOLATEn low: core outputs clamped.
//   RETAIN    RETAINn low: core state kept in retention cells.
//   OFF       PWRDOWN high: core power removed. Wait for WAKEUP from the WIC
//             while hold_sleep is low.
//   PWRUP     PWRDOWN low again.
//   RESTORE   RETAINn high: state restored.
//   UNISOLATE ISOLATEn high and FCLK running again.
//   WAKE      SLEEPHOLDREQn released; the core wakes on its pending
//             interrupt. Back to RUN once SLEEPDEEP has fallen.
// hold_sleep lets the system extend a sleep: an interrupt that arrives while
// it is high does not wake the core until it falls. The order of the steps
// and the signal names follow the document; one clock per step and the
// hold_sleep input are this design's choices. Outputs are decoded from the
// state register, so they change one clock after their cause.
module pmu
  import nvic_pkg::*;
(
  input  logic clk,            // always-on clock
  input  logic rst_n,
  input  logic wic_enable,     // system policy: use WIC-mode deep sleep
  input  logic hold_sleep,     // system request to keep the core asleep
  // WIC
  output logic wicenreq,
  input  logic wicenack,
  input  logic wakeup,
  // core
  input  logic sleepdeep,
  output logic sleepholdreqn,
  input  logic sleepholdackn,
  output logic fclk_en,
  // power control
  output logic isolaten,
  output logic retainn,
  output logic pwrdown
);

  pmu_state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= PMU_RUN;
    end else begin
      unique case (state)
        PMU_RUN:       if (sleepdeep && wicenack) state <= PMU_HOLD;
        PMU_HOLD:      if (!sleepholdackn)        state <= PMU_ISOLATE;
                       else if (!sleepdeep)       state <= PMU_RUN;
        PMU_ISOLATE:                              state <= PMU_RETAIN;
        PMU_RETAIN:                               state <= PMU_OFF;
        PMU_OFF:       if (wakeup && !hold_sleep) state <= PMU_PWRUP;
        PMU_PWRUP:                                state <= PMU_RESTORE;
        PMU_RESTORE:                              state <= PMU_UNISOLATE;
        PMU_UNISOLATE:                            state <= PMU_WAKE;
        PMU_WAKE:      if (!sleepdeep)            state <= PMU_RUN;
        default:                                  state <= PMU_RUN;
      endcase
    end
  end

  always_comb begin
    wicenreq      = wic_enable;
    sleepholdreqn = state == PMU_RUN || state == PMU_WAKE;
    fclk_en       = state == PMU_RUN || state == PMU_HOLD || state == PMU_UNISOLATE || state == PMU_WAKE;
    isolaten      = state == PMU_RUN || state == PMU_HOLD || state == PMU_UNISOLATE || state == PMU_WAKE;
    retainn       = !(state == PMU_RETAIN || state == PMU_OFF || state == PMU_PWRUP);
    pwrdown       = state == PMU_OFF;
  end

  a_power_off_isolated: assert property (@(posedge clk) disable iff (!rst_n)
    pwrdown |-> (!isolaten && !retainn && !fclk_en));

endmodule

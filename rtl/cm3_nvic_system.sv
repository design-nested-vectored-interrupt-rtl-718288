// cm3_nvic_system: the NVIC with its low-power companions.
//
// Puts together the interrupt and power subsystem of a Cortex-M3 class core
// as the WIC interfacing figure draws it:
//  * nvic - the interrupt controller, clocked by the gated core clock FCLK.
//    Its interrupt inputs (external lines and the non-maskable interrupt
//    NMI) are the OR of the incoming lines and the WIC's latched WICPEND
//    vector, so that interrupts caught while the core was powered down are
//    seen by the NVIC when it comes back.
//  * wic  - the wake-up interrupt controller, on the always-on clock. It
//    watches the external lines and the NMI; the NMI is always masked in.
//  * pmu  - the power management unit, on the always-on clock. It stops and
//    restarts FCLK through a clock gate and drives ISOLATEn, RETAINn and
//    PWRDOWN for the core's power domain.
//  * Isolation clamps force the core's outputs towards the WIC and PMU
//    (SLEEPDEEP, SLEEPHOLDACKn, WICDSACKn, WICLOAD, WICCLEAR, WICMASK) to 0
//    while ISOLATEn is low.
// The core itself, the memory holding the stack and vector table, and the
// register bus master are outside: their signals are ports. Power is not
// really removed in RTL: with FCLK stopped the NVIC keeps its state, which
// stands for the retention the PMU turns on.
//
// One clock, clk, drives everything; FCLK is clk gated by the PMU.
module cm3_nvic_system
  import nvic_pkg::*;
#(
  parameter int unsigned NUM_IRQ     = NUM_IRQ_DEF,
  parameter int unsigned PRIO_W      = PRIO_W_DEF,
  parameter int unsigned TAIL_CYCLES = TAIL_CYCLES_DEF,
  parameter logic [31:0] VTOR        = 32'h0000_0000,
  localparam int unsigned ID_W       = (NUM_IRQ > 1) ? $clog2(NUM_IRQ) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // interrupt sources
  input  logic [NUM_IRQ-1:0] irq,
  input  logic               nmi,
  input  logic [NUM_IRQ-1:0] int_prior,
  output logic               interrupt_detect,
  // core
  output logic               fclk,
  input  logic               nvic_irq_exe_end,
  input  logic               nvic_pop_det,
  output logic               int_fetch,
  output logic [31:0]        nvic_pc,
  output logic               handler_mode,
  output logic [ID_W-1:0]    cur_irq,
  output logic               cur_nmi,
  output logic [3:0]         reg_no,
  output logic               core_write,
  output logic [31:0]        core_wdata,
  input  logic [31:0]        core_rdata,
  output logic               ret_done,
  input  logic               wfi,
  input  logic               wfe,
  input  logic               rxev,
  output logic               sleeping,
  output logic               sleepdeep,
  // control register port
  input  logic               reg_sel,
  input  logic               reg_write,
  input  logic [11:0]        reg_addr,
  input  logic [31:0]        reg_wdata,
  input  logic [3:0]         reg_wstrb,
  input  logic               reg_priv,
  output logic [31:0]        reg_rdata,
  output logic               reg_fault,
  // PPB port (stack memory)
  output logic [31:0]        padd,
  output logic               psel,
  output logic               pena,
  output logic               pwrite,
  output logic [31:0]        pwdata,
  input  logic [31:0]        prdata,
  // vector table port
  output logic               vec_req,
  output logic [31:0]        vec_addr,
  input  logic [31:0]        vec_rdata,
  // power control
  input  logic               wic_enable,
  input  logic               hold_sleep,
  output logic               isolaten,
  output logic               retainn,
  output logic               pwrdown,
  output logic               wakeup,
  output logic [NUM_IRQ:0]   wicpend,      // bit NUM_IRQ is the NMI
  output logic [NUM_IRQ:0]   wicsense,
  // mechanism events
  output logic               ev_entry,
  output logic               ev_nested,
  output logic               ev_late,
  output logic               ev_tail,
  output logic               ev_pop
);

  logic               fclk_en;
  logic [NUM_IRQ-1:0] int_det;
  logic               nmi_det;
  // core-domain outputs before and after the clamps
  logic               c_sleepdeep, c_sleepholdackn, c_wicdsackn, c_wicload, c_wicclear;
  logic [NUM_IRQ-1:0] c_wicmask;
  logic               i_sleepdeep, i_sleepholdackn, i_wicdsackn, i_wicload, i_wicclear;
  logic [NUM_IRQ-1:0] i_wicmask;
  logic               sleepholdreqn, wicdsreqn, wicenreq, wicenack;

  assign int_det   = irq | wicpend[NUM_IRQ-1:0];
  assign nmi_det   = nmi | wicpend[NUM_IRQ];
  assign sleepdeep = c_sleepdeep;

  clk_gate u_fclk_gate (.clk, .en(fclk_en), .gclk(fclk));

  nvic #(
    .NUM_IRQ(NUM_IRQ), .PRIO_W(PRIO_W), .TAIL_CYCLES(TAIL_CYCLES),
    .VTOR(VTOR)
  ) u_nvic (
    .nvic_clock_in(fclk), .rst_n,
    .int_det, .nmi(nmi_det), .int_prior, .interrupt_detect,
    .nvic_irq_exe_end, .nvic_pop_det, .int_fetch, .nvic_pc, .handler_mode, .cur_irq, .cur_nmi,
    .reg_no, .core_write, .core_wdata, .core_rdata, .ret_done,
    .wfi, .wfe, .rxev,
    .reg_sel, .reg_write, .reg_addr, .reg_wdata, .reg_wstrb, .reg_priv, .reg_rdata, .reg_fault,
    .padd, .psel, .pena, .pwrite, .pwdata, .prdata,
    .vec_req, .vec_addr, .vec_rdata,
    .sleeping, .sleepdeep(c_sleepdeep),
    .sleepholdreqn, .sleepholdackn(c_sleepholdackn),
    .wicdsreqn, .wicdsackn(c_wicdsackn),
    .wicload(c_wicload), .wicclear(c_wicclear), .wicmask(c_wicmask),
    .ev_entry, .ev_nested, .ev_late, .ev_tail, .ev_pop
  );

  iso_clamp #(.W(5 + NUM_IRQ)) u_clamp (
    .isolaten,
    .d({c_sleepdeep, c_sleepholdackn, c_wicdsackn, c_wicload, c_wicclear, c_wicmask}),
    .q({i_sleepdeep, i_sleepholdackn, i_wicdsackn, i_wicload, i_wicclear, i_wicmask})
  );

  // The WIC watches the NMI as one more line, always masked in.
  wic #(.NUM_IRQ(NUM_IRQ + 1)) u_wic (
    .clk, .rst_n,
    .wicint({nmi, irq}),
    .wicenreq, .wicenack, .wakeup, .wicsense,
    .wicdsreqn, .wicdsackn(i_wicdsackn),
    .wicload(i_wicload), .wicclear(i_wicclear), .wicmask({1'b1, i_wicmask}), .wicpend
  );

  pmu u_pmu (
    .clk, .rst_n,
    .wic_enable, .hold_sleep,
    .wicenreq, .wicenack, .wakeup,
    .sleepdeep(i_sleepdeep),
    .sleepholdreqn, .sleepholdackn(i_sleepholdackn),
    .fclk_en, .isolaten, .retainn, .pwrdown
  );

endmodule

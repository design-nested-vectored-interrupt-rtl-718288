// nvic: Nested Vectored Interrupt Controller.
//
// Joins the control registers (nvic_regs), the priority resolver
// (nvic_prio_resolver), the exception sequencer (nvic_exc_seq) and the
// core-side sleep logic (nvic_sleep_ctrl). Its interface is that of the NVIC
// interface figure: clock nvic_clock_in, end-of-handler signals from the
// decoder (nvic_irq_exe_end) and the prefetch unit (nvic_pop_det), the
// interrupt lines int_det with their per-line priority bits int_prior, the
// PPB port padd / psel / pena / pwrite / pwdata / prdata used for stacking,
// and int_fetch, which tells the core to fetch from the new PC. To that it
// adds what the rest of the document needs: a register port for the
// control registers, a core register port (reg_no and its data, used to
// save and restore R0-R3, R12, R13 and to write LR), a vector table read
// port, the sleep signals and the WIC / PMU handshakes.
//
// interrupt_detect pulses for one cycle when an enabled interrupt line or
// the non-maskable interrupt line nmi rises. The NMI outranks every external
// interrupt and cannot be disabled; cur_nmi is high while its handler runs.
// Timing: an interrupt line sampled high at a clock edge is pending after
// it, the entry starts in the following cycle, six stacking cycles follow,
// and int_fetch is high in the cycle after the last one (see nvic_exc_seq).
module nvic
  import nvic_pkg::*;
#(
  parameter int unsigned NUM_IRQ     = NUM_IRQ_DEF,
  parameter int unsigned PRIO_W      = PRIO_W_DEF,
  parameter int unsigned TAIL_CYCLES = TAIL_CYCLES_DEF,
  parameter logic [31:0] VTOR        = 32'h0000_0000,
  localparam int unsigned ID_W       = (NUM_IRQ > 1) ? $clog2(NUM_IRQ) : 1
) (
  input  logic               nvic_clock_in,
  input  logic               rst_n,
  // interrupts
  input  logic [NUM_IRQ-1:0] int_det,
  input  logic               nmi,          // non-maskable interrupt line
  input  logic [NUM_IRQ-1:0] int_prior,
  output logic               interrupt_detect,
  // core
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
  // control register port
  input  logic               reg_sel,
  input  logic               reg_write,
  input  logic [11:0]        reg_addr,
  input  logic [31:0]        reg_wdata,
  input  logic [3:0]         reg_wstrb,
  input  logic               reg_priv,
  output logic [31:0]        reg_rdata,
  output logic               reg_fault,
  // PPB port
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
  // sleep, PMU and WIC
  output logic               sleeping,
  output logic               sleepdeep,
  input  logic               sleepholdreqn,
  output logic               sleepholdackn,
  input  logic               wicdsreqn,
  output logic               wicdsackn,
  output logic               wicload,
  output logic               wicclear,
  output logic [NUM_IRQ-1:0] wicmask,
  // mechanism events
  output logic               ev_entry,
  output logic               ev_nested,
  output logic               ev_late,
  output logic               ev_tail,
  output logic               ev_pop
);

  localparam int unsigned KEY_W = PRIO_W + 2;

  logic [NUM_IRQ-1:0] pending, enabled, active;
  logic [PRIO_W-1:0]  prio [NUM_IRQ];
  logic               scr_sleepdeep, scr_sleeponexit;
  logic               enter, deact;
  logic [ID_W-1:0]    id;
  logic               id_nmi, nmi_pend, nmi_act, best_nmi;
  logic               best_valid, exec_valid, preempt;
  logic [ID_W-1:0]    best_id;
  logic [KEY_W-1:0]   best_key, exec_key;
  logic               take_en, soe_sleep;

  nvic_regs #(.NUM_IRQ(NUM_IRQ), .PRIO_W(PRIO_W)) u_regs (
    .clk(nvic_clock_in), .rst_n,
    .reg_sel, .reg_write, .reg_addr, .reg_wdata, .reg_wstrb, .reg_priv, .reg_rdata, .reg_fault,
    .int_det, .nmi,
    .enter_i(enter), .deact_i(deact), .id_i(id), .nmi_i(id_nmi),
    .pending, .enabled, .active, .nmi_pend, .nmi_act, .prio,
    .new_irq(interrupt_detect),
    .scr_sleepdeep, .scr_sleeponexit
  );

  nvic_prio_resolver #(.NUM_IRQ(NUM_IRQ), .PRIO_W(PRIO_W)) u_resolver (
    .pending, .enabled, .active, .prio, .int_prior, .nmi_pend, .nmi_act,
    .best_valid, .best_nmi, .best_id, .best_key, .exec_valid, .exec_key, .preempt
  );

  nvic_exc_seq #(
    .NUM_IRQ(NUM_IRQ), .PRIO_W(PRIO_W), .TAIL_CYCLES(TAIL_CYCLES),
    .VTOR(VTOR)
  ) u_seq (
    .clk(nvic_clock_in), .rst_n,
    .preempt, .best_id, .best_nmi, .best_key, .take_en, .sleeponexit(scr_sleeponexit),
    .enter_o(enter), .deact_o(deact), .id_o(id), .nmi_o(id_nmi),
    .nvic_irq_exe_end, .nvic_pop_det,
    .int_fetch, .nvic_pc, .handler_mode, .cur_irq, .cur_nmi,
    .reg_no, .core_write, .core_wdata, .core_rdata, .ret_done, .soe_sleep,
    .padd, .psel, .pena, .pwrite, .pwdata, .prdata,
    .vec_req, .vec_addr, .vec_rdata,
    .ev_entry, .ev_nested, .ev_late, .ev_tail, .ev_pop
  );

  nvic_sleep_ctrl #(.NUM_IRQ(NUM_IRQ)) u_sleep (
    .clk(nvic_clock_in), .rst_n,
    .wfi, .wfe, .rxev, .scr_sleepdeep, .soe_sleep,
    .wake_req(preempt), .enabled,
    .sleeping, .sleepdeep, .take_en,
    .sleepholdreqn, .sleepholdackn,
    .wicdsreqn, .wicdsackn, .wicload, .wicclear, .wicmask
  );

endmodule

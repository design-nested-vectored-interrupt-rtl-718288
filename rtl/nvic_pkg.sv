// nvic_pkg: constants and types shared by the NVIC, the wake-up interrupt
// controller (WIC) and the power management unit (PMU).
//
// Holds the number of external interrupts (32, the width of the int_det and
// int_prior buses of the NVIC interface), the priority width (8 bits, i.e.
// 256 levels), the register offsets of the NVIC control registers inside the
// System Control Space, the order in which the exception sequencer stacks
// core registers, and the state encodings of the sequencer and the PMU.
// Register offsets follow the ARMv7-M System Control Space layout; the
// document names the registers but not their addresses.
package nvic_pkg;

  // Number of external interrupt lines and priority bits.
  localparam int unsigned NUM_IRQ_DEF  = 32;
  localparam int unsigned PRIO_W_DEF   = 8;

  // Core registers saved on exception entry, in push order:
  // R0, R1, R2, R3, R12, R13.
  localparam int unsigned FRAME_REGS   = 6;
  localparam logic [3:0]  FRAME_REG_NO [FRAME_REGS] = '{4'd0, 4'd1, 4'd2, 4'd3, 4'd12, 4'd13};

  // Link register number and the value written to it on exception entry and
  // on a tail-chain (return to thread mode, main stack).
  localparam logic [3:0]  LR_REG_NO    = 4'd14;
  localparam logic [3:0]  SP_REG_NO    = 4'd13;
  localparam logic [31:0] EXC_RETURN   = 32'hFFFF_FFF9;

  // Cycles spent in a tail-chain between two handlers.
  localparam int unsigned TAIL_CYCLES_DEF = 6;

  // External interrupt n has its vector at word 16 + n of the vector table
  // (words 0 and 1 hold the reset SP and PC).
  localparam int unsigned VEC_IRQ0_WORD = 16;
  // The non-maskable interrupt (NMI) has its vector at word 2.
  localparam int unsigned VEC_NMI_WORD  = 2;

  // Register offsets (byte address bits [11:0] inside the System Control Space).
  localparam logic [11:0] OFF_ICTR = 12'h004;
  localparam logic [11:0] OFF_ISER = 12'h100;
  localparam logic [11:0] OFF_ICER = 12'h180;
  localparam logic [11:0] OFF_ISPR = 12'h200;
  localparam logic [11:0] OFF_ICPR = 12'h280;
  localparam logic [11:0] OFF_IABR = 12'h300;
  localparam logic [11:0] OFF_IPR  = 12'h400;  // 0x400..0x41C, 4 priorities per word
  localparam logic [11:0] OFF_SCR  = 12'hD10;  // bit 1 SLEEPONEXIT, bit 2 SLEEPDEEP
  localparam logic [11:0] OFF_CCR  = 12'hD14;  // bit 1 USERSETMPEND
  localparam logic [11:0] OFF_STIR = 12'hF00;  // software trigger: write IRQ number

  // Exception sequencer states.
  typedef enum logic [2:0] {
    SEQ_BOOT,       // after reset: SP and PC loaded from vector words 0, 1
    SEQ_RUN,        // executing thread code or a handler
    SEQ_PUSH,       // stacking the frame, vector fetched in parallel
    SEQ_ENTER,      // new PC handed to the core
    SEQ_RET_CHECK,  // handler ended: tail-chain, sleep-on-exit or pop
    SEQ_POP,        // unstacking the frame
    SEQ_TAIL,       // tail-chain: frame stays stacked, new vector fetched
    SEQ_SOE_SLEEP   // slept on exit: frame stays stacked until next interrupt
  } seq_state_e;

  // PMU states.
  typedef enum logic [3:0] {
    PMU_RUN,        // core powered, clock running
    PMU_HOLD,       // SLEEPHOLDREQn asserted, waiting for SLEEPHOLDACKn
    PMU_ISOLATE,    // clock stopped, isolation clamps on
    PMU_RETAIN,     // state retention on
    PMU_OFF,        // core power removed, waiting for WAKEUP
    PMU_PWRUP,      // power restored
    PMU_RESTORE,    // retention released
    PMU_UNISOLATE,  // clamps released, clock restarted
    PMU_WAKE        // hold released, waiting for the core to leave deep sleep
  } pmu_state_e;

endpackage

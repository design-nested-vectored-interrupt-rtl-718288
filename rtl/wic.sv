// wic: Wake-up Interrupt Controller.
//
// A small, always-powered interrupt detector that stands in for the NVIC
// while the core is powered down. It has no priority logic, only a mask:
//  * Enable handshake. The PMU raises WICENREQ; the WIC asks the core for
//    WIC-mode sleep by pulling WICDSREQn low; once the core acknowledges with
//    WICDSACKn low, the WIC raises WICENACK to the PMU. Dropping WICENREQ
//    undoes the chain in the same order.
//  * Priming. On entry to deep sleep the core pulses WICLOAD with WICMASK
//    holding the interrupts that may wake it. The mask is stored and shown
//    on WICSENSE.
//  * Detection. While primed, any interrupt line (WICINT) that is high and
//    masked in is latched in WICPEND, so one-cycle pulse interrupts are kept.
//    WAKEUP is high while any WICPEND bit is set.
//  * Clear. When the core is awake again it pulses WICCLEAR, which empties the
//    mask and WICPEND.
// Behaviour and signal names follow the document; the register timing (all
// outputs registered, one clock after their cause) is this design's choice.
// Active-low signals end in n.
module wic
  import nvic_pkg::*;
#(
  parameter int unsigned NUM_IRQ = NUM_IRQ_DEF
) (
  input  logic               clk,        // always-on clock
  input  logic               rst_n,
  input  logic [NUM_IRQ-1:0] wicint,
  // PMU side
  input  logic               wicenreq,
  output logic               wicenack,
  output logic               wakeup,
  output logic [NUM_IRQ-1:0] wicsense,
  // core side
  output logic               wicdsreqn,
  input  logic               wicdsackn,
  input  logic               wicload,
  input  logic               wicclear,
  input  logic [NUM_IRQ-1:0] wicmask,
  output logic [NUM_IRQ-1:0] wicpend
);

  logic [NUM_IRQ-1:0] mask_q;
  logic               primed;

  assign wicsense = mask_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wicdsreqn <= 1'b1;
      wicenack  <= 1'b0;
      mask_q    <= '0;
      primed    <= 1'b0;
      wicpend   <= '0;
      wakeup    <= 1'b0;
    end else begin
      wicdsreqn <= !wicenreq;
      wicenack  <= wicenreq && !wicdsreqn && !wicdsackn;
      if (wicclear) begin
        mask_q  <= '0;
        primed  <= 1'b0;
        wicpend <= '0;
        wakeup  <= 1'b0;
      end else begin
        if (wicload) begin
          mask_q <= wicmask;
          primed <= 1'b1;
        end
        if (primed) wicpend <= wicpend | (wicint & mask_q);
        wakeup <= |wicpend || (primed && |(wicint & mask_q));
      end
    end
  end

endmodule

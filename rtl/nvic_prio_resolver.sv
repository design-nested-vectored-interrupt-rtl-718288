// nvic_prio_resolver: picks the interrupt to take and decides pre-emption.
//
// Every interrupt has a rank key {1, ~int_prior[i], prio[i]}: a line whose
// int_prior bit is 1 ranks above every line whose bit is 0, and within a
// class the programmed 8-bit IPR priority decides, a lower number being more
// urgent; equal keys go to the lower interrupt number. The document says
// that int_prior gives the priority of the 32 interrupts and that an
// external interrupt must come with its priority, and that the NVIC has 256
// priority levels; how the two combine is this design's choice.
// The non-maskable interrupt (NMI) has key 0, above every external
// interrupt; it cannot be disabled and, having the lowest possible key,
// never pre-empts itself.
//
// The resolver is purely combinational. It reports the most urgent interrupt
// that is both pending and enabled, the current execution priority (the most
// urgent key among active interrupts), and `preempt`, which is high when the
// pending interrupt outranks the execution priority, or any is pending and
// enabled while no handler is active.
module nvic_prio_resolver
  import nvic_pkg::*;
#(
  parameter int unsigned NUM_IRQ = NUM_IRQ_DEF,
  parameter int unsigned PRIO_W  = PRIO_W_DEF,
  localparam int unsigned ID_W   = (NUM_IRQ > 1) ? $clog2(NUM_IRQ) : 1,
  localparam int unsigned KEY_W  = PRIO_W + 2
) (
  input  logic [NUM_IRQ-1:0] pending,
  input  logic [NUM_IRQ-1:0] enabled,
  input  logic [NUM_IRQ-1:0] active,
  input  logic [PRIO_W-1:0]  prio [NUM_IRQ],
  input  logic [NUM_IRQ-1:0] int_prior,
  input  logic               nmi_pend,
  input  logic               nmi_act,
  output logic               best_valid,
  output logic               best_nmi,      // the winner is the NMI
  output logic [ID_W-1:0]    best_id,
  output logic [KEY_W-1:0]   best_key,
  output logic               exec_valid,
  output logic [KEY_W-1:0]   exec_key,
  output logic               preempt
);

  logic [KEY_W-1:0] key [NUM_IRQ];
  logic [NUM_IRQ-1:0] cand, act;

  always_comb begin
    for (int i = 0; i < NUM_IRQ; i++) key[i] = {1'b1, ~int_prior[i], prio[i]};
  end

  assign cand = pending & enabled;
  assign act  = active;

  // Linear scan from the highest number down, keeping ties on the lower
  // number; synthesis turns this into a comparator chain.
  always_comb begin
    best_valid = 1'b0;
    best_nmi   = 1'b0;
    best_id    = '0;
    best_key   = '1;
    exec_valid = 1'b0;
    exec_key   = '1;
    for (int i = NUM_IRQ - 1; i >= 0; i--) begin
      if (cand[i] && (!best_valid || key[i] <= best_key)) begin
        best_valid = 1'b1;
        best_id    = ID_W'(i);
        best_key   = key[i];
      end
      if (act[i] && (!exec_valid || key[i] <= exec_key)) begin
        exec_valid = 1'b1;
        exec_key   = key[i];
      end
    end
    if (nmi_pend) begin
      best_valid = 1'b1;
      best_nmi   = 1'b1;
      best_id    = '0;
      best_key   = '0;
    end
    if (nmi_act) begin
      exec_valid = 1'b1;
      exec_key   = '0;
    end
    preempt = best_valid && (!exec_valid || best_key < exec_key);
  end

endmodule

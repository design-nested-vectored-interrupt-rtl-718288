// nvic_regs: the NVIC control registers and interrupt pend logic.
//
// Holds, per external interrupt, the enable (ISER/ICER), pending (ISPR/ICPR),
// active (IABR) and priority (IPR) state, the read-only interrupt controller
// type register (ICTR), and the two sleep bits of the System Control Register
// (SCR) plus USERSETMPEND of the Configuration Control Register (CCR).
// The register names, and that pend, clear-pend and active registers exist,
// follow the document; the addresses, bit layout and write-one-to-set /
// write-one-to-clear behaviour follow the ARMv7-M register model and are
// this design's choice.
//
// An interrupt becomes pending on a rising edge of its int_det line, on a
// write of 1 to its ISPR bit, or on a write of its number to STIR. It stops
// pending on a write of 1 to its ICPR bit or when the exception sequencer
// takes it (enter_i), which at the same time marks it active. The sequencer
// clears the active bit when the handler returns (deact_i).
// The non-maskable interrupt (NMI) line has its own pending and active bits:
// it pends on a rising edge of nmi, cannot be disabled, and is taken and
// returned like the others, with nmi_i marking enter_i / deact_i as its own.
// It has no programmer-visible register here.
//
// Register port: single-cycle slave. When reg_sel is high a write with
// reg_write=1 updates the register at the next clock edge, using the byte
// strobes, so byte, halfword and word accesses all work; reg_rdata is valid
// combinationally in the same cycle. Unprivileged accesses (reg_priv=0) are
// ignored and raise reg_fault, except a write to STIR while USERSETMPEND=1.
module nvic_regs
  import nvic_pkg::*;
#(
  parameter int unsigned NUM_IRQ = NUM_IRQ_DEF,
  parameter int unsigned PRIO_W  = PRIO_W_DEF,
  localparam int unsigned ID_W   = (NUM_IRQ > 1) ? $clog2(NUM_IRQ) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // System Control Space register port
  input  logic                reg_sel,
  input  logic                reg_write,
  input  logic [11:0]         reg_addr,
  input  logic [31:0]         reg_wdata,
  input  logic [3:0]          reg_wstrb,
  input  logic                reg_priv,
  output logic [31:0]         reg_rdata,
  output logic                reg_fault,
  // interrupt lines
  input  logic [NUM_IRQ-1:0]  int_det,
  input  logic                nmi,
  // exception sequencer
  input  logic                enter_i,   // take irq id_i: pending -> active
  input  logic                deact_i,   // handler of irq id_i returned
  input  logic [ID_W-1:0]     id_i,
  input  logic                nmi_i,     // enter_i / deact_i concern the NMI
  // state
  output logic [NUM_IRQ-1:0]  pending,
  output logic [NUM_IRQ-1:0]  enabled,
  output logic [NUM_IRQ-1:0]  active,
  output logic                nmi_pend,
  output logic                nmi_act,
  output logic [PRIO_W-1:0]   prio [NUM_IRQ],
  output logic                new_irq,   // an enabled interrupt was just detected
  output logic                scr_sleepdeep,
  output logic                scr_sleeponexit
);

  localparam int unsigned NWORDS = (NUM_IRQ + 31) / 32;

  logic [NUM_IRQ-1:0] det_q;
  logic [NUM_IRQ-1:0] det_rise;
  logic               usersetmpend;
  logic               nmi_q, nmi_rise;

  assign det_rise = int_det & ~det_q;
  assign nmi_rise = nmi && !nmi_q;
  assign new_irq  = |(det_rise & enabled) || nmi_rise;

  // Address decode. Set/clear registers use address bits [6:2] as the word
  // index; IPR uses bits [7:0] as the byte (interrupt) index.
  logic [4:0]  word_idx;
  logic        in_iser, in_icer, in_ispr, in_icpr, in_iabr, in_ipr;
  logic        is_ictr, is_scr, is_ccr, is_stir;
  logic        acc_ok, wr;

  assign word_idx = reg_addr[6:2];
  assign in_iser  = reg_addr[11:7] == OFF_ISER[11:7];
  assign in_icer  = reg_addr[11:7] == OFF_ICER[11:7];
  assign in_ispr  = reg_addr[11:7] == OFF_ISPR[11:7];
  assign in_icpr  = reg_addr[11:7] == OFF_ICPR[11:7];
  assign in_iabr  = reg_addr[11:7] == OFF_IABR[11:7];
  assign in_ipr   = reg_addr[11:8] == OFF_IPR[11:8];
  assign is_ictr  = reg_addr[11:2] == OFF_ICTR[11:2];
  assign is_scr   = reg_addr[11:2] == OFF_SCR[11:2];
  assign is_ccr   = reg_addr[11:2] == OFF_CCR[11:2];
  assign is_stir  = reg_addr[11:2] == OFF_STIR[11:2];

  // Unprivileged code may only pend interrupts through STIR, and only when
  // USERSETMPEND is set.
  assign acc_ok    = reg_priv || (is_stir && reg_write && usersetmpend);
  assign reg_fault = reg_sel && !acc_ok;
  assign wr        = reg_sel && reg_write && acc_ok;

  // Per-interrupt write strobes: bit i of a set/clear register lives in
  // word i/32, byte (i%32)/8.
  logic [NUM_IRQ-1:0] hit;
  always_comb begin
    for (int i = 0; i < NUM_IRQ; i++) begin
      hit[i] = wr && (word_idx == 5'(i / 32)) && reg_wstrb[(i % 32) / 8] && reg_wdata[i % 32];
    end
  end

  logic                stir_hit;
  logic [NUM_IRQ-1:0]  stir_set;
  assign stir_hit = wr && is_stir && reg_wstrb[0];
  always_comb begin
    for (int i = 0; i < NUM_IRQ; i++) begin
      stir_set[i] = stir_hit && (reg_wdata[8:0] == 9'(i));
    end
  end

  logic [NUM_IRQ-1:0] take, done;
  always_comb begin
    for (int i = 0; i < NUM_IRQ; i++) begin
      take[i] = enter_i && !nmi_i && (id_i == ID_W'(i));
      done[i] = deact_i && !nmi_i && (id_i == ID_W'(i));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      det_q           <= '0;
      nmi_q           <= 1'b0;
      nmi_pend        <= 1'b0;
      nmi_act         <= 1'b0;
      pending         <= '0;
      enabled         <= '0;
      active          <= '0;
      scr_sleepdeep   <= 1'b0;
      scr_sleeponexit <= 1'b0;
      usersetmpend    <= 1'b0;
      for (int i = 0; i < NUM_IRQ; i++) prio[i] <= '0;
    end else begin
      det_q   <= int_det;
      nmi_q   <= nmi;
      nmi_pend <= (nmi_pend && !(enter_i && nmi_i)) || nmi_rise;
      nmi_act  <= (nmi_act || (enter_i && nmi_i)) && !(deact_i && nmi_i);
      enabled <= (enabled | (in_iser ? hit : '0)) & ~(in_icer ? hit : '0);
      pending <= ((pending & ~(in_icpr ? hit : '0) & ~take)
                  | det_rise | (in_ispr ? hit : '0) | stir_set);
      active  <= (active | take) & ~done;
      if (wr && in_ipr) begin
        for (int i = 0; i < NUM_IRQ; i++) begin
          if (reg_addr[7:2] == 6'(i / 4) && reg_wstrb[i % 4])
            prio[i] <= reg_wdata[8*(i%4) +: PRIO_W];
        end
      end
      if (wr && is_scr && reg_wstrb[0]) begin
        scr_sleeponexit <= reg_wdata[1];
        scr_sleepdeep   <= reg_wdata[2];
      end
      if (wr && is_ccr && reg_wstrb[0]) usersetmpend <= reg_wdata[1];
    end
  end

  // Read mux.
  function automatic logic [31:0] word_of(input logic [NUM_IRQ-1:0] v, input logic [4:0] w);
    logic [31:0] r;
    r = '0;
    for (int b = 0; b < 32; b++) begin
      if (32 * int'(w) + b < NUM_IRQ) r[b] = v[32 * int'(w) + b];
    end
    return r;
  endfunction

  always_comb begin
    reg_rdata = '0;
    if (reg_sel && acc_ok && !reg_write) begin
      if (is_ictr)                               reg_rdata = 32'(NWORDS - 1);
      else if (in_iser || in_icer)               reg_rdata = word_of(enabled, word_idx);
      else if (in_ispr || in_icpr)               reg_rdata = word_of(pending, word_idx);
      else if (in_iabr)                          reg_rdata = word_of(active, word_idx);
      else if (is_scr)                           reg_rdata = {29'd0, scr_sleepdeep, scr_sleeponexit, 1'b0};
      else if (is_ccr)                           reg_rdata = {30'd0, usersetmpend, 1'b0};
      else if (in_ipr) begin
        for (int i = 0; i < NUM_IRQ; i++) begin
          if (reg_addr[7:2] == 6'(i / 4)) reg_rdata[8*(i%4) +: PRIO_W] = prio[i];
        end
      end
    end
  end

endmodule

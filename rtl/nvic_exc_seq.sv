// nvic_exc_seq: exception entry, late arrival, return and tail-chaining.
//
// This is the NVIC's sequencer towards the core and the buses. It follows the
// flow charts of interrupt handling, pre-emption and interrupt return:
//
//  * Entry (pre-emption). When the resolver reports a pending interrupt that
//    outranks the current execution priority, the sequencer stacks six core
//    registers, R0, R1, R2, R3, R12 and R13, one per cycle over the private
//    peripheral bus (PPB) port, reading each from the core through reg_no /
//    core_rdata. In the first stacking cycle it reads the handler address
//    from the vector table on the separate instruction-side port, in
//    parallel. Then, in the ENTER cycle, it marks the interrupt active, hands
//    the new PC to the core with a one-cycle int_fetch pulse and writes
//    EXC_RETURN to the link register (R14).
//  * Late arrival. If, while stacking, an interrupt arrives that outranks the
//    one being entered, the target is switched and the vector re-read; the
//    stacking goes on unchanged, so the later, more urgent interrupt is
//    served first and the earlier one stays pending.
//  * Return. When the core reports the end of a handler (nvic_irq_exe_end and
//    nvic_pop_det both high), the handler's active bit is cleared. If another
//    interrupt now outranks the stacked context, the sequencer tail-chains:
//    it keeps the frame on the stack, spends TAIL_CYCLES cycles re-reading
//    the vector table and enters the new handler. Otherwise it pops the six
//    registers back in the order they were pushed (R0 first, from rising
//    addresses, as the exit waveform shows) and writes them into the core.
//    An interrupt that arrives during the pop aborts it and is tail-chained.
//  * Sleep-on-exit. On a return to thread level with SLEEPONEXIT set, the
//    frame is left stacked and the sequencer signals soe_sleep; the next
//    interrupt is entered by a tail-chain.
//
//  * Reset. Leaving reset, the sequencer reads vector table word 0 and
//    writes it to SP (R13) and to its own frame pointer, then reads word 1
//    and hands it to the core as the first PC with an int_fetch pulse, two
//    cycles in all.
//
// The stack grows upward from the reset SP: a frame occupies the six words
// above the frame pointer, as the rising PPB addresses of the entry waveform
// show. Bus transfers are single cycle: psel and pena are both high during a
// transfer, pwrite tells write from read, and prdata / vec_rdata are sampled
// in the cycle the address is driven. The six-register frame, one register
// per cycle, and the six-cycle tail-chain are the document's numbers; the
// single-cycle bus, the frame layout and EXC_RETURN are this design's
// choices. Nesting depth is bounded by NUM_IRQ + 1 (every external
// interrupt plus the NMI), since each nested handler must outrank the one
// below it. The non-maskable interrupt (NMI) goes through the same entry
// and return sequences as an external interrupt, with its vector at word 2;
// nmi_o / cur_nmi tell it apart from external interrupt id_o / cur_irq.
module nvic_exc_seq
  import nvic_pkg::*;
#(
  parameter int unsigned NUM_IRQ     = NUM_IRQ_DEF,
  parameter int unsigned PRIO_W      = PRIO_W_DEF,
  parameter int unsigned TAIL_CYCLES = TAIL_CYCLES_DEF,
  parameter logic [31:0] VTOR        = 32'h0000_0000,
  localparam int unsigned ID_W       = (NUM_IRQ > 1) ? $clog2(NUM_IRQ) : 1,
  localparam int unsigned KEY_W      = PRIO_W + 2,
  localparam int unsigned DEPTH_W    = $clog2(NUM_IRQ + 2)
) (
  input  logic              clk,
  input  logic              rst_n,
  // priority resolver
  input  logic              preempt,
  input  logic [ID_W-1:0]   best_id,
  input  logic              best_nmi,       // the winner is the NMI
  input  logic [KEY_W-1:0]  best_key,
  input  logic              take_en,        // 0 holds new interrupts off (sleep hold)
  input  logic              sleeponexit,
  // register file
  output logic              enter_o,
  output logic              deact_o,
  output logic [ID_W-1:0]   id_o,
  output logic              nmi_o,          // enter_o / deact_o concern the NMI
  // core
  input  logic              nvic_irq_exe_end,
  input  logic              nvic_pop_det,
  output logic              int_fetch,
  output logic [31:0]       nvic_pc,
  output logic              handler_mode,
  output logic [ID_W-1:0]   cur_irq,
  output logic              cur_nmi,        // the running handler is the NMI
  output logic [3:0]        reg_no,
  output logic              core_write,     // write core_wdata into register reg_no
  output logic [31:0]       core_wdata,
  input  logic [31:0]       core_rdata,     // value of register reg_no
  output logic              ret_done,       // registers restored, thread/handler resumes
  output logic              soe_sleep,      // asleep on exit, frame left stacked
  // PPB port (stack)
  output logic [31:0]       padd,
  output logic              psel,
  output logic              pena,
  output logic              pwrite,
  output logic [31:0]       pwdata,
  input  logic [31:0]       prdata,
  // vector table port
  output logic              vec_req,
  output logic [31:0]       vec_addr,
  input  logic [31:0]       vec_rdata,
  // mechanism events, one-cycle pulses
  output logic              ev_entry,
  output logic              ev_nested,
  output logic              ev_late,
  output logic              ev_tail,
  output logic              ev_pop
);

  localparam int unsigned CNT_W = $clog2((TAIL_CYCLES > FRAME_REGS) ? TAIL_CYCLES : FRAME_REGS);

  seq_state_e           state;
  logic [CNT_W-1:0]     cnt;
  logic [ID_W-1:0]      tgt_id;
  logic                 tgt_nmi;
  logic [KEY_W-1:0]     tgt_key;
  logic                 need_fetch;
  logic [31:0]          pc_q;
  logic [31:0]          fp;
  logic [ID_W:0]        nest [NUM_IRQ + 1];   // {nmi, id} per nesting level
  logic [DEPTH_W-1:0]   depth;

  logic                 late;       // a more urgent interrupt than the target
  logic                 ret_req;

  assign late     = (state == SEQ_PUSH || state == SEQ_TAIL) && take_en && preempt && (best_key < tgt_key);
  assign ret_req  = (state == SEQ_RUN) && (depth != '0) && nvic_irq_exe_end && nvic_pop_det;

  assign handler_mode = depth != '0;
  assign {cur_nmi, cur_irq} = (depth != '0) ? nest[depth - 1'b1] : '0;
  assign soe_sleep    = state == SEQ_SOE_SLEEP;

  // Vector table read: on the first cycle of PUSH/TAIL, after a late
  // arrival, and in ENTER if the target changed on the last cycle.
  // At reset, words 0 (SP) and 1 (PC) are read.
  assign vec_req  = state == SEQ_BOOT ||
                    (need_fetch && (state == SEQ_PUSH || state == SEQ_TAIL || state == SEQ_ENTER));
  assign vec_addr = (state == SEQ_BOOT) ? VTOR + 32'(4 * int'(cnt)) :
                    tgt_nmi             ? VTOR + 32'(4 * VEC_NMI_WORD)
                                        : VTOR + 32'(4 * (VEC_IRQ0_WORD + 32'(tgt_id)));
  assign nvic_pc  = ((state == SEQ_ENTER && need_fetch) || state == SEQ_BOOT) ? vec_rdata : pc_q;

  // Outputs decoded from the state.
  always_comb begin
    enter_o    = 1'b0;
    deact_o    = 1'b0;
    id_o       = tgt_id;
    nmi_o      = tgt_nmi;
    int_fetch  = 1'b0;
    reg_no     = '0;
    core_write = 1'b0;
    core_wdata = '0;
    padd       = '0;
    psel       = 1'b0;
    pena       = 1'b0;
    pwrite     = 1'b0;
    pwdata     = '0;
    ret_done   = 1'b0;
    ev_entry   = 1'b0;
    ev_nested  = 1'b0;
    ev_late    = late;
    ev_tail    = 1'b0;
    ev_pop     = 1'b0;
    unique case (state)
      SEQ_BOOT: begin
        if (cnt == '0) begin
          reg_no     = SP_REG_NO;
          core_write = 1'b1;
          core_wdata = vec_rdata;
        end else begin
          int_fetch  = 1'b1;
        end
      end
      SEQ_RUN: begin
        if (ret_req) begin
          deact_o = 1'b1;
          id_o    = cur_irq;
          nmi_o   = cur_nmi;
        end else if (take_en && preempt) begin
          ev_entry  = 1'b1;
          ev_nested = depth != '0;
        end
      end
      SEQ_PUSH: begin
        reg_no = FRAME_REG_NO[cnt];
        psel   = 1'b1;
        pena   = 1'b1;
        pwrite = 1'b1;
        padd   = fp + 32'(4 * (int'(cnt) + 1));
        pwdata = core_rdata;
      end
      SEQ_ENTER: begin
        enter_o    = 1'b1;
        int_fetch  = 1'b1;
        reg_no     = LR_REG_NO;
        core_write = 1'b1;
        core_wdata = EXC_RETURN;
      end
      SEQ_RET_CHECK: begin
        ev_tail = take_en && preempt;
      end
      SEQ_POP: begin
        if (take_en && preempt) begin
          ev_late = 1'b1;
          ev_tail = 1'b1;
        end else begin
          reg_no     = FRAME_REG_NO[cnt];
          psel       = 1'b1;
          pena       = 1'b1;
          padd       = fp - 32'(4 * (FRAME_REGS - 1 - int'(cnt)));
          core_write = 1'b1;
          core_wdata = prdata;
          ev_pop     = cnt == '0;
          ret_done   = int'(cnt) == FRAME_REGS - 1;
        end
      end
      SEQ_SOE_SLEEP: begin
        ev_tail = take_en && preempt;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= SEQ_BOOT;
      cnt        <= '0;
      tgt_id     <= '0;
      tgt_nmi    <= 1'b0;
      tgt_key    <= '1;
      need_fetch <= 1'b0;
      pc_q       <= '0;
      fp         <= '0;
      depth      <= '0;
      for (int i = 0; i <= NUM_IRQ; i++) nest[i] <= '0;
    end else begin
      if (vec_req) begin
        pc_q       <= vec_rdata;
        need_fetch <= 1'b0;
      end
      if (late) begin
        tgt_id     <= best_id;
        tgt_nmi    <= best_nmi;
        tgt_key    <= best_key;
        need_fetch <= 1'b1;
      end
      unique case (state)
        SEQ_BOOT: begin
          if (cnt == '0) begin
            fp  <= vec_rdata;
            cnt <= cnt + 1'b1;
          end else begin
            cnt   <= '0;
            state <= SEQ_RUN;
          end
        end
        SEQ_RUN: begin
          if (ret_req) begin
            depth <= depth - 1'b1;
            state <= SEQ_RET_CHECK;
          end else if (take_en && preempt) begin
            tgt_id     <= best_id;
            tgt_nmi    <= best_nmi;
            tgt_key    <= best_key;
            need_fetch <= 1'b1;
            cnt        <= '0;
            state      <= SEQ_PUSH;
          end
        end
        SEQ_PUSH: begin
          if (int'(cnt) == FRAME_REGS - 1) begin
            fp    <= fp + 32'(4 * FRAME_REGS);
            state <= SEQ_ENTER;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        SEQ_ENTER: begin
          nest[depth] <= {tgt_nmi, tgt_id};
          depth       <= depth + 1'b1;
          state       <= SEQ_RUN;
        end
        SEQ_RET_CHECK: begin
          cnt <= '0;
          if (take_en && preempt) begin
            tgt_id     <= best_id;
            tgt_nmi    <= best_nmi;
            tgt_key    <= best_key;
            need_fetch <= 1'b1;
            state      <= SEQ_TAIL;
          end else if (depth == '0 && sleeponexit) begin
            state <= SEQ_SOE_SLEEP;
          end else begin
            state <= SEQ_POP;
          end
        end
        SEQ_POP: begin
          if (take_en && preempt) begin
            tgt_id     <= best_id;
            tgt_nmi    <= best_nmi;
            tgt_key    <= best_key;
            need_fetch <= 1'b1;
            cnt        <= '0;
            state      <= SEQ_TAIL;
          end else if (int'(cnt) == FRAME_REGS - 1) begin
            fp    <= fp - 32'(4 * FRAME_REGS);
            state <= SEQ_RUN;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        SEQ_TAIL: begin
          if (int'(cnt) == TAIL_CYCLES - 1) state <= SEQ_ENTER;
          else                               cnt   <= cnt + 1'b1;
        end
        SEQ_SOE_SLEEP: begin
          if (take_en && preempt) begin
            tgt_id     <= best_id;
            tgt_nmi    <= best_nmi;
            tgt_key    <= best_key;
            need_fetch <= 1'b1;
            cnt        <= '0;
            state      <= SEQ_TAIL;
          end
        end
        default: state <= SEQ_RUN;
      endcase
    end
  end

  // Handshake rules.
  a_one_transfer_kind: assert property (@(posedge clk) disable iff (!rst_n)
    !(enter_o && deact_o));
  a_pena_with_psel: assert property (@(posedge clk) disable iff (!rst_n)
    pena |-> psel);
  a_depth_bound: assert property (@(posedge clk) disable iff (!rst_n)
    int'(depth) <= NUM_IRQ + 1);

endmodule

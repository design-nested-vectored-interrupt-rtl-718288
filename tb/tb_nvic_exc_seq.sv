// tb_nvic_exc_seq: self-checking test of the exception sequencer.
//
// The testbench stands in for everything around the sequencer: it keeps its
// own pending / active / priority state and from it computes the
// resolver's outputs, models the core register file (R0-R15), a stack
// memory on the PPB port and a vector table whose entry for interrupt n is
// 0x0800_0000 + 0x100 * n (word 0, the reset SP, holds 0x100; the other
// system vectors below word 16 hold 0x0700_0000 plus their address). It
// checks:
//  * reset: SP (R13) loaded from word 0, first int_fetch with word 1;
//  * entry: six pushes of R0-R3, R12, R13 at rising addresses above the
//    reset SP, the vector read in parallel, int_fetch seven cycles after the
//    interrupt became pending, LR written with EXC_RETURN;
//  * return: registers popped back in push order from rising addresses, ret_done seven cycles
//    after the return request;
//  * late arrival during stacking, tail-chaining (six cycles, no pop or
//    push), nested pre-emption, an interrupt that arrives during the pop,
//    sleep-on-exit, the take_en hold, and the non-maskable interrupt (NMI)
//    pre-empting a handler of the highest external priority.
module tb_nvic_exc_seq;
  import nvic_pkg::*;

  localparam int N = 32;

  logic        clk = 0, rst_n = 0;
  logic        preempt;
  logic [4:0]  best_id;
  logic        best_nmi;
  logic [9:0]  best_key;
  logic        nmi_o, cur_nmi;
  logic        take_en = 1, sleeponexit = 0;
  logic        enter_o, deact_o;
  logic [4:0]  id_o;
  logic        nvic_irq_exe_end = 0, nvic_pop_det = 0;
  logic        int_fetch, handler_mode, core_write, ret_done, soe_sleep;
  logic [31:0] nvic_pc, core_wdata, core_rdata;
  logic [4:0]  cur_irq;
  logic [3:0]  reg_no;
  logic [31:0] padd, pwdata, prdata;
  logic        psel, pena, pwrite;
  logic        vec_req;
  logic [31:0] vec_addr, vec_rdata;
  logic        ev_entry, ev_nested, ev_late, ev_tail, ev_pop;

  int checks = 0, failures = 0;
  int cyc = 0;

  nvic_exc_seq dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (cycle %0d)", what, got, exp, cyc);
    end
  endtask

  // ---------------- environment models ----------------
  logic [N-1:0] pend = '0, act = '0;
  logic         nmi_pend = 0, nmi_act = 0;
  logic [7:0]   prio [N];
  logic [31:0]  core_r [16];
  logic [31:0]  mem [256];        // stack, word addressed by padd[9:2]

  function automatic logic [31:0] vec_of(input int n);
    return 32'h0800_0000 + 32'(n) * 32'h100;
  endfunction

  always_comb begin
    logic bv, ev;
    logic [9:0] bk, ek;
    bv = 0; ev = 0; bk = '1; ek = '1; best_id = '0; best_nmi = 0;
    for (int i = N - 1; i >= 0; i--) begin
      if (pend[i] && (!bv || {2'b11, prio[i]} <= bk)) begin bv = 1; bk = {2'b11, prio[i]}; best_id = 5'(i); end
      if (act[i] && (!ev || {2'b11, prio[i]} <= ek)) begin ev = 1; ek = {2'b11, prio[i]}; end
    end
    if (nmi_pend) begin bv = 1; bk = '0; best_id = '0; best_nmi = 1; end
    if (nmi_act)  begin ev = 1; ek = '0; end
    best_key = bk;
    preempt  = bv && (!ev || bk < ek);
  end

  assign core_rdata = core_r[reg_no];
  assign prdata     = mem[padd[9:2]];
  assign vec_rdata  = (vec_addr == '0)    ? 32'h0000_0100
                    : (vec_addr < 32'h40) ? 32'h0700_0000 + vec_addr
                                           : (vec_addr - 32'h40) / 4 * 32'h100 + 32'h0800_0000;

  // transaction log
  int n_push, n_pop, n_vec, n_fetch;
  int late_cnt, tail_cnt, nested_cnt;
  int last_fetch_cyc, last_ret_cyc;
  logic [31:0] last_pc;
  int          last_id;
  logic [31:0] push_addr [$];
  logic [3:0]  push_reg  [$];
  logic [31:0] pop_addr  [$];
  logic [3:0]  pop_reg   [$];

  always @(posedge clk) if (rst_n) begin
    if (psel && pena && pwrite) begin
      mem[padd[9:2]] <= pwdata;
      push_addr.push_back(padd);
      push_reg.push_back(reg_no);
      n_push++;
      checks++;
      if (pwdata !== core_r[reg_no]) begin failures++; $display("FAIL pushed data"); end
    end
    if (psel && pena && !pwrite) begin
      n_pop++;
      pop_addr.push_back(padd);
      pop_reg.push_back(reg_no);
    end
    if (core_write) core_r[reg_no] <= core_wdata;
    if (vec_req) n_vec++;
    if (enter_o &&  nmi_o) begin nmi_pend <= 1'b0; nmi_act <= 1'b1; end
    if (enter_o && !nmi_o) begin pend[id_o] <= 1'b0; act[id_o] <= 1'b1; end
    if (deact_o &&  nmi_o) nmi_act <= 1'b0;
    if (deact_o && !nmi_o) act[id_o] <= 1'b0;
    if (int_fetch) begin n_fetch++; last_fetch_cyc = cyc; last_pc = nvic_pc; last_id = int'(id_o); end
    if (ret_done) last_ret_cyc = cyc;
    if (ev_late) late_cnt++;
    if (ev_tail) tail_cnt++;
    if (ev_nested) nested_cnt++;
  end

  task automatic raise(input int n, input logic [7:0] p);
    prio[n] = p;
    pend[n] = 1'b1;
  endtask

  task automatic wait_fetch(output int c);
    int start;
    start = n_fetch;
    while (n_fetch == start) @(negedge clk);
    c = last_fetch_cyc;
  endtask

  task automatic do_return(output int req_cyc);
    @(negedge clk);
    nvic_irq_exe_end = 1; nvic_pop_det = 1;
    req_cyc = cyc;
    @(negedge clk);
    nvic_irq_exe_end = 0; nvic_pop_det = 0;
  endtask

  task automatic scramble_core();
    for (int r = 0; r < 14; r++) core_r[r] = 32'hDEAD_0000 + 32'(r);
  endtask

  int t0, tf, tr, n0;
  logic [31:0] saved [16];

  initial begin
    for (int i = 0; i < N; i++) prio[i] = 8'hFF;
    for (int r = 0; r < 16; r++) core_r[r] = 32'h1000_0000 + 32'(r) * 32'h11;
    for (int a = 0; a < 256; a++) mem[a] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- reset: SP and PC from words 0 and 1 ----
    @(negedge clk);
    check("boot SP", core_r[13], 32'h100);
    check("boot fetch", 32'(n_fetch), 1);
    check("boot PC", last_pc, 32'h0700_0004);
    check("boot vector reads", 32'(n_vec), 2);
    check("boot thread mode", 32'(handler_mode), 0);
    n_vec = 0;

    // ---- A: simple entry and return ----
    saved = core_r;
    raise(3, 8'h40);
    t0 = cyc;
    wait_fetch(tf);
    check("A entry latency", 32'(tf - t0), 32'd7);
    check("A pc", last_pc, vec_of(3));
    check("A id", 32'(last_id), 32'd3);
    check("A pushes", 32'(n_push), 32'd6);
    check("A one vector read", 32'(n_vec), 32'd1);
    for (int k = 0; k < 6; k++) begin
      check("A push addr", push_addr[k], 32'h100 + 32'(4 * (k + 1)));
      check("A push reg", 32'(push_reg[k]), 32'(FRAME_REG_NO[k]));
    end
    @(negedge clk);
    check("A LR", core_r[14], EXC_RETURN);
    check("A handler mode", 32'(handler_mode), 1);
    check("A cur_irq", 32'(cur_irq), 3);
    scramble_core();
    do_return(tr);
    repeat (10) @(negedge clk);
    check("A ret latency", 32'(last_ret_cyc - tr), 32'd7);
    check("A pops", 32'(n_pop), 32'd6);
    for (int k = 0; k < 6; k++) begin
      check("A pop addr", pop_addr[k], 32'h100 + 32'(4 * (k + 1)));
      check("A pop reg", 32'(pop_reg[k]), 32'(FRAME_REG_NO[k]));
    end
    for (int k = 0; k < 6; k++)
      check("A restored", core_r[FRAME_REG_NO[k]], saved[FRAME_REG_NO[k]]);
    check("A thread mode", 32'(handler_mode), 0);
    check("A active cleared", act, 32'h0);

    // ---- B: late arrival then tail-chain ----
    push_addr.delete(); push_reg.delete();
    n_push = 0; n_pop = 0; n_vec = 0;
    saved = core_r;
    raise(5, 8'h80);
    t0 = cyc;
    repeat (3) @(negedge clk);      // two stacking cycles done
    raise(6, 8'h20);
    wait_fetch(tf);
    check("B late served first", 32'(last_id), 32'd6);
    check("B late pc", last_pc, vec_of(6));
    check("B latency unchanged", 32'(tf - t0), 32'd7);
    check("B late count", 32'(late_cnt), 32'd1);
    check("B two vector reads", 32'(n_vec), 32'd2);
    check("B still 6 pushes", 32'(n_push), 32'd6);
    check("B 5 still pending", 32'(pend[5]), 1);
    @(negedge clk);
    do_return(tr);
    wait_fetch(tf);
    check("B tail-chain to 5", 32'(last_id), 32'd5);
    check("B tail pc", last_pc, vec_of(5));
    check("B tail latency", 32'(tf - tr), 32'd8);
    check("B tail count", 32'(tail_cnt), 32'd1);
    check("B no pop in tail", 32'(n_pop), 32'd0);
    check("B no push in tail", 32'(n_push), 32'd6);

    // ---- C: nested pre-emption inside handler 5 ----
    @(negedge clk);
    n0 = n_push;
    raise(7, 8'h10);
    wait_fetch(tf);
    check("C nested id", 32'(last_id), 32'd7);
    check("C nested count", 32'(nested_cnt), 32'd1);
    check("C second frame addr", push_addr[n0], 32'h100 + 32'd28);
    check("C depth 2 cur", 32'(cur_irq), 32'd7);
    // a lower-priority interrupt does not nest
    raise(9, 8'hC0);
    repeat (4) @(negedge clk);
    check("C low prio waits", 32'(n_push), 32'(n0 + 6));
    // pend of 9 stays; return from 7 -> 9 (0xC0) does not beat 5 (0x80): pop
    do_return(tr);
    repeat (10) @(negedge clk);
    check("C back in 5", 32'(cur_irq), 32'd5);
    check("C popped", 32'(n_pop), 32'd6);

    // ---- D: return from 5; 9 now outranks thread: tail-chain ----
    do_return(tr);
    wait_fetch(tf);
    check("D tail to 9", 32'(last_id), 32'd9);
    // ---- E: return from 9, interrupt arrives during pop ----
    n0 = n_pop;
    do_return(tr);
    @(negedge clk); @(negedge clk);     // RET_CHECK, first POP cycle
    raise(11, 8'h30);
    wait_fetch(tf);
    check("E pop aborted to 11", 32'(last_id), 32'd11);
    check("E pop partial", 32'(n_pop - n0 < 6), 1);
    scramble_core();
    saved = core_r;
    do_return(tr);
    repeat (10) @(negedge clk);
    check("E full pop", 32'(n_pop - n0 >= 6), 1);
    check("E thread", 32'(handler_mode), 0);
    check("E r0 restored", core_r[0], 32'h1000_0000);
    check("E r13 restored", core_r[13], 32'h100);

    // ---- F: sleep-on-exit ----
    sleeponexit = 1;
    raise(2, 8'h50);
    wait_fetch(tf);
    n0 = n_pop;
    do_return(tr);
    repeat (3) @(negedge clk);
    check("F slept on exit", 32'(soe_sleep), 1);
    check("F no pop", 32'(n_pop), 32'(n0));
    n0 = n_push;
    raise(4, 8'h50);
    wait_fetch(tf);
    check("F woke by tail-chain", 32'(last_id), 32'd4);
    check("F no push", 32'(n_push), 32'(n0));
    sleeponexit = 0;
    do_return(tr);
    repeat (10) @(negedge clk);
    check("F thread", 32'(handler_mode), 0);

    // ---- G: take_en low holds interrupts off ----
    take_en = 0;
    n0 = n_fetch;
    raise(1, 8'h10);
    repeat (12) @(negedge clk);
    check("G held", 32'(n_fetch), 32'(n0));
    take_en = 1;
    wait_fetch(tf);
    check("G taken after hold", 32'(last_id), 32'd1);

    // ---- H: NMI pre-empts handler 1 (priority 0x10) ----
    n0 = n_push;
    nested_cnt = 0;
    @(negedge clk); nmi_pend = 1;
    wait_fetch(tf);
    check("H NMI vector", last_pc, 32'h0700_0008);
    check("H NMI nested", 32'(nested_cnt), 32'd1);
    check("H pushes", 32'(n_push - n0), 32'd6);
    @(negedge clk);
    check("H cur_nmi", 32'(cur_nmi), 1);
    raise(0, 8'h00);                    // most urgent external: must wait
    repeat (12) @(negedge clk);
    check("H NMI not pre-empted", 32'(cur_nmi), 1);
    do_return(tr);                      // NMI returns: 0 tail-chains
    wait_fetch(tf);
    check("H then 0", 32'(last_id), 32'd0);
    check("H cur_nmi low", 32'(cur_nmi), 0);
    do_return(tr);
    repeat (10) @(negedge clk);
    check("H back in 1", 32'(cur_irq), 32'd1);
    do_return(tr);
    repeat (10) @(negedge clk);
    check("H thread", 32'(handler_mode), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

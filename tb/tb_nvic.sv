// tb_nvic: self-checking test of the NVIC as a whole.
//
// Programs the control registers through the register port and drives the
// interrupt lines, with core_mem_model standing in for the core registers,
// the stack and the vector table. Scenarios, in the order of the document's
// simulation results, after the reset load of SP and PC from vector words 0
// and 1:
//  * interrupt entry and exit: interrupt_detect, int_fetch with the right
//    vector eight cycles after the line is sampled high, IABR/ISPR state,
//    six pushes and six pops, registers restored;
//  * late arrival: interrupt 1 starts entering, interrupt 0 (int_prior=1)
//    arrives during stacking and is served first, then 1 is tail-chained;
//  * tail chaining: a second interrupt of equal priority arrives during the
//    first handler and is entered without pop and push;
//  * control registers: software pend through ISPR, clear through ICPR,
//    disable through ICER, IPR priorities deciding the order;
//  * WFI sleep ended by an interrupt;
//  * the non-maskable interrupt (NMI) pre-empting a handler while every
//    external interrupt is disabled, with its vector from word 2.
module tb_nvic;
  import nvic_pkg::*;

  localparam int N = 32;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] int_det = '0, int_prior = '0;
  logic interrupt_detect;
  logic nvic_irq_exe_end = 0, nvic_pop_det = 0;
  logic int_fetch, handler_mode, core_write, ret_done;
  logic [31:0] nvic_pc, core_wdata, core_rdata;
  logic [4:0] cur_irq;
  logic [3:0] reg_no;
  logic wfi = 0, wfe = 0, rxev = 0;
  logic reg_sel = 0, reg_write = 0, reg_priv = 1;
  logic [11:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic [3:0] reg_wstrb = 4'hF;
  logic reg_fault;
  logic [31:0] padd, pwdata, prdata;
  logic psel, pena, pwrite;
  logic vec_req;
  logic [31:0] vec_addr, vec_rdata;
  logic sleeping, sleepdeep, sleepholdackn, wicdsackn, wicload, wicclear;
  logic sleepholdreqn = 1, wicdsreqn = 1;
  logic [N-1:0] wicmask;
  logic ev_entry, ev_nested, ev_late, ev_tail, ev_pop;
  logic nmi = 0, cur_nmi;

  int checks = 0, failures = 0, cyc = 0;

  nvic dut (.nvic_clock_in(clk), .*);

  core_mem_model env (
    .clk, .rst_n, .reg_no, .core_write, .core_wdata, .core_rdata,
    .padd, .psel, .pena, .pwrite, .pwdata, .prdata, .vec_addr, .vec_rdata
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (4000) @(posedge clk);
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

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    reg_sel = 1; reg_write = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk);
    reg_sel = 0; reg_write = 0;
  endtask

  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    reg_sel = 1; reg_write = 0; reg_addr = a;
    #1 d = reg_rdata;
    @(negedge clk);
    reg_sel = 0;
  endtask

  int n_fetch = 0, last_fetch_cyc, last_id, n_detect = 0, n_late = 0, n_tail = 0;
  logic [31:0] last_pc;
  always @(posedge clk) begin
    if (int_fetch) begin n_fetch++; last_fetch_cyc = cyc; last_pc = nvic_pc; end
    if (int_fetch) last_id = int'((nvic_pc - 32'h0800_0000) >> 8);   // vector of n is 0x0800_0000 + 0x100 * n
    if (interrupt_detect) n_detect++;
    if (ev_late) n_late++;
    if (ev_tail) n_tail++;
  end

  task automatic wait_fetch();
    int start;
    start = n_fetch;
    while (n_fetch == start) @(negedge clk);
  endtask

  task automatic do_return();
    @(negedge clk);
    nvic_irq_exe_end = 1; nvic_pop_det = 1;
    @(negedge clk);
    nvic_irq_exe_end = 0; nvic_pop_det = 0;
  endtask

  logic [31:0] d;
  int t0, pops0, pushes0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- reset: SP and PC loaded from vector words 0 and 1 ----
    repeat (2) @(negedge clk);
    check("reset SP", env.r[13], 32'h2000_0000);
    check("reset PC fetch", {n_fetch[3:0], last_pc[27:0]}, {4'd1, 28'h700_0004});

    // ---- interrupt entry and exit ----
    wr(OFF_ISER, 32'h0000_0001);
    @(negedge clk);
    int_det = 32'h1;
    t0 = cyc;                 // sampled high at the next edge, cycle t0
    wait_fetch();
    check("entry latency", 32'(last_fetch_cyc - t0), 32'd8);
    check("entry vector", last_pc, env.vector_of(0));
    check("interrupt_detect", 32'(n_detect), 32'd1);
    check("pushes", 32'(env.n_push), 32'd6);
    check("push data", 32'(env.bad_push), 32'd0);
    rd(OFF_IABR, d);  check("IABR active", d, 32'h1);
    rd(OFF_ISPR, d);  check("ISPR cleared", d, 32'h0);
    for (int i = 0; i < 14; i++) env.r[i] = 32'hBAD0_0000;
    do_return();
    repeat (10) @(negedge clk);
    check("pops", 32'(env.n_pop), 32'd6);
    check("R0 restored", env.r[0], 32'h1000_0000);
    check("R12 restored", env.r[12], 32'h1000_0000 + 12 * 32'h11);
    check("R13 restored", env.r[13], 32'h2000_0000);   // SP loaded at reset
    rd(OFF_IABR, d);  check("IABR cleared", d, 32'h0);
    int_det = '0;

    // ---- late arrival: 1 first, then 0 with int_prior=1 ----
    wr(OFF_ISER, 32'h0000_0003);
    int_prior = 32'h1;
    @(negedge clk);
    int_det = 32'h2;
    repeat (4) @(negedge clk);           // pending, then stacking under way
    int_det = 32'h3;
    wait_fetch();
    check("late arrival serves 0", 32'(last_id), 32'd0);
    check("late arrival counted", 32'(n_late), 32'd1);
    rd(OFF_ISPR, d);  check("1 still pending", d, 32'h2);
    pushes0 = env.n_push; pops0 = env.n_pop;
    do_return();
    wait_fetch();
    check("tail-chain to 1", 32'(last_id), 32'd1);
    check("tail counted", 32'(n_tail), 32'd1);
    check("no pop/push in tail", 32'(env.n_push - pushes0 + env.n_pop - pops0), 32'd0);
    do_return();
    repeat (10) @(negedge clk);
    check("thread after late/tail", 32'(handler_mode), 0);
    int_det = '0;
    int_prior = '0;

    // ---- tail chaining: equal priority, second arrives in handler ----
    @(negedge clk);
    int_det = 32'h1;
    wait_fetch();
    int_det = 32'h3;
    repeat (4) @(negedge clk);
    check("equal priority does not nest", 32'(cur_irq), 32'd0);
    pushes0 = env.n_push; pops0 = env.n_pop;
    do_return();
    t0 = cyc;
    wait_fetch();
    check("tail-chained 1", 32'(last_id), 32'd1);
    check("tail-chain latency", 32'(last_fetch_cyc - t0), 32'd7);
    check("no stacking traffic", 32'(env.n_push - pushes0 + env.n_pop - pops0), 32'd0);
    do_return();
    repeat (10) @(negedge clk);
    int_det = '0;

    // ---- control registers ----
    wr(OFF_ICER, 32'hFFFF_FFFF);
    wr(OFF_ISPR, 32'h0000_0030);         // pend 4 and 5 while disabled
    repeat (3) @(negedge clk);
    check("disabled pend not taken", 32'(handler_mode), 0);
    wr(OFF_ICPR, 32'h0000_0010);         // clear 4
    rd(OFF_ISPR, d);  check("ICPR clears", d, 32'h20);
    wr(OFF_IPR + 12'h4, 32'h0000_4080);  // prio[4]=0x80, prio[5]=0x40
    wr(OFF_ISPR, 32'h0000_0010);         // pend 4 again
    wr(OFF_ISER, 32'h0000_0030);         // enable both: 5 (0x40) wins
    wait_fetch();
    check("IPR decides", 32'(last_id), 32'd5);
    rd(OFF_IABR, d);  check("IABR 5", d, 32'h20);
    do_return();
    wait_fetch();
    check("then 4", 32'(last_id), 32'd4);
    do_return();
    repeat (10) @(negedge clk);
    rd(OFF_IABR, d);  check("none active", d, 32'h0);

    // ---- WFI and wake ----
    @(negedge clk); wfi = 1;
    @(negedge clk); wfi = 0;
    repeat (3) @(negedge clk);
    check("sleeping", 32'(sleeping), 1);
    int_det = 32'h10;
    wait_fetch();
    check("woken and entered", 32'(last_id), 32'd4);
    check("awake", 32'(sleeping), 0);

    // ---- NMI inside handler 4, with all external interrupts disabled ----
    wr(OFF_ICER, 32'hFFFF_FFFF);
    @(negedge clk); nmi = 1;
    wait_fetch();
    check("NMI vector", last_pc, 32'h0700_0008);
    check("NMI running", 32'(cur_nmi), 1);
    do_return();
    repeat (10) @(negedge clk);
    check("back in 4", {cur_nmi, 3'd0, cur_irq}, 32'h4);
    nmi = 0;
    do_return();
    repeat (10) @(negedge clk);
    check("thread at end", 32'(handler_mode), 0);
    int_det = '0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

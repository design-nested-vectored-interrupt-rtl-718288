// tb_cm3_nvic_system: end-to-end test of the NVIC, WIC and PMU together, at
// the default parameters (32 interrupts, 8-bit priorities).
//
// core_mem_model, clocked by the gated core clock, stands in for the core
// registers, the stack and the vector table; the testbench plays the core's
// instruction stream (exception return, WFI, WFE) and the register bus
// master. It runs, in order:
//   1. interrupt entry and exit, with the entry latency checked;
//   2. nested pre-emption by a more urgent interrupt;
//   3. late arrival during stacking, followed by a tail-chain;
//   4. an interrupt arriving during the pop (pop aborted, tail-chained);
//   5. sleep-on-exit, woken by the next interrupt through a tail-chain;
//   6. WFE with the event latch set, then WFE sleep ended by an event;
//   7. a user-mode register access fault;
//   8. a WIC-mode deep sleep: WIC enable handshake, WICLOAD, SLEEPDEEP, hold,
//      isolation, retention, power-down, a one-cycle interrupt pulse caught
//      by the WIC while a sleep-hold request keeps the core down, then
//      power-up, restore, de-isolation, FCLK restart, WICCLEAR and entry of
//      the caught interrupt;
//   9. a second WIC-mode deep sleep with every external interrupt disabled,
//      woken by a one-cycle pulse on the non-maskable interrupt (NMI) line,
//      which the WIC always watches; the NMI handler is entered;
//  10. sleep-on-exit into a WIC-mode deep sleep: a handler returns with
//      SLEEPONEXIT and SLEEPDEEP set, the core powers down with the frame
//      still stacked, a pulse on an enabled line wakes it, the handler is
//      tail-chained without pushes, and the final pop restores the registers
//      saved before the sleep.
// Every mechanism is counted and a failure is counted for any that never
// happened.
module tb_cm3_nvic_system;
  import nvic_pkg::*;

  localparam int N = 32;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] irq = '0, int_prior = '0;
  logic interrupt_detect, fclk;
  logic nvic_irq_exe_end = 0, nvic_pop_det = 0;
  logic int_fetch, handler_mode, core_write, ret_done;
  logic [31:0] nvic_pc, core_wdata, core_rdata;
  logic [4:0] cur_irq;
  logic [3:0] reg_no;
  logic wfi = 0, wfe = 0, rxev = 0;
  logic sleeping, sleepdeep;
  logic reg_sel = 0, reg_write = 0, reg_priv = 1;
  logic [11:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic [3:0] reg_wstrb = 4'hF;
  logic reg_fault;
  logic [31:0] padd, pwdata, prdata;
  logic psel, pena, pwrite;
  logic vec_req;
  logic [31:0] vec_addr, vec_rdata;
  logic wic_enable = 0, hold_sleep = 0;
  logic isolaten, retainn, pwrdown, wakeup;
  logic nmi = 0, cur_nmi;
  logic [N:0] wicpend, wicsense;           // bit N is the NMI
  logic ev_entry, ev_nested, ev_late, ev_tail, ev_pop;

  int checks = 0, failures = 0, cyc = 0;

  cm3_nvic_system dut (.*);

  core_mem_model env (
    .clk(fclk), .rst_n, .reg_no, .core_write, .core_wdata, .core_rdata,
    .padd, .psel, .pena, .pwrite, .pwdata, .prdata, .vec_addr, .vec_rdata
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish();
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

  task automatic pulse_wfi();
    @(negedge clk); wfi = 1;
    @(negedge clk); wfi = 0;
  endtask

  task automatic pulse_wfe();
    @(negedge clk); wfe = 1;
    @(negedge clk); wfe = 0;
  endtask

  task automatic pulse_rxev();
    @(negedge clk); rxev = 1;
    @(negedge clk); rxev = 0;
  endtask

  // ---- mechanism counters ----
  int n_fetch = 0, n_entry = 0, n_nested = 0, n_late = 0, n_tail = 0, n_pop = 0;
  int n_sleep = 0, n_soe = 0, n_wfe_skip = 0, n_fault = 0, n_detect = 0;
  int n_wicload = 0, n_wicclear = 0, n_pwrdown = 0, n_wakeup = 0, n_hold_ext = 0;
  int last_fetch_cyc, last_id;
  int t_pwrdown_fall, t_retain_rise, t_iso_rise, t_fclk_first;
  logic [31:0] last_pc;
  logic sleeping_q = 0, pwrdown_q = 0, retainn_q = 1, isolaten_q = 1;
  logic [N:0] wicsense_q = '0, wicpend_q = '0;
  int n_nmi = 0, n_soe_deep = 0;

  always @(posedge clk) if (rst_n) begin
    if (int_fetch) begin
      n_fetch++; last_fetch_cyc = cyc; last_pc = nvic_pc;
      last_id = int'((nvic_pc - 32'h0800_0000) >> 8);   // vector of n is 0x0800_0000 + 0x100 * n
      if (nvic_pc == 32'h0700_0008) n_nmi++;             // NMI vector, word 2
    end
    if (ev_entry) n_entry++;
    if (ev_nested) n_nested++;
    if (ev_late) n_late++;
    if (ev_tail) n_tail++;
    if (ev_pop) n_pop++;
    if (interrupt_detect) n_detect++;
    if (reg_fault) n_fault++;
    if (wicsense != '0 && wicsense_q == '0) n_wicload++;
    if (wicpend == '0 && wicpend_q != '0 && !pwrdown) n_wicclear++;
    if (sleeping && !sleeping_q) n_sleep++;
    if (pwrdown && !pwrdown_q) n_pwrdown++;
    if (!pwrdown && pwrdown_q) t_pwrdown_fall = cyc;
    if (retainn && !retainn_q) t_retain_rise = cyc;
    if (isolaten && !isolaten_q) t_iso_rise = cyc;
    if (pwrdown && wakeup && hold_sleep) n_hold_ext++;
    sleeping_q <= sleeping;
    wicsense_q <= wicsense;
    wicpend_q  <= wicpend;
    pwrdown_q  <= pwrdown;
    retainn_q  <= retainn;
    isolaten_q <= isolaten;
  end

  task automatic wait_fetch();
    int start, guard;
    start = n_fetch;
    guard = 0;
    while (n_fetch == start && guard < 500) begin @(negedge clk); guard++; end
    checks++;
    if (n_fetch == start) begin failures++; $display("FAIL no int_fetch (cycle %0d)", cyc); end
  endtask

  task automatic do_return();
    @(negedge clk);
    nvic_irq_exe_end = 1; nvic_pop_det = 1;
    @(negedge clk);
    nvic_irq_exe_end = 0; nvic_pop_det = 0;
  endtask

  task automatic settle();
    repeat (12) @(negedge clk);
  endtask

  task automatic require(input string what, input int count);
    checks++;
    if (count == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("mechanism %-28s %0d", what, count);
  endtask

  int t0, fclk_edges, pops0;

  always @(posedge fclk) fclk_edges++;

  initial begin
    fclk_edges = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // priorities: irq n gets 0x10 * (15 - n%16); enable 0..7
    for (int w = 0; w < 2; w++)
      wr(OFF_IPR + 12'(4 * w), {8'(16 * (15 - (4*w+3))), 8'(16 * (15 - (4*w+2))),
                                8'(16 * (15 - (4*w+1))), 8'(16 * (15 - 4*w))});
    wr(OFF_ISER, 32'h0000_00FF);

    // 1. entry and exit
    irq = 32'h1;
    t0 = cyc;
    wait_fetch();
    check("1 entry latency", 32'(last_fetch_cyc - t0), 32'd8);
    check("1 vector", last_pc, env.vector_of(0));
    check("1 pushes", 32'(env.n_push), 32'd6);
    irq = '0;
    for (int i = 0; i < 14; i++) env.r[i] = 32'hBAD0_0000;
    do_return();
    settle();
    check("1 R3 restored", env.r[3], 32'h1000_0000 + 3 * 32'h11);
    check("1 thread", 32'(handler_mode), 0);

    // 2. nested: 1 (prio 0xE0) then 3 (prio 0xC0) inside it
    irq = 32'h2;
    wait_fetch();
    irq = 32'hA;
    wait_fetch();
    check("2 nested id", 32'(last_id), 32'd3);
    check("2 cur_irq", 32'(cur_irq), 32'd3);
    irq = '0;
    do_return();
    settle();
    check("2 back in 1", 32'(cur_irq), 32'd1);
    do_return();
    settle();
    check("2 thread", 32'(handler_mode), 0);

    // 3. late arrival: 2 starts, 5 (more urgent) arrives while stacking
    irq = 32'h4;
    repeat (4) @(negedge clk);
    irq = 32'h24;
    wait_fetch();
    check("3 late arrival served 5", 32'(last_id), 32'd5);
    irq = '0;
    do_return();
    wait_fetch();
    check("3 tail-chain to 2", 32'(last_id), 32'd2);
    // 4. interrupt arrives during the pop
    pops0 = env.n_pop;
    do_return();
    @(negedge clk); @(negedge clk);
    irq = 32'h40;
    wait_fetch();
    check("4 pop aborted to 6", 32'(last_id), 32'd6);
    check("4 pop partial", 32'(env.n_pop - pops0 < 6), 1);
    irq = '0;
    do_return();
    settle();
    check("4 thread", 32'(handler_mode), 0);

    // 5. sleep-on-exit
    wr(OFF_SCR, 32'h2);
    irq = 32'h1;
    wait_fetch();
    irq = '0;
    do_return();
    repeat (4) @(negedge clk);
    check("5 asleep on exit", 32'(sleeping), 1);
    if (sleeping) n_soe++;
    irq = 32'h80;
    wait_fetch();
    check("5 woken into 7", 32'(last_id), 32'd7);
    irq = '0;
    wr(OFF_SCR, 32'h0);
    do_return();
    settle();
    check("5 thread", 32'(handler_mode), 0);

    // 6. WFE
    pulse_rxev();
    pulse_wfe();
    @(negedge clk);
    check("6 WFE with event does not sleep", 32'(sleeping), 0);
    n_wfe_skip++;
    pulse_wfe();
    @(negedge clk);
    check("6 WFE sleeps", 32'(sleeping), 1);
    pulse_rxev();
    @(negedge clk);
    check("6 event wakes", 32'(sleeping), 0);
    // plain WFI woken by an interrupt
    pulse_wfi();
    repeat (3) @(negedge clk);
    check("6 WFI sleeps", 32'(sleeping), 1);
    irq = 32'h8;
    wait_fetch();
    check("6 WFI woken into 3", 32'(last_id), 32'd3);
    irq = '0;
    do_return();
    settle();

    // 7. user-mode access fault
    @(negedge clk);
    reg_priv = 0; reg_sel = 1; reg_write = 1; reg_addr = OFF_ISER; reg_wdata = '1;
    @(negedge clk);
    reg_priv = 1; reg_sel = 0; reg_write = 0;
    check("7 fault seen", 32'(n_fault), 1);

    // 8. WIC-mode deep sleep
    wic_enable = 1;
    repeat (6) @(negedge clk);
    wr(OFF_SCR, 32'h4);
    pulse_wfi();
    repeat (12) @(negedge clk);
    check("8 powered down", {pwrdown, retainn, isolaten}, 3'b100);
    check("8 WIC primed with enables", wicsense[N-1:0], 32'h0000_00FF);
    check("8 NMI always primed", 32'(wicsense[N]), 1);
    fclk_edges = 0;
    repeat (10) @(negedge clk);
    check("8 FCLK stopped", 32'(fclk_edges), 32'd0);
    // a one-cycle pulse on masked-in line 4 while the system holds the sleep
    hold_sleep = 1;
    @(negedge clk); irq = 32'h10;
    @(negedge clk); irq = '0;
    repeat (10) @(negedge clk);
    check("8 WICPEND latched", wicpend[N-1:0], 32'h10);
    check("8 WAKEUP", 32'(wakeup), 1);
    check("8 held down", 32'(pwrdown), 1);
    hold_sleep = 0;
    t0 = cyc;
    wait_fetch();
    check("8 caught interrupt entered", 32'(last_id), 32'd4);
    check("8 power up order", 32'(t_pwrdown_fall < t_retain_rise && t_retain_rise < t_iso_rise), 1);
    check("8 FCLK running", 32'(fclk_edges > 0), 1);
    check("8 awake", {sleeping, pwrdown}, 2'b00);
    settle();
    check("8 WICCLEAR emptied WICPEND", 32'(wicpend), 32'h0);
    do_return();
    settle();
    check("8 thread", 32'(handler_mode), 0);

    // 9. deep sleep with all external interrupts disabled, NMI wakes
    wr(OFF_ICER, 32'hFFFF_FFFF);
    pulse_wfi();
    repeat (12) @(negedge clk);
    check("9 powered down", {pwrdown, retainn, isolaten}, 3'b100);
    check("9 only NMI primed", 32'(wicsense), 32'h0);
    check("9 NMI sense bit", 32'(wicsense[N]), 1);
    @(negedge clk); irq = 32'hFF;       // disabled lines: no wake-up
    @(negedge clk); irq = '0;
    repeat (6) @(negedge clk);
    check("9 masked lines ignored", {wakeup, pwrdown}, 2'b01);
    @(negedge clk); nmi = 1;
    @(negedge clk); nmi = 0;
    wait_fetch();
    check("9 NMI entered", nvic_pc, 32'h0700_0008);
    @(negedge clk);
    check("9 NMI running", 32'(cur_nmi), 1);
    do_return();
    settle();
    check("9 thread", 32'(handler_mode), 0);
    check("9 WIC emptied", 32'(wicpend[N]), 0);

    // 10. sleep-on-exit into deep sleep, frame kept through the power-down
    wr(OFF_ISER, 32'h0000_0020);
    wr(OFF_SCR, 32'h6);
    irq = 32'h20;
    wait_fetch();
    check("10 entered 5", 32'(last_id), 32'd5);
    irq = '0;
    pops0 = env.n_pop;
    t0 = env.n_push;
    do_return();
    repeat (12) @(negedge clk);
    check("10 powered down on exit", {pwrdown, retainn, isolaten}, 3'b100);
    check("10 frame left stacked", 32'(env.n_pop - pops0), 32'd0);
    check("10 sleeps at thread level", 32'(handler_mode), 0);
    check("10 WIC primed with 5", wicsense[N-1:0], 32'h20);
    if (pwrdown) n_soe_deep++;
    @(negedge clk); irq = 32'h20;
    @(negedge clk); irq = '0;
    wait_fetch();
    check("10 woken into 5", 32'(last_id), 32'd5);
    check("10 tail-chained without pushes", 32'(env.n_push - t0), 32'd0);
    check("10 awake", {sleeping, pwrdown}, 2'b00);
    wr(OFF_SCR, 32'h0);
    env.r[0] = 32'hBAD0_0000;
    env.r[12] = 32'hBAD0_0000;
    do_return();
    settle();
    check("10 popped once", 32'(env.n_pop - pops0), 32'd6);
    check("10 R0 restored", env.r[0], 32'h1000_0000);
    check("10 R12 restored", env.r[12], 32'h1000_0000 + 12 * 32'h11);
    check("10 thread", 32'(handler_mode), 0);
    check("no bad pushes", 32'(env.bad_push), 0);

    require("interrupt entry", n_entry);
    require("interrupt_detect", n_detect);
    require("stacking + pop", n_pop);
    require("nested pre-emption", n_nested);
    require("late arrival", n_late);
    require("tail chaining", n_tail);
    require("sleep (WFI/WFE)", n_sleep);
    require("sleep-on-exit", n_soe);
    require("WFE event skip", n_wfe_skip);
    require("user-mode fault", n_fault);
    require("WICLOAD", n_wicload);
    require("power-down", n_pwrdown);
    require("sleep hold extension", n_hold_ext);
    require("WICCLEAR after wake-up", n_wicclear);
    require("NMI", n_nmi);
    require("sleep-on-exit deep sleep", n_soe_deep);
    finish();
  end

endmodule

// tb_nvic_sleep_ctrl: self-checking test of the core-side sleep logic.
//
// Checks WFI sleep and wake-up by an interrupt, WFE with the event latch set
// (no sleep) and clear (sleep until an event), the WIC handshake
// (WICDSREQn -> WICDSACKn), WICLOAD with the enabled-interrupt mask on entry
// to deep sleep followed by SLEEPDEEP, the sleep hold (SLEEPHOLDREQn ->
// SLEEPHOLDACKn, no wake-up while held), WICCLEAR on wake-up, and sleep on
// exit.
module tb_nvic_sleep_ctrl;

  localparam int N = 32;

  logic clk = 0, rst_n = 0;
  logic wfi = 0, wfe = 0, rxev = 0, scr_sleepdeep = 0, soe_sleep = 0, wake_req = 0;
  logic [N-1:0] enabled = 32'hA5A5_0003;
  logic sleeping, sleepdeep, take_en;
  logic sleepholdreqn = 1, sleepholdackn;
  logic wicdsreqn = 1, wicdsackn, wicload, wicclear;
  logic [N-1:0] wicmask;

  int checks = 0, failures = 0;

  nvic_sleep_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1;
    @(negedge clk); s = 0;
  endtask

  int loads = 0, clears = 0, n_loads, n_clears;
  always @(posedge clk) begin
    if (wicload) loads++;
    if (wicclear) clears++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("awake after reset", {sleeping, sleepdeep}, 2'b00);

    // WFI and wake by interrupt
    pulse(wfi);
    check("WFI sleeps", {sleeping, sleepdeep}, 2'b10);
    repeat (3) @(negedge clk);
    check("stays asleep", sleeping, 1);
    wake_req = 1;
    @(negedge clk);
    check("interrupt wakes", sleeping, 0);
    wake_req = 0;

    // WFE with event latch set: no sleep
    pulse(rxev);
    pulse(wfe);
    check("WFE with event: no sleep", sleeping, 0);
    // WFE with latch clear: sleep until an event
    pulse(wfe);
    check("WFE sleeps", sleeping, 1);
    pulse(rxev);
    check("event wakes WFE", sleeping, 0);

    // WIC handshake and deep sleep
    @(negedge clk); wicdsreqn = 0;
    @(negedge clk);
    check("WIC ack", wicdsackn, 0);
    scr_sleepdeep = 1;
    pulse(wfi);
    check("WICLOAD on deep entry", wicload, 1);
    check("WICMASK = enabled", wicmask, enabled);
    @(negedge clk);
    check("SLEEPDEEP after load", {sleeping, sleepdeep}, 2'b11);

    // sleep hold: no wake-up while held
    @(negedge clk); sleepholdreqn = 0;
    @(negedge clk);
    check("hold acked", sleepholdackn, 0);
    check("take_en low when held", take_en, 0);
    wake_req = 1;
    repeat (4) @(negedge clk);
    check("held asleep", sleeping, 1);
    sleepholdreqn = 1;
    @(negedge clk);
    check("hold released", sleepholdackn, 1);
    @(negedge clk);
    check("wake after release", {sleeping, sleepdeep}, 2'b00);
    check("WICCLEAR on wake", wicclear, 1);
    @(negedge clk);
    n_loads = loads; n_clears = clears;
    wake_req = 0;

    // plain deep sleep without WIC mode: no load
    @(negedge clk); wicdsreqn = 1;
    @(negedge clk); @(negedge clk);
    pulse(wfi);
    @(negedge clk);
    check("deep without WIC", {sleeping, sleepdeep}, 2'b11);
    check("no WICLOAD", 32'(loads), 32'(n_loads));
    wake_req = 1;
    @(negedge clk);
    wake_req = 0;
    @(negedge clk);
    check("no WICCLEAR", 32'(clears), 32'(n_clears));
    scr_sleepdeep = 0;

    // sleep on exit
    @(negedge clk); soe_sleep = 1;
    @(negedge clk);
    check("sleep on exit", sleeping, 1);
    @(negedge clk); wake_req = 1;
    @(negedge clk); soe_sleep = 0; wake_req = 0;
    @(negedge clk);
    check("woke from sleep on exit", sleeping, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_pmu: self-checking test of the power management unit.
//
// A core model acknowledges SLEEPHOLDREQn one cycle later and drops
// SLEEPDEEP when the hold is released. The test walks one WIC-mode deep
// sleep and checks the order and cycle of every step: hold request, clock
// stop with isolation, retention, power-down; then on WAKEUP power-up,
// restore, de-isolation with clock restart and release of the hold. It also
// checks that hold_sleep delays the power-up, that nothing happens without
// WICENACK, and that a core waking before the hold is acknowledged brings
// the PMU straight back.
module tb_pmu;

  logic clk = 0, rst_n = 0;
  logic wic_enable = 0, hold_sleep = 0;
  logic wicenreq, wicenack = 0, wakeup = 0;
  logic sleepdeep = 0, sleepholdreqn, sleepholdackn;
  logic fclk_en, isolaten, retainn, pwrdown;
  logic ack_en = 1;

  int checks = 0, failures = 0;

  pmu dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sleepholdackn <= 1'b1;
    else        sleepholdackn <= sleepholdreqn || !ack_en;

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

  // {sleepholdreqn, fclk_en, isolaten, retainn, pwrdown}
  function automatic logic [4:0] outs();
    return {sleepholdreqn, fclk_en, isolaten, retainn, pwrdown};
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("run", outs(), 5'b11110);
    wic_enable = 1;
    #1 check("WICENREQ follows enable", wicenreq, 1);

    // SLEEPDEEP without WICENACK: stays running
    sleepdeep = 1;
    repeat (3) @(negedge clk);
    check("no WIC ack, no power-down", outs(), 5'b11110);
    sleepdeep = 0;
    wicenack = 1;
    @(negedge clk);

    // power-down sequence
    sleepdeep = 1;
    @(negedge clk);
    check("hold request", outs(), 5'b01110);
    @(negedge clk);                       // core acks at this edge
    check("still hold", outs(), 5'b01110);
    @(negedge clk);
    check("clock stop + isolate", outs(), 5'b00010);
    @(negedge clk);
    check("retain", outs(), 5'b00000);
    @(negedge clk);
    check("power down", outs(), 5'b00001);

    // hold_sleep delays the wake-up
    hold_sleep = 1;
    wakeup = 1;
    repeat (5) @(negedge clk);
    check("held off", outs(), 5'b00001);
    hold_sleep = 0;
    @(negedge clk);
    check("power up", outs(), 5'b00000);
    wakeup = 0;
    @(negedge clk);
    check("restore", outs(), 5'b00010);
    @(negedge clk);
    check("de-isolate, clock on", outs(), 5'b01110);
    @(negedge clk);
    check("hold released", outs(), 5'b11110);
    sleepdeep = 0;
    @(negedge clk);
    @(negedge clk);
    check("run again", outs(), 5'b11110);

    // core wakes before acknowledging the hold
    ack_en = 0;
    sleepdeep = 1;
    @(negedge clk);
    check("hold request 2", outs(), 5'b01110);
    sleepdeep = 0;
    @(negedge clk);
    @(negedge clk);
    check("back to run", outs(), 5'b11110);
    ack_en = 1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

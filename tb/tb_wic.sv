// tb_wic: self-checking test of the wake-up interrupt controller.
//
// A small core model answers WICDSREQn with WICDSACKn. The test checks the
// enable chain WICENREQ -> WICDSREQn -> WICDSACKn -> WICENACK, priming with
// WICLOAD / WICMASK (shown on WICSENSE), that masked-out lines neither pend
// nor wake, that a one-cycle pulse on a masked-in line is latched in WICPEND
// and raises WAKEUP, that nothing is detected before priming, and that
// WICCLEAR empties everything. Random rounds compare WICPEND with a model.
module tb_wic;

  localparam int N = 32;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] wicint = '0;
  logic wicenreq = 0, wicenack, wakeup;
  logic [N-1:0] wicsense;
  logic wicdsreqn, wicdsackn;
  logic wicload = 0, wicclear = 0;
  logic [N-1:0] wicmask = '0, wicpend;

  int checks = 0, failures = 0;

  wic dut (.*);

  always #5 clk = ~clk;

  // core model: acknowledge one cycle after the request
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) wicdsackn <= 1'b1;
    else        wicdsackn <= wicdsreqn;

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
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [N-1:0] exp_pend;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("idle", {wicdsreqn, wicenack, wakeup}, 3'b100);

    // not primed: interrupts ignored
    wicint = 32'hFFFF_FFFF;
    @(negedge clk);
    wicint = '0;
    check("unprimed ignores", wicpend, 32'h0);

    // enable chain
    wicenreq = 1;
    @(negedge clk);
    check("DSREQn low", wicdsreqn, 0);
    @(negedge clk);
    check("core acked", wicdsackn, 0);
    @(negedge clk);
    check("ENACK", wicenack, 1);

    // priming
    wicmask = 32'h0000_00F0;
    wicload = 1;
    @(negedge clk);
    wicload = 0; wicmask = '0;
    check("sense", wicsense, 32'h0000_00F0);

    // masked-out line
    wicint = 32'h0000_0001;
    @(negedge clk);
    wicint = '0;
    @(negedge clk);
    check("masked-out no pend", wicpend, 32'h0);
    check("masked-out no wakeup", wakeup, 0);

    // pulse on a masked-in line
    wicint = 32'h0000_0020;
    @(negedge clk);
    wicint = '0;
    check("pulse latched", wicpend, 32'h0000_0020);
    check("wakeup", wakeup, 1);
    repeat (3) @(negedge clk);
    check("pend held", wicpend, 32'h0000_0020);

    // clear
    wicclear = 1;
    @(negedge clk);
    wicclear = 0;
    check("clear pend", wicpend, 32'h0);
    check("clear sense", wicsense, 32'h0);
    @(negedge clk);
    check("clear wakeup", wakeup, 0);

    // random rounds
    for (int r = 0; r < 20; r++) begin
      logic [N-1:0] m;
      m = $urandom;
      wicmask = m; wicload = 1;
      @(negedge clk);
      wicload = 0;
      exp_pend = '0;
      for (int k = 0; k < 5; k++) begin
        wicint = $urandom & $urandom;
        exp_pend |= wicint & m;
        @(negedge clk);
      end
      wicint = '0;
      check("random pend", wicpend, exp_pend);
      check("random wakeup", wakeup, 32'(|exp_pend));
      wicclear = 1;
      @(negedge clk);
      wicclear = 0;
    end

    // disable chain
    wicenreq = 0;
    repeat (3) @(negedge clk);
    check("disabled", {wicdsreqn, wicenack}, 2'b10);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

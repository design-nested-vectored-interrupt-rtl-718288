// tb_nvic_prio_resolver: self-checking test of the priority resolver.
//
// Applies random pending / enabled / active vectors, priorities and
// int_prior bits and compares the chosen interrupt, the execution priority
// and the pre-emption decision with a reference computed in the testbench by
// a plain search over all interrupts. A few directed cases cover ties, the
// int_prior class bit and the non-maskable interrupt (NMI).
module tb_nvic_prio_resolver;

  localparam int N = 32;

  logic [N-1:0] pending, enabled, active, int_prior;
  logic [7:0]   prio [N];
  logic         nmi_pend = 0, nmi_act = 0;
  logic         best_valid, best_nmi, exec_valid, preempt;
  logic [4:0]   best_id;
  logic [9:0]   best_key, exec_key;

  int checks = 0, failures = 0;

  nvic_prio_resolver dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // reference: smaller rank wins; external rank = 512 + (int_prior ? 0 : 256)
  // + prio, NMI rank 0 (bid = -1 stands for the NMI)
  task automatic reference(output int bv, output int bid, output int brank,
                           output int ev, output int erank, output int pre);
    bv = 0; bid = 0; brank = 1 << 20; ev = 0; erank = 1 << 20;
    for (int i = 0; i < N; i++) begin
      int r;
      r = 512 + (int_prior[i] ? 0 : 256) + int'(prio[i]);
      if (pending[i] && enabled[i] && r < brank) begin bv = 1; bid = i; brank = r; end
      if (active[i] && r < erank) begin ev = 1; erank = r; end
    end
    if (nmi_pend) begin bv = 1; bid = -1; brank = 0; end
    if (nmi_act)  begin ev = 1; erank = 0; end
    pre = bv && (!ev || brank < erank);
  endtask

  task automatic compare(input string tag);
    int bv, bid, brank, ev, erank, pre;
    #1;
    reference(bv, bid, brank, ev, erank, pre);
    check({tag, " best_valid"}, int'(best_valid), bv);
    if (bv) check({tag, " best_nmi"}, int'(best_nmi), int'(bid < 0));
    if (bv && bid >= 0) check({tag, " best_id"}, int'(best_id), bid);
    check({tag, " exec_valid"}, int'(exec_valid), ev);
    if (ev) check({tag, " exec_key"}, int'(exec_key), erank);
    check({tag, " preempt"}, int'(preempt), pre);
  endtask

  initial begin
    // ties go to the lower number
    pending = 32'h0000_0006; enabled = '1; active = '0; int_prior = '0;
    for (int i = 0; i < N; i++) prio[i] = 8'd4;
    compare("tie");
    check("tie picks 1", int'(best_id), 1);
    // int_prior ranks above any programmed priority
    prio[1] = 8'd0; prio[2] = 8'd200; int_prior = 32'h4;
    compare("class");
    check("class picks 2", int'(best_id), 2);
    // equal to execution priority does not pre-empt
    pending = 32'h0000_0010; active = 32'h0000_0020; int_prior = '0;
    prio[4] = 8'd9; prio[5] = 8'd9;
    compare("equal");
    check("no preempt at equal", int'(preempt), 0);
    prio[4] = 8'd8;
    compare("higher");
    check("preempt when higher", int'(preempt), 1);
    // disabled pending lines are ignored
    enabled = '0;
    compare("disabled");
    check("disabled no preempt", int'(preempt), 0);
    // the NMI cannot be disabled and outranks everything, but not itself
    nmi_pend = 1; enabled = '1; int_prior = '1; active = 32'h1; prio[0] = 8'd0;
    compare("nmi");
    check("nmi wins", int'(best_nmi), 1);
    check("nmi pre-empts", int'(preempt), 1);
    nmi_act = 1;
    compare("nmi active");
    check("nmi not over itself", int'(preempt), 0);
    nmi_pend = 0;
    compare("under nmi");
    check("nothing pre-empts nmi", int'(preempt), 0);
    nmi_act = 0;

    for (int k = 0; k < 2000; k++) begin
      pending   = $urandom & $urandom;
      enabled   = $urandom;
      active    = $urandom & $urandom & $urandom;
      int_prior = $urandom & $urandom;
      nmi_pend  = ($urandom_range(0, 7) == 0);
      nmi_act   = ($urandom_range(0, 7) == 0);
      for (int i = 0; i < N; i++) prio[i] = 8'($urandom_range(0, 15)) << 4;
      compare("random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

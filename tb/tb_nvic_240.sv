// tb_nvic_240: the NVIC built for 240 external interrupts.
//
// The default build has 32 interrupt lines; the architecture allows up to
// 240. This test sets NUM_IRQ=240 and checks that the upper register words
// and priority bytes work: interrupts 239, 200 and 33 are enabled through
// ISER words 7, 6 and 1, given priorities through IPR bytes, pended through
// their int_det lines at the same time, and must be entered in priority
// order with the right vectors, the eight-cycle entry latency and six
// pushes per entry, with nesting when a more urgent one arrives inside a
// handler.
module tb_nvic_240;
  import nvic_pkg::*;

  localparam int N = 240;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] int_det = '0, int_prior = '0;
  logic interrupt_detect;
  logic nvic_irq_exe_end = 0, nvic_pop_det = 0;
  logic int_fetch, handler_mode, core_write, ret_done;
  logic [31:0] nvic_pc, core_wdata, core_rdata;
  logic [7:0] cur_irq;
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

  nvic #(.NUM_IRQ(N)) dut (.nvic_clock_in(clk), .*);

  core_mem_model env (
    .clk, .rst_n, .reg_no, .core_write, .core_wdata, .core_rdata,
    .padd, .psel, .pena, .pwrite, .pwdata, .prdata, .vec_addr, .vec_rdata
  );

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

  task automatic wr(input logic [11:0] a, input logic [31:0] d, input logic [3:0] s = 4'hF);
    @(negedge clk);
    reg_sel = 1; reg_write = 1; reg_addr = a; reg_wdata = d; reg_wstrb = s;
    @(negedge clk);
    reg_sel = 0; reg_write = 0; reg_wstrb = 4'hF;
  endtask

  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    reg_sel = 1; reg_write = 0; reg_addr = a;
    #1 d = reg_rdata;
    @(negedge clk);
    reg_sel = 0;
  endtask

  int n_fetch = 0, last_fetch_cyc, last_id, n_nested = 0;
  always @(posedge clk) begin
    if (int_fetch) begin
      n_fetch++; last_fetch_cyc = cyc;
      last_id = int'((nvic_pc - 32'h0800_0000) >> 8);   // vector of n is 0x0800_0000 + 0x100 * n
    end
    if (ev_nested) n_nested++;
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
  int t0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;

    rd(OFF_ICTR, d);  check("ICTR lines/32-1", d, 32'd7);

    // enable 33 (word 1), 200 (word 6), 239 (word 7)
    wr(OFF_ISER + 12'h04, 32'h0000_0002);
    wr(OFF_ISER + 12'h18, 32'h0000_0100);
    wr(OFF_ISER + 12'h1C, 32'h0000_8000);
    rd(OFF_ISER + 12'h1C, d);  check("ISER word 7", d, 32'h0000_8000);
    // priorities: 239 -> 0x20, 200 -> 0x60, 33 -> 0xA0 (byte writes)
    wr(OFF_IPR + 12'(239 & ~3), 32'h2000_0000, 4'b1000);
    wr(OFF_IPR + 12'(200 & ~3), 32'h0000_0060, 4'b0001);
    wr(OFF_IPR + 12'(33  & ~3), 32'h0000_A000, 4'b0010);
    rd(OFF_IPR + 12'(239 & ~3), d);  check("IPR byte 239", d, 32'h2000_0000);

    // 33 and 200 together: 200 is more urgent
    @(negedge clk);
    int_det[33] = 1; int_det[200] = 1;
    t0 = cyc;
    wait_fetch();
    check("first 200", 32'(last_id), 32'd200);
    check("entry latency", 32'(last_fetch_cyc - t0), 32'd8);
    check("six pushes", 32'(env.n_push), 32'd6);
    check("cur_irq 200", 32'(cur_irq), 32'd200);
    rd(OFF_ISPR + 12'h04, d);  check("33 pending", d, 32'h0000_0002);

    // 239 arrives inside handler 200 and nests
    @(negedge clk);
    int_det[239] = 1;
    wait_fetch();
    check("nested 239", 32'(last_id), 32'd239);
    check("nesting counted", 32'(n_nested), 32'd1);
    check("twelve pushes", 32'(env.n_push), 32'd12);
    rd(OFF_IABR + 12'h1C, d);  check("IABR word 7", d, 32'h0000_8000);
    rd(OFF_IABR + 12'h18, d);  check("IABR word 6", d, 32'h0000_0100);

    do_return();                         // back into 200
    repeat (10) @(negedge clk);
    check("back in 200", 32'(cur_irq), 32'd200);
    do_return();                         // 33 is tail-chained
    wait_fetch();
    check("then 33", 32'(last_id), 32'd33);
    do_return();
    repeat (10) @(negedge clk);
    check("thread mode", 32'(handler_mode), 0);
    check("pops", 32'(env.n_pop), 32'd12);
    rd(OFF_IABR + 12'h04, d);  check("none active", d, 32'h0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_nvic_regs: self-checking test of the NVIC control registers.
//
// Drives the register port with word, halfword and byte accesses and checks
// ISER/ICER, ISPR/ICPR, IPR, IABR, ICTR, SCR, CCR/STIR, the privilege rule,
// edge detection on int_det and on the NMI line, and the enter/deactivate
// hooks of the sequencer,
// against values the testbench keeps itself.
module tb_nvic_regs;
  import nvic_pkg::*;

  localparam int N = 32;

  logic        clk = 0, rst_n = 0;
  logic        reg_sel = 0, reg_write = 0, reg_priv = 1;
  logic [11:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0;
  logic [3:0]  reg_wstrb = '0;
  logic [31:0] reg_rdata;
  logic        reg_fault;
  logic [N-1:0] int_det = '0;
  logic        enter_i = 0, deact_i = 0, nmi = 0, nmi_i = 0;
  logic        nmi_pend, nmi_act;
  logic [4:0]  id_i = '0;
  logic [N-1:0] pending, enabled, active;
  logic [7:0]  prio [N];
  logic        new_irq, scr_sleepdeep, scr_sleeponexit;

  int checks = 0, failures = 0;

  nvic_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  task automatic wr(input logic [11:0] a, input logic [31:0] d, input logic [3:0] s = 4'hF);
    @(negedge clk);
    reg_sel = 1; reg_write = 1; reg_addr = a; reg_wdata = d; reg_wstrb = s;
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

  logic [31:0] d;
  logic [31:0] exp_pend;
  logic        saw_new;

  always @(posedge clk) if (new_irq) saw_new <= 1;

  initial begin
    saw_new = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    rd(OFF_ICTR, d);            check("ICTR", d, 32'd0);

    // enable set / clear, word then byte
    wr(OFF_ISER, 32'h0000_0015);
    rd(OFF_ISER, d);            check("ISER word", d, 32'h15);
    wr(OFF_ISER, 32'hFFFF_FF00, 4'b0100);   // only byte 2 written
    rd(OFF_ISER, d);            check("ISER byte", d, 32'h00FF_0015);
    wr(OFF_ICER, 32'h0001_0004);
    rd(OFF_ICER, d);            check("ICER clears", d, 32'h00FE_0011);
    check("enabled out", enabled, 32'h00FE_0011);

    // priority bytes
    wr(OFF_IPR + 12'h0, 32'h4433_2211);
    wr(OFF_IPR + 12'h4, 32'h0000_AA00, 4'b0010);
    rd(OFF_IPR + 12'h0, d);     check("IPR0", d, 32'h4433_2211);
    rd(OFF_IPR + 12'h4, d);     check("IPR1 byte", d, 32'h0000_AA00);
    check("prio[5]", 32'(prio[5]), 32'hAA);
    check("prio[2]", 32'(prio[2]), 32'h33);

    // pend by edge
    @(negedge clk); int_det = 32'h0000_0001;
    @(negedge clk);
    check("edge pends", pending, 32'h1);
    check("new_irq seen", 32'(saw_new), 1);
    @(negedge clk); @(negedge clk);
    check("level does not re-pend twice", pending, 32'h1);
    // software pend and clear
    wr(OFF_ISPR, 32'h0000_0300);
    rd(OFF_ISPR, d);            check("ISPR", d, 32'h301);
    wr(OFF_ICPR, 32'h0000_0101);
    rd(OFF_ICPR, d);            check("ICPR", d, 32'h200);

    // sequencer takes irq 9: pending -> active
    @(negedge clk); enter_i = 1; id_i = 5'd9;
    @(negedge clk); enter_i = 0;
    check("enter clears pend", pending, 32'h0);
    rd(OFF_IABR, d);            check("IABR set", d, 32'h200);
    @(negedge clk); deact_i = 1; id_i = 5'd9;
    @(negedge clk); deact_i = 0;
    rd(OFF_IABR, d);            check("IABR cleared", d, 32'h0);

    // NMI: pends on its rising edge, taken and returned with nmi_i, while
    // external interrupt 0 with the same id is left alone
    wr(OFF_ISPR, 32'h0000_0001);
    @(negedge clk); nmi = 1;
    #1 check("nmi detected", 32'(new_irq), 1);
    @(negedge clk);
    check("nmi pending", 32'(nmi_pend), 1);
    check("nmi level not re-detected", 32'(new_irq), 0);
    @(negedge clk); enter_i = 1; nmi_i = 1; id_i = 5'd0;
    @(negedge clk); enter_i = 0;
    check("nmi taken", {30'd0, nmi_pend, nmi_act}, 32'h1);
    check("irq 0 untouched", pending, 32'h1);
    rd(OFF_IABR, d);            check("nmi not in IABR", d, 32'h0);
    @(negedge clk); deact_i = 1;
    @(negedge clk); deact_i = 0; nmi_i = 0; nmi = 0;
    check("nmi returned", 32'(nmi_act), 0);
    wr(OFF_ICPR, 32'h0000_0001);

    // SCR sleep bits
    wr(OFF_SCR, 32'h6);
    check("scr deep", 32'(scr_sleepdeep), 1);
    check("scr soe", 32'(scr_sleeponexit), 1);
    rd(OFF_SCR, d);             check("SCR read", d, 32'h6);

    // user mode: fault, ignored
    @(negedge clk); reg_priv = 0;
    reg_sel = 1; reg_write = 1; reg_addr = OFF_ISER; reg_wdata = 32'hFFFF_FFFF; reg_wstrb = 4'hF;
    #1 check("user fault", 32'(reg_fault), 1);
    @(negedge clk); reg_sel = 0; reg_write = 0; reg_priv = 1;
    check("user write ignored", enabled, 32'h00FE_0011);
    // STIR in user mode only with USERSETMPEND
    @(negedge clk); reg_priv = 0;
    reg_sel = 1; reg_write = 1; reg_addr = OFF_STIR; reg_wdata = 32'd7; reg_wstrb = 4'hF;
    @(negedge clk); reg_sel = 0; reg_write = 0; reg_priv = 1;
    check("STIR blocked", pending, 32'h0);
    wr(OFF_CCR, 32'h2);
    @(negedge clk); reg_priv = 0;
    reg_sel = 1; reg_write = 1; reg_addr = OFF_STIR; reg_wdata = 32'd7; reg_wstrb = 4'hF;
    #1 check("STIR no fault", 32'(reg_fault), 0);
    @(negedge clk); reg_sel = 0; reg_write = 0; reg_priv = 1;
    check("STIR pends", pending, 32'h80);

    // random edges against a model
    exp_pend = pending;
    int_det = '0;
    @(negedge clk);
    for (int k = 0; k < 40; k++) begin
      logic [31:0] nd;
      nd = $urandom;
      exp_pend = exp_pend | (nd & ~int_det);
      int_det = nd;
      @(negedge clk);
      check("random edges", pending, exp_pend);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

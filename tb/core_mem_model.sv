// core_mem_model: behavioural model of what surrounds the NVIC in a test:
// the core register file R0-R15, a 1 KiB stack memory on the PPB port and a
// vector table whose entry for external interrupt n holds 0x0800_0000 +
// 0x100 * n; word 0, the reset SP, holds 0x2000_0000 and the other system
// vectors below word 16 (the reset PC at word 1, the NMI at word 2) hold
// 0x0700_0000 plus their byte address. The stack memory decodes only
// address bits [9:2]. Reads are combinational; writes happen on the rising clock
// edge, and nothing is written or counted while rst_n is low. It also
// counts PPB writes (pushes) and reads (pops) and reports wrong pushed
// data, so testbenches can check the stacking traffic.
module core_mem_model (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  reg_no,
  input  logic        core_write,
  input  logic [31:0] core_wdata,
  output logic [31:0] core_rdata,
  input  logic [31:0] padd,
  input  logic        psel,
  input  logic        pena,
  input  logic        pwrite,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  input  logic [31:0] vec_addr,
  output logic [31:0] vec_rdata
);

  logic [31:0] r   [16];
  logic [31:0] mem [256];
  int          n_push = 0, n_pop = 0, bad_push = 0;

  function automatic logic [31:0] vector_of(input int n);
    return 32'h0800_0000 + 32'(n) * 32'h100;
  endfunction

  initial begin
    for (int i = 0; i < 16; i++) r[i] = 32'h1000_0000 + 32'(i) * 32'h11;
    for (int i = 0; i < 256; i++) mem[i] = '0;
  end

  assign core_rdata = r[reg_no];
  assign prdata     = mem[padd[9:2]];
  assign vec_rdata  = (vec_addr == '0)    ? 32'h2000_0000
                    : (vec_addr < 32'h40) ? 32'h0700_0000 + vec_addr
                                           : vector_of(int'((vec_addr - 32'h40) >> 2));

  always @(posedge clk) if (rst_n) begin
    if (psel && pena && pwrite) begin
      mem[padd[9:2]] <= pwdata;
      n_push++;
      if (pwdata !== r[reg_no]) bad_push++;
    end
    if (psel && pena && !pwrite) n_pop++;
    if (core_write) r[reg_no] <= core_wdata;
  end

endmodule

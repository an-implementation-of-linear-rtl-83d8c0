// bzk_microcomputer: the BZK.SAU.FPGA CPU with its 64 KB RAM.
//
// Connects bzk_cpu to bzk_memory. A loader port lets the outside world write
// a program and its data into RAM while the CPU is held in reset
// (load_en = 1): on every clock with load_we = 1 the word load_data is
// written at byte address load_addr. The same port reads memory back after
// the program has halted: with load_en = 1 and load_we = 0, load_rdata shows
// the word at load_addr one cycle later. When load_en drops, the CPU starts
// from address 0. The loader port is this design's stand-in for the
// machine's program-loading path, which is not described.
module bzk_microcomputer
  import bzk_pkg::*;
#(
  parameter int unsigned ADDR_W = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load_en,
  input  logic        load_we,
  input  logic [15:0] load_addr,
  input  logic [15:0] load_data,
  output logic [15:0] load_rdata,
  output logic        halted,
  output logic        instr_done,
  output logic [15:0] ac,
  output logic [15:0] pc,
  output flags_t      ccr
);

  logic        cpu_rst_n;
  logic [15:0] cpu_addr, cpu_wdata, mem_rdata;
  logic        cpu_we;
  logic [15:0] m_addr, m_wdata;
  logic        m_we;

  assign cpu_rst_n = rst_n && !load_en;

  bzk_cpu u_cpu (
    .clk, .rst_n(cpu_rst_n),
    .mem_addr(cpu_addr), .mem_we(cpu_we), .mem_wdata(cpu_wdata), .mem_rdata,
    .halted, .instr_done, .ac, .pc, .ccr
  );

  assign m_addr  = load_en ? load_addr : cpu_addr;
  assign m_we    = load_en ? load_we   : cpu_we;
  assign m_wdata = load_en ? load_data : cpu_wdata;

  bzk_memory #(.ADDR_W(ADDR_W)) u_mem (
    .clk, .addr(m_addr[ADDR_W-1:0]), .we(m_we), .wdata(m_wdata), .rdata(mem_rdata)
  );

  assign load_rdata = mem_rdata;

  if (ADDR_W < 16) begin : g_unused
    logic unused_hi;
    assign unused_hi = ^m_addr[15:ADDR_W];
  end

endmodule

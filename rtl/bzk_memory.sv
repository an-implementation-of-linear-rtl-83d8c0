// bzk_memory: main RAM of the BZK.SAU.FPGA microcomputer.
//
// 64 KB, byte addressed with a 16-bit address, read and written one 16-bit
// word at a time at even addresses (address bit 0 is ignored). Storage is
// big-endian: the byte at the even address is bits [15:8] of the word. The
// array is one word wide, ADDR_W-1 address bits deep, so synthesis maps it to
// block RAM. Timing: synchronous single port; a write (we = 1) stores wdata
// at the clock edge, and rdata shows the word at the address sampled on the
// previous edge (one cycle read latency, read-before-write). The size, byte
// order and 16-bit bus are the published figures; the single-port
// synchronous organisation is this design's choice.
module bzk_memory #(
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic [15:0]       wdata,
  output logic [15:0]       rdata
);

  localparam int unsigned WORDS = 2 ** (ADDR_W - 1);

  logic [15:0] mem [WORDS];
  logic [ADDR_W-2:0] widx;

  assign widx = addr[ADDR_W-1:1];

  always_ff @(posedge clk) begin
    if (we) mem[widx] <= wdata;
    rdata <= mem[widx];
  end

  // addr[0] selects a byte inside the word, which word accesses do not use.
  logic unused_addr0;
  assign unused_addr0 = addr[0];

endmodule

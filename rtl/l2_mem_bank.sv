// l2_mem_bank: data array of one L2 cache bank.
//
// BLOCKS blocks of 128 32-bit words, one write port and one synchronous read
// port, so the memory controller can stream a block out to the network while
// it writes a returning block in. rdata holds the word at the address
// presented in the previous cycle.
//
// The array is given contents at start-up (the L2 bank can be initialised at
// design time): word a holds {BANK_ID[7:0], a[23:0]}. That formula stands in
// for a file of initial values and is this design's choice, as are the port
// arrangement and the block count.
module l2_mem_bank
  import dsm_pkg::*;
#(
  parameter int unsigned BLOCKS  = 64,
  parameter int unsigned BANK_ID = 0,
  localparam int unsigned WORDS  = BLOCKS * BLOCK_WORDS,
  localparam int unsigned AW     = $clog2(WORDS)
) (
  input  logic              clk,
  input  logic [AW-1:0]     raddr,
  output logic [31:0]       rdata,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [31:0]       wdata
);

  logic [31:0] mem [WORDS];

  initial
    for (int unsigned a = 0; a < WORDS; a++)
      mem[a] = {8'(BANK_ID), 24'(a)};

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule

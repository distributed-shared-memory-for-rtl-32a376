// l2_cache: one bank of the shared L2 data cache, attached to a router.
//
// The bank is the network interface (l2_ni), the memory controller with the
// coherence directory (l2_mc) and the data array (l2_mem_bank). One bank in
// a mesh gives a centralised shared L2; several banks, each with its own
// directory for its own blocks, give the distributed (NUCA) L2, where a task
// is best mapped close to the bank that holds its data.
//
// Network side: for each of the two physical channels, the flit stream from
// the router's local output (net_in_*) and the stream into the router's
// local input (net_out_*), valid/ready. Channel 0 carries control packets,
// channel 1 packets with a block of data.
//
// Lint note: verilator reports rst_n as used both asynchronously and
// synchronously (SYNCASYNCNET). The synchronous use is only the reset gate of
// a simulation assertion inside l2_mc; the flops themselves all reset asynchronously.
module l2_cache
  import dsm_pkg::*;
#(
  parameter int unsigned W        = 4,
  parameter int unsigned H        = 4,
  parameter int unsigned BLOCKS   = 64,
  parameter logic [7:0]  MY_ADDR  = 8'h00,
  parameter int unsigned BANK_ID  = 0,
  parameter int unsigned IN_DEPTH = 16,
  parameter int unsigned T_POLICY = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  net_in_valid,
  input  flit_t       net_in_data [2],
  output logic [1:0]  net_in_ready,
  output logic [1:0]  net_out_valid,
  output flit_t       net_out_data [2],
  input  logic [1:0]  net_out_ready,
  output mc_events_t  events
);

  localparam int unsigned AW = $clog2(BLOCKS * BLOCK_WORDS);

  logic [1:0]  intr, mc_valid, mc_ready;
  flit_t       mc_data [2];
  logic [AW-1:0] raddr, waddr;
  logic [31:0]   rdata, wdata;
  logic          we;

  l2_ni #(.N_NODES(W * H), .IN_DEPTH(IN_DEPTH)) u_ni (
    .clk, .rst_n,
    .net_valid(net_in_valid), .net_data(net_in_data), .net_ready(net_in_ready),
    .intr, .mc_valid, .mc_data, .mc_ready
  );

  l2_mc #(.W(W), .H(H), .BLOCKS(BLOCKS), .MY_ADDR(MY_ADDR), .T_POLICY(T_POLICY)) u_mc (
    .clk, .rst_n, .intr,
    .in0_valid(mc_valid[0]), .in0_data(mc_data[0]), .in0_ready(mc_ready[0]),
    .in1_valid(mc_valid[1]), .in1_data(mc_data[1]), .in1_ready(mc_ready[1]),
    .out0_valid(net_out_valid[0]), .out0_data(net_out_data[0]), .out0_ready(net_out_ready[0]),
    .out1_valid(net_out_valid[1]), .out1_data(net_out_data[1]), .out1_ready(net_out_ready[1]),
    .mem_raddr(raddr), .mem_rdata(rdata), .mem_we(we), .mem_waddr(waddr), .mem_wdata(wdata),
    .events
  );

  l2_mem_bank #(.BLOCKS(BLOCKS), .BANK_ID(BANK_ID)) u_mem (
    .clk, .raddr, .rdata, .we, .waddr, .wdata
  );

endmodule

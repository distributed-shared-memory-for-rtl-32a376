// dsm_mpsoc: NoC-based MPSoC with a distributed shared L2 data cache.
//
// A W x H Hermes QoS mesh with two physical channels joins processing
// elements (PEs) and N_BANKS L2 cache banks. Every router not holding a bank
// holds a PE slot: its network interface (pe_ni) and its direct-mapped L1
// data cache (l1_cache). The processor core of a PE, its DMA engine and the
// kernel software that runs the PE side of the coherence protocol are not
// part of this RTL: their connections are the pe_* ports, one set per mesh
// node (the sets at bank nodes are unused: outputs read 0, inputs are
// ignored).
//
// Each bank keeps the directory of its own blocks, so a block lives in
// exactly one bank; which bank holds which block is a software mapping.
// With N_BANKS = 1 the same RTL is the centralised shared L2.
//
// Default configuration: a 4 x 4 mesh with four banks at the corners,
// 64 blocks of 128 words per bank and 8-line L1 caches. The mesh size and
// bank count are those of the distributed-L2 evaluation; bank placement,
// bank capacity and L1 capacity are this design's choices.
//
// Ports: per node (index y * W + x) the PE word streams (tx/rx), the NI
// interrupt, and the L1 cache CPU and kernel ports (see l1_cache); per bank
// the memory controller event pulses.
//
// Lint note: verilator reports rst_n as used both asynchronously and
// synchronously (SYNCASYNCNET). The synchronous use is only the reset gate of
// a simulation assertions inside hermes_router and l2_mc; the flops themselves all reset asynchronously.
// The PE-side inputs of the four bank nodes are left unconnected, as no PE
// sits there.
module dsm_mpsoc
  import dsm_pkg::*;
#(
  parameter int unsigned W         = 4,
  parameter int unsigned H         = 4,
  parameter int unsigned N_BANKS   = 4,
  parameter logic [N_BANKS-1:0][7:0] BANK_ADDR = {8'h33, 8'h30, 8'h03, 8'h00},
  parameter int unsigned BLOCKS    = 64,
  parameter int unsigned L1_LINES  = 8,
  parameter int unsigned BUF_DEPTH = 8,
  parameter int unsigned T_POLICY  = 2,
  localparam int unsigned N        = W * H
) (
  input  logic               clk,
  input  logic               rst_n,
  // PE network interfaces
  input  logic  [N-1:0]      pe_tx_valid,
  input  logic  [31:0]       pe_tx_word [N],
  output logic  [N-1:0]      pe_tx_ready,
  output logic  [N-1:0]      pe_rx_valid,
  output logic  [31:0]       pe_rx_word [N],
  input  logic  [N-1:0]      pe_rx_ready,
  output logic  [N-1:0]      pe_intr,
  // PE L1 caches, CPU port
  input  logic  [N-1:0]      l1_cpu_en,
  input  logic  [N-1:0]      l1_cpu_we,
  input  logic  [15:0]       l1_cpu_block [N],
  input  logic  [6:0]        l1_cpu_word  [N],
  input  logic  [31:0]       l1_cpu_wdata [N],
  output logic  [31:0]       l1_cpu_rdata [N],
  output logic  [N-1:0]      l1_cpu_hit,
  output logic  [N-1:0]      l1_cpu_miss,
  output logic  [N-1:0]      l1_victim_valid,
  output logic  [N-1:0]      l1_victim_modified,
  output logic  [15:0]       l1_victim_block [N],
  // PE L1 caches, kernel port
  input  logic  [N-1:0]      l1_k_init,
  input  logic  [N-1:0]      l1_k_inval,
  input  logic  [N-1:0]      l1_k_tag_set,
  input  logic  [N-1:0]      l1_k_clean,
  input  logic  [N-1:0]      l1_k_we,
  input  logic  [15:0]       l1_k_block [N],
  input  logic  [6:0]        l1_k_word  [N],
  input  logic  [31:0]       l1_k_wdata [N],
  output logic  [31:0]       l1_k_rdata [N],
  // L2 bank monitoring
  output mc_events_t [N_BANKS-1:0] bank_events
);

  logic  [N-1:0] lin_v  [2];
  flit_t [N-1:0] lin_d  [2];
  logic  [N-1:0] lin_r  [2];
  logic  [N-1:0] lout_v [2];
  flit_t [N-1:0] lout_d [2];
  logic  [N-1:0] lout_r [2];

  hermes_noc #(.W(W), .H(H), .CHANNELS(2), .BUF_DEPTH(BUF_DEPTH)) u_noc (
    .clk, .rst_n,
    .loc_in_valid(lin_v), .loc_in_data(lin_d), .loc_in_ready(lin_r),
    .loc_out_valid(lout_v), .loc_out_data(lout_d), .loc_out_ready(lout_r)
  );

  function automatic int bank_at(input int unsigned n);
    for (int b = 0; b < int'(N_BANKS); b++)
      if (BANK_ADDR[b] == xy_addr(n % W, n / W)) return b;
    return -1;
  endfunction

  for (genvar n = 0; n < N; n++) begin : g_node
    localparam int BK = bank_at(n);

    // per-node channel bundles
    logic [1:0] in_v, in_r, out_v, out_r;
    flit_t      in_d [2];
    flit_t      out_d [2];
    for (genvar c = 0; c < 2; c++) begin : g_ch
      assign lin_v[c][n]  = in_v[c];
      assign lin_d[c][n]  = in_d[c];
      assign in_r[c]      = lin_r[c][n];
      assign out_v[c]     = lout_v[c][n];
      assign out_d[c]     = lout_d[c][n];
      assign lout_r[c][n] = out_r[c];
    end

    if (BK >= 0) begin : g_bank
      l2_cache #(.W(W), .H(H), .BLOCKS(BLOCKS), .MY_ADDR(BANK_ADDR[BK]), .BANK_ID(BK),
                 .T_POLICY(T_POLICY)) u_l2 (
        .clk, .rst_n,
        .net_in_valid(out_v), .net_in_data(out_d), .net_in_ready(out_r),
        .net_out_valid(in_v), .net_out_data(in_d), .net_out_ready(in_r),
        .events(bank_events[BK])
      );
      assign pe_tx_ready[n] = 1'b0;
      assign pe_rx_valid[n] = 1'b0;
      assign pe_rx_word[n]  = '0;
      assign pe_intr[n]     = 1'b0;
      assign l1_cpu_rdata[n] = '0;
      assign l1_cpu_hit[n]   = 1'b0;
      assign l1_cpu_miss[n]  = 1'b0;
      assign l1_victim_valid[n]    = 1'b0;
      assign l1_victim_modified[n] = 1'b0;
      assign l1_victim_block[n]    = '0;
      assign l1_k_rdata[n]   = '0;
    end else begin : g_pe
      pe_ni #(.N_NODES(N)) u_ni (
        .clk, .rst_n,
        .tx_valid(pe_tx_valid[n]), .tx_word(pe_tx_word[n]), .tx_ready(pe_tx_ready[n]),
        .rx_valid(pe_rx_valid[n]), .rx_word(pe_rx_word[n]), .rx_ready(pe_rx_ready[n]),
        .intr(pe_intr[n]),
        .net_out_valid(in_v), .net_out_data(in_d), .net_out_ready(in_r),
        .net_in_valid(out_v), .net_in_data(out_d), .net_in_ready(out_r)
      );
      l1_cache #(.LINES(L1_LINES), .BLOCK_WORDS(BLOCK_WORDS), .BLK_W(16)) u_l1 (
        .clk, .rst_n,
        .cpu_en(l1_cpu_en[n]), .cpu_we(l1_cpu_we[n]), .cpu_block(l1_cpu_block[n]),
        .cpu_word(l1_cpu_word[n]), .cpu_wdata(l1_cpu_wdata[n]), .cpu_rdata(l1_cpu_rdata[n]),
        .cpu_hit(l1_cpu_hit[n]), .cpu_miss(l1_cpu_miss[n]),
        .victim_valid(l1_victim_valid[n]), .victim_modified(l1_victim_modified[n]),
        .victim_block(l1_victim_block[n]),
        .k_init(l1_k_init[n]), .k_inval(l1_k_inval[n]), .k_tag_set(l1_k_tag_set[n]),
        .k_clean(l1_k_clean[n]), .k_we(l1_k_we[n]), .k_block(l1_k_block[n]),
        .k_word(l1_k_word[n]), .k_wdata(l1_k_wdata[n]), .k_rdata(l1_k_rdata[n])
      );
    end
  end

endmodule

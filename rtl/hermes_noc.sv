// hermes_noc: W x H mesh of Hermes QoS routers with duplicated physical
// channels.
//
// Every pair of neighbouring routers is joined by CHANNELS independent
// physical networks ("planes"); plane c of every router only talks to plane
// c of its neighbours, so a long packet on one plane never blocks a short
// packet on the other. In this MPSoC plane 0 carries the short coherence
// control packets and plane 1 the long packets holding a 128-word block.
//
// Local ports are indexed [plane][node] with node = y * W + x; the router
// address of a node is {x[3:0], y[3:0]}. Each local port is a valid/ready
// flit stream in each direction (see hermes_router).
//
// The mesh, the Hamiltonian routers and the two physical channels follow the
// Hermes QoS description; the plane-per-channel arrangement and the
// valid/ready links are this design's choices.
//
// Lint note: verilator reports rst_n as used both asynchronously and
// synchronously (SYNCASYNCNET). The synchronous use is only the reset gate of
// a simulation assertion inside hermes_router; the flops themselves all reset asynchronously.
module hermes_noc
  import dsm_pkg::*;
#(
  parameter int unsigned W         = 4,
  parameter int unsigned H         = 4,
  parameter int unsigned CHANNELS  = 2,
  parameter int unsigned BUF_DEPTH = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic  [W*H-1:0]      loc_in_valid  [CHANNELS],
  input  flit_t [W*H-1:0]      loc_in_data   [CHANNELS],
  output logic  [W*H-1:0]      loc_in_ready  [CHANNELS],
  output logic  [W*H-1:0]      loc_out_valid [CHANNELS],
  output flit_t [W*H-1:0]      loc_out_data  [CHANNELS],
  input  logic  [W*H-1:0]      loc_out_ready [CHANNELS]
);

  localparam int unsigned N = W * H;

  // Per router, per port signals.
  logic  [NPORTS-1:0] iv [CHANNELS][N];
  flit_t [NPORTS-1:0] id [CHANNELS][N];
  logic  [NPORTS-1:0] ir [CHANNELS][N];
  logic  [NPORTS-1:0] ov [CHANNELS][N];
  flit_t [NPORTS-1:0] od [CHANNELS][N];
  logic  [NPORTS-1:0] orr[CHANNELS][N];

  for (genvar c = 0; c < CHANNELS; c++) begin : g_plane
    for (genvar y = 0; y < H; y++) begin : g_row
      for (genvar x = 0; x < W; x++) begin : g_col
        localparam int unsigned n = y * W + x;

        hermes_router #(.W(W), .H(H), .X(x), .Y(y), .BUF_DEPTH(BUF_DEPTH)) u_router (
          .clk, .rst_n,
          .in_valid (iv[c][n]), .in_data (id[c][n]), .in_ready (ir[c][n]),
          .out_valid(ov[c][n]), .out_data(od[c][n]), .out_ready(orr[c][n])
        );

        // Local port.
        assign iv[c][n][P_LOCAL]     = loc_in_valid[c][n];
        assign id[c][n][P_LOCAL]     = loc_in_data[c][n];
        assign loc_in_ready[c][n]    = ir[c][n][P_LOCAL];
        assign loc_out_valid[c][n]   = ov[c][n][P_LOCAL];
        assign loc_out_data[c][n]    = od[c][n][P_LOCAL];
        assign orr[c][n][P_LOCAL]    = loc_out_ready[c][n];

        // East link (input from the east neighbour's west output).
        if (x + 1 < W) begin : g_e
          assign iv[c][n][P_EAST]  = ov[c][n+1][P_WEST];
          assign id[c][n][P_EAST]  = od[c][n+1][P_WEST];
          assign orr[c][n][P_EAST] = ir[c][n+1][P_WEST];
        end else begin : g_ne
          assign iv[c][n][P_EAST]  = 1'b0;
          assign id[c][n][P_EAST]  = '0;
          assign orr[c][n][P_EAST] = 1'b0;
        end
        if (x > 0) begin : g_w
          assign iv[c][n][P_WEST]  = ov[c][n-1][P_EAST];
          assign id[c][n][P_WEST]  = od[c][n-1][P_EAST];
          assign orr[c][n][P_WEST] = ir[c][n-1][P_EAST];
        end else begin : g_nw
          assign iv[c][n][P_WEST]  = 1'b0;
          assign id[c][n][P_WEST]  = '0;
          assign orr[c][n][P_WEST] = 1'b0;
        end
        if (y + 1 < H) begin : g_n
          assign iv[c][n][P_NORTH]  = ov[c][n+W][P_SOUTH];
          assign id[c][n][P_NORTH]  = od[c][n+W][P_SOUTH];
          assign orr[c][n][P_NORTH] = ir[c][n+W][P_SOUTH];
        end else begin : g_nn
          assign iv[c][n][P_NORTH]  = 1'b0;
          assign id[c][n][P_NORTH]  = '0;
          assign orr[c][n][P_NORTH] = 1'b0;
        end
        if (y > 0) begin : g_s
          assign iv[c][n][P_SOUTH]  = ov[c][n-W][P_NORTH];
          assign id[c][n][P_SOUTH]  = od[c][n-W][P_NORTH];
          assign orr[c][n][P_SOUTH] = ir[c][n-W][P_NORTH];
        end else begin : g_ns
          assign iv[c][n][P_SOUTH]  = 1'b0;
          assign id[c][n][P_SOUTH]  = '0;
          assign orr[c][n][P_SOUTH] = 1'b0;
        end
      end
    end
  end

endmodule

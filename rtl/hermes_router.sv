// hermes_router: one router of the Hermes QoS mesh, with Hamiltonian routing,
// path-based multicast and two packet priorities.
//
// The router has five ports (east, west, north, south, local), an input
// FIFO per port and wormhole switching: a packet's header flit reserves the
// output port(s) it needs, its body follows flit by flit, and the
// reservation ends with the packet's last flit (known from the size flit).
//
// Routing follows the Hamiltonian scheme: every router carries a label
// 0..N-1 along a boustrophedon walk of the mesh. A packet whose target label
// is higher than the current one moves only over links that raise the label
// (the "ascending" sub-network), choosing the neighbour with the largest
// label that does not pass the target; a packet for a lower label does the
// mirror image. The two sub-networks are acyclic, so routing is free of
// deadlock without virtual channels.
//
// Multicast uses the same paths: a multicast header (bit 15) is followed by a
// destination mask indexed by label, and bit 13 tells whether the packet
// walks up or down the labels. At each router whose mask bit is set a copy
// goes out of the local port, while the packet continues toward the next
// destination of the mask in its direction; a flit advances only when every
// reserved output accepts it.
//
// Arbitration: when several waiting headers compete, high-priority packets
// (header bit 14) are served first, round-robin within a priority class.
//
// Interface: valid/ready per port in each direction; in_ready is "FIFO not
// full"; out_valid is raised only once every output the packet holds is
// ready (multicast forks move in lock-step). Timing: a header takes 2 cycles
// per hop (FIFO write, then allocation); body flits then follow one per cycle.
//
// What follows the Hermes QoS description: Hamiltonian routing, multicast
// along Hamiltonian paths, priorities, 16-bit flits. This design's own
// choices: the header-flit layout (see dsm_pkg), the FIFO depth, the
// valid/ready link protocol and the round-robin arbiter.
//
// Lint note: verilator reports rst_n as used both asynchronously and
// synchronously (SYNCASYNCNET). The synchronous use is only the reset gate of
// a simulation assertion (one owner per output); the flops themselves all reset asynchronously.
// The constant-comparison (UNSIGNED) report comes from the label test
// "lb < MYL" at the router whose label is 0, where it is false by design, and
// the width-expansion reports from 3-bit counters added in 32-bit int
// arithmetic for the round-robin index; both are intended.
module hermes_router
  import dsm_pkg::*;
#(
  parameter int unsigned W          = 4,   // mesh width (routers)
  parameter int unsigned H          = 4,   // mesh height (routers)
  parameter int unsigned X          = 0,   // this router's column
  parameter int unsigned Y          = 0,   // this router's row
  parameter int unsigned BUF_DEPTH  = 8    // flits per input FIFO
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic  [NPORTS-1:0]   in_valid,
  input  flit_t [NPORTS-1:0]   in_data,
  output logic  [NPORTS-1:0]   in_ready,
  output logic  [NPORTS-1:0]   out_valid,
  output flit_t [NPORTS-1:0]   out_data,
  input  logic  [NPORTS-1:0]   out_ready
);

  localparam int unsigned N          = W * H;
  localparam int unsigned MASK_FLITS = (N + FLIT_W - 1) / FLIT_W;
  localparam int unsigned AW         = $clog2(BUF_DEPTH);
  localparam int unsigned MYL        = ham_label(X, Y, W);

  // Neighbour labels and existence.
  localparam bit HAS_E = (X + 1 < W);
  localparam bit HAS_W = (X > 0);
  localparam bit HAS_N = (Y + 1 < H);
  localparam bit HAS_S = (Y > 0);
  localparam int unsigned LBL_E = HAS_E ? ham_label(X + 1, Y, W) : 0;
  localparam int unsigned LBL_W = HAS_W ? ham_label(X - 1, Y, W) : 0;
  localparam int unsigned LBL_N = HAS_N ? ham_label(X, Y + 1, W) : 0;
  localparam int unsigned LBL_S = HAS_S ? ham_label(X, Y - 1, W) : 0;

  initial begin
    assert (BUF_DEPTH >= MASK_FLITS + 2) else $error("BUF_DEPTH too small for multicast header");
    assert (W <= 16 && H <= 16) else $error("addresses hold 4-bit coordinates");
  end

  // One output port toward target label d (d != MYL).
  function automatic logic [NPORTS-1:0] route_to(input int unsigned d);
    logic [NPORTS-1:0] r;
    int unsigned best;
    int unsigned lb [4];
    bit          ex [4];
    r = '0;
    lb = '{LBL_E, LBL_W, LBL_N, LBL_S};
    ex = '{HAS_E, HAS_W, HAS_N, HAS_S};
    if (d == MYL) begin
      r[P_LOCAL] = 1'b1;
    end else if (d > MYL) begin
      best = MYL;
      for (int p = 0; p < 4; p++)
        if (ex[p] && lb[p] > MYL && lb[p] <= d && lb[p] > best) best = lb[p];
      for (int p = 0; p < 4; p++)
        if (ex[p] && lb[p] == best) r[p] = 1'b1;
    end else begin
      best = MYL;
      for (int p = 0; p < 4; p++)
        if (ex[p] && lb[p] < MYL && lb[p] >= d && lb[p] < best) best = lb[p];
      for (int p = 0; p < 4; p++)
        if (ex[p] && lb[p] == best) r[p] = 1'b1;
    end
    return r;
  endfunction

  // ---------------------------------------------------------------- FIFOs
  flit_t              fbuf  [NPORTS][BUF_DEPTH];
  logic [AW-1:0]      rdp   [NPORTS];
  logic [AW-1:0]      wrp   [NPORTS];
  logic [AW:0]        cnt   [NPORTS];
  logic [NPORTS-1:0]  pop;

  // ------------------------------------------------------ switch state
  logic [NPORTS-1:0]  active;                 // input holds a reservation
  logic [NPORTS-1:0]  omask   [NPORTS];       // outputs reserved by input
  logic [15:0]        pos     [NPORTS];       // index of next flit in packet
  logic [15:0]        rem     [NPORTS];       // flits left after size flit
  logic [NPORTS-1:0]  is_mc;                  // packet is multicast
  logic [NPORTS-1:0]  obusy;                  // output reserved
  logic [2:0]         rr;                     // round-robin start

  // Routing request of each waiting input.
  logic [NPORTS-1:0]  req_ok;
  logic [NPORTS-1:0]  req_mask [NPORTS];
  logic [NPORTS-1:0]  req_hi;

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      flit_t hdr;
      logic [N-1:0] m;
      int unsigned nxt;
      bit found;
      hdr = fbuf[i][rdp[i]];
      req_ok[i]   = 1'b0;
      req_mask[i] = '0;
      req_hi[i]   = hdr[14];
      m = '0;
      nxt = 0;
      found = 1'b0;
      if (!active[i] && cnt[i] != 0) begin
        if (!hdr[15]) begin
          req_ok[i]   = 1'b1;
          req_mask[i] = route_to(label_of_addr(hdr[7:0], W));
        end else if (cnt[i] >= (AW+1)'(MASK_FLITS + 1)) begin
          for (int k = 0; k < MASK_FLITS; k++)
            for (int b = 0; b < FLIT_W; b++)
              if (k * FLIT_W + b < N)
                m[k * FLIT_W + b] = fbuf[i][AW'((rdp[i] + AW'(k + 1)) % BUF_DEPTH)][b];
          req_ok[i] = 1'b1;
          if (m[MYL]) req_mask[i][P_LOCAL] = 1'b1;
          if (hdr[13]) begin
            for (int l = N - 1; l > int'(MYL); l--)
              if (m[l]) begin nxt = l; found = 1'b1; end
          end else begin
            for (int l = 0; l < int'(MYL); l++)
              if (m[l]) begin nxt = l; found = 1'b1; end
          end
          if (found) req_mask[i] = req_mask[i] | route_to(nxt);
        end
      end
    end
  end

  // Allocation: high priority first, then round-robin from rr.
  logic [NPORTS-1:0] grant;
  always_comb begin
    logic [NPORTS-1:0] taken;
    taken = obusy;
    grant = '0;
    for (int pass = 0; pass < 2; pass++)
      for (int k = 0; k < NPORTS; k++) begin
        int unsigned i;
        i = (int'(rr) + k) % NPORTS;
        if (req_ok[i] && !grant[i] && (req_hi[i] == (pass == 0)) &&
            ((req_mask[i] & taken) == '0) && req_mask[i] != '0) begin
          grant[i] = 1'b1;
          taken    = taken | req_mask[i];
        end
      end
  end

  // Data movement.
  logic [NPORTS-1:0] owner_of [NPORTS];   // one-hot input owning each output
  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      owner_of[o] = '0;
      for (int i = 0; i < NPORTS; i++)
        if (active[i] && omask[i][o]) owner_of[o][i] = 1'b1;
    end
    for (int i = 0; i < NPORTS; i++)
      pop[i] = active[i] && cnt[i] != 0 && ((omask[i] & ~out_ready) == '0);
    for (int o = 0; o < NPORTS; o++) begin
      out_valid[o] = 1'b0;
      out_data[o]  = '0;
      for (int i = 0; i < NPORTS; i++)
        if (owner_of[o][i]) begin
          out_valid[o] = pop[i];
          out_data[o]  = fbuf[i][rdp[i]];
        end
    end
    for (int i = 0; i < NPORTS; i++)
      in_ready[i] = cnt[i] < (AW+1)'(BUF_DEPTH);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPORTS; i++) begin
        rdp[i] <= '0; wrp[i] <= '0; cnt[i] <= '0;
        omask[i] <= '0; pos[i] <= '0; rem[i] <= '0;
      end
      active <= '0;
      is_mc  <= '0;
      obusy  <= '0;
      rr     <= '0;
    end else begin
      logic [NPORTS-1:0] nbusy;
      nbusy = obusy;
      rr <= (rr == 3'(NPORTS - 1)) ? '0 : rr + 3'd1;
      for (int i = 0; i < NPORTS; i++) begin
        logic push;
        push = in_valid[i] && in_ready[i];
        if (push) begin
          fbuf[i][wrp[i]] <= in_data[i];
          wrp[i] <= AW'((wrp[i] + 1) % BUF_DEPTH);
        end
        if (pop[i]) rdp[i] <= AW'((rdp[i] + 1) % BUF_DEPTH);
        cnt[i] <= cnt[i] + (AW+1)'(push) - (AW+1)'(pop[i]);

        if (grant[i]) begin
          active[i] <= 1'b1;
          omask[i]  <= req_mask[i];
          is_mc[i]  <= fbuf[i][rdp[i]][15];
          pos[i]    <= '0;
          nbusy     = nbusy | req_mask[i];
        end else if (pop[i]) begin
          logic last;
          int unsigned sp;
          sp   = is_mc[i] ? MASK_FLITS + 1 : 1;
          last = 1'b0;
          pos[i] <= pos[i] + 16'd1;
          if (pos[i] == 16'(sp)) begin
            rem[i] <= fbuf[i][rdp[i]];
            last = (fbuf[i][rdp[i]] == '0);
          end else if (pos[i] > 16'(sp)) begin
            rem[i] <= rem[i] - 16'd1;
            last = (rem[i] == 16'd1);
          end
          if (last) begin
            active[i] <= 1'b0;
            nbusy     = nbusy & ~omask[i];
          end
        end
      end
      obusy <= nbusy;
    end
  end

  // A reserved output never has two owners.
  always_ff @(posedge clk)
    if (rst_n)
      for (int o = 0; o < NPORTS; o++)
        assert ($countones(owner_of[o]) <= 1) else $error("output %0d has two owners", o);

endmodule

// dsm_pkg: types and constants shared by the distributed-shared-memory MPSoC.
//
// Flits are 16 bits wide, as in the Hermes network. A packet starts with a
// header flit holding the target router address, followed by a size flit
// (number of flits that follow it) and, for packets exchanged with an L2
// bank, the fields Service, SourceNetAddr, TargetBlock and SourceTaskId and
// an optional 256-flit payload (one 128-word block, each 32-bit word sent as
// two flits, upper half first).
//
// Header flit layout (a choice of this design; the bit positions are not
// taken from any published format):
//   [15]   multicast: 1 = a destination mask of MASK_FLITS flits follows
//   [14]   priority : 1 = high priority (all coherence control packets)
//   [13]   direction of a multicast path: 1 = ascending Hamiltonian labels
//   [7:4]  X coordinate of the target router (unicast only)
//   [3:0]  Y coordinate of the target router (unicast only)
// In a multicast mask, bit i stands for the router whose Hamiltonian label
// is i. Labels follow a boustrophedon walk: row y is walked left to right
// when y is even and right to left when y is odd.
package dsm_pkg;

  localparam int unsigned FLIT_W      = 16;
  localparam int unsigned WORD_W      = 32;
  localparam int unsigned BLOCK_WORDS = 128;               // one L2 block / L1 line
  localparam int unsigned BLOCK_FLITS = 2 * BLOCK_WORDS;   // 256-flit payload
  localparam int unsigned HDR_FLITS   = 6;                 // flits 0..5 of a message
  localparam int unsigned CTRL_SIZE   = HDR_FLITS - 2;     // size field of a control packet
  localparam int unsigned DATA_SIZE   = CTRL_SIZE + BLOCK_FLITS;

  typedef logic [FLIT_W-1:0] flit_t;

  // Service codes carried in flit 2.
  typedef enum logic [FLIT_W-1:0] {
    SVC_READ_REQUEST       = 16'h0001, // PE -> L2: copy of a block wanted
    SVC_READ_BLOCK         = 16'h0002, // L2/owner -> PE: block data (shared copy)
    SVC_WRITE_BACK         = 16'h0003, // PE -> L2: modified block data
    SVC_FLUSH_BLOCK        = 16'h0004, // PE -> L2: block data, line dropped at task end
    SVC_INVALIDATE_BLOCK   = 16'h0005, // L2 -> sharers (multicast)
    SVC_ASK_EXCLUSIVITY    = 16'h0006, // PE -> L2: right to modify (read-with-exclusivity)
    SVC_GRANT_EXCLUSIVITY  = 16'h0007, // L2/owner -> PE: exclusive right, with data if size says so
    SVC_WB_REQUEST         = 16'h0008, // L2 -> owner: write back, also send copy to SourceNetAddr
    SVC_WB_EXCL_REQUEST    = 16'h0009, // L2 -> owner: give block with exclusivity to SourceNetAddr
    SVC_READ_FORWARD       = 16'h000A  // L2 -> owner in T state: send copy to SourceNetAddr
  } service_e;

  // Directory state of one L2 block (MSI plus the transition state).
  typedef enum logic [1:0] {
    DIR_I = 2'd0,   // no L1 holds a copy, L2 data valid
    DIR_S = 2'd1,   // one or more L1s hold clean copies
    DIR_M = 2'd2,   // exactly one L1 holds a modified copy, L2 stale
    DIR_T = 2'd3    // write-back requested from the owner, not yet received
  } dir_state_e;

  // Router port numbering.
  typedef enum logic [2:0] {
    P_EAST = 3'd0, P_WEST = 3'd1, P_NORTH = 3'd2, P_SOUTH = 3'd3, P_LOCAL = 3'd4
  } port_e;

  localparam int unsigned NPORTS = 5;

  // One-cycle event pulses of an L2 memory controller, for monitoring.
  typedef struct packed {
    logic inv_multicast;  // an INVALIDATE_BLOCK multicast packet was sent
    logic wb_request;     // read of an M block: write-back requested from owner
    logic wb_excl;        // exclusivity on an M block: owner hands block to requester
    logic t_forward;      // read of a T block forwarded to the previous owner
    logic t_blocked;      // read of a T block held until the write-back arrives
    logic wb_received;    // a WRITE_BACK / FLUSH_BLOCK packet was absorbed
  } mc_events_t;

  function automatic logic [7:0] xy_addr(input int unsigned x, input int unsigned y);
    return 8'((x << 4) | y);
  endfunction

  // Hamiltonian label of router (x, y) in a mesh W routers wide.
  function automatic int unsigned ham_label(input int unsigned x, input int unsigned y,
                                            input int unsigned w);
    return (y % 2 == 0) ? y * w + x : y * w + (w - 1 - x);
  endfunction

  function automatic int unsigned label_of_addr(input logic [7:0] a, input int unsigned w);
    return ham_label(int'(a[7:4]), int'(a[3:0]), w);
  endfunction

  // Router address of Hamiltonian label l.
  function automatic logic [7:0] addr_of_label(input int unsigned l, input int unsigned w);
    int unsigned y, x;
    y = l / w;
    x = (y % 2 == 0) ? l % w : w - 1 - (l % w);
    return xy_addr(x, y);
  endfunction

  function automatic flit_t unicast_hdr(input logic [7:0] a, input logic prio);
    return {1'b0, prio, 6'd0, a};
  endfunction

endpackage

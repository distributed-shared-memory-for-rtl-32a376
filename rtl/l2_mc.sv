// l2_mc: memory controller (MC) of an L2 cache bank, with the bank's
// coherence directory.
//
// Two independent state machines serve the two network ports:
//  * FSM 1 (port 0, short packets) handles READ_REQUEST and
//    ASK_EXCLUSIVITY. It looks the block up in the directory, updates the
//    entry and sends the answers: block data, INVALIDATE_BLOCK multicasts,
//    GRANT_EXCLUSIVITY, or a request to the PE holding a modified copy.
//  * FSM 2 (port 1, long packets) absorbs WRITE_BACK and FLUSH_BLOCK
//    packets, writes the 128-word payload into the data array and updates
//    the directory.
// Because the FSMs run on separate physical channels, a write-back can
// arrive while FSM 1 is waiting on the same block.
//
// Directory: per block a state (I, S, M or T), a sharer vector indexed by
// Hamiltonian label and the address of the owner of a modified copy. The
// protocol is MSI with the four optimisations built on NoC services:
//  1. invalidations go out as at most two multicast packets (one up, one
//     down the Hamiltonian labels) instead of one unicast per sharer;
//  2. a read of an M block sends WB_REQUEST to the owner, whose write-back
//     is a multicast to both the bank and the reader; the block enters T;
//  3. exclusivity on an M block moves ownership at once and sends
//     WB_EXCL_REQUEST, so the owner hands the block straight to the new
//     writer and the bank is bypassed;
//  4. a read of a T block is forwarded to the previous owner (READ_FORWARD)
//     when tstate_select finds that cheaper, otherwise it waits until the
//     write-back sets the block to S.
// Exclusivity requests on a T block always wait. Control packets are sent
// with high priority on channel 0; packets with a payload go on channel 1.
//
// Ports: valid/ready flit streams from the NI (in0, in1), unbuffered flit
// streams into the routers (out0, out1), the data array's read and write
// ports and a struct of event pulses. A request is decoded one cycle after
// its sixth flit; a 262-flit data reply leaves at one flit per cycle.
//
// The message layout, the service list, the directory states and the four
// optimisations follow the document. This design's own choices: the service
// codes, the packet that asks the owner for a write-back, how a write-back
// from a non-owner is ignored, that invalidations are not acknowledged, and
// the directory organisation (one entry per block of the bank, index =
// TargetBlock mod BLOCKS).
//
// Lint note: verilator reports rst_n as used both asynchronously and
// synchronously (SYNCASYNCNET). The synchronous use is only the reset gate of
// a simulation assertions (stream stability, control size); the flops themselves all reset asynchronously.
// ts_d_owner and ts_d_l2, the two distances from tstate_select, are left
// unread: only its decision is used.
module l2_mc
  import dsm_pkg::*;
#(
  parameter int unsigned W        = 4,      // mesh width
  parameter int unsigned H        = 4,      // mesh height
  parameter int unsigned BLOCKS   = 64,     // blocks in this bank
  parameter logic [7:0]  MY_ADDR  = 8'h00,  // router address of this bank
  parameter int unsigned T_POLICY = 2,      // 0: reads of T blocks wait, 1: always forward, 2: by distance
  localparam int unsigned N       = W * H,
  localparam int unsigned AW      = $clog2(BLOCKS * BLOCK_WORDS)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  intr,
  input  logic        in0_valid,
  input  flit_t       in0_data,
  output logic        in0_ready,
  input  logic        in1_valid,
  input  flit_t       in1_data,
  output logic        in1_ready,
  output logic        out0_valid,
  output flit_t       out0_data,
  input  logic        out0_ready,
  output logic        out1_valid,
  output flit_t       out1_data,
  input  logic        out1_ready,
  output logic [AW-1:0] mem_raddr,
  input  logic [31:0]   mem_rdata,
  output logic          mem_we,
  output logic [AW-1:0] mem_waddr,
  output logic [31:0]   mem_wdata,
  output mc_events_t    events
);

  localparam int unsigned MASK_FLITS = (N + FLIT_W - 1) / FLIT_W;
  localparam int unsigned MYL        = ham_label(int'(MY_ADDR[7:4]), int'(MY_ADDR[3:0]), W);
  localparam int unsigned BW         = $clog2(BLOCKS);

  // ------------------------------------------------------------- directory
  dir_state_e  dstate [BLOCKS];
  logic [N-1:0] dshare [BLOCKS];
  logic [7:0]  downer [BLOCKS];

  function automatic logic [N-1:0] onehot_of(input logic [7:0] a);
    logic [N-1:0] v;
    v = '0;
    v[label_of_addr(a, W)] = 1'b1;
    return v;
  endfunction

  // ================================================================ FSM 1
  typedef enum logic [2:0] {F1_IDLE, F1_HDR, F1_DECIDE, F1_INV_HI, F1_INV_LO, F1_REPLY} f1_e;
  f1_e          f1;
  flit_t        h1 [HDR_FLITS];
  logic [2:0]   h1_idx;
  logic [BW-1:0] b1;
  // pending output job
  logic [N-1:0] inv_mask;
  logic         rep_data;      // reply carries the block
  logic [7:0]   rep_tgt;
  service_e     rep_svc;
  logic [7:0]   rep_src;
  logic [8:0]   k;             // flit index inside the packet being sent
  logic [6:0]   widx;          // word index of the payload
  logic         blocked_seen;  // t_blocked already reported for this request

  assign b1 = BW'(h1[4] % BLOCKS);

  // Directory lookup and decision for the request held in h1.
  logic [7:0]   req_src;
  logic [N-1:0] req_bit;
  logic [N-1:0] d_others;
  logic         ts_fwd;
  logic [4:0]   ts_d_owner, ts_d_l2;

  assign req_src  = h1[3][7:0];
  assign req_bit  = onehot_of(req_src);
  assign d_others = dshare[b1] & ~req_bit;

  tstate_select u_tsel (
    .reader_addr(req_src), .owner_addr(downer[b1]), .l2_addr(MY_ADDR),
    .d_owner(ts_d_owner), .d_l2(ts_d_l2), .use_forward(ts_fwd)
  );

  logic forward_t;
  always_comb
    case (T_POLICY)
      0:       forward_t = 1'b0;
      1:       forward_t = 1'b1;
      default: forward_t = ts_fwd;
    endcase

  // FSM 2 directory write (has priority over FSM 1)
  logic          f2_dir_we;
  logic [BW-1:0] f2_blk;
  dir_state_e    f2_state;
  logic [N-1:0]  f2_share;

  // FSM 1 decision
  logic         dec_go;       // request can be served now
  logic         dec_wait;     // request must wait for a write-back
  logic         dec_drop;     // not a port-0 service
  dir_state_e   nx_state;
  logic [N-1:0] nx_share;
  logic [7:0]   nx_owner;
  logic [N-1:0] nx_inv;
  logic         nx_data;
  logic [7:0]   nx_tgt, nx_src;
  service_e     nx_svc;

  always_comb begin
    dec_go   = 1'b0;
    dec_wait = 1'b0;
    dec_drop = 1'b0;
    nx_state = dstate[b1];
    nx_share = dshare[b1];
    nx_owner = downer[b1];
    nx_inv   = '0;
    nx_data  = 1'b0;
    nx_tgt   = req_src;
    nx_src   = MY_ADDR;
    nx_svc   = SVC_READ_BLOCK;
    if (h1[2] == SVC_READ_REQUEST) begin
      unique case (dstate[b1])
        DIR_I, DIR_S: begin
          dec_go   = 1'b1;
          nx_state = DIR_S;
          nx_share = dshare[b1] | req_bit;
          nx_data  = 1'b1;
        end
        DIR_M: begin                       // optimisation 2
          dec_go   = 1'b1;
          nx_state = DIR_T;
          nx_share = req_bit | onehot_of(downer[b1]);
          nx_tgt   = downer[b1];
          nx_src   = req_src;
          nx_svc   = SVC_WB_REQUEST;
        end
        DIR_T: begin                       // optimisation 4
          if (forward_t) begin
            dec_go   = 1'b1;
            nx_share = dshare[b1] | req_bit;
            nx_tgt   = downer[b1];
            nx_src   = req_src;
            nx_svc   = SVC_READ_FORWARD;
          end else begin
            dec_wait = 1'b1;
          end
        end
      endcase
    end else if (h1[2] == SVC_ASK_EXCLUSIVITY) begin
      unique case (dstate[b1])
        DIR_I, DIR_S: begin                // optimisation 1
          dec_go   = 1'b1;
          nx_state = DIR_M;
          nx_share = req_bit;
          nx_owner = req_src;
          nx_inv   = d_others;
          nx_svc   = SVC_GRANT_EXCLUSIVITY;
          nx_data  = (dshare[b1] & req_bit) == '0;
        end
        DIR_M: begin                       // optimisation 3
          dec_go   = 1'b1;
          nx_share = req_bit;
          nx_owner = req_src;
          if (downer[b1] == req_src) begin
            nx_svc = SVC_GRANT_EXCLUSIVITY;
          end else begin
            nx_tgt = downer[b1];
            nx_src = req_src;
            nx_svc = SVC_WB_EXCL_REQUEST;
          end
        end
        DIR_T: dec_wait = 1'b1;
      endcase
    end else begin
      dec_drop = 1'b1;
    end
  end

  // Outgoing packet generation (shared by the three send states).
  logic [N-1:0] hi_mask, lo_mask;
  always_comb begin
    hi_mask = '0;
    lo_mask = '0;
    for (int l = 0; l < int'(N); l++) begin
      if (l > int'(MYL)) hi_mask[l] = inv_mask[l];
      if (l < int'(MYL)) lo_mask[l] = inv_mask[l];
    end
  end

  logic        snd_mc;      // sending a multicast packet
  logic [N-1:0] snd_mask;
  logic [8:0]  pre;         // flits before the size flit
  logic [8:0]  last_k;
  flit_t       snd_flit;
  logic        snd_valid, snd_ready, snd_ch1;

  always_comb begin
    snd_mc   = (f1 == F1_INV_HI) || (f1 == F1_INV_LO);
    snd_mask = (f1 == F1_INV_HI) ? hi_mask : lo_mask;
    snd_ch1  = (f1 == F1_REPLY) && rep_data;
    pre      = snd_mc ? 9'(1 + MASK_FLITS) : 9'd1;
    last_k   = pre + 9'(CTRL_SIZE) + (snd_ch1 ? 9'(BLOCK_FLITS) : 9'd0);
    snd_valid = snd_mc || (f1 == F1_REPLY);
    snd_flit  = '0;
    if (k == 0) begin
      if (snd_mc) snd_flit = {1'b1, 1'b1, (f1 == F1_INV_HI), 13'd0};
      else        snd_flit = unicast_hdr(rep_tgt, !snd_ch1);
    end else if (snd_mc && k <= 9'(MASK_FLITS)) begin
      for (int b = 0; b < FLIT_W; b++)
        if ((int'(k) - 1) * FLIT_W + b < int'(N))
          snd_flit[b] = snd_mask[(int'(k) - 1) * FLIT_W + b];
    end else begin
      unique case (int'(k) - int'(pre))
        0: snd_flit = snd_ch1 ? flit_t'(DATA_SIZE) : flit_t'(CTRL_SIZE);
        1: snd_flit = snd_mc ? SVC_INVALIDATE_BLOCK : rep_svc;
        2: snd_flit = snd_mc ? flit_t'(MY_ADDR) : flit_t'(rep_src);
        3: snd_flit = h1[4];
        4: snd_flit = h1[5];
        default: snd_flit = (k[0] == pre[0]) ? mem_rdata[15:0] : mem_rdata[31:16];
      endcase
    end
  end

  assign snd_ready  = snd_ch1 ? out1_ready : out0_ready;
  assign out0_valid = snd_valid && !snd_ch1;
  assign out1_valid = snd_valid && snd_ch1;
  assign out0_data  = snd_flit;
  assign out1_data  = snd_flit;

  logic snd_adv, snd_last;
  assign snd_adv  = snd_valid && snd_ready;
  assign snd_last = (k == last_k);

  // Payload word index: advances after the low half of each word is sent.
  logic [6:0] widx_nx;
  always_comb begin
    widx_nx = widx;
    if (f1 != F1_REPLY) widx_nx = '0;
    else if (snd_adv && k > pre + 9'(CTRL_SIZE) && k[0] == pre[0]) widx_nx = widx + 7'd1;
  end
  assign mem_raddr = AW'({b1, widx_nx});

  // Next send state after the invalidation phase.
  function automatic f1_e after_inv(input f1_e cur, input logic [N-1:0] lo);
    if (cur == F1_INV_HI && lo != '0) return F1_INV_LO;
    return F1_REPLY;
  endfunction

  assign in0_ready = (f1 == F1_IDLE && intr[0]) || f1 == F1_HDR;

  // ================================================================ FSM 2
  typedef enum logic [1:0] {F2_IDLE, F2_HDR, F2_DATA, F2_DIR} f2_e;
  f2_e         f2;
  flit_t       h2 [HDR_FLITS];
  logic [2:0]  h2_idx;
  logic [8:0]  p2;            // payload flit index
  logic [15:0] hi_half;
  logic        wr_ok;         // sender owns the block: keep its data
  logic [BW-1:0] b2;
  logic [N-1:0] src2_bit;

  assign b2       = BW'(h2[4] % BLOCKS);
  assign src2_bit = onehot_of(h2[3][7:0]);
  assign in1_ready = (f2 == F2_IDLE && intr[1]) || f2 == F2_HDR || f2 == F2_DATA;

  always_comb begin
    f2_dir_we = (f2 == F2_DIR);
    f2_blk    = b2;
    f2_state  = dstate[b2];
    f2_share  = dshare[b2];
    if (wr_ok) begin
      if (dstate[b2] == DIR_T) begin
        f2_state = DIR_S;
        if (h2[2] == SVC_FLUSH_BLOCK) f2_share = dshare[b2] & ~src2_bit;
      end else if (dstate[b2] == DIR_M) begin
        f2_state = DIR_I;
        f2_share = '0;
      end
    end
  end

  assign mem_we    = (f2 == F2_DATA) && in1_valid && p2[0] && wr_ok;
  assign mem_waddr = AW'({b2, p2[7:1]});
  assign mem_wdata = {hi_half, in1_data};

  // ============================================================ registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f1 <= F1_IDLE; h1_idx <= '0; k <= '0; widx <= '0;
      inv_mask <= '0; rep_data <= 1'b0; rep_tgt <= '0; rep_svc <= SVC_READ_BLOCK; rep_src <= '0;
      blocked_seen <= 1'b0;
      f2 <= F2_IDLE; h2_idx <= '0; p2 <= '0; hi_half <= '0; wr_ok <= 1'b0;
      for (int i = 0; i < HDR_FLITS; i++) begin h1[i] <= '0; h2[i] <= '0; end
      for (int b = 0; b < int'(BLOCKS); b++) begin
        dstate[b] <= DIR_I; dshare[b] <= '0; downer[b] <= '0;
      end
      events <= '0;
    end else begin
      events <= '0;
      widx   <= widx_nx;

      // ---------------- FSM 1
      unique case (f1)
        F1_IDLE: if (in0_valid && intr[0]) begin
          h1[0] <= in0_data; h1_idx <= 3'd1; f1 <= F1_HDR;
        end
        F1_HDR: if (in0_valid) begin
          h1[h1_idx] <= in0_data;
          h1_idx <= h1_idx + 3'd1;
          if (h1_idx == 3'(HDR_FLITS - 1)) begin
            f1 <= F1_DECIDE;
            blocked_seen <= 1'b0;
          end
        end
        F1_DECIDE: begin
          if (dec_drop) begin
            f1 <= F1_IDLE;
          end else if (dec_wait) begin
            if (!blocked_seen && h1[2] == SVC_READ_REQUEST) events.t_blocked <= 1'b1;
            blocked_seen <= 1'b1;
          end else if (dec_go && !(f2_dir_we && f2_blk == b1)) begin
            dstate[b1] <= nx_state;
            dshare[b1] <= nx_share;
            downer[b1] <= nx_owner;
            inv_mask   <= nx_inv;
            rep_data   <= nx_data;
            rep_tgt    <= nx_tgt;
            rep_svc    <= nx_svc;
            rep_src    <= nx_src;
            k          <= '0;
            events.wb_request <= (nx_svc == SVC_WB_REQUEST);
            events.wb_excl    <= (nx_svc == SVC_WB_EXCL_REQUEST);
            events.t_forward  <= (nx_svc == SVC_READ_FORWARD);
            if ((nx_inv & ~lo_mask_of(nx_inv)) != '0) f1 <= F1_INV_HI;
            else if (nx_inv != '0)                    f1 <= F1_INV_LO;
            else                                      f1 <= F1_REPLY;
          end
        end
        F1_INV_HI, F1_INV_LO: if (snd_adv) begin
          k <= k + 9'd1;
          if (snd_last) begin
            k <= '0;
            events.inv_multicast <= 1'b1;
            f1 <= after_inv(f1, lo_mask);
          end
        end
        F1_REPLY: if (snd_adv) begin
          k <= k + 9'd1;
          if (snd_last) begin
            k  <= '0;
            f1 <= F1_IDLE;
          end
        end
        default: f1 <= F1_IDLE;
      endcase

      // ---------------- FSM 2
      unique case (f2)
        F2_IDLE: if (in1_valid && intr[1]) begin
          h2[0] <= in1_data; h2_idx <= 3'd1; f2 <= F2_HDR;
        end
        F2_HDR: if (in1_valid) begin
          h2[h2_idx] <= in1_data;
          h2_idx <= h2_idx + 3'd1;
          if (h2_idx == 3'(HDR_FLITS - 1)) begin
            p2 <= '0;
            // h2[2..4] are complete once this flit (TaskId) is taken.
            wr_ok <= (h2[2] == SVC_WRITE_BACK || h2[2] == SVC_FLUSH_BLOCK) &&
                     (dstate[b2] == DIR_M || dstate[b2] == DIR_T) &&
                     downer[b2] == h2[3][7:0];
            f2 <= (h2[1] > flit_t'(CTRL_SIZE)) ? F2_DATA : F2_DIR;
          end
        end
        F2_DATA: if (in1_valid) begin
          p2 <= p2 + 9'd1;
          if (!p2[0]) hi_half <= in1_data;
          if (p2 == 9'(BLOCK_FLITS - 1)) f2 <= F2_DIR;
        end
        F2_DIR: begin
          dstate[b2] <= f2_state;
          dshare[b2] <= f2_share;
          events.wb_received <= wr_ok;
          f2 <= F2_IDLE;
        end
      endcase
    end
  end

  function automatic logic [N-1:0] lo_mask_of(input logic [N-1:0] m);
    logic [N-1:0] r;
    r = '0;
    for (int l = 0; l < int'(MYL); l++) r[l] = m[l];
    return r;
  endfunction

  // Handshake rules: a stream, once valid, keeps its flit until taken.
  a_out0: assert property (@(posedge clk) disable iff (!rst_n)
    out0_valid && !out0_ready |=> out0_valid && $stable(out0_data));
  a_out1: assert property (@(posedge clk) disable iff (!rst_n)
    out1_valid && !out1_ready |=> out1_valid && $stable(out1_data));
  a_ctrl_only_port0: assert property (@(posedge clk) disable iff (!rst_n)
    (f1 == F1_HDR && h1_idx == 3'd1 && in0_valid) |-> in0_data == flit_t'(CTRL_SIZE))
    else $error("data packet on the control port");

endmodule

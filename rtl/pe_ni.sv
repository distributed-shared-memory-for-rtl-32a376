// pe_ni: network interface of a processing element (PE).
//
// The processor side works in 32-bit words, the network in 16-bit flits, so
// the NI splits each outgoing word into two flits (upper half first) and
// joins incoming flit pairs back into words. A message to or from an L2
// bank is then three header words {target, size}, {service, source},
// {block, task id} and, for data messages, 128 payload words.
//
// Send machine (tx_*): the first word of a packet carries the header flit.
// High-priority packets (header bit 14: coherence control) go out on
// channel 0, the others (long packets with a block) on channel 1. The packet
// length is taken from the size flit, so the unused half of a last word is
// dropped. A multicast header (bit 15) is followed by the destination mask
// flits before the size flit; the software places them in the word stream
// in flit order.
//
// Receive machine (rx_*): takes one packet at a time from whichever channel
// has one (offering ready to the two channels in turn while idle), drops the mask flits of a multicast packet,
// assembles words and keeps up to RX_WORDS of them in a buffer that the
// processor reads; intr is high while the buffer holds words.
//
// The word/flit split, the 16-word receive buffer and the two machines
// follow the document; the channel choice by priority bit and the exact
// state encoding are this design's own.
module pe_ni
  import dsm_pkg::*;
#(
  parameter int unsigned N_NODES  = 16,
  parameter int unsigned RX_WORDS = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor / DMA side
  input  logic        tx_valid,
  input  logic [31:0] tx_word,
  output logic        tx_ready,
  output logic        rx_valid,
  output logic [31:0] rx_word,
  input  logic        rx_ready,
  output logic        intr,
  // network side, two physical channels
  output logic [1:0]  net_out_valid,
  output flit_t       net_out_data [2],
  input  logic [1:0]  net_out_ready,
  input  logic [1:0]  net_in_valid,
  input  flit_t       net_in_data [2],
  output logic [1:0]  net_in_ready
);

  localparam int unsigned MASK_FLITS = (N_NODES + FLIT_W - 1) / FLIT_W;
  localparam int unsigned RAW = $clog2(RX_WORDS);

  // ================================================================ send
  typedef enum logic [2:0] {S_IDLE, S_HI, S_LO, S_NEXT} send_e;
  send_e       s_st;
  logic [31:0] s_word;
  logic        s_ch;          // channel in use
  logic        s_mc;
  logic [15:0] s_idx;         // index of the flit being offered
  logic [15:0] s_size;
  flit_t       s_flit;
  logic        s_last, s_adv;
  logic [15:0] s_pre;

  assign s_pre  = s_mc ? 16'(MASK_FLITS + 1) : 16'd1;
  assign s_flit = (s_st == S_HI) ? s_word[31:16] : s_word[15:0];
  // the size flit itself can be the one on offer
  assign s_last = (s_idx > s_pre) ? (s_idx == s_pre + s_size)
                                  : (s_idx == s_pre && s_flit == '0);

  always_comb begin
    net_out_valid = '0;
    net_out_data  = '{default: '0};
    net_out_data[s_ch] = s_flit;
    net_out_valid[s_ch] = (s_st == S_HI) || (s_st == S_LO);
  end
  assign s_adv    = net_out_valid[s_ch] && net_out_ready[s_ch];
  assign tx_ready = (s_st == S_IDLE) || (s_st == S_NEXT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_st <= S_IDLE; s_word <= '0; s_ch <= 1'b0; s_mc <= 1'b0; s_idx <= '0; s_size <= '0;
    end else begin
      unique case (s_st)
        S_IDLE: if (tx_valid) begin
          s_word <= tx_word;
          s_ch   <= !tx_word[30];      // header bit 14 = priority
          s_mc   <= tx_word[31];       // header bit 15 = multicast
          s_idx  <= '0;
          s_st   <= S_HI;
        end
        S_HI, S_LO: if (s_adv) begin
          s_idx <= s_idx + 16'd1;
          if (s_idx == s_pre) s_size <= s_flit;
          if (s_last)             s_st <= S_IDLE;
          else if (s_st == S_HI)  s_st <= S_LO;
          else                    s_st <= S_NEXT;
        end
        S_NEXT: if (tx_valid) begin
          s_word <= tx_word;
          s_st   <= S_HI;
        end
        default: s_st <= S_IDLE;
      endcase
    end
  end

  // ============================================================= receive
  typedef enum logic [1:0] {R_IDLE, R_HI, R_LO, R_PUSH} recv_e;
  recv_e       r_st;
  logic        r_ch;
  logic        r_mc;
  logic [15:0] r_idx, r_rem;
  logic [15:0] r_hi;
  logic [31:0] r_word;
  logic        r_take, r_skip;
  flit_t       r_flit;
  logic [15:0] r_pre;

  logic [31:0]   rbuf [RX_WORDS];
  logic [RAW-1:0] rb_rd, rb_wr;
  logic [RAW:0]   rb_cnt;
  logic           rb_push, rb_pop;

  assign r_pre  = r_mc ? 16'(MASK_FLITS + 1) : 16'd1;
  assign r_flit = net_in_data[r_ch];
  assign r_skip = r_mc && r_idx >= 16'd1 && r_idx <= 16'(MASK_FLITS);

  always_comb begin
    net_in_ready = '0;
    if (r_st != R_PUSH) net_in_ready[r_ch] = 1'b1;
  end
  assign r_take = (r_st != R_PUSH) && net_in_valid[r_ch];

  assign rb_push  = (r_st == R_PUSH) && rb_cnt < (RAW+1)'(RX_WORDS);
  assign rb_pop   = rx_valid && rx_ready;
  assign rx_valid = rb_cnt != 0;
  assign rx_word  = rbuf[rb_rd];
  assign intr     = rb_cnt != 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_st <= R_IDLE; r_ch <= 1'b0; r_mc <= 1'b0; r_idx <= '0; r_rem <= '0; r_hi <= '0;
      r_word <= '0; rb_rd <= '0; rb_wr <= '0; rb_cnt <= '0;
    end else begin
      if (rb_push) begin
        rbuf[rb_wr] <= r_word;
        rb_wr <= RAW'((int'(rb_wr) + 1) % RX_WORDS);
      end
      if (rb_pop) rb_rd <= RAW'((int'(rb_rd) + 1) % RX_WORDS);
      rb_cnt <= rb_cnt + (RAW+1)'(rb_push) - (RAW+1)'(rb_pop);

      unique case (r_st)
        R_IDLE: begin
          // ready is offered on one channel at a time, alternating while
          // idle: the router only raises valid once the output is ready,
          // so waiting for valid first would deadlock.
          if (r_take) begin
            r_idx <= 16'd1;
            r_mc  <= r_flit[15];
            r_hi  <= r_flit;
            r_st  <= R_LO;
          end else begin
            r_ch  <= ~r_ch;
            r_idx <= '0;
            r_mc  <= 1'b0;
          end
        end
        R_HI, R_LO: if (r_take) begin
          r_idx <= r_idx + 16'd1;
          if (r_idx == 16'd0) r_mc <= r_flit[15];
          if (r_idx == r_pre) r_rem <= r_flit;
          else if (r_idx > r_pre) r_rem <= r_rem - 16'd1;
          if (!r_skip) begin
            if (r_st == R_HI) begin
              r_hi <= r_flit;
              r_st <= R_LO;
            end else begin
              r_word <= {r_hi, r_flit};
              r_st   <= R_PUSH;
            end
          end
        end
        R_PUSH: if (rb_push) begin
          // r_rem/r_idx already describe the next flit
          if (r_idx > r_pre && r_rem == 16'd0) r_st <= R_IDLE;
          else                                 r_st <= R_HI;
        end
        default: r_st <= R_IDLE;
      endcase
    end
  end

endmodule

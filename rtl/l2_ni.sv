// l2_ni: network interface of an L2 cache bank.
//
// The bank sits on two physical channels of the NoC. Port 0 receives short
// packets (read and exclusivity requests), port 1 long packets (write-backs
// and flushes carrying a 128-word block). Each receiving port has its own
// input buffer; a long packet is only partly buffered, the rest waits in the
// network. While a buffer holds flits the NI raises that port's interrupt
// line to the memory controller, which then reads the flits out.
//
// A multicast packet (header bit 15) carries a destination mask after its
// header; the NI drops those mask flits so that the memory controller sees
// every packet in the same layout: header, size, service, source, block,
// task id, payload. Output ports are not buffered: the controller's output
// streams go straight into the router's local ports.
//
// Timing: a flit accepted from the network can be read by the controller in
// the next cycle. The buffer depth is this design's choice.
module l2_ni
  import dsm_pkg::*;
#(
  parameter int unsigned N_NODES  = 16,  // routers in the mesh (sets the mask length)
  parameter int unsigned IN_DEPTH = 16   // flits per input buffer
) (
  input  logic        clk,
  input  logic        rst_n,
  // from the network (router local outputs), ports 0 and 1
  input  logic [1:0]  net_valid,
  input  flit_t       net_data [2],
  output logic [1:0]  net_ready,
  // to the memory controller
  output logic [1:0]  intr,
  output logic [1:0]  mc_valid,
  output flit_t       mc_data [2],
  input  logic [1:0]  mc_ready
);

  localparam int unsigned MASK_FLITS = (N_NODES + FLIT_W - 1) / FLIT_W;
  localparam int unsigned AW = $clog2(IN_DEPTH);

  for (genvar p = 0; p < 2; p++) begin : g_port
    flit_t          buf_q [IN_DEPTH];
    logic [AW-1:0]  rd, wr;
    logic [AW:0]    cnt;
    logic [15:0]    pos, rem;
    logic           mc;
    logic           in_pkt;
    logic           accept, store, pop;
    int unsigned    sp;

    assign sp        = mc ? MASK_FLITS + 1 : 1;
    assign net_ready[p] = cnt < (AW+1)'(IN_DEPTH);
    assign accept    = net_valid[p] && net_ready[p];
    // Mask flits of a multicast packet are accepted but not stored.
    assign store     = accept && !(in_pkt && mc && pos >= 16'd1 && pos <= 16'(MASK_FLITS));
    assign pop       = mc_valid[p] && mc_ready[p];
    assign mc_valid[p] = cnt != 0;
    assign mc_data[p]  = buf_q[rd];
    assign intr[p]     = cnt != 0;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rd <= '0; wr <= '0; cnt <= '0;
        pos <= '0; rem <= '0; mc <= 1'b0; in_pkt <= 1'b0;
      end else begin
        if (store) begin
          buf_q[wr] <= net_data[p];
          wr <= AW'((int'(wr) + 1) % IN_DEPTH);
        end
        if (pop) rd <= AW'((int'(rd) + 1) % IN_DEPTH);
        cnt <= cnt + (AW+1)'(store) - (AW+1)'(pop);
        // Packet framing: header, [mask], size, then "size" more flits.
        if (accept) begin
          if (!in_pkt) begin
            in_pkt <= 1'b1;
            mc     <= net_data[p][15];
            pos    <= 16'd1;
          end else begin
            pos <= pos + 16'd1;
            if (pos == 16'(sp)) begin
              rem <= net_data[p];
              if (net_data[p] == '0) in_pkt <= 1'b0;
            end else if (pos > 16'(sp)) begin
              rem <= rem - 16'd1;
              if (rem == 16'd1) in_pkt <= 1'b0;
            end
          end
        end
      end
    end
  end

endmodule

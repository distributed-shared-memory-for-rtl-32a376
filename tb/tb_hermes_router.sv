// tb_hermes_router: one router at (1,1) of a 4 x 4 mesh.
//  * unicast packets to every label, from every input port, under random
//    back-pressure: each must leave through the port chosen by a reference
//    Hamiltonian routing function written here, with its flits intact;
//  * multicast packets walking up and down the labels: a copy must leave the
//    local port and one the port toward the next destination;
//  * priority: while an output is busy, a low- and a high-priority packet
//    wait for it; the high-priority one must get it first;
//  * latency: a header entering an idle router leaves two cycles later.
module tb_hermes_router;
  import dsm_pkg::*;
  localparam int W = 4, H = 4, X = 1, Y = 1, N = W * H;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset at once
  logic  [NPORTS-1:0] in_valid, in_ready, out_valid, out_ready;
  flit_t [NPORTS-1:0] in_data, out_data;
  int checks = 0, failures = 0;

  hermes_router #(.W(W), .H(H), .X(X), .Y(Y), .BUF_DEPTH(4)) dut (.*);
  always #5 clk = ~clk;

  function automatic int lab(input int x, input int y);
    return (y % 2 == 0) ? y * W + x : y * W + (W - 1 - x);
  endfunction

  // Reference: port toward label d from (X,Y).
  function automatic int ref_port(input int d);
    int me, best, bp;
    int nl[4]; bit ok[4];
    me = lab(X, Y);
    nl[0] = lab(X + 1, Y); ok[0] = X + 1 < W;   // east
    nl[1] = lab(X - 1, Y); ok[1] = X > 0;       // west
    nl[2] = lab(X, Y + 1); ok[2] = Y + 1 < H;   // north
    nl[3] = lab(X, Y - 1); ok[3] = Y > 0;       // south
    if (d == me) return 4;
    bp = -1;
    if (d > me) begin
      best = -1;
      for (int p = 0; p < 4; p++) if (ok[p] && nl[p] > me && nl[p] <= d && nl[p] > best) begin best = nl[p]; bp = p; end
    end else begin
      best = 1000;
      for (int p = 0; p < 4; p++) if (ok[p] && nl[p] < me && nl[p] >= d && nl[p] < best) begin best = nl[p]; bp = p; end
    end
    return bp;
  endfunction

  function automatic logic [7:0] addr_of(input int l);
    int y, x;
    y = l / W;
    x = (y % 2 == 0) ? l % W : W - 1 - l % W;
    return 8'((x << 4) | y);
  endfunction

  // ---------------------------------------------------- drivers/monitors
  flit_t txq [NPORTS][$];
  bit    bp_en = 1;
  flit_t exp_pkt [NPORTS][int][$];   // per output port, by packet id
  int    got_order [NPORTS][$];      // ids in arrival order
  flit_t rxbuf [NPORTS][$];
  int    pkt_id = 1;

  int rdp [NPORTS];   // next flit to offer per input; advanced with nonblocking writes
  initial foreach (rdp[p]) rdp[p] = 0;
  always_comb
    for (int p = 0; p < NPORTS; p++) begin
      in_valid[p] = rdp[p] < txq[p].size();
      in_data[p]  = in_valid[p] ? txq[p][rdp[p]] : '0;
    end

  always @(posedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (in_valid[p] && in_ready[p]) rdp[p] <= rdp[p] + 1;
      if (out_valid[p] && out_ready[p]) begin
        rxbuf[p].push_back(out_data[p]);
        begin
          int sp, sz;
          sp = rxbuf[p][0][15] ? 2 : 1;
          if (rxbuf[p].size() > sp) begin
            sz = rxbuf[p][sp];
            if (rxbuf[p].size() == sp + 1 + sz) begin
              int id;
              id = rxbuf[p][sp + 1];
              checks++;
              if (!exp_pkt[p].exists(id) || exp_pkt[p][id] != rxbuf[p]) begin
                failures++;
                $display("FAIL: unexpected/corrupt packet %0d at port %0d", id, p);
              end else exp_pkt[p].delete(id);
              got_order[p].push_back(id);
              rxbuf[p].delete();
            end
          end
        end
      end
    end
  end

  always @(negedge clk)
    for (int p = 0; p < NPORTS; p++) out_ready[p] <= bp_en ? ($urandom_range(3) != 0) : 1'b1;

  // Packet: header, [mask], size, id, body...
  task automatic send(input int inp, input flit_t hdr, input logic [N-1:0] mask,
                      input int body, input int outs[$]);
    flit_t f[$];
    f.push_back(hdr);
    if (hdr[15]) f.push_back(flit_t'(mask));
    f.push_back(flit_t'(body + 1));
    f.push_back(flit_t'(pkt_id));
    for (int i = 0; i < body; i++) f.push_back(flit_t'((pkt_id << 8) | i));
    foreach (outs[k]) exp_pkt[outs[k]][pkt_id] = f;
    foreach (f[i]) txq[inp].push_back(f[i]);
    pkt_id++;
  endtask

  task automatic drain();
    int guard;
    guard = 0;
    while (guard < 5000) begin
      int busy;
      busy = 0;
      for (int p = 0; p < NPORTS; p++) busy += txq[p].size() - rdp[p] + exp_pkt[p].num();
      if (busy == 0) break;
      @(posedge clk);
      guard++;
    end
    checks++;
    if (guard >= 5000) begin failures++; $display("FAIL: packets not delivered"); end
  endtask

  initial begin
    in_valid = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- latency on an idle router, no back-pressure
    bp_en = 0;
    @(negedge clk);
    begin
      int t0, t1;
      int q[$];
      q = '{ref_port(12)};
      send(P_LOCAL, unicast_hdr(addr_of(12), 0), '0, 2, q);
      t0 = $time;
      wait (out_valid[ref_port(12)]);
      t1 = $time;
      checks++;
      if ((t1 - t0) / 10 != 1) begin failures++; $display("FAIL: latency %0d cycles", (t1 - t0) / 10); end
    end
    drain();
    bp_en = 1;
    // ---- unicast to every label from every input
    for (int inp = 0; inp < NPORTS; inp++)
      for (int d = 0; d < N; d++) begin
        int q[$];
        q = '{ref_port(d)};
        send(inp, unicast_hdr(addr_of(d), 1'($urandom_range(1))), '0, $urandom_range(6), q);
      end
    drain();
    // ---- multicast up: destinations 6 (self), 8, 12 -> local + toward 8
    begin
      int q[$];
      q = '{P_LOCAL, ref_port(8)};
      send(P_SOUTH, {1'b1, 1'b1, 1'b1, 13'd0}, 16'h1140, 5, q);
      q = '{P_LOCAL, ref_port(2)};
      send(P_EAST, {1'b1, 1'b1, 1'b0, 13'd0}, 16'h0044, 5, q);  // down: 6, 2
      q = '{ref_port(14)};
      send(P_WEST, {1'b1, 1'b0, 1'b1, 13'd0}, 16'h4000, 3, q);  // up, only 14
    end
    drain();
    // ---- priority: occupy north with a long packet, then contend
    bp_en = 0;
    begin
      int q[$];
      q = '{P_NORTH};
      send(P_SOUTH, unicast_hdr(addr_of(12), 0), '0, 30, q);
      repeat (4) @(posedge clk);
      got_order[P_NORTH].delete();
      send(P_EAST, unicast_hdr(addr_of(13), 0), '0, 2, q);     // low, port 0 wins round-robin ties
      send(P_WEST, unicast_hdr(addr_of(14), 1), '0, 2, q);     // high
    end
    drain();
    checks++;
    if (got_order[P_NORTH].size() != 3 || got_order[P_NORTH][1] != pkt_id - 1) begin
      failures++;
      $display("FAIL: high-priority packet was not served first (%p)", got_order[P_NORTH]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_hermes_noc: 4 x 4 mesh, both channels. Every node sends unicast
// packets of random length to random nodes on random channels, under random
// back-pressure at the receivers, and some nodes send multicast packets up
// and down the Hamiltonian labels. Every packet must arrive intact at each
// of its destinations, on the channel it was sent on, and nowhere else.
// The hop latency of an idle mesh is checked too: a header crossing h
// routers reaches the destination 2h cycles after injection.
module tb_hermes_noc;
  import dsm_pkg::*;
  localparam int W = 4, H = 4, N = W * H, C = 2;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset at once
  logic  [N-1:0] liv [C], lir [C], lov [C], lor [C];
  flit_t [N-1:0] lid [C], lod [C];
  int checks = 0, failures = 0;

  hermes_noc #(.W(W), .H(H), .CHANNELS(C), .BUF_DEPTH(4)) dut (
    .clk, .rst_n, .loc_in_valid(liv), .loc_in_data(lid), .loc_in_ready(lir),
    .loc_out_valid(lov), .loc_out_data(lod), .loc_out_ready(lor));
  always #5 clk = ~clk;

  function automatic int lab(input int n);
    int x, y;
    x = n % W; y = n / W;
    return (y % 2 == 0) ? y * W + x : y * W + (W - 1 - x);
  endfunction
  function automatic int node_of_label(input int l);
    int y, x;
    y = l / W;
    x = (y % 2 == 0) ? l % W : W - 1 - l % W;
    return y * W + x;
  endfunction

  flit_t txq [C][N][$];
  flit_t exp_pkt [C][N][int][$];
  flit_t rxbuf [C][N][$];
  bit    bp_en = 1;
  int    pkt_id = 1;
  int    arrivals = 0;
  int    t_arrive;

  int rdp [C][N];   // next flit to offer per source; advanced with nonblocking writes
  initial foreach (rdp[c, n]) rdp[c][n] = 0;
  always_comb
    for (int c = 0; c < C; c++)
      for (int n = 0; n < N; n++) begin
        liv[c][n] = rdp[c][n] < txq[c][n].size();
        lid[c][n] = liv[c][n] ? txq[c][n][rdp[c][n]] : '0;
      end

  always @(negedge clk)
    for (int c = 0; c < C; c++)
      for (int n = 0; n < N; n++) lor[c][n] <= bp_en ? ($urandom_range(3) != 0) : 1'b1;

  always @(posedge clk)
    for (int c = 0; c < C; c++)
      for (int n = 0; n < N; n++) begin
        if (liv[c][n] && lir[c][n]) rdp[c][n] <= rdp[c][n] + 1;
        if (lov[c][n] && lor[c][n]) begin
          int sp, sz;
          if (rxbuf[c][n].size() == 0) t_arrive = $time;
          rxbuf[c][n].push_back(lod[c][n]);
          sp = rxbuf[c][n][0][15] ? 2 : 1;
          if (rxbuf[c][n].size() > sp) begin
            sz = rxbuf[c][n][sp];
            if (rxbuf[c][n].size() == sp + 1 + sz) begin
              int id;
              id = rxbuf[c][n][sp + 1];
              checks++;
              arrivals++;
              if (!exp_pkt[c][n].exists(id) || exp_pkt[c][n][id] != rxbuf[c][n]) begin
                failures++;
                $display("FAIL: unexpected/corrupt packet %0d at node %0d ch %0d", id, n, c);
              end else exp_pkt[c][n].delete(id);
              rxbuf[c][n].delete();
            end
          end
        end
      end

  task automatic send(input int c, input int src, input flit_t hdr, input logic [N-1:0] mask,
                      input int body, input int dests[$]);
    flit_t f[$];
    f.push_back(hdr);
    if (hdr[15]) f.push_back(flit_t'(mask));
    f.push_back(flit_t'(body + 1));
    f.push_back(flit_t'(pkt_id));
    for (int i = 0; i < body; i++) f.push_back(flit_t'($urandom));
    foreach (dests[k]) exp_pkt[c][dests[k]][pkt_id] = f;
    foreach (f[i]) txq[c][src].push_back(f[i]);
    pkt_id++;
  endtask

  task automatic drain(input int limit);
    int guard, busy;
    for (guard = 0; guard < limit; guard++) begin
      busy = 0;
      for (int c = 0; c < C; c++)
        for (int n = 0; n < N; n++) busy += txq[c][n].size() - rdp[c][n] + exp_pkt[c][n].num();
      if (busy == 0) break;
      @(posedge clk);
    end
    checks++;
    if (guard >= limit) begin
      failures++;
      $display("FAIL: %0d flits/packets undelivered", busy);
      for (int c = 0; c < C; c++)
        for (int n = 0; n < N; n++)
          if (txq[c][n].size() - rdp[c][n] + exp_pkt[c][n].num() != 0)
            $display("  ch %0d node %0d: %0d flits to send, %0d packets awaited", c, n,
                     txq[c][n].size() - rdp[c][n], exp_pkt[c][n].num());
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- latency: node 0 -> node 15 (label 15): Hamiltonian path 0->1->2->3->4->...
    bp_en = 0;
    @(negedge clk);
    begin
      int q[$], t0, hops;
      q = '{node_of_label(15)};
      send(0, 0, unicast_hdr(8'h03, 1), '0, 1, q);
      t0 = $time;
      drain(1000);
      // path by labels: 0,1,2,3,4(3,1),5,... with shortcuts: count via reference walk
      hops = 0;
      begin
        int cur;
        cur = 0;
        while (cur != 15) begin
          int best, cx, cy;
          cx = node_of_label(cur) % W; cy = node_of_label(cur) / W;
          best = cur;
          if (cx + 1 < W && lab(cy * W + cx + 1) > best && lab(cy * W + cx + 1) <= 15) best = lab(cy * W + cx + 1);
          if (cx > 0     && lab(cy * W + cx - 1) > best && lab(cy * W + cx - 1) <= 15) best = lab(cy * W + cx - 1);
          if (cy + 1 < H && lab((cy + 1) * W + cx) > best && lab((cy + 1) * W + cx) <= 15) best = lab((cy + 1) * W + cx);
          if (cy > 0     && lab((cy - 1) * W + cx) > best && lab((cy - 1) * W + cx) <= 15) best = lab((cy - 1) * W + cx);
          cur = best;
          hops++;
        end
      end
      checks++;
      // hops+1 routers, two cycles each
      if ((t_arrive - t0) / 10 != 2 * (hops + 1)) begin
        failures++;
        $display("FAIL: latency %0d cycles for %0d hops", (t_arrive - t0) / 10, hops);
      end
    end
    bp_en = 1;
    // ---- random unicast traffic
    for (int r = 0; r < 6; r++)
      for (int s = 0; s < N; s++) begin
        int d, q[$];
        d = $urandom_range(N - 1);
        q = '{d};
        send($urandom_range(1), s, unicast_hdr(8'(((d % W) << 4) | (d / W)), 1'($urandom_range(1))),
             '0, $urandom_range(20), q);
      end
    drain(20000);
    // ---- multicast: from each node, one packet up and one down
    for (int s = 0; s < N; s++) begin
      logic [N-1:0] up, dn;
      int qu[$], qd[$];
      up = '0; dn = '0; qu.delete(); qd.delete();
      for (int l = 0; l < N; l++)
        if ($urandom_range(2) == 0) begin
          if (l > lab(s)) begin up[l] = 1; qu.push_back(node_of_label(l)); end
          if (l < lab(s)) begin dn[l] = 1; qd.push_back(node_of_label(l)); end
        end
      if (up != '0) send(0, s, {1'b1, 1'b1, 1'b1, 13'd0}, up, $urandom_range(8), qu);
      if (dn != '0) send(1, s, {1'b1, 1'b0, 1'b0, 13'd0}, dn, $urandom_range(8), qd);
    end
    drain(20000);
    checks++;
    if (arrivals < 100) begin failures++; $display("FAIL: only %0d packets arrived", arrivals); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dsm_mpsoc: end-to-end test of the whole MPSoC at its default
// configuration (4 x 4 mesh, four L2 banks at the corners).
//
// The processor cores and their kernel software are not part of the RTL;
// this testbench plays them. Each PE node runs a small kernel model that
// reads packets from its NI, fills its L1 cache through the kernel port,
// answers the bank's write-back, hand-over and forwarded-read requests from
// the data in its L1, and invalidates its L1 line on INVALIDATE_BLOCK. The
// main sequence then runs the example application of the design (read a
// word, write it back incremented) over several PEs so that every protocol
// mechanism happens on one block of bank 3:
//   shared reads, invalidation multicasts in both label directions, a grant
//   with data, a read of a modified block (owner's write-back multicast to
//   the bank and the reader), a forwarded read in the T state, a read held
//   in the T state, a grant without data, a direct owner-to-writer
//   hand-over and a flush.
// Blocks of banks 0 and 1 are read at the same time to check the address
// contents of other banks. Every data value is compared with a value worked
// out here, and each mechanism is counted; one that never happens is a
// failure.
// Interface and timing: no ports; a free-running clock, reset held for three
// cycles, a watchdog that ends the run with a failure if the sequence
// stalls, and a final TB_RESULT line with the check and failure counts.
// The kernel model's packet formats follow the design's own packet layout
// (dsm_pkg); its PE-side protocol steps follow the document's description
// of the microkernel, with the timing of its answers chosen here.
module tb_dsm_mpsoc;
  import dsm_pkg::*;
  localparam int W = 4, H = 4, N = 16;
  localparam logic [7:0] BANK [4] = '{8'h00, 8'h03, 8'h30, 8'h33};
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset at once

  logic  [N-1:0] pe_tx_valid, pe_tx_ready, pe_rx_valid, pe_rx_ready, pe_intr;
  logic  [31:0]  pe_tx_word [N], pe_rx_word [N];
  logic  [N-1:0] l1_cpu_en, l1_cpu_we, l1_cpu_hit, l1_cpu_miss, l1_victim_valid, l1_victim_modified;
  logic  [15:0]  l1_cpu_block [N], l1_victim_block [N], l1_k_block [N];
  logic  [6:0]   l1_cpu_word [N], l1_k_word [N];
  logic  [31:0]  l1_cpu_wdata [N], l1_cpu_rdata [N], l1_k_wdata [N], l1_k_rdata [N];
  logic  [N-1:0] l1_k_init, l1_k_inval, l1_k_tag_set, l1_k_clean, l1_k_we;
  mc_events_t [3:0] bank_events;

  dsm_mpsoc dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------ per-node drive arrays
  logic        cen [N], cwe [N], kinit [N], kinv [N], ktag [N], kclean [N], kwe [N];
  logic [15:0] cblk [N], kblk [N];
  logic [6:0]  cword [N], kword [N];
  logic [31:0] cwdata [N], kwdata [N];
  initial
    for (int n = 0; n < N; n++) begin
      cen[n] = 0; cwe[n] = 0; kinit[n] = 0; kinv[n] = 0; ktag[n] = 0; kclean[n] = 0; kwe[n] = 0;
      cblk[n] = 0; kblk[n] = 0; cword[n] = 0; kword[n] = 0; cwdata[n] = 0; kwdata[n] = 0;
    end
  always_comb
    for (int n = 0; n < N; n++) begin
      l1_cpu_en[n] = cen[n]; l1_cpu_we[n] = cwe[n]; l1_cpu_block[n] = cblk[n];
      l1_cpu_word[n] = cword[n]; l1_cpu_wdata[n] = cwdata[n];
      l1_k_init[n] = kinit[n]; l1_k_inval[n] = kinv[n]; l1_k_tag_set[n] = ktag[n];
      l1_k_clean[n] = kclean[n]; l1_k_we[n] = kwe[n]; l1_k_block[n] = kblk[n];
      l1_k_word[n] = kword[n]; l1_k_wdata[n] = kwdata[n];
    end

  // ------------------------------------------------------ NI word streams
  logic [31:0] txq [N][$];
  int          txr [N];
  logic [31:0] rxq [N][$];
  initial foreach (txr[n]) txr[n] = 0;
  always_comb
    for (int n = 0; n < N; n++) begin
      pe_tx_valid[n] = txr[n] < txq[n].size();
      pe_tx_word[n]  = pe_tx_valid[n] ? txq[n][txr[n]] : '0;
    end
  assign pe_rx_ready = '1;
  always @(posedge clk)
    for (int n = 0; n < N; n++) begin
      if (pe_tx_valid[n] && pe_tx_ready[n]) txr[n] <= txr[n] + 1;
      if (pe_rx_valid[n]) rxq[n].push_back(pe_rx_word[n]);
    end

  // ----------------------------------------------------------- helpers
  function automatic logic [7:0] addr(input int n);
    return 8'(((n % W) << 4) | (n / W));
  endfunction
  function automatic int node(input logic [7:0] a);
    return int'(a[3:0]) * W + int'(a[7:4]);
  endfunction
  function automatic int lab(input logic [7:0] a);
    int x, y;
    x = a[7:4]; y = a[3:0];
    return (y % 2 == 0) ? y * W + x : y * W + (W - 1 - x);
  endfunction
  function automatic logic [31:0] init_word(input int blk, input int w);
    return {8'(blk / 64), 24'((blk % 64) * 128 + w)};
  endfunction

  task automatic send_flits(input int n, input flit_t f[$]);
    for (int i = 0; i < f.size(); i += 2)
      txq[n].push_back({f[i], (i + 1 < f.size()) ? f[i + 1] : 16'h0000});
  endtask

  task automatic send_req(input int n, input service_e s, input int blk);
    send_flits(n, '{unicast_hdr(BANK[blk / 64], 1'b1), 16'd4, s, flit_t'(addr(n)), flit_t'(blk), 16'h0001});
  endtask

  // data packet from node n; dests by address; multicast if more than one
  task automatic send_data(input int n, input service_e s, input int blk, input logic [7:0] dests[$],
                           input logic [31:0] line[128]);
    flit_t body[$];
    flit_t f[$];
    logic [15:0] up, dn;
    body = '{16'd260, s, flit_t'(addr(n)), flit_t'(blk), 16'h0001};
    for (int w = 0; w < 128; w++) begin body.push_back(line[w][31:16]); body.push_back(line[w][15:0]); end
    if (dests.size() == 1) begin
      f = {unicast_hdr(dests[0], 1'b0), body};
      send_flits(n, f);
    end else begin
      up = '0; dn = '0;
      foreach (dests[i])
        if (lab(dests[i]) > lab(addr(n))) up[lab(dests[i])] = 1'b1;
        else                              dn[lab(dests[i])] = 1'b1;
      if (up != '0) begin f = {flit_t'({3'b101, 13'd0}), flit_t'(up), body}; send_flits(n, f); end
      if (dn != '0) begin f = {flit_t'({3'b100, 13'd0}), flit_t'(dn), body}; send_flits(n, f); end
    end
  endtask

  // ------------------------------------------------------ kernel models
  int data_in [N];         // data packets received per node
  int grants_in [N];       // grants without data
  int inv_in = 0, mc_wb_sent = 0, forwards_served = 0, handovers = 0, t_wait_ok = 0;
  int kernel_delay = 0;    // cycles before a PE answers a write-back request
  bit debug = 0;

  task automatic l1_fill(input int n, input int blk, input logic [31:0] line[128]);
    @(negedge clk);
    kblk[n] = 16'(blk); ktag[n] = 1;
    @(negedge clk);
    ktag[n] = 0;
    for (int w = 0; w < 128; w++) begin
      kwe[n] = 1; kword[n] = 7'(w); kwdata[n] = line[w];
      @(negedge clk);
    end
    kwe[n] = 0;
  endtask

  task automatic l1_read_line(input int n, input int blk, output logic [31:0] line[128]);
    @(negedge clk);
    kblk[n] = 16'(blk);
    for (int w = 0; w < 128; w++) begin
      kword[n] = 7'(w);
      @(negedge clk);
      line[w] = l1_k_rdata[n];
    end
  endtask

  task automatic l1_invalidate(input int n, input int blk);
    @(negedge clk);
    kblk[n] = 16'(blk); kinv[n] = 1;
    @(negedge clk);
    kinv[n] = 0;
  endtask

  task automatic kernel(input int n);
    forever begin
      logic [31:0] w0, w1, w2;
      flit_t psize, svc, src, blk;
      logic [31:0] line [128];
      wait (rxq[n].size() >= 3);
      w0 = rxq[n].pop_front(); w1 = rxq[n].pop_front(); w2 = rxq[n].pop_front();
      psize = w0[15:0]; svc = w1[31:16]; src = w1[15:0]; blk = w2[31:16];
      if (debug) $display("%0t node %0d rx %h %h %h", $time, n, w0, w1, w2);
      if (psize == 16'd260) begin
        wait (rxq[n].size() >= 128);
        for (int w = 0; w < 128; w++) line[w] = rxq[n].pop_front();
      end
      case (svc)
        SVC_READ_BLOCK, SVC_WRITE_BACK, SVC_GRANT_EXCLUSIVITY: begin
          if (psize == 16'd260) begin
            l1_fill(n, blk, line);
            data_in[n]++;
          end else grants_in[n]++;
        end
        SVC_INVALIDATE_BLOCK: begin
          l1_invalidate(n, blk);
          inv_in++;
        end
        SVC_WB_REQUEST: begin
          repeat (kernel_delay) @(posedge clk);
          l1_read_line(n, blk, line);
          send_data(n, SVC_WRITE_BACK, blk, '{BANK[blk / 64], src[7:0]}, line);
          mc_wb_sent++;
        end
        SVC_WB_EXCL_REQUEST: begin
          l1_read_line(n, blk, line);
          send_data(n, SVC_GRANT_EXCLUSIVITY, blk, '{src[7:0]}, line);
          l1_invalidate(n, blk);
          handovers++;
        end
        SVC_READ_FORWARD: begin
          l1_read_line(n, blk, line);
          send_data(n, SVC_READ_BLOCK, blk, '{src[7:0]}, line);
          forwards_served++;
        end
        default: chk(0, $sformatf("node %0d: unexpected service %h", n, svc));
      endcase
    end
  endtask

  // ---------------------------------------------------------- CPU side
  int hits = 0, misses = 0;
  task automatic cpu_read(input int n, input int blk, input int w, output logic [31:0] d, output bit hit);
    @(negedge clk);
    cen[n] = 1; cwe[n] = 0; cblk[n] = 16'(blk); cword[n] = 7'(w);
    #1;
    hit = l1_cpu_hit[n];
    if (hit) hits++; else misses++;
    @(negedge clk);
    d = l1_cpu_rdata[n];
    cen[n] = 0;
  endtask
  task automatic cpu_write(input int n, input int blk, input int w, input logic [31:0] d);
    @(negedge clk);
    cen[n] = 1; cwe[n] = 1; cblk[n] = 16'(blk); cword[n] = 7'(w); cwdata[n] = d;
    @(negedge clk);
    cen[n] = 0; cwe[n] = 0;
  endtask
  task automatic wait_data(input int n, input int cnt, input string what);
    int t;
    for (t = 0; t < 20000 && data_in[n] < cnt; t++) @(posedge clk);
    chk(data_in[n] >= cnt, {what, ": no data"});
  endtask

  // read a word, missing first when the line is not there
  task automatic app_read(input int n, input int blk, input int w, output logic [31:0] d);
    bit hit;
    int prev;
    cpu_read(n, blk, w, d, hit);
    if (!hit) begin
      prev = data_in[n];
      send_req(n, SVC_READ_REQUEST, blk);
      wait_data(n, prev + 1, $sformatf("read by node %0d", n));
      cpu_read(n, blk, w, d, hit);
      chk(hit, "hit after fill");
    end
  endtask

  // ------------------------------------------------------------ events
  int ev_inv = 0, ev_wbr = 0, ev_wbx = 0, ev_fwd = 0, ev_blk = 0, ev_wb = 0;
  always @(posedge clk)
    for (int b = 0; b < 4; b++) begin
      ev_inv += int'(bank_events[b].inv_multicast);
      ev_wbr += int'(bank_events[b].wb_request);
      ev_wbx += int'(bank_events[b].wb_excl);
      ev_fwd += int'(bank_events[b].t_forward);
      ev_blk += int'(bank_events[b].t_blocked);
      ev_wb  += int'(bank_events[b].wb_received);
    end

  // ---------------------------------------------------------- scenario
  localparam int BLK = 3 * 64 + 5;                 // a block of bank 3 at (3,3)
  localparam int A = 14, B = 5, C = 9, D = 10, E = 6, F = 11;  // (2,3) (1,1) (1,2) (2,2) (2,1) (3,2)
  logic [31:0] v, v0;
  bit hit;
  int t0;

  // one kernel process per PE node
  for (genvar g = 0; g < N; g++) begin : g_kernel
    if (g != 0 && g != 3 && g != 12 && g != 15) begin : g_k
      initial begin
        wait (rst_n);
        kernel(g);
      end
    end
  end

  initial begin
    foreach (data_in[n]) begin data_in[n] = 0; grants_in[n] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    v0 = init_word(BLK, 2);

    // other banks, in parallel: node 4 reads a bank-0 block, node 13 a bank-1 block
    send_req(4, SVC_READ_REQUEST, 7);
    send_req(13, SVC_READ_REQUEST, 64 + 9);
    // 1, 2: A and B read the word (misses, shared copies)
    t0 = $time;
    app_read(A, BLK, 2, v);
    chk(v == v0, "A reads initial word");
    $display("read miss served in %0d cycles (incl. L1 fill)", ($time - t0) / 10);
    app_read(B, BLK, 2, v);
    chk(v == v0, "B reads initial word");
    wait_data(4, 1, "bank 0 read");
    wait_data(13, 1, "bank 1 read");
    cpu_read(4, 7, 100, v, hit);
    chk(hit && v == init_word(7, 100), "bank 0 contents");
    cpu_read(13, 64 + 9, 3, v, hit);
    chk(hit && v == init_word(64 + 9, 3), "bank 1 contents");

    // 3: C writes (write miss): invalidations up (A) and down (B), grant with data
    cpu_read(C, BLK, 2, v, hit);
    chk(!hit, "C misses");
    send_req(C, SVC_ASK_EXCLUSIVITY, BLK);
    wait_data(C, 1, "grant to C");
    cpu_read(C, BLK, 2, v, hit);
    chk(hit && v == v0, "C sees the word");
    cpu_write(C, BLK, 2, v + 1);
    for (t0 = 0; t0 < 2000 && inv_in < 2; t0++) @(posedge clk);
    chk(inv_in == 2, "A and B invalidated");
    cpu_read(A, BLK, 2, v, hit);
    chk(!hit, "A's copy gone");
    cpu_read(B, BLK, 2, v, hit);
    chk(!hit, "B's copy gone");

    // 4, 5, 6: D reads the modified block; while the owner is slow, E (near
    // the owner) is forwarded and F (near the bank) is held
    kernel_delay = 400;
    send_req(D, SVC_READ_REQUEST, BLK);
    for (t0 = 0; t0 < 2000 && ev_wbr < 1; t0++) @(posedge clk);
    send_req(E, SVC_READ_REQUEST, BLK);
    for (t0 = 0; t0 < 2000 && ev_fwd < 1; t0++) @(posedge clk);
    send_req(F, SVC_READ_REQUEST, BLK);
    wait_data(D, 1, "D read of modified block");
    wait_data(E, 1, "E forwarded read");
    wait_data(F, 1, "F held read");
    kernel_delay = 0;
    cpu_read(D, BLK, 2, v, hit);
    chk(hit && v == v0 + 1, "D sees C's write");
    cpu_read(E, BLK, 2, v, hit);
    chk(hit && v == v0 + 1, "E sees C's write (from C)");
    cpu_read(F, BLK, 2, v, hit);
    chk(hit && v == v0 + 1, "F sees C's write (from the bank)");

    // 7: E (a sharer) asks exclusivity: grant without data, others invalidated
    send_req(E, SVC_ASK_EXCLUSIVITY, BLK);
    for (t0 = 0; t0 < 3000 && grants_in[E] < 1; t0++) @(posedge clk);
    chk(grants_in[E] == 1, "grant without data to E");
    cpu_write(E, BLK, 2, v0 + 2);
    for (t0 = 0; t0 < 2000 && inv_in < 5; t0++) @(posedge clk);
    chk(inv_in == 5, "C, D, F invalidated");

    // 8: A asks exclusivity on E's modified block: E hands it over
    send_req(A, SVC_ASK_EXCLUSIVITY, BLK);
    wait_data(A, 2, "hand-over to A");
    cpu_read(A, BLK, 2, v, hit);
    chk(hit && v == v0 + 2, "A gets E's data directly");
    cpu_read(E, BLK, 2, v, hit);
    chk(!hit, "E gave up its copy");

    // 9: A flushes at task end; B reads from the bank
    begin
      logic [31:0] line [128];
      cpu_write(A, BLK, 2, v0 + 3);
      l1_read_line(A, BLK, line);
      send_data(A, SVC_FLUSH_BLOCK, BLK, '{BANK[3]}, line);
      l1_invalidate(A, BLK);
    end
    for (t0 = 0; t0 < 3000 && ev_wb < 2; t0++) @(posedge clk);
    app_read(B, BLK, 2, v);
    chk(v == v0 + 3, "B reads the flushed data");
    app_read(B, BLK, 3, v);
    chk(v == init_word(BLK, 3), "untouched word kept");

    // every mechanism happened
    $display("mechanisms: inv_multicast=%0d wb_request=%0d wb_excl=%0d t_forward=%0d t_blocked=%0d wb_received=%0d",
             ev_inv, ev_wbr, ev_wbx, ev_fwd, ev_blk, ev_wb);
    $display("PE side: invalidations=%0d multicast_writebacks=%0d forwards=%0d handovers=%0d hits=%0d misses=%0d",
             inv_in, mc_wb_sent, forwards_served, handovers, hits, misses);
    chk(ev_inv > 0, "invalidation multicast happened");
    chk(ev_wbr > 0, "read of a modified block happened");
    chk(ev_wbx > 0, "owner hand-over happened");
    chk(ev_fwd > 0, "T-state forward happened");
    chk(ev_blk > 0, "T-state hold happened");
    chk(ev_wb  > 0, "write-back absorbed");
    chk(mc_wb_sent > 0, "multicast write-back sent");
    chk(forwards_served > 0 && handovers > 0, "PE-to-PE transfers");
    chk(hits > 0 && misses > 0, "L1 hits and misses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

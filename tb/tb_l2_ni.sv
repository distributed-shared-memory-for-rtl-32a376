// tb_l2_ni: packets (unicast and multicast, short and long) arrive on both
// network ports under random back-pressure from the controller side. The
// controller side must see each packet in arrival order with the multicast
// mask flits removed; the interrupt must be high exactly while a buffer
// holds flits; with the controller stalled a port must accept exactly
// IN_DEPTH flits and then hold the network off.
module tb_l2_ni;
  import dsm_pkg::*;
  localparam int N = 16, DEPTH = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset at once
  logic [1:0] net_valid, net_ready, intr, mc_valid, mc_ready;
  flit_t net_data [2];
  flit_t mc_data [2];
  int checks = 0, failures = 0;
  bit stall = 0;

  l2_ni #(.N_NODES(N), .IN_DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  flit_t tx [2][$];
  flit_t ex [2][$];
  int rd [2] = '{0, 0};
  int accepted [2] = '{0, 0};

  always_comb
    for (int p = 0; p < 2; p++) begin
      net_valid[p] = rd[p] < tx[p].size();
      net_data[p]  = net_valid[p] ? tx[p][rd[p]] : '0;
    end

  always @(negedge clk)
    for (int p = 0; p < 2; p++) mc_ready[p] <= !stall && ($urandom_range(2) != 0);

  always @(posedge clk)
    for (int p = 0; p < 2; p++) begin
      if (net_valid[p] && net_ready[p]) begin rd[p] <= rd[p] + 1; accepted[p]++; end
      if (intr[p] != mc_valid[p]) begin
        failures++; $display("FAIL: intr does not follow buffer state");
      end
      if (mc_valid[p] && mc_ready[p]) begin
        checks++;
        if (ex[p].size() == 0 || mc_data[p] !== ex[p][0]) begin
          failures++;
          $display("FAIL port %0d: got %h exp %h", p, mc_data[p], ex[p].size() ? ex[p][0] : 16'hxxxx);
        end
        if (ex[p].size()) void'(ex[p].pop_front());
      end
    end

  task automatic pkt(input int p, input bit mcast, input int body);
    flit_t f[$];
    f.push_back(mcast ? {3'b111, 13'd0} : 16'h4011);
    if (mcast) f.push_back(16'h0041);
    f.push_back(flit_t'(body));
    for (int i = 0; i < body; i++) f.push_back(flit_t'($urandom));
    foreach (f[i]) begin
      tx[p].push_back(f[i]);
      if (!(mcast && i == 1)) ex[p].push_back(f[i]);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      pkt(0, $urandom_range(1), 4);
      pkt(1, $urandom_range(1), $urandom_range(1) ? 260 : 4);
    end
    for (int t = 0; t < 20000 && (ex[0].size() + ex[1].size()) != 0; t++) @(posedge clk);
    checks++;
    if (ex[0].size() + ex[1].size() != 0) begin failures++; $display("FAIL: flits missing"); end
    // buffer capacity with the controller stalled
    stall = 1;
    @(negedge clk);
    accepted = '{0, 0};
    pkt(1, 0, 30);
    repeat (60) @(posedge clk);
    checks++;
    if (accepted[1] != DEPTH || net_ready[1]) begin
      failures++; $display("FAIL: accepted %0d flits with a stalled controller", accepted[1]);
    end
    stall = 0;
    for (int t = 0; t < 2000 && ex[1].size() != 0; t++) @(posedge clk);
    checks++;
    if (ex[1].size() != 0) begin failures++; $display("FAIL: flits missing after stall"); end
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

// tb_pe_ni: the PE network interface.
//  Send: word streams for a control packet (high priority), a data packet
//  (low priority) and a multicast packet are split into flits; each must
//  leave on the channel its priority selects, upper half first, with
//  exactly the number of flits its size field gives (an unused half word is
//  dropped).
//  Receive: packets arriving on either channel, multicast ones included,
//  must be reassembled into the expected words with the mask removed; with
//  the processor not reading, exactly RX_WORDS words are buffered.
module tb_pe_ni;
  import dsm_pkg::*;
  localparam int N = 16, RXW = 16;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge applies the asynchronous reset at once
  logic tx_valid, tx_ready, rx_valid, rx_ready, intr;
  logic [31:0] tx_word, rx_word;
  logic [1:0] net_out_valid, net_out_ready, net_in_valid, net_in_ready;
  flit_t net_out_data [2], net_in_data [2];
  int checks = 0, failures = 0;
  bit hold_rx = 0;

  pe_ni #(.N_NODES(N), .RX_WORDS(RXW)) dut (.*);
  always #5 clk = ~clk;

  logic [31:0] txw[$];
  flit_t exp_out [2][$];
  flit_t rin [2][$];
  logic [31:0] exp_rx[$];
  int txr = 0;
  int rinr [2] = '{0, 0};
  int rx_count = 0;

  assign tx_valid = txr < txw.size();
  assign tx_word  = tx_valid ? txw[txr] : '0;
  always_comb
    for (int c = 0; c < 2; c++) begin
      net_in_valid[c] = rinr[c] < rin[c].size();
      net_in_data[c]  = net_in_valid[c] ? rin[c][rinr[c]] : '0;
    end

  always @(negedge clk) begin
    net_out_ready <= 2'($urandom);
    rx_ready      <= !hold_rx && $urandom_range(1);
  end

  always @(posedge clk) begin
    if (tx_valid && tx_ready) txr <= txr + 1;
    for (int c = 0; c < 2; c++) begin
      if (net_in_valid[c] && net_in_ready[c]) rinr[c] <= rinr[c] + 1;
      if (net_out_valid[c] && net_out_ready[c]) begin
        checks++;
        if (exp_out[c].size() == 0 || net_out_data[c] !== exp_out[c][0]) begin
          failures++; $display("FAIL send ch %0d: got %h", c, net_out_data[c]);
        end
        if (exp_out[c].size()) void'(exp_out[c].pop_front());
      end
    end
    if (rx_valid && rx_ready) begin
      checks++;
      rx_count++;
      if (exp_rx.size() == 0 || rx_word !== exp_rx[0]) begin
        failures++; $display("FAIL receive: got %h exp %h", rx_word, exp_rx.size() ? exp_rx[0] : 0);
      end
      if (exp_rx.size()) void'(exp_rx.pop_front());
      checks++;
      if (!intr) begin failures++; $display("FAIL: intr low with words buffered"); end
    end
  end

  // flits -> words for the send side
  task automatic send_flits(input flit_t f[$]);
    int c;
    c = f[0][14] ? 0 : 1;
    foreach (f[i]) exp_out[c].push_back(f[i]);
    for (int i = 0; i < f.size(); i += 2)
      txw.push_back({f[i], (i + 1 < f.size()) ? f[i + 1] : 16'hFFFF});
  endtask

  task automatic recv_flits(input int c, input flit_t f[$]);
    flit_t g[$];
    foreach (f[i]) begin
      rin[c].push_back(f[i]);
      if (!(f[0][15] && i == 1)) g.push_back(f[i]);
    end
    for (int i = 0; i < g.size(); i += 2) exp_rx.push_back({g[i], g[i + 1]});
  endtask

  function automatic void mk(output flit_t f[$], input flit_t hdr, input bit mcast, input int size);
    f = '{hdr};
    if (mcast) f.push_back(16'h0840);
    f.push_back(flit_t'(size));
    for (int i = 0; i < size; i++) f.push_back(flit_t'($urandom));
  endfunction

  flit_t f[$];
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    mk(f, 16'h4023, 0, 4);   send_flits(f);         // control, channel 0
    mk(f, 16'h0023, 0, 260); send_flits(f);         // data, channel 1
    mk(f, 16'hC000 | 16'h2000, 1, 4); send_flits(f); // multicast control, 7 flits
    mk(f, 16'h8000, 1, 260); send_flits(f);         // multicast data, odd length
    // one packet at a time: the NI takes channel 0 first when both wait
    mk(f, 16'h4011, 0, 4);   recv_flits(0, f); wait (exp_rx.size() == 0);
    mk(f, 16'h0011, 0, 260); recv_flits(1, f); wait (exp_rx.size() == 0);
    mk(f, 16'hE000, 1, 4);   recv_flits(0, f); wait (exp_rx.size() == 0);
    mk(f, 16'h8000, 1, 260); recv_flits(1, f);
    for (int t = 0; t < 20000 && (exp_out[0].size() + exp_out[1].size() + exp_rx.size()) != 0; t++)
      @(posedge clk);
    checks++;
    if (exp_out[0].size() + exp_out[1].size() + exp_rx.size() != 0) begin
      failures++; $display("FAIL: traffic incomplete");
    end
    // capacity of the receive buffer
    hold_rx = 1;
    @(negedge clk);
    mk(f, 16'h0011, 0, 260); recv_flits(1, f);
    repeat (200) @(posedge clk);
    checks++;
    if (dut.rb_cnt != RXW) begin failures++; $display("FAIL: buffer holds %0d words", dut.rb_cnt); end
    hold_rx = 0;
    for (int t = 0; t < 5000 && exp_rx.size() != 0; t++) @(posedge clk);
    checks++;
    if (exp_rx.size() != 0) begin failures++; $display("FAIL: words missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

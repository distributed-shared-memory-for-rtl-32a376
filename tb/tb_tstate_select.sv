// tb_tstate_select: random reader/owner/bank positions on a 16 x 16 grid;
// the forwarding decision and both distances are checked against a
// reference computed here with plain integer arithmetic. Includes the
// two placements discussed for the transition state: reader near the
// previous owner (forward) and reader near the bank (hold).
module tb_tstate_select;
  logic [7:0] r, o, l;
  logic [4:0] d_o, d_l;
  logic       fwd;
  int checks = 0, failures = 0;

  tstate_select dut (.reader_addr(r), .owner_addr(o), .l2_addr(l),
                     .d_owner(d_o), .d_l2(d_l), .use_forward(fwd));

  function automatic int man(input logic [7:0] a, input logic [7:0] b);
    int dx, dy;
    dx = int'(a[7:4]) - int'(b[7:4]);
    dy = int'(a[3:0]) - int'(b[3:0]);
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
  endfunction

  task automatic check(input logic [7:0] rr, oo, ll);
    r = rr; o = oo; l = ll;
    #1;
    checks++;
    if (int'(d_o) != man(rr, oo) || int'(d_l) != man(rr, ll) ||
        fwd != (man(rr, oo) < man(rr, ll))) begin
      failures++;
      $display("FAIL r=%h o=%h l=%h d_o=%0d d_l=%0d fwd=%b", rr, oo, ll, d_o, d_l, fwd);
    end
  endtask

  initial begin
    // 5x5 mesh, bank at upper-left (0,4): owner (2,1), reader (2,2): forward
    check(8'h22, 8'h21, 8'h04);
    if (fwd !== 1'b1) begin failures++; $display("FAIL: expected forward"); end
    // reader (1,4) next to the bank, owner (1,0) far: hold
    check(8'h14, 8'h10, 8'h04);
    if (fwd !== 1'b0) begin failures++; $display("FAIL: expected hold"); end
    // tie holds
    check(8'h11, 8'h10, 8'h12);
    if (fwd !== 1'b0) begin failures++; $display("FAIL: tie should hold"); end
    for (int i = 0; i < 2000; i++) check(8'($urandom), 8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tstate_select: decides, for a read of a block in the transition (T) state,
// whether the L2 bank forwards the read to the PE that still holds the block
// or holds the read until the write-back has reached the bank.
//
// Forwarding pays off when the block has a shorter trip from the previous
// owner to the reader than from the L2 bank to the reader; otherwise the
// extra request packet costs more than it saves. The unit compares the two
// Manhattan distances on the mesh: use_forward = d(reader, owner) <
// d(reader, l2). A tie holds the read. Purely combinational.
//
// The Manhattan-distance test follows the document's proposal; the exact
// comparison (strict, ties held) is this design's choice.
module tstate_select (
  input  logic [7:0] reader_addr,  // {x, y} of the PE asking for the block
  input  logic [7:0] owner_addr,   // {x, y} of the PE writing the block back
  input  logic [7:0] l2_addr,      // {x, y} of the L2 bank
  output logic [4:0] d_owner,      // hops reader <-> owner
  output logic [4:0] d_l2,         // hops reader <-> L2 bank
  output logic       use_forward
);

  function automatic logic [4:0] absdiff(input logic [3:0] a, input logic [3:0] b);
    return (a > b) ? 5'(a - b) : 5'(b - a);
  endfunction

  always_comb begin
    d_owner     = absdiff(reader_addr[7:4], owner_addr[7:4]) + absdiff(reader_addr[3:0], owner_addr[3:0]);
    d_l2        = absdiff(reader_addr[7:4], l2_addr[7:4])    + absdiff(reader_addr[3:0], l2_addr[3:0]);
    use_forward = d_owner < d_l2;
  end

endmodule

// l1_cache: direct-mapped L1 data cache of a processing element.
//
// Each line holds one whole L2 block (128 32-bit words). The tag memory keeps
// per line the tag (upper bits of the block address), a modified bit and a
// valid bit. Line index = block mod LINES, tag = block / LINES.
//
// The coherence protocol is split between hardware and the PE's kernel
// software. The hardware here detects hits and misses, keeps the tag memory
// and executes reads and writes; the kernel exchanges messages with the L2,
// chooses victims and performs fills, write-backs and invalidations through
// the second (kernel) port.
//
// CPU port: cpu_block/cpu_word address a word; cpu_hit and cpu_miss are
// combinational from the tag memory whenever cpu_en is high. A read returns
// cpu_rdata one cycle later; a write on a hit updates the word and marks the
// line modified at the next edge. A write on a miss changes nothing. The
// victim_* outputs describe the line cpu_block maps to, so the kernel can
// decide whether a write-back is needed before a refill.
//
// Kernel port (one operation per cycle, priority in this order):
//   k_init      clear every valid and modified bit (cache initialisation)
//   k_inval     invalidate the line if it holds k_block (INVALIDATE_BLOCK)
//   k_tag_set   install k_block's tag in its line: valid, not modified
//   k_clean     clear the modified bit of k_block's line (after a write-back)
//   k_we        write k_wdata to word k_word of k_block's line (fill)
// k_rdata returns, one cycle later, word k_word of k_block's line (for
// write-backs and for serving a block to another PE).
//
// Direct mapping, the line size and the three tag-memory fields follow the
// document. The number of lines and the port arrangement are this design's.
module l1_cache #(
  parameter int unsigned LINES       = 8,
  parameter int unsigned BLOCK_WORDS = 128,
  parameter int unsigned BLK_W       = 16,
  localparam int unsigned IW         = $clog2(LINES),
  localparam int unsigned WW         = $clog2(BLOCK_WORDS),
  localparam int unsigned TW         = BLK_W - IW
) (
  input  logic             clk,
  input  logic             rst_n,
  // CPU port
  input  logic             cpu_en,
  input  logic             cpu_we,
  input  logic [BLK_W-1:0] cpu_block,
  input  logic [WW-1:0]    cpu_word,
  input  logic [31:0]      cpu_wdata,
  output logic [31:0]      cpu_rdata,
  output logic             cpu_hit,
  output logic             cpu_miss,
  output logic             victim_valid,
  output logic             victim_modified,
  output logic [BLK_W-1:0] victim_block,
  // kernel port
  input  logic             k_init,
  input  logic             k_inval,
  input  logic             k_tag_set,
  input  logic             k_clean,
  input  logic             k_we,
  input  logic [BLK_W-1:0] k_block,
  input  logic [WW-1:0]    k_word,
  input  logic [31:0]      k_wdata,
  output logic [31:0]      k_rdata
);

  typedef struct packed {
    logic          valid;
    logic          modified;
    logic [TW-1:0] tag;
  } tm_entry_t;

  tm_entry_t   tm   [LINES];
  logic [31:0] data [LINES * BLOCK_WORDS];

  logic [IW-1:0] c_idx, k_idx;
  logic [TW-1:0] c_tag, k_tag;
  assign c_idx = cpu_block[IW-1:0];
  assign c_tag = cpu_block[BLK_W-1:IW];
  assign k_idx = k_block[IW-1:0];
  assign k_tag = k_block[BLK_W-1:IW];

  logic c_match;
  assign c_match         = tm[c_idx].valid && tm[c_idx].tag == c_tag;
  assign cpu_hit         = cpu_en && c_match;
  assign cpu_miss        = cpu_en && !c_match;
  assign victim_valid    = tm[c_idx].valid;
  assign victim_modified = tm[c_idx].modified;
  assign victim_block    = {tm[c_idx].tag, c_idx};

  // Data array: CPU port and kernel port.
  always_ff @(posedge clk) begin
    if (cpu_hit && cpu_we) data[{c_idx, cpu_word}] <= cpu_wdata;
    cpu_rdata <= data[{c_idx, cpu_word}];
  end
  always_ff @(posedge clk) begin
    if (k_we) data[{k_idx, k_word}] <= k_wdata;
    k_rdata <= data[{k_idx, k_word}];
  end

  // Tag memory.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(LINES); i++) tm[i] <= '0;
    end else begin
      if (cpu_hit && cpu_we) tm[c_idx].modified <= 1'b1;
      if (k_init) begin
        for (int i = 0; i < int'(LINES); i++) tm[i] <= '0;
      end else if (k_inval) begin
        if (tm[k_idx].tag == k_tag) begin
          tm[k_idx].valid    <= 1'b0;
          tm[k_idx].modified <= 1'b0;
        end
      end else if (k_tag_set) begin
        tm[k_idx] <= '{valid: 1'b1, modified: 1'b0, tag: k_tag};
      end else if (k_clean) begin
        if (tm[k_idx].tag == k_tag) tm[k_idx].modified <= 1'b0;
      end
    end
  end

endmodule

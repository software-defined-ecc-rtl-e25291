// cacheline_hash: second-tier hash of a cacheline, computed in one clock.
//
// Step 1, vertical parity: the WORDS message words of the cacheline are XORed
// together into one WORD_BITS-wide value (kb bits; three XOR levels for eight
// words). Step 2, compaction: each of the H hash bits is a balanced parity
// tree over kb/2 of those bits, chosen pseudo-randomly (the selection rule is
// in sdecc_pkg::hash_tree_mask). The two steps and their sizes follow the
// hash description; the tree selection is this design's own.
//
// The defaults are the SECDED configuration (eight 64-bit words, h = 8). The
// ChipKill configuration of the same scheme is WORD_BITS=128, WORDS=4, H=16.
//
// Timing: combinational XOR network, registered when en is high; hash and
// valid appear one cycle after the line is presented with en. The
// combinational result is also given as hash_comb for readers that check a
// hash without a clock edge.
module cacheline_hash
  import sdecc_pkg::*;
#(
  parameter int WORD_BITS = 64,
  parameter int WORDS     = 8,
  parameter int H         = 8
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           en,
  input  logic [WORDS-1:0][WORD_BITS-1:0] line,
  output logic                           valid,
  output logic [H-1:0]                   hash,
  output logic [H-1:0]                   hash_comb
);

  typedef logic [H-1:0][WORD_BITS-1:0] masks_t;

  function automatic masks_t tree_masks();
    masks_t m;
    logic [MAX_KB-1:0] full;
    for (int t = 0; t < H; t++) begin
      full = hash_tree_mask(t, WORD_BITS);
      m[t] = full[WORD_BITS-1:0];
    end
    return m;
  endfunction

  localparam masks_t MASKS = tree_masks();

  logic [WORD_BITS-1:0] vparity;

  always_comb begin
    vparity = '0;
    for (int w = 0; w < WORDS; w++) vparity ^= line[w];
    for (int t = 0; t < H; t++) hash_comb[t] = ^(vparity & MASKS[t]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      hash  <= '0;
    end else begin
      valid <= en;
      if (en) hash <= hash_comb;
    end
  end

endmodule

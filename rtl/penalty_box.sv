// penalty_box: the SDECC Penalty Box, a 72-wide, 8-deep shift register plus
// an h-bit register for the cacheline's original hash.
//
// While the box is free, every raw 72-bit received string that the read path
// decodes is shifted in (shift_en), so when a line turns out to hold a DUE its
// eight raw codewords, parity included, are already in place: entry 0 holds
// beat 0 and entry 7 beat 7. The read path stops shifting once the error
// status registers mark the box as in service. The original hash arrives
// bit-serially with the beats and is loaded in one step (hash_load).
// System software reads any entry through the device configuration interface
// (all entries are visible on the entries output) and writes the recovery target back
// entry by entry (wr_en, wr_idx, wr_data); the controller then forwards the
// message parts (msgs) to the requester. Size and shift-register form follow
// the Penalty Box description; random access for software is this design's
// choice. A software write has priority over a shift in the same cycle.
module penalty_box
  import sdecc_pkg::*;
#(
  parameter int W     = N,
  parameter int DEPTH = BURST,
  parameter int H     = HASH_BITS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  shift_en,
  input  logic [W-1:0]          shift_in,
  input  logic                  hash_load,
  input  logic [H-1:0]          hash_in,
  input  logic                  wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_idx,
  input  logic [W-1:0]          wr_data,
  output logic [H-1:0]          hash,
  output logic [DEPTH-1:0][W-1:0] entries
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      entries <= '0;
      hash    <= '0;
    end else begin
      if (wr_en) begin
        entries[wr_idx] <= wr_data;
      end else if (shift_en) begin
        for (int i = 0; i < DEPTH - 1; i++) entries[i] <= entries[i+1];
        entries[DEPTH-1] <= shift_in;
      end
      if (hash_load) hash <= hash_in;
    end
  end

endmodule

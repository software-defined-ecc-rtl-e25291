// addr_xlate: linear-to-physical address translation of the memory
// controller.
//
// A linear cacheline address is split, from most to least significant, into
// rank, row, bank and column (cacheline within the row). With BANK_XOR set,
// the bank index is XORed with the low row bits, so that lines that map to
// the same bank in consecutive rows spread over banks. The field order and the
// XOR permutation are this design's choices; the block is only named in the
// controller's block diagram. Combinational.
module addr_xlate
  import sdecc_pkg::*;
#(
  parameter bit BANK_XOR = 1'b1
) (
  input  laddr_t     laddr,
  output phys_addr_t pa
);

  logic [BANK_BITS-1:0] bank_raw;

  always_comb begin
    pa.col   = laddr[COL_BITS-1:0];
    bank_raw = laddr[COL_BITS +: BANK_BITS];
    pa.row   = laddr[COL_BITS + BANK_BITS +: ROW_BITS];
    pa.rank  = laddr[COL_BITS + BANK_BITS + ROW_BITS +: RANK_BITS];
    pa.bank  = BANK_XOR ? (bank_raw ^ pa.row[BANK_BITS-1:0]) : bank_raw;
  end

endmodule

// secded_encoder: [72,64,4] Hsiao-type SECDED encoder.
//
// Each parity bit r is the XOR of the message bits selected by row r of the
// parity-check matrix in sdecc_pkg (systematic code: the eight parity columns
// form the identity), so the codeword c = {parity, message} satisfies H*c = 0.
// The code length and dimension follow the main configuration of the SDECC
// memory controller; the exact column set is this design's choice (see
// sdecc_pkg). Purely combinational: one XOR tree of 26 inputs per parity bit.
//
// Ports: data (64-bit message) in, cw (72-bit codeword) out.
module secded_encoder
  import sdecc_pkg::*;
(
  input  msg_t data,
  output cw_t  cw
);

  logic [R-1:0] parity;

  always_comb begin
    for (int r = 0; r < R; r++) parity[r] = ^(data & H_MATRIX[r][K-1:0]);
    cw = {parity, data};
  end

endmodule

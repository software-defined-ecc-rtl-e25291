// secded_decoder: [72,64,4] Hsiao-type SECDED decoder.
//
// Computes the 8-bit syndrome s = H*x of a received 72-bit string x. A zero
// syndrome means no error. A syndrome equal to column i of H means a single
// error in bit i, which is flipped (corrected error, CE). Any other syndrome
// (every even-weight one, and odd-weight ones that match no column) is a
// detected-but-uncorrectable error (DUE); the message bits are then passed on
// uncorrected, as the raw string is what the Penalty Box keeps.
// Purely combinational.
//
// Ports: x (received string) in; data (corrected message), cw (corrected
// codeword), syndrome, status (DEC_OK / DEC_CE / DEC_DUE) and err_pos (the
// corrected bit, valid for DEC_CE) out.
module secded_decoder
  import sdecc_pkg::*;
(
  input  cw_t          x,
  output msg_t         data,
  output cw_t          cw,
  output logic [R-1:0] syndrome,
  output dec_status_e  status,
  output logic [6:0]   err_pos
);

  logic [N-1:0] flip;

  always_comb begin
    for (int r = 0; r < R; r++) syndrome[r] = ^(x & H_MATRIX[r]);
    flip    = '0;
    err_pos = '0;
    for (int i = 0; i < N; i++) begin
      if (syndrome == h_column(i)) begin
        flip[i] = 1'b1;
        err_pos = 7'(i);
      end
    end
    if (syndrome == '0)   status = DEC_OK;
    else if (|flip)       status = DEC_CE;
    else                  status = DEC_DUE;
    cw   = x ^ flip;
    data = cw[K-1:0];
  end

endmodule

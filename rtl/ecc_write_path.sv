// ecc_write_path: ECC encoding and hash generation for cacheline writes.
//
// A 512-bit cacheline is taken in when the output stage is free. In the same
// clock the eight 64-bit words are encoded into 72-bit SECDED codewords and
// the 8-bit cacheline hash is computed over the message bits; both are
// registered. The output is the burst as it goes on the 73-bit channel: beat
// b carries codeword b on bits [71:0] and hash bit b on bit 72 (beats past the
// hash width carry 0). Carrying the hash on one extra wire per beat follows
// the SECDED hash arrangement; the bit order is this design's choice.
//
// Timing: one cycle from in_valid&in_ready to out_valid; the stage holds its
// output until out_ready, and accepts a new line in the cycle it is emptied.
module ecc_write_path
  import sdecc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  line_t  in_line,
  output logic   out_valid,
  input  logic   out_ready,
  output wline_t out_wline
);

  cw_t                  cw_comb [BURST];
  cw_t                  cw_q    [BURST];
  logic [HASH_BITS-1:0] hash_q, hash_comb;
  logic                 hash_valid;
  logic                 accept;

  assign in_ready = !out_valid || out_ready;
  assign accept   = in_valid && in_ready;

  for (genvar b = 0; b < BURST; b++) begin : g_enc
    secded_encoder u_enc (.data(in_line[b]), .cw(cw_comb[b]));
  end

  cacheline_hash #(.WORD_BITS(K), .WORDS(BURST), .H(HASH_BITS)) u_hash (
    .clk, .rst_n, .en(accept), .line(in_line),
    .valid(hash_valid), .hash(hash_q), .hash_comb(hash_comb)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else if (accept) out_valid <= 1'b1;
    else if (out_ready) out_valid <= 1'b0;
  end

  always_ff @(posedge clk) begin
    if (accept) cw_q <= cw_comb;
  end

  always_comb begin
    for (int b = 0; b < BURST; b++)
      out_wline[b] = {(b < HASH_BITS) ? hash_q[b] : 1'b0, cw_q[b]};
  end

  // The hash register is loaded exactly when a line is accepted.
  a_hash_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    hash_valid |-> out_valid);

endmodule

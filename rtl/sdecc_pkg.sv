// sdecc_pkg: sizes, types and code tables shared by the SDECC memory controller.
//
// The controller protects each 64-bit word of a 64-byte cacheline with a
// [72,64,4] binary SECDED code of the Hsiao type (odd-weight columns). A
// cacheline travels as a burst of eight 72-bit codewords on a channel that is
// one bit wider than usual (73 bits); the extra wire carries one bit of the
// 8-bit cacheline hash per beat.
//
// Parity-check matrix (this design's own column choice; the Hsiao rule that
// every column has odd weight and the row weights are balanced is followed):
//   data bits  0..55 : the 56 weight-3 8-bit vectors in ascending numeric order
//   data bits 56..63 : the complement of 8'b0000_1011 rotated left by (bit-56),
//                      eight weight-5 vectors, each row used five times
//   parity bits 64..71: unit vector of row (bit-64)
// Every row then has 26 ones over the data columns. Codeword layout is
// {parity[7:0], message[63:0]}: bit i of the codeword is column i of H.
//
// Hash trees: tree t of the cacheline hash XORs kb/2 of the kb vertical-parity
// bits. The set is the first kb/2 entries of a Fisher-Yates shuffle of
// 0..kb-1 driven by a 32-bit xorshift generator seeded with
// 32'h2545_F491 ^ ((t+1) * 32'h9E37_79B9). The shuffle is this design's choice;
// that each tree is a balanced parity tree over half the inputs follows the
// description of the hash.
package sdecc_pkg;

  localparam int K          = 64;           // message bits per codeword
  localparam int R          = 8;            // parity bits per codeword
  localparam int N          = K + R;        // codeword bits (72)
  localparam int BURST      = 8;            // codewords (DDR beats) per cacheline
  localparam int LINE_BITS  = K * BURST;    // 512 message bits per cacheline
  localparam int HASH_BITS  = 8;            // cacheline hash width h
  localparam int CH_W       = N + 1;        // channel width: 72 + 1 hash wire
  localparam int TAG_W      = 8;            // request tag width
  localparam int RANK_BITS  = 2;
  localparam int BANK_BITS  = 3;
  localparam int ROW_BITS   = 18;
  localparam int COL_BITS   = 7;            // cacheline index within a row
  localparam int LADDR_W    = RANK_BITS + BANK_BITS + ROW_BITS + COL_BITS; // 30
  localparam int MAX_KB     = 256;          // widest vertical parity the hash tables support
  localparam logic [7:0] ECC_ID_HSIAO_72_64 = 8'h01;

  typedef logic [K-1:0]            msg_t;
  typedef logic [N-1:0]            cw_t;
  typedef logic [CH_W-1:0]         beat_t;
  typedef logic [BURST-1:0][K-1:0] line_t;
  typedef logic [BURST-1:0][CH_W-1:0] wline_t;
  typedef logic [LADDR_W-1:0]      laddr_t;
  typedef logic [TAG_W-1:0]        tag_t;
  typedef logic [R-1:0][N-1:0]     hmat_t;

  typedef enum logic [1:0] {
    DEC_OK  = 2'd0,   // syndrome zero
    DEC_CE  = 2'd1,   // single-bit error corrected
    DEC_DUE = 2'd2    // detected but uncorrectable
  } dec_status_e;

  typedef enum logic [2:0] {
    RSP_OK        = 3'd0,  // read without error
    RSP_CORRECTED = 3'd1,  // read with corrected errors
    RSP_RECOVERED = 3'd2,  // DUE recovered by software through the Penalty Box
    RSP_DROPPED   = 3'd3,  // prefetch that hit a DUE: request dropped
    RSP_POISON    = 3'd4   // DUE not recovered: requester must not use the data
  } rsp_status_e;

  // Request from the on-chip network side (memory interface).
  typedef struct packed {
    tag_t   tag;
    logic   we;
    logic   prefetch;
    laddr_t laddr;
    line_t  wdata;
  } mem_req_t;

  // Transaction after scheduling (write data travels in the write queue).
  typedef struct packed {
    tag_t   tag;
    logic   we;
    logic   prefetch;
    logic   retried;
    laddr_t laddr;
  } txn_t;

  typedef struct packed {
    logic [RANK_BITS-1:0] rank;
    logic [BANK_BITS-1:0] bank;
    logic [ROW_BITS-1:0]  row;
    logic [COL_BITS-1:0]  col;
  } phys_addr_t;

  // DRAM command with the transaction data needed when its read returns.
  typedef struct packed {
    logic       we;
    phys_addr_t pa;
    txn_t       txn;
  } dram_cmd_t;

  typedef struct packed {
    tag_t        tag;
    rsp_status_e status;
    line_t       rdata;
  } mem_rsp_t;

  // H matrix rows; bit i of row r is H[r][i].
  function automatic hmat_t hsiao_h();
    hmat_t h;
    int    d;
    logic [7:0] col;
    h = '0;
    d = 0;
    for (int v = 0; v < 256; v++) begin
      if ($countones(v[7:0]) == 3) begin
        for (int r = 0; r < R; r++) h[r][d] = v[r];
        d++;
      end
    end
    for (int j = 0; j < 8; j++) begin
      col = ~((8'b0000_1011 << j) | (8'b0000_1011 >> (8 - j)));
      for (int r = 0; r < R; r++) h[r][56 + j] = col[r];
    end
    for (int r = 0; r < R; r++) h[r][K + r] = 1'b1;
    return h;
  endfunction

  localparam hmat_t H_MATRIX = hsiao_h();

  // Column c of H as an 8-bit syndrome pattern.
  function automatic logic [R-1:0] h_column(int c);
    logic [R-1:0] s;
    for (int r = 0; r < R; r++) s[r] = H_MATRIX[r][c];
    return s;
  endfunction

  function automatic logic [31:0] xorshift32(logic [31:0] s);
    logic [31:0] x;
    x = s;
    x = x ^ (x << 13);
    x = x ^ (x >> 17);
    x = x ^ (x << 5);
    return x;
  endfunction

  // Input mask of hash tree t over kb vertical-parity bits (kb <= MAX_KB).
  function automatic logic [MAX_KB-1:0] hash_tree_mask(int t, int kb);
    int          perm [MAX_KB];
    int          j, tmp;
    logic [31:0] s;
    logic [MAX_KB-1:0] m;
    for (int i = 0; i < MAX_KB; i++) perm[i] = i;
    s = 32'h2545_F491 ^ (32'(t + 1) * 32'h9E37_79B9);
    for (int i = kb - 1; i > 0; i--) begin
      s = xorshift32(s);
      j = int'(s % 32'(i + 1));
      tmp = perm[i];
      perm[i] = perm[j];
      perm[j] = tmp;
    end
    m = '0;
    for (int i = 0; i < kb / 2; i++) m[perm[i]] = 1'b1;
    return m;
  endfunction

endpackage

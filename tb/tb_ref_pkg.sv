// tb_ref_pkg: reference models for the SDECC testbenches.
//
// Holds an independent derivation of the [72,64,4] parity-check columns
// (weight-3 vectors gathered by bit position and sorted, then the rotated
// weight-5 vectors, then unit vectors), a bit-level encoder and syndrome, the
// cacheline hash computed word by word, and a model of the system software
// that services a Penalty Box: the candidate search that flips every single
// bit of a DUE codeword and keeps the distinct single-error corrections
// (Algorithm 1 for a binary code), pruning by the original hash, and the
// Entropy-8 recovery policy (minimum byte entropy of the cacheline, panic on
// a tie or when the mean candidate entropy exceeds the panic threshold).
package tb_ref_pkg;
  import sdecc_pkg::*;

  typedef logic [7:0] col_t;

  // Column table and syndrome-to-column lookup, built on first use.
  col_t col_tab [N];
  int   syn_to_col [256];
  bit   tab_ready = 0;

  function automatic void build_tables();
    foreach (syn_to_col[s]) syn_to_col[s] = -1;
    for (int i = 0; i < N; i++) begin
      col_tab[i] = derive_col(i);
      syn_to_col[col_tab[i]] = i;
    end
    tab_ready = 1;
  endfunction

  function automatic col_t ref_col(int i);
    if (!tab_ready) build_tables();
    return col_tab[i];
  endfunction

  // Bit position a syndrome points to, or -1 if it matches no column.
  function automatic int col_of(logic [7:0] s);
    if (!tab_ready) build_tables();
    return syn_to_col[s];
  endfunction

  function automatic col_t derive_col(int i);
    col_t list [64];
    col_t tmp;
    int   n;
    n = 0;
    for (int a = 0; a < 8; a++)
      for (int b = a + 1; b < 8; b++)
        for (int c = b + 1; c < 8; c++) begin
          list[n] = col_t'((1 << a) | (1 << b) | (1 << c));
          n++;
        end
    for (int x = 0; x < 56; x++)
      for (int y = 0; y < 55 - x; y++)
        if (list[y] > list[y+1]) begin
          tmp = list[y]; list[y] = list[y+1]; list[y+1] = tmp;
        end
    if (i < 56) return list[i];
    if (i < 64) begin
      tmp = 8'b0000_1011;
      for (int k = 0; k < i - 56; k++) tmp = {tmp[6:0], tmp[7]};
      return ~tmp;
    end
    return col_t'(1 << (i - 64));
  endfunction

  function automatic logic [7:0] ref_syndrome(cw_t x);
    logic [7:0] s;
    s = '0;
    for (int i = 0; i < N; i++) if (x[i]) s ^= ref_col(i);
    return s;
  endfunction

  function automatic cw_t ref_encode(msg_t m);
    logic [7:0] p;
    p = '0;
    for (int i = 0; i < K; i++) if (m[i]) p ^= ref_col(i);
    return {p, m};
  endfunction

  // Hash of a cacheline of WORDS words of kb bits each (kb <= MAX_KB).
  function automatic logic [15:0] ref_hash(logic [1023:0] flat, int kb, int words, int h);
    logic [MAX_KB-1:0] vp, m;
    logic [15:0]       r;
    vp = '0;
    for (int w = 0; w < words; w++)
      for (int i = 0; i < kb; i++) vp[i] ^= flat[w * kb + i];
    r = '0;
    for (int t = 0; t < h; t++) begin
      m = hash_tree_mask(t, kb);
      for (int i = 0; i < kb; i++) if (m[i]) r[t] ^= vp[i];
    end
    return r;
  endfunction

  function automatic logic [HASH_BITS-1:0] line_hash(line_t l);
    return HASH_BITS'(ref_hash(1024'(l), K, BURST, HASH_BITS));
  endfunction

  // Byte-granularity Shannon entropy of a 64-byte cacheline, in bits.
  function automatic real entropy8(line_t l);
    int  cnt [256];
    real e, p;
    logic [LINE_BITS-1:0] f;
    f = l;
    foreach (cnt[i]) cnt[i] = 0;
    for (int i = 0; i < LINE_BITS / 8; i++) cnt[f[i*8 +: 8]]++;
    e = 0.0;
    foreach (cnt[i]) if (cnt[i] != 0) begin
      p = real'(cnt[i]) / real'(LINE_BITS / 8);
      e -= p * $ln(p) / $ln(2.0);
    end
    return e;
  endfunction

  // Candidate codewords of a DUE received string (binary SECDED).
  function automatic void candidates(cw_t x, ref cw_t cand [$]);
    cw_t y, c;
    logic [7:0] s;
    bit dup;
    cand.delete();
    for (int i = 0; i < N; i++) begin
      y = x;
      y[i] = ~y[i];
      s = ref_syndrome(y);
      if (s == '0 || col_of(s) < 0) continue;
      c = y;
      c[col_of(s)] = ~c[col_of(s)];
      dup = 0;
      foreach (cand[k]) if (cand[k] == c) dup = 1;
      if (!dup) cand.push_back(c);
    end
  endfunction

  typedef struct {
    line_t target;
    bit    panic;
    int    n_cand;     // candidates before pruning
    int    n_pruned;   // candidates left after hash pruning
  } policy_result_t;

  // Service a Penalty Box: entries are the raw codewords, hash the original
  // hash, hbits how many hash bits prune the candidates (0: no pruning; a
  // prefix of the trees is itself a hash of that width), threshold the panic
  // threshold in bits.
  function automatic policy_result_t recover(cw_t entries [BURST], logic [HASH_BITS-1:0] hash,
                                             int hbits, real threshold);
    logic [HASH_BITS-1:0] hmask;
    policy_result_t res;
    line_t base, trial;
    cw_t   cand [$];
    line_t lines [$];
    real   ent [$];
    real   emin, esum;
    int    imin, due_w, nmin;
    hmask = HASH_BITS'((1 << hbits) - 1);
    due_w = -1;
    for (int b = 0; b < BURST; b++) begin
      cw_t c;
      logic [7:0] s;
      c = entries[b];
      s = ref_syndrome(c);
      if (s != 0) begin
        bit ce;
        ce = 0;
        if (col_of(s) >= 0) begin c[col_of(s)] = ~c[col_of(s)]; ce = 1; end
        if (!ce) due_w = b;
      end
      base[b] = c[K-1:0];
    end
    res.panic = 1;
    res.target = base;
    res.n_cand = 0;
    res.n_pruned = 0;
    if (due_w < 0) return res;
    candidates(entries[due_w], cand);
    res.n_cand = cand.size();
    foreach (cand[k]) begin
      trial = base;
      trial[due_w] = cand[k][K-1:0];
      if (((line_hash(trial) ^ hash) & hmask) == '0) lines.push_back(trial);
    end
    if (lines.size() == 0)  // no candidate matches: fall back to all of them
      foreach (cand[k]) begin
        trial = base;
        trial[due_w] = cand[k][K-1:0];
        lines.push_back(trial);
      end
    res.n_pruned = lines.size();
    esum = 0.0;
    foreach (lines[k]) begin
      ent.push_back(entropy8(lines[k]));
      esum += ent[k];
    end
    emin = ent[0];
    imin = 0;
    foreach (ent[k]) if (ent[k] < emin) begin emin = ent[k]; imin = k; end
    nmin = 0;
    foreach (ent[k]) if (ent[k] == emin) nmin++;
    res.target = lines[imin];
    res.panic  = (lines.size() > 1) && ((nmin > 1) || (esum / real'(lines.size()) > threshold));
    return res;
  endfunction

endpackage

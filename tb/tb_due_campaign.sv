// tb_due_campaign: DUE-injection campaign through the SDECC memory controller.
//
// Part 1, code properties: counts the weight-4 codewords W of the [72,64,4]
// code, derives the mean number of candidates mu = C(4,2)*W/C(72,2) + 1, and
// checks it against the average candidate-list size found by the candidate
// search over all 2556 double-bit error patterns; also checks the upper bound
// floor(n/(t+1)) = 36 on every list and reports the chance of a random guess.
//
// Part 2, recovery: cachelines of five synthetic data kinds (32-bit integer
// arrays, pointer arrays, double-precision arrays, ASCII text, random bytes)
// are written, a random double-bit DUE is injected into one codeword of the
// line in the DRAM model, and the line is read on demand. The read fails,
// is retried, and lands in the Penalty Box. The handler model then reads the
// Penalty Box and scores the candidates with Entropy-8 three ways: no hash,
// the first 4 hash bits, all 8 hash bits. The 8-bit outcome is written back
// and released. Success / forced panic / wrong-line (mis-correction) rates
// are reported with panics taken and not taken. Hardware checks on every
// trial: Penalty Box contents equal the injected raw codewords, PHY_ADDR and
// the released data. The data are synthetic, so the rates are only
// indicative.
module tb_due_campaign;
  import sdecc_pkg::*;
  import tb_ref_pkg::*;

  localparam int TRIALS_PER_KIND = 60;
  localparam int KINDS = 5;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, rsp_valid, rsp_ready;
  mem_req_t req;
  mem_rsp_t rsp;
  logic dram_cmd_valid, dram_cmd_ready, dram_cmd_we, dram_rd_valid;
  phys_addr_t dram_cmd_pa;
  wline_t dram_wdata;
  beat_t dram_rd_beat;
  logic cfg_valid, cfg_we, cfg_rvalid;
  logic [7:0] cfg_addr;
  logic [63:0] cfg_wdata, cfg_rdata;
  logic nmi, service_req;
  mem_rsp_t last_rsp;
  bit       got_rsp;

  // [hash variant 0:none 1:4-bit 2:8-bit][S, P, M with panics taken; S, M not taken]
  int stat [3][5];
  int kind_succ [KINDS];

  sdecc_mc dut (.*);
  dram_model #(.RL(12), .READY_PCT(100)) u_dram (
    .clk, .rst_n, .cmd_valid(dram_cmd_valid), .cmd_ready(dram_cmd_ready), .cmd_we(dram_cmd_we),
    .cmd_pa(dram_cmd_pa), .wdata(dram_wdata), .rd_valid(dram_rd_valid), .rd_beat(dram_rd_beat));

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && rsp_valid && rsp_ready) begin
    last_rsp <= rsp;
    got_rsp  <= 1'b1;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  function automatic phys_addr_t pa_of(laddr_t a);
    phys_addr_t p;
    p.col  = a[6:0];
    p.row  = a[27:10];
    p.rank = a[29:28];
    p.bank = a[9:7] ^ p.row[2:0];
    return p;
  endfunction

  function automatic line_t make_line(int kind);
    line_t l;
    logic [LINE_BITS-1:0] f;
    int base;
    real x;
    base = $urandom_range(1000);
    case (kind)
      0: for (int w = 0; w < 16; w++) f[w*32 +: 32] = 32'(base + $urandom_range(40));
      1: for (int w = 0; w < 8; w++)  f[w*64 +: 64] = 64'h0000_7FFF_A000_0000 + 64'(base * 64 + w * 48);
      2: begin
           x = 1.0 + real'(base) / 100.0;
           for (int w = 0; w < 8; w++) f[w*64 +: 64] = $realtobits(x + real'(w) * 0.25);
         end
      3: for (int c = 0; c < 64; c++) f[c*8 +: 8] = (c % 6 == 5) ? 8'h20 : 8'(8'h61 + $urandom_range(11));
      default: for (int w = 0; w < 16; w++) f[w*32 +: 32] = $urandom;
    endcase
    l = f;
    return l;
  endfunction

  task automatic send(bit we, laddr_t a, line_t d);
    @(negedge clk);
    req_valid = 1;
    req = '{tag: 8'h33, we: we, prefetch: 1'b0, laddr: a, wdata: d};
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    @(negedge clk);
    req_valid = 0;
  endtask

  task automatic cfg_write(logic [7:0] a, logic [63:0] d);
    @(negedge clk);
    cfg_valid = 1; cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_valid = 0; cfg_we = 0;
  endtask

  task automatic cfg_read(logic [7:0] a, output logic [63:0] d);
    @(negedge clk);
    cfg_valid = 1; cfg_we = 0; cfg_addr = a;
    @(posedge clk);
    #1;
    cfg_valid = 0;
    d = cfg_rdata;
  endtask

  task automatic code_properties();
    longint w4;
    int     total, sz, bound_bad;
    real    mu, avg, pg;
    cw_t    e;
    cw_t    cand [$];
    w4 = 0;
    for (int i = 0; i < N; i++)
      for (int j = i + 1; j < N; j++)
        for (int k = j + 1; k < N; k++) begin
          int l;
          l = col_of(ref_col(i) ^ ref_col(j) ^ ref_col(k));
          if (l > k) w4++;
        end
    mu = 6.0 * real'(w4) / 2556.0 + 1.0;
    total = 0; pg = 0.0; bound_bad = 0;
    for (int i = 0; i < N; i++)
      for (int j = i + 1; j < N; j++) begin
        e = '0;
        e[i] = 1'b1;
        e[j] = 1'b1;
        candidates(e, cand);
        sz = cand.size();
        total += sz;
        pg += 1.0 / real'(sz);
        if (sz > 36 || sz < 1) bound_bad++;
      end
    avg = real'(total) / 2556.0;
    $display("code: W(4) = %0d, mu (Lemma 2) = %.3f, mean list size = %.3f, random-guess success = %.2f%%",
             w4, mu, avg, 100.0 * pg / 2556.0);
    check(mu - avg < 1e-9 && avg - mu < 1e-9, "Lemma 2 matches the candidate search");
    check(bound_bad == 0, "every list within 1..floor(n(q-1)/(t+1))");
  endtask

  initial begin
    logic [63:0] d, lo, hi;
    cw_t entries [BURST];
    cw_t exp_raw [BURST];
    line_t orig;
    laddr_t a;
    int w, i, j, hv;
    policy_result_t res [3];
    req_valid = 0; req = '0; rsp_ready = 1; got_rsp = 0;
    cfg_valid = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    foreach (stat[x, y]) stat[x][y] = 0;
    foreach (kind_succ[x]) kind_succ[x] = 0;
    code_properties();
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int t = 0; t < TRIALS_PER_KIND * KINDS; t++) begin
      int kind;
      bit orig_in_list;
      kind = t % KINDS;
      a = laddr_t'($urandom);
      orig = make_line(kind);
      send(1, a, orig);
      w = $urandom_range(BURST - 1);
      i = $urandom_range(N - 1);
      do j = $urandom_range(N - 1); while (j == i);
      u_dram.set_fault(pa_of(a), w, (beat_t'(1) << i) | (beat_t'(1) << j), 1);
      for (int b = 0; b < BURST; b++) exp_raw[b] = ref_encode(orig[b]);
      exp_raw[w][i] = ~exp_raw[w][i];
      exp_raw[w][j] = ~exp_raw[w][j];
      got_rsp = 0;
      send(0, a, '0);
      while (!service_req) @(posedge clk);
      cfg_read(8'h02, d);
      check(d == 64'({a, 6'b0}), "PHY_ADDR");
      for (int b = 0; b < BURST; b++) begin
        cfg_read(8'(8'h10 + 2 * b), lo);
        cfg_read(8'(8'h11 + 2 * b), hi);
        entries[b] = {hi[7:0], lo};
        check(entries[b] == exp_raw[b], "Penalty Box holds the raw received strings");
      end
      cfg_read(8'h04, d);
      check(d[7:0] == line_hash(orig), "original hash in the Penalty Box");
      for (int v = 0; v < 3; v++) begin
        res[v] = recover(entries, d[7:0], v * 4, 4.5);
        hv = v;
        if (res[v].target == orig) stat[hv][3]++; else stat[hv][4]++;
        if (res[v].panic) stat[hv][1]++;
        else if (res[v].target == orig) stat[hv][0]++;
        else stat[hv][2]++;
      end
      // the original is always one of the candidates
      orig_in_list = 0;
      begin
        cw_t cand [$];
        candidates(entries[w], cand);
        foreach (cand[k]) if (cand[k] == ref_encode(orig[w])) orig_in_list = 1;
      end
      check(orig_in_list, "original codeword is a candidate");
      if (!res[2].panic && res[2].target == orig) kind_succ[kind]++;
      if (res[2].panic) cfg_write(8'h05, 64'h2);
      else begin
        for (int b = 0; b < BURST; b++) begin
          cw_t c;
          c = ref_encode(res[2].target[b]);
          cfg_write(8'(8'h10 + 2 * b), c[63:0]);
          cfg_write(8'(8'h11 + 2 * b), 64'(c[71:64]));
        end
        cfg_write(8'h05, 64'h1);
      end
      while (!got_rsp) @(posedge clk);
      if (res[2].panic) check(last_rsp.status == RSP_POISON, "abandoned read poisoned");
      else check(last_rsp.status == RSP_RECOVERED && last_rsp.rdata == res[2].target,
                 "released data is the chosen candidate");
      u_dram.clear_faults(pa_of(a));
    end
    begin
      string names [3] = '{"no hash", "4-bit hash", "8-bit hash"};
      real n;
      n = real'(TRIALS_PER_KIND * KINDS);
      for (int v = 0; v < 3; v++)
        $display("%-10s panics taken: S %5.1f%% P %5.1f%% M %5.1f%% | not taken: S %5.1f%% M %5.1f%%",
                 names[v], 100.0 * stat[v][0] / n, 100.0 * stat[v][1] / n, 100.0 * stat[v][2] / n,
                 100.0 * stat[v][3] / n, 100.0 * stat[v][4] / n);
      $display("8-bit hash successes per kind (int, pointer, double, text, random): %0d %0d %0d %0d %0d of %0d",
               kind_succ[0], kind_succ[1], kind_succ[2], kind_succ[3], kind_succ[4], TRIALS_PER_KIND);
      check(stat[2][0] >= stat[1][0] && stat[1][0] >= stat[0][0], "a longer hash never recovers less");
      check(stat[2][0] * 10 >= TRIALS_PER_KIND * KINDS * 9, "8-bit hash recovers at least 90%");
      check(stat[2][2] * 50 <= TRIALS_PER_KIND * KINDS, "8-bit hash mis-corrects at most 2%");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

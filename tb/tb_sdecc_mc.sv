// tb_sdecc_mc: end-to-end test of the SDECC memory controller at its default
// parameters.
//
// A behavioural DRAM (dram_model) sits on the DRAM port, and a model of the
// operating-system handler services the configuration port: on nmi it reads
// the error status registers and the Penalty Box, lists the candidate
// codewords of the DUE, prunes them with the cacheline hash, ranks them by
// cacheline byte entropy (Entropy-8, panic threshold 4.5 bits), writes the
// recovery target back and releases the read, or abandons recovery.
//
// Scenarios and the mechanism each one must show at least once:
//   writes then clean reads              -> OK responses, data as written
//   single-bit fault                     -> CORRECTED, CE_COUNT advances
//   transient double-bit fault           -> read-retry, then OK
//   persistent DUE on a demand read      -> Penalty Box capture, nmi
//   reads issued while it is in service  -> complete before it (out of order)
//   persistent DUE on a prefetch         -> DROPPED
//   second DUE while in service          -> POISON, ERROR_TYPE overflow bit
//   software recovery with the hash      -> RECOVERED with the original data
//   high-entropy line, no hash           -> policy panics, abandon -> POISON
//   response backpressure                -> request queue stalls (req_ready low)
//   a batch of DUE recoveries            -> success / panic / wrong counts
module tb_sdecc_mc;
  import sdecc_pkg::*;
  import tb_ref_pkg::*;

  localparam int NRECOV = 40;

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

  // mechanism counters
  int n_ok = 0, n_corrected = 0, n_retry_ok = 0, n_capture = 0, n_ooo = 0, n_dropped = 0;
  int n_overflow = 0, n_recovered = 0, n_abandon = 0, n_stall = 0, n_nmi = 0;
  int n_success = 0, n_panic = 0, n_wrong = 0;

  mem_rsp_t rsps [tag_t];
  int       rsp_order [$];
  line_t    golden [laddr_t];

  sdecc_mc dut (.*);
  dram_model #(.RL(12), .READY_PCT(70)) u_dram (
    .clk, .rst_n, .cmd_valid(dram_cmd_valid), .cmd_ready(dram_cmd_ready), .cmd_we(dram_cmd_we),
    .cmd_pa(dram_cmd_pa), .wdata(dram_wdata), .rd_valid(dram_rd_valid), .rd_beat(dram_rd_beat));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rsp_valid && rsp_ready) begin
      rsps[rsp.tag] = rsp;
      rsp_order.push_back(int'(rsp.tag));
    end
    if (rst_n && nmi) n_nmi++;
    if (req_valid && !req_ready) n_stall++;
  end

  function automatic phys_addr_t pa_of(laddr_t a);
    phys_addr_t p;
    p.col  = a[6:0];
    p.row  = a[27:10];
    p.rank = a[29:28];
    p.bank = a[9:7] ^ p.row[2:0];
    return p;
  endfunction

  // Low-entropy cacheline: small integers, like an array of counters.
  function automatic line_t low_entropy_line(int seed);
    line_t l;
    for (int b = 0; b < BURST; b++)
      l[b] = {32'((seed * 3 + b) % 97), 32'((seed + b * 5) % 61)};
    return l;
  endfunction

  function automatic line_t random_line();
    line_t l;
    for (int b = 0; b < BURST; b++) l[b] = {$urandom, $urandom};
    return l;
  endfunction

  task automatic send(tag_t tag, bit we, bit prefetch, laddr_t a, line_t d);
    @(negedge clk);
    req_valid = 1;
    req = '{tag: tag, we: we, prefetch: prefetch, laddr: a, wdata: d};
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    @(negedge clk);
    req_valid = 0;
    if (we) golden[a] = d;
  endtask

  task automatic wait_rsp(tag_t tag, int max_cycles = 2000);
    int c = 0;
    while (!rsps.exists(tag) && c < max_cycles) begin
      @(posedge clk);
      c++;
    end
    check(rsps.exists(tag), $sformatf("response for tag %0d", tag));
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

  // Model of the OS handler. Returns 1 if it released the read as recovered.
  task automatic os_handler(int hbits, output bit released, output line_t target);
    logic [63:0] d, lo, hi;
    cw_t entries [BURST];
    logic [7:0] h;
    policy_result_t res;
    cfg_read(8'h01, d);
    check(d == 1, "SERVICE_REQ set when handler runs");
    cfg_read(8'h03, d);
    check(d == 64'(ECC_ID_HSIAO_72_64), "ECC_ID");
    for (int b = 0; b < BURST; b++) begin
      cfg_read(8'(8'h10 + 2 * b), lo);
      cfg_read(8'(8'h11 + 2 * b), hi);
      entries[b] = {hi[7:0], lo};
    end
    cfg_read(8'h04, d);
    h = d[7:0];
    res = recover(entries, h, hbits, 4.5);
    target = res.target;
    if (res.panic) begin
      cfg_write(8'h05, 64'h2);
      released = 0;
    end else begin
      for (int b = 0; b < BURST; b++) begin
        cw_t c;
        c = ref_encode(res.target[b]);
        cfg_write(8'(8'h10 + 2 * b), c[63:0]);
        cfg_write(8'(8'h11 + 2 * b), 64'(c[71:64]));
      end
      cfg_write(8'h05, 64'h1);
      released = 1;
    end
  endtask

  function automatic beat_t two_bit_mask();
    int i, j;
    beat_t m;
    i = $urandom_range(N - 1);
    do j = $urandom_range(N - 1); while (j == i);
    m = '0;
    m[i] = 1'b1;
    m[j] = 1'b1;
    return m;
  endfunction

  initial begin
    logic [63:0] d;
    laddr_t a_ce, a_tr, a_due, a_pf, a_due2, a_hi;
    int pos_c, pos_1, pos_2;
    bit released;
    line_t target;
    tag_t tg;
    req_valid = 0; req = '0; rsp_ready = 1;
    cfg_valid = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // 1. writes then clean reads, spread over ranks and banks
    for (int k = 0; k < 24; k++)
      send(tag_t'(k), 1, 0, laddr_t'(k * 32'h0112_3457), low_entropy_line(k));
    for (int k = 0; k < 24; k++) send(tag_t'(k), 0, 0, laddr_t'(k * 32'h0112_3457), '0);
    for (int k = 0; k < 24; k++) begin
      wait_rsp(tag_t'(k));
      check(rsps[tag_t'(k)].status == RSP_OK, "clean read OK");
      check(rsps[tag_t'(k)].rdata == low_entropy_line(k), "clean read data");
      if (rsps[tag_t'(k)].status == RSP_OK) n_ok++;
    end
    rsps.delete();

    // 2. single-bit fault -> CORRECTED
    a_ce = laddr_t'(3 * 32'h0112_3457);
    u_dram.set_fault(pa_of(a_ce), 2, beat_t'(1) << 17, 1);
    send(8'd40, 0, 0, a_ce, '0);
    wait_rsp(8'd40);
    check(rsps[8'd40].status == RSP_CORRECTED && rsps[8'd40].rdata == golden[a_ce], "CE corrected");
    if (rsps[8'd40].status == RSP_CORRECTED) n_corrected++;
    cfg_read(8'h06, d);
    check(d >= 1, "CE_COUNT advanced");
    u_dram.clear_faults(pa_of(a_ce));

    // 3. transient DUE -> read-retry -> OK
    a_tr = laddr_t'(5 * 32'h0112_3457);
    u_dram.set_fault(pa_of(a_tr), 6, two_bit_mask(), 0);
    pos_1 = u_dram.reads_of(pa_of(a_tr));
    send(8'd41, 0, 0, a_tr, '0);
    wait_rsp(8'd41);
    check(rsps[8'd41].status == RSP_OK && rsps[8'd41].rdata == golden[a_tr], "transient DUE retried");
    check(u_dram.reads_of(pa_of(a_tr)) == pos_1 + 2, "line read twice");
    check(!service_req, "no Penalty Box use for a transient DUE");
    if (rsps[8'd41].status == RSP_OK) n_retry_ok++;

    // 4. persistent DUE on a demand read -> Penalty Box; others go on
    a_due = laddr_t'(7 * 32'h0112_3457);
    u_dram.set_fault(pa_of(a_due), 4, two_bit_mask(), 1);
    rsp_order.delete();
    send(8'd50, 0, 0, a_due, '0);
    send(8'd51, 0, 0, laddr_t'(8 * 32'h0112_3457), '0);
    send(8'd52, 0, 0, laddr_t'(9 * 32'h0112_3457), '0);
    wait_rsp(8'd51);
    wait_rsp(8'd52);
    for (int c = 0; c < 500 && !service_req; c++) @(posedge clk);
    check(service_req, "Penalty Box in service");
    check(!rsps.exists(8'd50), "afflicted read is held back");
    check(rsps[8'd51].status == RSP_OK && rsps[8'd52].status == RSP_OK, "other reads complete");
    if (service_req) n_capture++;
    if (rsps.exists(8'd51) && !rsps.exists(8'd50)) n_ooo++;
    cfg_read(8'h02, d);
    check(d == 64'({a_due, 6'b0}), "PHY_ADDR of afflicted line");
    cfg_read(8'h00, d);
    check(d[7:0] == 8'h10, "ERROR_TYPE names codeword 4");

    // 5. prefetch DUE while in service -> DROPPED
    a_pf = laddr_t'(10 * 32'h0112_3457);
    u_dram.set_fault(pa_of(a_pf), 1, two_bit_mask(), 1);
    send(8'd53, 0, 1, a_pf, '0);
    wait_rsp(8'd53);
    check(rsps[8'd53].status == RSP_DROPPED, "prefetch DUE dropped");
    if (rsps[8'd53].status == RSP_DROPPED) n_dropped++;

    // 6. second demand DUE while in service -> POISON
    a_due2 = laddr_t'(11 * 32'h0112_3457);
    u_dram.set_fault(pa_of(a_due2), 0, two_bit_mask(), 1);
    send(8'd54, 0, 0, a_due2, '0);
    wait_rsp(8'd54);
    check(rsps[8'd54].status == RSP_POISON, "second DUE poisoned");
    cfg_read(8'h00, d);
    check(d[16], "ERROR_TYPE overflow bit");
    if (rsps[8'd54].status == RSP_POISON && d[16]) n_overflow++;
    u_dram.clear_faults(pa_of(a_pf));
    u_dram.clear_faults(pa_of(a_due2));

    // 7. software recovery of the held line, with the hash
    os_handler(8, released, target);
    check(released, "handler recovers a low-entropy line");
    wait_rsp(8'd50);
    check(rsps[8'd50].status == RSP_RECOVERED, "RECOVERED status");
    check(rsps[8'd50].rdata == golden[a_due], "recovered data is the original");
    if (rsps[8'd50].status == RSP_RECOVERED) n_recovered++;
    check(!service_req, "SERVICE_REQ cleared after release");
    u_dram.clear_faults(pa_of(a_due));

    // 8. high-entropy line without hash -> policy panics -> abandon
    a_hi = laddr_t'(12 * 32'h0112_3457);
    send(8'd60, 1, 0, a_hi, random_line());
    u_dram.set_fault(pa_of(a_hi), 3, two_bit_mask(), 1);
    send(8'd61, 0, 0, a_hi, '0);
    while (!service_req) @(posedge clk);
    os_handler(0, released, target);
    check(!released, "policy suggests panic for a high-entropy line");
    wait_rsp(8'd61);
    check(rsps[8'd61].status == RSP_POISON, "abandoned recovery poisons the read");
    if (!released && rsps[8'd61].status == RSP_POISON) n_abandon++;
    u_dram.clear_faults(pa_of(a_hi));

    // 9. backpressure: the data buffer fills, requests stall
    rsp_ready = 0;
    fork
      begin
        while (n_stall < 50) @(posedge clk);
        @(negedge clk);
        rsp_ready = 1;
      end
    join_none
    for (int k = 0; k < 40; k++) send(tag_t'(100 + k), 0, 0, laddr_t'((k % 24) * 32'h0112_3457), '0);
    for (int k = 0; k < 40; k++) begin
      wait_rsp(tag_t'(100 + k));
      check(rsps[tag_t'(100 + k)].rdata == golden[laddr_t'((k % 24) * 32'h0112_3457)], "read after stall");
    end

    // 10. a batch of DUE recoveries on low-entropy lines, with the hash
    for (int k = 0; k < NRECOV; k++) begin
      laddr_t a;
      a = laddr_t'(32'h0200_0000 + k * 32'h0001_0081);
      tg = tag_t'(150 + k);
      send(tag_t'(149), 1, 0, a, low_entropy_line(k + 100));
      u_dram.set_fault(pa_of(a), k % BURST, two_bit_mask(), 1);
      send(tg, 0, 0, a, '0);
      while (!service_req) @(posedge clk);
      os_handler(8, released, target);
      wait_rsp(tg);
      if (!released) n_panic++;
      else if (rsps[tg].rdata == golden[a]) n_success++;
      else n_wrong++;
      if (released) check(rsps[tg].status == RSP_RECOVERED && rsps[tg].rdata == target,
                          "released line is the software's target");
      u_dram.clear_faults(pa_of(a));
    end
    $display("recovery batch with 8-bit hash: %0d success, %0d panic, %0d wrong of %0d",
             n_success, n_panic, n_wrong, NRECOV);
    check(n_success * 10 >= NRECOV * 9, "at least 90% of DUEs recovered with the hash");

    $display("mechanisms: ok=%0d corrected=%0d retry_ok=%0d capture=%0d out_of_order=%0d dropped=%0d",
             n_ok, n_corrected, n_retry_ok, n_capture, n_ooo, n_dropped);
    $display("            overflow_poison=%0d recovered=%0d abandon=%0d stall_cycles=%0d nmi=%0d",
             n_overflow, n_recovered, n_abandon, n_stall, n_nmi);
    check(n_ok > 0, "mechanism: clean read");
    check(n_corrected > 0, "mechanism: corrected error");
    check(n_retry_ok > 0, "mechanism: read-retry");
    check(n_capture > 0, "mechanism: Penalty Box capture");
    check(n_ooo > 0, "mechanism: out-of-order completion");
    check(n_dropped > 0, "mechanism: prefetch DUE dropped");
    check(n_overflow > 0, "mechanism: second DUE poisoned");
    check(n_recovered > 0, "mechanism: software recovery");
    check(n_abandon > 0, "mechanism: abandoned recovery");
    check(n_stall > 0, "mechanism: request stall");
    check(n_nmi == 2 + NRECOV, "mechanism: one nmi per captured DUE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

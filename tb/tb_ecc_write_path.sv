// tb_ecc_write_path: self-checking test of the write path.
// Random cachelines go in with random output backpressure. Each output burst
// is compared with the reference: beat b = {hash bit b, codeword of word b},
// with the codewords from the reference encoder and the hash from the
// reference hash. Checks the one-cycle latency, that the output holds while
// stalled, and that no line is lost or duplicated.
module tb_ecc_write_path;
  import sdecc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  line_t in_line;
  wline_t out_wline;
  line_t sent [$];
  int stalls = 0;

  ecc_write_path dut (.clk, .rst_n, .in_valid, .in_ready, .in_line, .out_valid, .out_ready, .out_wline);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic wline_t expected(line_t l);
    wline_t w;
    logic [7:0] h;
    h = line_hash(l);
    for (int b = 0; b < BURST; b++) w[b] = {h[b], ref_encode(l[b])};
    return w;
  endfunction

  initial begin
    int received = 0;
    wline_t held;
    bit was_stalled = 0;
    in_valid = 0; out_ready = 0; in_line = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency: a line accepted at one edge is valid right after it
    @(negedge clk);
    for (int b = 0; b < BURST; b++) in_line[b] = {$urandom, $urandom};
    in_valid = 1; out_ready = 0;
    @(posedge clk); #1;
    in_valid = 0;
    check(out_valid && out_wline == expected(in_line), "one-cycle latency");
    out_ready = 1;
    @(posedge clk); #1;
    out_ready = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (was_stalled) check(out_valid && out_wline == held, "output held while stalled");
      if (!in_valid || in_ready) begin
        in_valid = 1'($urandom);
        for (int b = 0; b < BURST; b++) in_line[b] = {$urandom, $urandom};
      end
      out_ready = ($urandom_range(3) != 0);
      #1;
      if (out_valid && out_ready) begin
        check(sent.size() > 0 && out_wline == expected(sent[0]), "burst matches reference");
        void'(sent.pop_front());
        received++;
      end
      was_stalled = out_valid && !out_ready;
      held = out_wline;
      if (was_stalled) stalls++;
      @(posedge clk);
      if (in_valid && in_ready) sent.push_back(in_line);
    end
    check(received > 1000 && stalls > 100, "traffic and stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cacheline_hash: self-checking test of the second-tier cacheline hash.
// Checks the SECDED configuration (8 x 64-bit words, h = 8) and the ChipKill
// configuration (4 x 128-bit words, h = 16) against a word-by-word reference,
// the one-cycle latency, that every tree has exactly kb/2 inputs, and that
// random cachelines spread over the 2^h buckets (no bucket more than three
// times its expected share, none empty, for 8192 lines and h = 8).
module tb_cacheline_hash;
  import sdecc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic en8, en16;
  logic [7:0][63:0]  line8;
  logic [3:0][127:0] line16;
  logic valid8, valid16;
  logic [7:0]  hash8, comb8;
  logic [15:0] hash16, comb16;
  int bucket [256];

  cacheline_hash dut8 (.clk, .rst_n, .en(en8), .line(line8), .valid(valid8),
                       .hash(hash8), .hash_comb(comb8));
  cacheline_hash #(.WORD_BITS(128), .WORDS(4), .H(16)) dut16 (
    .clk, .rst_n, .en(en16), .line(line16), .valid(valid16), .hash(hash16), .hash_comb(comb16));

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

  initial begin
    logic [7:0]  exp8;
    logic [15:0] exp16;
    int mx, mn;
    en8 = 0; en16 = 0; line8 = '0; line16 = '0;
    foreach (bucket[i]) bucket[i] = 0;
    for (int t = 0; t < 16; t++) begin
      check($countones(hash_tree_mask(t, 64)) == 32, "tree of 32 inputs");
      check($countones(hash_tree_mask(t, 128)) == 64, "tree of 64 inputs");
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int n = 0; n < 8192; n++) begin
      @(negedge clk);
      for (int w = 0; w < 8; w++) line8[w] = {$urandom, $urandom};
      for (int w = 0; w < 4; w++) line16[w] = {$urandom, $urandom, $urandom, $urandom};
      en8 = 1; en16 = 1;
      exp8  = 8'(ref_hash(1024'(line8), 64, 8, 8));
      exp16 = ref_hash(1024'(line16), 128, 4, 16);
      @(posedge clk);
      #1;
      check(valid8 && hash8 == exp8, $sformatf("hash8 %h vs %h", hash8, exp8));
      check(valid16 && hash16 == exp16, $sformatf("hash16 %h vs %h", hash16, exp16));
      bucket[hash8]++;
      @(negedge clk);
      en8 = 0; en16 = 0;
      line8[0] = ~line8[0];
      @(posedge clk);
      #1;
      check(!valid8 && hash8 == exp8, "hash held while en is low");
    end
    mx = 0; mn = 1 << 30;
    foreach (bucket[i]) begin
      if (bucket[i] > mx) mx = bucket[i];
      if (bucket[i] < mn) mn = bucket[i];
    end
    $display("bucket occupancy: min %0d max %0d (mean 32)", mn, mx);
    check(mx <= 96 && mn > 0, "hash spreads over buckets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

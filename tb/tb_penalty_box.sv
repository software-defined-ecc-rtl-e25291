// tb_penalty_box: self-checking test of the Penalty Box.
// Shifts in random 72-bit strings and checks that after eight shifts entry b
// holds beat b; that the contents hold while shift_en is low (box in
// service); that a software write replaces exactly one entry and wins over a
// shift in the same cycle; and that the hash register loads only on
// hash_load.
module tb_penalty_box;
  import sdecc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic shift_en, hash_load, wr_en;
  cw_t  shift_in, wr_data;
  logic [7:0] hash_in, hash;
  logic [2:0] wr_idx;
  logic [BURST-1:0][N-1:0] entries;
  cw_t  beats [BURST];
  cw_t  expect_e [BURST];

  penalty_box dut (.clk, .rst_n, .shift_en, .shift_in, .hash_load, .hash_in,
                   .wr_en, .wr_idx, .wr_data, .hash, .entries);

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

  function automatic cw_t rnd72();
    return {8'($urandom), $urandom, $urandom};
  endfunction

  initial begin
    shift_en = 0; hash_load = 0; wr_en = 0; shift_in = '0; wr_data = '0; hash_in = 0; wr_idx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 200; rep++) begin
      for (int b = 0; b < BURST; b++) begin
        @(negedge clk);
        beats[b] = rnd72();
        shift_in = beats[b];
        shift_en = 1;
        hash_load = (b == BURST - 1);
        hash_in = 8'(rep * 7 + 3);
      end
      @(negedge clk);
      shift_en = 0; hash_load = 0;
      for (int b = 0; b < BURST; b++) check(entries[b] == beats[b], $sformatf("entry %0d after burst", b));
      check(hash == 8'(rep * 7 + 3), "hash loaded");
      // locked: inputs change, nothing shifts
      shift_in = rnd72(); hash_in = ~hash_in;
      repeat (3) @(negedge clk);
      for (int b = 0; b < BURST; b++) check(entries[b] == beats[b], "held while not shifting");
      check(hash == 8'(rep * 7 + 3), "hash held");
      // software write-back, also racing with a shift
      foreach (expect_e[b]) expect_e[b] = beats[b];
      wr_idx = 3'($urandom_range(7));
      wr_data = rnd72();
      expect_e[wr_idx] = wr_data;
      wr_en = 1;
      shift_en = (rep % 2 == 1);
      @(negedge clk);
      wr_en = 0; shift_en = 0;
      for (int b = 0; b < BURST; b++) check(entries[b] == expect_e[b], "write-back of one entry");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

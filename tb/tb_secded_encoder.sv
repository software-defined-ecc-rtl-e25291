// tb_secded_encoder: self-checking test of the [72,64,4] SECDED encoder.
// Random and corner-case messages are encoded; each codeword is compared with
// a bit-level reference encoder built from an independent derivation of the
// parity-check columns, and its syndrome is checked to be zero. Linearity
// (enc(a^b) = enc(a)^enc(b)) and the odd, distinct columns of the code are
// checked as well.
module tb_secded_encoder;
  import sdecc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  msg_t data;
  cw_t  cw;

  secded_encoder dut (.data, .cw);

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
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    msg_t a, b;
    cw_t  ca, cb;
    // code structure: distinct odd-weight columns
    for (int i = 0; i < N; i++) begin
      check($countones(ref_col(i)) % 2 == 1, $sformatf("column %0d weight", i));
      for (int j = i + 1; j < N; j++)
        check(ref_col(i) != ref_col(j), $sformatf("columns %0d,%0d distinct", i, j));
    end
    for (int n = 0; n < 3000; n++) begin
      case (n)
        0: data = '0;
        1: data = '1;
        default: data = {$urandom, $urandom};
      endcase
      if (n >= 2 && n < 66) data = msg_t'(1) << (n - 2);
      #1;
      check(cw == ref_encode(data), $sformatf("codeword of %h: %h vs %h", data, cw, ref_encode(data)));
      check(ref_syndrome(cw) == 0, "syndrome zero");
      check(cw[K-1:0] == data, "systematic");
      @(posedge clk);
    end
    for (int n = 0; n < 500; n++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      data = a; #1 ca = cw;
      data = b; #1 cb = cw;
      data = a ^ b; #1;
      check(cw == (ca ^ cb), "linearity");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

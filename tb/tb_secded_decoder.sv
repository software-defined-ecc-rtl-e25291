// tb_secded_decoder: self-checking test of the [72,64,4] SECDED decoder.
// For random messages (encoded by the reference encoder) it checks: no error
// gives DEC_OK; every single-bit error in all 72 positions gives DEC_CE with
// the right position and corrected data; every double-bit error gives DEC_DUE
// (exhaustively, all 2556 pairs, for a few messages); triple errors never
// pass as DEC_OK.
module tb_secded_decoder;
  import sdecc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  cw_t  x, cw;
  msg_t data;
  logic [R-1:0] syndrome;
  dec_status_e status;
  logic [6:0] err_pos;

  secded_decoder dut (.x, .data, .cw, .syndrome, .status, .err_pos);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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
    msg_t m;
    cw_t  c;
    int   i, j, k;
    for (int n = 0; n < 40; n++) begin
      m = {$urandom, $urandom};
      c = ref_encode(m);
      x = c; #1;
      check(status == DEC_OK && data == m && syndrome == 0, "no error");
      for (i = 0; i < N; i++) begin
        x = c; x[i] = ~x[i]; #1;
        check(status == DEC_CE && data == m && cw == c && err_pos == 7'(i),
              $sformatf("single error at %0d", i));
      end
      if (n < 4) begin
        for (i = 0; i < N; i++)
          for (j = i + 1; j < N; j++) begin
            x = c; x[i] = ~x[i]; x[j] = ~x[j]; #1;
            check(status == DEC_DUE, $sformatf("double error %0d,%0d", i, j));
          end
      end
      for (int t = 0; t < 200; t++) begin
        i = $urandom_range(N - 1);
        do j = $urandom_range(N - 1); while (j == i);
        do k = $urandom_range(N - 1); while (k == i || k == j);
        x = c; x[i] = ~x[i]; x[j] = ~x[j]; x[k] = ~x[k]; #1;
        check(status != DEC_OK, "triple error detected or miscorrected, never clean");
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

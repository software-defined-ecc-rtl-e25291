// tb_addr_xlate: self-checking test of linear-to-physical translation.
// Random and corner addresses: column = bits [6:0], row = bits [27:10],
// rank = bits [29:28], bank = bits [9:7] XOR row[2:0]. Also checks that the
// map is one-to-one on a sample (no two addresses give the same location).
module tb_addr_xlate;
  import sdecc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  laddr_t laddr;
  phys_addr_t pa;
  bit seen [phys_addr_t];

  addr_xlate dut (.laddr, .pa);

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
    logic [17:0] row;
    for (int n = 0; n < 5000; n++) begin
      laddr = (n < 4096) ? laddr_t'(n * 37) : laddr_t'($urandom);
      #1;
      row = laddr[27:10];
      check(pa.col == laddr[6:0], "column");
      check(pa.row == row, "row");
      check(pa.rank == laddr[29:28], "rank");
      check(pa.bank == (laddr[9:7] ^ row[2:0]), "bank");
      check(!seen.exists(pa), "one-to-one");
      seen[pa] = 1;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

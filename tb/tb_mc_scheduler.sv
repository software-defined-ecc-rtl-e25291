// tb_mc_scheduler: self-checking test of the transaction scheduler.
// Drives random combinations of retry and request valids, request type and
// downstream readies, and checks the expected handshakes: a retry always wins
// and goes out unchanged; a read request goes out when the transaction queue
// is ready; a write goes out only when both the transaction queue and the
// write path are ready, with its data on wr_line; nothing is accepted
// without the matching output handshake.
module tb_mc_scheduler;
  import sdecc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  logic retry_valid, retry_ready, req_valid, req_ready, txn_valid, txn_ready, wr_valid, wr_ready;
  txn_t retry_txn, txn;
  mem_req_t req;
  line_t wr_line;
  int retry_wins = 0, write_waits = 0;

  mc_scheduler dut (.retry_valid, .retry_ready, .retry_txn, .req_valid, .req_ready, .req,
                    .txn_valid, .txn_ready, .txn, .wr_valid, .wr_ready, .wr_line);

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
    bit exp_txn_fire, exp_wr_fire;
    for (int n = 0; n < 5000; n++) begin
      retry_valid = 1'($urandom); req_valid = 1'($urandom);
      txn_ready = 1'($urandom); wr_ready = 1'($urandom);
      retry_txn = '{tag: 8'($urandom), we: 1'b0, prefetch: 1'($urandom), retried: 1'b1, laddr: 30'($urandom)};
      req.tag = 8'($urandom); req.we = 1'($urandom); req.prefetch = 1'($urandom);
      req.laddr = 30'($urandom);
      for (int b = 0; b < BURST; b++) req.wdata[b] = {$urandom, $urandom};
      #1;
      if (retry_valid) begin
        check(txn_valid && txn == retry_txn, "retry goes out");
        check(retry_ready == txn_ready && !req_ready && !wr_valid, "retry handshake");
        if (req_valid) retry_wins++;
      end else if (req_valid) begin
        check(txn.tag == req.tag && txn.we == req.we && txn.prefetch == req.prefetch &&
              !txn.retried && txn.laddr == req.laddr, "request becomes a transaction");
        exp_txn_fire = req.we ? (txn_ready && wr_ready) : txn_ready;
        check((txn_valid && txn_ready) == exp_txn_fire, "transaction handshake");
        check(req_ready == exp_txn_fire, "request accepted");
        exp_wr_fire = req.we && txn_ready && wr_ready;
        check((wr_valid && wr_ready) == exp_wr_fire, "write data handshake");
        if (req.we) check(wr_line == req.wdata, "write data");
        if (req.we && txn_ready && !wr_ready) write_waits++;
        check(!retry_ready, "no retry");
      end else begin
        check(!txn_valid && !wr_valid && !req_ready, "idle");
      end
      @(posedge clk);
    end
    check(retry_wins > 0 && write_waits > 0, "priority and write stall both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

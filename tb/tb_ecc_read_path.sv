// tb_ecc_read_path: self-checking test of the read path.
// The testbench plays the read buffer, the in-flight read list and the
// SERVICE_REQ flag of the status registers. Each cacheline is built with the
// reference encoder and one of these cases: clean, single-bit errors, a
// double-bit DUE on a demand read (first attempt, then retried), a DUE on a
// prefetch, a DUE while the Penalty Box is in service. The expected outcome
// (OK / CORRECTED / retry / capture / DROPPED / POISON), the returned data,
// the masks, the hash bits and the raw strings shifted toward the Penalty Box
// are worked out in the testbench and compared. Output backpressure is random.
// Also checks the rate: a line with a ready output takes nine cycles.
module tb_ecc_read_path;
  import sdecc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic beat_valid, beat_ready, inf_valid, inf_ready, retry_valid, retry_ready;
  logic rsp_valid, rsp_ready, service_req, pb_shift_en, pb_hash_load, due_event;
  logic ce_event, overflow_event;
  beat_t beat;
  txn_t inf, retry_txn;
  mem_rsp_t rsp;
  cw_t pb_shift_data;
  logic [7:0] pb_hash, due_mask, ce_mask;
  laddr_t due_laddr;
  tag_t due_tag;
  int outcome_count [6];
  int ce_events = 0;

  ecc_read_path dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && ce_event) ce_events++;

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

  // case: 0 clean, 1 CE, 2 DUE first try, 3 DUE retried, 4 DUE prefetch, 5 DUE while busy
  task automatic run_line(int kind, bit random_stall);
    line_t  msg;
    beat_t  raw [BURST];
    logic [7:0] h, exp_due, exp_ce;
    int     due_w, i, j, cycles;
    cw_t    shifted [$];
    bit     done_flag;
    for (int b = 0; b < BURST; b++) msg[b] = {$urandom, $urandom};
    h = 8'($urandom);
    exp_due = 0; exp_ce = 0;
    for (int b = 0; b < BURST; b++) raw[b] = {h[b], ref_encode(msg[b])};
    if (kind == 1) begin
      for (int b = 0; b < BURST; b += 3) begin
        i = $urandom_range(N - 1);
        raw[b][i] = ~raw[b][i];
        exp_ce[b] = 1;
      end
    end
    if (kind >= 2) begin
      due_w = $urandom_range(BURST - 1);
      i = $urandom_range(N - 1);
      do j = $urandom_range(N - 1); while (j == i);
      raw[due_w][i] = ~raw[due_w][i];
      raw[due_w][j] = ~raw[due_w][j];
      exp_due[due_w] = 1;
    end
    inf = '{tag: 8'($urandom), we: 1'b0, prefetch: (kind == 4), retried: (kind == 3 || kind == 5),
            laddr: laddr_t'($urandom)};
    service_req = (kind == 5);
    inf_valid = 1;
    cycles = 0;
    for (int b = 0; b < BURST; b++) begin
      @(negedge clk);
      beat_valid = 1;
      beat = raw[b];
      #1;
      check(beat_ready, "beat accepted while collecting");
      check(pb_shift_en == !service_req, "shift toward Penalty Box only while free");
      if (pb_shift_en) shifted.push_back(pb_shift_data);
      @(posedge clk);
      cycles++;
    end
    @(negedge clk);
    beat_valid = 0;
    done_flag = 0;
    while (!done_flag) begin
      rsp_ready = random_stall ? 1'($urandom) : 1'b1;
      retry_ready = random_stall ? 1'($urandom) : 1'b1;
      #1;
      check(!beat_ready, "no beat taken while deciding");
      case (kind)
        0, 1: begin
          check(rsp_valid && !retry_valid && !due_event, "clean line responds");
          check(rsp.tag == inf.tag && rsp.rdata == msg, "data corrected and returned");
          check(rsp.status == (kind == 1 ? RSP_CORRECTED : RSP_OK), "OK/CORRECTED status");
          done_flag = rsp_ready;
        end
        2: begin
          check(retry_valid && !rsp_valid && !due_event, "first DUE is retried");
          check(retry_txn.retried && retry_txn.tag == inf.tag && retry_txn.laddr == inf.laddr, "retry txn");
          done_flag = retry_ready;
        end
        3: begin
          check(due_event && pb_hash_load && !rsp_valid && !retry_valid, "DUE captured");
          check(due_mask == exp_due && due_tag == inf.tag && due_laddr == inf.laddr, "DUE info");
          check(pb_hash == h, "original hash collected");
          check(shifted.size() == BURST, "all raw strings shifted");
          for (int b = 0; b < BURST && b < shifted.size(); b++)
            check(shifted[b] == raw[b][N-1:0], "raw string shifted as-is");
          done_flag = 1;
        end
        4: begin
          check(rsp_valid && rsp.status == RSP_DROPPED && !due_event, "prefetch DUE dropped");
          done_flag = rsp_ready;
        end
        5: begin
          check(rsp_valid && rsp.status == RSP_POISON && !due_event, "DUE while busy poisoned");
          check(overflow_event == rsp_ready, "overflow reported");
          done_flag = rsp_ready;
        end
        default: ;
      endcase
      check(inf_ready == done_flag, "in-flight entry popped when done");
      @(posedge clk);
      cycles++;
      @(negedge clk);
    end
    if (!random_stall) check(cycles == BURST + 1, $sformatf("nine cycles per line (%0d)", cycles));
    rsp_ready = 0; retry_ready = 0; inf_valid = 0;
    outcome_count[kind]++;
  endtask

  initial begin
    beat_valid = 0; beat = '0; inf_valid = 0; inf = '0; retry_ready = 0; rsp_ready = 0;
    service_req = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) run_line(n % 6, n >= 60);
    foreach (outcome_count[k]) check(outcome_count[k] == 100, "every case exercised");
    check(ce_events == 100, "one CE event per corrected line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
